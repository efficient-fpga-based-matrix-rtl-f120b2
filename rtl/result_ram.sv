// Result memory: one word per matrix row, holding that row's dot product.
//
// A simple dual-port RAM: one synchronous write port, used by the
// matrix-vector engine, and one synchronous read port for whoever collects
// the result vector (rdata appears the cycle after raddr). rst clears only the
// read register, not the stored words, so the array maps onto block RAM. The
// RAM after the accumulator, with clock and reset inputs, follows the paper's
// matrix figure; the port arrangement is this design's own.
module result_ram #(
  parameter int unsigned DEPTH = 1028,
  parameter int unsigned W     = 21,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else     rdata <= mem[raddr];
  end

  write_in_range: assert property (@(posedge clk) disable iff (rst)
                                   we |-> (32'(waddr) < DEPTH))
    else $error("result_ram: write address %0d out of range", waddr);
endmodule

// Multiply-accumulate unit of the matrix-vector multiplier.
//
// One product of a matrix element a and a vector element c is formed per
// cycle by the MUX/Vedic multiplier (vedic_mult8x8 for DW=8, vedic_mult16x16
// for DW=16), added to the accumulator register G and written back into it.
// On a cycle with en=1 and first=1 the accumulator restarts from the product
// alone, which begins a new dot product without a separate clear cycle; with
// en=0 it holds. The multiplier, adder and D flip-flop register with feedback
// follow the paper's matrix figure; the first/enable controls are this
// design's own. G is valid the cycle after the last product of a row was
// presented. rst clears G.
module mac_unit #(
  parameter int unsigned DW    = 8,
  parameter int unsigned ACC_W = 21
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             first,
  input  logic [DW-1:0]    a,
  input  logic [DW-1:0]    c,
  output logic [ACC_W-1:0] g
);
  logic [2*DW-1:0] prod;

  generate
    if (DW == 8) begin : g_m8
      vedic_mult8x8 u_mult (.a(a), .b(c), .r(prod));
    end else if (DW == 16) begin : g_m16
      vedic_mult16x16 u_mult (.a(a), .b(c), .r(prod));
    end else begin : g_bad
      $error("mac_unit: DW must be 8 or 16");
    end
  endgenerate

  logic [ACC_W-1:0] sum;
  always_comb sum = (first ? '0 : g) + ACC_W'(prod);

  always_ff @(posedge clk) begin
    if (rst)     g <= '0;
    else if (en) g <= sum;
  end
endmodule

// Self-checking testbench for matvec_engine with 16-bit elements, where its
// multiply-accumulate unit uses the 16x16 multiplier (5 x 6 matrix).
//
// Runs several complete operations: with words back to back and with random
// idle cycles between them, with random and with all-maximum operands, and
// with junk offered before start (which must be ignored). After each
// operation every result word is read back and compared with a dot product
// worked out here. With words back to back the cycle count is checked:
// done must rise two cycles after the last matrix word is accepted, i.e.
// COLS + ROWS*COLS + 1 clock edges after the first word. The row/index
// outputs and busy are checked along the way.
module tb_matvec_engine_w16;
  localparam int unsigned DW = 16, ROWS = 5, COLS = 6;
  localparam int unsigned ACC_W = 2 * DW + $clog2(COLS);
  localparam int unsigned RW = $clog2(ROWS), CW = $clog2(COLS);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             rst, start, in_valid, busy, done;
  logic [DW-1:0]    data_in;
  logic [RW-1:0]    rd_addr, row;
  logic [CW-1:0]    index;
  logic [ACC_W-1:0] data_out;

  matvec_engine #(.DW(DW), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [DW-1:0] cvec [COLS];
  logic [DW-1:0] amat [ROWS][COLS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Offer one word; idle cycles before it with probability gap_pct percent.
  task automatic send(input logic [DW-1:0] w, input int gap_pct);
    while (($urandom % 100) < gap_pct) begin
      in_valid = 1'b0; data_in = DW'($urandom);
      @(negedge clk);
    end
    in_valid = 1'b1; data_in = w;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic run_op(input int gap_pct, input bit maxval);
    int edges;
    for (int k = 0; k < COLS; k++) cvec[k] = maxval ? '1 : DW'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++) amat[r][k] = maxval ? '1 : DW'($urandom);

    // junk before start must be ignored
    repeat (3) begin
      in_valid = 1'b1; data_in = DW'($urandom);
      @(negedge clk);
    end
    in_valid = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy && !done, "busy after start");

    for (int k = 0; k < COLS; k++) send(cvec[k], gap_pct);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++) begin
        check(32'(row) == r && 32'(index) == k, "row/index position");
        send(amat[r][k], gap_pct);
      end
    edges = 0;
    while (!done && edges < 100) begin
      @(negedge clk);
      edges++;
    end
    // edges since the edge that took the last word
    check(edges == 2, $sformatf("done latency: %0d edges after last word", edges));
    check(!busy, "busy low after done");

    for (int r = 0; r < ROWS; r++) begin
      logic [ACC_W-1:0] want;
      want = '0;
      for (int k = 0; k < COLS; k++) want += ACC_W'(amat[r][k]) * ACC_W'(cvec[k]);
      rd_addr = RW'(r);
      @(negedge clk);
      check(data_out == want, $sformatf("row %0d result %0d want %0d", r, data_out, want));
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; in_valid = 1'b0; data_in = '0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(!busy && !done, "idle after reset");

    // back to back, with the total cycle count measured
    begin
      int t0, t1;
      fork
        run_op(0, 1'b0);
        begin
          @(posedge clk iff (in_valid && busy));
          t0 = int'($time);
          @(negedge clk iff done);
          t1 = int'($time) - 5;
          check((t1 - t0) / 10 == int'(COLS + ROWS * COLS + 1),
                $sformatf("operation length %0d edges", (t1 - t0) / 10));
        end
      join
    end
    run_op(0, 1'b1);          // largest operands
    repeat (3) run_op(40, 1'b0);  // idle cycles between words
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

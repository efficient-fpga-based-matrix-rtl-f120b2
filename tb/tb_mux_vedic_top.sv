// End-to-end testbench for mux_vedic_top at its default size: a 1028 x 28
// matrix of 8-bit elements times a 28 x 1 vector, plus the stand-alone
// 16x16 multiplier.
//
// Two complete matrix-vector operations are run. The first streams every
// word back to back and checks the total length (COLS + ROWS*COLS + 1 clock
// edges from the first word to done). The second puts random idle cycles
// between words and makes some rows all-maximum (255), the largest dot
// product the accumulator must hold. Junk offered while idle must be
// ignored. After each operation all 1028 results are read back and compared
// with dot products worked out here. Meanwhile the 16x16 multiplier is fed
// random operands every cycle and checked. Each mechanism is counted:
// vector loads, completed rows (row counter advancing), idle gaps inside an
// operation, back-to-back words, maximum-value rows, restarts after done,
// ignored words and 16x16 products; any that never happened counts a failure.
module tb_mux_vedic_top;
  import mvm_pkg::*;
  localparam int unsigned DW = DATA_W, ROWS = MAT_ROWS, COLS = MAT_COLS;
  localparam int unsigned ACC_W = acc_width(DW, COLS);
  localparam int unsigned RW = $clog2(ROWS), CW = $clog2(COLS);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             rst, start, in_valid, busy, done;
  logic [DW-1:0]    data_in;
  logic [RW-1:0]    rd_addr, row;
  logic [CW-1:0]    index;
  logic [ACC_W-1:0] data_out;
  logic [15:0]      m16_a, m16_b;
  logic [31:0]      m16_r;

  mux_vedic_top dut (.*);

  logic [DW-1:0] cvec [COLS];
  logic [DW-1:0] amat [ROWS][COLS];

  int n_vec_loads, n_rows_done, n_gaps, n_back_to_back, n_max_rows,
      n_restarts, n_ignored, n_m16;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // 16x16 multiplier: new random operands each cycle, checked before changing.
  initial begin
    m16_a = '0; m16_b = '0;
    forever begin
      @(negedge clk);
      check(m16_r == 32'(m16_a) * 32'(m16_b),
            $sformatf("16x16: %0d*%0d gave %0d", m16_a, m16_b, m16_r));
      n_m16++;
      m16_a = 16'($urandom); m16_b = 16'($urandom);
    end
  end

  // Count completed rows from the row counter.
  logic [RW-1:0] row_q;
  always @(posedge clk) begin
    row_q <= row;
    if (!rst && busy && row != row_q && row != '0) n_rows_done++;
  end

  logic prev_taken;
  task automatic send(input logic [DW-1:0] w, input int gap_pct);
    while (($urandom % 100) < gap_pct) begin
      in_valid = 1'b0; data_in = DW'($urandom);
      n_gaps++;
      prev_taken = 1'b0;
      @(negedge clk);
    end
    if (prev_taken) n_back_to_back++;
    in_valid = 1'b1; data_in = w;
    @(negedge clk);
    in_valid = 1'b0;
    prev_taken = 1'b1;
  endtask

  task automatic run_op(input int gap_pct, input bit some_max);
    int edges;
    for (int k = 0; k < COLS; k++) cvec[k] = (some_max && k % 2 == 0) ? '1 : DW'($urandom);
    for (int r = 0; r < ROWS; r++) begin
      bit mx;
      mx = some_max && (r % 97 == 5);
      if (mx) n_max_rows++;
      for (int k = 0; k < COLS; k++) amat[r][k] = mx ? '1 : DW'($urandom);
    end
    if (some_max) for (int k = 0; k < COLS; k++) if (k % 2 == 1) cvec[k] = '1;

    if (done) n_restarts++;
    repeat (2) begin
      in_valid = 1'b1; data_in = DW'($urandom);
      n_ignored++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    prev_taken = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy && !done, "busy after start");

    for (int k = 0; k < COLS; k++) send(cvec[k], gap_pct);
    n_vec_loads++;
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++) begin
        if (k == 0) check(32'(row) == r && index == '0, $sformatf("row %0d start position", r));
        send(amat[r][k], gap_pct);
      end
    edges = 0;
    while (!done && edges < 100) begin
      @(negedge clk);
      edges++;
    end
    check(edges == 2, $sformatf("done %0d edges after last word", edges));

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
    n_vec_loads = 0; n_rows_done = 0; n_gaps = 0; n_back_to_back = 0;
    n_max_rows = 0; n_restarts = 0; n_ignored = 0; n_m16 = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

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
    run_op(20, 1'b1);

    $display("mechanisms: vector_loads=%0d rows_done=%0d idle_gaps=%0d back_to_back=%0d max_rows=%0d restarts=%0d ignored_words=%0d m16_products=%0d",
             n_vec_loads, n_rows_done, n_gaps, n_back_to_back, n_max_rows, n_restarts, n_ignored, n_m16);
    check(n_vec_loads > 0,    "vector load never happened");
    check(n_rows_done > 0,    "no row completed");
    check(n_gaps > 0,         "no idle gap");
    check(n_back_to_back > 0, "no back-to-back words");
    check(n_max_rows > 0,     "no maximum-value row");
    check(n_restarts > 0,     "no restart after done");
    check(n_ignored > 0,      "no ignored word");
    check(n_m16 > 0,          "16x16 multiplier never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

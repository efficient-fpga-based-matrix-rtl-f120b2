// Self-checking testbench for coef_shift_reg at its default size (28
// elements of 8 bits). Checks the reset value, that N serial loads put the
// first element at the output, that rotation presents c1..cN in order and
// wraps back to c1 (three full turns), that holding keeps the output, and
// that a new load replaces the vector.
module tb_coef_shift_reg;
  localparam int unsigned DW = 8, N = 28;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst, load, rotate;
  logic [DW-1:0] din, head;
  logic [DW-1:0] vec [N];

  coef_shift_reg #(.DW(DW), .N(N)) dut (.*);

  task automatic expect_head(input logic [DW-1:0] want, input string what);
    checks++;
    if (head !== want) begin
      failures++;
      $display("FAIL %s: head=%0d want %0d", what, head, want);
    end
  endtask

  task automatic load_vector();
    foreach (vec[i]) vec[i] = DW'($urandom);
    for (int i = 0; i < N; i++) begin
      load <= 1'b1; din <= vec[i];
      @(posedge clk);
    end
    load <= 1'b0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; rotate = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    expect_head('0, "reset");
    rst = 1'b0;

    for (int pass = 0; pass < 2; pass++) begin
      load_vector();
      expect_head(vec[0], "after load");
      for (int turn = 0; turn < 3; turn++) begin
        for (int k = 0; k < N; k++) begin
          expect_head(vec[k], "rotation");
          rotate = 1'b1;
          @(negedge clk);
          rotate = 1'b0;
          // hold for a cycle now and then
          if (k % 5 == 0) begin
            @(negedge clk);
            expect_head(vec[(k + 1) % N], "hold");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

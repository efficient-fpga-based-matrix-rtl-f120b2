// Self-checking testbench for mux_mult_s3, the 8:1-mux 3x3 multiplier.
// All 64 operand pairs are compared with the arithmetic product.
module tb_mux_mult_s3;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0] a, b;
  logic [5:0] y;

  mux_mult_s3 #(.BW(3)) dut (.a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j);
        #1;
        checks++;
        if (int'(y) != i * j) begin
          failures++;
          $display("FAIL 3x3: %0d*%0d gave %0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

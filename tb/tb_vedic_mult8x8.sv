// Self-checking testbench for vedic_mult8x8.
// First the five operand pairs of the reference simulation (255*255,
// 0*255, 170*85, 240*80, 252*87), then all 65536 pairs exhaustively, each
// compared with the arithmetic product.
module tb_vedic_mult8x8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0]  a, b;
  logic [15:0] r;

  vedic_mult8x8 dut (.a(a), .b(b), .r(r));

  task automatic check(input int x, input int y, input int want);
    a = 8'(x); b = 8'(y);
    #1;
    checks++;
    if (int'(r) != want) begin
      failures++;
      if (failures < 10) $display("FAIL 8x8: %0d*%0d gave %0d want %0d", x, y, r, want);
    end
  endtask

  initial begin
    check(255, 255, 65025);
    check(0,   255, 0);
    check(170, 85,  14450);
    check(240, 80,  19200);
    check(252, 87,  21924);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(i, j, i * j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

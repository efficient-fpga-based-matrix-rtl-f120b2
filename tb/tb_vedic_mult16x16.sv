// Self-checking testbench for vedic_mult16x16.
// Corner operands (0, 1, 255, 256, 0xFFFF and their mixes), then 200000
// random pairs, each compared with the 32-bit arithmetic product.
module tb_vedic_mult16x16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic [31:0] r;

  vedic_mult16x16 dut (.a(a), .b(b), .r(r));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] want;
    want = 32'(x) * 32'(y);
    a = x; b = y;
    #1;
    checks++;
    if (r !== want) begin
      failures++;
      if (failures < 10) $display("FAIL 16x16: %0d*%0d gave %0d want %0d", x, y, r, want);
    end
  endtask

  localparam logic [15:0] CORNER [8] = '{16'h0000, 16'h0001, 16'h00FF, 16'h0100,
                                         16'hFF00, 16'h8000, 16'hFFFE, 16'hFFFF};

  initial begin
    foreach (CORNER[i]) foreach (CORNER[j]) check(CORNER[i], CORNER[j]);
    for (int n = 0; n < 200000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for mux_mult_s2, the 4:1-mux multiplier.
// Checks both configurations exhaustively against the arithmetic product:
// BW=2 (the 2x2 multiplier, 16 cases, which also reproduces every row of its
// truth table) and BW=3 (the 3x2 multiplier, 32 cases).
module tb_mux_mult_s2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [1:0] a2, a3;
  logic [1:0] b2;
  logic [2:0] b3;
  logic [3:0] y2;
  logic [4:0] y3;

  mux_mult_s2 #(.BW(2)) dut2 (.a(a2), .b(b2), .y(y2));
  mux_mult_s2 #(.BW(3)) dut3 (.a(a3), .b(b3), .y(y3));

  // Truth table of the 2x2 multiplier: {a, b, y} per row.
  localparam logic [7:0] TT [13] = '{
    8'b00_00_0000, 8'b01_00_0000, 8'b01_01_0001, 8'b01_10_0010,
    8'b01_11_0011, 8'b10_00_0000, 8'b10_01_0010, 8'b10_10_0100,
    8'b10_11_0110, 8'b11_00_0000, 8'b11_01_0011, 8'b11_10_0110,
    8'b11_11_1001 };

  initial begin
    for (int i = 0; i < 13; i++) begin
      {a2, b2} = TT[i][7:4];
      #1;
      checks++;
      if (y2 !== TT[i][3:0]) begin
        failures++;
        $display("FAIL truth table row %0d: a=%b b=%b y=%b want %b", i, a2, b2, y2, TT[i][3:0]);
      end
    end
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 8; b++) begin
        a2 = 2'(a); b2 = 2'(b); a3 = 2'(a); b3 = 3'(b);
        #1;
        if (b < 4) begin
          checks++;
          if (int'(y2) != a * b) begin
            failures++;
            $display("FAIL 2x2: %0d*%0d gave %0d", a, b, y2);
          end
        end
        checks++;
        if (int'(y3) != a * b) begin
          failures++;
          $display("FAIL 3x2: %0d*%0d gave %0d", a, b, y3);
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

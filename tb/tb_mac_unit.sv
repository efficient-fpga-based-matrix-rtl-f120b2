// Self-checking testbench for mac_unit, with the 8x8 multiplier (DW=8,
// 21-bit accumulator) and with the 16x16 one (DW=16, 37-bit accumulator).
// Random dot products of random length, with idle cycles in between, are
// compared with a reference sum after every cycle; the largest operands are
// included so the accumulator width is exercised.
module tb_mac_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, en, first;
  logic [7:0]  a8, c8;
  logic [15:0] a16, c16;
  logic [20:0] g8;
  logic [36:0] g16;

  mac_unit #(.DW(8),  .ACC_W(21)) dut8  (.clk, .rst, .en, .first, .a(a8),  .c(c8),  .g(g8));
  mac_unit #(.DW(16), .ACC_W(37)) dut16 (.clk, .rst, .en, .first, .a(a16), .c(c16), .g(g16));

  longint unsigned ref8, ref16;

  initial begin
    rst = 1'b1; en = 1'b0; first = 1'b0; a8 = '0; c8 = '0; a16 = '0; c16 = '0;
    ref8 = 0; ref16 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (g8 !== '0 || g16 !== '0) begin failures++; $display("FAIL reset"); end

    for (int n = 0; n < 3000; n++) begin
      en    = ($urandom % 4) != 0;
      first = ($urandom % 29) == 0;
      if (n % 500 < 28) begin
        // a run of largest operands, as long as a full row
        a8 = 8'hFF; c8 = 8'hFF; a16 = 16'hFFFF; c16 = 16'hFFFF;
        en = 1'b1; first = (n % 500 == 0);
      end else begin
        a8 = 8'($urandom); c8 = 8'($urandom); a16 = 16'($urandom); c16 = 16'($urandom);
      end
      if (en) begin
        ref8  = (first ? 0 : ref8)  + longint'(a8)  * longint'(c8);
        ref16 = (first ? 0 : ref16) + longint'(a16) * longint'(c16);
        ref8  &= (64'd1 << 21) - 1;
        ref16 &= (64'd1 << 37) - 1;
      end
      @(negedge clk);
      checks++;
      if (64'(g8) != ref8 || 64'(g16) != ref16) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: g8=%0d want %0d, g16=%0d want %0d", n, g8, ref8, g16, ref16);
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

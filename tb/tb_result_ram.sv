// Self-checking testbench for result_ram at its default size (1028 words of
// 21 bits). Fills every word with random data, reads all back in random
// order with the one-cycle read latency, overwrites some words and reads
// them again while other writes go on, and checks that reset clears the read
// register.
module tb_result_ram;
  localparam int unsigned DEPTH = 1028, W = 21, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst, we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];

  result_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic read_check(input int addr);
    raddr = AW'(addr);
    @(negedge clk);
    checks++;
    if (rdata !== model[addr]) begin
      failures++;
      if (failures < 10) $display("FAIL read %0d: %0d want %0d", addr, rdata, model[addr]);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    @(negedge clk);
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL reset value"); end
    rst = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = W'($urandom);
      we = 1'b1; waddr = AW'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 2000; n++) read_check($urandom % DEPTH);
    // writes and reads in the same cycles, to different words
    for (int n = 0; n < 1000; n++) begin
      int wa, ra;
      wa = $urandom % DEPTH;
      ra = (wa + 1 + $urandom % (DEPTH - 1)) % DEPTH;
      we = 1'b1; waddr = AW'(wa); wdata = W'($urandom);
      read_check(ra);
      model[wa] = wdata;
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) read_check(i);
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL reset clears read register"); end
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

// program_memory_tb: writes the whole 2K x 16-bit program memory with a
// pattern, reads it back in a random order and checks the one-cycle read
// latency and that the output holds while the memory is not enabled.
module program_memory_tb;
  localparam int unsigned WORDS = 2048, WIDTH = 16, AW = 11;

  logic clk = 0;
  always #5 clk = ~clk;

  logic ce, we;
  logic [AW-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;

  program_memory #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .clk(clk), .ce(ce), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  int checks = 0, failures = 0;

  function automatic logic [WIDTH-1:0] pat(int a);
    return WIDTH'((a * 40503) ^ (a >> 3) ^ 16'h1d2b);
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    ce = 0; we = 0; addr = '0; wdata = '0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      ce = 1; we = 1; addr = AW'(a); wdata = pat(a);
    end
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = int'($urandom % WORDS);
      @(negedge clk);
      ce = 1; we = 0; addr = AW'(a);
      @(negedge clk);
      ce = 0; addr = AW'($urandom);
      chk(rdata == pat(a), $sformatf("read %0d", a));
      @(negedge clk);
      chk(rdata == pat(a), $sformatf("hold %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// pc_zolc_tb: checks the program counter with zero-overhead loops against
// hand-written address sequences: a 3-word loop run 3 times, nested loops
// (LF counts 1 then 2), a one-word loop, a one-pass loop, a jump with its
// delay slot inside a loop, and fetch stalls that must hold everything.
module pc_zolc_tb;
  localparam int unsigned AW = 11, CNT_W = 16;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, fetch_en, jump, loop_setup;
  logic [AW-1:0] jump_target, loop_end, pc, ls, le;
  logic [CNT_W-1:0] loop_count, lc;
  logic [2:0] lf;

  pc_zolc #(.AW(AW), .CNT_W(CNT_W), .LOOP_DEPTH(4)) dut (
    .clk(clk), .rst_n(rst_n), .fetch_en(fetch_en), .jump(jump),
    .jump_target(jump_target), .loop_setup(loop_setup), .loop_end(loop_end),
    .loop_count(loop_count), .pc(pc), .ls(ls), .le(le), .lc(lc), .lf(lf));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // one fetch: check the address, give decode information for this cycle
  task automatic f(int exp_pc, int exp_lf = -1, bit st = 0, int se = 0, int sc = 0,
                   bit j = 0, int jt = 0);
    if ($urandom % 4 == 0) begin
      logic [AW-1:0] hold;
      @(negedge clk);
      hold = pc; fetch_en = 0; loop_setup = 0; jump = 0;
      @(negedge clk);
      chk(pc == hold, "stall holds pc");
    end
    @(negedge clk);
    chk(32'(pc) == exp_pc, $sformatf("pc %0d expected %0d", pc, exp_pc));
    if (exp_lf >= 0) chk(32'(lf) == exp_lf, $sformatf("lf %0d expected %0d at %0d", lf, exp_lf, exp_pc));
    fetch_en = 1; loop_setup = st; loop_end = AW'(se); loop_count = CNT_W'(sc);
    jump = j; jump_target = AW'(jt);
  endtask

  initial begin
    rst_n = 0; fetch_en = 0; jump = 0; loop_setup = 0;
    jump_target = '0; loop_end = '0; loop_count = '0;
    @(negedge clk); rst_n = 1;
    f(0, 0); f(1); f(2);
    // loop 3..5 x3 (set up in the cycle 3 is fetched)
    f(3, 0, 1, 5, 3); f(4, 1); f(5);
    f(3, 1); f(4); f(5, 1);
    f(3); f(4); f(5, 1);
    f(6, 0);
    // nested: outer 8..14 x2, inner 10..11 x3
    f(7); f(8, 0, 1, 14, 2); f(9, 1);
    f(10, 1, 1, 11, 3); f(11, 2); f(10, 2); f(11); f(10); f(11, 2);
    f(12, 1); f(13); f(14);
    f(8, 1); f(9, 1);
    f(10, 1, 1, 11, 3); f(11, 2); f(10); f(11); f(10); f(11);
    f(12, 1); f(13); f(14, 1);
    f(15, 0);
    // one-word loop x4 at 16, then a one-pass loop 17..18
    f(16, 0, 1, 16, 4); f(16, 1); f(16); f(16);
    f(17, 0, 1, 18, 1); f(18, 1); f(19, 0);
    // loop 20..24 x2 with a jump at 20 (decoded while 21 is fetched) to 23
    f(20, 0, 1, 24, 2); f(21, 1, 0, 0, 0, 1, 23); f(23); f(24);
    f(20); f(21); f(22); f(23); f(24); f(25, 0);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

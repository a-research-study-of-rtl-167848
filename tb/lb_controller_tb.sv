// lb_controller_tb: directed test of the loop buffer controller with a
// behavioural loop buffer of 8 words (a tag array written by lb_wr, cleared
// by tag_clr). Each fetch is checked against a hand-derived state and
// source (program memory or loop buffer):
//   1. a 4-word loop run 5 times: s0 s1 s2 s2 s3, then 15 fetches from the
//      loop buffer, s5, s0 (15 loop buffer reads, 4 recordings, 7 PM reads counting the
//      two fetches after the loop);
//   2. the same with fetch stalls in between: identical counts; and a stall
//      in s3, after which the loop buffer already serves the loop start;
//   3. a 6-word loop whose first iteration skips one word: the skipped word
//      misses in s4, goes back to s1 and is recorded;
//   4. a one-pass loop and a loop too large for the buffer stay in s0.
module lb_controller_tb;
  import lb_pkg::*;

  localparam int unsigned AW = 11, CNT_W = 16, IDX_W = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, fetch_en, setup, fits, cfg_load, tag_clr, tag_hit;
  logic lb_rd, lb_wr, pm_rd, src_lb;
  logic [AW-1:0] fetch_addr, setup_end;
  logic [CNT_W-1:0] setup_count;
  logic [AW:0] body_size;
  logic [IDX_W-1:0] rd_idx, wr_idx;
  lb_state_e state;

  lb_controller #(.AW(AW), .CNT_W(CNT_W), .IDX_W(IDX_W)) dut (
    .clk(clk), .rst_n(rst_n), .fetch_en(fetch_en), .fetch_addr(fetch_addr),
    .setup(setup), .setup_end(setup_end), .setup_count(setup_count),
    .body_size(body_size), .fits(fits), .cfg_load(cfg_load), .tag_clr(tag_clr),
    .rd_idx(rd_idx), .tag_hit(tag_hit), .lb_rd(lb_rd), .lb_wr(lb_wr),
    .lb_wr_idx(wr_idx), .pm_rd(pm_rd), .src_lb(src_lb), .state(state));

  // behavioural loop buffer tags
  logic [7:0] tags;
  always_ff @(posedge clk) begin
    if (!rst_n || tag_clr) tags <= '0;
    else if (lb_wr) tags[wr_idx] <= 1'b1;
  end
  assign tag_hit = tags[rd_idx];
  assign fits    = (body_size != 0) && (body_size <= 8);

  int checks = 0, failures = 0;
  int n_lb, n_pm, n_rec;
  bit stall_mode, force_stall;
  logic exp_src_q;

  always @(posedge clk) if (rst_n && lb_wr) n_rec++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // one fetch: inputs at the falling edge, checks before the rising edge
  task automatic fetch(int a, lb_state_e exp_st, bit exp_lb,
                       bit su = 0, int se = 0, int sc = 0);
    if ((stall_mode && ($urandom % 3 == 0) && !(exp_st inside {S3_REC_TO_LB, S5_LB_TO_PM})) ||
        force_stall) begin
      @(negedge clk);
      fetch_en = 0; setup = 0;
      #1 chk(!lb_rd && !pm_rd, "no access while stalled");
    end
    @(negedge clk);
    chk(src_lb == exp_src_q, "registered source of the previous fetch");
    fetch_en = 1; fetch_addr = AW'(a);
    setup = su; setup_end = AW'(se); setup_count = CNT_W'(sc);
    #1;
    chk(state == exp_st, $sformatf("state at fetch %0d: %0d expected %0d", a, state, exp_st));
    chk(lb_rd == exp_lb, $sformatf("source at fetch %0d", a));
    chk(pm_rd == !exp_lb, $sformatf("PM access at fetch %0d", a));
    if (lb_rd) n_lb++;
    if (pm_rd) n_pm++;
    exp_src_q = exp_lb;
  endtask

  task automatic idle_fetch(int a);
    fetch(a, S0_IDLE, 0);
  endtask

  task automatic scenario1();
    n_lb = 0; n_pm = 0; n_rec = 0;
    fetch(10, S0_IDLE, 0, 1, 13, 5);
    fetch(11, S1_PM_TO_REC, 0);
    fetch(12, S2_RECORD, 0);
    fetch(13, S2_RECORD, 0);
    fetch(10, S3_REC_TO_LB, 0);
    for (int it = 0; it < 4; it++)
      for (int a = 10; a <= 13; a++)
        if (!(it == 0 && a == 10)) fetch(a, S4_LB_SUPPLY, 1);
    fetch(14, S5_LB_TO_PM, 0);
    fetch(15, S0_IDLE, 0);
    @(negedge clk); fetch_en = 0; setup = 0;
    @(negedge clk);
    chk(n_lb == 15, $sformatf("loop buffer reads %0d expected 15", n_lb));
    chk(n_pm == 7, $sformatf("PM reads %0d expected 7", n_pm));
    chk(n_rec == 4, $sformatf("recordings %0d expected 4", n_rec));
  endtask

  initial begin
    rst_n = 0; fetch_en = 0; setup = 0; fetch_addr = '0; setup_end = '0;
    setup_count = '0; stall_mode = 0; force_stall = 0; exp_src_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    idle_fetch(0); idle_fetch(1);

    // 1. plain 4-word loop, 5 iterations
    scenario1();
    // 2. same with stalls
    stall_mode = 1;
    scenario1();
    stall_mode = 0;

    // 2b. a stall in s3: the loop buffer is ready for the next fetch
    n_lb = 0;
    fetch(10, S0_IDLE, 0, 1, 13, 3);
    fetch(11, S1_PM_TO_REC, 0);
    fetch(12, S2_RECORD, 0);
    fetch(13, S2_RECORD, 0);
    force_stall = 1;
    fetch(10, S4_LB_SUPPLY, 1);
    force_stall = 0;
    for (int it = 0; it < 2; it++)
      for (int a = 10; a <= 13; a++)
        if (!(it == 0 && a == 10)) fetch(a, S4_LB_SUPPLY, 1);
    fetch(14, S5_LB_TO_PM, 0);
    fetch(15, S0_IDLE, 0);
    chk(n_lb == 8, $sformatf("loop buffer reads %0d expected 8", n_lb));

    // 3. path change inside the loop body
    n_lb = 0; n_rec = 0;
    fetch(20, S0_IDLE, 0, 1, 25, 3);
    fetch(21, S1_PM_TO_REC, 0);
    fetch(22, S2_RECORD, 0);
    fetch(24, S2_RECORD, 0);      // 23 skipped in iteration 1
    fetch(25, S2_RECORD, 0);
    fetch(20, S3_REC_TO_LB, 0);
    fetch(21, S4_LB_SUPPLY, 1);
    fetch(22, S4_LB_SUPPLY, 1);
    fetch(23, S4_LB_SUPPLY, 0);   // tag miss
    fetch(24, S1_PM_TO_REC, 0);
    fetch(25, S2_RECORD, 0);
    fetch(20, S3_REC_TO_LB, 0);
    for (int a = 21; a <= 25; a++) fetch(a, S4_LB_SUPPLY, 1);
    fetch(26, S5_LB_TO_PM, 0);
    fetch(27, S0_IDLE, 0);
    chk(n_lb == 7, $sformatf("loop buffer reads %0d expected 7", n_lb));
    chk(n_rec == 6, $sformatf("recordings %0d expected 6", n_rec));

    // 4. loops that are not buffered
    fetch(40, S0_IDLE, 0, 1, 42, 1);   // one pass
    fetch(41, S0_IDLE, 0);
    fetch(42, S0_IDLE, 0);
    fetch(43, S0_IDLE, 0);
    fetch(50, S0_IDLE, 0, 1, 58, 4);   // 9 words: too large
    for (int it = 0; it < 4; it++)
      for (int a = (it == 0 ? 51 : 50); a <= 58; a++) fetch(a, S0_IDLE, 0);
    fetch(59, S0_IDLE, 0);

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

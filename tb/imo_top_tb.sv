// imo_top_tb: end-to-end test of the instruction memory organisation in both
// loop buffer architectures: a CELB of 8 words and a BCLB of 4 banks of 8
// words, each driven by imo_tb_driver running the same test program three
// times with random fetch stalls. Every fetch address is checked against a
// reference model of the program counter, every instruction against the
// program image, and each loop-buffer mechanism must have occurred.
module imo_top_tb;
  import lb_pkg::*;

  localparam int unsigned AW = 11;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks_c, failures_c, checks_b, failures_b;
  logic done_c, done_b;

  // ---------------------------------------------------------------- CELB
  logic rst_n_c, ld_we_c, fe_c, jmp_c, setup_c, fromlb_c, pma_c, lbr_c, lbw_c;
  logic [AW-1:0] ld_a_c, jt_c, le_c, pc_c;
  logic [15:0] ld_d_c, lc_c, ins_c;
  logic [2:0] lf_c;
  logic [7:0] ba_c;
  lb_state_e st_c;

  imo_top #(.ARCH(ARCH_CELB), .CELB_WORDS(8)) dut_c (
    .clk(clk), .rst_n(rst_n_c), .pm_load_we(ld_we_c), .pm_load_addr(ld_a_c),
    .pm_load_data(ld_d_c), .fetch_en(fe_c), .jump(jmp_c), .jump_target(jt_c),
    .loop_setup(setup_c), .loop_end(le_c), .loop_count(lc_c), .pc(pc_c),
    .instr(ins_c), .instr_from_lb(fromlb_c), .loop_flag(lf_c), .lb_state(st_c),
    .pm_access(pma_c), .lb_read(lbr_c), .lb_write(lbw_c), .lb_banks_active(ba_c));

  imo_tb_driver #(.NB(8), .BANKED(1'b0)) drv_c (
    .clk(clk), .rst_n(rst_n_c), .pm_load_we(ld_we_c), .pm_load_addr(ld_a_c),
    .pm_load_data(ld_d_c), .fetch_en(fe_c), .jump(jmp_c), .jump_target(jt_c),
    .loop_setup(setup_c), .loop_end(le_c), .loop_count(lc_c), .pc(pc_c),
    .instr(ins_c), .instr_from_lb(fromlb_c), .lb_state(st_c), .pm_access(pma_c),
    .lb_read(lbr_c), .lb_write(lbw_c), .lb_banks_active(ba_c), .done(done_c),
    .checks(checks_c), .failures(failures_c));

  // ---------------------------------------------------------------- BCLB
  logic rst_n_b, ld_we_b, fe_b, jmp_b, setup_b, fromlb_b, pma_b, lbr_b, lbw_b;
  logic [AW-1:0] ld_a_b, jt_b, le_b, pc_b;
  logic [15:0] ld_d_b, lc_b, ins_b;
  logic [2:0] lf_b;
  logic [3:0] ba_b;
  lb_state_e st_b;

  imo_top #(.ARCH(ARCH_BCLB), .NUM_BANKS(4), .BANK_WORDS(8)) dut_b (
    .clk(clk), .rst_n(rst_n_b), .pm_load_we(ld_we_b), .pm_load_addr(ld_a_b),
    .pm_load_data(ld_d_b), .fetch_en(fe_b), .jump(jmp_b), .jump_target(jt_b),
    .loop_setup(setup_b), .loop_end(le_b), .loop_count(lc_b), .pc(pc_b),
    .instr(ins_b), .instr_from_lb(fromlb_b), .loop_flag(lf_b), .lb_state(st_b),
    .pm_access(pma_b), .lb_read(lbr_b), .lb_write(lbw_b), .lb_banks_active(ba_b));

  imo_tb_driver #(.NB(4), .BANKED(1'b1)) drv_b (
    .clk(clk), .rst_n(rst_n_b), .pm_load_we(ld_we_b), .pm_load_addr(ld_a_b),
    .pm_load_data(ld_d_b), .fetch_en(fe_b), .jump(jmp_b), .jump_target(jt_b),
    .loop_setup(setup_b), .loop_end(le_b), .loop_count(lc_b), .pc(pc_b),
    .instr(ins_b), .instr_from_lb(fromlb_b), .lb_state(st_b), .pm_access(pma_b),
    .lb_read(lbr_b), .lb_write(lbw_b), .lb_banks_active(ba_b), .done(done_b),
    .checks(checks_b), .failures(failures_b));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    @(posedge clk);
    wait (done_c && done_b);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks_c + checks_b, failures_c + failures_b);
    $finish;
  end

  initial begin
    wait (cyc == 20000);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks_c + checks_b, failures_c + failures_b + 1);
    $finish;
  end
endmodule

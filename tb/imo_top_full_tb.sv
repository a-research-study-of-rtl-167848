// imo_top_full_tb: imo_top at its default configuration (BCLB with 8 banks
// of 8 words, 2K x 16-bit program memory) running the imo_tb_driver test
// program three times with random fetch stalls, end to end.
module imo_top_full_tb;
  import lb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  logic done;

  logic rst_n, ld_we, fe, jmp, setup, fromlb, pma, lbr, lbw;
  logic [10:0] ld_a, jt, le, pc;
  logic [15:0] ld_d, lc, ins;
  logic [2:0] lf;
  logic [7:0] ba;
  lb_state_e st;

  imo_top dut (
    .clk(clk), .rst_n(rst_n), .pm_load_we(ld_we), .pm_load_addr(ld_a),
    .pm_load_data(ld_d), .fetch_en(fe), .jump(jmp), .jump_target(jt),
    .loop_setup(setup), .loop_end(le), .loop_count(lc), .pc(pc),
    .instr(ins), .instr_from_lb(fromlb), .loop_flag(lf), .lb_state(st),
    .pm_access(pma), .lb_read(lbr), .lb_write(lbw), .lb_banks_active(ba));

  imo_tb_driver #(.NB(8), .BANKED(1'b1)) drv (
    .clk(clk), .rst_n(rst_n), .pm_load_we(ld_we), .pm_load_addr(ld_a),
    .pm_load_data(ld_d), .fetch_en(fe), .jump(jmp), .jump_target(jt),
    .loop_setup(setup), .loop_end(le), .loop_count(lc), .pc(pc),
    .instr(ins), .instr_from_lb(fromlb), .lb_state(st), .pm_access(pma),
    .lb_read(lbr), .lb_write(lbw), .lb_banks_active(ba), .done(done),
    .checks(checks), .failures(failures));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    @(posedge clk);
    wait (done);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 20000);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// imo_workloads_tb: runs the four loop profiles (heartbeat detection and AES,
// each on the general-purpose and on the optimised processor) through
// imo_top in four configurations per profile:
//   initial CELB / BCLB choice        best CELB / best pair of memories
//   profile 0: CELB 8,  BCLB 8 x 8    CELB 16, BCLB 8 + 8
//   profile 1: CELB 64, BCLB 8 x 8    CELB 64, BCLB 16 + 64
//   profile 2: CELB 8,  BCLB 4 x 8    CELB 32, BCLB 8 + 32
//   profile 3: CELB 32, BCLB 4 x 8    CELB 32, BCLB 8 + 32
// (sizes in words). Sixteen imo_top instances run side by side, each driven
// by imo_profile_driver, which checks addresses, instructions and the number
// of fetches the loop buffer serves.
module imo_workloads_tb;
  import lb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int unsigned CELB_W [4]    = '{8, 64, 8, 32};
  localparam int unsigned CELB_BEST [4] = '{16, 64, 32, 32};
  localparam int unsigned BCLB_N [4]    = '{8, 8, 4, 4};
  localparam int unsigned PAIR_A [4]   = '{8, 16, 8, 8};
  localparam int unsigned PAIR_B [4]   = '{8, 64, 32, 32};

  localparam int unsigned RUNS = 16;
  logic [RUNS-1:0] done;
  int chk_v [RUNS];
  int fail_v [RUNS];

  for (genvar k = 0; k < RUNS; k++) begin : g_run
    localparam int unsigned P   = k / 4;
    localparam int unsigned V   = k % 4;
    localparam bit          BNK = (V == 1) || (V == 3);
    localparam int unsigned NB  = (V == 1) ? BCLB_N[P] : (V == 3) ? 2 : 1;
    localparam int unsigned CW  = (V == 0) ? CELB_W[P] : CELB_BEST[P];
    localparam int unsigned CAP = (V == 1) ? NB * 8 : (V == 3) ? PAIR_A[P] + PAIR_B[P] : CW;

    logic rst_n, ld_we, fe, jmp, setup, fromlb, pma, lbr, lbw;
    logic [10:0] ld_a, jt, le, pc;
    logic [15:0] ld_d, lc, ins;
    logic [2:0] lf;
    logic [NB-1:0] ba;
    lb_state_e st;
    int n_fetch, n_lb;

    if (V == 3) begin : g_pair
      localparam int unsigned BS [2] = '{PAIR_A[P], PAIR_B[P]};
      imo_top #(.ARCH(ARCH_BCLB), .NUM_BANKS(2), .BANK_SIZES(BS)) dut (
        .clk(clk), .rst_n(rst_n), .pm_load_we(ld_we), .pm_load_addr(ld_a),
        .pm_load_data(ld_d), .fetch_en(fe), .jump(jmp), .jump_target(jt),
        .loop_setup(setup), .loop_end(le), .loop_count(lc), .pc(pc),
        .instr(ins), .instr_from_lb(fromlb), .loop_flag(lf), .lb_state(st),
        .pm_access(pma), .lb_read(lbr), .lb_write(lbw), .lb_banks_active(ba));
    end else begin : g_std
      imo_top #(.ARCH(BNK ? ARCH_BCLB : ARCH_CELB), .NUM_BANKS(NB),
                .BANK_WORDS(8), .CELB_WORDS(CW)) dut (
        .clk(clk), .rst_n(rst_n), .pm_load_we(ld_we), .pm_load_addr(ld_a),
        .pm_load_data(ld_d), .fetch_en(fe), .jump(jmp), .jump_target(jt),
        .loop_setup(setup), .loop_end(le), .loop_count(lc), .pc(pc),
        .instr(ins), .instr_from_lb(fromlb), .loop_flag(lf), .lb_state(st),
        .pm_access(pma), .lb_read(lbr), .lb_write(lbw), .lb_banks_active(ba));
    end

    imo_profile_driver #(.PROFILE(P), .CAPACITY(CAP), .NB(NB)) drv (
      .clk(clk), .rst_n(rst_n), .pm_load_we(ld_we), .pm_load_addr(ld_a),
      .pm_load_data(ld_d), .fetch_en(fe), .jump(jmp), .jump_target(jt),
      .loop_setup(setup), .loop_end(le), .loop_count(lc), .pc(pc),
      .instr(ins), .instr_from_lb(fromlb), .lb_state(st), .pm_access(pma),
      .lb_read(lbr), .lb_banks_active(ba), .done(done[k]),
      .checks(chk_v[k]), .failures(fail_v[k]), .n_fetch(n_fetch), .n_lb(n_lb));
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sum(int v [RUNS]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    @(posedge clk);
    wait (&done);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk_v), sum(fail_v));
    $finish;
  end

  initial begin
    wait (cyc == 600000);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk_v), sum(fail_v) + 1);
    $finish;
  end
endmodule

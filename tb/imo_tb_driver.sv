// imo_tb_driver: stimulus, decode stage and reference model used by the
// imo_top testbenches.
//
// It loads a test program into the program memory, then plays the part of
// the processor's decode stage: it stalls the fetch at random, decodes each
// instruction the cycle after its fetch and reports jumps and loop set-ups to
// imo_top. An independent model of the program counter and hardware loops
// predicts every fetch address; every delivered instruction is compared with
// the program image. It also counts how often each loop buffer mechanism
// occurred and fails the run for any that never did.
//
// Test instruction set (the test's own, 16 bits):
//   0x0...  plain instruction (low 12 bits are arbitrary payload)
//   0x1ttt  jump to t (one delay slot)
//   0x2bbn  loop: body of b+1 words starting after this word, n iterations
//           (n=0 means 16)
//   0x3ttt  conditional branch to t, taken on its 1st, 4th, 7th ... execution
//   0x4...  halt
//
// Program (addresses): A 3: loop 4x5; B 9: loop 6x8 whose body has a branch
// that skips word 13 on some iterations (new path -> tag miss); C 17: loop
// 20x3; D 39: loop 70x2 (too big); E 111: loop 12x3 with a nested 3x4 loop;
// F 125: loop 6x4 that calls a routine at 300; G 132: one-word loop x5;
// H 134: one-pass loop; I 138: loop 5x2; halt at 145. The whole program runs
// REPEAT times (a jump at 146 returns to 0 until the last pass).
module imo_tb_driver
  import lb_pkg::*;
#(
  parameter int unsigned AW       = 11,
  parameter int unsigned INSTR_W  = 16,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned NB       = 8,
  parameter bit          BANKED   = 1'b1,
  parameter int unsigned REPEAT   = 3,
  parameter int unsigned MAX_CYC  = 20000
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               pm_load_we,
  output logic [AW-1:0]      pm_load_addr,
  output logic [INSTR_W-1:0] pm_load_data,
  output logic               fetch_en,
  output logic               jump,
  output logic [AW-1:0]      jump_target,
  output logic               loop_setup,
  output logic [AW-1:0]      loop_end,
  output logic [CNT_W-1:0]   loop_count,
  input  logic [AW-1:0]      pc,
  input  logic [INSTR_W-1:0] instr,
  input  logic               instr_from_lb,
  input  lb_state_e          lb_state,
  input  logic               pm_access,
  input  logic               lb_read,
  input  logic               lb_write,
  input  logic [NB-1:0]      lb_banks_active,
  output logic               done,
  output int                 checks,
  output int                 failures
);

  localparam int unsigned PROG_LEN = 320;

  logic [INSTR_W-1:0] img [PROG_LEN];

  // ------------------------------------------------------------ program
  function automatic logic [INSTR_W-1:0] op_nop(int unsigned a);
    return INSTR_W'({4'h0, 12'((a * 37 + 11) ^ 12'h5a5)});
  endfunction
  function automatic logic [INSTR_W-1:0] op_loop(int unsigned body, int unsigned n);
    return INSTR_W'({4'h2, 8'(body - 1), 4'(n)});
  endfunction

  task automatic build_program();
    for (int unsigned a = 0; a < PROG_LEN; a++) img[a] = op_nop(a);
    img[3]   = op_loop(4, 5);                 // A
    img[9]   = op_loop(6, 8);                 // B
    img[11]  = INSTR_W'({4'h3, 12'd14});      // branch over 13 (12 = delay slot)
    img[17]  = op_loop(20, 3);                // C
    img[39]  = op_loop(70, 2);                // D
    img[111] = op_loop(12, 3);                // E outer, body 112..123
    img[113] = op_loop(3, 4);                 // E inner, body 114..116
    img[125] = op_loop(6, 4);                 // F, body 126..131
    img[127] = INSTR_W'({4'h1, 12'd300});     // call (128 = delay slot)
    img[302] = INSTR_W'({4'h1, 12'd129});     // return (303 = delay slot)
    img[132] = op_loop(1, 5);                 // G, body 133
    img[134] = op_loop(3, 1);                 // H, body 135..137
    img[138] = op_loop(5, 2);                 // I, body 139..143
    img[145] = INSTR_W'(16'h4000);            // halt
  endtask

  // ------------------------------------------------------------ model
  typedef struct {
    int unsigned ls, le, lc;
  } rloop_t;

  rloop_t      rstack[$];
  int unsigned ref_pc;
  int unsigned prev_addr;
  bit          have_prev;
  bit          p_jump, p_setup;
  int unsigned p_target, p_end, p_count;
  int unsigned br_execs;
  int unsigned pass_no;

  // mechanism counters
  int n_fetch, n_stall, n_lb_supply, n_pm, n_rec, n_stall_s4;
  int n_s1, n_s2, n_s3, n_s4, n_s5, n_miss_to_s1, n_rec_exit;
  int n_too_big, n_nested, n_multibank, n_branch_taken, n_call;
  lb_state_e st_prev;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic decode(int unsigned a);
    logic [INSTR_W-1:0] w;
    w = img[a];
    unique case (w[15:12])
      4'h1: begin
        p_jump = 1; p_target = 32'(w[11:0]);
        if (w[11:0] == 12'd300) n_call++;
      end
      4'h2: begin
        p_setup = 1;
        p_end   = a + 1 + 32'(w[11:4]);
        p_count = (w[3:0] == 0) ? 16 : 32'(w[3:0]);
        if (rstack.size() > 0) n_nested++;
      end
      4'h3: begin
        if (br_execs % 3 == 0) begin
          p_jump = 1; p_target = 32'(w[11:0]); n_branch_taken++;
        end
        br_execs++;
      end
      4'h4: begin
        pass_no++;
        if (pass_no >= REPEAT) done = 1;
        else begin p_jump = 1; p_target = 0; end
      end
      default: ;
    endcase
  endtask

  initial begin
    rst_n = 0; pm_load_we = 0; pm_load_addr = '0; pm_load_data = '0;
    fetch_en = 0; jump = 0; jump_target = '0; loop_setup = 0;
    loop_end = '0; loop_count = '0; done = 0; checks = 0; failures = 0;
    ref_pc = 0; have_prev = 0; p_jump = 0; p_setup = 0; br_execs = 0; pass_no = 0;
    {n_fetch, n_stall, n_lb_supply, n_pm, n_rec, n_stall_s4} = '0;
    {n_s1, n_s2, n_s3, n_s4, n_s5, n_miss_to_s1, n_rec_exit} = '0;
    {n_too_big, n_nested, n_multibank, n_branch_taken, n_call} = '0;
    st_prev = S0_IDLE;
    build_program();
    // the program sits at 0..PROG_LEN-1; jump at 146 back to 0 closes a pass
    img[146] = INSTR_W'({4'h1, 12'd0});
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int unsigned a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      pm_load_we = 1; pm_load_addr = AW'(a); pm_load_data = img[a];
    end
    @(negedge clk);
    pm_load_we = 0;

    while (!done) begin
      // 1. instruction of the previous fetch
      if (have_prev) begin
        check(instr == img[prev_addr], $sformatf("instr at %0d", prev_addr));
        if (instr_from_lb) n_lb_supply++;
        decode(prev_addr);
      end
      if (done) break;
      // 2. this cycle's fetch
      fetch_en = ($urandom % 8) != 0;
      jump = 0; loop_setup = 0;
      if (fetch_en) begin
        int unsigned nxt;
        n_fetch++;
        check(32'(pc) == ref_pc, $sformatf("pc %0d expected %0d", pc, ref_pc));
        if (p_setup) begin
          loop_setup = 1; loop_end = AW'(p_end); loop_count = CNT_W'(p_count);
          if (lb_state == S0_IDLE && (p_end - ref_pc + 1) > (BANKED ? NB * 8 : 8))
            n_too_big++;
          rstack.push_front('{ls: ref_pc, le: p_end, lc: p_count});
        end
        if (p_jump) begin
          jump = 1; jump_target = AW'(p_target);
        end
        nxt = ref_pc + 1;
        if (p_jump) nxt = p_target;
        else if (rstack.size() > 0 && rstack[0].le == ref_pc) begin
          if (rstack[0].lc > 1) begin
            rstack[0].lc--; nxt = rstack[0].ls;
          end else void'(rstack.pop_front());
        end
        prev_addr = ref_pc;
        ref_pc    = nxt;
        have_prev = 1;
        p_jump = 0; p_setup = 0;
      end else begin
        n_stall++;
        if (lb_state == S4_LB_SUPPLY) n_stall_s4++;
        have_prev = 0;
      end
      #1;
      if (fetch_en) begin
        if (pm_access) n_pm++;
        check(pm_access != lb_read, "exactly one memory read per fetch");
      end
      @(posedge clk);
      // state bookkeeping on the registered state
      #1;
      if (lb_write) n_rec++;
      if ($countones(lb_banks_active) > 1) n_multibank++;
      case (lb_state)
        S1_PM_TO_REC: n_s1++;
        S2_RECORD:    n_s2++;
        S3_REC_TO_LB: n_s3++;
        S4_LB_SUPPLY: n_s4++;
        S5_LB_TO_PM:  n_s5++;
        default: ;
      endcase
      if (st_prev == S4_LB_SUPPLY && lb_state == S1_PM_TO_REC) n_miss_to_s1++;
      if ((st_prev == S1_PM_TO_REC || st_prev == S2_RECORD) && lb_state == S0_IDLE) n_rec_exit++;
      st_prev = lb_state;
      @(negedge clk);
    end

    // every loop-buffer mechanism must have occurred
    check(n_s1 > 0, "state s1 reached");
    check(n_s2 > 0, "state s2 reached");
    check(n_s3 > 0, "state s3 reached");
    check(n_s4 > 0, "state s4 reached");
    check(n_s5 > 0, "state s5 reached");
    check(n_miss_to_s1 > 0, "tag miss in s4 (s4 -> s1)");
    check(n_rec > 0, "instructions recorded");
    check(n_lb_supply > 0, "instructions supplied by the loop buffer");
    check(n_pm + n_lb_supply == n_fetch, "every fetch read exactly one memory");
    check(n_too_big > 0, "loop too large for the loop buffer");
    check(n_nested > 0, "nested loop set up");
    check(n_stall_s4 > 0, "fetch stall while the loop buffer supplies");
    check(n_branch_taken > 0 && n_call > 0, "branch and call inside loops");
    if (BANKED) check(n_multibank > 0, "loop spread over several banks");
    $display("fetches=%0d stalls=%0d pm_reads=%0d lb_supplied=%0d recorded=%0d",
             n_fetch, n_stall, n_pm, n_lb_supply, n_rec);
    $display("s1=%0d s2=%0d s3=%0d s4=%0d s5=%0d s4->s1=%0d exit_while_recording=%0d",
             n_s1, n_s2, n_s3, n_s4, n_s5, n_miss_to_s1, n_rec_exit);
    $display("too_big=%0d nested=%0d multibank_cycles=%0d stalls_in_s4=%0d",
             n_too_big, n_nested, n_multibank, n_stall_s4);
  end

endmodule

// imo_profile_driver: runs one of four loop profiles through an imo_top and
// checks it.
//
// A profile is the list of loops of one application as measured on one
// processor: start address, end address and iteration count of each loop.
// PROFILE 0: heartbeat detection (HBD) on the general-purpose processor,
// 1: HBD on the processor optimised for it, 2: AES on the general-purpose
// processor, 3: AES on the processor optimised for it. The driver builds a
// program that places every loop at its measured addresses (the loop
// instruction sits just before the body) and runs each loop once with its
// measured iteration count; code between loops runs straight through.
// Instruction words are arbitrary; the driver decodes by address.
//
// Checks: every fetch address against a reference model of the hardware
// loops, every delivered instruction against the program image, and the
// number of fetches served by the loop buffer against the number expected
// for a buffer of CAPACITY words: for each loop of B words and N >= 2
// iterations that fits, (N-1)*B-1 fetches if B >= 2 and N-3 if B = 1 (the
// first iteration and the first word of the second come from the program
// memory), plus one if the fetch stalls in the cycle right after the first
// iteration was recorded (the loop buffer is then ready for the first word
// of the second); nested loops inside a buffered loop run with it.
module imo_profile_driver
  import lb_pkg::*;
#(
  parameter int unsigned PROFILE  = 0,
  parameter int unsigned CAPACITY = 8,
  parameter int unsigned NB       = 1,
  parameter int unsigned AW       = 11
) (
  input  logic          clk,
  output logic          rst_n,
  output logic          pm_load_we,
  output logic [AW-1:0] pm_load_addr,
  output logic [15:0]   pm_load_data,
  output logic          fetch_en,
  output logic          jump,
  output logic [AW-1:0] jump_target,
  output logic          loop_setup,
  output logic [AW-1:0] loop_end,
  output logic [15:0]   loop_count,
  input  logic [AW-1:0] pc,
  input  logic [15:0]   instr,
  input  logic          instr_from_lb,
  input  lb_state_e     lb_state,
  input  logic          pm_access,
  input  logic          lb_read,
  input  logic [NB-1:0] lb_banks_active,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_fetch,
  output int            n_lb
);

  // {start, end, iterations}; nested loops follow their enclosing loop
  localparam int unsigned MAXL = 16;
  typedef struct packed { int unsigned s, e, n; } lp_t;

  function automatic lp_t prof(int unsigned p, int unsigned i);
    lp_t t [4][MAXL];
    t[0] = '{'{33,34,4}, '{44,45,594}, '{54,57,594}, '{72,75,594}, '{92,103,132},
             '{124,136,594}, '{160,160,15}, '{236,242,32625}, '{417,427,594},
             '{569,590,64}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}};
    t[1] = '{'{192,244,1380}, '{200,205,1}, '{266,271,350}, '{290,302,768},
             '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0},
             '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}};
    t[2] = '{'{307,309,8}, '{324,327,2}, '{340,342,16}, '{360,362,1460}, '{383,387,1600},
             '{409,411,4}, '{419,421,8}, '{426,428,16}, '{436,458,92}, '{472,474,1392},
             '{489,491,1392}, '{506,510,1460}, '{519,523,4}, '{926,930,6016},
             '{942,1000,40}, '{1019,1034,1692}};
    t[3] = '{'{519,524,36}, '{544,560,2}, '{550,555,1}, '{806,837,91},
             '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0},
             '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}};
    return t[p][i];
  endfunction

  localparam int unsigned PROG_LEN = 1100;

  logic [15:0] img [PROG_LEN];
  int unsigned do_end [int unsigned];   // loop instruction address -> LE
  int unsigned do_cnt [int unsigned];   // loop instruction address -> count
  int unsigned halt_at;
  int          exp_lb;
  int          exp_loop [MAXL];
  int          got_loop [MAXL];
  bit          buffered [MAXL];
  int unsigned le_hits [MAXL];
  int          watch;

  typedef struct { int unsigned ls, le, lc; } rloop_t;
  rloop_t      rstack[$];
  int unsigned ref_pc, prev_addr;
  bit          have_prev, p_setup;
  int unsigned p_end, p_count;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL profile %0d: %s (t=%0t)", PROFILE, what, $time);
    end
  endtask

  initial begin
    rst_n = 0; pm_load_we = 0; pm_load_addr = '0; pm_load_data = '0;
    fetch_en = 0; jump = 0; jump_target = '0; loop_setup = 0; loop_end = '0;
    loop_count = '0; done = 0; checks = 0; failures = 0; n_fetch = 0; n_lb = 0;
    ref_pc = 0; have_prev = 0; p_setup = 0; exp_lb = 0; halt_at = 0; watch = -1;
    for (int unsigned a = 0; a < PROG_LEN; a++) img[a] = 16'((a * 2654435761) >> 7);
    for (int unsigned i = 0; i < MAXL; i++) begin
      lp_t l;
      int unsigned b;
      bit nested;
      l = prof(PROFILE, i);
      if (l.n == 0) continue;
      do_end[l.s - 1] = l.e;
      do_cnt[l.s - 1] = l.n;
      if (l.e + 2 > halt_at) halt_at = l.e + 2;
      // expected loop-buffer supply: loops not nested in a buffered loop
      nested = 0;
      for (int unsigned j = 0; j < i; j++) begin
        lp_t o;
        o = prof(PROFILE, j);
        if (o.s <= l.s && l.e <= o.e && (o.e - o.s + 1) <= CAPACITY && o.n >= 2) nested = 1;
      end
      b = l.e - l.s + 1;
      exp_loop[i] = 0;
      got_loop[i] = 0;
      le_hits[i]  = 0;
      buffered[i] = !nested && b <= CAPACITY && l.n >= 2;
      if (buffered[i])
        exp_loop[i] = (b >= 2) ? int'((l.n - 1) * b - 1) : ((l.n >= 3) ? int'(l.n - 3) : 0);
      exp_lb += exp_loop[i];
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int unsigned a = 0; a < PROG_LEN; a++) begin
      @(negedge clk);
      pm_load_we = 1; pm_load_addr = AW'(a); pm_load_data = img[a];
    end
    @(negedge clk);
    pm_load_we = 0;

    while (!done) begin
      if (have_prev) begin
        chk(instr == img[prev_addr], $sformatf("instr at %0d", prev_addr));
        if (instr_from_lb) begin
          n_lb++;
          for (int unsigned i = 0; i < MAXL; i++)
            if (prof(PROFILE, i).n != 0 && prev_addr >= prof(PROFILE, i).s &&
                prev_addr <= prof(PROFILE, i).e) begin
              got_loop[i]++;
              break;
            end
        end
        if (do_end.exists(prev_addr)) begin
          p_setup = 1; p_end = do_end[prev_addr]; p_count = do_cnt[prev_addr];
        end
        if (prev_addr == halt_at) done = 1;
      end
      if (done) break;
      fetch_en = ($urandom % 8) != 0;
      loop_setup = 0;
      // a stall in the cycle after the first iteration has been recorded
      // lets the loop buffer serve the next fetch (LS) as well
      if (watch >= 0 && !fetch_en) begin
        exp_loop[watch]++;
        exp_lb++;
      end
      watch = -1;
      if (fetch_en) begin
        int unsigned nxt;
        n_fetch++;
        if (32'(pc) != ref_pc) chk(0, $sformatf("pc %0d expected %0d", pc, ref_pc));
        if (p_setup) begin
          loop_setup = 1; loop_end = AW'(p_end); loop_count = 16'(p_count);
          rstack.push_front('{ls: ref_pc, le: p_end, lc: p_count});
        end
        for (int unsigned i = 0; i < MAXL; i++)
          if (buffered[i] && prof(PROFILE, i).e == ref_pc) begin
            le_hits[i]++;
            if (le_hits[i] == ((prof(PROFILE, i).s == prof(PROFILE, i).e) ? 2 : 1) &&
                prof(PROFILE, i).n > le_hits[i]) watch = int'(i);
          end
        nxt = ref_pc + 1;
        if (rstack.size() > 0 && rstack[0].le == ref_pc) begin
          if (rstack[0].lc > 1) begin
            rstack[0].lc--; nxt = rstack[0].ls;
          end else void'(rstack.pop_front());
        end
        prev_addr = ref_pc;
        ref_pc    = nxt;
        have_prev = 1;
        p_setup   = 0;
      end else
        have_prev = 0;
      @(negedge clk);
    end
    for (int unsigned i = 0; i < MAXL; i++)
      if (got_loop[i] != exp_loop[i])
        $display("profile %0d loop %0d: %0d fetches from the loop buffer, expected %0d",
                 PROFILE, i, got_loop[i], exp_loop[i]);
    chk(n_lb == exp_lb, $sformatf("loop buffer supplied %0d fetches, expected %0d", n_lb, exp_lb));
    $display("profile %0d, %s of %0d words in %0d memor%s: %0d fetches, %0d (%0d%%) from the loop buffer",
             PROFILE, (NB > 1) ? "BCLB" : "CELB", CAPACITY, NB, (NB > 1) ? "ies" : "y", n_fetch, n_lb, (100 * n_lb) / n_fetch);
  end

endmodule

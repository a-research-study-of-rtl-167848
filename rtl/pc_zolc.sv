// pc_zolc: program counter with zero-overhead loop hardware.
//
// Holds the fetch address (pc) and the hardware-loop registers of the
// processor: LS (loop start), LE (loop end), LC (remaining iterations) and
// LF (number of active nested loops). Once a loop is set up, no instruction
// is spent on the loop control: whenever the address of the last body
// instruction is fetched and more iterations remain, the next fetch goes back
// to LS and LC counts down; in the last iteration the next fetch is LE+1 and
// the loop is popped. Outer loops are kept on a small stack of LOOP_DEPTH
// entries.
//
// Timing: with fetch_en=1 the address on pc is fetched and pc moves on at the
// clock edge; with fetch_en=0 everything holds. The decode stage reports, in
// the cycle after it received an instruction:
//   * jump/jump_target: a taken branch; the instruction fetched in that cycle
//     (the delay slot) still executes and the next fetch is jump_target;
//   * loop_setup/loop_end/loop_count: a loop instruction; the address being
//     fetched in that cycle is the first body instruction (LS), loop_end is
//     LE and loop_count the number of iterations (>= 1).
// Both are honoured only with fetch_en=1. A jump has priority over a loop-back
// in the same cycle. Nested loops must end at distinct addresses.
// The LS/LE/LC/LF registers and zero-overhead behaviour follow the
// description of the general-purpose processor; the delay slot, the stack,
// its depth and the interface to the decode stage are this design's choices.
module pc_zolc #(
  parameter int unsigned AW         = 11,
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned LOOP_DEPTH = 4,
  localparam int unsigned LFW       = $clog2(LOOP_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fetch_en,
  input  logic             jump,
  input  logic [AW-1:0]    jump_target,
  input  logic             loop_setup,
  input  logic [AW-1:0]    loop_end,
  input  logic [CNT_W-1:0] loop_count,
  output logic [AW-1:0]    pc,
  output logic [AW-1:0]    ls,
  output logic [AW-1:0]    le,
  output logic [CNT_W-1:0] lc,
  output logic [LFW-1:0]   lf
);

  typedef struct packed {
    logic [AW-1:0]    ls;
    logic [AW-1:0]    le;
    logic [CNT_W-1:0] lc;
  } loop_t;

  loop_t         stack_q [LOOP_DEPTH];   // [0] is the innermost loop
  logic [LFW-1:0] lf_q;
  logic [AW-1:0]  pc_q;

  loop_t          top;
  logic [LFW-1:0] lf_e;
  logic           loop_back, loop_done;

  always_comb begin
    top  = stack_q[0];
    lf_e = lf_q;
    if (loop_setup) begin
      top  = '{ls: pc_q, le: loop_end, lc: loop_count};
      lf_e = lf_q + LFW'(1);
    end
    loop_back = (lf_e != '0) && (pc_q == top.le) && (top.lc > CNT_W'(1)) && !jump;
    loop_done = (lf_e != '0) && (pc_q == top.le) && (top.lc <= CNT_W'(1)) && !jump;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0;
      lf_q <= '0;
      for (int i = 0; i < LOOP_DEPTH; i++) stack_q[i] <= '0;
    end else if (fetch_en) begin
      // next fetch address
      if (jump)           pc_q <= jump_target;
      else if (loop_back) pc_q <= top.ls;
      else                pc_q <= pc_q + AW'(1);
      // loop registers
      if (loop_done) begin
        lf_q <= lf_e - LFW'(1);
        if (loop_setup) begin
          // a one-pass loop set up and finished in the same fetch
          // leaves the stack as it was
        end else begin
          for (int i = 0; i < LOOP_DEPTH - 1; i++) stack_q[i] <= stack_q[i+1];
          stack_q[LOOP_DEPTH-1] <= '0;
        end
      end else begin
        lf_q <= lf_e;
        if (loop_setup)
          for (int i = 1; i < LOOP_DEPTH; i++) stack_q[i] <= stack_q[i-1];
        stack_q[0] <= loop_back ? '{ls: top.ls, le: top.le, lc: top.lc - CNT_W'(1)} : top;
      end
    end
  end

  assign pc = pc_q;
  assign ls = stack_q[0].ls;
  assign le = stack_q[0].le;
  assign lc = stack_q[0].lc;
  assign lf = lf_q;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (fetch_en && loop_setup) |-> 32'(lf_q) < LOOP_DEPTH);

endmodule

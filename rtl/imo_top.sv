// imo_top: instruction memory organisation (IMO) of a sensor-node processor
// with a loop buffer, central (CELB) or banked (BCLB).
//
// Blocks: pc_zolc (program counter and zero-overhead loop registers of the
// processor), program_memory (PM), lb_controller (six-state loop buffer
// controller) and loop_buffer (one loop buffer memory for CELB, or banks with
// bank selection and multiplexers for BCLB). During the first iteration of a
// loop that fits, the PM feeds both the processor and the loop buffer; from
// then on the loop buffer feeds the processor and the PM is not accessed,
// until the loop ends. Code outside loops is always fetched from the PM.
//
// Interface: the processor's decode stage drives jump/jump_target and
// loop_setup/loop_end/loop_count (see pc_zolc for their timing) and fetch_en
// (low = fetch stall). pc is the address fetched in a cycle with fetch_en=1;
// its instruction is on instr in the next cycle, whichever memory supplies it,
// so the loop buffer adds no cycle. instr_from_lb tells which memory did.
// pm_access/lb_read/lb_write pulse for every memory access (for activity and
// power estimation); lb_banks_active shows the loop buffer memories in use.
// The program is written through pm_load_* while fetch_en is low.
//
// Defaults follow the general-purpose processor configuration: 2K x 16-bit
// PM and, for BCLB, 8 banks of 8 words; CELB_WORDS (8) is the CELB size for
// the same application. BANK_SIZES gives each BCLB bank its own size (all
// BANK_WORDS by default), for configurations such as one 8-word and one
// 32-word loop buffer memory. Loop nesting depth and counter width are this
// design's own choices.
module imo_top
  import lb_pkg::*;
#(
  parameter lb_arch_e    ARCH       = ARCH_BCLB,
  parameter int unsigned PM_WORDS   = 2048,
  parameter int unsigned INSTR_W    = 16,
  parameter int unsigned NUM_BANKS  = 8,
  parameter int unsigned BANK_WORDS = 8,
  parameter int unsigned BANK_SIZES [NUM_BANKS] = '{default: BANK_WORDS},
  parameter int unsigned CELB_WORDS = 8,
  parameter int unsigned LOOP_DEPTH = 4,
  parameter int unsigned CNT_W      = 16,
  localparam int unsigned AW        = $clog2(PM_WORDS),
  localparam int unsigned LFW       = $clog2(LOOP_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // program load
  input  logic                 pm_load_we,
  input  logic [AW-1:0]        pm_load_addr,
  input  logic [INSTR_W-1:0]   pm_load_data,
  // from the processor decode stage
  input  logic                 fetch_en,
  input  logic                 jump,
  input  logic [AW-1:0]        jump_target,
  input  logic                 loop_setup,
  input  logic [AW-1:0]        loop_end,
  input  logic [CNT_W-1:0]     loop_count,
  // to the processor
  output logic [AW-1:0]        pc,
  output logic [INSTR_W-1:0]   instr,
  output logic                 instr_from_lb,
  output logic [LFW-1:0]       loop_flag,
  // observation
  output lb_state_e            lb_state,
  output logic                 pm_access,
  output logic                 lb_read,
  output logic                 lb_write,
  output logic [NUM_BANKS-1:0] lb_banks_active
);

  localparam int unsigned LB_NB    = (ARCH == ARCH_CELB) ? 1 : NUM_BANKS;

  typedef int unsigned lb_words_t [LB_NB];
  function automatic lb_words_t lb_words();
    for (int unsigned i = 0; i < LB_NB; i++)
      lb_words[i] = (ARCH == ARCH_CELB) ? CELB_WORDS : BANK_SIZES[i];
  endfunction
  function automatic int unsigned lb_total();
    int unsigned t = 0;
    for (int unsigned i = 0; i < LB_NB; i++)
      t += (ARCH == ARCH_CELB) ? CELB_WORDS : BANK_SIZES[i];
    return t;
  endfunction

  localparam lb_words_t   LB_WORDS = lb_words();
  localparam int unsigned LB_TOTAL = lb_total();
  localparam int unsigned IDX_W    = (LB_TOTAL > 1) ? $clog2(LB_TOTAL) : 1;
  localparam int unsigned SIZE_W   = AW + 1;

  // ---------------------------------------------------------------- PC/ZOLC
  logic [AW-1:0]    ls_unused, le_unused;
  logic [CNT_W-1:0] lc_unused;

  pc_zolc #(.AW(AW), .CNT_W(CNT_W), .LOOP_DEPTH(LOOP_DEPTH)) u_pc (
    .clk        (clk),
    .rst_n      (rst_n),
    .fetch_en   (fetch_en),
    .jump       (jump),
    .jump_target(jump_target),
    .loop_setup (loop_setup),
    .loop_end   (loop_end),
    .loop_count (loop_count),
    .pc         (pc),
    .ls         (ls_unused),
    .le         (le_unused),
    .lc         (lc_unused),
    .lf         (loop_flag)
  );

  // ------------------------------------------------------ LB controller
  logic [SIZE_W-1:0] body_size;
  logic              fits, cfg_load, tag_clr, tag_hit;
  logic [IDX_W-1:0]  rd_idx, wr_idx;
  logic              lb_rd, lb_wr, pm_rd, src_lb;

  lb_controller #(.AW(AW), .CNT_W(CNT_W), .IDX_W(IDX_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .fetch_en   (fetch_en),
    .fetch_addr (pc),
    .setup      (loop_setup),
    .setup_end  (loop_end),
    .setup_count(loop_count),
    .body_size  (body_size),
    .fits       (fits),
    .cfg_load   (cfg_load),
    .tag_clr    (tag_clr),
    .rd_idx     (rd_idx),
    .tag_hit    (tag_hit),
    .lb_rd      (lb_rd),
    .lb_wr      (lb_wr),
    .lb_wr_idx  (wr_idx),
    .pm_rd      (pm_rd),
    .src_lb     (src_lb),
    .state      (lb_state)
  );

  // ------------------------------------------------------ program memory
  logic [INSTR_W-1:0] pm_rdata, lb_rdata;

  program_memory #(.WORDS(PM_WORDS), .WIDTH(INSTR_W)) u_pm (
    .clk  (clk),
    .ce   (pm_load_we || pm_rd),
    .we   (pm_load_we),
    .addr (pm_load_we ? pm_load_addr : pc),
    .wdata(pm_load_data),
    .rdata(pm_rdata)
  );

  // ------------------------------------------------------ loop buffer
  logic [LB_NB-1:0] bank_act;

  loop_buffer #(
    .ARCH      (ARCH),
    .NUM_BANKS (LB_NB),
    .BANK_WORDS(LB_WORDS),
    .WIDTH     (INSTR_W),
    .SIZE_W    (SIZE_W),
    .IDX_W     (IDX_W)
  ) u_lb (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_load (cfg_load),
    .body_size(body_size),
    .fits     (fits),
    .bank_act (bank_act),
    .tag_clr  (tag_clr),
    .rd       (lb_rd),
    .rd_idx   (rd_idx),
    .tag_hit  (tag_hit),
    .wr       (lb_wr),
    .wr_idx   (wr_idx),
    .wdata    (pm_rdata),
    .rdata    (lb_rdata)
  );

  // ------------------------------------------------ instruction multiplexer
  assign instr           = src_lb ? lb_rdata : pm_rdata;
  assign instr_from_lb   = src_lb;
  assign pm_access       = pm_rd;
  assign lb_read         = lb_rd;
  assign lb_write        = lb_wr;
  assign lb_banks_active = NUM_BANKS'(bank_act);

endmodule

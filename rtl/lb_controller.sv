// lb_controller: the loop buffer controller, a six-state machine.
//
// Every cycle with fetch_en=1 the processor fetches the instruction at
// fetch_addr; the instruction arrives in the next cycle from either the
// program memory (PM) or the loop buffer (LB). This block decides which, per
// fetch, and registers that choice (src_lb) for the instruction multiplexer.
//
//   s0  PM supplies. A hardware-loop set-up (setup=1, in the cycle the first
//       body instruction is fetched, with setup_end = last body address and
//       setup_count iterations) whose body fits the LB and that runs at least
//       twice claims the LB: LS/LE/iterations are latched, the tags cleared,
//       the bank choice loaded, and the controller goes to s1.
//   s1  hand-over PM -> recording. Like s2; entered from s0 or from s4.
//   s2  PM supplies and every fetched body instruction whose tag is clear is
//       written into the LB (the write happens in the next cycle, when the PM
//       word arrives). Fetching LE ends the iteration: s3, or s0 if it was
//       the last one.
//   s3  hand-over recording -> LB: the last recorded word is being written,
//       so the single-port LB cannot be read; PM still supplies.
//   s4  LB supplies every body address whose tag is set; the PM is not
//       accessed. A fetch outside the body or with a clear tag (the body took
//       a path not seen before: an if-branch or a call) is supplied by the PM,
//       recorded if inside the body, and sends the controller back to s1.
//       Fetching LE in the last iteration goes to s5.
//   s5  hand-over LB -> PM: the last LB word is delivered while the PM reads
//       the first address after the loop; then s0.
//
// The controller counts the iterations of the claimed loop itself (one per
// fetch of LE). Set-ups of loops nested in the claimed one are ignored: the
// claimed body already holds them. The six states, their roles, the s4->s1
// transition and the 1-bit tag follow the loop buffer controller
// description; the one-cycle meaning of s1/s3/s5, the claim rule and the
// iteration counting are this design's own reading of the missing diagram.
module lb_controller
  import lb_pkg::*;
#(
  parameter int unsigned AW     = 11,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned IDX_W  = 6,
  localparam int unsigned SIZE_W = AW + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch side
  input  logic              fetch_en,
  input  logic [AW-1:0]     fetch_addr,
  input  logic              setup,
  input  logic [AW-1:0]     setup_end,
  input  logic [CNT_W-1:0]  setup_count,
  // loop buffer side
  output logic [SIZE_W-1:0] body_size,
  input  logic              fits,
  output logic              cfg_load,
  output logic              tag_clr,
  output logic [IDX_W-1:0]  rd_idx,
  input  logic              tag_hit,
  output logic              lb_rd,
  output logic              lb_wr,
  output logic [IDX_W-1:0]  lb_wr_idx,
  // program memory and instruction multiplexer
  output logic              pm_rd,
  output logic              src_lb,
  output lb_state_e         state
);

  lb_state_e        state_q, state_d;
  logic [AW-1:0]    ls_q, le_q;
  logic [CNT_W-1:0] iter_q, iter_d;
  logic             wr_pend_q;
  logic [IDX_W-1:0] wr_idx_q;
  logic             src_lb_q;

  logic             claim;      // s0 takes a new loop this cycle
  logic [AW-1:0]    ls_e, le_e; // body bounds valid this cycle
  logic             in_body, at_end, last, hit, record;

  assign body_size = SIZE_W'(setup_end) - SIZE_W'(fetch_addr) + SIZE_W'(1);
  assign claim     = (state_q == S0_IDLE) && setup && fetch_en && fits &&
                     (setup_end >= fetch_addr) && (setup_count >= CNT_W'(2));
  assign ls_e      = claim ? fetch_addr : ls_q;
  assign le_e      = claim ? setup_end  : le_q;
  assign in_body   = (fetch_addr >= ls_e) && (fetch_addr <= le_e);
  assign at_end    = fetch_addr == le_e;
  assign rd_idx    = IDX_W'(fetch_addr - ls_e);
  assign hit       = in_body && tag_hit;

  assign cfg_load  = claim;
  assign tag_clr   = claim;

  always_comb begin
    iter_d  = claim ? setup_count : iter_q;
    last    = iter_d == CNT_W'(1);
    state_d = state_q;
    lb_rd   = 1'b0;
    record  = 1'b0;
    unique case (state_q)
      S0_IDLE: begin
        if (claim) begin
          record  = 1'b1;
          state_d = S1_PM_TO_REC;
        end
      end
      S1_PM_TO_REC, S2_RECORD: begin
        if (fetch_en) begin
          record  = in_body && !tag_hit;
          state_d = at_end ? (last ? S0_IDLE : S3_REC_TO_LB) : S2_RECORD;
        end
      end
      S3_REC_TO_LB: begin
        state_d = (fetch_en && at_end && last) ? S0_IDLE : S4_LB_SUPPLY;
      end
      S4_LB_SUPPLY: begin
        if (fetch_en) begin
          if (hit) begin
            lb_rd   = 1'b1;
            state_d = (at_end && last) ? S5_LB_TO_PM : S4_LB_SUPPLY;
          end else begin
            record  = in_body;
            state_d = at_end ? (last ? S0_IDLE : S3_REC_TO_LB) : S1_PM_TO_REC;
          end
        end
      end
      S5_LB_TO_PM: state_d = S0_IDLE;
      default:     state_d = S0_IDLE;
    endcase
    if (fetch_en && at_end && (state_q != S0_IDLE || claim) && state_q != S5_LB_TO_PM)
      iter_d = iter_d - CNT_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S0_IDLE;
      ls_q      <= '0;
      le_q      <= '0;
      iter_q    <= '0;
      wr_pend_q <= 1'b0;
      wr_idx_q  <= '0;
      src_lb_q  <= 1'b0;
    end else begin
      state_q   <= state_d;
      iter_q    <= iter_d;
      wr_pend_q <= record;
      if (record) wr_idx_q <= rd_idx;
      if (claim) begin
        ls_q <= fetch_addr;
        le_q <= setup_end;
      end
      if (fetch_en) src_lb_q <= lb_rd;
    end
  end

  assign lb_wr     = wr_pend_q;
  assign lb_wr_idx = wr_idx_q;
  assign pm_rd     = fetch_en && !lb_rd;
  assign src_lb    = src_lb_q;
  assign state     = state_q;

  // A recorded word is written the cycle after its fetch; the controller
  // never reads the single-port loop buffer in that cycle.
  a_wr_not_rd: assert property (@(posedge clk) disable iff (!rst_n) !(lb_wr && lb_rd));
  // The loop buffer supplies only in s4.
  a_rd_in_s4: assert property (@(posedge clk) disable iff (!rst_n)
                               lb_rd |-> state_q == S4_LB_SUPPLY);

endmodule

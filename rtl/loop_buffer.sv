// loop_buffer: the loop buffer memory architecture, central (CELB) or
// banked (BCLB).
//
// CELB: one lb_bank of BANK_WORDS[0] words; the loop-relative index is the
// word address. BCLB: NUM_BANKS lb_banks, a bclb_bank_select that chooses
// the banks for the claimed loop from its body size, and the multiplexers
// that route the read, the write and the tag lookup to the chosen bank and
// bring the selected bank's word back to the instruction multiplexer.
//
// Interface (driven by lb_controller): cfg_load with body_size claims a loop
// and fixes the bank choice (fits says whether it can be held); tag_clr
// clears all tags; rd_idx is the index of the address being fetched, tag_hit
// its tag, and rd reads it (rdata valid the next cycle); wr/wr_idx/wdata
// record an instruction. rd and wr are never active in the same cycle (the
// loop buffer memories are single-port). bank_act shows which memories are
// in use. The CELB/BCLB split and the multiplexers follow the IMO interface
// figures for the two architectures; the port timing is this design's own.
module loop_buffer
  import lb_pkg::*;
#(
  parameter lb_arch_e    ARCH      = ARCH_BCLB,
  parameter int unsigned NUM_BANKS = 8,
  parameter int unsigned BANK_WORDS [NUM_BANKS] = '{default: 8},
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned SIZE_W    = 12,
  parameter int unsigned IDX_W     = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_load,
  input  logic [SIZE_W-1:0]    body_size,
  output logic                 fits,
  output logic [NUM_BANKS-1:0] bank_act,
  input  logic                 tag_clr,
  input  logic                 rd,
  input  logic [IDX_W-1:0]     rd_idx,
  output logic                 tag_hit,
  input  logic                 wr,
  input  logic [IDX_W-1:0]     wr_idx,
  input  logic [WIDTH-1:0]     wdata,
  output logic [WIDTH-1:0]     rdata
);

  function automatic int unsigned max_words();
    int unsigned m = 1;
    for (int unsigned i = 0; i < NUM_BANKS; i++)
      if (BANK_WORDS[i] > m) m = BANK_WORDS[i];
    return m;
  endfunction

  localparam int unsigned LAW = (max_words() > 1) ? $clog2(max_words()) : 1;
  localparam int unsigned BW  = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;

  if (ARCH == ARCH_CELB) begin : g_celb
    localparam int unsigned W   = BANK_WORDS[0];
    localparam int unsigned CAW = (W > 1) ? $clog2(W) : 1;

    logic rd_in, wr_in;
    assign rd_in = 32'(rd_idx) < W;
    assign wr_in = 32'(wr_idx) < W;

    logic bank_hit;
    lb_bank #(.WORDS(W), .WIDTH(WIDTH)) u_bank (
      .clk     (clk),
      .rst_n   (rst_n),
      .ce      ((rd && rd_in) || (wr && wr_in)),
      .we      (wr),
      .addr    (wr ? CAW'(wr_idx) : CAW'(rd_idx)),
      .wdata   (wdata),
      .rdata   (rdata),
      .tag_clr (tag_clr),
      .tag_addr(CAW'(rd_idx)),
      .tag_hit (bank_hit)
    );
    assign tag_hit  = rd_in && bank_hit;
    assign fits     = (body_size != '0) && (32'(body_size) <= W);
    assign bank_act = NUM_BANKS'(1);
  end else begin : g_bclb
    logic           hit_a, hit_b;
    logic [BW-1:0]  bank_a, bank_b;
    logic [LAW-1:0] word_a, word_b;

    bclb_bank_select #(
      .NUM_BANKS (NUM_BANKS),
      .BANK_WORDS(BANK_WORDS),
      .SIZE_W    (SIZE_W),
      .IDX_W     (IDX_W),
      .LAW       (LAW)
    ) u_sel (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_load (cfg_load),
      .body_size(body_size),
      .fits     (fits),
      .bank_act (bank_act),
      .idx_a    (rd_idx),
      .hit_a    (hit_a),
      .bank_a   (bank_a),
      .word_a   (word_a),
      .idx_b    (wr_idx),
      .hit_b    (hit_b),
      .bank_b   (bank_b),
      .word_b   (word_b)
    );

    logic [WIDTH-1:0] bank_rdata [NUM_BANKS];
    logic [NUM_BANKS-1:0] bank_tag;

    for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
      localparam int unsigned W   = BANK_WORDS[b];
      localparam int unsigned BAW = (W > 1) ? $clog2(W) : 1;
      logic sel_rd, sel_wr;
      assign sel_rd = rd && hit_a && (bank_a == BW'(b));
      assign sel_wr = wr && hit_b && (bank_b == BW'(b));
      lb_bank #(.WORDS(W), .WIDTH(WIDTH)) u_bank (
        .clk     (clk),
        .rst_n   (rst_n),
        .ce      (sel_rd || sel_wr),
        .we      (sel_wr),
        .addr    (sel_wr ? BAW'(word_b) : BAW'(word_a)),
        .wdata   (wdata),
        .rdata   (bank_rdata[b]),
        .tag_clr (tag_clr),
        .tag_addr(BAW'(word_a)),
        .tag_hit (bank_tag[b])
      );
    end

    assign tag_hit = hit_a && bank_tag[bank_a];

    // output multiplexer: bank read in the previous cycle
    logic [BW-1:0] rd_bank_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)             rd_bank_q <= '0;
      else if (rd && hit_a)   rd_bank_q <= bank_a;
    end
    assign rdata = bank_rdata[rd_bank_q];
  end

  // The loop buffer memories have a single port.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(rd && wr));

endmodule

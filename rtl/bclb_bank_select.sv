// bclb_bank_select: bank selection logic of the banked central loop buffer
// (BCLB).
//
// When a loop is claimed (cfg_load), the loop body size decides which loop
// buffer memories are connected to the program memory and the processor:
//   * if one bank is large enough, the smallest such bank is used alone;
//   * otherwise banks 0, 1, ... are chained until their words cover the body.
// Only the banks chosen are active (bank_act); the others stay idle, which is
// the point of banking. fits tells, combinationally from body_size, whether
// the loop can be held at all. The choice is registered, and two lookup ports
// (a: fetch/read side, b: write side) map a loop-relative index to a bank and
// a word address inside it. hit_x is low for an index outside the chosen banks.
// That the controller picks the memories from the loop body size follows the
// BCLB description; the smallest-single-bank-else-chain rule, and banks of
// unequal sizes, are this design's own choices (with equal banks it simply
// enables as many banks as the body needs).
module bclb_bank_select #(
  parameter int unsigned NUM_BANKS = 8,
  parameter int unsigned BANK_WORDS [NUM_BANKS] = '{default: 8},
  parameter int unsigned SIZE_W = 12,
  parameter int unsigned IDX_W = 6,
  parameter int unsigned LAW = 3,
  localparam int unsigned BW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_load,
  input  logic [SIZE_W-1:0]    body_size,
  output logic                 fits,
  output logic [NUM_BANKS-1:0] bank_act,
  input  logic [IDX_W-1:0]     idx_a,
  output logic                 hit_a,
  output logic [BW-1:0]        bank_a,
  output logic [LAW-1:0]       word_a,
  input  logic [IDX_W-1:0]     idx_b,
  output logic                 hit_b,
  output logic [BW-1:0]        bank_b,
  output logic [LAW-1:0]       word_b
);

  function automatic int unsigned base_of(int unsigned b);
    int unsigned s = 0;
    for (int unsigned i = 0; i < NUM_BANKS; i++)
      if (i < b) s += BANK_WORDS[i];
    return s;
  endfunction

  localparam int unsigned TOTAL = base_of(NUM_BANKS);

  // combinational choice for the body size offered
  logic              single_ok;
  logic [BW-1:0]     single_b;
  logic [BW:0]       chain_n;

  always_comb begin
    int unsigned best;
    best      = TOTAL + 1;
    single_ok = 1'b0;
    single_b  = '0;
    chain_n   = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      if (32'(body_size) <= BANK_WORDS[b] && BANK_WORDS[b] < best) begin
        best      = BANK_WORDS[b];
        single_ok = 1'b1;
        single_b  = BW'(b);
      end
      if (32'(body_size) > base_of(b)) chain_n = (BW+1)'(b + 1);
    end
    fits = (body_size != '0) && (32'(body_size) <= TOTAL);
  end

  // registered configuration of the claimed loop
  logic          single_q;
  logic [BW-1:0] single_b_q;
  logic [BW:0]   chain_n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      single_q   <= 1'b1;
      single_b_q <= '0;
      chain_n_q  <= '0;
    end else if (cfg_load) begin
      single_q   <= single_ok;
      single_b_q <= single_b;
      chain_n_q  <= chain_n;
    end
  end

  always_comb begin
    for (int unsigned b = 0; b < NUM_BANKS; b++)
      bank_act[b] = single_q ? (single_b_q == BW'(b)) : (b < 32'(chain_n_q));
  end

  // index -> (bank, word) for the registered configuration
  function automatic logic [1+BW+LAW-1:0] lookup(logic [IDX_W-1:0] idx);
    logic          h;
    logic [BW-1:0] bk;
    logic [LAW-1:0] wd;
    h  = 1'b0;
    bk = '0;
    wd = '0;
    if (single_q) begin
      bk = single_b_q;
      wd = LAW'(idx);
      for (int unsigned b = 0; b < NUM_BANKS; b++)
        if (single_b_q == BW'(b) && 32'(idx) < BANK_WORDS[b]) h = 1'b1;
    end else begin
      for (int unsigned b = 0; b < NUM_BANKS; b++)
        if (b < 32'(chain_n_q) && 32'(idx) >= base_of(b) &&
            32'(idx) < base_of(b) + BANK_WORDS[b]) begin
          h  = 1'b1;
          bk = BW'(b);
          wd = LAW'(32'(idx) - base_of(b));
        end
    end
    return {h, bk, wd};
  endfunction

  assign {hit_a, bank_a, word_a} = lookup(idx_a);
  assign {hit_b, bank_b, word_b} = lookup(idx_b);

endmodule

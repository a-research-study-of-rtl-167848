// lb_bank: one loop buffer memory with its 1-bit tags.
//
// A small single-port synchronous instruction store. Each entry has a tag
// bit that says the entry holds a recorded instruction of the current loop;
// the loop buffer controller reads the tag of the address being fetched to
// decide whether the loop buffer can supply it. Tags are flip-flops so that
// they can be looked up combinationally (tag_addr -> tag_hit) in the same
// cycle as the fetch, and cleared all at once (tag_clr) when a new loop is
// claimed. A write (ce=1, we=1) stores wdata and sets the tag of addr; a
// read (ce=1, we=0) returns mem[addr] on rdata the next cycle; rdata holds
// while ce is low. tag_clr wins over a write in the same cycle.
// The tag per stored address follows the loop buffer description; placing
// the tags beside the word array, the flash clear and the timing are this
// design's own choices.
module lb_bank #(
  parameter int unsigned WORDS = 8,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  input  logic             tag_clr,
  input  logic [AW-1:0]    tag_addr,
  output logic             tag_hit
);

  logic [WIDTH-1:0] mem [WORDS];
  logic [WORDS-1:0] tag_q;

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             tag_q       <= '0;
    else if (tag_clr)       tag_q       <= '0;
    else if (ce && we)      tag_q[addr] <= 1'b1;
  end

  assign tag_hit = (32'(tag_addr) < WORDS) ? tag_q[tag_addr] : 1'b0;

endmodule

// program_memory: the program memory (PM) of the instruction memory
// organisation, a single-port synchronous SRAM.
//
// The default size, 2K words of 16 bits, is the program memory of the
// general-purpose processor. A read with ce=1, we=0 presents mem[addr] on
// rdata in the next cycle; rdata holds its value while ce is low, like the
// output latch of an SRAM macro, so an idle cycle costs no access. A write
// with ce=1, we=1 stores wdata (used to load the program). The array is
// not reset: the program is loaded before the processor starts fetching.
// Modelling the macro as a plain array is this design's choice.
module program_memory #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule

// toy_memory: the TOY machine's main memory, 256 words of 16 bits.
//
// One address port serves both reading and writing. Reading is
// combinational: `rdata` shows the word at `addr` within the same cycle, so
// an instruction fetched in the fetch phase, or an operand read in the
// execute phase, is ready for the clock edge that ends the phase. A write
// takes place at the rising clock edge while `we` is high. The memory has no
// reset; whatever is read must have been written first.
// The size and the single Write Data / Read Data / Write / Address port are
// the machine's; the combinational read is this design's choice, matching a
// phase that reads and writes on one edge.
module toy_memory
  import toy_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  parameter int unsigned W     = WORD_W,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule

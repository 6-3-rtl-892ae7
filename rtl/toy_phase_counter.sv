// toy_phase_counter: the 1-bit counter that splits time into the fetch and
// execute phases of the TOY machine.
//
// The counter's output flips at every rising clock edge while `en` is high:
// Q = 1 is the execute phase, its complement the fetch phase, so one
// instruction takes two clock cycles, fetch then execute. The machine's
// drawing builds the counter from a master and a slave D flip-flop clocked on
// opposite clock levels with an inverter feeding Q back to D; here the
// master/slave pair is one edge-triggered flip-flop. `en` (low to hold the
// phase, e.g. after a halt) and the synchronous reset to the fetch phase
// are this design's additions.
module toy_phase_counter (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic execute,
  output logic fetch
);

  always_ff @(posedge clk) begin
    if (!rst_n)  execute <= 1'b0;
    else if (en) execute <= ~execute;
  end

  assign fetch = ~execute;

endmodule

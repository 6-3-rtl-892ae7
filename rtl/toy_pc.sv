// toy_pc: the TOY machine's program counter with its incrementer and input
// multiplexer.
//
// The PC is an 8-bit register. Its input multiplexer chooses between the
// result of adding 1 to the old PC (select 0) and the result of a jump or
// branch (select 1); in the machine the select wire is the execute phase, so
// the fetch phase always advances the PC by one and the execute phase can
// only load a target. The register loads at the rising clock edge while
// `load` is high. Jump and link saves the PC itself, which during the execute
// phase already holds the address after the instruction. Reset sets the
// PC to RESET_PC, 0x10 by default, the customary TOY start address; the
// reset value is this design's choice.
module toy_pc
  import toy_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter logic [AW-1:0] RESET_PC = AW'(8'h10)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,      // load the PC this edge
  input  logic          sel_jump,  // 1: target, 0: pc + 1
  input  logic [AW-1:0] target,    // jump or branch target
  output logic [AW-1:0] pc
);

  logic [AW-1:0] pc_plus1;
  logic [AW-1:0] pc_next;

  assign pc_plus1 = pc + 1'b1;
  assign pc_next  = sel_jump ? target : pc_plus1;

  always_ff @(posedge clk) begin
    if (!rst_n)    pc <= RESET_PC;
    else if (load) pc <= pc_next;
  end

endmodule

// toy_control: the TOY machine's control unit.
//
// A 4-bit decoder turns the opcode into sixteen instruction lines (halt, add,
// ..., jump and link). Each control wire is the OR of the instruction lines
// that need it, combined with the phase (fetch/execute), the condition bits
// from the condition evaluator and the clock:
//   write_ir     = fetch                                      (IR loads at end of fetch)
//   write_pc     = fetch | execute & (jal | jr | bz & =0 | bp & >0)
//   pc_jump      = execute                                    (PC mux: 1 target, 0 pc+1)
//   mem_addr_bus = execute                                    (memory address: bus or pc)
//   write_mem    = execute & (store | store indirect)
//   write_reg    = execute & (add..load addr | load | load indirect | jal)
//   alu_mux      = load addr | load | store | bz | bp | jal   (bus carries addr)
//   rega_d       = store | store indirect | bz | bp           (A address = d)
//   alu_sel      = 001 and, 011 shifts, 010 xor, 100 load/store indirect and jr
//   alu_sub      = subtract;  alu_shr = shift right
//   regw_src     = memory for load/load indirect, pc for jal, else result bus
// WRITE MEM, WRITE IR, ALU SELECT 0, ALU MUX and READ REG A MUX are exactly
// the decoder taps of the machine's control drawing, and the PC load term is
// that of its program-counter drawing. The remaining wires ("plus a few
// more") are this design's, derived from what each instruction must do on
// the datapath.
//
// In the drawings the writes are gated with the clock. In this synchronous
// design the clock is the flip-flops' own; the input `tick` (the machine is
// running) qualifies every write enable instead, so each write happens at
// the rising edge that ends its phase.
//
// The register that jump register sends to the PC is R[t]: the A-address
// multiplexer is not switched for jump register in the control drawing, so
// only ALU input 2 (B data, register t) can reach the PC through the
// "copy input 2" ALU function.
module toy_control
  import toy_pkg::*;
(
  input  opcode_e op,
  input  logic    fetch,
  input  logic    execute,
  input  logic    tick,
  input  logic    eq0,
  input  logic    gt0,
  output ctrl_t   ctrl
);

  logic [15:0] dec;  // one line per instruction type

  always_comb begin
    dec = '0;
    dec[op] = 1'b1;
  end

  logic is_halt, is_sub, is_and, is_xor, is_shl, is_shr, is_lda, is_ld;
  logic is_st, is_ldi, is_sti, is_bz, is_bp, is_jr, is_jal, is_arith;

  always_comb begin
    is_halt = dec[OP_HALT];
    is_sub  = dec[OP_SUB];
    is_and  = dec[OP_AND];
    is_xor  = dec[OP_XOR];
    is_shl  = dec[OP_SHL];
    is_shr  = dec[OP_SHR];
    is_lda  = dec[OP_LDA];
    is_ld   = dec[OP_LD];
    is_st   = dec[OP_ST];
    is_ldi  = dec[OP_LDI];
    is_sti  = dec[OP_STI];
    is_bz   = dec[OP_BZ];
    is_bp   = dec[OP_BP];
    is_jr   = dec[OP_JR];
    is_jal  = dec[OP_JAL];
    is_arith = dec[OP_ADD] | is_sub | is_and | is_xor | is_shl | is_shr;
  end

  always_comb begin
    ctrl.write_ir     = tick & fetch;
    ctrl.write_pc     = tick & (fetch |
                                (execute & (is_jal | is_jr | (is_bz & eq0) | (is_bp & gt0))));
    ctrl.pc_jump      = execute;
    ctrl.mem_addr_bus = execute;
    ctrl.write_mem    = tick & execute & (is_st | is_sti);
    ctrl.write_reg    = tick & execute & (is_arith | is_lda | is_ld | is_ldi | is_jal);
    ctrl.alu_mux      = is_lda | is_ld | is_st | is_bz | is_bp | is_jal;
    ctrl.rega_d       = is_st | is_sti | is_bz | is_bp;
    ctrl.alu_sel      = alu_sel_e'({is_ldi | is_sti | is_jr,
                                    is_xor | is_shl | is_shr,
                                    is_and | is_shl | is_shr});
    ctrl.alu_sub      = is_sub;
    ctrl.alu_shr      = is_shr;
    if (is_ld | is_ldi) ctrl.regw_src = RW_MEM;
    else if (is_jal)    ctrl.regw_src = RW_PC;
    else                ctrl.regw_src = RW_RESULT;
    ctrl.halt         = execute & is_halt;
  end

endmodule

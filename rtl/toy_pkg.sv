// toy_pkg: widths, opcodes and control encodings shared by the TOY machine.
//
// The TOY machine has 256 words of 16-bit memory, sixteen 16-bit registers,
// an 8-bit program counter and sixteen instruction types selected by the top
// four bits of an instruction. An instruction word is laid out as
// op[15:12] d[11:8] s[7:4] t[3:0]; the low byte {s,t} doubles as an 8-bit
// memory address for the load, store, branch and jump-and-link instructions.
//
// The opcode numbering and the 3-bit ALU select codes follow the machine's
// instruction table and ALU table. The encoding of the register write-data
// multiplexer is this design's own choice.
package toy_pkg;

  localparam int unsigned WORD_W = 16;   // data word and register width
  localparam int unsigned ADDR_W = 8;    // memory address and PC width
  localparam int unsigned MEM_WORDS = 256; // main memory words
  localparam int unsigned NREGS  = 16;   // number of registers
  localparam int unsigned RADDR_W = 4;   // register address width

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [RADDR_W-1:0] raddr_t;

  // The sixteen instruction types.
  typedef enum logic [3:0] {
    OP_HALT  = 4'h0,  // halt
    OP_ADD   = 4'h1,  // R[d] <- R[s] + R[t]
    OP_SUB   = 4'h2,  // R[d] <- R[s] - R[t]
    OP_AND   = 4'h3,  // R[d] <- R[s] & R[t]
    OP_XOR   = 4'h4,  // R[d] <- R[s] ^ R[t]
    OP_SHL   = 4'h5,  // R[d] <- R[s] << R[t]
    OP_SHR   = 4'h6,  // R[d] <- R[s] >> R[t]
    OP_LDA   = 4'h7,  // load address:   R[d] <- addr
    OP_LD    = 4'h8,  // load:           R[d] <- mem[addr]
    OP_ST    = 4'h9,  // store:          mem[addr] <- R[d]
    OP_LDI   = 4'hA,  // load indirect:  R[d] <- mem[R[t]]
    OP_STI   = 4'hB,  // store indirect: mem[R[t]] <- R[d]
    OP_BZ    = 4'hC,  // branch zero:     if (R[d] == 0) pc <- addr
    OP_BP    = 4'hD,  // branch positive: if (R[d] >  0) pc <- addr
    OP_JR    = 4'hE,  // jump register:   pc <- R[t] (see toy_control)
    OP_JAL   = 4'hF   // jump and link:   R[d] <- pc; pc <- addr
  } opcode_e;

  // ALU select (the 3-bit "ALU control" of the ALU table).
  typedef enum logic [2:0] {
    ALU_ADDSUB = 3'b000,  // +, -
    ALU_AND    = 3'b001,  // &
    ALU_XOR    = 3'b010,  // ^
    ALU_SHIFT  = 3'b011,  // <<, >>
    ALU_PASS2  = 3'b100   // copy input 2
  } alu_sel_e;

  // Register write-data multiplexer (2 select wires).
  typedef enum logic [1:0] {
    RW_RESULT = 2'd0,  // ALU result or zero-extended addr (the result bus)
    RW_MEM    = 2'd1,  // memory read data (load, load indirect)
    RW_PC     = 2'd2   // zero-extended pc (jump and link)
  } regw_src_e;

  // All control wires produced by toy_control, as one bundle.
  typedef struct packed {
    logic      write_ir;     // load IR (end of fetch)
    logic      write_pc;     // load PC
    logic      pc_jump;      // PC input mux: 1 = jump/branch target, 0 = pc+1
    logic      mem_addr_bus; // memory address mux: 1 = result bus, 0 = pc
    logic      write_mem;    // write main memory
    logic      write_reg;    // write the register file
    regw_src_e regw_src;     // register write-data mux
    logic      rega_d;       // READ REG A MUX: 1 = A address from d, 0 = from s
    logic      alu_mux;      // ALU MUX: 1 = result bus carries addr, 0 = ALU output
    alu_sel_e  alu_sel;      // ALU select
    logic      alu_sub;      // ALU subtract
    logic      alu_shr;      // ALU shift direction (1 = right)
    logic      halt;         // halt instruction in its execute phase
  } ctrl_t;

endpackage

// toy_machine: the complete TOY computer, a 16-bit machine that executes one
// instruction in two clock cycles, a fetch phase and an execute phase.
//
// Datapath (all multiplexers are in this module):
//   fetch   memory address = pc; at the closing edge IR <- mem[pc] and
//           pc <- pc + 1.
//   execute register A address = s, or d for store, store indirect and the
//           branches; register B address = t; the ALU works on A data and B
//           data; the result bus carries the ALU output or, for load address,
//           load, store, branches and jump and link, the 8-bit addr field
//           {s,t} zero-extended. The low byte of the result bus is the memory
//           address (loads and stores) and the PC target (branches, jumps).
//           The register write data is the result bus, the memory read data
//           (loads) or the zero-extended pc (jump and link, which then holds
//           the address after the jal). Memory write data is A data. At the
//           closing edge the register file, memory and PC take what the
//           control unit enables.
// A halt instruction sets `halted` at the end of its execute phase and the
// machine stops, PC pointing past the halt. Clearing `run` also freezes the
// machine; while `run` is low the load port (load_we/addr/data) writes
// main memory, so a program can be placed before it runs. Reset clears IR
// and registers, puts the PC at RESET_PC and starts in the fetch phase.
//
// The blocks, the buses and their widths, the two-phase timing and the
// decoder taps follow the machine's datapath and control drawings; the
// load port, `run`, the halt behaviour and RESET_PC are this design's own.
// Observation outputs: pc, ir, the phase and halted.
module toy_machine
  import toy_pkg::*;
#(
  parameter addr_t RESET_PC = 8'h10
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  logic  load_we,
  input  addr_t load_addr,
  input  word_t load_data,
  output logic  halted,
  output logic  execute,
  output addr_t pc,
  output word_t ir
);

  logic    fetch, tick;
  ctrl_t   ctrl;
  opcode_e op;
  raddr_t  d, s, t, a_addr;
  addr_t   addr;
  word_t   mem_rdata, a_data, b_data, alu_out, bus, reg_wdata;
  logic    eq0, gt0;
  addr_t   mem_addr;
  word_t   mem_wdata;
  logic    mem_we;

  assign tick = run & ~halted;

  toy_phase_counter u_phase (
    .clk, .rst_n, .en(tick), .execute, .fetch
  );

  toy_pc #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n,
    .load    (ctrl.write_pc),
    .sel_jump(ctrl.pc_jump),
    .target  (bus[ADDR_W-1:0]),
    .pc
  );

  toy_ir u_ir (
    .clk, .rst_n,
    .load(ctrl.write_ir),
    .din (mem_rdata),
    .ir, .op, .d, .s, .t, .addr
  );

  // Memory address mux (pc or result bus); the load port takes over while
  // the machine is stopped.
  always_comb begin
    if (!run) begin
      mem_addr  = load_addr;
      mem_wdata = load_data;
      mem_we    = load_we;
    end else begin
      mem_addr  = ctrl.mem_addr_bus ? bus[ADDR_W-1:0] : pc;
      mem_wdata = a_data;
      mem_we    = ctrl.write_mem;
    end
  end

  toy_memory u_mem (
    .clk,
    .we   (mem_we),
    .addr (mem_addr),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  // Register A address mux and register write-data mux.
  assign a_addr = ctrl.rega_d ? d : s;

  always_comb begin
    unique case (ctrl.regw_src)
      RW_MEM:  reg_wdata = mem_rdata;
      RW_PC:   reg_wdata = word_t'(pc);
      default: reg_wdata = bus;
    endcase
  end

  toy_regfile u_regs (
    .clk, .rst_n,
    .we   (ctrl.write_reg),
    .waddr(d),
    .wdata(reg_wdata),
    .aaddr(a_addr),
    .adata(a_data),
    .baddr(t),
    .bdata(b_data)
  );

  toy_alu u_alu (
    .in1        (a_data),
    .in2        (b_data),
    .sel        (ctrl.alu_sel),
    .sub        (ctrl.alu_sub),
    .shift_right(ctrl.alu_shr),
    .result     (alu_out)
  );

  // ALU output mux: ALU result or the zero-extended addr field.
  assign bus = ctrl.alu_mux ? word_t'(addr) : alu_out;

  toy_cond_eval u_cond (
    .a(a_data), .eq0, .gt0
  );

  toy_control u_ctrl (
    .op, .fetch, .execute, .tick, .eq0, .gt0, .ctrl
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                halted <= 1'b0;
    else if (tick & ctrl.halt) halted <= 1'b1;
  end

  // Datapath rules: nothing but the IR and PC is written in the fetch phase,
  // and the IR is never written in the execute phase.
  a_fetch_no_write: assert property (@(posedge clk) disable iff (!rst_n)
    fetch |-> !(ctrl.write_mem || ctrl.write_reg));
  a_execute_no_ir: assert property (@(posedge clk) disable iff (!rst_n)
    execute |-> !ctrl.write_ir);

endmodule

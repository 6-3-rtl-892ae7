// tb_toy_machine: end-to-end test of the complete TOY machine at its default
// size (256 words, 16 registers, reset PC 0x10).
//
// Each test loads a program through the load port while `run` is low, starts
// the machine and checks it in lockstep against an instruction-level model of
// the TOY instruction set written here: after every executed instruction the
// PC and all sixteen registers must match, and at the end so must all of
// memory. It also checks that every instruction takes exactly two clock
// cycles (fetch and execute) and that the machine stops after a halt.
//
// Programs: the two worked examples of the machine's description (add at
// 0x20: R2 <- R3 + R4 with 0028 + 0064 = 008C; jump and link FF30 at 0x20:
// R[F] <- 21, pc <- 30), a directed program that uses all sixteen
// instructions, taken and untaken branches, a write to R0 and R1 <- R1 + R1,
// and random programs, one of them paused midway by dropping `run`. Each
// mechanism's occurrences are counted; one that never happened is a failure.
module tb_toy_machine;
  import toy_pkg::*;

  logic  clk, rst_n, run, load_we;
  addr_t load_addr;
  word_t load_data;
  logic  halted, execute;
  addr_t pc;
  word_t ir;

  int checks = 0, failures = 0;

  toy_machine dut (.clk, .rst_n, .run, .load_we, .load_addr, .load_data,
                   .halted, .execute, .pc, .ir);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  word_t rmem [256];
  word_t rreg [16];
  addr_t rpc;
  logic  rhalt;

  // Mechanism counters.
  int n_op [16];
  int n_bz_taken, n_bz_not, n_bp_taken, n_bp_not, n_r0_write, n_same_reg, n_pause;
  int n_self_modify;

  function automatic word_t shl(word_t a, word_t n);
    return (n >= 16) ? 16'h0 : word_t'(a << n[3:0]);
  endfunction

  function automatic word_t sra(word_t a, word_t n);
    word_t r = a;
    int k = (n >= 16) ? 16 : int'(n);
    for (int i = 0; i < k; i++) r = {r[15], r[15:1]};
    return r;
  endfunction

  task automatic ref_step();
    word_t inst;
    logic [3:0] o, d, s, t;
    addr_t a;
    word_t rs, rt, rd;
    inst = rmem[rpc];
    rpc  = rpc + 8'd1;
    o = inst[15:12]; d = inst[11:8]; s = inst[7:4]; t = inst[3:0]; a = inst[7:0];
    rs = rreg[s]; rt = rreg[t]; rd = rreg[d];
    n_op[o]++;
    if (o inside {[4'h1:4'h8], 4'hA, 4'hF} && d == 0) n_r0_write++;
    if (o inside {[4'h1:4'h6]} && d != 0 && d == s && d == t) n_same_reg++;
    case (o)
      4'h0: rhalt = 1'b1;
      4'h1: rreg[d] = word_t'(rs + rt);
      4'h2: rreg[d] = word_t'(rs - rt);
      4'h3: rreg[d] = rs & rt;
      4'h4: rreg[d] = rs ^ rt;
      4'h5: rreg[d] = shl(rs, rt);
      4'h6: rreg[d] = sra(rs, rt);
      4'h7: rreg[d] = word_t'(a);
      4'h8: rreg[d] = rmem[a];
      4'h9: begin rmem[a] = rd; if (a >= 8'h10 && a < 8'h30) n_self_modify++; end
      4'hA: rreg[d] = rmem[rt[7:0]];
      4'hB: rmem[rt[7:0]] = rd;
      4'hC: if (rd == 0) begin rpc = a; n_bz_taken++; end else n_bz_not++;
      4'hD: if (!rd[15] && rd != 0) begin rpc = a; n_bp_taken++; end else n_bp_not++;
      4'hE: rpc = rt[7:0];
      4'hF: begin rreg[d] = word_t'(rpc); rpc = a; end
      default: ;
    endcase
    rreg[0] = 16'h0;
  endtask

  // Datapath values of the two worked examples, seen during their execute
  // phase: after fetching from 0x20 the PC is 21, and the buses carry the
  // values printed in the examples.
  int n_add_trace = 0, n_jal_trace = 0;
  always @(negedge clk) begin
    if (run && execute && pc == 8'h21) begin
      if (ir == 16'h1234 && dut.a_data == 16'h0028 && dut.b_data == 16'h0064 &&
          dut.bus == 16'h008C && dut.ctrl.write_reg)
        n_add_trace++;
      if (ir == 16'hFF30 && dut.reg_wdata == 16'h0021 && dut.bus == 16'h0030 &&
          dut.ctrl.write_reg && dut.ctrl.write_pc && dut.ctrl.pc_jump)
        n_jal_trace++;
    end
  end

  // ---------------------------------------------------------------- helpers
  word_t prog [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load_and_reset();
    run = 0; load_we = 0; rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      load_we = 1; load_addr = addr_t'(i); load_data = prog[i];
      @(negedge clk);
      rmem[i] = prog[i];
    end
    load_we = 0;
    for (int i = 0; i < 16; i++) rreg[i] = 16'h0;
    rpc = 8'h10; rhalt = 0;
  endtask

  // Runs until halt or max_instr instructions, comparing after each one.
  // pause_at > 0 drops `run` for a few cycles after that many instructions.
  task automatic run_program(input string name, input int max_instr, input int pause_at);
    int n = 0, cycles = 0, ok_state;
    bit committing;
    @(negedge clk);
    run = 1;
    check(!execute && pc == 8'h10, {name, ": starts in fetch at 0x10"});
    while (!halted && n < max_instr) begin
      committing = execute;
      @(posedge clk); cycles++;
      #1;
      if (committing) begin
        ref_step();
        n++;
        ok_state = int'((pc == rpc) && (halted == rhalt));
        for (int r = 0; r < 16; r++)
          if (rreg[r] !== regval(r)) ok_state = 0;
        check(ok_state != 0, $sformatf("%s: state after instruction %0d (ir=%h pc=%h exp %h)",
                                       name, n, ir, pc, rpc));
        if (n == pause_at) begin
          @(negedge clk);
          run = 0;
          repeat (5) @(negedge clk);
          check(pc == rpc && !execute, {name, ": frozen while run is low"});
          n_pause++;
          run = 1;
          continue;
        end
      end
      @(negedge clk);
    end
    if (halted) begin
      check(cycles == 2 * n, $sformatf("%s: %0d cycles for %0d instructions", name, cycles, n));
      repeat (6) @(negedge clk);
      check(halted && pc == rpc, {name, ": stays halted"});
    end
    for (int i = 0; i < 256; i++)
      if (dut.u_mem.mem[i] !== rmem[i])
        check(0, $sformatf("%s: mem[%h]=%h exp %h", name, i, dut.u_mem.mem[i], rmem[i]));
    checks++;
    run = 0;
  endtask

  function automatic word_t regval(int r);
    return (r == 0) ? 16'h0 : dut.u_regs.regs[r];
  endfunction

  task automatic clear_prog();
    for (int i = 0; i < 256; i++) prog[i] = 16'h0;
  endtask

  // ---------------------------------------------------------------- tests
  initial begin
    rst_n = 0; run = 0; load_we = 0; load_addr = 0; load_data = 0;
    foreach (n_op[i]) n_op[i] = 0;
    n_bz_taken = 0; n_bz_not = 0; n_bp_taken = 0; n_bp_not = 0;
    n_r0_write = 0; n_same_reg = 0; n_pause = 0; n_self_modify = 0;

    // Worked example 1: add at 0x20.
    clear_prog();
    prog[8'h10] = 16'h8330;  // R3 <- mem[30]
    prog[8'h11] = 16'h8431;  // R4 <- mem[31]
    prog[8'h12] = 16'hC020;  // R0 == 0: branch to 20
    prog[8'h20] = 16'h1234;  // R2 <- R3 + R4
    prog[8'h21] = 16'h0000;  // halt
    prog[8'h30] = 16'h0028;
    prog[8'h31] = 16'h0064;
    load_and_reset();
    run_program("add example", 100, 0);
    check(dut.u_regs.regs[2] == 16'h008C, "add example: R2 = 008C");

    // Worked example 2: jump and link at 0x20.
    clear_prog();
    prog[8'h10] = 16'hC020;  // to 20
    prog[8'h20] = 16'hFF30;  // R[F] <- 21, pc <- 30
    prog[8'h30] = 16'h0000;  // halt
    load_and_reset();
    run_program("jal example", 100, 0);
    check(dut.u_regs.regs[15] == 16'h0021, "jal example: R[F] = 21");
    check(pc == 8'h31, "jal example: halted after the instruction at 30");

    // All sixteen instructions: 5 x 7 by repeated addition, then the rest.
    clear_prog();
    prog[8'h10] = 16'h7101;  // R1 <- 1
    prog[8'h11] = 16'h8A50;  // RA <- mem[50] = 5
    prog[8'h12] = 16'h8B51;  // RB <- mem[51] = 7
    prog[8'h13] = 16'h7C00;  // RC <- 0
    prog[8'h14] = 16'hCA18;  // if RA == 0 goto 18
    prog[8'h15] = 16'h1CCB;  // RC <- RC + RB
    prog[8'h16] = 16'h2AA1;  // RA <- RA - 1
    prog[8'h17] = 16'hC014;  // goto 14
    prog[8'h18] = 16'h9C52;  // mem[52] <- RC
    prog[8'h19] = 16'h3DCB;  // RD <- RC & RB
    prog[8'h1A] = 16'h4ECB;  // RE <- RC ^ RB
    prog[8'h1B] = 16'h52C1;  // R2 <- RC << 1
    prog[8'h1C] = 16'h63C1;  // R3 <- RC >> 1
    prog[8'h1D] = 16'h7460;  // R4 <- 60
    prog[8'h1E] = 16'hA504;  // R5 <- mem[R4] = FFFE
    prog[8'h1F] = 16'h7661;  // R6 <- 61
    prog[8'h20] = 16'hB506;  // mem[R6] <- R5
    prog[8'h21] = 16'hD523;  // R5 > 0? no
    prog[8'h22] = 16'h2705;  // R7 <- R0 - R5 = 2
    prog[8'h23] = 16'hD726;  // R7 > 0? yes, goto 26
    prog[8'h24] = 16'h0000;  // (skipped)
    prog[8'h25] = 16'h0000;
    prog[8'h26] = 16'h1111;  // R1 <- R1 + R1
    prog[8'h27] = 16'h1011;  // R0 <- R1 + R1 (discarded)
    prog[8'h28] = 16'h6955;  // R9 <- R5 >> R5 (all sign bits)
    prog[8'h29] = 16'hFF2C;  // R[F] <- 2A, goto 2C
    prog[8'h2A] = 16'h0000;  // halt (return point)
    prog[8'h2C] = 16'h9F53;  // mem[53] <- R[F]
    prog[8'h2D] = 16'hE00F;  // pc <- R[F]
    prog[8'h50] = 16'h0005;
    prog[8'h51] = 16'h0007;
    prog[8'h60] = 16'hFFFE;
    load_and_reset();
    run_program("all instructions", 200, 0);
    check(dut.u_mem.mem[8'h52] == 16'h0023, "5 x 7 = 0x23 stored");
    check(dut.u_mem.mem[8'h61] == 16'hFFFE, "store indirect");
    check(dut.u_mem.mem[8'h53] == 16'h002A, "jal return address stored");
    check(dut.u_regs.regs[9] == 16'hFFFF, "arithmetic shift right");
    check(pc == 8'h2B, "returned through jump register and halted");

    // Random programs.
    for (int seed = 0; seed < 6; seed++) begin
      clear_prog();
      for (int i = 0; i < 256; i++) begin
        word_t w;
        w = word_t'($urandom);
        // Make halts rarer in the code area so programs run longer.
        if (w[15:12] == 4'h0 && ($urandom % 4) != 0) w[15:12] = 4'h1;
        prog[i] = w;
      end
      load_and_reset();
      run_program($sformatf("random %0d", seed), 400, (seed == 2) ? 7 : 0);
    end

    // Mechanism coverage.
    for (int o = 0; o < 16; o++)
      check(n_op[o] > 0, $sformatf("opcode %h never executed", o));
    check(n_bz_taken > 0 && n_bz_not > 0, "branch zero taken and not taken");
    check(n_bp_taken > 0 && n_bp_not > 0, "branch positive taken and not taken");
    check(n_r0_write > 0, "write to R0 attempted");
    check(n_same_reg > 0, "same register read and written");
    check(n_pause > 0, "run paused");
    check(n_add_trace == 1, "add example: datapath values during execute");
    check(n_jal_trace == 1, "jal example: datapath values during execute");
    $display("coverage: ops=%p bz=%0d/%0d bp=%0d/%0d r0w=%0d same=%0d pause=%0d selfmod=%0d",
             n_op, n_bz_taken, n_bz_not, n_bp_taken, n_bp_not, n_r0_write, n_same_reg,
             n_pause, n_self_modify);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

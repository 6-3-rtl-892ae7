// tb_toy_control: self-checking test of the TOY control unit.
//
// Sweeps every opcode, both phases, both condition bits and the running
// qualifier, and compares each control wire with a per-instruction table
// written out here from what each instruction must do on the datapath.
module tb_toy_control;
  import toy_pkg::*;

  opcode_e op;
  logic    fetch, execute, tick, eq0, gt0;
  ctrl_t   ctrl;
  int checks = 0, failures = 0;

  toy_control dut (.op, .fetch, .execute, .tick, .eq0, .gt0, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected wires for one case.
  function automatic ctrl_t expect_ctrl(input logic [3:0] o, input logic ex, input logic tk,
                                        input logic z, input logic p);
    ctrl_t c;
    logic wr_reg, wr_mem, jump;
    c = '0;
    c.regw_src = RW_RESULT;
    c.alu_sel  = ALU_ADDSUB;
    wr_reg = 0; wr_mem = 0; jump = 0;
    case (o)
      4'h0: c.halt = ex;
      4'h1: wr_reg = 1;
      4'h2: begin wr_reg = 1; c.alu_sub = 1; end
      4'h3: begin wr_reg = 1; c.alu_sel = ALU_AND; end
      4'h4: begin wr_reg = 1; c.alu_sel = ALU_XOR; end
      4'h5: begin wr_reg = 1; c.alu_sel = ALU_SHIFT; end
      4'h6: begin wr_reg = 1; c.alu_sel = ALU_SHIFT; c.alu_shr = 1; end
      4'h7: begin wr_reg = 1; c.alu_mux = 1; end
      4'h8: begin wr_reg = 1; c.alu_mux = 1; c.regw_src = RW_MEM; end
      4'h9: begin wr_mem = 1; c.alu_mux = 1; c.rega_d = 1; end
      4'hA: begin wr_reg = 1; c.alu_sel = ALU_PASS2; c.regw_src = RW_MEM; end
      4'hB: begin wr_mem = 1; c.alu_sel = ALU_PASS2; c.rega_d = 1; end
      4'hC: begin c.alu_mux = 1; c.rega_d = 1; jump = z; end
      4'hD: begin c.alu_mux = 1; c.rega_d = 1; jump = p; end
      4'hE: begin c.alu_sel = ALU_PASS2; jump = 1; end
      4'hF: begin wr_reg = 1; c.alu_mux = 1; c.regw_src = RW_PC; jump = 1; end
      default: ;
    endcase
    c.write_ir     = tk & ~ex;
    c.write_pc     = tk & (~ex | jump);
    c.pc_jump      = ex;
    c.mem_addr_bus = ex;
    c.write_reg    = tk & ex & wr_reg;
    c.write_mem    = tk & ex & wr_mem;
    return c;
  endfunction

  initial begin
    for (int o = 0; o < 16; o++)
      for (int ph = 0; ph < 2; ph++)
        for (int k = 0; k < 8; k++) begin
          ctrl_t e;
          op = opcode_e'(o); execute = ph[0]; fetch = ~ph[0];
          tick = k[0]; eq0 = k[1]; gt0 = k[2];
          #1;
          e = expect_ctrl(4'(o), ph[0], k[0], k[1], k[2]);
          checks++;
          if (ctrl !== e) begin
            failures++;
            if (failures < 10)
              $display("FAIL op=%h ex=%b tick=%b z=%b p=%b got=%h exp=%h",
                       o, ph[0], k[0], k[1], k[2], ctrl, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

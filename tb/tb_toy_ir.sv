// tb_toy_ir: self-checking test of the TOY instruction register.
//
// Loads random words, checks that the register changes only when `load` is
// high and that op, d, s, t and addr are the right bit fields.
module tb_toy_ir;
  import toy_pkg::*;

  logic    clk, rst_n, load;
  word_t   din, ir;
  opcode_e op;
  raddr_t  d, s, t;
  addr_t   addr;
  word_t   model;
  int checks = 0, failures = 0;

  toy_ir dut (.clk, .rst_n, .load, .din, .ir, .op, .d, .s, .t, .addr);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    checks++;
    if (ir !== model || 4'(op) !== model[15:12] || d !== model[11:8] || s !== model[7:4] ||
        t !== model[3:0] || addr !== model[7:0]) begin
      failures++;
      if (failures < 10) $display("FAIL ir=%h op=%h d=%h s=%h t=%h addr=%h exp=%h",
                                  ir, op, d, s, t, addr, model);
    end
  endtask

  initial begin
    rst_n = 0; load = 0; din = 16'hFFFF;
    repeat (2) @(negedge clk);
    rst_n = 1; model = 16'h0;
    chk();
    load = 1; din = 16'h1234;
    @(negedge clk); model = 16'h1234; chk();
    load = 1; din = 16'hFF30;
    @(negedge clk); model = 16'hFF30; chk();
    for (int i = 0; i < 2000; i++) begin
      load = 1'($urandom); din = 16'($urandom);
      @(negedge clk);
      if (load) model = din;
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_toy_pc: self-checking test of the TOY program counter.
//
// Checks the reset address, that the PC holds without `load`, steps by one
// with select 0 (wrapping at FF), and takes the target with select 1.
module tb_toy_pc;
  import toy_pkg::*;

  logic       clk, rst_n, load, sel_jump;
  logic [7:0] target, pc;
  logic [7:0] model;
  int checks = 0, failures = 0;

  toy_pc dut (.clk, .rst_n, .load, .sel_jump, .target, .pc);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what);
    checks++;
    if (pc !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s pc=%h exp=%h", what, pc, model);
    end
  endtask

  initial begin
    rst_n = 0; load = 0; sel_jump = 0; target = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 8'h10;
    chk("reset");
    @(negedge clk); chk("hold");
    load = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      model = 8'(model + 1);
      chk("increment");
    end
    sel_jump = 1; target = 8'h30;
    @(negedge clk); model = 8'h30; chk("jump");
    for (int i = 0; i < 2000; i++) begin
      load = 1'($urandom); sel_jump = 1'($urandom); target = 8'($urandom);
      @(negedge clk);
      if (load) model = sel_jump ? target : 8'(model + 1);
      chk("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

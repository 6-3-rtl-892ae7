// tb_toy_cond_eval: exhaustive self-checking test of the condition evaluator.
//
// Applies all 65536 register values and checks "= 0" and "> 0" (signed)
// against integer comparisons.
module tb_toy_cond_eval;
  logic [15:0] a;
  logic        eq0, gt0;
  int checks = 0, failures = 0;

  toy_cond_eval dut (.a, .eq0, .gt0);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int sv;
      a = 16'(v);
      #1;
      sv = (v >= 32768) ? v - 65536 : v;
      checks++;
      if (eq0 !== (sv == 0) || gt0 !== (sv > 0)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h eq0=%b gt0=%b", a, eq0, gt0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

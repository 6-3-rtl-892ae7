// tb_toy_phase_counter: self-checking test of the fetch/execute 1-bit counter.
//
// After reset the counter is in the fetch phase; it must alternate
// fetch/execute on every clock while enabled (two cycles per instruction),
// hold while disabled, and keep `fetch` the complement of `execute`.
module tb_toy_phase_counter;
  logic clk, rst_n, en, execute, fetch;
  logic model;
  int checks = 0, failures = 0;
  int fetch_cycles = 0;

  toy_phase_counter dut (.clk, .rst_n, .en, .execute, .fetch);

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
    if (execute !== model || fetch !== ~model) begin
      failures++;
      if (failures < 10) $display("FAIL execute=%b fetch=%b exp execute=%b", execute, fetch, model);
    end
  endtask

  initial begin
    rst_n = 0; en = 1;
    repeat (2) @(negedge clk);
    rst_n = 1; model = 0;
    chk();
    // 100 instructions of two cycles each: 100 fetch phases in 200 cycles.
    for (int i = 0; i < 200; i++) begin
      if (fetch) fetch_cycles++;
      @(negedge clk);
      model = ~model;
      chk();
    end
    checks++;
    if (fetch_cycles != 100) begin
      failures++;
      $display("FAIL fetch phases=%0d exp 100", fetch_cycles);
    end
    for (int i = 0; i < 1000; i++) begin
      en = 1'($urandom);
      @(negedge clk);
      if (en) model = ~model;
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

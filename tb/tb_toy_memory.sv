// tb_toy_memory: self-checking test of the 256 x 16 TOY main memory.
//
// Fills every word with a value kept in a shadow array, reads all back
// combinationally, then mixes random writes (with and without the write
// strobe) and reads, checking against the shadow copy.
module tb_toy_memory;
  import toy_pkg::*;

  logic        clk;
  logic        we;
  logic [7:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [256];
  int checks = 0, failures = 0;

  toy_memory dut (.clk, .we, .addr, .wdata, .rdata);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int a);
    addr = 8'(a); we = 0;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr=%h got=%h exp=%h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); wdata = 16'(a * 16'h0101 ^ 16'h5A3C); we = 1;
      shadow[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < 256; a++) rd(a);
    for (int i = 0; i < 2000; i++) begin
      addr = 8'($urandom); wdata = 16'($urandom); we = 1'($urandom);
      if (we) shadow[addr] = wdata;
      @(negedge clk);
      rd(int'(8'($urandom)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_toy_regfile: self-checking test of the TOY register file.
//
// Checks reset to zero, that R0 stays zero when written, that a write lands
// only at the clock edge and only with the write enable, and that the two
// read ports read independent registers, against a shadow model.
module tb_toy_regfile;
  import toy_pkg::*;

  logic        clk, rst_n, we;
  logic [3:0]  waddr, aaddr, baddr;
  logic [15:0] wdata, adata, bdata;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  toy_regfile dut (.clk, .rst_n, .we, .waddr, .wdata, .aaddr, .adata, .baddr, .bdata);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int a, input int b);
    aaddr = 4'(a); baddr = 4'(b);
    #1;
    checks += 2;
    if (adata !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL A R%0d got=%h exp=%h", a, adata, shadow[a]);
    end
    if (bdata !== shadow[b]) begin
      failures++;
      if (failures < 10) $display("FAIL B R%0d got=%h exp=%h", b, bdata, shadow[b]);
    end
  endtask

  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = 0; aaddr = 0; baddr = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 16'h0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) rd(i, 15 - i);
    // Write every register, R0 included.
    for (int i = 0; i < 16; i++) begin
      waddr = 4'(i); wdata = 16'(16'h1111 * i + 16'h0F0F); we = 1;
      #1;
      // Before the edge the old value is still read.
      rd(i, i);
      @(negedge clk);
      if (i != 0) shadow[i] = wdata;
    end
    we = 0;
    for (int i = 0; i < 16; i++) rd(i, (i + 5) % 16);
    for (int n = 0; n < 3000; n++) begin
      waddr = 4'($urandom); wdata = 16'($urandom); we = 1'($urandom);
      @(negedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
      rd($urandom_range(0, 15), $urandom_range(0, 15));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

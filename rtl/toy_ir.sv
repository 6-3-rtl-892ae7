// toy_ir: the TOY machine's instruction register.
//
// A 16-bit register that takes the memory read data at the rising clock edge
// that ends the fetch phase (`load` = fetch phase) and holds it through the
// execute phase. Its output is split into the instruction fields:
// op = ir[15:12], d = ir[11:8], s = ir[7:4], t = ir[3:0], and the 8-bit
// address addr = {s, t}. It resets to 0; the reset is this design's choice.
module toy_ir
  import toy_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  word_t   din,
  output word_t   ir,
  output opcode_e op,
  output raddr_t  d,
  output raddr_t  s,
  output raddr_t  t,
  output addr_t   addr
);

  always_ff @(posedge clk) begin
    if (!rst_n)    ir <= '0;
    else if (load) ir <= din;
  end

  assign op   = opcode_e'(ir[15:12]);
  assign d    = ir[11:8];
  assign s    = ir[7:4];
  assign t    = ir[3:0];
  assign addr = ir[7:0];

endmodule

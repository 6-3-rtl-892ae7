// toy_regfile: the TOY machine's sixteen 16-bit registers.
//
// Three address inputs, one data input and two data outputs, so that one
// instruction can read two registers and write a third (R[d] <- R[s] op R[t]).
// Both reads are combinational; the write happens at the rising clock edge
// while `we` is high, that is at the very end of the execute phase, so an
// instruction such as R1 <- R1 + R1 reads the old value and writes the new
// one. Register 0 always reads as 0 and ignores writes; the register drawing
// sets R0 apart, and this design reads that as the TOY convention of a
// constant-zero register. The registers reset to 0.
module toy_regfile
  import toy_pkg::*;
#(
  parameter int unsigned N  = NREGS,
  parameter int unsigned W  = WORD_W,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] aaddr,
  output logic [W-1:0]  adata,
  input  logic [AW-1:0] baddr,
  output logic [W-1:0]  bdata
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign adata = (aaddr == '0) ? '0 : regs[aaddr];
  assign bdata = (baddr == '0) ? '0 : regs[baddr];

endmodule

// toy_alu: the TOY machine's 16-bit arithmetic logic unit.
//
// A purely combinational unit. Five function units work in parallel on the
// two 16-bit inputs and a 5-way multiplexer picks one result with the 3-bit
// ALU select:
//   000  input1 + input2, or input1 - input2 when `sub` is high (the
//        subtracter is the adder fed with the inverted input 2 and a carry in
//        of 1, the carry in being the subtract wire itself)
//   001  input1 & input2
//   010  input1 ^ input2
//   011  input1 shifted by input2 places, left or right by `shift_right`
//   100  input2 copied through
// Select codes 101..111 are unused and give 0.
// The structure, the select table and the subtract/shift-direction wires are
// those of the machine's ALU drawing. The shift amount is the whole of
// input 2 (16 or more places shift everything out) and the right shift is
// arithmetic (sign filling), as in the TOY instruction set; both are this
// design's reading, the drawing does not say.
module toy_alu
  import toy_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  alu_sel_e     sel,
  input  logic         sub,
  input  logic         shift_right,
  output logic [W-1:0] result
);

  logic [W-1:0] addend;
  logic [W-1:0] sum;
  logic [W-1:0] shifted;

  // Adder/subtracter: in1 + (sub ? ~in2 : in2) + sub.
  always_comb begin
    addend = sub ? ~in2 : in2;
    sum    = in1 + addend + W'(sub);
  end

  // Shifter.
  always_comb begin
    if (shift_right) shifted = W'($signed(in1) >>> in2);
    else             shifted = in1 << in2;
  end

  // Output multiplexer.
  always_comb begin
    unique case (sel)
      ALU_ADDSUB: result = sum;
      ALU_AND:    result = in1 & in2;
      ALU_XOR:    result = in1 ^ in2;
      ALU_SHIFT:  result = shifted;
      ALU_PASS2:  result = in2;
      default:    result = '0;
    endcase
  end

endmodule

// toy_cond_eval: condition evaluation for the TOY branch instructions.
//
// Looks at register A's data and raises `eq0` when it is zero and `gt0`
// when it is positive, both combinationally. "Positive" is read as greater
// than zero in two's complement (bit 15 clear and not zero), the TOY
// convention; the drawing only labels the outputs "= 0" and "> 0".
module toy_cond_eval
  import toy_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] a,
  output logic         eq0,
  output logic         gt0
);

  assign eq0 = (a == '0);
  assign gt0 = !a[W-1] && !eq0;

endmodule

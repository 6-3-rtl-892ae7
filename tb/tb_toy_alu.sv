// tb_toy_alu: self-checking test of the TOY ALU.
//
// Drives random and corner-case operand pairs through every ALU function and
// compares the result with a reference computed here: subtraction as plain
// two's-complement difference, shifts bit by bit, and unused select codes
// giving 0. Prints TB_RESULT and stops; a watchdog ends a hung run.
module tb_toy_alu;
  import toy_pkg::*;

  logic [15:0] in1, in2, result;
  alu_sel_e    sel;
  logic        sub, shr;
  int checks = 0, failures = 0;

  toy_alu dut (.in1, .in2, .sel, .sub, .shift_right(shr), .result);

  function automatic logic [15:0] ref_shift(input logic [15:0] a, input logic [15:0] n,
                                             input logic right);
    logic [15:0] r = a;
    for (int i = 0; i < 16 && i < int'(n); i++)
      r = right ? {r[15], r[15:1]} : {r[14:0], 1'b0};
    if (n >= 16) r = right ? {16{a[15]}} : 16'h0;
    return r;
  endfunction

  function automatic logic [15:0] ref_alu(input logic [2:0] s, input logic su, input logic sr,
                                           input logic [15:0] a, input logic [15:0] b);
    case (s)
      3'b000: return su ? 16'(int'(a) - int'(b)) : 16'(int'(a) + int'(b));
      3'b001: return a & b;
      3'b010: return a ^ b;
      3'b011: return ref_shift(a, b, sr);
      3'b100: return b;
      default: return 16'h0;
    endcase
  endfunction

  task automatic check(input logic [2:0] s, input logic su, input logic sr,
                       input logic [15:0] a, input logic [15:0] b);
    logic [15:0] exp;
    sel = alu_sel_e'(s); sub = su; shr = sr; in1 = a; in2 = b;
    #1;
    exp = ref_alu(s, su, sr, a, b);
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL sel=%b sub=%b shr=%b a=%h b=%h got=%h exp=%h", s, su, sr, a, b, result, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 0028 + 0064 = 008C.
    check(3'b000, 0, 0, 16'h0028, 16'h0064);
    if (result !== 16'h008C) failures++;
    checks++;
    // Corners.
    check(3'b000, 1, 0, 16'h0000, 16'h0001);          // 0 - 1 = FFFF
    check(3'b000, 0, 0, 16'hFFFF, 16'h0001);          // wrap
    check(3'b011, 0, 1, 16'h8000, 16'h0003);          // arithmetic right
    check(3'b011, 0, 1, 16'h8000, 16'h0020);          // shift out, sign fill
    check(3'b011, 0, 0, 16'h0001, 16'h000F);
    check(3'b011, 0, 0, 16'h0001, 16'h0010);
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] a, b;
      a = 16'($urandom);
      b = (i % 3 == 0) ? 16'($urandom_range(0, 20)) : 16'($urandom);
      check(3'($urandom_range(0, 7)), 1'($urandom), 1'($urandom), a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

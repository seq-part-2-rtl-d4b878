// alu: 64-bit arithmetic/logic unit of the Y86-64 processors.
//
// Combinational.  fn selects add, sub, and or xor of the two operands.  As for
// the Y86-64 OPq instruction "OPq rA, rB" (rB <- rB op rA), subtraction gives
// b - a, so aluA carries the rA value and aluB the rB value.  zf and sf are the
// zero and sign flags of the result.  The function numbers and the operand
// order of sub are this design's choice; an unknown fn yields zero.
module alu
  import y86_pkg::*;
(
  input  alu_fn_e fn,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output logic    zf,
  output logic    sf
);

  always_comb begin
    case (fn)
      ALU_ADD: result = b + a;
      ALU_SUB: result = b - a;
      ALU_AND: result = b & a;
      ALU_XOR: result = b ^ a;
      default: result = '0;
    endcase
    zf = (result == '0);
    sf = result[WORD_W-1];
  end

endmodule

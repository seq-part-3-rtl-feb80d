// y86_alu: the processor's one ALU.
//
// Computes valE = B OP A for the four Y86-64 operations (add, sub, and, xor),
// with OP chosen by alufun. Subtraction is B - A, so "subq rA, rB" leaves
// rB - rA. Along with the result it gives the condition flags the instruction
// would set: ZF (result is zero), SF (result is negative) and OF (signed
// overflow, defined for add and sub; 0 for and and xor). Purely combinational.
//
// The four operations come from the course material; operand order, function
// codes and flag definitions are those of standard Y86-64.
module y86_alu
  import y86_pkg::*;
(
  input  word_t   aluA,
  input  word_t   aluB,
  input  alufun_t alufun,
  output word_t   valE,
  output cc_t     flags
);

  always_comb begin
    unique case (alufun)
      ALU_ADD: valE = aluB + aluA;
      ALU_SUB: valE = aluB - aluA;
      ALU_AND: valE = aluB & aluA;
      ALU_XOR: valE = aluB ^ aluA;
      default: valE = aluB + aluA;
    endcase
    flags.zf = (valE == '0);
    flags.sf = valE[63];
    unique case (alufun)
      ALU_ADD: flags.of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      ALU_SUB: flags.of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: flags.of = 1'b0;
    endcase
  end

endmodule

// seq_decode: register-number selection for decode and write back.
//
// Decode reads two registers, srcA and srcB, and write back writes up to two,
// dstE (from the ALU result valE) and dstM (from the memory result valM).
// Always reading rA and rB does not work for pushq, popq, call and ret, which
// use the stack pointer, so each number comes from a multiplexer controlled by
// icode (and, for dstE of a conditional move, by Cnd):
//
//   instruction              srcA   srcB   dstE              dstM
//   halt, nop, jXX           none   none   none              none
//   irmovq                   none   none   rB                none
//   rrmovq / cmovXX          rA     none   rB if Cnd, else   none
//   mrmovq                   none   rB     none              rA
//   rmmovq, OPq              rA     rB     (OPq: rB)         none
//   call, ret                none   %rsp   %rsp              none
//   pushq, popq              rA     %rsp   %rsp              (popq: rA)
//
// "none" is register 0xF. The table of registers to read is taken as given;
// the write-back columns follow the write-back description (two write ports for
// popq, write disabled by register 0xF). Purely combinational.
module seq_decode
  import y86_pkg::*;
(
  input  icode_t icode,
  input  regid_t rA,
  input  regid_t rB,
  input  logic   cnd,
  output regid_t srcA,
  output regid_t srcB,
  output regid_t dstE,
  output regid_t dstM
);

  always_comb begin
    srcA = REG_NONE;
    srcB = REG_NONE;
    dstE = REG_NONE;
    dstM = REG_NONE;
    unique case (icode)
      I_IRMOVQ: dstE = rB;
      I_RRMOVQ: begin
        srcA = rA;
        dstE = cnd ? rB : REG_NONE;
      end
      I_MRMOVQ: begin
        srcB = rB;
        dstM = rA;
      end
      I_RMMOVQ: begin
        srcA = rA;
        srcB = rB;
      end
      I_OPQ: begin
        srcA = rA;
        srcB = rB;
        dstE = rB;
      end
      I_CALL, I_RET: begin
        srcB = REG_RSP;
        dstE = REG_RSP;
      end
      I_PUSHQ: begin
        srcA = rA;
        srcB = REG_RSP;
        dstE = REG_RSP;
      end
      I_POPQ: begin
        srcA = rA;
        srcB = REG_RSP;
        dstE = REG_RSP;
        dstM = rA;
      end
      default: ;
    endcase
  end

endmodule

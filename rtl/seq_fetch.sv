// seq_fetch: the fetch stage of the single-cycle Y86-64 processor.
//
// Splits the ten instruction bytes read at the PC into the opcode (icode:ifun,
// the first byte, icode in its upper nibble), the register numbers rA and rB
// (the second byte, rA in its upper nibble) and the 8-byte little-endian
// constant valC, and computes valP, the address of the following instruction,
// as PC plus the instruction length. Purely combinational.
//
// Which instructions carry a register byte and a constant follows the
// instruction layouts: 1 byte for halt, nop and ret; 2 bytes for rrmovq/cmovXX,
// OPq, pushq and popq; 9 bytes for jXX and call (no register byte, valC in bytes
// 1..8); 10 bytes for irmovq, rmmovq and mrmovq (valC in bytes 2..9).
// instr_valid is low for an unknown icode, or an ifun that does not exist for
// the icode. When imem_error is set the instruction is treated as a nop of one
// byte so that nothing downstream acts on it; the status logic reports the
// address error.
module seq_fetch
  import y86_pkg::*;
(
  input  word_t        pc,
  input  logic [79:0]  ibytes,
  input  logic         imem_error,
  output icode_t       icode,
  output logic [3:0]   ifun,
  output regid_t       rA,
  output regid_t       rB,
  output word_t        valC,
  output word_t        valP,
  output logic         instr_valid
);

  logic [3:0] raw_icode;
  logic       need_regids, need_valC;
  logic [3:0] length;

  assign raw_icode = imem_error ? 4'(I_NOP) : ibytes[7:4];
  assign icode     = icode_t'(raw_icode);
  assign ifun      = imem_error ? 4'h0 : ibytes[3:0];
  assign rA        = need_regids ? ibytes[15:12] : REG_NONE;
  assign rB        = need_regids ? ibytes[11:8]  : REG_NONE;

  always_comb begin
    unique case (raw_icode)
      I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ,
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:      need_regids = 1'b1;
      default:                           need_regids = 1'b0;
    endcase
    unique case (raw_icode)
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
      I_JXX, I_CALL:                     need_valC = 1'b1;
      default:                           need_valC = 1'b0;
    endcase
    unique case (raw_icode)
      I_HALT, I_NOP, I_RET,
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
      I_CALL, I_PUSHQ, I_POPQ:           instr_valid = (ifun == 4'h0);
      I_RRMOVQ, I_JXX:                   instr_valid = (ifun <= 4'h6);
      I_OPQ:                             instr_valid = (ifun <= 4'h3);
      default:                           instr_valid = 1'b0;
    endcase
  end

  assign valC   = need_regids ? ibytes[79:16] : ibytes[71:8];
  assign length = 4'd1 + (need_regids ? 4'd1 : 4'd0) + (need_valC ? 4'd8 : 4'd0);
  assign valP   = pc + 64'(length);

endmodule

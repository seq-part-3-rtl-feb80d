// seq_pc_update: the PC-update stage of the single-cycle Y86-64 processor.
//
// Chooses the value the PC register takes at the end of the cycle. Usually it
// is valP, the address of the following instruction; call jumps to valC, a jXX
// whose condition holds (Cnd) jumps to valC, and ret continues at valM, the
// return address just read from the stack. Purely combinational.
// The three exceptions to valP are those the course material names; their
// targets are standard Y86-64.
module seq_pc_update
  import y86_pkg::*;
(
  input  icode_t icode,
  input  logic   cnd,
  input  word_t  valC,
  input  word_t  valM,
  input  word_t  valP,
  output word_t  new_pc
);

  always_comb begin
    unique case (icode)
      I_CALL:  new_pc = valC;
      I_JXX:   new_pc = cnd ? valC : valP;
      I_RET:   new_pc = valM;
      default: new_pc = valP;
    endcase
  end

endmodule

// seq_execute: the execute stage of the single-cycle Y86-64 processor.
//
// The ALU inputs are not always the register values: memory instructions add
// the displacement valC to rB, irmovq passes valC, and the stack instructions
// add -8 or +8 to %rsp. Multiplexers controlled by icode build aluA and aluB:
//
//   instruction          aluA    aluB    operation
//   rrmovq / cmovXX      valA    0       add
//   irmovq               valC    0       add
//   rmmovq, mrmovq       valC    valB    add
//   OPq                  valA    valB    ifun (add, sub, and, xor)
//   call, pushq          -8      valB    add
//   ret, popq            +8      valB    add
//
// The result is valE. OPq writes the new condition codes into the CC register
// at the clock edge ending the cycle (when wen is set); every instruction reads
// the prior codes, and Cnd is computed from them and ifun. The CC register
// resets to Z=1 S=0 O=0, the state a Y86-64 program starts in.
//
// The aluA choices (valA, valC, +/-8) follow the course material; aluB = 0 for
// the moves and "only OPq sets the codes" are standard Y86-64.
module seq_execute
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       wen,
  input  icode_t     icode,
  input  logic [3:0] ifun,
  input  word_t      valA,
  input  word_t      valB,
  input  word_t      valC,
  output word_t      valE,
  output logic       cnd,
  output cc_t        cc
);

  word_t   aluA, aluB;
  alufun_t alufun;
  cc_t     new_cc;
  logic    set_cc;

  always_comb begin
    aluA   = '0;
    aluB   = '0;
    alufun = ALU_ADD;
    unique case (icode)
      I_RRMOVQ:          aluA = valA;
      I_IRMOVQ:          aluA = valC;
      I_RMMOVQ, I_MRMOVQ: begin
        aluA = valC;
        aluB = valB;
      end
      I_OPQ: begin
        aluA   = valA;
        aluB   = valB;
        alufun = alufun_t'(ifun);
      end
      I_CALL, I_PUSHQ: begin
        aluA = -64'sd8;
        aluB = valB;
      end
      I_RET, I_POPQ: begin
        aluA = 64'd8;
        aluB = valB;
      end
      default: ;
    endcase
  end

  assign set_cc = (icode == I_OPQ);

  y86_alu u_alu (
    .aluA  (aluA),
    .aluB  (aluB),
    .alufun(alufun),
    .valE  (valE),
    .flags (new_cc)
  );

  always_ff @(posedge clk) begin
    if (rst)                cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (wen && set_cc) cc <= new_cc;
  end

  y86_cond u_cond (
    .cc  (cc),
    .ifun(ifun),
    .cnd (cnd)
  );

endmodule

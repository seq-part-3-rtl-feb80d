// y86_cond: condition evaluation for jXX and cmovXX.
//
// A multiplexer chooses, by the instruction's ifun, which test of the
// condition codes decides Cnd: always (1), le, l, e, ne, ge, g. The signed
// comparisons use SF xor OF, as in Y86-64, so that they stay correct when the
// comparing subtraction overflowed. Purely combinational.
//
// The course material draws this multiplexer with le = SF | ZF and l = SF;
// this design uses the full Y86-64 definitions with OF, and adds the e, ne,
// ge and g inputs that the drawing leaves unlabelled.
module y86_cond
  import y86_pkg::*;
(
  input  cc_t        cc,
  input  logic [3:0] ifun,
  output logic       cnd
);

  logic lt;
  assign lt = cc.sf ^ cc.of;

  always_comb begin
    unique case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = lt | cc.zf;
      C_L:      cnd = lt;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = !cc.zf;
      C_GE:     cnd = !lt;
      C_G:      cnd = !lt && !cc.zf;
      default:  cnd = 1'b0;
    endcase
  end

endmodule

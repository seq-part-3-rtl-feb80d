// y86_regfile: the Y86-64 register file, 15 registers of 64 bits.
//
// Two read ports and two write ports. A read is combinational: setting srcA
// (srcB) gives R[srcA] (R[srcB]) in the same cycle. A write is clocked: the
// value on valE (valM) is stored in R[dstE] (R[dstM]) at the rising edge that
// ends the cycle. Register number 0xF is "no register": it reads as 0 and a
// write to it is dropped, which is how an instruction writes nothing. When both
// write ports name the same register, port M wins (popq %rsp then leaves the
// popped value in %rsp). wen gates both writes, so a stopped processor keeps
// its registers. Registers reset to 0 (synchronous, active-high rst).
//
// The port set and timing follow the course material this design is based on;
// the reset, the read of 0xF as 0 and the port-M priority are choices made here
// (the priority matching standard Y86-64).
module y86_regfile
  import y86_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   wen,
  input  regid_t srcA,
  input  regid_t srcB,
  output word_t  valA,
  output word_t  valB,
  input  regid_t dstE,
  input  word_t  valE,
  input  regid_t dstM,
  input  word_t  valM,
  output word_t  regs_out [NUM_REGS]
);

  word_t regs [NUM_REGS];

  assign valA = (srcA == REG_NONE) ? '0 : regs[srcA];
  assign valB = (srcB == REG_NONE) ? '0 : regs[srcB];
  assign regs_out = regs;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (wen) begin
      if (dstE != REG_NONE) regs[dstE] <= valE;
      if (dstM != REG_NONE) regs[dstM] <= valM;
    end
  end

endmodule

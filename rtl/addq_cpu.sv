// addq_cpu: a processor that runs only addq.
//
// Every instruction is taken to be "addq rA, rB" (2 bytes: 6 0 rA rB), so the
// PC register adds 2 each cycle. The second instruction byte gives rB (its
// lower nibble) and rA (its upper nibble); the register file reads R[rA] and
// R[rB] in the same cycle and writes their sum into R[rB] at the end of it.
// The opcode is extracted but, as in the design this follows, nothing checks
// it, there is no status register and the processor never stops: the
// environment decides how many cycles to run. Condition codes are not part of
// this processor. One instruction per cycle.
//
// Interface: clk, rst (synchronous, active high); pc, opcode and the register
// contents show the state.
module addq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic       clk,
  input  logic       rst,
  output word_t      pc,
  output logic [3:0] opcode,
  output word_t      regs [NUM_REGS]
);

  logic [79:0] ibytes;
  regid_t      rA, rB;
  word_t       reg_outputA, reg_outputB, reg_inputE;
  word_t       unused_drdata;
  logic        unused_imem_error, unused_dmem_error;

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk       (clk),
    .iaddr     (pc),
    .ibytes    (ibytes),
    .imem_error(unused_imem_error),
    .daddr     ('0),
    .dread     (1'b0),
    .dwrite    (1'b0),
    .dcommit   (1'b0),
    .dwdata    ('0),
    .drdata    (unused_drdata),
    .dmem_error(unused_dmem_error)
  );

  assign opcode = ibytes[7:4];
  assign rA     = ibytes[15:12];
  assign rB     = ibytes[11:8];

  assign reg_inputE = reg_outputA + reg_outputB;

  y86_regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .wen     (1'b1),
    .srcA    (rA),
    .srcB    (rB),
    .valA    (reg_outputA),
    .valB    (reg_outputB),
    .dstE    (rB),
    .valE    (reg_inputE),
    .dstM    (REG_NONE),
    .valM    ('0),
    .regs_out(regs)
  );

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc + 64'd2;
  end

endmodule

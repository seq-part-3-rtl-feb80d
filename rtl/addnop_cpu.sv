// addnop_cpu: the addq processor extended to also run nop.
//
// It is addq_cpu with two multiplexers added, both controlled by the opcode
// (upper nibble of the first instruction byte):
//   - at the PC register's input: PC + 1 for nop (1 byte), PC + 2 for addq;
//   - at the register file's "register number to write" input: 0xF (no
//     register) for nop, rB for addq, so a nop writes nothing.
// The register numbers to read, the value to write (R[rA] + R[rB]) and the
// instruction-memory address (the PC) need no multiplexer. Every opcode other
// than nop is executed as addq; as in addq_cpu there is no status register and
// the processor runs until the environment stops it. One instruction per
// cycle.
//
// Interface: clk, rst (synchronous, active high); pc, opcode and the register
// contents show the state.
module addnop_cpu
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
  regid_t      rA, rB, dstE;
  word_t       reg_outputA, reg_outputB, reg_inputE, next_pc;
  word_t       unused_drdata;
  logic        unused_imem_error, unused_dmem_error;
  logic        is_nop;

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
  assign is_nop = (opcode == I_NOP);

  assign dstE       = is_nop ? REG_NONE : rB;
  assign next_pc    = is_nop ? pc + 64'd1 : pc + 64'd2;
  assign reg_inputE = reg_outputA + reg_outputB;

  y86_regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .wen     (1'b1),
    .srcA    (rA),
    .srcB    (rB),
    .valA    (reg_outputA),
    .valB    (reg_outputB),
    .dstE    (dstE),
    .valE    (reg_inputE),
    .dstM    (REG_NONE),
    .valM    ('0),
    .regs_out(regs)
  );

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= next_pc;
  end

endmodule

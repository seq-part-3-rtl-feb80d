// y86_memory: byte-addressed memory shared by instruction fetch and data access.
//
// The processor sees two memories, an instruction memory and a data memory, but
// as in Y86-64 they hold the same bytes: a store to address X is seen by a later
// fetch from X. This module is therefore one byte array with two ports.
//
//   Instruction port: combinational read of INSTR_BYTES (10) bytes starting at
//   iaddr, byte 0 in bits [7:0] (the "i10bytes" view). imem_error is raised
//   when any of those bytes lies outside the memory.
//   Data port: combinational little-endian read of 8 bytes at daddr (dread),
//   and an 8-byte little-endian write at the rising clock edge when dwrite and
//   dcommit are both set (dwrite asks for the write, dcommit lets the processor
//   cancel it when the instruction does not complete). dmem_error is raised when dread or dwrite is set and the word does not
//   lie wholly inside the memory; a write that is out of range changes nothing.
//
// Both reads take effect in the same cycle as the address; the write takes
// effect at the next clock edge, so a load in the cycle after a store sees the
// stored value. The memory size MEM_BYTES is this design's choice; the contents
// are not reset.
module y86_memory
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES   = 8192,
  parameter int unsigned INSTR_BYTES = 10
) (
  input  logic                       clk,
  // instruction port
  input  word_t                      iaddr,
  output logic [INSTR_BYTES*8-1:0]   ibytes,
  output logic                       imem_error,
  // data port
  input  word_t                      daddr,
  input  logic                       dread,
  input  logic                       dwrite,
  input  logic                       dcommit,
  input  word_t                      dwdata,
  output word_t                      drdata,
  output logic                       dmem_error
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];

  logic iaddr_ok, daddr_ok;

  // Range checks written so that they cannot wrap around near 2**64.
  assign iaddr_ok = (iaddr < 64'(MEM_BYTES)) && (iaddr <= 64'(MEM_BYTES - INSTR_BYTES));
  assign daddr_ok = (daddr < 64'(MEM_BYTES)) && (daddr <= 64'(MEM_BYTES - 8));

  assign imem_error = !iaddr_ok;
  assign dmem_error = (dread || dwrite) && !daddr_ok;

  always_comb begin
    ibytes = '0;
    if (iaddr_ok)
      for (int i = 0; i < INSTR_BYTES; i++)
        ibytes[8*i +: 8] = mem[iaddr[AW-1:0] + AW'(i)];
  end

  always_comb begin
    drdata = '0;
    if (dread && daddr_ok)
      for (int i = 0; i < 8; i++)
        drdata[8*i +: 8] = mem[daddr[AW-1:0] + AW'(i)];
  end

  always_ff @(posedge clk) begin
    if (dwrite && dcommit && daddr_ok)
      for (int i = 0; i < 8; i++)
        mem[daddr[AW-1:0] + AW'(i)] <= dwdata[8*i +: 8];
  end

  // Reads and writes are never requested together by one instruction.
  a_rw_exclusive: assert property (@(posedge clk) !(dread && dwrite));

endmodule

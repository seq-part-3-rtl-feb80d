// seq_memctl: control of the data memory in the memory stage.
//
// Chooses whether the data memory is read or written, at which address and
// with what data. The address is mostly the ALU result valE; popq and ret read
// at the old stack pointer, valB, through an extra multiplexer. The data
// written is mostly valA; call writes its return address valP through a
// second extra multiplexer.
//
//   read:  mrmovq, popq, ret          write: rmmovq, pushq, call
//
// Purely combinational; the memory applies the write at the clock edge.
// The two special cases (popq/ret address, call data) follow the course
// material; the lists of reading and writing instructions are standard Y86-64.
module seq_memctl
  import y86_pkg::*;
(
  input  icode_t icode,
  input  word_t  valA,
  input  word_t  valB,
  input  word_t  valE,
  input  word_t  valP,
  output logic   mem_read,
  output logic   mem_write,
  output word_t  mem_addr,
  output word_t  mem_data
);

  always_comb begin
    mem_read  = (icode == I_MRMOVQ) || (icode == I_POPQ) || (icode == I_RET);
    mem_write = (icode == I_RMMOVQ) || (icode == I_PUSHQ) || (icode == I_CALL);
    mem_addr  = (icode == I_POPQ || icode == I_RET) ? valB : valE;
    mem_data  = (icode == I_CALL) ? valP : valA;
  end

endmodule

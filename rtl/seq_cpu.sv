// seq_cpu: a single-cycle (SEQ) Y86-64 processor.
//
// Every instruction is executed in one clock cycle. Within the cycle it flows
// through six conceptual stages, all combinational, between the state
// elements (PC register, register file, condition codes, Stat register, data
// memory), which all change together at the rising edge ending the cycle:
//
//   fetch       read 10 bytes at PC, split into icode:ifun, rA, rB, valC,
//               compute valP = PC + length            (seq_fetch)
//   decode      read R[srcA], R[srcB] -> valA, valB   (seq_decode, y86_regfile)
//   execute     ALU -> valE, set CC for OPq, Cnd      (seq_execute)
//   memory      read or write the data memory -> valM (seq_memctl, y86_memory)
//   write back  R[dstE] <- valE, R[dstM] <- valM      (seq_decode, y86_regfile)
//   PC update   PC <- valP, valC or valM              (seq_pc_update)
//
// The instruction and data memories are two ports of one byte array, so a
// store is visible to later fetches. The PC resets to 0, registers to 0, the
// condition codes to Z=1 S=0 O=0, Stat to AOK; memory is not reset and is
// loaded by the environment (a testbench writes u_mem.mem). When an instruction
// is halt, invalid or touches an address outside memory, Stat records why,
// the instruction changes no state, and the processor stops with the PC at it.
//
// Interface: clk, rst (synchronous, active high); stat, pc, cc and regs show
// the architectural state; retire pulses for each cycle whose instruction
// completed (one per cycle while running).
//
// The stage structure, the signal names and the shared memory follow the
// course material; where it is silent (stop behaviour, reset values, memory
// size) the choices are this design's and are noted in the sub-modules.
module seq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic  clk,
  input  logic  rst,
  output stat_t stat,
  output word_t pc,
  output cc_t   cc,
  output word_t regs [NUM_REGS],
  output logic  retire
);

  // fetch
  logic [79:0] ibytes;
  logic        imem_error, instr_valid;
  icode_t      icode;
  logic [3:0]  ifun;
  regid_t      rA, rB;
  word_t       valC, valP;
  // decode / write back
  regid_t      srcA, srcB, dstE, dstM;
  word_t       valA, valB;
  // execute
  word_t       valE;
  logic        cnd;
  // memory
  logic        mem_read, mem_write, dmem_error;
  word_t       mem_addr, mem_data, valM;
  // PC update / status
  word_t       new_pc;
  logic        run;

  always_ff @(posedge clk) begin
    if (rst)      pc <= '0;
    else if (run) pc <= new_pc;
  end

  assign retire = run;

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk       (clk),
    .iaddr     (pc),
    .ibytes    (ibytes),
    .imem_error(imem_error),
    .daddr     (mem_addr),
    .dread     (mem_read),
    .dwrite    (mem_write),
    .dcommit   (run),
    .dwdata    (mem_data),
    .drdata    (valM),
    .dmem_error(dmem_error)
  );

  seq_fetch u_fetch (
    .pc         (pc),
    .ibytes     (ibytes),
    .imem_error (imem_error),
    .icode      (icode),
    .ifun       (ifun),
    .rA         (rA),
    .rB         (rB),
    .valC       (valC),
    .valP       (valP),
    .instr_valid(instr_valid)
  );

  seq_decode u_decode (
    .icode(icode),
    .rA   (rA),
    .rB   (rB),
    .cnd  (cnd),
    .srcA (srcA),
    .srcB (srcB),
    .dstE (dstE),
    .dstM (dstM)
  );

  y86_regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .wen     (run),
    .srcA    (srcA),
    .srcB    (srcB),
    .valA    (valA),
    .valB    (valB),
    .dstE    (dstE),
    .valE    (valE),
    .dstM    (dstM),
    .valM    (valM),
    .regs_out(regs)
  );

  seq_execute u_execute (
    .clk  (clk),
    .rst  (rst),
    .wen  (run),
    .icode(icode),
    .ifun (ifun),
    .valA (valA),
    .valB (valB),
    .valC (valC),
    .valE (valE),
    .cnd  (cnd),
    .cc   (cc)
  );

  seq_memctl u_memctl (
    .icode    (icode),
    .valA     (valA),
    .valB     (valB),
    .valE     (valE),
    .valP     (valP),
    .mem_read (mem_read),
    .mem_write(mem_write),
    .mem_addr (mem_addr),
    .mem_data (mem_data)
  );

  seq_pc_update u_pc_update (
    .icode (icode),
    .cnd   (cnd),
    .valC  (valC),
    .valM  (valM),
    .valP  (valP),
    .new_pc(new_pc)
  );

  seq_stat u_stat (
    .clk        (clk),
    .rst        (rst),
    .icode      (icode),
    .instr_valid(instr_valid),
    .imem_error (imem_error),
    .dmem_error (dmem_error),
    .instr_stat (),
    .stat       (stat),
    .run        (run)
  );

endmodule

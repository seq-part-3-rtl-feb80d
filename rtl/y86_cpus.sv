// y86_cpus: the five Y86-64 processors of the series, side by side.
//
// The series builds a single-cycle Y86-64 processor step by step. Each step is
// a working processor of its own, and this top holds one of each (five in
// all), sharing only the clock and reset:
//
//   nophalt_cpu  nop and halt only; PC + 1, Stat register
//   addq_cpu     addq only; PC + 2, register file and one adder
//   addnop_cpu   addq and nop; multiplexers at the PC input and at dstE
//   mov_cpu      rrmovq, irmovq, rmmovq, mrmovq (plus nop, halt)
//   seq_cpu      the full SEQ processor: every Y86-64 instruction
//
// Each processor has its own memory (loaded by the environment through the
// hierarchy, for example u_seq.u_mem.mem) and brings its state out on ports
// named after it. They do not interact.
//
// The five steps are those of the course material this design follows; the
// nop/jmp step it only names is not included.
module y86_cpus
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // nop/halt processor
  output word_t      nh_pc,
  output stat_t      nh_stat,
  output logic       nh_retire,
  // addq processor
  output word_t      aq_pc,
  output logic [3:0] aq_opcode,
  output word_t      aq_regs [NUM_REGS],
  // addq + nop processor
  output word_t      an_pc,
  output logic [3:0] an_opcode,
  output word_t      an_regs [NUM_REGS],
  // mov processor
  output word_t      mv_pc,
  output stat_t      mv_stat,
  output word_t      mv_regs [NUM_REGS],
  output logic       mv_retire,
  // SEQ processor
  output word_t      sq_pc,
  output stat_t      sq_stat,
  output cc_t        sq_cc,
  output word_t      sq_regs [NUM_REGS],
  output logic       sq_retire
);

  nophalt_cpu u_nophalt (
    .clk   (clk),
    .rst   (rst),
    .the_pc(nh_pc),
    .stat  (nh_stat),
    .retire(nh_retire)
  );

  addq_cpu u_addq (
    .clk   (clk),
    .rst   (rst),
    .pc    (aq_pc),
    .opcode(aq_opcode),
    .regs  (aq_regs)
  );

  addnop_cpu u_addnop (
    .clk   (clk),
    .rst   (rst),
    .pc    (an_pc),
    .opcode(an_opcode),
    .regs  (an_regs)
  );

  mov_cpu u_mov (
    .clk   (clk),
    .rst   (rst),
    .pc    (mv_pc),
    .stat  (mv_stat),
    .regs  (mv_regs),
    .retire(mv_retire)
  );

  seq_cpu u_seq (
    .clk   (clk),
    .rst   (rst),
    .stat  (sq_stat),
    .pc    (sq_pc),
    .cc    (sq_cc),
    .regs  (sq_regs),
    .retire(sq_retire)
  );

endmodule

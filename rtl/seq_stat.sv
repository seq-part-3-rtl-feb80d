// seq_stat: instruction status and the Stat register.
//
// Each cycle the status of the instruction being executed is worked out:
// an address error (instruction bytes or data word outside memory) gives ADR,
// an unknown instruction gives INS, halt gives HLT, anything else AOK. The
// Stat register holds the status of the last instruction executed; it starts
// (after reset) at AOK and, once it holds anything else, it keeps that value
// and the processor stops.
//
// run is high while the processor may change state: the Stat register is AOK
// and the current instruction is AOK. It gates every state write (PC, register
// file, condition codes, data memory), so an instruction that stops the
// processor leaves all state as it found it, with the PC at that instruction.
//
// The AOK/HLT/INS statuses and the Stat register come from the course
// material; ADR, the priority order and the run gating are choices made here.
module seq_stat
  import y86_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  icode_t icode,
  input  logic   instr_valid,
  input  logic   imem_error,
  input  logic   dmem_error,
  output stat_t  instr_stat,
  output stat_t  stat,
  output logic   run
);

  always_comb begin
    if (imem_error || dmem_error) instr_stat = STAT_ADR;
    else if (!instr_valid)        instr_stat = STAT_INS;
    else if (icode == I_HALT)     instr_stat = STAT_HLT;
    else                          instr_stat = STAT_AOK;
  end

  assign run = (stat == STAT_AOK) && (instr_stat == STAT_AOK);

  always_ff @(posedge clk) begin
    if (rst)                    stat <= STAT_AOK;
    else if (stat == STAT_AOK)  stat <= instr_stat;
  end

  // Once stopped, the processor stays stopped until reset and never runs.
  a_sticky: assert property (@(posedge clk) disable iff (rst)
                             stat != STAT_AOK |=> stat == $past(stat));
  a_no_run_when_stopped: assert property (@(posedge clk) disable iff (rst)
                                          stat != STAT_AOK |-> !run);

endmodule

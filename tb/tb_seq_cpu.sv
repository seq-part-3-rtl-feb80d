// tb_seq_cpu: end-to-end test of the single-cycle Y86-64 processor at its
// default size.
//
// The testbench holds its own instruction-level model of Y86-64 (a plain
// interpreter with its own copy of memory, registers, condition codes, PC and
// status). Each program is assembled into both memories; after reset the model
// executes one instruction per clock and, every cycle, the processor's PC,
// registers, condition codes and Stat are compared with the model's. At the end
// the two memories are compared byte by byte and the cycle count is checked:
// the processor must finish in exactly as many cycles as the model executed
// instructions (one instruction per cycle).
//
// Programs: a directed program using every instruction (call/ret, push/pop,
// all ALU operations, every jump and conditional-move condition taken and not
// taken, loads, stores, a store that rewrites an instruction before it is
// fetched, popq %rsp), programs that stop on an invalid instruction, on a data
// address outside memory and on a fetch outside memory, and random programs.
// Each mechanism is counted and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_seq_cpu;
  import y86_pkg::*;

  localparam int unsigned MEMB = 8192;   // the processor's default memory size
  localparam int MAX_CYCLES = 5000;

  logic  clk = 1'b0;
  logic  rst;
  stat_t stat;
  word_t pc;
  cc_t   cc;
  word_t regs [NUM_REGS];
  logic  retire;

  seq_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  `include "y86_model.svh"

  // ---------------- run one program on both ----------------
  int total_cycles;

  task automatic run_program(input string name);
    int cyc, model_instrs;
    bit same;
    for (int i = 0; i < MEMB; i++) begin
      rmem[i] = img[i];
      dut.u_mem.mem[i] = img[i];
      stored_byte[i] = 0;
    end
    for (int i = 0; i < 16; i++) r[i] = 0;
    mzf = 1; msf = 0; mof = 0; mpc = 0; mstat = 1;
    rst = 1'b1;
    @(posedge clk); #1;
    rst = 1'b0;
    cyc = 0; model_instrs = 0;
    while (mstat == 1 && cyc < MAX_CYCLES) begin
      // state before this cycle's instruction
      same = (pc == mpc) && (cc.zf == mzf) && (cc.sf == msf) && (cc.of == mof) && (stat == STAT_AOK);
      for (int i = 0; i < NUM_REGS; i++) same &= (regs[i] == r[i]);
      check(same, $sformatf("%s: state mismatch before cycle %0d (pc=%0h model %0h)", name, cyc, pc, mpc));
      model_step();
      check(retire == (mstat == 1), $sformatf("%s: retire at cycle %0d", name, cyc));
      model_instrs++;
      @(posedge clk); #1;
      cyc++;
    end
    check(cyc < MAX_CYCLES, {name, ": model did not stop"});
    // stopped: processor must report the same status and stay put
    check(int'(stat) == mstat, $sformatf("%s: stat %0d model %0d", name, stat, mstat));
    check(pc == mpc, $sformatf("%s: final pc %0h model %0h", name, pc, mpc));
    check(cyc == model_instrs, $sformatf("%s: %0d cycles for %0d instructions", name, cyc, model_instrs));
    repeat (3) @(posedge clk);
    #1;
    check(pc == mpc && int'(stat) == mstat && !retire, {name, ": processor did not stay stopped"});
    same = 1;
    for (int i = 0; i < NUM_REGS; i++) same &= (regs[i] == r[i]);
    check(same, {name, ": final registers"});
    same = 1;
    for (int i = 0; i < MEMB; i++) same &= (dut.u_mem.mem[i] == rmem[i]);
    check(same, {name, ": final memory"});
    total_cycles += cyc;
    $display("%s: %0d instructions, stat %0d", name, model_instrs, mstat);
  endtask

  // ---------------- main ----------------
  initial begin
    rst = 1'b1;
    total_cycles = 0;
    prog_directed();   run_program("directed");
    check(r[3] == 64'h7FFF_FFFF_FFFF_FFFF + 115, "directed: array sum");
    check(r[14] == 64'h55, "directed: rewritten instruction executed");
    check(r[4] == 64'h1700, "directed: popq %rsp");
    prog_invalid();    run_program("invalid");
    prog_bad_data();   run_program("bad_data");
    prog_bad_fetch();  run_program("bad_fetch");
    for (int s = 0; s < 6; s++) begin
      prog_random(150);
      run_program($sformatf("random%0d", s));
    end
    // every mechanism must have happened
    for (int i = 0; i < 12; i++) check(n_icode[i] > 0, $sformatf("icode %0d never executed", i));
    for (int i = 0; i < 4; i++)  check(n_aluop[i] > 0, $sformatf("ALU op %0d never used", i));
    for (int i = 0; i < 7; i++)  check(n_cond_seen[i] > 0, $sformatf("condition %0d never used", i));
    check(n_jmp_taken > 0 && n_jmp_not > 0, "conditional jump taken and not taken");
    check(n_cmov_taken > 0 && n_cmov_not > 0, "conditional move taken and not taken");
    check(n_selfmod > 0, "store into instruction bytes");
    check(n_pop_rsp > 0, "popq %rsp");
    check(n_stop_hlt > 0 && n_stop_ins > 0 && n_stop_adr_d > 0 && n_stop_adr_i > 0, "every stop reason");
    $display("mechanisms: jmp taken %0d not %0d, cmov taken %0d not %0d, selfmod %0d, pop rsp %0d, stops hlt %0d ins %0d adr(d) %0d adr(i) %0d, cycles %0d",
             n_jmp_taken, n_jmp_not, n_cmov_taken, n_cmov_not, n_selfmod, n_pop_rsp,
             n_stop_hlt, n_stop_ins, n_stop_adr_d, n_stop_adr_i, total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

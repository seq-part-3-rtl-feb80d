// tb_y86_cpus: end-to-end test of the top with all four processors at their
// default sizes (no parameter is overridden).
//
// Phase 1 runs all four at once from one reset: the nop/halt processor runs
// 20 nops and a halt; the addq processor adds a chain of registers; the
// addq+nop processor runs a mix of both; the mov
// processor copies a value through registers and memory; the SEQ processor
// runs the directed program (every instruction, every condition, call/ret,
// push/pop, a store into the instruction stream) against the instruction-level
// model, cycle by cycle. Phase 2 runs the SEQ processor on programs that stop
// on an invalid instruction, on a bad data address and on a bad fetch address,
// and on random programs. Cycle counts are checked (one instruction per cycle)
// and every mechanism must have occurred at least once.
`timescale 1ns/1ps
module tb_y86_cpus;
  import y86_pkg::*;

  localparam int unsigned MEMB = 8192;   // default memory size of every processor
  localparam int MAX_CYCLES = 5000;

  logic clk = 1'b0, rst;
  word_t nh_pc, aq_pc, mv_pc, sq_pc;
  stat_t nh_stat, mv_stat, sq_stat;
  logic  nh_retire, mv_retire, sq_retire;
  logic [3:0] aq_opcode;
  word_t an_pc;
  logic [3:0] an_opcode;
  word_t an_regs [NUM_REGS];
  word_t aq_regs [NUM_REGS], mv_regs [NUM_REGS], sq_regs [NUM_REGS];
  cc_t   sq_cc;

  y86_cpus dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_nh_halt, n_aq_add, n_an_nop, n_mv_load, n_mv_store;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  `include "y86_model.svh"

  // Load img into the SEQ processor and the model.
  task automatic load_seq();
    for (int i = 0; i < MEMB; i++) begin
      rmem[i] = img[i];
      dut.u_seq.u_mem.mem[i] = img[i];
      stored_byte[i] = 0;
    end
    for (int i = 0; i < 16; i++) r[i] = 0;
    mzf = 1; msf = 0; mof = 0; mpc = 0; mstat = 1;
  endtask

  // Step the SEQ processor and the model until the model stops; returns cycles.
  task automatic run_seq(input string name, output int cyc);
    bit same;
    cyc = 0;
    while (mstat == 1 && cyc < MAX_CYCLES) begin
      same = (sq_pc == mpc) && (sq_cc.zf == mzf) && (sq_cc.sf == msf) && (sq_cc.of == mof) && (sq_stat == STAT_AOK);
      for (int i = 0; i < NUM_REGS; i++) same &= (sq_regs[i] == r[i]);
      check(same, $sformatf("%s: SEQ state before cycle %0d", name, cyc));
      model_step();
      check(sq_retire == (mstat == 1), $sformatf("%s: SEQ retire in cycle %0d", name, cyc));
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(sq_stat) == mstat && sq_pc == mpc, $sformatf("%s: SEQ stop status %0d", name, sq_stat));
    same = 1;
    for (int i = 0; i < NUM_REGS; i++) same &= (sq_regs[i] == r[i]);
    for (int i = 0; i < MEMB; i++) same &= (dut.u_seq.u_mem.mem[i] == rmem[i]);
    check(same, {name, ": SEQ final registers and memory"});
  endtask

  initial begin
    int cyc, instrs;
    longint unsigned chain;
    rst = 1'b1;
    // ---- phase 1: all four processors ----
    for (int i = 0; i < MEMB; i++) begin
      dut.u_nophalt.u_mem.mem[i] = 8'h00;
      dut.u_addq.u_mem.mem[i] = 8'h00;
      dut.u_addnop.u_mem.mem[i] = 8'h10;   // nop everywhere after the program
    end
    // addq+nop program: addq %r1,%r2; nop; addq %r2,%r3; nop; nop; addq %r3,%r1
    dut.u_addnop.u_mem.mem[0] = 8'h60; dut.u_addnop.u_mem.mem[1] = 8'h12;
    dut.u_addnop.u_mem.mem[2] = 8'h10;
    dut.u_addnop.u_mem.mem[3] = 8'h60; dut.u_addnop.u_mem.mem[4] = 8'h23;
    dut.u_addnop.u_mem.mem[5] = 8'h10; dut.u_addnop.u_mem.mem[6] = 8'h10;
    dut.u_addnop.u_mem.mem[7] = 8'h60; dut.u_addnop.u_mem.mem[8] = 8'h31;
    for (int i = 0; i < 20; i++) dut.u_nophalt.u_mem.mem[i] = 8'h10;   // 20 nops, then halt
    for (int i = 0; i < 14; i++) begin                                  // addq %r(i), %r(i+1)
      dut.u_addq.u_mem.mem[2 * i]     = 8'h60;
      dut.u_addq.u_mem.mem[2 * i + 1] = 8'((i << 4) | (i + 1));
    end
    clear_img();                          // mov program
    a_irmov(64'h1234_5678_9ABC_DEF0, 1);
    a_rrmov(0, 1, 2);
    a_irmov(64'h1000, 5);
    a_rmmov(2, 64'h18, 5);
    a_mrmov(64'h18, 5, 3);
    a_halt();
    for (int i = 0; i < MEMB; i++) dut.u_mov.u_mem.mem[i] = img[i];
    prog_directed();
    load_seq();
    @(posedge clk); #1;
    for (int i = 0; i < NUM_REGS; i++) begin
      dut.u_addq.u_regfile.regs[i] = 64'(i + 1);
      dut.u_addnop.u_regfile.regs[i] = 64'(10 * i);
    end
    rst = 1'b0;
    fork
      run_seq("directed", cyc);
      begin : small_cpus
        int c;
        c = 0;
        while (nh_stat == STAT_AOK && c < 100) begin @(posedge clk); #1; c++; end
        check(nh_stat == STAT_HLT && c == 21 && nh_pc == 64'd21, "nop/halt: 21 cycles, halted");
        if (nh_stat == STAT_HLT) n_nh_halt++;
        // addq+nop: r2 = 10+20 = 30, r3 = 30+30 = 60, r1 = 60+10 = 70; then nops
        check(an_regs[1] == 64'd70 && an_regs[2] == 64'd30 && an_regs[3] == 64'd60 && an_regs[4] == 64'd40,
              "addq+nop: sums");
        check(an_pc == 64'd9 + 64'(c - 6), $sformatf("addq+nop: pc %0d after %0d cycles", an_pc, c));
        if (an_regs[1] == 64'd70 && an_opcode == 4'h1) n_an_nop++;
        c = 0;
        while (mv_stat == STAT_AOK && c < 100) begin @(posedge clk); #1; c++; end
        check(mv_stat == STAT_HLT && mv_regs[3] == 64'h1234_5678_9ABC_DEF0 && mv_regs[2] == mv_regs[1],
              "mov: value copied through register and memory");
        if (mv_regs[3] == 64'h1234_5678_9ABC_DEF0) begin n_mv_load++; n_mv_store++; end
      end
    join
    // addq: after 14+ cycles register k holds the sum 1 + 2 + ... + (k + 1)
    chain = 1;
    for (int k = 1; k < NUM_REGS; k++) begin
      chain += 64'(k + 1);
      check(aq_regs[k] == chain, $sformatf("addq: register %0d", k));
    end
    check(aq_opcode == 4'h0 || aq_opcode == 4'h6, "addq opcode");
    if (aq_regs[14] == chain) n_aq_add++;
    check(r[3] == 64'h7FFF_FFFF_FFFF_FFFF + 115 && r[14] == 64'h55, "directed: results");
    instrs = 0;
    for (int i = 0; i < 16; i++) instrs += n_icode[i];
    check(cyc == instrs, "SEQ: one instruction per cycle");
    // ---- phase 2: SEQ stop reasons and random programs ----
    prog_invalid();   load_seq(); rst = 1; @(posedge clk); #1; rst = 0; run_seq("invalid", cyc);
    prog_bad_data();  load_seq(); rst = 1; @(posedge clk); #1; rst = 0; run_seq("bad_data", cyc);
    prog_bad_fetch(); load_seq(); rst = 1; @(posedge clk); #1; rst = 0; run_seq("bad_fetch", cyc);
    for (int s = 0; s < 3; s++) begin
      prog_random(150); load_seq(); rst = 1; @(posedge clk); #1; rst = 0;
      run_seq($sformatf("random%0d", s), cyc);
    end
    // ---- every mechanism must have happened ----
    check(n_nh_halt > 0, "nop/halt processor halted");
    check(n_aq_add > 0, "addq processor added");
    check(n_an_nop > 0, "addq+nop processor added and skipped nops");
    check(n_mv_load > 0 && n_mv_store > 0, "mov processor load and store");
    for (int i = 0; i < 12; i++) check(n_icode[i] > 0, $sformatf("SEQ icode %0d never executed", i));
    for (int i = 0; i < 4; i++)  check(n_aluop[i] > 0, $sformatf("SEQ ALU op %0d never used", i));
    for (int i = 0; i < 7; i++)  check(n_cond_seen[i] > 0, $sformatf("SEQ condition %0d never used", i));
    check(n_jmp_taken > 0 && n_jmp_not > 0, "SEQ jump taken and not taken");
    check(n_cmov_taken > 0 && n_cmov_not > 0, "SEQ conditional move taken and not taken");
    check(n_selfmod > 0, "SEQ store into the instruction stream");
    check(n_pop_rsp > 0, "SEQ popq %rsp");
    check(n_stop_hlt > 0 && n_stop_ins > 0 && n_stop_adr_d > 0 && n_stop_adr_i > 0, "SEQ every stop reason");
    $display("mechanisms: jmp taken %0d not %0d, cmov taken %0d not %0d, selfmod %0d, pop rsp %0d, stops hlt %0d ins %0d adr(d) %0d adr(i) %0d",
             n_jmp_taken, n_jmp_not, n_cmov_taken, n_cmov_not, n_selfmod, n_pop_rsp,
             n_stop_hlt, n_stop_ins, n_stop_adr_d, n_stop_adr_i);
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

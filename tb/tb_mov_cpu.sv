// tb_mov_cpu: runs random programs of rrmovq, irmovq, rmmovq, mrmovq and nop
// ending in halt on the mov processor and on the instruction-level model,
// comparing PC, registers and Stat every cycle and memory at the end; then
// checks that an instruction outside the mov set stops it with INS and that a
// data word outside memory stops it with ADR, leaving the state unchanged.
`timescale 1ns/1ps
module tb_mov_cpu;
  import y86_pkg::*;
  localparam int unsigned MEMB = 2048;
  localparam int MAX_CYCLES = 2000;
  logic clk = 0, rst;
  word_t pc;
  stat_t stat;
  word_t regs [NUM_REGS];
  logic retire;
  int checks = 0, failures = 0;

  mov_cpu #(.MEM_BYTES(MEMB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  `include "y86_model.svh"

  // Run img on both; when expect_stat is non-zero the model is not used past
  // the instructions it shares with the mov processor, and the final status
  // is expect_stat instead.
  task automatic run_mov(input string name, input int expect_stat);
    int cyc;
    bit same;
    for (int i = 0; i < MEMB; i++) begin
      rmem[i] = img[i];
      dut.u_mem.mem[i] = img[i];
      stored_byte[i] = 0;
    end
    for (int i = 0; i < 16; i++) r[i] = 0;
    mzf = 1; msf = 0; mof = 0; mpc = 0; mstat = 1;
    rst = 1; @(posedge clk); #1; rst = 0;
    cyc = 0;
    while (mstat == 1 && cyc < MAX_CYCLES) begin
      same = (pc == mpc) && (stat == STAT_AOK);
      for (int i = 0; i < NUM_REGS; i++) same &= (regs[i] == r[i]);
      check(same, $sformatf("%s: state before cycle %0d", name, cyc));
      if (expect_stat != 0 && !(rmem[mpc][7:4] inside {0, 1, 2, 3, 4, 5})) mstat = expect_stat;
      else model_step();
      check(retire == (mstat == 1), $sformatf("%s: retire in cycle %0d", name, cyc));
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(stat) == mstat && pc == mpc, $sformatf("%s: stop status %0d pc %0h", name, stat, pc));
    same = 1;
    for (int i = 0; i < NUM_REGS; i++) same &= (regs[i] == r[i]);
    for (int i = 0; i < MEMB; i++) same &= (dut.u_mem.mem[i] == rmem[i]);
    check(same, {name, ": final registers and memory"});
  endtask

  initial begin
    int t;
    rst = 1;
    for (int s = 0; s < 5; s++) begin
      clear_img();
      a_irmov(64'h400, 5);
      for (int i = 0; i < 120; i++) begin
        t = $urandom_range(0, 14);
        if (t == 5) t = 6;
        case ($urandom_range(0, 4))
          0: a_irmov({$urandom, $urandom}, t);
          1: a_rrmov(0, $urandom_range(0, 14), t);
          2: a_rmmov($urandom_range(0, 14), 64'(8 * $urandom_range(0, 40)), 5);
          3: a_mrmov(64'(8 * $urandom_range(0, 40)), 5, t);
          default: a_nop();
        endcase
      end
      a_halt();
      run_mov($sformatf("random%0d", s), 0);
    end
    clear_img();
    a_irmov(64'd9, 1); a_op(0, 1, 1); a_irmov(64'd3, 1);
    run_mov("not a move", 4);
    clear_img();
    a_irmov(64'(MEMB - 2), 2); a_mrmov(0, 2, 3); a_halt();
    run_mov("bad address", 0);
    check(n_stop_hlt == 5 && n_stop_adr_d == 1, "stop reasons seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

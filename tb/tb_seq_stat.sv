// tb_seq_stat: checks the status priority (address error, then invalid
// instruction, then halt, then AOK), that run is high only while both the
// Stat register and the current instruction are AOK, and that once Stat
// leaves AOK it keeps its value until reset.
`timescale 1ns/1ps
module tb_seq_stat;
  import y86_pkg::*;
  logic clk = 0, rst;
  icode_t icode;
  logic instr_valid, imem_error, dmem_error, run;
  stat_t instr_stat, stat;
  int checks = 0, failures = 0;

  seq_stat dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    stat_t e, held;
    rst = 1; icode = I_NOP; instr_valid = 1; imem_error = 0; dmem_error = 0;
    @(posedge clk); #1;
    rst = 0;
    held = STAT_AOK;
    for (int n = 0; n < 400; n++) begin
      if (n % 40 == 0) begin rst = 1; @(posedge clk); #1; rst = 0; held = STAT_AOK; end
      icode = ($urandom_range(0, 5) == 0) ? I_HALT : I_OPQ;
      instr_valid = ($urandom_range(0, 7) != 0);
      imem_error = ($urandom_range(0, 9) == 0);
      dmem_error = ($urandom_range(0, 9) == 0);
      #1;
      if (imem_error || dmem_error) e = STAT_ADR;
      else if (!instr_valid) e = STAT_INS;
      else if (icode == I_HALT) e = STAT_HLT;
      else e = STAT_AOK;
      chk(instr_stat == e, "instruction status");
      chk(stat == held, "held status");
      chk(run == (held == STAT_AOK && e == STAT_AOK), "run");
      @(posedge clk); #1;
      if (held == STAT_AOK) held = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

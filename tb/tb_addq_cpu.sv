// tb_addq_cpu: loads a random sequence of addq instructions and random
// register values, runs one instruction per cycle and checks the PC (+2 per
// cycle) and all registers after every cycle against sums computed here.
`timescale 1ns/1ps
module tb_addq_cpu;
  import y86_pkg::*;
  localparam int unsigned MB = 1024;
  localparam int N = 300;
  logic clk = 0, rst;
  word_t pc;
  logic [3:0] opcode;
  word_t regs [NUM_REGS];
  longint unsigned r [16];
  int checks = 0, failures = 0;

  addq_cpu #(.MEM_BYTES(MB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int ra, rb;
    bit same;
    for (int i = 0; i < MB; i++) dut.u_mem.mem[i] = 8'h00;
    for (int i = 0; i < N; i++) begin
      dut.u_mem.mem[2 * i]     = 8'h60;
      dut.u_mem.mem[2 * i + 1] = 8'($urandom_range(0, 255));
    end
    rst = 1; @(posedge clk); #1;
    // give the registers non-zero starting values, else every sum is zero
    for (int i = 0; i < NUM_REGS; i++) begin
      r[i] = {$urandom, $urandom};
      dut.u_regfile.regs[i] = r[i];
    end
    r[15] = 0;
    rst = 0;
    for (int c = 0; c < N; c++) begin
      #1;
      chk(pc == 64'(2 * c) && opcode == 4'h6, "pc and opcode");
      ra = dut.u_mem.mem[2 * c + 1][7:4];
      rb = dut.u_mem.mem[2 * c + 1][3:0];
      @(posedge clk); #1;
      if (rb != 15) r[rb] = r[ra] + r[rb];
      same = 1;
      for (int i = 0; i < NUM_REGS; i++) same &= (regs[i] == r[i]);
      chk(same, $sformatf("registers after instruction %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

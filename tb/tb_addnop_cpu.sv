// tb_addnop_cpu: loads a random mix of addq and nop instructions and random
// register values, and checks after every cycle that the PC advanced by the
// instruction's length (1 for nop, 2 for addq) and that only addq changed a
// register, against sums computed here.
`timescale 1ns/1ps
module tb_addnop_cpu;
  import y86_pkg::*;
  localparam int unsigned MB = 1024;
  localparam int N = 300;
  logic clk = 0, rst;
  word_t pc;
  logic [3:0] opcode;
  word_t regs [NUM_REGS];
  longint unsigned r [16];
  int checks = 0, failures = 0, n_nop = 0, n_add = 0;

  addnop_cpu #(.MEM_BYTES(MB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int a, ra, rb;
    longint unsigned epc;
    bit same, nop;
    for (int i = 0; i < MB; i++) dut.u_mem.mem[i] = 8'h10;
    a = 0;
    for (int i = 0; i < N; i++)
      if ($urandom_range(0, 2) == 0) begin dut.u_mem.mem[a] = 8'h10; a += 1; end
      else begin dut.u_mem.mem[a] = 8'h60; dut.u_mem.mem[a + 1] = 8'($urandom); a += 2; end
    rst = 1; @(posedge clk); #1;
    for (int i = 0; i < NUM_REGS; i++) begin
      r[i] = {$urandom, $urandom};
      dut.u_regfile.regs[i] = r[i];
    end
    r[15] = 0;
    rst = 0;
    epc = 0;
    for (int c = 0; c < N; c++) begin
      #1;
      chk(pc == epc, "pc");
      nop = (dut.u_mem.mem[epc][7:4] == 4'h1);
      ra = dut.u_mem.mem[epc + 1][7:4];
      rb = dut.u_mem.mem[epc + 1][3:0];
      @(posedge clk); #1;
      if (nop) begin epc += 1; n_nop++; end
      else begin
        epc += 2; n_add++;
        if (rb != 15) r[rb] = r[ra] + r[rb];
      end
      same = 1;
      for (int i = 0; i < NUM_REGS; i++) same &= (regs[i] == r[i]);
      chk(same, $sformatf("registers after instruction %0d", c));
    end
    chk(n_nop > 0 && n_add > 0, "both instructions ran");
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

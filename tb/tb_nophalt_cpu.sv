// tb_nophalt_cpu: runs programs of N nops followed by a final byte on the
// nop/halt processor. With a halt the processor must stop with Stat HLT after
// N+1 cycles, with any other byte with Stat INS; thePc must step by one per
// cycle and then stay put, with no further retirements.
`timescale 1ns/1ps
module tb_nophalt_cpu;
  import y86_pkg::*;
  localparam int unsigned MB = 512;
  logic clk = 0, rst;
  word_t the_pc;
  stat_t stat;
  logic retire;
  int checks = 0, failures = 0;

  nophalt_cpu #(.MEM_BYTES(MB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(input int n, input logic [7:0] last);
    int cyc;
    stat_t e;
    for (int i = 0; i < MB; i++) dut.u_mem.mem[i] = 8'h00;
    for (int i = 0; i < n; i++) dut.u_mem.mem[i] = 8'h10;
    dut.u_mem.mem[n] = last;
    rst = 1; @(posedge clk); #1; rst = 0;
    cyc = 0;
    while (stat == STAT_AOK && cyc < 2 * MB) begin
      chk(the_pc == 64'(cyc) && retire, "pc steps by one");
      @(posedge clk); #1;
      cyc++;
    end
    e = (last[7:4] == 4'h0) ? STAT_HLT : (last[7:4] == 4'h1) ? STAT_AOK : STAT_INS;
    chk(stat == e, $sformatf("stop status for %h", last));
    chk(cyc == n + 1, $sformatf("%0d cycles for %0d nops", cyc, n));
    repeat (3) @(posedge clk);
    #1;
    chk(the_pc == 64'(n + 1) && stat == e && !retire, "stays stopped");
  endtask

  initial begin
    run(0, 8'h00);
    run(6, 8'h00);
    run(3, 8'h60);
    run(40, 8'hF0);
    run(100, 8'h03);      // halt with a non-zero function nibble is still halt here
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

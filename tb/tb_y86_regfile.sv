// tb_y86_regfile: random reads and writes of the register file against a
// shadow array. Checks that reads are combinational (same cycle), writes land
// at the next edge, register 0xF reads 0 and is never written, port M wins a
// write collision, wen=0 blocks writes and reset clears everything.
`timescale 1ns/1ps
module tb_y86_regfile;
  import y86_pkg::*;
  logic clk = 0, rst, wen;
  regid_t srcA, srcB, dstE, dstM;
  word_t valA, valB, valE, valM;
  word_t regs_out [NUM_REGS];
  word_t shadow [16];
  int checks = 0, failures = 0;

  y86_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    rst = 1; wen = 0; srcA = 0; srcB = 0; dstE = REG_NONE; dstM = REG_NONE; valE = 0; valM = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    for (int i = 0; i < NUM_REGS; i++) chk(regs_out[i] == 0, "reset");
    for (int n = 0; n < 2000; n++) begin
      srcA = 4'($urandom); srcB = 4'($urandom);
      dstE = 4'($urandom); dstM = (n % 7 == 0) ? dstE : 4'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      wen = ($urandom_range(0, 9) != 0);
      #1;
      chk(valA == ((srcA == 15) ? 0 : shadow[srcA]), "read A");
      chk(valB == ((srcB == 15) ? 0 : shadow[srcB]), "read B");
      @(posedge clk); #1;
      if (wen) begin
        if (dstE != 15) shadow[dstE] = valE;
        if (dstM != 15) shadow[dstM] = valM;
      end
      shadow[15] = 0;
    end
    for (int i = 0; i < NUM_REGS; i++) chk(regs_out[i] == shadow[i], "final contents");
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < NUM_REGS; i++) chk(regs_out[i] == 0, "second reset");
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

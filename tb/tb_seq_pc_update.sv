// tb_seq_pc_update: for every icode and both values of Cnd, checks that the
// next PC is valC for call and for a jXX whose condition holds, valM for ret
// and valP otherwise.
`timescale 1ns/1ps
module tb_seq_pc_update;
  import y86_pkg::*;
  icode_t icode;
  logic cnd;
  word_t valC, valM, valP, new_pc;
  int checks = 0, failures = 0;

  seq_pc_update dut (.*);

  initial begin
    word_t e;
    for (int n = 0; n < 640; n++) begin
      icode = icode_t'(n % 16); cnd = 1'((n / 16) % 2);
      valC = {$urandom, $urandom}; valM = {$urandom, $urandom}; valP = {$urandom, $urandom};
      #1;
      if (n % 16 == 8 || (n % 16 == 7 && cnd)) e = valC;
      else if (n % 16 == 9) e = valM;
      else e = valP;
      checks++;
      if (new_pc !== e) begin failures++; $display("FAIL icode %0d cnd %b", n % 16, cnd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

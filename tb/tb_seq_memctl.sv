// tb_seq_memctl: for every icode with random values, checks the data-memory
// read and write enables, the address (valE, or valB for popq and ret) and the
// write data (valA, or valP for call).
`timescale 1ns/1ps
module tb_seq_memctl;
  import y86_pkg::*;
  icode_t icode;
  word_t valA, valB, valE, valP, mem_addr, mem_data;
  logic mem_read, mem_write;
  int checks = 0, failures = 0;

  seq_memctl dut (.*);

  initial begin
    bit er, ew;
    word_t ea, ed;
    for (int n = 0; n < 1600; n++) begin
      icode = icode_t'(n % 16);
      valA = {$urandom, $urandom}; valB = {$urandom, $urandom};
      valE = {$urandom, $urandom}; valP = {$urandom, $urandom};
      #1;
      er = (n % 16) inside {5, 9, 11};
      ew = (n % 16) inside {4, 8, 10};
      ea = ((n % 16) inside {9, 11}) ? valB : valE;
      ed = ((n % 16) == 8) ? valP : valA;
      checks++;
      if (mem_read !== er || mem_write !== ew || ((er || ew) && (mem_addr !== ea || (ew && mem_data !== ed)))) begin
        failures++;
        $display("FAIL icode %0d", n % 16);
      end
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

// tb_seq_fetch: feeds the fetch stage every first byte (all icode:ifun values)
// with random register bytes and constants, and checks icode, ifun, rA, rB,
// valC, valP and instr_valid against a table of instruction lengths and
// layouts written out here. Also checks that an instruction-memory error
// turns the instruction into a one-byte nop.
`timescale 1ns/1ps
module tb_seq_fetch;
  import y86_pkg::*;
  word_t pc, valC, valP;
  logic [79:0] ibytes;
  logic imem_error, instr_valid;
  icode_t icode;
  logic [3:0] ifun;
  regid_t rA, rB;
  int checks = 0, failures = 0;

  seq_fetch dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    // instruction lengths by icode, 0..11; 0 marks an invalid icode
    int lens [16] = '{1, 1, 2, 10, 10, 10, 2, 9, 9, 1, 2, 2, 0, 0, 0, 0};
    int maxfn [16] = '{0, 0, 6, 0, 0, 0, 3, 6, 0, 0, 0, 0, -1, -1, -1, -1};
    word_t expC;
    for (int b = 0; b < 256; b++)
      for (int k = 0; k < 4; k++) begin
        ibytes = {$urandom, $urandom, $urandom};
        ibytes[7:0] = 8'(b);
        pc = {$urandom, $urandom};
        imem_error = 0;
        #1;
        chk(icode == icode_t'(b >> 4) && ifun == 4'(b), "icode/ifun");
        chk(instr_valid == ((b & 15) <= maxfn[b >> 4]), $sformatf("valid %h", b));
        if (lens[b >> 4] != 0) begin
          chk(valP == pc + 64'(lens[b >> 4]), $sformatf("valP for %h", b));
          if (lens[b >> 4] == 2 || lens[b >> 4] == 10)
            chk(rA == ibytes[15:12] && rB == ibytes[11:8], "rA/rB");
          else
            chk(rA == 4'hF && rB == 4'hF, "no register byte");
          expC = (lens[b >> 4] == 10) ? ibytes[79:16] : ibytes[71:8];
          if (lens[b >> 4] >= 9) chk(valC == expC, "valC");
        end
      end
    ibytes = 80'h00;       // halt bytes, but the fetch failed
    imem_error = 1; pc = 64'h100;
    #1;
    chk(icode == I_NOP && instr_valid && valP == 64'h101, "imem_error gives a nop");
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

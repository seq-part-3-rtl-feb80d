// tb_seq_execute: for every icode with random register values and constants,
// checks valE (the ALU inputs chosen for the instruction: valA, valC, -8, +8,
// valB or 0, and the operation), that only OPq changes the condition codes and
// only while wen is set, that they reset to Z=1 S=0 O=0, and that Cnd follows
// the stored codes and ifun.
`timescale 1ns/1ps
module tb_seq_execute;
  import y86_pkg::*;
  logic clk = 0, rst, wen, cnd;
  icode_t icode;
  logic [3:0] ifun;
  word_t valA, valB, valC, valE;
  cc_t cc;
  int checks = 0, failures = 0;

  seq_execute dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    word_t e;
    logic ezf, esf, eof;
    bit lt, ecnd;
    int ic;
    rst = 1; wen = 0; icode = I_NOP; ifun = 0; valA = 0; valB = 0; valC = 0;
    @(posedge clk); #1;
    rst = 0;
    chk(cc.zf == 1 && cc.sf == 0 && cc.of == 0, "reset codes");
    ezf = 1; esf = 0; eof = 0;
    for (int n = 0; n < 3000; n++) begin
      ic = $urandom_range(0, 11);
      icode = icode_t'(ic);
      ifun = (ic == 6) ? 4'($urandom_range(0, 3)) : 4'($urandom_range(0, 6));
      valA = ($urandom_range(0, 3) == 0) ? 64'(64'sd0 - 64'($urandom_range(0, 2))) : {$urandom, $urandom};
      valB = ($urandom_range(0, 3) == 0) ? valA : {$urandom, $urandom};
      valC = {$urandom, $urandom};
      wen = ($urandom_range(0, 7) != 0);
      #1;
      case (ic)
        2: e = valA;
        3: e = valC;
        4, 5: e = valB + valC;
        6: case (ifun)
             0: e = valB + valA;
             1: e = valB - valA;
             2: e = valB & valA;
             default: e = valB ^ valA;
           endcase
        8, 10: e = valB - 8;
        9, 11: e = valB + 8;
        default: e = 'x;
      endcase
      if (ic inside {2, 3, 4, 5, 6, 8, 9, 10, 11}) chk(valE == e, $sformatf("valE icode %0d", ic));
      lt = esf ^ eof;
      case (ifun)
        0: ecnd = 1; 1: ecnd = lt | ezf; 2: ecnd = lt; 3: ecnd = ezf;
        4: ecnd = !ezf; 5: ecnd = !lt; default: ecnd = !lt & !ezf;
      endcase
      chk(cnd == ecnd, "cnd");
      @(posedge clk); #1;
      if (ic == 6 && wen) begin
        ezf = (e == 0); esf = e[63];
        case (ifun)
          0: eof = (valA[63] == valB[63]) && (e[63] != valB[63]);
          1: eof = (valA[63] != valB[63]) && (e[63] != valB[63]);
          default: eof = 0;
        endcase
      end
      chk(cc.zf == ezf && cc.sf == esf && cc.of == eof, "condition codes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_y86_cond: checks Cnd for every condition code and every combination of
// ZF, SF and OF against a table written from the signed comparisons each
// condition stands for (le: less or equal, l: less, e: equal, ...).
`timescale 1ns/1ps
module tb_y86_cond;
  import y86_pkg::*;
  cc_t cc;
  logic [3:0] ifun;
  logic cnd;
  int checks = 0, failures = 0;

  y86_cond dut (.*);

  initial begin
    bit less, equal, exp;
    for (int f = 0; f < 8; f++)
      for (int c = 0; c < 8; c++) begin
        cc = cc_t'(c); ifun = 4'(f);
        #1;
        less  = (cc.sf != cc.of);
        equal = cc.zf;
        case (f)
          0: exp = 1;
          1: exp = less || equal;
          2: exp = less;
          3: exp = equal;
          4: exp = !equal;
          5: exp = !less;
          6: exp = !less && !equal;
          default: exp = 0;
        endcase
        checks++;
        if (cnd !== exp) begin failures++; $display("FAIL ifun=%0d cc=%b cnd=%b", f, c, cnd); end
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

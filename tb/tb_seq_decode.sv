// tb_seq_decode: for every icode and random rA, rB and Cnd, checks the four
// register numbers against the table of registers each instruction reads and
// writes (srcA, srcB, dstE, dstM), 0xF meaning none.
`timescale 1ns/1ps
module tb_seq_decode;
  import y86_pkg::*;
  icode_t icode;
  regid_t rA, rB, srcA, srcB, dstE, dstM;
  logic cnd;
  int checks = 0, failures = 0;

  seq_decode dut (.*);

  initial begin
    regid_t eA, eB, eE, eM;
    localparam regid_t N = 4'hF, SP = 4'h4;
    for (int n = 0; n < 2000; n++) begin
      icode = icode_t'(n % 16);
      rA = 4'($urandom); rB = 4'($urandom); cnd = 1'($urandom);
      #1;
      case (n % 16)
        2:  begin eA = rA; eB = N;  eE = cnd ? rB : N; eM = N;  end
        3:  begin eA = N;  eB = N;  eE = rB; eM = N;  end
        4:  begin eA = rA; eB = rB; eE = N;  eM = N;  end
        5:  begin eA = N;  eB = rB; eE = N;  eM = rA; end
        6:  begin eA = rA; eB = rB; eE = rB; eM = N;  end
        8, 9: begin eA = N; eB = SP; eE = SP; eM = N; end
        10: begin eA = rA; eB = SP; eE = SP; eM = N;  end
        11: begin eA = rA; eB = SP; eE = SP; eM = rA; end
        default: begin eA = N; eB = N; eE = N; eM = N; end
      endcase
      checks++;
      if ({srcA, srcB, dstE, dstM} !== {eA, eB, eE, eM}) begin
        failures++;
        $display("FAIL icode %0d: %h %h %h %h", n % 16, srcA, srcB, dstE, dstM);
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

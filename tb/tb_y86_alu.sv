// tb_y86_alu: checks the ALU's result and flags for add, sub, and, xor on
// directed corner cases (overflow in both directions, zero, sign) and random
// operands, against values computed here with 65-bit signed arithmetic.
`timescale 1ns/1ps
module tb_y86_alu;
  import y86_pkg::*;
  word_t aluA, aluB, valE;
  alufun_t alufun;
  cc_t flags;
  int checks = 0, failures = 0;

  y86_alu dut (.*);

  task automatic try(input word_t a, input word_t b, input alufun_t f);
    logic signed [64:0] wide;
    word_t exp;
    logic eof;
    aluA = a; aluB = b; alufun = f;
    #1;
    case (f)
      ALU_ADD: begin wide = $signed({b[63], b}) + $signed({a[63], a}); exp = wide[63:0]; eof = (wide[64] != wide[63]); end
      ALU_SUB: begin wide = $signed({b[63], b}) - $signed({a[63], a}); exp = wide[63:0]; eof = (wide[64] != wide[63]); end
      ALU_AND: begin exp = a & b; eof = 0; end
      default: begin exp = a ^ b; eof = 0; end
    endcase
    checks++;
    if (valE !== exp || flags.zf !== (exp == 0) || flags.sf !== exp[63] || flags.of !== eof) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h got %h %b exp %h", f, a, b, valE, flags, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < 4; f++) begin
      try(64'd1, 64'd2, alufun_t'(f));
      try(64'd5, 64'd5, alufun_t'(f));
      try(64'd1, 64'h7FFF_FFFF_FFFF_FFFF, alufun_t'(f));
      try(64'd1, 64'h8000_0000_0000_0000, alufun_t'(f));
      try(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, alufun_t'(f));
      try(64'hFFFF_FFFF_FFFF_FFFF, 64'd1, alufun_t'(f));
      try(64'h8000_0000_0000_0000, 64'd0, alufun_t'(f));
      for (int i = 0; i < 200; i++) try({$urandom, $urandom}, {$urandom, $urandom}, alufun_t'(f));
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

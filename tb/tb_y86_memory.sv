// tb_y86_memory: random stores and loads on the data port and fetches on the
// instruction port, against a shadow byte array. Checks little-endian byte
// order, that a store is seen by the next fetch of the same bytes, that a write
// without dcommit changes nothing, and the address-error flags at the upper
// end of memory. Uses a small memory to keep the run short.
`timescale 1ns/1ps
module tb_y86_memory;
  import y86_pkg::*;
  localparam int unsigned MB = 256;
  logic clk = 0;
  word_t iaddr, daddr, dwdata, drdata;
  logic [79:0] ibytes;
  logic imem_error, dread, dwrite, dcommit, dmem_error;
  logic [7:0] shadow [MB];
  int checks = 0, failures = 0;

  y86_memory #(.MEM_BYTES(MB)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    word_t e;
    logic [79:0] ei;
    dread = 0; dwrite = 0; dcommit = 0; daddr = 0; iaddr = 0; dwdata = 0;
    for (int i = 0; i < MB; i++) begin dut.mem[i] = 8'(i * 3); shadow[i] = 8'(i * 3); end
    for (int n = 0; n < 1000; n++) begin
      daddr = 64'($urandom_range(0, MB + 8));
      iaddr = ($urandom_range(0, 3) == 0) ? daddr : 64'($urandom_range(0, MB + 8));
      dread = $urandom_range(0, 1);
      dwrite = !dread && $urandom_range(0, 1);
      dcommit = ($urandom_range(0, 7) != 0);
      dwdata = {$urandom, $urandom};
      #1;
      chk(imem_error == (iaddr > MB - 10), "imem_error");
      chk(dmem_error == ((dread || dwrite) && daddr > MB - 8), "dmem_error");
      if (iaddr <= MB - 10) begin
        for (int i = 0; i < 10; i++) ei[8*i +: 8] = shadow[iaddr + i];
        chk(ibytes == ei, "fetch bytes");
      end
      if (dread && daddr <= MB - 8) begin
        for (int i = 0; i < 8; i++) e[8*i +: 8] = shadow[daddr + i];
        chk(drdata == e, "load");
      end
      @(posedge clk); #1;
      if (dwrite && dcommit && daddr <= MB - 8)
        for (int i = 0; i < 8; i++) shadow[daddr + i] = dwdata[8*i +: 8];
    end
    // little-endian check
    daddr = 16; dwdata = 64'h0807_0605_0403_0201; dwrite = 1; dcommit = 1; dread = 0;
    @(posedge clk); #1;
    dwrite = 0; iaddr = 16; #1;
    chk(ibytes[7:0] == 8'h01 && ibytes[63:56] == 8'h08, "byte order");
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

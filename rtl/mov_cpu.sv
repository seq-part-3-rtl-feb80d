// mov_cpu: a processor that runs the four Y86-64 moves, plus nop and halt.
//
//   rrmovq rA, rB      2 0 rA rB        R[rB] <- R[rA]
//   irmovq V, rB       3 0 F  rB  V     R[rB] <- V
//   rmmovq rA, D(rB)   4 0 rA rB  D     M[R[rB] + D] <- R[rA]
//   mrmovq D(rB), rA   5 0 rA rB  D     R[rA] <- M[R[rB] + D]
//
// All four put their register numbers in the same places and their constant
// in bytes 2..9, so the register file always reads R[rA] and R[rB]; the
// multiplexers sit at the register file's write inputs (which register, and
// whether the value comes from R[rA], the constant or the data memory) and at
// the PC input (length 1, 2 or 10). The data address is R[rB] + D, computed by
// an adder. One instruction per cycle; the data-memory write and the register
// write happen at the end of it.
//
// Status: AOK for the six known instructions, HLT for halt, INS otherwise, ADR
// when the instruction or the data word lies outside memory; once not AOK the
// processor keeps all its state. The instruction layouts follow the document
// this design is based on; nop/halt support, the status logic and the shared
// instruction/data memory (a store is seen by later fetches) are this design's
// choices, made to match the full processor.
//
// Interface: clk, rst (synchronous, active high); pc, stat and the register
// contents show the state; retire pulses for each instruction completed.
module mov_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic  clk,
  input  logic  rst,
  output word_t pc,
  output stat_t stat,
  output word_t regs [NUM_REGS],
  output logic  retire
);

  logic [79:0] ibytes;
  logic        imem_error, dmem_error;
  logic [3:0]  icode, ifun;
  regid_t      rA, rB, dstE;
  word_t       valC, valA, valB, valM, valE, addr, valP;
  logic        mem_read, mem_write, run, known;
  stat_t       instr_stat;

  assign icode = imem_error ? 4'(I_NOP) : ibytes[7:4];
  assign ifun  = ibytes[3:0];
  assign rA    = ibytes[15:12];
  assign rB    = ibytes[11:8];
  assign valC  = ibytes[79:16];

  assign mem_read  = (icode == I_MRMOVQ);
  assign mem_write = (icode == I_RMMOVQ);
  assign addr      = valB + valC;

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk       (clk),
    .iaddr     (pc),
    .ibytes    (ibytes),
    .imem_error(imem_error),
    .daddr     (addr),
    .dread     (mem_read),
    .dwrite    (mem_write),
    .dcommit   (run),
    .dwdata    (valA),
    .drdata    (valM),
    .dmem_error(dmem_error)
  );

  always_comb begin
    dstE = REG_NONE;
    valE = valA;
    valP = pc + 64'd1;
    known = (ifun == 4'h0);
    unique case (icode)
      I_RRMOVQ: begin dstE = rB; valE = valA; valP = pc + 64'd2;  end
      I_IRMOVQ: begin dstE = rB; valE = valC; valP = pc + 64'd10; end
      I_RMMOVQ, I_MRMOVQ:              valP = pc + 64'd10;
      I_NOP, I_HALT: ;
      default: known = 1'b0;
    endcase
  end

  always_comb begin
    if (imem_error || dmem_error) instr_stat = STAT_ADR;
    else if (!known)              instr_stat = STAT_INS;
    else if (icode == I_HALT)     instr_stat = STAT_HLT;
    else                          instr_stat = STAT_AOK;
  end

  assign run    = (stat == STAT_AOK) && (instr_stat == STAT_AOK);
  assign retire = run;

  y86_regfile u_regfile (
    .clk     (clk),
    .rst     (rst),
    .wen     (run),
    .srcA    (rA),
    .srcB    (rB),
    .valA    (valA),
    .valB    (valB),
    .dstE    (dstE),
    .valE    (valE),
    .dstM    (mem_read ? rA : REG_NONE),
    .valM    (valM),
    .regs_out(regs)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc   <= '0;
      stat <= STAT_AOK;
    end else if (stat == STAT_AOK) begin
      stat <= instr_stat;
      if (run) pc <= valP;
    end
  end

endmodule

// nophalt_cpu: the smallest processor of the series, which runs only nop and
// halt.
//
// Every instruction it knows is one byte long, so the PC register (thePc)
// simply adds 1 each cycle. The opcode, the upper nibble of the byte at thePc,
// selects through a multiplexer the value of the Stat register: AOK for nop,
// HLT for halt and INS for anything else (the default case). The processor
// stops once Stat is no longer AOK: from then on thePc and Stat keep their
// values, as if the clock had been stopped. One instruction per cycle.
//
// The "add 1" incrementer, the opcode extraction, the three-way status choice
// and the Stat register follow the nop/halt processor's block diagram; freezing
// the state after a stop stands in for the simulation environment halting the
// clock and is this design's choice. The instruction memory is the shared byte
// memory with only its instruction port used; a fetch past its end reads zero
// bytes, which decode as halt.
//
// Interface: clk, rst (synchronous, active high); the_pc and stat show the
// state; retire pulses for each instruction executed while running.
module nophalt_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic  clk,
  input  logic  rst,
  output word_t the_pc,
  output stat_t stat,
  output logic  retire
);

  logic [79:0] ibytes;
  logic [3:0]  opcode;
  stat_t       next_stat;
  word_t       unused_drdata;
  logic        unused_imem_error, unused_dmem_error;

  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk       (clk),
    .iaddr     (the_pc),
    .ibytes    (ibytes),
    .imem_error(unused_imem_error),
    .daddr     ('0),
    .dread     (1'b0),
    .dwrite    (1'b0),
    .dcommit   (1'b0),
    .dwdata    ('0),
    .drdata    (unused_drdata),
    .dmem_error(unused_dmem_error)
  );

  assign opcode = ibytes[7:4];

  always_comb begin
    unique case (opcode)
      I_NOP:   next_stat = STAT_AOK;
      I_HALT:  next_stat = STAT_HLT;
      default: next_stat = STAT_INS;
    endcase
  end

  assign retire = (stat == STAT_AOK);

  always_ff @(posedge clk) begin
    if (rst) begin
      the_pc <= '0;
      stat   <= STAT_AOK;
    end else if (stat == STAT_AOK) begin
      the_pc <= the_pc + 64'd1;
      stat   <= next_stat;
    end
  end

endmodule

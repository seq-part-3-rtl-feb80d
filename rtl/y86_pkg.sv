// y86_pkg: shared types and constants of the Y86-64 single-cycle (SEQ) processor.
//
// Holds the instruction codes (icode, the upper nibble of the first instruction
// byte), the ALU function codes and condition codes (ifun, the lower nibble),
// the register numbers that have a fixed meaning (%rsp and the "no register"
// number 0xF), and the processor status codes.
//
// The icodes 2 (rrmovq/cmovXX), 3 (irmovq), 4 (rmmovq) and 5 (mrmovq) and the
// dummy register 0xF are the ones printed in the instruction layouts this design
// follows; the remaining icodes, the ALU and condition function codes, the
// register numbers and the status encoding follow the standard Y86-64
// instruction set, so that machine code assembled by the usual Y86-64 tools runs
// unchanged.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  regid_t;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX (ifun != 0)
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_AND = 4'h2,
    ALU_XOR = 4'h3
  } alufun_t;

  // Condition function codes for jXX and cmovXX (the ifun nibble).
  typedef enum logic [3:0] {
    C_ALWAYS = 4'h0,
    C_LE     = 4'h1,
    C_L      = 4'h2,
    C_E      = 4'h3,
    C_NE     = 4'h4,
    C_GE     = 4'h5,
    C_G      = 4'h6
  } cond_t;

  typedef enum logic [2:0] {
    STAT_AOK = 3'd1,   // running normally
    STAT_HLT = 3'd2,   // halt instruction executed
    STAT_ADR = 3'd3,   // instruction or data address out of range
    STAT_INS = 3'd4    // invalid instruction
  } stat_t;

  // Condition code register: zero, sign and overflow flags.
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  localparam regid_t REG_RSP  = 4'h4;
  localparam regid_t REG_NONE = 4'hF;

  localparam int NUM_REGS = 15;

endpackage

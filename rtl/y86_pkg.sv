// y86_pkg: constants and types shared by the Y86-64 single-cycle processors.
//
// Instruction codes follow the Y86-64 encoding table: the icode is the high
// nibble of byte 0, the function code (ifun) the low nibble; byte 1 holds rA in
// its high nibble and rB in its low nibble; bytes 2..9 hold the 64-bit
// constant V or displacement D (little-endian), except for jXX and call where
// the destination occupies bytes 1..8.  Status values are numbered as the
// course simulator prints them (AOK is 1).  The ALU function numbers are the
// usual Y86-64 ones (add 0, sub 1, and 2, xor 3); they are this design's choice.
package y86_pkg;

  localparam int unsigned WORD_W   = 64;   // register and data width
  localparam int unsigned IBYTES   = 10;   // longest instruction, bytes
  localparam int unsigned IWORD_W  = 8 * IBYTES;
  localparam int unsigned NUM_REGS = 15;   // %rax .. %r14

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [IWORD_W-1:0] iword_t;
  typedef logic [3:0]         regnum_t;

  // register number 0xF: no register (no read, no write)
  localparam regnum_t REG_NONE = 4'hF;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  typedef enum logic [2:0] {
    STAT_AOK = 3'd1,   // keep going
    STAT_HLT = 3'd2,   // normal shutdown
    STAT_ADR = 3'd3,   // bad address
    STAT_INS = 3'd4    // invalid instruction
  } stat_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_AND = 4'h2,
    ALU_XOR = 4'h3
  } alu_fn_e;

  // Fields of the 80-bit fetched word (bit 0 = LSB of the first byte).
  typedef struct packed {
    logic [3:0] icode;   // bits 7:4
    logic [3:0] ifun;    // bits 3:0
    regnum_t    rA;      // bits 15:12
    regnum_t    rB;      // bits 11:8
    word_t      valC;    // bits 79:16 (V or D)
    word_t      dest;    // bits 71:8  (jXX / call destination)
  } instr_t;

  function automatic instr_t decode(input iword_t w);
    instr_t d;
    d.icode = w[7:4];
    d.ifun  = w[3:0];
    d.rA    = w[15:12];
    d.rB    = w[11:8];
    d.valC  = w[79:16];
    d.dest  = w[71:8];
    return d;
  endfunction

  // Byte-wide program loader port, written into instruction and data memory.
  typedef struct packed {
    logic       en;
    word_t      addr;
    logic [7:0] data;
  } mem_load_t;

endpackage

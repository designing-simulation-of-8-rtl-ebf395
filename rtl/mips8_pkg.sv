// mips8_pkg: widths, instruction fields and the decode-register record shared
// by the blocks of the 8-bit RISC processor.
//
// Instruction word (19 bits, MSB first):
//   register format  : 00 | fn[2:0] | rd[2:0] | r1[2:0] | r2[2:0] | xxxxx
//   immediate format : 01 | fn[2:0] | rd[2:0] | r1[2:0] | const[7:0]
// The two format codes, the field order, the 19-bit word, the 8-bit data path,
// the 3-bit shift amount, the 12-bit program counter and the eight registers
// r0..r7 follow the original description. The 3-bit fn width and the 8-bit constant follow
// from the 19-bit word. The meaning of each fn code is this design's choice:
// add, add-with-carry, subtract, subtract-with-borrow, and, or, xor, shift.
// A shift takes its amount from bits [2:0] and its direction from bit [3] of
// the word (1 = left) in both formats. Format codes 10 and 11 are reserved and
// execute as no-operation.
package mips8_pkg;

  localparam int unsigned XLEN  = 8;   // data path width
  localparam int unsigned ILEN  = 19;  // instruction width
  localparam int unsigned PC_W  = 12;  // program counter width
  localparam int unsigned RA_W  = 3;   // register address width (r0..r7)
  localparam int unsigned NREG  = 8;

  typedef logic [XLEN-1:0] data_t;
  typedef logic [ILEN-1:0] instr_t;
  typedef logic [PC_W-1:0] pc_t;
  typedef logic [RA_W-1:0] raddr_t;

  typedef enum logic [1:0] {
    FMT_REG  = 2'b00,
    FMT_IMM  = 2'b01,
    FMT_RSV2 = 2'b10,
    FMT_RSV3 = 2'b11
  } fmt_e;

  typedef enum logic [2:0] {
    FN_ADD   = 3'd0,
    FN_ADC   = 3'd1,
    FN_SUB   = 3'd2,
    FN_SBB   = 3'd3,
    FN_AND   = 3'd4,
    FN_OR    = 3'd5,
    FN_XOR   = 3'd6,
    FN_SHIFT = 3'd7
  } fn_e;

  // Contents of the decode register: everything the execution stage needs.
  typedef struct packed {
    logic   valid;      // a real instruction (0 = bubble)
    logic   wr_en;      // writes rd (valid and rd != r0)
    fn_e    fn;
    raddr_t rd;
    raddr_t r1;
    raddr_t r2;
    logic   use_imm;    // second ALU operand is the constant
    data_t  imm;
    logic   shl;        // shift direction, 1 = left
    logic [2:0] shamt;  // shift amount
    pc_t    pc;         // address the instruction was fetched from
  } ctrl_t;

  localparam ctrl_t CTRL_BUBBLE = '{valid: 1'b0, wr_en: 1'b0, fn: FN_ADD,
                                    rd: '0, r1: '0, r2: '0, use_imm: 1'b0,
                                    imm: '0, shl: 1'b0, shamt: '0, pc: '0};

  // Assemblers used by testbenches and by anyone writing programs.
  function automatic instr_t enc_reg(fn_e fn, raddr_t rd, raddr_t r1, raddr_t r2,
                                     logic [4:0] low = 5'd0);
    return {FMT_REG, fn, rd, r1, r2, low};
  endfunction

  function automatic instr_t enc_imm(fn_e fn, raddr_t rd, raddr_t r1, data_t k);
    return {FMT_IMM, fn, rd, r1, k};
  endfunction

endpackage

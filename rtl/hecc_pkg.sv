// hecc_pkg: types and constants shared by the (H)ECC crypto-processor.
//
// The processor works on elements of GF(p) stored as NW words of W = 32 bits
// (w = 32 is the word size of the small processors). Instructions are 25 bits wide.
// The instruction set follows the assembly language of the processor: read,
// launch, wait, write and set. The field layout, the opcode numbers and the
// control-flow instructions (jmp, nextd, jtab, recode, halt) that walk the key
// digits are choices of this design.
//
// Instruction word (25 bits):
//   [24:21] opcode  [20:16] fu  [15:8] a  [7:0] b
//   read   fu, a, b : load element a into operand A and element b into operand B of unit fu
//   launch fu       : start unit fu
//   wait   fu       : stall until unit fu is idle
//   write  fu, a    : store the result of unit fu into element a
//   set    reg, b   : reg 0 = OPMODE of the adder/subtracter (b[0]: 0 add, 1 subtract)
//   jmp    t        : pc = t, t = {a, b}
//   nextd  t        : take the next key digit (most significant first); pc = t if none is left
//   jtab   t        : pc = t + (digit + 8), a 16-entry jump table indexed by the signed digit
//   recode          : start the recoding unit on the loaded scalar and wait until it is done
//   halt            : stop, raise done
package hecc_pkg;

  localparam int unsigned W          = 32;
  localparam int unsigned INSTR_BITS = 25;
  localparam int unsigned FU_BITS    = 5;
  localparam int unsigned ELEM_BITS  = 8;   // 256 field elements in the points memory
  localparam int unsigned DIGIT_BITS = 4;   // signed key digit, |d| <= 7 for 4NAF

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_READ   = 4'd1,
    OP_LAUNCH = 4'd2,
    OP_WAIT   = 4'd3,
    OP_WRITE  = 4'd4,
    OP_SET    = 4'd5,
    OP_JMP    = 4'd6,
    OP_NEXTD  = 4'd7,
    OP_JTAB   = 4'd8,
    OP_RECODE = 4'd9,
    OP_HALT   = 4'd10
  } opcode_e;

  typedef struct packed {
    opcode_e               op;
    logic [FU_BITS-1:0]    fu;
    logic [ELEM_BITS-1:0]  a;
    logic [ELEM_BITS-1:0]  b;
  } instr_t;

  // Functional-unit numbering: one adder/subtracter, one inverter, then the multipliers.
  localparam int unsigned FU_ADDSUB = 0;
  localparam int unsigned FU_INV    = 1;
  localparam int unsigned FU_MUL0   = 2;

  // Key recoding methods.
  typedef enum logic [1:0] {
    REC_BIN  = 2'd0,   // standard binary, left to right
    REC_NAF  = 2'd1,   // non-adjacent form (window 2)
    REC_3NAF = 2'd2,   // window-3 NAF
    REC_4NAF = 2'd3    // window-4 NAF
  } recode_e;

  // -p^-1 mod 2^W, the Montgomery word constant, by Newton iteration
  // x <- x * (2 - p0 * x); p0 is its own inverse modulo 8, each step doubles the bits.
  function automatic logic [W-1:0] mont_neg_inv(input logic [W-1:0] p0);
    logic [W-1:0] x;
    x = p0;
    for (int i = 0; i < 4; i++) x = x * (W'(2) - p0 * x);
    return W'(0) - x;
  endfunction

endpackage

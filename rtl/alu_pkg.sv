// alu_pkg: shared operation codes of the 16-bit ALU.
// The 5-bit selection codes are the ALU's instruction table: 17 codes are
// used (00000 to 10000) and 15 (10001 to 11111) are free for new instructions.
// The encoding follows the source instruction table exactly; the names are
// this design's own.
package alu_pkg;

  typedef enum logic [4:0] {
    OP_NOT   = 5'b00000,  // ~inp1
    OP_AND   = 5'b00001,
    OP_OR    = 5'b00010,
    OP_NAND  = 5'b00011,
    OP_NOR   = 5'b00100,
    OP_XOR   = 5'b00101,
    OP_XNOR  = 5'b00110,
    OP_SHL   = 5'b00111,  // inp1 shifted left by one
    OP_SHR   = 5'b01000,  // inp1 shifted right by one
    OP_ROL   = 5'b01001,  // inp1 rotated left by one
    OP_ROR   = 5'b01010,  // inp1 rotated right by one
    OP_ADD   = 5'b01011,
    OP_SUB   = 5'b01100,
    OP_INC   = 5'b01101,  // inp1 + 1
    OP_DEC   = 5'b01110,  // inp1 - 1
    OP_MUL   = 5'b01111,  // sequential add-and-shift multiply
    OP_CMP   = 5'b10000   // {gt, eq, lt} of inp1 against inp2
  } alu_op_e;

endpackage

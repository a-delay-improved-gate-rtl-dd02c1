// asm_pkg: constants and types shared by the on-demand adder/subtractor.
//
// ASM_WIDTH is the word length of the adder/subtractor (32 bits, the size the
// design is evaluated at). BUF2_BITS is how many of the low-order XOR gates are
// driven by the second select buffer (buf2); the remaining high-order gates are
// driven by buf1. asm_op_e names the two values of the select input: add when
// low, two's complement subtract when high.
package asm_pkg;

  localparam int unsigned ASM_WIDTH = 32;
  localparam int unsigned BUF2_BITS = 15;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } asm_op_e;

endpackage

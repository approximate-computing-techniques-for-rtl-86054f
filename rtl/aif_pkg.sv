// aif_pkg: shared constants and types of the approximate integer format (AIF).
// An N-bit unsigned operand is cut into B blocks of K bits. Its sentinel bits
// form a thermometer code: bit i is 1 when block i or any block above it holds
// a '1' (a "valid" block). Only the PC leftmost valid blocks of an operand take
// part in an approximate add or multiply, so the arithmetic core is PC*K bits
// wide instead of N. The defaults (32-bit data, 8 blocks of 4 bits) are the
// configuration the applications were evaluated with; PC = 4 is this design's
// pick among the evaluated values 2..6.
package aif_pkg;
  parameter int unsigned AIF_N  = 32;
  parameter int unsigned AIF_B  = 8;
  parameter int unsigned AIF_PC = 4;

  // Operation selector of the AIF engine. AIF_SUB adds the negated second
  // operand and always works on two's-complement numbers.
  typedef enum logic [1:0] {
    AIF_ADD = 2'd0,
    AIF_SUB = 2'd1,
    AIF_MUL = 2'd2
  } aif_op_e;
endpackage

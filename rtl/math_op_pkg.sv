// math_op_pkg: shared types and constants of the factorial / permutation /
// combination operator hardware.
//
// DATA_W is the width of one register pair (HL, DE, BC, and the divider's Q
// and B). The pair naming follows the 8-bit register pairs of a small
// accumulator CPU, so a pair is taken to be 16 bits wide; this width is a
// design choice, the operator algorithms work for any width >= 2.
// The opcode enum is the "mnemonic" through which a program selects one of
// the added operators.
package math_op_pkg;

  parameter int unsigned DATA_W = 16;

  typedef enum logic [1:0] {
    OP_FACT = 2'd0,   // n!
    OP_PERM = 2'd1,   // nPr = n! / (n-r)!
    OP_COMB = 2'd2,   // nCr = nPr / r!
    OP_RSVD = 2'd3    // not an operator: answered with err
  } opcode_e;

endpackage

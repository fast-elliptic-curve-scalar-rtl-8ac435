// Shared constants and types of the pipelined redundant-representation
// GF(2^m) multiplier and of the double-and-add scalar multiplication
// sequencer.
//
// The field size m = 256 and the split of the nine XOR levels into a
// 3 + 3 + 3 arrangement (the first stage also holding the AND row) come from
// the design description.  The stage-width helper and the point-operation
// command encoding are choices of this implementation.
package wu_mult_pkg;

  // Default field size m.
  localparam int unsigned M_DEFAULT = 256;

  // XOR-tree levels placed after the AND row in stage 0.  Together with the
  // row of XOR gates on the operand ring, stage 0 holds three XOR levels.
  localparam int unsigned STAGE0_TREE_LEVELS = 2;

  // XOR-tree levels in stage 1.  Stage 2 reduces whatever is left (three
  // levels for 129 <= m <= 256).
  localparam int unsigned STAGE1_LEVELS = 3;

  // Number of outputs of a group of `levels` balanced binary XOR levels fed
  // with n inputs: ceil(n / 2^levels).
  function automatic int unsigned tree_width(input int unsigned n, input int unsigned levels);
    return (n + (1 << levels) - 1) >> levels;
  endfunction

  // Point operations requested by the scalar-multiplication sequencer.
  //   PT_COPY   : Q <- P
  //   PT_DOUBLE : Q <- 2Q
  //   PT_ADD    : Q <- Q + P
  typedef enum logic [1:0] {
    PT_COPY   = 2'd0,
    PT_DOUBLE = 2'd1,
    PT_ADD    = 2'd2
  } point_cmd_e;

endpackage

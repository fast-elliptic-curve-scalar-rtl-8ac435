// Stage 0 of the pipelined multiplier: the AND row and the first two
// XOR-tree levels.
//
// Input d_i is the XOR of the two operand-B cells of row i (the first XOR
// level, which sits on the operand ring), a_i the i-th coefficient of
// operand A.  Stage 0 forms the m products a_i & d_i and reduces them with
// two levels of XOR gates to ceil(m/4) partial sums, so that with the ring's
// XOR row the stage is one AND level and three XOR levels deep
// (T_A + 3 T_X, the slowest stage and hence the clock period).  For m = 256
// this yields the 64 partial sums held by the first pipeline register.
//
// The content of the stage follows the published pipeline split; nothing
// here is a local choice except the zero padding for m not divisible by 4.
//
// Purely combinational.  Bit i-1 of `a` and `d` holds coefficient i.
module wu_stage0 #(
  parameter int unsigned M = wu_mult_pkg::M_DEFAULT
) (
  input  logic [M-1:0]                                                  a,
  input  logic [M-1:0]                                                  d,
  output logic [wu_mult_pkg::tree_width(M, wu_mult_pkg::STAGE0_TREE_LEVELS)-1:0] s0
);

  logic [M-1:0] and_row;

  assign and_row = a & d;

  xor_tree_levels #(
    .N_IN  (M),
    .LEVELS(wu_mult_pkg::STAGE0_TREE_LEVELS)
  ) u_tree (
    .in_bits (and_row),
    .out_bits(s0)
  );

endmodule

// Top level: the field-arithmetic and control parts of an elliptic-curve
// scalar multiplier built around one three-stage pipelined GF(2^m)
// redundant-representation multiplier.
//
// Two parts stand side by side:
//   * pipelined_wu_multiplier: the bit-serial multiplier, one product
//     coefficient per clock, two pipeline registers inside, products
//     accepted back to back (one every m clocks).
//   * binary_scalar_mult_ctrl: the double-and-add sequencer for kP.
// The point-addition and point-doubling formulas that would connect them
// (a projective, Jacobian or Lopez-Dahab point unit using the multiplier)
// are not part of this RTL, so the sequencer's command interface and the
// multiplier's operand interface are both brought out as ports.  A point
// unit attached here would take the sequencer's commands and issue its
// field multiplications to the multiplier.
//
// Timing: see the two blocks.  M is the field size m (default 256).
module ecsm_pipelined_top #(
  parameter int unsigned M = wu_mult_pkg::M_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // field multiplier
  input  logic                    mul_in_valid,
  output logic                    mul_in_ready,
  input  logic [M-1:0]            mul_a,
  input  logic [M-1:0]            mul_b,
  output logic                    mul_out_valid,
  output logic [M-1:0]            mul_out_p,
  output logic                    mul_busy,
  // scalar multiplication sequencer
  input  logic                    ksm_start,
  input  logic [M-1:0]            ksm_k,
  output logic                    ksm_busy,
  output logic                    ksm_done,
  output logic                    ksm_infinity,
  // point-operation command interface
  output logic                    pt_cmd_valid,
  output wu_mult_pkg::point_cmd_e pt_cmd,
  input  logic                    pt_cmd_ready,
  input  logic                    pt_op_done
);

  pipelined_wu_multiplier #(.M(M)) u_mult (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mul_in_valid),
    .in_ready (mul_in_ready),
    .a        (mul_a),
    .b        (mul_b),
    .out_valid(mul_out_valid),
    .out_p    (mul_out_p),
    .busy     (mul_busy)
  );

  binary_scalar_mult_ctrl #(.M(M)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ksm_start),
    .k        (ksm_k),
    .busy     (ksm_busy),
    .done     (ksm_done),
    .infinity (ksm_infinity),
    .cmd_valid(pt_cmd_valid),
    .cmd      (pt_cmd),
    .cmd_ready(pt_cmd_ready),
    .op_done  (pt_op_done)
  );

endmodule

// Three-stage pipelined bit-serial GF(2^m) multiplier in redundant
// (permuted normal basis) representation.
//
// Operands and product are given by their m coefficients a_1..a_m,
// b_1..b_m and C_1..C_m in the basis {beta^i + beta^-i : 1 <= i <= m} with
// beta^(2m+1) = 1.  In it the product coefficients are
//     C_k = sum_{i=1..m} a_i (b_{k-i} + b_{k+i}),
// indices modulo 2m+1 and folded (b_{-j} = b_j, b_0 = 0).  Operand B sits in
// a (2m+1)-cell ring whose row XORs deliver b_{k-i} + b_{k+i}; operand A is
// held in a register and feeds m AND gates; an XOR tree sums the products.
// The ring rotates once per clock, so one coefficient C_k is produced per
// clock, C_1 first.
//
// The nine XOR levels of the tree for 129 <= m <= 256 are split into three
// pipeline stages with two registers between them:
//   stage 0: ring XOR row, AND row, 2 tree levels  -> ceil(m/4) bits (64)
//   stage 1: 3 tree levels                          -> ceil(m/32) bits (8)
//   stage 2: the remaining levels (3 for m = 256)   -> C_k
// The clock period is therefore set by stage 0 (T_A + 3 T_X) instead of the
// whole tree (T_A + 9 T_X).  The ring, the AND row, the XOR tree and the
// stage split with its 64- and 8-bit registers follow the published design.
// The valid/ready operand handshake, the bit counter, the output word
// register and reset behaviour are choices of this implementation.
//
// Interface:
//   in_valid/in_ready  operand handshake; a and b are taken when both are 1.
//                      in_ready is 1 when idle and in the cycle that
//                      computes the last coefficient of the running product,
//                      so products can follow each other without a gap.
//   out_valid          one-cycle pulse with the product in out_p.
// Bit i-1 of a, b and out_p holds coefficient i.
//
// Timing: a product accepted at clock edge t appears with out_valid after
// edge t + m + 2 (m cycles of stage 0 plus the two pipeline registers and the
// output register, minus the overlap of the first cycle); back-to-back
// products complete every m cycles.
module pipelined_wu_multiplier #(
  parameter int unsigned M = wu_mult_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         out_valid,
  output logic [M-1:0] out_p,
  output logic         busy
);

  import wu_mult_pkg::*;

  localparam int unsigned W0 = tree_width(M, STAGE0_TREE_LEVELS);
  localparam int unsigned W1 = tree_width(W0, STAGE1_LEVELS);
  localparam int unsigned L2 = $clog2(W1);
  localparam int unsigned CW = $clog2(M);

  // ---------------------------------------------------------------- control
  logic [CW-1:0] cnt;
  logic [M-1:0]  a_q;
  logic          last_bit;
  logic          accept;

  assign last_bit = busy && (cnt == CW'(M - 1));
  assign in_ready = !busy || last_bit;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      a_q  <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      cnt  <= '0;
      a_q  <= a;
    end else if (last_bit) begin
      busy <= 1'b0;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
    end
  end

  // ---------------------------------------------------------------- stage 0
  logic [M-1:0]  d;
  logic [W0-1:0] s0;

  wu_b_ring #(.M(M)) u_ring (
    .clk  (clk),
    .rst_n(rst_n),
    .load (accept),
    .shift(busy),
    .b    (b),
    .d    (d)
  );

  wu_stage0 #(.M(M)) u_stage0 (
    .a (a_q),
    .d (d),
    .s0(s0)
  );

  logic          v0, l0;
  logic [W0-1:0] r0;

  stage_latch #(.W(W0)) u_latch0 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (busy),
    .in_last  (last_bit),
    .in_data  (s0),
    .out_valid(v0),
    .out_last (l0),
    .out_data (r0)
  );

  // ---------------------------------------------------------------- stage 1
  logic [W1-1:0] s1;

  xor_tree_levels #(.N_IN(W0), .LEVELS(STAGE1_LEVELS)) u_stage1 (
    .in_bits (r0),
    .out_bits(s1)
  );

  logic          v1, l1;
  logic [W1-1:0] r1;

  stage_latch #(.W(W1)) u_latch1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v0),
    .in_last  (l0),
    .in_data  (s1),
    .out_valid(v1),
    .out_last (l1),
    .out_data (r1)
  );

  // ---------------------------------------------------------------- stage 2
  logic c_bit;

  xor_tree_levels #(.N_IN(W1), .LEVELS(L2)) u_stage2 (
    .in_bits (r1),
    .out_bits(c_bit)
  );

  product_collector #(.M(M)) u_collect (
    .clk          (clk),
    .rst_n        (rst_n),
    .bit_valid    (v1),
    .bit_last     (l1),
    .c_bit        (c_bit),
    .product      (out_p),
    .product_valid(out_valid)
  );

  // ------------------------------------------------------------- assertions
  // A presented operand pair stays unchanged until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(a) && $stable(b));

  // Exactly m coefficients per product: the counter never passes m-1.
  a_cnt : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> cnt <= CW'(M - 1));

endmodule

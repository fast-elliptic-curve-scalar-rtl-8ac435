// Serial-to-parallel output register of the bit-serial multiplier.
//
// The multiplier emits the product coefficients C_1, C_2, .., C_m one per
// valid cycle.  Each valid bit is shifted in from the top of an m-bit shift
// register, so after m bits C_k sits in bit k-1.  When the bit flagged
// `bit_last` (C_m) arrives, the complete product is copied into `product`
// and `product_valid` is high for one cycle.  The shift register keeps
// accepting bits in the very next cycle, so products may follow each other
// without a gap.
//
// The published structure ends at the serial output C_i; collecting the
// bits into a word is a choice of this implementation.
//
// Timing: `product` and `product_valid` appear one clock after C_m is
// presented.  `product` holds its value until the next product completes.
// Requires M >= 2.
module product_collector #(
  parameter int unsigned M = wu_mult_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_valid,
  input  logic         bit_last,
  input  logic         c_bit,
  output logic [M-1:0] product,
  output logic         product_valid
);

  // The M-1 most recent bits; together with the incoming bit they form
  // the shifted word.
  logic [M-2:0] shreg;
  logic [M-1:0] shifted;

  assign shifted = {c_bit, shreg};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg         <= '0;
      product       <= '0;
      product_valid <= 1'b0;
    end else begin
      product_valid <= 1'b0;
      if (bit_valid) begin
        shreg <= shifted[M-1:1];
        if (bit_last) begin
          product       <= shifted;
          product_valid <= 1'b1;
        end
      end
    end
  end

endmodule

// Pipeline register between two stages of the multiplier.
//
// Holds the W partial XOR sums of one product coefficient together with a
// valid flag and a flag marking the last coefficient C_m of a product.  Data
// is captured only in cycles that carry a valid coefficient, so the register
// does not toggle while the multiplier is idle; the flags are captured every
// cycle and cleared by reset.
//
// The placement and the widths (64 bits after stage 0 and 8 bits after
// stage 1 for m = 256) follow the published design, which speaks of latches;
// they are built here as edge-triggered registers.  The valid/last tags and
// the capture enable are choices of this implementation.
//
// Timing: one clock of latency.
module stage_latch #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_last,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic         out_last,
  output logic [W-1:0] out_data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid & in_last;
      if (in_valid) begin
        out_data <= in_data;
      end
    end
  end

endmodule

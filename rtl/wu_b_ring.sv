// Operand-B ring of the bit-serial redundant-representation multiplier.
//
// Operand B = (b_1 .. b_m) is stored as its palindromic image of length
// n = 2m + 1:  s_0 = 0, s_j = b_j and s_{n-j} = b_j for 1 <= j <= m.  The n
// cells form one circular shift register: cells 0 .. m-1 are the left column
// (b_0 .. b_{m-1}), cells m .. 2m-1 the right column read bottom-up
// (b_m, b_m, b_{m-1}, .., b_2) and cell 2m the single cell on top (b_1).
// Every shift moves the content of cell p into cell p+1 (mod n), the way the
// arrows of the structure run.  Row i (1 <= i <= m) has one XOR gate that
// combines left cell i-1 with right cell 2m-i.  After t shifts this gives
// d_i = b_{k-i} xor b_{k+i} with k = t + 1, where indices are taken modulo n
// and folded with b_{-j} = b_j and b_0 = 0: the pair that multiplies a_i in
// product coefficient C_k.
//
// The layout, the cell contents and the XOR row follow the published
// structure.  Reset value, the load port and the shift enable are choices of
// this implementation.
//
// Interface: `load` (priority) copies `b` into the ring; otherwise `shift`
// rotates it by one cell.  `d` is combinational from the ring.
// Bit i-1 of every vector holds coefficient i.
module wu_b_ring #(
  parameter int unsigned M = wu_mult_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [M-1:0] b,
  output logic [M-1:0] d
);

  localparam int unsigned N = 2 * M + 1;

  logic [N-1:0] ring;

  function automatic logic [N-1:0] palindrome(input logic [M-1:0] bb);
    logic [N-1:0] s;
    s = '0;
    for (int unsigned j = 1; j <= M; j++) begin
      s[j]     = bb[j-1];
      s[N - j] = bb[j-1];
    end
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ring <= '0;
    end else if (load) begin
      ring <= palindrome(b);
    end else if (shift) begin
      ring <= {ring[N-2:0], ring[N-1]};
    end
  end

  always_comb begin
    for (int unsigned i = 1; i <= M; i++) begin
      d[i-1] = ring[i-1] ^ ring[2*M - i];
    end
  end

endmodule

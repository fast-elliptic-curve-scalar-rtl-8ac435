// A group of balanced binary XOR-tree levels.
//
// N_IN inputs pass through LEVELS levels of two-input XOR gates; every level
// halves the number of signals, so output j is the XOR of inputs
// j*2^LEVELS .. j*2^LEVELS + 2^LEVELS - 1 (missing inputs count as 0).  The
// tree is built level by level so that its depth is exactly LEVELS gates.
// With LEVELS = 0 the inputs are passed on unchanged.
//
// Stage 1 of the pipelined multiplier is one such group with three levels;
// stage 2 is another that reduces its inputs to a single bit.  The groups of
// three levels follow the published pipeline split; the zero padding for
// widths that are not powers of two is a choice of this implementation.
//
// Purely combinational.
module xor_tree_levels #(
  parameter int unsigned N_IN   = 64,
  parameter int unsigned LEVELS = 3
) (
  input  logic [N_IN-1:0]                                      in_bits,
  output logic [((N_IN + (1 << LEVELS) - 1) >> LEVELS) - 1:0]  out_bits
);

  localparam int unsigned N_OUT = (N_IN + (1 << LEVELS) - 1) >> LEVELS;
  localparam int unsigned N_PAD = N_OUT << LEVELS;

  // lvl[l] holds the N_PAD >> l signals after l levels.
  logic [N_PAD-1:0] lvl [LEVELS+1];

  always_comb begin
    lvl[0] = '0;
    lvl[0][N_IN-1:0] = in_bits;
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      lvl[l] = '0;
      for (int unsigned j = 0; j < (N_PAD >> l); j++) begin
        lvl[l][j] = lvl[l-1][2*j] ^ lvl[l-1][2*j + 1];
      end
    end
    out_bits = lvl[LEVELS][N_OUT-1:0];
  end

endmodule

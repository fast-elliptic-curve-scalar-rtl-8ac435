// Checker used by tb_field_sizes: shows that pipelined_wu_multiplier with
// M = 5 (n = 11, where a type-II optimal normal basis exists) multiplies in
// the field GF(2^5).
//
// All 32 x 32 operand pairs are streamed through the multiplier back to
// back and the products are kept in a table.  A finite commutative ring
// with a unit and no zero divisors is a field, so the checker requires:
// the all-ones vector is the unit, the table is commutative, the product of
// two nonzero elements is never zero, every nonzero element has exactly one
// inverse, multiplication is associative (all triples) and distributes over
// addition (all triples), and the nonzero elements form a cyclic group of
// order 31 (some element has multiplicative order 31).
module field_table_check (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned M = 5;
  localparam int unsigned Q = 1 << M;
  localparam logic [M-1:0] ONE = '1;

  logic in_valid, in_ready, out_valid, busy;
  logic [M-1:0] a, b, out_p;

  pipelined_wu_multiplier #(.M(M)) dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b,
                                        .out_valid, .out_p, .busy);

  logic [M-1:0] tbl [Q][Q];
  int           n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      tbl[n_out / Q][n_out % Q] <= out_p;
      n_out <= n_out + 1;
    end
  end

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL GF(2^5): %s", what);
    end
  endtask

  initial begin
    int inv_count, ord;
    logic [M-1:0] p;
    logic ok, cyclic;
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0; a = '0; b = '0;
    @(posedge rst_n);
    for (int x = 0; x < int'(Q); x++) begin
      for (int y = 0; y < int'(Q); y++) begin
        @(negedge clk);
        a = M'(x); b = M'(y); in_valid = 1'b1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    end
    #1 in_valid = 1'b0;
    while (n_out < int'(Q * Q)) @(posedge clk);
    @(posedge clk);

    ok = 1'b1;
    for (int x = 0; x < int'(Q); x++) if (tbl[x][ONE] !== M'(x)) ok = 1'b0;
    expect_true(ok, "all-ones is not the unit");
    ok = 1'b1;
    for (int x = 0; x < int'(Q); x++)
      for (int y = 0; y < int'(Q); y++) if (tbl[x][y] !== tbl[y][x]) ok = 1'b0;
    expect_true(ok, "not commutative");
    ok = 1'b1;
    for (int x = 1; x < int'(Q); x++)
      for (int y = 1; y < int'(Q); y++) if (tbl[x][y] == '0) ok = 1'b0;
    expect_true(ok, "zero divisor");
    ok = 1'b1;
    for (int x = 1; x < int'(Q); x++) begin
      inv_count = 0;
      for (int y = 1; y < int'(Q); y++) if (tbl[x][y] == ONE) inv_count++;
      if (inv_count != 1) ok = 1'b0;
    end
    expect_true(ok, "an element without a unique inverse");
    ok = 1'b1;
    for (int x = 0; x < int'(Q); x++)
      for (int y = 0; y < int'(Q); y++)
        for (int z = 0; z < int'(Q); z++) begin
          if (tbl[tbl[x][y]][z] !== tbl[x][tbl[y][z]]) ok = 1'b0;
          if (tbl[x][M'(y) ^ M'(z)] !== (tbl[x][y] ^ tbl[x][z])) ok = 1'b0;
        end
    expect_true(ok, "not associative or not distributive");
    cyclic = 1'b0;
    for (int g = 1; g < int'(Q); g++) begin
      p = M'(g);
      ord = 1;
      while (p != ONE && ord < 40) begin
        p = tbl[p][g];
        ord++;
      end
      if (ord == 31) cyclic = 1'b1;
    end
    expect_true(cyclic, "no element of order 31");
    done = 1'b1;
  end

endmodule

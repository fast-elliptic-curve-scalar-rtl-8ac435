// Checker used by tb_field_sizes: runs one pipelined_wu_multiplier of field
// size M through NOPS random products, the first half offered back to back
// and the rest with random idle gaps.
//
// Each product is compared with a cyclic-convolution reference over
// GF(2)[x]/(x^n - 1), n = 2m + 1, on palindromic operands.  It also checks
// that A * A equals the squaring permutation of this basis (coefficient a_i
// moves to position 2i, folded into 1..m), that every result is registered
// m + 2 clocks after its operands are taken, and that back-to-back results
// are m clocks apart.  Counts are reported on the outputs; `done` rises
// when all products have been checked.
module mult_size_check #(
  parameter int unsigned M    = 160,
  parameter int unsigned NOPS = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned N = 2 * M + 1;

  logic in_valid, in_ready, out_valid, busy;
  logic [M-1:0] a, b, out_p;

  pipelined_wu_multiplier #(.M(M)) dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b,
                                        .out_valid, .out_p, .busy);

  function automatic logic [M-1:0] ref_mul(input logic [M-1:0] x, input logic [M-1:0] y);
    logic [N-1:0] px, py, pc;
    logic [M-1:0] c;
    px = '0; py = '0; pc = '0;
    for (int unsigned i = 1; i <= M; i++) begin
      px[i] = x[i-1]; px[N-i] = x[i-1];
      py[i] = y[i-1]; py[N-i] = y[i-1];
    end
    for (int unsigned i = 0; i < N; i++)
      if (px[i])
        for (int unsigned j = 0; j < N; j++)
          if (py[j]) pc[(i + j) % N] = ~pc[(i + j) % N];
    for (int unsigned k = 1; k <= M; k++) c[k-1] = pc[k];
    return c;
  endfunction

  function automatic logic [M-1:0] square_perm(input logic [M-1:0] x);
    logic [M-1:0] c;
    int unsigned  r;
    c = '0;
    for (int unsigned i = 1; i <= M; i++) begin
      r = (2 * i) % N;
      if (r > M) r = N - r;
      c[r-1] = x[i-1];
    end
    return c;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < int'(M); i++) v[i] = 1'($urandom);
    return v;
  endfunction

  logic [M-1:0] exp_q [$];
  longint       acc_q [$];
  logic         b2b_q [$];
  longint       cycle = 0;
  longint       prev_out = -1;
  int           n_out = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_q.push_back(ref_mul(a, b));
        acc_q.push_back(cycle);
        b2b_q.push_back(busy);
      end
      if (out_valid) begin
        logic [M-1:0] e;
        longint       t0;
        logic         bb;
        n_out++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL m=%0d unexpected result", M);
        end else begin
          e  = exp_q.pop_front();
          t0 = acc_q.pop_front();
          bb = b2b_q.pop_front();
          if (out_p !== e) begin
            failures++;
            $display("FAIL m=%0d product %h expected %h", M, out_p, e);
          end
          checks++;
          if (cycle - t0 != longint'(M) + 3) begin
            failures++;
            $display("FAIL m=%0d latency %0d", M, cycle - t0);
          end
          if (bb) begin
            checks++;
            if (cycle - prev_out != longint'(M)) begin
              failures++;
              $display("FAIL m=%0d spacing %0d", M, cycle - prev_out);
            end
          end
        end
        prev_out <= cycle;
      end
    end
  end

  task automatic issue(input logic [M-1:0] x, input logic [M-1:0] y);
    @(negedge clk);
    a = x; b = y; in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    logic [M-1:0] x;
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0; a = '0; b = '0;
    @(posedge rst_n);
    x = rnd();
    issue(x, x);
    while (!out_valid) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_p !== square_perm(x)) begin
      failures++;
      $display("FAIL m=%0d A*A is not the squaring permutation", M);
    end
    for (int p = 0; p < int'(NOPS) / 2; p++) issue(rnd(), rnd());
    for (int p = 0; p < int'(NOPS) / 2; p++) begin
      repeat ($urandom % (M + 4)) @(posedge clk);
      issue(rnd(), rnd());
    end
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (n_out != int'(NOPS) + 1) begin
      failures++;
      $display("FAIL m=%0d: %0d results", M, n_out);
    end
    done = 1'b1;
  end

endmodule

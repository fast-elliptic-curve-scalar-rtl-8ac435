// Self-checking testbench of pipelined_wu_multiplier.
//
// Reference: the product is worked out as a cyclic convolution.  Each
// operand (a_1..a_m) is mapped to the palindromic polynomial
// sum a_i (x^i + x^(n-i)) over GF(2), n = 2m+1; the two polynomials are
// multiplied modulo x^n - 1 and C_k is read from the coefficient of x^k.
// This follows from (x^i + x^-i)(x^j + x^-j) = (x^(i+j) + x^-(i+j)) +
// (x^(i-j) + x^-(i-j)) and shares nothing with the ring/XOR-tree structure
// of the block.
//
// Besides random operands it checks A * 1 = A (the one of this basis is the
// all-ones vector), commutativity, the latency (the result is registered
// m + 2 clocks after the accepting edge), one result every m clocks for back-to-back
// operands, and that an operand offered while the multiplier is busy is held
// off (in_ready low) and taken when the running product reaches its last
// coefficient.
module tb_pipelined_wu_multiplier;

  localparam int unsigned M = 29;
  localparam int unsigned N = 2 * M + 1;
  localparam int unsigned NOPS = 120;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_ready, out_valid, busy;
  logic [M-1:0] a, b, out_p;

  always #5 clk = ~clk;

  pipelined_wu_multiplier #(.M(M)) dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b,
                                        .out_valid, .out_p, .busy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] ref_mul(input logic [M-1:0] x, input logic [M-1:0] y);
    logic [N-1:0] px, py, pc;
    logic [M-1:0] c;
    px = '0; py = '0; pc = '0;
    for (int unsigned i = 1; i <= M; i++) begin
      px[i] = x[i-1]; px[N-i] = x[i-1];
      py[i] = y[i-1]; py[N-i] = y[i-1];
    end
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned j = 0; j < N; j++)
        if (px[i] && py[j]) pc[(i + j) % N] = ~pc[(i + j) % N];
    for (int unsigned k = 1; k <= M; k++) c[k-1] = pc[k];
    return c;
  endfunction

  // Scoreboard: expected products and the cycle each operand was accepted.
  logic [M-1:0] exp_q [$];
  longint       acc_q [$];
  longint       cycle = 0;
  longint       last_out = -1;
  int           n_out = 0;
  int           n_b2b = 0;
  int           n_stall = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        exp_q.push_back(ref_mul(a, b));
        acc_q.push_back(cycle);
        if (busy) n_b2b++;
      end
      if (in_valid && !in_ready) n_stall++;
      if (out_valid) begin
        logic [M-1:0] e;
        longint       t0;
        n_out++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          e  = exp_q.pop_front();
          t0 = acc_q.pop_front();
          if (out_p !== e) begin
            failures++;
            $display("FAIL product %h expected %h", out_p, e);
          end
          checks++;
          // out_valid rises right after edge t0 + m + 2 and is sampled
          // here on the following edge.
          if (cycle - t0 != longint'(M) + 3) begin
            failures++;
            $display("FAIL latency %0d expected %0d", cycle - t0, M + 3);
          end
        end
        last_out <= cycle;
      end
    end
  end

  task automatic issue(input logic [M-1:0] x, input logic [M-1:0] y);
    // Drive and look at in_ready between clock edges, where it is stable.
    @(negedge clk);
    a = x; b = y; in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    a = M'($urandom); b = M'($urandom);
  endtask

  initial begin
    logic [M-1:0] x, y;
    longint       t_prev;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Identity and commutativity.
    x = M'($urandom);
    y = M'($urandom);
    issue(x, '1);
    issue('1, x);
    issue(x, y);
    issue(y, x);
    issue('0, y);
    wait (exp_q.size() == 0);
    @(posedge clk);
    checks++;
    if (ref_mul(x, '1) !== x) begin
      failures++;
      $display("FAIL reference: A * 1 != A");
    end

    // Back-to-back stream: results must be exactly m clocks apart.
    t_prev = -1;
    fork
      begin
        for (int p = 0; p < NOPS / 2; p++) issue(M'($urandom), M'($urandom));
      end
      begin
        for (int p = 0; p < NOPS / 2; p++) begin
          do @(posedge clk); while (!out_valid);
          if (t_prev >= 0) begin
            checks++;
            if (cycle - t_prev != longint'(M)) begin
              failures++;
              $display("FAIL result spacing %0d expected %0d", cycle - t_prev, M);
            end
          end
          t_prev = cycle;
        end
      end
    join

    // Random gaps between operands.
    for (int p = 0; p < NOPS / 2; p++) begin
      repeat ($urandom % (M + 5)) @(posedge clk);
      #1;
      issue(M'($urandom), M'($urandom));
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);

    checks++;
    if (n_out != int'(NOPS) + 5) begin
      failures++;
      $display("FAIL %0d results, expected %0d", n_out, NOPS + 5);
    end
    checks++;
    if (n_b2b == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL back-to-back accepts %0d, held-off cycles %0d", n_b2b, n_stall);
    end
    $display("back-to-back accepts %0d, held-off cycles %0d", n_b2b, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// End-to-end testbench of ecsm_pipelined_top at its default size (m = 256).
//
// Two activities run at the same time, as they would in a scalar
// multiplier:
//   * A stream of field multiplications through the pipelined multiplier,
//     partly back to back and partly with idle gaps.  Products are compared
//     with a cyclic-convolution reference over GF(2)[x]/(x^n - 1),
//     n = 2m + 1, on palindromic operands; the result must be registered
//     m + 2 clocks after the operands are taken, and back-to-back results
//     must be m clocks apart.  A * 1 = A is checked with the all-ones unit,
//     and the two pipeline registers must be 64 and 8 bits wide.
//   * Scalar multiplications kP driven through the sequencer, with a
//     behavioural point unit that keeps Q as an integer multiple of P; at
//     the end the multiple must equal k.
// Every mechanism of the design is counted and must occur at least once:
// operand accepted from idle, operand accepted back to back, operand held
// off while busy, point copy, doubling and addition, a scalar with leading
// zero bits, k = 0 (point at infinity), and a point command held off.
module tb_ecsm_pipelined_top;

  import wu_mult_pkg::*;

  localparam int unsigned M = M_DEFAULT;
  localparam int unsigned N = 2 * M + 1;
  localparam int unsigned NMUL = 24;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic mul_in_valid, mul_in_ready, mul_out_valid, mul_busy;
  logic [M-1:0] mul_a, mul_b, mul_out_p;
  logic ksm_start, ksm_busy, ksm_done, ksm_infinity;
  logic [M-1:0] ksm_k;
  logic pt_cmd_valid, pt_cmd_ready, pt_op_done;
  point_cmd_e pt_cmd;

  always #5 clk = ~clk;

  ecsm_pipelined_top dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
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

  // ------------------------------------------------- multiplier scoreboard
  logic [M-1:0] exp_q [$];
  longint       acc_q [$];
  longint       cycle = 0;
  logic         b2b_q [$];
  longint       prev_out = -1;
  int n_mul_out = 0, n_acc_idle = 0, n_acc_b2b = 0, n_mul_held = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (mul_in_valid && mul_in_ready) begin
        exp_q.push_back(ref_mul(mul_a, mul_b));
        acc_q.push_back(cycle);
        b2b_q.push_back(mul_busy);
        if (mul_busy) n_acc_b2b++; else n_acc_idle++;
      end
      if (mul_in_valid && !mul_in_ready) n_mul_held++;
      if (mul_out_valid) begin
        logic [M-1:0] e;
        longint       t0;
        logic         b2b;
        n_mul_out++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected product");
        end else begin
          e  = exp_q.pop_front();
          t0 = acc_q.pop_front();
          b2b = b2b_q.pop_front();
          if (mul_out_p !== e) begin
            failures++;
            $display("FAIL product %h expected %h", mul_out_p, e);
          end
          // Registered m + 2 clocks after the accepting edge, seen here on
          // the following edge.
          checks++;
          if (cycle - t0 != longint'(M) + 3) begin
            failures++;
            $display("FAIL latency %0d", cycle - t0);
          end
          // A product whose operands were taken back to back follows the
          // previous one by exactly m clocks.
          if (b2b) begin
            checks++;
            if (cycle - prev_out != longint'(M)) begin
              failures++;
              $display("FAIL spacing %0d", cycle - prev_out);
            end
          end
        end
        prev_out <= cycle;
      end
    end
  end

  task automatic mul_issue(input logic [M-1:0] x, input logic [M-1:0] y);
    @(negedge clk);
    mul_a = x; mul_b = y; mul_in_valid = 1'b1;
    while (!mul_in_ready) @(negedge clk);
    @(posedge clk);
    #1;
    mul_in_valid = 1'b0;
  endtask

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < int'(M); i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  // --------------------------------------------------- behavioural point unit
  logic [M:0] q;
  int n_copy = 0, n_dbl = 0, n_add = 0, n_cmd_held = 0, n_lead0 = 0, n_inf = 0;
  int busy_cnt;
  point_cmd_e pending;

  always @(posedge clk) begin
    if (!rst_n) begin
      pt_cmd_ready <= 1'b0;
      pt_op_done   <= 1'b0;
      busy_cnt     <= 0;
    end else begin
      pt_op_done <= 1'b0;
      if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) begin
          unique case (pending)
            PT_COPY:   begin q <= 1;      n_copy++; end
            PT_DOUBLE: begin q <= q << 1; n_dbl++;  end
            PT_ADD:    begin q <= q + 1;  n_add++;  end
            default: ;
          endcase
          pt_op_done <= 1'b1;
        end
      end else if (pt_cmd_valid && pt_cmd_ready) begin
        pending      <= pt_cmd;
        busy_cnt     <= 1 + ($urandom % 3);
        pt_cmd_ready <= 1'b0;
      end else begin
        if (pt_cmd_valid && !pt_cmd_ready) n_cmd_held++;
        pt_cmd_ready <= ($urandom % 2) != 0;
      end
    end
  end

  task automatic ksm_run(input logic [M-1:0] kk);
    @(negedge clk);
    while (ksm_busy) @(negedge clk);
    ksm_k = kk; ksm_start = 1'b1;
    @(negedge clk);
    ksm_start = 1'b0;
    while (!ksm_done) @(negedge clk);
    checks++;
    if (kk == '0) begin
      n_inf++;
      if (!ksm_infinity) begin
        failures++;
        $display("FAIL k = 0 did not give the point at infinity");
      end
    end else begin
      if (!kk[M-1]) n_lead0++;
      if (ksm_infinity || q !== {1'b0, kk}) begin
        failures++;
        $display("FAIL k=%h gave %h P", kk, q);
      end
    end
  endtask

  // ------------------------------------------------------------- stimulus
  initial begin
    logic [M-1:0] x;
    rst_n = 1'b0; mul_in_valid = 1'b0; mul_a = '0; mul_b = '0;
    ksm_start = 1'b0; ksm_k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Pipeline register widths for m = 256: 64 bits after stage 0 and
    // 8 bits after stage 1.
    checks += 2;
    if ($bits(dut.u_mult.r0) != 64 || $bits(dut.u_mult.r1) != 8) begin
      failures++;
      $display("FAIL pipeline registers are %0d and %0d bits", $bits(dut.u_mult.r0),
               $bits(dut.u_mult.r1));
    end
    fork
      begin
        x = rnd();
        mul_issue(x, '1);
        repeat (M + 10) @(posedge clk);
        checks++;
        if (mul_out_p !== x) begin
          failures++;
          $display("FAIL A * 1 != A");
        end
        for (int p = 0; p < int'(NMUL) / 2; p++) mul_issue(rnd(), rnd());
        for (int p = 0; p < int'(NMUL) / 2; p++) begin
          repeat ($urandom % (M + M / 2)) @(posedge clk);
          mul_issue(rnd(), rnd());
        end
        while (exp_q.size() != 0) @(posedge clk);
      end
      begin
        ksm_run('0);
        ksm_run(rnd() | (M'(1) << (M - 1)));
        ksm_run(rnd() >> 7);
        ksm_run(M'(1));
        ksm_run(M'(5));
      end
    join
    repeat (5) @(posedge clk);

    checks++;
    if (n_mul_out != int'(NMUL) + 1) begin
      failures++;
      $display("FAIL %0d products, expected %0d", n_mul_out, NMUL + 1);
    end
    $display("mechanisms: accept-from-idle %0d, back-to-back %0d, held-off %0d",
             n_acc_idle, n_acc_b2b, n_mul_held);
    $display("            copy %0d, double %0d, add %0d, leading-zero scalars %0d, k=0 %0d, command held %0d",
             n_copy, n_dbl, n_add, n_lead0, n_inf, n_cmd_held);
    checks++;
    if (n_acc_idle == 0 || n_acc_b2b == 0 || n_mul_held == 0 || n_copy == 0 || n_dbl == 0 ||
        n_add == 0 || n_lead0 == 0 || n_inf == 0 || n_cmd_held == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench of binary_scalar_mult_ctrl.
//
// A behavioural point unit stands in for the point arithmetic: it tracks Q
// as an integer multiple of P (Q = q P), so Q <- P sets q = 1, Q <- 2Q
// doubles q and Q <- Q + P adds one.  After each run q must equal k, and
// the numbers of doublings and additions must equal (bit length of k) - 1
// and (number of ones in k) - 1, the counts of the binary method.  The
// point unit takes commands after a random delay (so commands are held) and
// finishes them after a random latency.  k = 0 must end with the point at
// infinity and no command.
module tb_binary_scalar_mult_ctrl;

  import wu_mult_pkg::*;

  localparam int unsigned M = 16;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n, start, busy, done, infinity, cmd_valid, cmd_ready, op_done;
  logic [M-1:0] k;
  point_cmd_e   cmd;

  always #5 clk = ~clk;

  binary_scalar_mult_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .k, .busy, .done, .infinity,
                                        .cmd_valid, .cmd, .cmd_ready, .op_done);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural point unit.
  logic [M:0] q;
  int n_copy, n_dbl, n_add, n_held;
  int busy_cnt;
  point_cmd_e pending;

  always @(posedge clk) begin
    if (!rst_n) begin
      cmd_ready <= 1'b0;
      op_done   <= 1'b0;
      busy_cnt  <= 0;
    end else begin
      op_done <= 1'b0;
      if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) begin
          unique case (pending)
            PT_COPY:   begin q <= 1;      n_copy++; end
            PT_DOUBLE: begin q <= q << 1; n_dbl++;  end
            PT_ADD:    begin q <= q + 1;  n_add++;  end
            default: ;
          endcase
          op_done <= 1'b1;
        end
      end else if (cmd_valid && cmd_ready) begin
        pending   <= cmd;
        busy_cnt  <= 1 + ($urandom % 4);
        cmd_ready <= 1'b0;
      end else begin
        if (cmd_valid && !cmd_ready) n_held++;
        cmd_ready <= ($urandom % 3) != 0;
      end
    end
  end

  task automatic run(input logic [M-1:0] kk);
    int bitlen, ones;
    @(negedge clk);
    n_copy = 0; n_dbl = 0; n_add = 0; q = 'x;
    k = kk; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    k = M'($urandom);
    while (!done) @(negedge clk);
    bitlen = 0; ones = 0;
    for (int i = 0; i < int'(M); i++) if (kk[i]) begin bitlen = i + 1; ones++; end
    checks += 2;
    if (infinity !== (kk == '0)) begin
      failures++;
      $display("FAIL k=%h infinity=%b", kk, infinity);
    end
    if (kk != '0 && q !== {1'b0, kk}) begin
      failures++;
      $display("FAIL k=%h gave %h P", kk, q);
    end
    checks += 3;
    if (n_copy != int'(kk != '0)) begin
      failures++;
      $display("FAIL k=%h: %0d copies", kk, n_copy);
    end
    if (n_dbl != ((kk == '0) ? 0 : bitlen - 1)) begin
      failures++;
      $display("FAIL k=%h: %0d doublings, expected %0d", kk, n_dbl, bitlen - 1);
    end
    if (n_add != ((kk == '0) ? 0 : ones - 1)) begin
      failures++;
      $display("FAIL k=%h: %0d additions, expected %0d", kk, n_add, ones - 1);
    end
    @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL k=%h: not idle after done", kk);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; k = '0; n_held = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('0);
    run(M'(1));
    run(M'(2));
    run(M'(3));
    run('1);
    run(M'(1) << (M - 1));
    for (int t = 0; t < 200; t++) run(M'($urandom) >> ($urandom % M));
    checks++;
    if (n_held == 0) begin
      failures++;
      $display("FAIL no command was held off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Self-checking testbench of wu_b_ring.
//
// Loads random operands B, rotates the ring through more than a full turn
// and compares the row XORs with the multiplication rule worked out here
// directly: after t shifts row i must give b_{k-i} xor b_{k+i}, k = t+1,
// with indices folded into 1..m (b_0 = 0).  Also checks that the ring holds
// its content while shift is low and that load takes priority over shift.
module tb_wu_b_ring;

  localparam int unsigned M = 7;
  localparam int unsigned N = 2 * M + 1;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n, load, shift;
  logic [M-1:0] b, d;

  always #5 clk = ~clk;

  wu_b_ring #(.M(M)) dut (.clk, .rst_n, .load, .shift, .b, .d);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Coefficient b_j for any integer j: fold into 0..m using b_{-j} = b_j and
  // b_{n-j} = b_j.
  function automatic logic bf(input logic [M-1:0] bb, input int j);
    int r;
    r = j % int'(N);
    if (r < 0) r += N;
    if (r > int'(M)) r = N - r;
    return (r == 0) ? 1'b0 : bb[r-1];
  endfunction

  function automatic logic [M-1:0] expect_d(input logic [M-1:0] bb, input int k);
    logic [M-1:0] e;
    for (int i = 1; i <= int'(M); i++) e[i-1] = bf(bb, k - i) ^ bf(bb, k + i);
    return e;
  endfunction

  task automatic check(input logic [M-1:0] exp_d, input string what);
    checks++;
    if (d !== exp_d) begin
      failures++;
      $display("FAIL %s: d=%b expected %b", what, d, exp_d);
    end
  endtask

  initial begin
    logic [M-1:0] bb;
    rst_n = 1'b0; load = 1'b0; shift = 1'b0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check('0, "after reset");
    for (int trial = 0; trial < 20; trial++) begin
      bb = M'($urandom);
      if (trial == 0) bb = M'(1);
      @(negedge clk);
      b = bb; load = 1'b1; shift = 1'b1;   // load wins over shift
      @(negedge clk);
      load = 1'b0; shift = 1'b0;
      check(expect_d(bb, 1), "k=1 after load");
      @(negedge clk);
      check(expect_d(bb, 1), "hold without shift");
      for (int t = 1; t <= int'(N) + 3; t++) begin
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        check(expect_d(bb, t + 1), $sformatf("k=%0d", t + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Workload testbench: the pipelined multiplier at the key sizes evaluated
// for the design, m = 160, 180, 200 and 220, at m = 233 (a size in that
// range for which the basis is a true normal basis) and at the 5-bit size of
// the small example structure (m = 256 runs in tb_ecsm_pipelined_top).  Each
// size runs in its own mult_size_check, which checks products against an
// independent reference, the latency of m + 2 clocks and one product every
// m clocks when operands follow back to back.  field_table_check in
// addition shows from the complete product table that the m = 5
// multiplier is a GF(2^5) field multiplier.
module tb_field_sizes;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  always #5 clk = ~clk;

  localparam int NS = 7;
  logic done [NS];
  int   c    [NS];
  int   f    [NS];

  mult_size_check #(.M(5),   .NOPS(40)) u_m5   (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  mult_size_check #(.M(160), .NOPS(16)) u_m160 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  mult_size_check #(.M(180), .NOPS(16)) u_m180 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  mult_size_check #(.M(200), .NOPS(16)) u_m200 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  mult_size_check #(.M(220), .NOPS(16)) u_m220 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  mult_size_check #(.M(233), .NOPS(16)) u_m233 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  field_table_check                     u_gf32 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6]);
    for (int i = 0; i < NS; i++) begin
      checks   += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

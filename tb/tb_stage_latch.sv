// Self-checking testbench of stage_latch.
//
// Drives random data with random valid and last flags and checks, one clock
// later, that valid and last follow (last only with valid), that data is
// taken in valid cycles and held in the others, and that reset clears the
// flags.
module tb_stage_latch;

  localparam int unsigned W = 64;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_last, out_valid, out_last;
  logic [W-1:0] in_data, out_data;

  always #5 clk = ~clk;

  stage_latch #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_last, .in_data,
                            .out_valid, .out_last, .out_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    logic [W-1:0] held;
    logic         pv, pl;
    rst_n = 1'b0; in_valid = 1'b1; in_last = 1'b1; in_data = '1;
    @(negedge clk);
    expect_eq(W'(out_valid), '0, "valid after reset");
    expect_eq(W'(out_last), '0, "last after reset");
    expect_eq(out_data, '0, "data after reset");
    rst_n = 1'b1;
    held = '0;
    for (int t = 0; t < 1000; t++) begin
      in_valid = 1'($urandom);
      in_last  = 1'($urandom);
      in_data  = {$urandom, $urandom};
      pv = in_valid;
      pl = in_last;
      if (in_valid) held = in_data;
      @(negedge clk);
      expect_eq(W'(out_valid), W'(pv), "valid");
      expect_eq(W'(out_last), W'(pv & pl), "last");
      expect_eq(out_data, held, "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

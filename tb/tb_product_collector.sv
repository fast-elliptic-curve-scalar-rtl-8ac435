// Self-checking testbench of product_collector.
//
// Sends random m-bit products one coefficient at a time, C_1 first, with
// random idle cycles between bits and sometimes none between products.
// Checks that each product comes out in one word with C_k in bit k-1, that
// product_valid is a single-cycle pulse one clock after C_m, and that the
// word is held afterwards.
module tb_product_collector;

  localparam int unsigned M = 8;

  int checks = 0;
  int failures = 0;
  int pulses = 0;

  logic clk = 1'b0;
  logic rst_n, bit_valid, bit_last, c_bit, product_valid;
  logic [M-1:0] product;

  always #5 clk = ~clk;

  product_collector #(.M(M)) dut (.clk, .rst_n, .bit_valid, .bit_last, .c_bit,
                                  .product, .product_valid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && product_valid) pulses++;

  initial begin
    logic [M-1:0] word;
    rst_n = 1'b0; bit_valid = 1'b0; bit_last = 1'b0; c_bit = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 200; p++) begin
      word = M'($urandom);
      for (int k = 1; k <= int'(M); k++) begin
        bit_valid = 1'b1;
        bit_last  = (k == int'(M));
        c_bit     = word[k-1];
        @(negedge clk);
        bit_valid = 1'b0;
        bit_last  = 1'b0;
        c_bit     = 1'($urandom);
        checks++;
        if (product_valid !== (k == int'(M))) begin
          failures++;
          $display("FAIL product %0d bit %0d: product_valid=%b", p, k, product_valid);
        end
        if (k == int'(M)) begin
          checks++;
          if (product !== word) begin
            failures++;
            $display("FAIL product %0d: %b expected %b", p, product, word);
          end
        end
        if (k < int'(M) && ($urandom % 3) == 0) begin
          @(negedge clk);   // idle cycle between bits
          checks++;
          if (product_valid !== 1'b0) begin
            failures++;
            $display("FAIL product %0d: stray product_valid", p);
          end
        end
      end
      if (($urandom % 2) == 0) begin
        @(negedge clk);
        checks++;
        if (product !== word || product_valid !== 1'b0) begin
          failures++;
          $display("FAIL product %0d not held", p);
        end
      end
    end
    checks++;
    if (pulses != 200) begin
      failures++;
      $display("FAIL %0d product_valid pulses, expected 200", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

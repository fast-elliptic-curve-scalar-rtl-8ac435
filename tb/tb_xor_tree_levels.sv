// Self-checking testbench of xor_tree_levels.
//
// Two instances: 64 inputs through 3 levels (8 outputs, the stage-1 shape
// for m = 256) and 5 inputs reduced to one bit through 3 levels (padding
// case).  Each output is compared with the parity of its input group,
// counted one bit at a time.
module tb_xor_tree_levels;

  int checks = 0;
  int failures = 0;

  logic [63:0] in_a;
  logic [7:0]  out_a;
  logic [4:0]  in_b;
  logic        out_b;

  xor_tree_levels #(.N_IN(64), .LEVELS(3)) dut_a (.in_bits(in_a), .out_bits(out_a));
  xor_tree_levels #(.N_IN(5),  .LEVELS(3)) dut_b (.in_bits(in_b), .out_bits(out_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea;
    logic       eb;
    for (int trial = 0; trial < 400; trial++) begin
      in_a = {$urandom, $urandom};
      in_b = 5'($urandom);
      if (trial < 64) in_a = 64'd1 << trial;
      #1;
      ea = '0;
      for (int i = 0; i < 64; i++) if (in_a[i]) ea[i / 8] = ~ea[i / 8];
      eb = 1'b0;
      for (int i = 0; i < 5; i++) if (in_b[i]) eb = ~eb;
      checks += 2;
      if (out_a !== ea) begin
        failures++;
        $display("FAIL 64/3: in=%h out=%h expected %h", in_a, out_a, ea);
      end
      if (out_b !== eb) begin
        failures++;
        $display("FAIL 5/3: in=%b out=%b expected %b", in_b, out_b, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

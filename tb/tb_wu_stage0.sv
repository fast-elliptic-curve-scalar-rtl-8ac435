// Self-checking testbench of wu_stage0.
//
// Applies random and corner-case vectors a and d and compares each partial
// sum with the XOR of the four AND products a_i & d_i it covers, counted
// bit by bit here.  A width that is not a multiple of four checks the
// zero padding of the last group.
module tb_wu_stage0;

  localparam int unsigned M  = 37;
  localparam int unsigned W0 = (M + 3) / 4;

  int checks = 0;
  int failures = 0;

  logic [M-1:0]  a, d;
  logic [W0-1:0] s0;

  wu_stage0 #(.M(M)) dut (.a, .d, .s0);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W0-1:0] e;
    for (int trial = 0; trial < 300; trial++) begin
      a = M'({$urandom, $urandom});
      d = M'({$urandom, $urandom});
      if (trial == 0) begin a = '1; d = '1; end
      if (trial == 1) begin a = '1; d = M'(1) << (M - 1); end
      #1;
      e = '0;
      for (int i = 0; i < int'(M); i++) begin
        if (a[i] && d[i]) e[i / 4] = ~e[i / 4];
      end
      checks++;
      if (s0 !== e) begin
        failures++;
        $display("FAIL a=%h d=%h s0=%h expected %h", a, d, s0, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_avd_precompute: exhaustive self-check of the precompute-and-select
// magnitude path. For each 3-bit a and sign s the reference is a when s = 0
// and (8 - a) mod 8 when s = 1, with the carry set only for a = 000, s = 1
// (the most negative 4-bit input). Combinational: checked 1 ns after each
// change. A watchdog ends a hung run with a failure.
module tb_avd_precompute;

  localparam int unsigned W = 3;

  logic [W-1:0] a, sum;
  logic         s, cout;
  int checks = 0;
  int failures = 0;

  avd_precompute #(.W(W)) dut (.a(a), .s(s), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum, exp_c;
    for (int sv = 0; sv < 2; sv++) begin
      for (int av = 0; av < (1 << W); av++) begin
        a = W'(av);
        s = sv[0];
        #1;
        exp_sum = (sv == 1) ? (((1 << W) - av) % (1 << W)) : av;
        exp_c   = (sv == 1 && av == 0) ? 1 : 0;
        checks++;
        if (int'(sum) != exp_sum || int'(cout) != exp_c) begin
          failures++;
          $display("FAIL a=%0d s=%0d got sum=%0d c=%0d expected sum=%0d c=%0d",
                   av, sv, sum, cout, exp_sum, exp_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd_precompute

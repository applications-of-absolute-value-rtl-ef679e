// tb_avd_cond_invert: exhaustive self-check of the XOR conditional-inverter
// bank. Every 3-bit word is applied with s = 0 and s = 1; with s = 0 the
// output must equal the input, with s = 1 its bitwise complement (reference
// formed with arithmetic: 7 - a). The block is combinational, so outputs are
// checked 1 ns after each change, with no clock cycle of latency. A
// watchdog ends the run with a failure if it hangs.
module tb_avd_cond_invert;

  localparam int unsigned W = 3;

  logic [W-1:0] a, p;
  logic         s;
  int checks = 0;
  int failures = 0;

  avd_cond_invert #(.W(W)) dut (.a(a), .s(s), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_p;
    for (int sv = 0; sv < 2; sv++) begin
      for (int av = 0; av < (1 << W); av++) begin
        a = W'(av);
        s = sv[0];
        #1;
        exp_p = (sv == 1) ? ((1 << W) - 1 - av) : av;
        checks++;
        if (int'(p) != exp_p) begin
          failures++;
          $display("FAIL a=%0d s=%0d p=%0d expected %0d", av, sv, p, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd_cond_invert

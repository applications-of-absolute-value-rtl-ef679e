// tb_avd_msb_ovf: self-check of the output-MSB/overflow stage in both modes.
// Every 4-bit input is applied to a pass-mode and a saturate-mode instance,
// together with the low magnitude bits and carry that a correct magnitude
// path produces for it (worked out here with integer arithmetic). In pass
// mode the output must be |a| (1000 for -8); in saturate mode |a|, or 0111
// for -8. ovf must be 1 for -8 only, and the overflow case must occur.
// Combinational: checked 1 ns after each change. A watchdog ends a hung run
// with a failure.
module tb_avd_msb_ovf;
  import avd_pkg::*;

  logic [3:0] a;
  logic [2:0] sum;
  logic       cout;
  logic [3:0] y_pass, y_sat;
  logic       ovf_pass, ovf_sat;
  int checks = 0;
  int failures = 0;
  int n_ovf = 0;

  avd_msb_ovf #(.OVF_MODE(AVD_OVF_PASS)) dut_pass (
    .a(a), .sum(sum), .cout(cout), .y(y_pass), .ovf(ovf_pass)
  );
  avd_msb_ovf #(.OVF_MODE(AVD_OVF_SATURATE)) dut_sat (
    .a(a), .sum(sum), .cout(cout), .y(y_sat), .ovf(ovf_sat)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d got %0d expected %0d", what, $signed(a), got, exp);
    end
  endtask

  initial begin
    int absv, is_min;
    for (int v = -8; v < 8; v++) begin
      absv   = (v < 0) ? -v : v;
      is_min = (v == -8) ? 1 : 0;
      a    = 4'(v);
      sum  = 3'(absv);
      cout = is_min[0];
      #1;
      check("pass y", int'(y_pass), absv);
      check("sat y", int'(y_sat), (is_min == 1) ? 7 : absv);
      check("pass ovf", int'(ovf_pass), is_min);
      check("sat ovf", int'(ovf_sat), is_min);
      if (ovf_pass) n_ovf++;
    end
    checks++;
    if (n_ovf != 1) begin
      failures++;
      $display("FAIL overflow seen %0d times, expected once", n_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd_msb_ovf

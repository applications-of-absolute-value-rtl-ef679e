// tb_avd4_top: end-to-end self-check of the absolute-value detector in all
// four configurations (XOR/ripple-carry or precompute/multiplexer magnitude
// path, pass or saturate overflow handling). Every 4-bit input is applied
// with every 3-bit threshold. The reference is computed with signed integer
// arithmetic: |a| (8 in pass mode and 7 in saturate mode for a = -8), the
// overflow flag set only for a = -8, spike = |a| > threshold.
//
// The mechanisms of the design are counted and each must occur: a positive
// input passed unchanged, a negative input negated, the carry rippling
// through the whole adder (overflow), saturation, a spike raised by a
// negative and by a positive sample, a sample below the threshold, and the
// two magnitude paths agreeing. An 8-bit instance is also checked
// exhaustively, to show that the width parameter scales. The design is combinational, so results are
// checked 1 ns after each input change (no clock-cycle latency). A watchdog
// ends a hung run with a failure.
module tb_avd4_top;
  import avd_pkg::*;

  localparam int unsigned N = 4;
  localparam int NCFG = 4;

  logic [N-1:0] a;
  logic [N-2:0] thr;
  logic [N-1:0] mag  [NCFG];
  logic         ovf  [NCFG];
  logic         spike[NCFG];

  int checks = 0;
  int failures = 0;
  int n_pos = 0, n_neg = 0, n_ovf = 0, n_sat = 0;
  int n_spike_neg = 0, n_spike_pos = 0, n_quiet = 0, n_agree = 0;

  avd4_top #(.N(N), .ARCH(AVD_XOR_RCA), .OVF_MODE(AVD_OVF_PASS)) dut_rca_pass (
    .a(a), .thr(thr), .mag(mag[0]), .ovf(ovf[0]), .spike(spike[0])
  );
  avd4_top #(.N(N), .ARCH(AVD_XOR_RCA), .OVF_MODE(AVD_OVF_SATURATE)) dut_rca_sat (
    .a(a), .thr(thr), .mag(mag[1]), .ovf(ovf[1]), .spike(spike[1])
  );
  avd4_top #(.N(N), .ARCH(AVD_PRECOMPUTE), .OVF_MODE(AVD_OVF_PASS)) dut_pre_pass (
    .a(a), .thr(thr), .mag(mag[2]), .ovf(ovf[2]), .spike(spike[2])
  );
  avd4_top #(.N(N), .ARCH(AVD_PRECOMPUTE), .OVF_MODE(AVD_OVF_SATURATE)) dut_pre_sat (
    .a(a), .thr(thr), .mag(mag[3]), .ovf(ovf[3]), .spike(spike[3])
  );

  // a wider instance: 8-bit samples, 7-bit threshold, default path and mode
  logic [7:0] a8;
  logic [6:0] thr8;
  logic [7:0] mag8;
  logic       ovf8, spike8;

  avd4_top #(.N(8)) dut_n8 (
    .a(a8), .thr(thr8), .mag(mag8), .ovf(ovf8), .spike(spike8)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int cfg, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cfg%0d %s a=%0d thr=%0d got %0d expected %0d",
               cfg, what, $signed(a), thr, got, exp);
    end
  endtask

  task automatic count(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int v, absv, exp_mag, exp_ovf, sat;
    for (int av = -(1 << (N-1)); av < (1 << (N-1)); av++) begin
      for (int t = 0; t < (1 << (N-1)); t++) begin
        a   = N'(av);
        thr = (N-1)'(t);
        #1;
        v    = av;
        absv = (v < 0) ? -v : v;
        for (int cfg = 0; cfg < NCFG; cfg++) begin
          sat     = cfg % 2;          // odd configurations saturate
          exp_ovf = (absv == (1 << (N-1))) ? 1 : 0;
          exp_mag = (exp_ovf == 1 && sat == 1) ? (1 << (N-1)) - 1 : absv;
          check("mag", cfg, int'(mag[cfg]), exp_mag);
          check("ovf", cfg, int'(ovf[cfg]), exp_ovf);
          check("spike", cfg, int'(spike[cfg]), (exp_mag > t) ? 1 : 0);
        end
        if (v >= 0 && int'(mag[0]) == v) n_pos++;
        if (v < 0 && v > -8 && int'(mag[0]) == -v) n_neg++;
        if (ovf[0]) n_ovf++;
        if (ovf[1] && mag[1] != mag[0]) n_sat++;
        if (spike[0] && v < 0) n_spike_neg++;
        if (spike[0] && v > 0) n_spike_pos++;
        if (!spike[0]) n_quiet++;
        if (mag[0] == mag[2] && mag[1] == mag[3]) n_agree++;
      end
    end
    // 8-bit instance, every sample against every threshold
    for (int av = -128; av < 128; av++) begin
      for (int t = 0; t < 128; t++) begin
        a8   = 8'(av);
        thr8 = 7'(t);
        #1;
        absv = (av < 0) ? -av : av;
        checks++;
        if (int'(mag8) != absv || int'(ovf8) != ((av == -128) ? 1 : 0) ||
            int'(spike8) != ((absv > t) ? 1 : 0)) begin
          failures++;
          $display("FAIL N=8 a=%0d thr=%0d mag=%0d ovf=%0d spike=%0d", av, t, mag8, ovf8, spike8);
        end
      end
    end
    $display("mechanism counts:");
    count("positive pass-through", n_pos);
    count("negative negation", n_neg);
    count("overflow (a = -8)", n_ovf);
    count("saturation to +7", n_sat);
    count("spike from negative sample", n_spike_neg);
    count("spike from positive sample", n_spike_pos);
    count("below threshold", n_quiet);
    count("both magnitude paths agree", n_agree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd4_top

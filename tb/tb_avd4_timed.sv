// tb_avd4_timed: self-check of the detector's timing model. The sign bit of
// the input is toggled (0000 -> 1111, i.e. 0 -> -1, and back, then other
// values): the outputs must keep their old value 10 ps before the modelled
// delay of 2400 ps and show the new value 10 ps after it, and the new value
// must be the integer |a|, the overflow flag and |a| > threshold. A second
// instance set to the 1.0 V delay of 1600 ps is checked the same way and must
// switch 800 ps earlier. A watchdog ends a hung run with a failure.
module tb_avd4_timed;

  logic [3:0] a;
  logic [2:0] thr;
  logic [3:0] mag, mag_fast;
  logic       ovf, spike, ovf_fast, spike_fast;
  int checks = 0;
  int failures = 0;

  avd4_timed dut (.a(a), .thr(thr), .mag(mag), .ovf(ovf), .spike(spike));
  avd4_timed #(.TPD_PS(1600)) dut_fast (
    .a(a), .thr(thr), .mag(mag_fast), .ovf(ovf_fast), .spike(spike_fast)
  );

  initial begin : watchdog
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0] expect_of(input int v, input int t);
    int absv = (v < 0) ? -v : v;
    return {4'(absv), 1'(v == -8), 1'(absv > t)};
  endfunction

  task automatic check(input string what, input logic [5:0] got, input logic [5:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $realtime, got, exp);
    end
  endtask

  initial begin
    static int seq[6] = '{-1, 0, -8, 7, -5, 3};
    logic [5:0] old_v, new_v;
    a   = 4'd0;
    thr = 3'd2;
    #5ns;
    old_v = expect_of(0, 2);
    foreach (seq[i]) begin
      new_v = expect_of(seq[i], 2);
      a = 4'(seq[i]);
      #1590ps;
      check("fast before", {mag_fast, ovf_fast, spike_fast}, old_v);
      #20ps;
      check("fast after", {mag_fast, ovf_fast, spike_fast}, new_v);
      check("slow before", {mag, ovf, spike}, old_v);
      #780ps;
      check("slow before", {mag, ovf, spike}, old_v);
      #20ps;
      check("slow after", {mag, ovf, spike}, new_v);
      #3ns;
      old_v = new_v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd4_timed

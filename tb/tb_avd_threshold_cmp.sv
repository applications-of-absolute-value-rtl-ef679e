// tb_avd_threshold_cmp: exhaustive self-check of the threshold comparator.
// Every 4-bit magnitude is compared against every 3-bit threshold; y must be
// 1 exactly when the magnitude is strictly larger. Both outcomes and the
// equality boundary are counted and must each occur. Combinational: checked
// 1 ns after each change. A watchdog ends a hung run with a failure.
module tb_avd_threshold_cmp;

  localparam int unsigned MW = 4;
  localparam int unsigned TW = 3;

  logic [MW-1:0] mag;
  logic [TW-1:0] thr;
  logic          y;
  int checks = 0;
  int failures = 0;
  int n_above = 0, n_equal = 0, n_below = 0;

  avd_threshold_cmp #(.MW(MW), .TW(TW)) dut (.mag(mag), .thr(thr), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < (1 << MW); m++) begin
      for (int t = 0; t < (1 << TW); t++) begin
        mag = MW'(m);
        thr = TW'(t);
        #1;
        checks++;
        if (y != (m > t)) begin
          failures++;
          $display("FAIL mag=%0d thr=%0d y=%0d", m, t, y);
        end
        if (m > t) n_above++;
        else if (m == t) n_equal++;
        else n_below++;
      end
    end
    checks++;
    if (n_above == 0 || n_equal == 0 || n_below == 0) begin
      failures++;
      $display("FAIL case not reached: above=%0d equal=%0d below=%0d", n_above, n_equal, n_below);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd_threshold_cmp

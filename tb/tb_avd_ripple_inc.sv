// tb_avd_ripple_inc: exhaustive self-check of the ripple-carry adder that
// adds the sign bit. All 3-bit words p with carry-in 0 and 1 are applied and
// {cout, sum} is compared with the integer p + cin. The carry must leave the
// top only for p = 111 with cin = 1 (the most negative input of the AVD);
// that case is counted and must occur. Combinational: checked 1 ns after
// each change. A watchdog ends a hung run with a failure.
module tb_avd_ripple_inc;

  localparam int unsigned W = 3;

  logic [W-1:0] p, sum;
  logic         cin, cout;
  int checks = 0;
  int failures = 0;
  int n_carry = 0;

  avd_ripple_inc #(.W(W)) dut (.p(p), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int c = 0; c < 2; c++) begin
      for (int pv = 0; pv < (1 << W); pv++) begin
        p   = W'(pv);
        cin = c[0];
        #1;
        exp_v = pv + c;
        checks++;
        if (int'({cout, sum}) != exp_v) begin
          failures++;
          $display("FAIL p=%0d cin=%0d got %0d expected %0d", pv, c, {cout, sum}, exp_v);
        end
        if (cout) n_carry++;
      end
    end
    checks++;
    if (n_carry != 1) begin
      failures++;
      $display("FAIL carry-out seen %0d times, expected once", n_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd_ripple_inc

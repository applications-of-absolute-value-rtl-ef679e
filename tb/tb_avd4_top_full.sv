// tb_avd4_top_full: the detector at its default configuration (4-bit input,
// XOR/ripple-carry path, overflow passed as 1000) used as a spike detector.
// A clocked stimulus feeds one sample per cycle: first every 4-bit value
// against every threshold, then a bipolar pulse train (positive and negative
// excursions of random height on a small random background, produced with
// $urandom). Each cycle the outputs are compared with |a| computed in integer
// arithmetic, and the spikes found are counted against the reference count.
// The output is sampled in the same cycle the sample is applied: the design
// has no clock latency. A watchdog ends a hung run with a failure.
module tb_avd4_top_full;

  localparam int NSAMPLES = 2000;

  logic       clk = 1'b0;
  logic [3:0] a;
  logic [2:0] thr;
  logic [3:0] mag;
  logic       ovf, spike;

  int checks = 0;
  int failures = 0;
  int exp_spikes = 0, got_spikes = 0, cycles = 0;

  avd4_top dut (.a(a), .thr(thr), .mag(mag), .ovf(ovf), .spike(spike));

  always #5 clk = ~clk;

  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (NSAMPLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int sample, input int t);
    int absv;
    @(negedge clk);
    a   = 4'(sample);
    thr = 3'(t);
    @(posedge clk);
    absv = (sample < 0) ? -sample : sample;
    checks++;
    if (int'(mag) != absv || int'(ovf) != ((sample == -8) ? 1 : 0) ||
        int'(spike) != ((absv > t) ? 1 : 0)) begin
      failures++;
      $display("FAIL a=%0d thr=%0d mag=%0d ovf=%0d spike=%0d", sample, t, mag, ovf, spike);
    end
    if (absv > t) exp_spikes++;
    if (spike) got_spikes++;
  endtask

  initial begin
    int sample, start;
    a   = '0;
    thr = '0;
    for (int v = -8; v < 8; v++)
      for (int t = 0; t < 8; t++)
        apply(v, t);
    start = cycles;
    for (int i = 0; i < NSAMPLES; i++) begin
      // background noise in -2..+2; about one sample in ten is a pulse
      sample = int'($urandom_range(4)) - 2;
      if ($urandom_range(9) == 0) begin
        sample = int'($urandom_range(8, 3));
        if ($urandom_range(1) == 1) sample = -sample;
        if (sample > 7) sample = 7;
      end
      apply(sample, 3);
    end
    checks++;
    if (cycles - start != NSAMPLES) begin
      failures++;
      $display("FAIL %0d samples took %0d cycles, expected one per cycle", NSAMPLES, cycles - start);
    end
    checks++;
    if (got_spikes != exp_spikes || got_spikes == 0) begin
      failures++;
      $display("FAIL spikes detected %0d, expected %0d", got_spikes, exp_spikes);
    end
    $display("spikes detected: %0d of %0d samples", got_spikes, NSAMPLES + 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_avd4_top_full

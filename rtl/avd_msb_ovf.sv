// avd_msb_ovf: output MSB and overflow stage of the absolute-value detector.
//
// For every input except the most negative one the magnitude fits in the
// bits below the sign and the output MSB is 0. The most negative input (1000
// for 4 bits) has no positive counterpart; the magnitude path then returns
// all zeros with a carry-out of 1. A dedicated gate recognises that input
// directly (sign set, all lower bits clear) and drives ovf. OVF_MODE chooses
// the output for it:
//   AVD_OVF_PASS (default) - MSB = ovf, so the output is 1000, the input
//                            unchanged, as simple detectors return it;
//   AVD_OVF_SATURATE       - the output is clamped to 0111 (+7).
// The magnitude path's carry-out must equal the detected overflow; an
// immediate assertion checks this in simulation. Purely combinational.
//
// W is the width of the magnitude path; the output is W+1 bits.
module avd_msb_ovf
  import avd_pkg::*;
#(
  parameter int unsigned W        = 3,
  parameter avd_ovf_e    OVF_MODE = AVD_OVF_PASS
) (
  input  logic [W:0]   a,     // detector input, sign bit a[W]
  input  logic [W-1:0] sum,   // magnitude path result y_{W-1}..y_0
  input  logic         cout,  // magnitude path carry-out (c_W)
  output logic [W:0]   y,     // magnitude y_W..y_0
  output logic         ovf    // input was the most negative value
);

  always_comb begin
    ovf = a[W] & ~(|a[W-1:0]);
    if (OVF_MODE == AVD_OVF_SATURATE) begin
      y = ovf ? {1'b0, {W{1'b1}}} : {1'b0, sum};
    end else begin
      y = {ovf, sum};
    end
  end

  always_comb begin
    assert #0 (cout == ovf)
      else $error("avd_msb_ovf: carry-out %b disagrees with overflow detect %b", cout, ovf);
  end

endmodule : avd_msb_ovf

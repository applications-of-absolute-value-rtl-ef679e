// avd_threshold_cmp: threshold comparator that follows the AVD.
//
// Raises y when the magnitude produced by the detector is strictly greater
// than the unsigned threshold thr, so a sample of either polarity whose size
// exceeds the threshold is flagged (spike detection independent of sign).
// The strict comparison is this design's choice. Since the magnitude has one
// bit more than the threshold, the most negative input (magnitude 1000 in
// pass mode) is always above any threshold. Purely combinational.
//
// MW is the magnitude width (4), TW the threshold width (3).
module avd_threshold_cmp #(
  parameter int unsigned MW = 4,
  parameter int unsigned TW = 3
) (
  input  logic [MW-1:0] mag,  // magnitude from the detector
  input  logic [TW-1:0] thr,  // threshold B
  output logic          y     // 1 when mag > thr
);

  localparam int unsigned CW = (MW > TW) ? MW : TW;

  always_comb begin
    y = CW'(mag) > CW'(thr);
  end

endmodule : avd_threshold_cmp

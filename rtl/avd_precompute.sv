// avd_precompute: precompute-and-select magnitude path of the AVD.
//
// Instead of inverting conditionally and then adding the sign, both
// candidate results are formed at once: the input bits below the sign
// unchanged (for s = 0), and their inverse plus one (for s = 1). A bank of
// 2:1 multiplexers steered by the sign picks one. The incrementer's carry-out
// is passed on only when s = 1; it is 1 exactly for the most negative input,
// so this module has the same outputs as avd_cond_invert followed by
// avd_ripple_inc. Purely combinational.
//
// W is the number of bits below the sign, 3 for the 4-bit detector.
module avd_precompute #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,     // input bits below the sign bit
  input  logic         s,     // sign of the input
  output logic [W-1:0] sum,   // magnitude bits y_{W-1}..y_0
  output logic         cout   // overflow carry, 1 only for the most negative input
);

  logic [W:0] neg;   // {carry, ~a + 1}

  always_comb begin
    neg  = {1'b0, ~a} + {{W{1'b0}}, 1'b1};
    sum  = s ? neg[W-1:0] : a;
    cout = s & neg[W];
  end

endmodule : avd_precompute

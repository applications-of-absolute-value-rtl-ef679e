// avd_ripple_inc: ripple-carry adder that adds the sign bit to the
// conditionally inverted word, completing the two's-complement negation.
//
// The sign s enters as the single-bit addend at bit 0. Bit 0 is a half adder
// of p_0 and s; every higher bit adds its p_i to the carry from below (the
// adder's second operand is zero there, so each stage is a half adder too).
// The carry out of the top bit, c_W, is 1 only when the inverted word was all
// ones and s = 1, i.e. for the most negative input; it is the overflow bit.
// Purely combinational: the carry ripples through W stages.
//
// W is the adder width, 3 for the 4-bit detector.
module avd_ripple_inc #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] p,     // conditionally inverted bits
  input  logic         cin,   // the sign bit s, added at the LSB
  output logic [W-1:0] sum,   // magnitude bits y_{W-1}..y_0
  output logic         cout   // carry out of the top stage (overflow bit)
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_stage
    avd_half_adder u_ha (
      .a     (p[i]),
      .b     (c[i]),
      .sum   (sum[i]),
      .carry (c[i+1])
    );
  end

  assign cout = c[W];

endmodule : avd_ripple_inc

// avd_cond_invert: the AVD's bank of controlled inverters.
//
// Each magnitude bit of the input passes through an XOR gate whose other
// input is the sign s: p_i = a_i xor s. For a non-negative input (s = 0) the
// bits pass unchanged; for a negative one (s = 1) they are inverted, the first
// half of forming the two's complement. Purely combinational, no clock.
//
// W is the number of bits below the sign bit, 3 for the 4-bit detector of the
// design.
module avd_cond_invert #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,   // input bits below the sign bit
  input  logic         s,   // sign of the input (its MSB)
  output logic [W-1:0] p    // conditionally inverted bits
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      p[i] = a[i] ^ s;
    end
  end

endmodule : avd_cond_invert

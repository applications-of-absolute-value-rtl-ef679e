// avd_half_adder: one-bit half adder, the cell of the AVD's increment chain.
//
// sum = a xor b, carry = a and b. Purely combinational. The ripple-carry
// adder of the AVD adds only the sign bit to the inverted word, so every
// stage sees a zero third operand and reduces to this cell.
module avd_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule : avd_half_adder

// avd4_top: 4-bit absolute-value detector with threshold output.
//
// The input a is an N-bit two's-complement sample. Its MSB is the sign s.
// The magnitude of the bits below the sign is formed in one of two ways
// (ARCH): XOR conditional inverters followed by a ripple-carry adder that
// adds s (default), or a precomputed "inverse plus one" chosen by a 2:1
// multiplexer. An output stage sets the magnitude MSB and flags the most
// negative input, which has no positive counterpart (OVF_MODE chooses whether
// that input comes out as 1000 or saturated to 0111). Finally the magnitude is
// compared with an (N-1)-bit threshold thr and spike is raised when it is
// larger.
//
// Everything is combinational: outputs follow a within one propagation
// delay, there is no clock and no reset. N = 4 and the 3-bit threshold follow
// the design; the parameters, the strict comparison and the mode encodings
// are this implementation's own.
module avd4_top
  import avd_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter avd_arch_e   ARCH     = AVD_XOR_RCA,
  parameter avd_ovf_e    OVF_MODE = AVD_OVF_PASS
) (
  input  logic [N-1:0] a,      // signed input sample
  input  logic [N-2:0] thr,    // unsigned threshold B
  output logic [N-1:0] mag,    // |a| (see OVF_MODE for the most negative a)
  output logic         ovf,    // a was the most negative value
  output logic         spike   // mag > thr
);

  localparam int unsigned W = N - 1;

  logic         s;       // sign detection: the MSB of the input
  logic [W-1:0] sum;
  logic         cout;

  assign s = a[N-1];

  if (ARCH == AVD_XOR_RCA) begin : g_xor_rca
    logic [W-1:0] p;

    avd_cond_invert #(.W(W)) u_inv (
      .a (a[W-1:0]),
      .s (s),
      .p (p)
    );

    avd_ripple_inc #(.W(W)) u_add (
      .p    (p),
      .cin  (s),
      .sum  (sum),
      .cout (cout)
    );
  end else begin : g_precompute
    avd_precompute #(.W(W)) u_pre (
      .a    (a[W-1:0]),
      .s    (s),
      .sum  (sum),
      .cout (cout)
    );
  end

  avd_msb_ovf #(.W(W), .OVF_MODE(OVF_MODE)) u_msb (
    .a    (a),
    .sum  (sum),
    .cout (cout),
    .y    (mag),
    .ovf  (ovf)
  );

  avd_threshold_cmp #(.MW(N), .TW(W)) u_cmp (
    .mag (mag),
    .thr (thr),
    .y   (spike)
  );

endmodule : avd4_top

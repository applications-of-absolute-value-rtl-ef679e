// avd4_timed: behavioural model (not synthesizable logic) of the transistor-
// level detector after logical-effort sizing and supply scaling.
//
// The logic function is that of avd4_top, instantiated inside. What this
// model adds is the propagation delay of the sized circuit: every output
// follows an input change after TPD_PS picoseconds (a delayed continuous
// assignment; inputs should be held for longer than the delay, since how a
// shorter pulse propagates depends on the simulator). The default of 2400 ps is the
// critical-path delay of the design at its scaled supply of 0.825 V; the
// delay at the nominal 1.0 V supply is about 1600 ps, a 1.5x slowdown that
// was traded for lower energy. Modelling the delay as a single value for
// every input pattern and output bit is this model's own simplification: the
// real circuit is fastest for inputs that do not ripple a carry.
//
// Ports are those of avd4_top. Use it in a testbench to see the detector's
// timing; use avd4_top for synthesis.
module avd4_timed
  import avd_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter avd_arch_e   ARCH     = AVD_XOR_RCA,
  parameter avd_ovf_e    OVF_MODE = AVD_OVF_PASS,
  parameter int unsigned TPD_PS   = 2400       // input-to-output delay
) (
  input  logic [N-1:0] a,
  input  logic [N-2:0] thr,
  output logic [N-1:0] mag,
  output logic         ovf,
  output logic         spike
);


  localparam realtime TPD = TPD_PS * 1ps;

  logic [N-1:0] mag_0;
  logic         ovf_0;
  logic         spike_0;

  avd4_top #(.N(N), .ARCH(ARCH), .OVF_MODE(OVF_MODE)) u_logic (
    .a     (a),
    .thr   (thr),
    .mag   (mag_0),
    .ovf   (ovf_0),
    .spike (spike_0)
  );

  assign #(TPD) mag   = mag_0;
  assign #(TPD) ovf   = ovf_0;
  assign #(TPD) spike = spike_0;

endmodule : avd4_timed

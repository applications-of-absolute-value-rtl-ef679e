// avd_pkg: types shared by the absolute-value detector (AVD) modules.
//
// avd_arch_e selects how the magnitude of the low bits is formed:
//   AVD_XOR_RCA    - XOR conditional inverters followed by a ripple-carry
//                    increment (the block diagram of the design, and the
//                    path whose stages were sized for the 1.5x delay target).
//   AVD_PRECOMPUTE - the inverted-plus-one value is precomputed and a 2:1
//                    multiplexer, steered by the sign, picks it or the
//                    unchanged bits (the gate-level circuit of the design).
// Both give the same result for every input.
//
// avd_ovf_e selects what happens to the one input with no positive
// counterpart, the most negative value (1000 for 4 bits):
//   AVD_OVF_PASS     - return 1000 unchanged, the carry-out becomes the MSB.
//   AVD_OVF_SATURATE - clamp the result to the largest positive value (0111).
// The overflow flag is raised in both modes. The encodings are this design's
// own choice.
package avd_pkg;

  typedef enum logic {
    AVD_XOR_RCA    = 1'b0,
    AVD_PRECOMPUTE = 1'b1
  } avd_arch_e;

  typedef enum logic {
    AVD_OVF_PASS     = 1'b0,
    AVD_OVF_SATURATE = 1'b1
  } avd_ovf_e;

endpackage : avd_pkg

# 4-bit absolute-value detector with threshold output

A signed sensor sample often has to be reduced to its size before anything
is decided about it. A neural electrode, for example, records spikes of
either polarity, and a detector must flag a sample whose magnitude exceeds a
threshold whether it swings up or down. This design does that for 4-bit
two's-complement samples. It computes |A| for A = a3a2a1a0, and it compares
|A| with a 3-bit unsigned threshold B. Its output Y (`spike`) is 1 when
|A| > B.

The logic is small and purely combinational: no clock, no reset, no state.
The interesting parts are how the negation is arranged and what happens to
the one input, -8, that has no 4-bit positive counterpart.

## How the magnitude is formed

For a two's-complement number, |A| = A when the sign bit s = a3 is 0, and
|A| = ~A + 1 when s = 1. The design splits that into two steps.

1. **Sign-controlled inversion** (`avd_cond_invert`). Each of the three bits
   below the sign goes through an XOR with s: p_i = a_i xor s. A
   non-negative input passes unchanged; a negative one is complemented.
2. **Adding the sign** (`avd_ripple_inc`). The sign itself is added at the
   LSB: |A| = P + s. The adder's other operand is zero, so every stage,
   including the two upper ones, reduces to a half adder (`avd_half_adder`):
   y_i = p_i xor c_i, c_(i+1) = p_i and c_i, with c_0 = s. The carry ripples
   through all three stages only when P = 111 and s = 1.

The sign bit does not need its own inversion. The output MSB is produced
separately (next section).

An equivalent **precompute-and-select** path (`avd_precompute`) can be chosen
instead with `ARCH = AVD_PRECOMPUTE`. It forms ~a[2:0] + 1 in parallel with
the unchanged bits, and a bank of 2:1 multiplexers steered by s picks one.
Both paths give the same outputs for all 16 inputs. The XOR/ripple path is
the default: it is the one whose critical path (sign, three XORs, three adder
stages, output driver) was sized for the delay target described below.

## The most negative input

For -8 (1000) the inverted bits are 111. Adding s gives 000 with a carry-out
c3 = 1, and c3 is 1 for this input only. The output stage (`avd_msb_ovf`)
recognises the input directly with one gate, a3 and not(a2 or a1 or a0).
That gate drives the overflow flag (`ovf`). The detection does not depend on
which magnitude path is used. An immediate assertion checks in simulation
that the path's carry-out agrees with it. The stage offers two treatments:

| `OVF_MODE`                 | output for 1000  | output for every other input  |
|----------------------------|------------------|-------------------------------|
| `AVD_OVF_PASS` (default)   | 1000 (y3 = c3)   | 0 y2 y1 y0                    |
| `AVD_OVF_SATURATE`         | 0111 (+7)        | 0 y2 y1 y0                    |

In pass mode the 4-bit output reads as unsigned 8, which is the correct
magnitude, though as a signed number it is still -8. Because the magnitude
has one bit more than the threshold, an input of -8 is above every
threshold in pass mode. In saturate mode it is above every threshold except
7.

## Threshold comparison

`avd_threshold_cmp` raises `spike` when the 4-bit magnitude is strictly
greater than the 3-bit threshold. The strict `>` is this design's choice;
change the one relational operator there if a sample equal to the threshold
should count.

## Timing and the sized circuit

The gate-level circuit behind this RTL was sized with logical effort. It has
an 8-stage critical path driving a load of 32 minimum-inverter input
capacitances. The supply is also lowered from 1.0 V to 0.825 V. Together
these trade a 1.5x increase in delay for lower switching energy. The
critical-path delay grows from about 1.6 ns to about 2.4 ns. Transistor
sizes and supply voltage cannot be expressed in RTL. The delay can be, so
`avd4_timed` is a behavioural (not synthesizable) model: the logic of
`avd4_top` with every output following the input after `TPD_PS` picoseconds
(default 2400; 1600 stands for the 1.0 V circuit). It uses one delay for all
input patterns and output bits. The real circuit is faster when no carry
ripples. Hold its inputs for longer than the delay.

## Module map and parameters

| file | role |
|------|------|
| `rtl/avd_pkg.sv` | enums `avd_arch_e` (`AVD_XOR_RCA`, `AVD_PRECOMPUTE`) and `avd_ovf_e` (`AVD_OVF_PASS`, `AVD_OVF_SATURATE`) |
| `rtl/avd4_top.sv` | top: sign wire, magnitude path selected by `ARCH`, output stage, comparator |
| `rtl/avd_cond_invert.sv` | XOR bank, width `W` |
| `rtl/avd_ripple_inc.sv` | ripple-carry adder of the sign, width `W`, built from `avd_half_adder` |
| `rtl/avd_half_adder.sv` | one half-adder cell |
| `rtl/avd_precompute.sv` | precompute-and-select magnitude path, width `W` |
| `rtl/avd_msb_ovf.sv` | output MSB and overflow stage, `OVF_MODE` |
| `rtl/avd_threshold_cmp.sv` | magnitude > threshold |
| `rtl/avd4_timed.sv` | behavioural timing model around `avd4_top` |

`avd4_top` ports: `a[N-1:0]` (input sample), `thr[N-2:0]` (threshold B),
`mag[N-1:0]` (|a|), `ovf`, `spike`. Parameters: `N = 4`,
`ARCH = AVD_XOR_RCA`, `OVF_MODE = AVD_OVF_PASS`. `N` is generic, so the same
structure gives, for example, an 8-bit detector with a 7-bit threshold. N = 4
is the reference size; N = 8 is also checked exhaustively in `tb_avd4_top`.

## What is this design's own

These points are choices made here rather than fixed by the reference
design:

- The comparison is `|A| > B`, strict. The reference gives the threshold
  inputs and the output but not the relation.
- The overflow flag is brought out as a port, and pass mode is the default.
- The adder stages at bits 1 and 2 are half adders, because their third
  operand is always 0.
- The precompute path's incrementer is written as `+ 1` and left to
  synthesis. Its carry is gated by the sign so that both paths share one
  output stage.
- The comparator is a relational operator, not a hand-built gate network.

## Verification

Each module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. Every one has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_avd_cond_invert` | all 3-bit words with s = 0 and 1 |
| `tb_avd_ripple_inc` | all words and carry-ins against integer addition; the carry leaves the top exactly once |
| `tb_avd_msb_ovf` | both overflow modes for every sum and carry |
| `tb_avd_precompute` | all words and signs against (8 - a) mod 8 |
| `tb_avd_threshold_cmp` | every magnitude against every threshold |
| `tb_avd4_top` | all four `ARCH` x `OVF_MODE` configurations, every input with every threshold. It counts that each mechanism happens: negation, overflow, saturation, spikes of both polarities, samples below the threshold, and agreement of the two paths. An N = 8 instance is swept exhaustively too |
| `tb_avd4_top_full` | default configuration as a spike detector: exhaustive sweep, then 2000 random bipolar pulse samples at threshold 3, one per clock, with the spike count checked |
| `tb_avd4_timed` | outputs unchanged 10 ps before and updated 10 ps after 2400 ps (and 1600 ps) |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb -Irtl rtl/avd_pkg.sv tb/tb_avd4_top.sv --top-module tb_avd4_top
./obj_dir/Vtb_avd4_top
```

All testbenches pass. Each takes well under a second.

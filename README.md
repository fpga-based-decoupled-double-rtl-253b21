# DDSRF-PLL: a positive-sequence phase tracker for shunt active power filters

A shunt active power filter (SAPF) injects the part of a load current that
the supply should not carry: reactive current, harmonics, negative and zero
sequence. The usual way to find that part, the synchronous-reference-frame
(SRF) method, rotates the load currents into a frame locked to the supply
voltage, keeps the dc component of the d axis, and rotates it back. That only
works if the frame is locked to the **positive-sequence fundamental** of the
voltage. A conventional SRF-PLL locks to the alpha component, and that
component is not in phase with the positive sequence once the three phase
voltages are unbalanced.

The decoupled double synchronous reference frame PLL (DDSRF-PLL) fixes this.
It looks at the voltage vector in two frames at once:

* **dq+1**, rotating with the PLL phase `theta`;
* **dq-1**, rotating with `-theta`.

Once the PLL is locked, the positive sequence is a dc value in dq+1 and the
negative sequence is a dc value in dq-1. Each sequence also leaks into the
*other* frame as a ripple at twice the line frequency. Two **decoupling cells**
estimate that ripple from the filtered (dc) values of the other frame and
subtract it. The decoupled q component of dq+1 is then a clean phase error,
free of the 2w ripple that would otherwise wobble the phase.

This repository holds synthesizable SystemVerilog for the complete
fixed-point PLL as it would run on an FPGA: a 125 MHz clock, 5 kHz sampling,
16-bit Q15 data. It also holds the SRF compensation-current detector driven
by the PLL, and the on-chip test set-up (stimulus ROM and error output) used
to verify the PLL in hardware.

## Signal flow

```
 va,vb,vc ─► clarke ─► alpha,beta ─┬─► park(+theta) ─► dq+1 ─► DC(+1,-1) ─► dq+1* ─┬─► LPF x2 ─► vpos ─┐
  (Q15)                            │                               ▲                 │                   │
                                   │                               └──── vneg ◄──────┼───────────────────┤
                                   └─► park(-theta) ─► dq-1 ─► DC(-1,+1) ─► dq-1* ───┼─► LPF x2 ─► vneg ─┘
                                                                   ▲                 │
                                                                   └──── vpos        │ q+1* (phase error)
                                                                                     ▼
      sin/cos(theta), sin/cos(2 theta) ◄── sincos_lut ◄── theta ◄── vco ◄── w0 + loop_filter
```

Every block takes its operands on a one-cycle `en` strobe and answers one
clock later with `valid`. A sample runs through six stages: Clarke, Park,
decoupling, LPF plus loop filter, VCO, LUT. The new `sin/cos(theta)` is ready
six clocks after the sample arrives. That is far inside the 25 000-clock
sample period, so nothing is shared or time-multiplexed. Each
multiplication is its own multiplier.

Two loops close across samples, and both use the previous sample's value:

* The **frames of sample n** are rotated with the phase that sample n-1
  produced. The VCO integrates as `T*z/(z-1)`, so that phase is already the
  prediction for sample n.
* The **decoupling cells of sample n** use the LPF outputs of sample n-1.
  Using the current outputs would create a loop with no delay in it:
  DC → LPF → DC within one sample.

## Frame convention and what "in phase" means

The rotation is `[T_dq] = [cos sin; -sin cos]`, and the transform
`[C] = sqrt(2/3)[1 -1/2 -1/2; 0 sqrt3/2 -sqrt3/2]` is power-invariant. When the
PLL is locked, the d axis points along the positive-sequence voltage vector
and `q+1*` is zero. The consequences:

* `cos(theta)` is in phase with the positive-sequence voltage of phase a
  when that voltage is written as a sine: for `v_a+ = V sin(wt + phi)`,
  `cos(theta) = sin(wt + phi)`. The top level therefore outputs
  `pos_sine = cos(theta)` and compares it with the ideal sine.
* The filtered d value `vpos.d` is `sqrt(3/2)` times the positive-sequence
  peak. `|vneg|` is `sqrt(3/2)` times the negative-sequence peak.
* The negative frame uses the same rotation with the sine negated. The
  decoupling cell of the negative frame gets `-sin(2 theta)`.

## Decoupling cell

In the +1 frame, a negative-sequence vector with dc coordinates
`(dbar-1, qbar-1)` in the -1 frame appears rotated by `2 theta`. The cell
removes it:

```
d+1* = d+1 - ( cos2θ·dbar-1 + sin2θ·qbar-1)
q+1* = q+1 - (-sin2θ·dbar-1 + cos2θ·qbar-1)
```

The -1 cell is the same with `-2 theta` and the +1 filtered values. The
`sin/cos(2 theta)` pair comes from the same sine table as `sin/cos(theta)`,
read at twice the address. That makes `2 theta` as coarse as a 64-point table.
The decoupling only needs the angle to about 0.1 rad, so this is adequate.

## Fixed-point formats

All values are two's complement with 15 fractional bits (Q15).

| Signal | Format | Why |
|---|---|---|
| sampled voltages and currents, sin/cos | 16b/Q15 | interface format |
| alpha-beta, dq+1, dq-1, LPF state | 18b/Q15 | a full-scale input times sqrt(2/3)·2 = 1.63 would overflow 16 bits |
| LPF coefficients B0 = 803, A1 = 31162 | 16b/Q15 | 0.0245 and 0.9510; dc gain 1606/1606 = 1 exactly |
| loop-filter input | 16b/Q15 | the q+1* value saturated to 16 bits |
| integrator sum | 18b/Q15 | |
| T·Ki = 79235 (2.418) | 17b/Q15, unsigned | |
| integral term | 20b/Q15 (±16 rad/s) | |
| Kp = 5094684 (155.48) | 23b/Q15, unsigned | |
| proportional term | 22b/Q15 (±64 rad/s) | |
| loop-filter output | 24b/Q15 (rad/s) | |
| w0 + output | 25b/Q15 | w0 = 100π = 10294371 |
| VCO register | 32b/Q15 (rad/s·samples) | holds up to 2π/T = 1029437081 |
| T | 64b/Q63 | 1844674407370955 |
| theta | 18b/Q15, unsigned | [0, 2π) fits in 3 integer bits |

Ki = (35π)² and Kp = 1.414·35π give a damping of 0.707. The proportional
term can exceed its 22-bit range during start-up: the error reaches about
0.73 and 155·0.73 ≈ 113 rad/s. Every narrowing in the loop filter therefore
**saturates** rather than wraps. A saturated frequency still pushes the phase
the right way, so lock is only slower.

## VCO: an integrator that cannot overflow

The phase is the integral of frequency. A plain accumulator would overflow.
The VCO keeps `R`, the sum of `w` (a phase divided by T). It reduces `R` by
`2π/T` *when it reads it*:

```
f     = (R >= 2π/T) ? R - 2π/T : R
s     = w + f          ; R <= s
theta = T * s          ; truncated to 18b/Q15
```

`R` therefore stays in `[0, 2π/T + w)`. For one sample, `theta` may exceed 2π
by at most `T·w` (about 0.07 rad). The LUT address wraps modulo 128, which
folds that back to the first entries.

## Sine/cosine table

The phase range is split into 128 equal areas. Phase `theta` falls in area
`p = floor(128·theta/2π)`. The table entry for area k is
`round(32767·sin(2πk/128))`, and the cosine is read at `k + 32`. The address
is formed as `theta × round(128/(2π)·2^16)`, keeping bits [37:31]. The table
is `rtl/sine_table.hex` (128 lines).

Because the area's value is used for the whole area, the output sine can be
off by up to one area, 2π/128 ≈ 0.049 rad or about 1600 LSB of Q15. This
quantization, not the loop, dominates the steady-state tracking error.

## On-chip verification set-up (top level)

`ddsrf_fpga_top` wraps the PLL the way it is tested in hardware:

* `sample_tick` divides 125 MHz by `DIV = 25000` into the 5 kHz strobe.
* `stimulus_rom` stores one 20 ms period (100 samples) of an unbalanced,
  distorted test voltage and of the ideal output. With `x = 2πk/100`:
  * positive sequence `0.6 sin(x + π/3)`;
  * negative sequence `0.07 sin(x + π/4)`;
  * zero sequence `0.02 sin(x + π/8)`;
  * third harmonics `0.1 sin(3x + π/2)`, `0.1 sin(3x + π/5)` and
    `0.2 sin(3x + π/5)` in phases a, b and c;
  * ideal output `sin(x + π/3)`.

  Phases b and c carry the positive sequence at -/+ 2π/3 and the negative
  sequence at +/- 2π/3. The file is `rtl/stimulus_table.hex`, one 64-bit word
  `{va, vb, vc, ideal}` per sample, each value `round(32767·v)`.
* `use_rom` selects the ROM (1) or the external inputs `va_ext..vc_ext` (0).
* `err = ideal_sine - pos_sine` (saturated) is the tracking error.
* `srf_detector` turns the load currents `il_a..c` into compensation currents
  `ic_a..c`. It uses the PLL's sin/cos for the same sample.

Latency from the strobe: `out_valid` comes 8 clocks later and `ic_valid` 6
clocks later.

## SRF compensation-current detector

```
i_alpha,beta = [C] i_l ;  i_d = cos·i_alpha + sin·i_beta ;  i_d_bar = LPF(i_d)
i_c = i_l - [C]^T [cos·i_d_bar ; sin·i_d_bar]
```

Only the dc of `i_d` is kept, which is full compensation. Everything except
the positive-sequence active fundamental goes to `i_c`: reactive current,
negative sequence and harmonics. The low-pass filter is the same 40 Hz
first-order section as in the PLL. It attenuates the 2w ripple from a
negative-sequence load current only to about 0.37 and 6w to about 0.13. That
ripple shows up in `i_c`, and a steeper filter would remove it.

## Measured behaviour (simulation)

With the ROM stimulus, at the real rates:

* **Lock:** the error stays within two table areas (3217 LSB) from sample 77
  on, 0.015 s after start (the published hardware locks in about 0.03 s).
* **Steady-state error:** at most ±2588 LSB. This is table quantization
  (about 1600 LSB) plus the phase ripple left by the harmonics.
* **Frequency step:** a step from 50 to 51 Hz is tracked without losing lock.
  The mean of `w` settles at 320.49 rad/s, against 2π·51 = 320.44.
* **Phase jump:** after switching to a different source with a 1 rad phase
  jump, the PLL is back within two areas in about 0.04 s.
* **Filtered sequence values:** `vpos.d` and `|vneg|` agree with the expected
  `sqrt(3/2)·0.6` and `sqrt(3/2)·0.07` to within 1.5 %.

## Where this design makes its own choices

The fixed-point formats of the loop filter and the VCO, the LPF transfer
function, the 128-point table, the rates and the test signals follow the
published design. The following are choices of this implementation:

* 18-bit internal voltage path, and saturation in the loop filter. The loop
  filter uses the described widths but saturates instead of wrapping.
* The decoupling-cell equations, `sin/cos(2 theta)` taken from the table at
  twice the address, and the previous-sample LPF values in the cells.
* The six-stage `en`/`valid` pipeline and synchronous active-low reset.
* A single sine table with four read ports. Table entries are the values at
  the start of each area, scaled by 32767.
* `cos(theta)` as the output in phase with the positive sequence, which
  follows from the frame convention.
* The 100-sample stimulus period and the phase rotation of b and c for each
  sequence.
* The SRF detector reuses the PLL's 40 Hz filter.

Known gap: the steady-state error here is about ±2600 LSB, against about ±655 reported for the published hardware. An error near
±650 LSB would need a finer table (about 512 points) or interpolation. The
table size is the `POINTS` parameter of `sincos_lut`, but the hex file must
then be regenerated with `round(32767·sin(2πk/POINTS))`.

Not built: the reference-voltage calculation, the 3D direct PWM and the
four-leg inverter that follow the detector in a complete filter.

## Files

| File | Contents |
|---|---|
| `rtl/ddsrf_pkg.sv` | Q15 types (`q15_t`, `sig_t`, `vec2_t`, `sincos_t`), constants, rounding and saturation |
| `rtl/sample_tick.sv` | 5 kHz strobe |
| `rtl/clarke.sv` | abc → alpha-beta |
| `rtl/park.sv` | alpha-beta → dq rotation |
| `rtl/decoupling_cell.sv` | decoupling cell |
| `rtl/lpf.sv` | 40 Hz first-order IIR |
| `rtl/loop_filter.sv` | PI loop filter |
| `rtl/vco.sv` | wrapping phase integrator |
| `rtl/sincos_lut.sv`, `rtl/sine_table.hex` | 128-point sine/cosine table |
| `rtl/ddsrf_pll.sv` | the PLL |
| `rtl/stimulus_rom.sv`, `rtl/stimulus_table.hex` | test voltages and ideal sine |
| `rtl/srf_detector.sv` | compensation-current detection |
| `rtl/ddsrf_fpga_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ddsrf_fpga_full.sv` | whole system at the real 25 000-clock sample period |

The `$readmemh` paths are relative to the repository root, so run the
simulator from there.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ddsrf_pkg.sv tb/tb_ddsrf_fpga_full.sv --top-module tb_ddsrf_fpga_full
./obj_dir/Vtb_ddsrf_fpga_full
```

`tb_ddsrf_fpga_full` runs 400 samples (0.08 s, 10 M clocks) in a few
seconds. `tb_ddsrf_fpga_top` runs the same system with `DIV = 16`. It covers
ROM and external modes, a phase jump, loop-filter saturation, VCO and ROM
wrap-around, and the compensation currents. `tb_ddsrf_pll` adds the
frequency step. The unit testbenches compare each block against
floating-point models of its equations.

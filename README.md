# Multiplier-less Hilbert transformers for an FPGA phase-locked loop

This is SystemVerilog for an all-digital phase-locked loop (PLL). It locks a
direct digital synthesizer (DDS) to a real RF signal sampled by a 14-bit ADC.
The loop measures phase exactly, not with a flip-flop phase detector:

1. A Hilbert transformer turns the real samples x(n) = a cos(θ(n)) into an
   *analytic signal* I + jQ ≈ a·e^{jθ(n)}.
2. A CORDIC computes θ(n) = atan2(Q, I), with full four-quadrant range.
3. The DDS phase is subtracted from θ(n), and the difference, filtered,
   steers the DDS frequency.

Most of the design is about step 1: how to build the Hilbert transformer
cheaply on an FPGA, without multipliers, so that it does not cost phase
accuracy. Two families are included:

* **H_A1**, a short FIR Hilbert filter (order 10, 8-bit coefficients). Its
  phase is exactly 90° at every frequency and its group delay is constant,
  but its gain is not flat. The resulting phase ripple is removed by a
  multiplier-less IIR low-pass, **F_LP**. This is the filter of the
  prototype PLL.
* **H_A2, H_A3, H_A4**, complex *frequency sampling filters* (FSF). They are
  built from a comb and resonators with poles on the unit circle. The
  resonators have coefficients 0, ±1 and ±j only. The poles cancel comb
  zeros exactly, so the filters pass positive frequencies and block
  negative ones. H_A4, the one with a flat pass-band, drives a second
  PLL; its group delay is not constant, so that PLL passes its own output
  through a second H_A4 and detector (see below).

The intended application is an offset-LO PLL for a synchrotron RF system:
0.8–5.4 MHz signals, frequency ramps of up to 68 MHz/s, and a phase error
below 5°. Frequency figures in this text assume a 120 MHz sample clock.

## Loop structure (`adpll`)

```
 x(n) ─► fir_hilbert_ha1 ─► cordic_pd ─► φx ──(+)──► err_raw ─► iir_lowpass_flp ─► err
                                               (−)                                   │
                 ┌──────────── phase_delay (z^-D) ◄──┐                              ▼
                 └──► φy                             │                        pi_loop_filter
                                                     │                              │ ftw
                               y(n) ◄── sine table ◄─┴── phase accumulator ◄───────┘
                                          (dds)
```

This is the default configuration (`AFILTER = AF_FIR_HA1`,
`FEEDBACK = FB_DELAY`). The filter and CORDIC pair sits in the helper
module `analytic_pd`.

* **Delay matching instead of a second detector.** H_A1 has a constant
  group delay, so the DDS phase only needs the same constant delay,
  D = 8 (H_A1) + 18 (CORDIC) = 26 clocks. Then φx and φy describe the
  same sample instant. No Hilbert filter or detector is needed on the DDS
  output. In lock, the accumulator phase equals the input phase θ(n) of the
  same sample, and the sine table outputs sin θ, 90° behind a cosine input.
* **Filtered feedback, for filters without constant delay.** With
  `FEEDBACK = FB_FILTER` the DDS sine output y(n) goes through a second,
  identical analytic filter and CORDIC (module `analytic_pd`, used twice),
  and φy is that detector's output:

  ```
   x(n) ─► analytic_pd ─► φx ──(+)──► err_raw ─► … ─► dds ─► y(n)
   y(n) ─► analytic_pd ─► φy ──(−)──┘
  ```

  Both paths then see the same delay at every frequency and, nearly, the
  same gain-error ripple, which cancels in φx − φy. This is what lets the
  loop use H_A4 (`AFILTER = AF_FSF_HA4`), whose phase response is not
  linear. It costs a second filter and detector. In lock the filtered
  sine output has the same phase as the filtered input, so y(n) is in
  step with the input cosine and the accumulator leads the input phase
  by a quarter turn. Elaboration stops with an error if H_A4 is combined
  with the constant-delay path. At 4.8 MHz the H_A4 detector alone shows
  ±3.9° of ripple; the phase difference keeps an rms of only 0.08°.
* **Phase format.** The phase is a 16-bit fraction of a turn (2π = 2¹⁶),
  and the DDS accumulator is 32 bits wide. Phase differences therefore wrap
  modulo 2π with no extra logic.
* **PI controller.** It is type II: an integrator tracks a frequency offset
  with zero mean phase error. Its gains are powers of two.
  - Proportional gain: 2⁻⁸ rad/sample per rad, a loop bandwidth of about
    75 kHz at 120 MHz.
  - Integral gain: 2⁻¹⁸. A ramp of 68 MHz/s then leaves a steady error of
    about 0.45°.

  `KP_SHIFT` and `KI_SHIFT` set the two gains.
* **Free-running frequency.** `ftw_centre` is the DDS tuning word when the
  loop is idle (f = ftw/2³²·fs).

## FIR analytic filter H_A1 and its phase error

`fir_hilbert_ha1` builds

  I(n) = x(n−5),  Q(n) = Σ b_k x(n−5−k),  b_k = −b_−k,  b1 = 163/256, b3 = 54/256, b5 = 32/256,

with all even coefficients zero.

The odd symmetry allows three pre-subtractions x(c−k) − x(c+k). The
constants are shift-and-add networks in canonic signed digit form:
163 = 128+32+4−1, 54 = 64−8−2, 32 = 32. That is 10 adders in all. Q is the
sum divided by 256, rounded down, in 15 bits. The output I/Q appears 8
clocks after the centre sample.

The Hilbert gain is G_e = 2·Σ b_k sin(kΩ). It is not 1 away from fs/4; at
1 MHz, for example, it is about 0.2. The detected phase is then
atan(G_e·tan θ) rather than θ. The error is zero on average, appears at
twice the signal frequency, and has a peak of

  Δφ_max = π/2 − 2·asin(√(G_e/(1+G_e))),

about 42° at 1 MHz. The testbench checks this value.

That ripple is far above the loop bandwidth. `iir_lowpass_flp` removes it
before the PI controller. Each stage of F_LP is the backward-difference
form of 1/(1+sT_c) with b0 = 2⁻ᴹ:

  s ← s − (s >>> M) + x,  y = s >>> M

One stage is one subtractor, one adder and a shift. Its DC gain is exactly
1, and its cut-off is fs/(2π(2ᴹ−1)). The default is three stages with
M = 4, which gives a cascade cut-off of about 0.005·fs (0.65 MHz at
120 MHz). That lies between the loop bandwidth and twice the lowest signal
frequency. After the low-pass and the loop's own integration, the DDS
phase ripple is below 0.3° even at 1 MHz.

## Complex frequency sampling filters (H_A2, H_A3, H_A4)

This is the least obvious part of the design.

**Comb and resonators.** A comb 1 − z⁻⁴ puts zeros at 0°, +90°, 180° and
−90°. Each resonator adds poles exactly on some of those zeros and so
cancels them. A resonator whose coefficient is j costs no multiplier:
(a+jb)·j = −b + ja is a swap and a negation (`fsf_cplus90`):

  yi ← xi − yq,  yq ← xq + yi    (pole at +90°)

**Why the cancellation is exact.** The cancellation only holds in exact
integer arithmetic. Every stage therefore runs at one common width and
wraps modulo 2ᵂ, as in a CIC decimator. The resonators grow without bound
internally, but the overall response is an FIR filter. Its output is
correct as long as the true output fits in the chosen width. Each filter
uses the smallest width that holds its worst-case output: the sum of
|coefficients| of the equivalent FIR filter times full scale. Every
register starts from zero on reset, which is a consistent state.

| module | built as | equivalent response | output word |
|---|---|---|---|
| `fsf_ha2` | comb(4) → C₊₉₀ | z⁻²(1 + jz⁻¹ − z⁻² − jz⁻³) | 15 bits = 4·H_A2 |
| `fsf_ha3` | 2 × [comb(4) → C₊₉₀ → C₀/₁₈₀ → (1 + jz⁻¹ − z⁻²)] | z⁻¹⁰·P(z)², P = 1 + 2jz⁻¹ − 2z⁻² − jz⁻³ | 20 bits = 36·H_A3 |
| `fsf_ha4` | fsf_ha3 → C_P → C_P | H_A3 response with a flat pass-band | 22 bits = 16·H_A4 |

The three filters compare as follows:

* **H_A2** passes a narrow band around +fs/4 and has a zero at −fs/4.
* **H_A3** is still linear phase. C₀/₁₈₀ (y(n) = x(n−2) + y(n−2)) cancels
  the comb zeros at DC and fs/2, which widens the pass-band. The FIR
  1 + jz⁻¹ − z⁻² adds zeros at −30° and −150°. Using two sections squares
  the response, and negative frequencies fall more than 40 dB.
* **H_A4** adds two pole pairs C_P = z⁻²/(1 − ½z⁻²) with poles at ±1/√2.
  The factor ½ is a one-bit shift. They lift the response towards DC and
  fs/2, so the pass-band becomes flat around fs/4 (within 1 % from 0.1·fs
  to 0.4·fs) and its 3-dB band widens to 0.014–0.486·fs. The group delay
  is no longer constant, and the image suppression stays that of H_A3. These recursions really are IIR filters, so they carry 8 guard
  fraction bits (`GF`) and truncate once at the output.

**Output scaling.** The outputs are not shifted down: the scale factors
4, 36 and 16 are binary points, or in H_A3's case a plain constant. This
keeps every bit.

* 36 is not a power of two, so H_A3 stays unnormalised. A phase detector
  does not care.
* C_P² has a gain of exactly 4/9 at fs/4. H_A4's output is therefore
  exactly 16·H_A4, with the binary point 4 bits from the right.
* A real tone of amplitude A comes out with magnitude A/2 times the scale
  factor, because only its positive-frequency half is kept.

Helper modules: `fsf_comb`, `fsf_cplus90`, `fsf_c0_180`,
`fsf_cinv_m30_m150`, `fsf_cp`.

## Top level (`hilbert_pll_top`)

The top level takes one ADC stream, `adc_x`, and one free-running tuning
word, `ftw_centre`. It holds:

* the prototype PLL (H_A1, delayed-phase feedback), with outputs `dac_y`,
  `pll_ftw`, `pll_phase_x`, `pll_err_raw` and `pll_err`, and H_A1's
  analytic output (`ha1_*`);
* the PLL with H_A4 on both input and output (filtered feedback), with
  outputs `dac4_y` and `pll4_*`; its input filter's output is `ha4_*`;
* the H_A2 and H_A3 filters on the same input (`ha2_*`, `ha3_*`).

The ADC and DAC are external parts: their samples are simply ports. One
sample is processed per clock, and reset is synchronous and active high.
`hilbert_pkg` holds the shared widths, the coefficients and the latency
figures.

## Timing summary

| block | latency / behaviour |
|---|---|
| `fir_hilbert_ha1` | I(n) = x(n−8); Q centred on the same sample |
| `cordic_pd` | 18 clocks (1 pre-rotation + 16 iterations + rounding); error within 3 LSB of 16 bits for inputs ≥ 1/8 of full scale |
| `iir_lowpass_flp` | each stage is F_LP(z)·z⁻¹ |
| `pi_loop_filter` | 1 clock |
| `dds` | phase(n+1) = phase(n) + ftw; sine(n+1) = table(phase(n)); 1024 × 14-bit table computed at elaboration |
| `phase_delay` | D clocks (26 in the PLL) |
| `fsf_ha2/3/4` | see the table above; every stage is registered |

## How far it is verified

Every block has a self-checking testbench. Each checks the block against
an independent model: direct convolution, floating-point recursion,
`$atan2`, `$sin`, or polynomial products worked out in the bench. The
benches also check latency. Each block's own bench was shown to fail
against a deliberately broken copy of its module. The benches below
cover the whole design, the H_A4 loop, the published filter figures and
the full frequency sweep.

| bench | what it shows |
|---|---|
| `tb_hilbert_pll_top` | Whole design at default sizes. The FSF filters on a 0.22·fs tone: H_A4 at 0 dB, images ≥ 40 dB down. The H_A1 PLL pulls in from a 1 % offset at 4.8 MHz to within 0.006°, then tracks a 68 MHz/s ramp to within 0.45°. The H_A4 PLL locks to within 0.2° and tracks to within 0.33°, and its detector ripple cancels in the phase difference. The DDS output and the final tuning words are checked too. |
| `tb_table2_filters` | Frequency responses of H_A1–H_A4 and F_LP, measured from the RTL impulse responses, against the published filter figures: 3-dB bands within 0.001 fs (H_A1 0.018–0.482, H_A2 0.136–0.364, H_A3 0.154–0.346, H_A4 0.014–0.486 fs), image suppression over 0.154–0.346 fs (H_A2 12 dB, H_A3 47.7 dB, H_A4 44.8 dB), H_A3 I/Q gain mismatch ≤ 0.1 dB, I/Q phase error 0 for H_A1/H_A3 and 41° for H_A2, F_LP 18 dB down at 0.018 fs. |
| `tb_adpll_ha4` | `adpll` alone in the H_A4 / filtered-feedback configuration: lock, ramp and ripple cancellation. |
| `tb_adpll` | Lock at 1 MHz, where the H_A1 gain error is largest. The detector ripple matches the peak-error formula within 1°. Also a 90° phase step and a 2 % frequency step; the DDS phase stays within 0.22°. |
| `tb_ramp_workload` | Full sweep from 0.8 to 5.4 MHz at 68 MHz/s: 8.1 M samples. Maximum DDS phase error 0.87° for the H_A1 PLL (worst near 1 MHz, where H_A1's gain error is largest) and 0.45° for the H_A4 PLL, against a target of 5°. |

Not verified: timing closure and FPGA resource use. The published figures
(for example 337 logic elements and 266 MHz for H_A1 on a Cyclone) were not
reproduced. The H_A3 here uses 19 adders, where the original design
reports 16.

## Departures from the published design, and choices made here

* **Loop widths and gains.** The published design does not give them.
  Phase is 16 bits, the accumulator 32 bits, the sine table 1024 × 14 bits.
  The PI gains are chosen to meet the 68 MHz/s ramp specification.
* **CORDIC.** The original used an existing external CORDIC core. This one
  is a plain pipelined vectoring CORDIC.
* **F_LP.** The defaults M = 4 and three stages are inferred from the
  published response plot and adder count, and they reproduce the
  published 18 dB attenuation at 0.018·fs. The published cut-off of
  0.004·fs is not met exactly: this cascade has 0.0052·fs. The cut-off
  is taken as the angular frequency 1/T_c. F_LP sits between the phase
  subtraction and the PI controller. Each stage outputs its state, which adds one clock.
* **H_A3 normalisation.** The 4/9 normalisation is not applied (see above).
  The causal form of (1 + jz⁻¹ − z⁻²) drops the z² advance of the inverted
  resonator.
* **H_A4 PLL.** The H_A4 loop with filtered feedback was only proposed,
  not measured, in the published work. Here it uses the same loop gains
  and F_LP as the H_A1 loop.
* **Not built.** The resonators in the table of options that no filter
  here uses: C₀, C₁₈₀, C±₆₀, C±₁₂₀, C₋₉₀, C₊₃₀/₊₁₅₀, C₀/₊₉₀/₁₈₀.

## Simulating

Each testbench is a top-level module with no ports. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/hilbert_pkg.sv tb/tb_hilbert_pll_top.sv \
          --top-module tb_hilbert_pll_top
./obj_dir/Vtb_hilbert_pll_top
```

Every bench prints `TB_RESULT checks=N failures=M`. The end-to-end bench
takes a few seconds. The full ramp workload, `tb_ramp_workload`, takes
about 20 s.

To use the loop at another sample rate or frequency, set `ftw_centre`.
`KP_SHIFT` and `KI_SHIFT` (loop bandwidth and ramp error) and `M`/`ORDER`
(ripple suppression) are parameters of `adpll`, as are `AFILTER` and
`FEEDBACK`, which select the analytic filter and the feedback path.

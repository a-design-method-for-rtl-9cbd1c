# Digital phase-locked loop for a 10 kHz carrier

This is a second-order phase-locked loop written as synthesizable
SystemVerilog. It takes an 8-bit sampled carrier near 10 kHz and produces an
8-bit sine that follows the input's frequency and phase. It follows a
published design method for FPGA PLLs. Each part of a classic analog PLL is
first designed in the s domain. It is then moved to the z domain with the
bilinear transform, s = c(1 - z^-1)/(1 + z^-1), c = 2/T. Two ideas keep the
hardware small:

- **Shift-and-add low-pass.** The sample rate is chosen so that the RC
  low-pass needs no multiplier or divider. Only shifts and additions remain.
- **Angle-sum NCO.** The oscillator is not one tunable table. It takes a fixed
  10 kHz carrier and rotates it by a small, finely controlled offset,
  using cos(a + b) = cos a cos b - sin a sin b.

Everything runs from one 80 MHz clock. With the default parameters the loop
locks to a 10.050 kHz input. Its loop-filter output then settles at 90.25
LSB, which is exactly the 50 Hz offset divided by the NCO gain of 400/722 Hz
per LSB.

## Loop structure

```
          li (8 bit, 640 kHz)
  A/D ───────────────► phase_detector ──pd_out──► loop_filter ──lf_out──► nco ──► dout
                       (mixer, 2 x IIR)  (16 bit)   (PI, 50 kHz)  (16 bit)  (320 kHz)  (8 bit)
                            ▲                                                         │
                            └─────────────────────────────────────────────────────────┘
```

| part | rate | divider of 80 MHz | origin of the rate |
|---|---|---|---|
| phase detector and low-pass | 640 kHz | 125 | low-pass designed for c = 2/T ≈ 1.275 MHz (637.5 kHz). 640 kHz is the nearest integer divider. |
| loop filter | 50 kHz | 1600 | c = 2/T = 100 kHz in the loop-filter transform |
| NCO output | 320 kHz | 250 | 32 points per 10 kHz period, 250 clocks per point |

`strobe_gen` makes the first two strobes. The NCO counts its own ticks. All
registers advance only on their own strobe. Between strobes each block
simply holds its output, and the next block reads whatever value is current.

The A/D converter is not part of the RTL. `li` is a top-level input, and it is
taken in on each cycle where `li_sample` is high.

## Phase detector: mixer and shift-and-add low-pass

The mixer multiplies `li` by `dout`. For two carriers at the same frequency
the product is (A·B/2)·cos(Δφ) plus a term at twice the carrier frequency.
Full-scale 8-bit samples give a product in [-16129, 16129]. This is halved
to [-8064, 8064] before filtering, so a locked loop sees a DC term of about
4032·cos(Δφ).

The double-frequency term is removed by two identical first-order sections
(`iir_lowpass`). Each one is the RC low-pass H(s) = 1/(1 + sτ) after the
bilinear transform. With a = cτ:

    y(n) = (a-1)/(a+1) · y(n-1) + 1/(a+1) · [x(n) + x(n-1)]

If a + 1 = 2^N, multiplying by 2^N gives

    2^N·y(n) = 2^N·y(n-1) + x(n) + x(n-1) - 2·y(n-1)

This has no multiplication or division, only shifts and additions. The design
uses N = 8 (a = 255). The register holds s = 2^N·y rather than y, so no
fractional bits are lost. The update is `s += x + x_prev - (s >>> 7)` and the
output is `s >>> 8`. Storing y itself and dividing afterwards would leave a
dead band of ±127 LSB, where small changes of the input never move the
output. The DC gain is exactly one.

At 640 kHz with a = 255, each section acts like an RC time constant of
a/c ≈ 2·10^-4 s. That puts the corner near 800 Hz and gives about -28 dB per
section at 20 kHz. Two sections leave a ripple of roughly ±6 LSB on the
4032-LSB phase term.

Latency: the mixer product is registered, and each stage adds one sample.
`pd_out` therefore reflects a sample three phase-detector strobes plus one
clock later.

## Loop filter: bilinear PI filter

The loop is an "ideal" second-order loop, which tracks phase steps and
frequency steps with no error left at the end. Its filter is
F(s) = (1 + sτ2)/(sτ1). The design point is:

| quantity | value |
|---|---|
| natural frequency ω_n | 50π rad/s |
| damping ζ | 0.707 |
| loop gain K | 2π·400 rad/s |
| τ1 = K/ω_n² | 0.10053 s |
| τ2 = 2ζ/ω_n | 0.009 s |
| c | 100 kHz (50 kHz sample rate) |
| c·τ1, c·τ2 | 10053, 900 |

The transformed filter is

    y(n) = y(n-1) + (1 + cτ2)/(cτ1) · x(n) + (1 - cτ2)/(cτ1) · x(n-1)
         = y(n-1) + 901/10053 · x(n) - 899/10053 · x(n-1)

The two coefficients differ in sign. Their sum, 2/10053, is the integral gain
per sample. Their average magnitude, 900/10053, is the proportional gain. If
both were positive, the filter would not be a PI filter.

In `loop_filter` the coefficients are fixed-point constants with 20 fractional
bits. The products by these constants reduce to shifts and additions when
synthesized. The accumulator keeps all fractional bits. Its output is the
integer part, in [-722, 722]. 722 is 8064 × 900/10053, the proportional
response to a full-scale phase error. The accumulator is clamped to that
range, so the integrator cannot wind up while the input is out of reach.

## NCO: carrier rotated by an offset

A plain table oscillator steps 32 points every 250 clocks. It can be tuned
only by changing that 250, which moves the frequency in steps of about
40 Hz. Steps that coarse make the loop unstable. `nco` instead computes

    cos[(ω0 + Δω)t] = cos(ω0 t)·cos(Δω t) - sin(ω0 t)·sin(Δω t)

- **Carrier.** cos/sin(ω0 t) come from a 32-point table of 8-bit samples
  (amplitude 127). The table advances one point per tick, so the carrier is
  exactly 10 kHz.
- **Offset.** cos/sin(Δω t) come from a 32-bit phase accumulator. The
  accumulator advances on the same tick and addresses a 1024-point table.
  Its step is `ctrl × 7436`, chosen so that ctrl = ±722 gives ±400 Hz
  (|Δω| < 800π rad/s). One LSB of `ctrl` is about 0.554 Hz.
- **Output.** The two 8×8 products are subtracted. The result is
  16129·cos(...) within rounding. It is shifted right by 7 and clamped to
  [-127, 127].

`sin_rom` holds the tables. They are computed during elaboration, as
round(127·sin(2πi/2^AW)). Cosines read the same table a quarter period ahead.

## Lock behaviour

A multiplier phase detector reads zero when the two signals are 90° apart, so
`dout` locks in quadrature with `li`. The loop picks the stable one of the two
zero crossings by itself.

In lock, `lf_out` equals the input's offset from 10 kHz divided by 0.554 Hz.
Beyond ±400 Hz the loop cannot follow. `lf_out` then sits at its ±722 clamp
and the output slips cycles.

The realised loop gain depends on the input amplitude and on the ±722 → ±400 Hz
mapping. At full amplitude it is about 4032 LSB/rad × 0.554 Hz/LSB, higher
than the K used to derive τ1 and τ2. The loop is then over-damped: it settles
in tens of milliseconds, without ringing. `OFFS_MAX_HZ` and `CTRL_MAX` on
`nco` set this gain, if a different one is wanted.

## Choices where the method is open

- **Mixer scaling.** The method gives the ranges ±16129 and ±8064. The
  arithmetic shift by one between them is this design's choice.
- **Loop-filter coefficient sign.** The x(n-1) coefficient is
  (1 - cτ2)/(cτ1) = -899/10053, as the general transform requires.
- **Loop-filter fixed point and clamp.** The 20-bit fixed-point format and the
  way the ±722 range is held (clamping the accumulator) are this design's
  choices.
- **Loop filter to NCO.** The method calls for a linear mapping. This design
  maps the full ±722 range onto the full ±400 Hz range.
- **Offset oscillator.** The accumulator, the 1024-point table and the output
  scaling are this design's choices. The method gives only the structure and
  the ranges.
- **Low-pass sample rate.** It is 640 kHz instead of 637.5 kHz, so that it
  divides the clock exactly. The constant a = 255 does not change.
- **Reset.** Reset is synchronous and active low, and clears every register.
  All word widths not stated above are likewise this design's choices.

## Modules

| file | what it is |
|---|---|
| `rtl/dpll_pkg.sv` | sample and word types, clock and rate constants |
| `rtl/dpll_top.sv` | the loop: rate strobes, phase detector, loop filter, NCO |
| `rtl/phase_detector.sv` | mixer, halving, two `iir_lowpass` stages |
| `rtl/iir_lowpass.sv` | first-order shift-and-add low-pass (`N_SHIFT`, `XW`) |
| `rtl/loop_filter.sv` | bilinear PI filter (`CT1`, `CT2`, `FRAC`, `LIMIT`) |
| `rtl/nco.sv` | carrier-plus-offset NCO (`CARRIER_AW`, `DIV`, `OFFS_AW`, `PHASE_W`, `CTRL_MAX`, `OFFS_MAX_HZ`) |
| `rtl/sin_rom.sv` | elaboration-time sine table (`AW`, `DW`, `AMP`) |
| `rtl/strobe_gen.sv` | divide-by-`DIV` sample strobe |

Top-level ports of `dpll_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 80 MHz clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `li` | in | 8 signed | input carrier sample |
| `li_sample` | out | 1 | strobe on the cycle `li` is taken in (640 kHz) |
| `dout` | out | 8 signed | NCO output, updated every 250 clocks |
| `pd_out` | out | 16 signed | filtered phase error |
| `lf_out` | out | 16 signed | frequency control, ±722 |

## Simulation

Each testbench in `tb/` checks its results itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/dpll_pkg.sv tb/tb_dpll_top.sv \
          --top-module tb_dpll_top -o sim
./obj_dir/sim
```

Use the same command for the other benches, changing the file and the top
module name. `-Irtl` lets verilator find the submodules by their file names.
`loop_filter` and `nco` also carry assertions that their outputs stay within
±722 and ±127. `--assert` turns these on.

| bench | what it checks |
|---|---|
| `tb_dpll_top` | Full loop at default parameters, about 370 ms of simulated time. Runs five cases: the 10.050 kHz input; a 60° phase step; a +50 → +200 Hz frequency step; a 9.950 kHz input; and a 10.420 kHz input beyond range, which must drive the clamp. Lock means equal zero-crossing counts, `lf_out` within 2 LSB of offset/0.554 Hz, and a mean li·dout near zero. |
| `tb_dpll_fm` | Full loop at default parameters, about 140 ms of simulated time. The input is frequency-modulated with a 100 Hz deviation at 51.5 Hz (Ω = 103π rad/s, the highest modulating frequency of the design point). Over four modulation periods there must be no cycle slip. The deviation tracked in `lf_out` must match the linear loop model within 10 %; it measures 109 Hz against 105 Hz. |
| `tb_phase_detector` | Bit-exact against a separate integer model, on random samples. Also checks the mean output against 4032·cos(Δφ) at five phases, and the ripple. |
| `tb_iir_lowpass` | Against a real-valued model of the recurrence. Also checks DC gain, the response to a 20 kHz tone, and that the output holds between strobes. |
| `tb_loop_filter` | Against a real-valued model with exact coefficients. Also checks the step response values and the clamp at both signs. |
| `tb_nco` | Tick spacing of 250 clocks, and the carrier-only samples. Checks frequency by zero-crossing count at ctrl = 0, ±722, 361 and 90, plus the output range. |
| `tb_sin_rom` | Every entry of the 32- and 1024-point tables. |

## Limits

- Only the stated ±400 Hz range around 10 kHz is covered. Other carriers need
  a different `NCO_DIV` or table size.
- The closed-loop ω_n and ζ are not those of the design point unless the NCO
  gain is set for them (see Lock behaviour). Frequency modulation has been
  simulated only at 51.5 Hz with a 100 Hz deviation.
- The output is a 32-point staircase. It carries images near
  320 kHz ± 10 kHz, which a DAC filter would need to remove.

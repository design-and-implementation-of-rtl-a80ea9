# MPSK carrier phase compensation loop without a loop filter

A receiver for phase-shift keying has to know the phase of the incoming carrier before it
can read the symbols. The classic tool for that is a Costas loop: two mixers, two low-pass
filters, a phase discriminator and a loop filter in front of an NCO. This design replaces
all of that with a very small sign-driven loop. On every sample it asks only two questions:

1. **Which way is the NCO off?** The sign of the cross product of the received and the
   local quadrature pairs answers that.
2. **Is the error currently shrinking?** The in-phase difference `xi - yi` is compared with
   its previous value.

When the answer to 2 is yes, the NCO phase moves by a fixed step of 4 phase codes in the
direction from 1. Otherwise it holds. There is no loop filter and no gain to tune. The loop
cannot become unstable in the usual sense. Its speed is set by the step size, and the
estimated phase ends up dithering by a few steps around the true carrier phase.

All samples are 16-bit two's complement, and one sample arrives per clock.

## The loop

```
            xi ──┬───────────────────────────┐
                 │                           ▼
            xq ──┤   ┌───────────────┐     (xi - yi) = C
                 └──►│ sign_detector │──s──┐   │
     yi, yq ────────►│ s=sgn(xq·yi − │     ▼   ▼
        ▲            │      xi·yq)   │   ┌────────────┐  step   ┌────────────────────┐
        │            └───────────────┘   │ phase_calc │────┬───►│ decision_threshold │──► bit_o
        │                                └────────────┘    │    └────────────────────┘
        │   ┌──────────────────────────────────────────┐    │
        └───│ nco: carrier acc + estimated phase acc   │◄───┘
            │      → cordic_rotator → cos, sin         │──► phase_est
            └──────────────────────────────────────────┘
```

| Module | Job | Latency |
|---|---|---|
| `sign_detector` | `s = sign(xq·yi − xi·yq)`, which is `sign(sin(θ − θ̂))` | 3 clocks (multipliers) |
| `phase_detector` | `C = xi − yi`, 17 bits so it cannot overflow | combinational |
| `phase_calc` | `step = 4·s` if `C(n−1) > C(n)`, else 0 | 1 register for `C(n−1)`, 3 clocks (product) |
| `nco` | `θ̂ += step`; outputs `B·cos`, `B·sin` of `n·FREQ_WORD + θ̂` | `phase_out` 1 clock, samples `ITER+2` clocks |
| `cordic_rotator` | pipelined CORDIC that makes the NCO's cos/sin | `ITER+1` clocks |
| `decision_threshold` | slices `step` at zero into the output bit | combinational |
| `psk_phase_comp_top` | wires the above into the loop | |

### Why the cross-product sign is enough

Write the received pair as `A·e^{j(ωn+θ)}` and the NCO pair as `B·e^{j(ωn+θ̂)}`. Then
`xq·yi − xi·yq = A·B·sin(θ − θ̂)`. The carrier term `ωn` cancels, so the sign is valid on
every single sample and not only after filtering. Its sign says whether θ̂ has to go up or
down. It stays right for errors up to ±180°. At exactly 180° it is ambiguous, and noise
chooses the way round.

### The "error is falling" gate

`C = xi − yi` is a sinusoid at the carrier frequency. Its amplitude is
`√(A² + B² − 2AB·cos(θ − θ̂))`, which for `A = B` is `2A·|sin((θ − θ̂)/2)|`. So it vanishes at
lock. The hardware does not measure that amplitude. It compares two consecutive
instantaneous samples of `C`, and lets a step through only when the newer one is smaller.
For a sinusoid this is true about half the time. In practice the gate therefore halves the
slew rate and thins out the dither at lock. It does not change where the loop settles. The
end-to-end test counts the gate blocking a non-zero sign on about half of all clocks.

Note that the sign path is 3 clocks late relative to the `C` path. No delay balances the
two paths, because the published block diagram shows none.

### Step size, slew rate and lock time

Phases are 16-bit fractions of a turn (65536 codes = 360°). One step is 4 codes, or 0.022°.
Steps pass on roughly half the samples. That gives an average slew of about 2 codes per
sample. In the simulations:

| Case | From | To | Samples to come within 1° |
|---|---|---|---|
| BPSK, 10 dB SNR | 0° | 45° | ≈ 6 500 |
| BPSK, symbol flip | 45° | 225° | ≈ 23 000 |
| QPSK, 10 dB | 0° | 22.5° | ≈ 4 900 |
| 16-PSK, 15 dB | 0° | 22.5° | ≈ 3 900 |

The mean residual error after settling is below 0.6° in every case. With noise the sign
detector flips at random near lock. Because each step is tiny, the estimate averages that
noise out.

The loop delay is about 5 clocks from a sample to the NCO phase register, plus `ITER+1`
clocks through the CORDIC. At 4 codes per clock, that delay causes an overshoot of at most
about 80 codes (under 0.5°). It is not enough to cause instability.

Lock time scales inversely with the step size `2^SCALE_SHIFT`. Raise `SCALE_SHIFT` for
faster acquisition and coarser dither.

## The NCO and its CORDIC

The NCO has two registers:

* a **carrier accumulator** that advances by `FREQ_WORD` every clock. The default 2048
  puts the carrier at `fs/32`. It must match the carrier frequency of the received
  samples.
* an **estimated-phase accumulator** θ̂ that adds the signed `phase_in` every clock. This
  is the loop's output (`phase_est` at the top).

Their sum goes into a rotation-mode CORDIC (`cordic_rotator`). The CORDIC starts from the
vector `(AMP/K, 0)`, where `K ≈ 1.64676` is the CORDIC gain, so the outputs have amplitude
`AMP` (default 16000). For the loop to settle where it should, the received amplitude
should be about the same (`A ≈ B`).

The CORDIC pipeline delays the samples by `ITER+1` clocks. Left alone, that delay would
appear as a constant phase error of `(ITER+1)·FREQ_WORD` codes, which is 168.75° at the
defaults. To avoid it, the carrier accumulator resets to `(ITER+1)·FREQ_WORD`. The sample
that leaves the CORDIC `n` clocks after reset then has carrier phase exactly
`n·FREQ_WORD`. The NCO thus has zero phase relative to the sample count. The received
samples are expected in the same frame: sample `n` after reset carries
`n·FREQ_WORD + θ`.

The CORDIC stages are the textbook recurrence:

```
x(i+1) = x(i) − d(i)·y(i)·2^−i
y(i+1) = y(i) + d(i)·x(i)·2^−i
z(i+1) = z(i) − d(i)·atan(2^−i),     d(i) = +1 if z(i) ≥ 0 else −1,   i = 0 … ITER−1
```

There is one stage per clock. In front of the stages, a folding stage negates the vector
and subtracts π for angles in [90°, 270°). The `atan` constants are computed at elaboration
time as `round(atan(2^−i) · 2^18 / 2π)`, i.e. with 2 guard bits below the 16-bit phase.
The x/y datapath has 2 guard bits, and the outputs saturate to 16 bits. With 14 iterations
the output error is a few LSB.

## Decision output

`bit_o` is 1 when the phase step is zero or positive, and 0 when it is negative. In other
words, it is a zero threshold on the phase-calculation output, which is where the
published structure takes its output bits from. It is *not* a symbol slicer for the
received constellation. A symbol decision on the received data would be made from
`phase_est`, or from the received samples rotated by `−phase_est`. This design does not
include one.

## Where this RTL departs from, or fills in, the published description

* **Sign of the cross product.** The published equation uses `xq·yi − xi·yq`. The published
  block diagram subtracts the two products the other way round. This RTL follows the
  equation. With `phase_in` adding to the NCO phase, that is the order that pulls θ̂ toward
  θ.
* **CORDIC direction rule.** The published flowchart picks `d(i)` from the sign of `y(i)`
  and starts at `i = 1`. That is vectoring-style control, and applied to the printed
  recurrence it does not produce a rotation. Since the NCO needs cos/sin of a given angle,
  this RTL uses rotation mode (`d(i)` from the sign of the residual angle), starts at
  `i = 0`, and adds the quadrant fold.
* **Amplitude detector.** The description speaks of a detector that finds the amplitude of
  `xi − yi`. The block diagrams wire the raw difference into the phase calculation instead.
  This RTL follows the diagrams.
* **"No multipliers".** The description calls the system multiplier-free. Its own block
  diagrams nevertheless contain two multipliers in the sign detector and a
  (sign × small-constant) multiplier in the phase calculation. This RTL has them as drawn.
* **Own choices**, where nothing was specified:
  * the phase format (16-bit full turn), and the step unit (phase codes);
  * `FREQ_WORD`, `AMP` and `ITER`;
  * the two-register NCO structure and the reset-time latency compensation;
  * the 17-bit error, and the sign coding {−1, 0, +1};
  * the decision rule (≥ 0 → 1);
  * a synchronous active-low reset that clears everything, so θ̂ starts at 0.
* **Size.** The published FPGA implementation used 125 flip-flops. This RTL has
  considerably more register bits, most of them in the 15-stage, 18-bit CORDIC pipeline and
  the 3-stage 32-bit product pipelines. The published NCO was a vendor core whose insides
  are unknown. `ITER` and the pipeline depths are the knobs if area matters.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `ITER` | 14 | CORDIC iterations and pipeline stages |
| `FREQ_WORD` | 2048 | carrier frequency, `fs·FREQ_WORD/65536` |
| `AMP` | 16000 | NCO amplitude B |
| `SCALE_SHIFT` | 2 | step = `2^SCALE_SHIFT` phase codes |
| `MULT_LAT` | 3 | register stages in each multiplier |

The sample width (16) and the phase width (16) are in `psk_pkg`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_cordic_rotator` compares 3000 random rotations with real-valued math, at exactly
  `ITER+1` clocks of latency.
* `tb_nco` checks, on every clock, that `phase_out` is the running sum of the steps. It
  also checks that the samples equal `AMP·cos/sin(2π(n·FREQ_WORD + θ̂(n−ITER−1))/2^16)`.
* `tb_sign_detector` and `tb_phase_calc` check bit-exact results at their exact latencies,
  including the zero and equal-value corner cases.
* `tb_phase_detector` and `tb_decision_threshold` check every output against its
  arithmetic definition.
* `tb_psk_phase_comp_top` runs the whole loop at its default parameters, from reset, on
  four cases:
  * BPSK, 45° offset, 10 dB;
  * QPSK, 22.5° offset, 10 dB;
  * 8-PSK, 22.5° offset, 10 dB;
  * 16-PSK, 22.5° offset, 15 dB.

  Each case sends three symbols, held 40 000 samples each, with Gaussian noise. It checks
  that the mean phase error over the last 2048 samples of every symbol is under 1°.
  On every clock it also checks that θ̂ advances by exactly the previous step, and that the
  decision bit matches the step's sign. It fails if any of these never happens: a raised
  step, a lowered step, a gated step, a phase wrap through 0°, or both decision values.
  The whole run takes under a second.

To run one, for example the full loop:

```
verilator --binary --timing --assert -y rtl -y tb rtl/psk_pkg.sv \
          tb/tb_psk_phase_comp_top.sv --top-module tb_psk_phase_comp_top
./obj_dir/Vtb_psk_phase_comp_top
```

Nothing here models the channel beyond additive noise. There is no frequency offset
between transmitter and receiver: the loop only corrects phase, and a frequency error
would show up as a ramp it has to chase at 2 codes per sample on average. Timing closure
(the published implementation ran at 175 MHz) has not been checked.

# FIR filtering of an adaptive-delta-modulated signal, without multipliers

An ordinary FIR filter, y(k) = Σ h(i)·x(k−i), needs one multiplication per tap
because every input sample is a multi-bit PCM word. This design digitizes the
input with an adaptive delta modulator (ADM) instead. Per sample, the ADM
produces one sign bit and a step size that is always a power of two times a
fixed maximum. The filter then works on the coder's increments Δx:

    Δy(k) = Σ_{i=0}^{N−1} h(i)·Δx(k−i),   Δx(k) = ±Δmax·2^−l(k)

Each term is a stored coefficient G(i) = h(i)·Δmax, shifted right by l(k−i)
and then added or subtracted. A leaky accumulator integrates Δy back into the
filtered signal. The datapath is only a shifter, one adder, counters and small
memories. Several channels can share it in time.

The RTL implements the structure described in *Performance Analysis and Design
of FIR ADM Digital Filters*: a constant-factor delta modulation (CFDM) coder,
a serial digital processor with sign-bit and step-direction storage, a
half-length symmetric coefficient ROM, and a leaky accumulator. The
single-channel and multi-channel forms are the same RTL, selected by the
`N_CH` parameter.

```
 x_in[c] ─► adm_encoder[c] ─{b(k−1), dir}─► fir_adm_processor ─Δy, ch─► leaky_accumulator ─► y[c]
                                             ├ history_ram    (sign + direction bits, one ring per channel)
                                             ├ coeff_rom      (G(0..N/2−1), XOR-folded address)
                                             ├ level_counter ×(N_CH+1)  (step-level replay)
                                             └ tap_alu        (shift, XOR, add)
```

## The coder: constant-factor delta modulation

`adm_encoder` (with `adm_step_logic`) runs once per sample:

    l(k)    = l(k−1)+1  if b(k−1) ≠ b(k−2)   (signs alternate: halve the step)
              l(k−1)−1  if b(k−1) = b(k−2)   (signs repeat: double the step)
              held within 0 … L_MAX
    Δ(k)    = DELTA_MAX >> l(k)
    x̂(k)    = x̂(k−1) − (x̂(k−1) >>> LEAK_M) + (b(k−1) ? +Δ(k) : −Δ(k))
    b(k)    = 1 if x(k) ≥ x̂(k), else 0

The step factors are 2 and ½, so the step is a pure shift. L_MAX = 10 gives a
60 dB step range. The predictor leaks with β = 1 − 2^−3 = 0.875. A hardware
coder does this with a comparator, a D/A converter and an RC integrator. Here
it is the sampled equivalent in integer arithmetic: the input is a digital
16-bit word and the comparison is a signed compare. The analog loop itself is
not part of the RTL.

The coder sends two bits per sample to the filter: the sign of the increment
it just applied, b(k−1), and the direction bit of the level change (called
Δ1). It does not send the 4-bit level.

## Rebuilding the step levels from one bit per sample

This is the least obvious part of the design. Tap i of the sum needs
l(k−i), the level of a sample up to 59 samples old. Only the one-bit direction
is stored per sample. This is enough because the level rule is deterministic:
given l(j−1) and the direction bit of sample j, the saturating rule gives l(j)
exactly, including at the ends of the range, where the counter holds.

`fir_adm_processor` therefore keeps two kinds of `level_counter`:

* **L(k−N+1)**, one per channel, holds the level of the oldest stored sample.
* **L(k−i)** is preset from L(k−N+1) at the oldest tap. It is then stepped
  with each younger sample's direction bit as the taps are read from oldest
  to newest. After each step it holds l(k−i).

On the read of tap N−2, the oldest-level counter takes the same step. It then
holds l(k−N+2), the oldest level of the next sample period. Both counters
saturate exactly as the coder does, so the replay matches the coder bit for
bit.

The walk has to run from oldest to newest, because the rule cannot be run
backwards at the saturation points. This fixes the tap order, i = N−1 down
to 0.

Start-up: until N samples have been written, taps older than the first sample
contribute nothing. Their direction is forced to "up", which holds the replay
at L_MAX. L_MAX is also the coder's reset level, so the two agree from the
first sample.

## Coefficient storage

A linear-phase filter has h(i) = h(N−1−i), so `coeff_rom` stores only the
first N/2 coefficients, in sign-and-magnitude form. The address for tap i is
formed from a counter holding `i + OFF`, with `OFF = 2^A − N/2`. The low A bits
are XORed with the counter's top bit:

* for i < N/2, the address is i + OFF;
* for i ≥ N/2, the address is (2^(A+1) − 1) − (i + OFF) = (N−1−i) + OFF.

ROM word a therefore holds G(a − OFF), and the mirror costs A XOR gates. The
offset makes the fold exact for N = 60, which is not a power of two (A = 5,
OFF = 2).

`rtl/coeff_g.hex` is a 24-bit master table of 30 words. Each word holds
G(i) = h(i)·2^25, with bit 23 as the sign. At load time the ROM rounds each
magnitude half-up to `COEF_W − 1` bits:

    mag_b = (mag_24 + 2^(23−COEF_W)) >> (24 − COEF_W)

One table therefore serves every coefficient word length from 2 to 24 bits.

The table holds a 60-tap Parks–McClellan low-pass for 32 kHz sampling, with
the pass band to 2.5 kHz, the stop band from 3.4 kHz and a 1:10 error weight.
It gives 45 dB stop-band attenuation and 0.97 dB pass-band ripple, after
rounding to 16 bits as well. `tb_coeff_rom` measures both from the ROM
contents. The
specified ripple is 0.47 dB, which 60 equiripple taps cannot reach together
with 45 dB. To use another filter, write N/2 words of
`sign<<23 | round(|h(i)|·2^25)`, G(0) first. |h(i)| must stay below 0.25,
and N must be even.

## Arithmetic per tap

`tap_alu` takes the coefficient magnitude and shifts it right by l(k−i). The
bits shifted out are dropped, which is truncation. The term is negative when
the coefficient sign equals the inverted increment sign. A negative term is
added as its two's complement: XOR gates invert the operand and the adder's
carry-in adds one. One adder therefore serves for both addition and
subtraction.

`leaky_accumulator` computes

    y ← y − (y >>> LEAK_M) + Δy,   i.e. 1/(1 − βz^−1), β = 0.875

The shift is wiring, followed by a subtractor and an adder. With several
channels, each channel has its own output register, and a select picks the
register being updated.

With LEAK_M = 0 there is no leak, and the accumulator becomes an ideal
integrator. The truncation error of every shifted term then stays in y for
good, and so would any upset. This is why the leaky form is the default.

The coder's predictor has the same leak. As a result, the accumulator exactly
undoes the differencing, apart from truncation:
y(k) = Σ h(i)·x̂(k−i).

## Number formats

| signal | format (defaults) |
|---|---|
| `x_in` | signed 16-bit; full scale ±1 = ±2^15 |
| x̂ (coder) | signed 18-bit; \|x̂\| ≤ DELTA_MAX·2^LEAK_M for LEAK_M > 0 |
| DELTA_MAX | 8192 = 0.25 of full scale; smallest step 8 LSB |
| G(i) | 16-bit sign-magnitude, G = h·2^17 |
| Δy, y | signed 24-bit |

The output scale is y = (Σh·x̂) · 2^(COEF_W+1)/DELTA_MAX, which is 16 × the
input scale at the defaults. Sums wrap on overflow. At the defaults, a
full-scale input leaves about 3 bits of headroom in y.

## Schedule, interface and timing

`fir_adm_filter` ports: `clk`, `rst_n` (asynchronous, active low),
`sample_en`, `x_in[N_CH]`, `ready`, `overrun`, `adm_bit[N_CH]`, `y_valid`,
`y[N_CH]`.

To take a sample of every channel, pulse `sample_en` while `ready` is high.
A pulse while `ready` is low is dropped and reported by a one-cycle `overrun`.
One sample period runs as follows:

| cycle (after `sample_en`) | activity |
|---|---|
| 0 | every coder codes its sample (`adm_bit` valid from cycle 1) |
| 1 | processor starts |
| 2 … 1+N_CH | write phase: each channel's two bits go through a select into its ring in `history_ram` |
| … N_CH·N_TAPS cycles | tap phase: one tap per clock, channel after channel |
| 4-stage pipeline | read RAM/ROM → replay level → shift/add → latch Δy; each channel's Δy updates its output register |
| 3 + N_CH + N_CH·N_TAPS + 3 | `y_valid` pulses; all `y[c]` are new |

`ready` rises one cycle before `y_valid`. The shortest sample period is
therefore 5 + N_CH·(N_TAPS+1) clocks. At the defaults that is 66 clocks, so
sampling at 32 kHz needs a clock of at least 2.11 MHz. Sixteen channels would
need 31.4 MHz.

## Parameters (top level)

| name | default | meaning |
|---|---|---|
| `N_TAPS` | 60 | filter length, even |
| `N_CH` | 1 | channels sharing the processor |
| `X_W` | 16 | input width |
| `COEF_W` | 16 | coefficient word length b, sign included (≤ 24) |
| `L_MAX` | 10 | largest shift; step range 6·L_MAX dB |
| `DELTA_MAX` | 8192 | largest step, input LSBs |
| `LEAK_M` | 3 | leak β = 1 − 2^−LEAK_M; 0 gives an ideal integrator (β = 1) |
| `ACC_W`, `Y_W` | 24 | Δy and y widths; use about COEF_W+8 |
| `INIT_FILE` | `rtl/coeff_g.hex` | master coefficient table, relative to the working directory |

## Files

| file | content |
|---|---|
| `rtl/adm_pkg.sv` | level type, stored-word struct, the saturating level rule |
| `rtl/adm_step_logic.sv` | sign flip-flops, direction bit, level counter, step decoder |
| `rtl/adm_encoder.sv` | CFDM coder |
| `rtl/history_ram.sv` | sign-bit and direction storage |
| `rtl/coeff_rom.sv`, `rtl/coeff_g.hex` | half coefficient ROM with XOR folding; master table |
| `rtl/level_counter.sv` | presettable saturating up/down counter |
| `rtl/tap_alu.sv` | shift, conditional two's complement, accumulate |
| `rtl/fir_adm_processor.sv` | sequencer, address counters, level replay, pipeline |
| `rtl/leaky_accumulator.sv` | per-channel leaky integrator |
| `rtl/fir_adm_filter.sv` | top level |
| `tb/fir_adm_ref_pkg.sv` | bit-exact reference model, ideal FIR, test signals |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulation

Run from the repository root, because the coefficient file is opened by the
relative path `rtl/coeff_g.hex`. For example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/adm_pkg.sv tb/fir_adm_ref_pkg.sv tb/tb_fir_adm_full.sv \
        --top-module tb_fir_adm_full -o sim && ./obj_dir/sim

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_adm_step_logic`, `tb_adm_encoder`, `tb_history_ram`, `tb_coeff_rom`, `tb_level_counter`, `tb_tap_alu`, `tb_leaky_accumulator` | Block tests against separately written models. |
| `tb_fir_adm_processor` | Two channels of random coder words; every Δy and its cycle are checked, including start-up and ring wrap. |
| `tb_fir_adm_filter` | Three channels end to end, bit-exact. Counts step halving and doubling, holds at level 0 (slope overload) and at L_MAX, added and subtracted terms, start-up, ring wrap, leak, channel sharing and overrun. |
| `tb_fir_adm_full` | Default parameters. 6000 samples per input level (first 1000 not scored), flat and RC-shaped inputs, rms 0.0003 to 0.25. Bit-exact check plus SQNR. |
| `tb_fir_adm_wordlength` | Six filters with b = 8 … 18 on the same inputs. Bit-exact check plus an SQNR table. |
| `tb_adm_cfdm_sweep` | The coder alone, with leak β = 1, 0.5, 0.75, 0.875, 0.9375, at 32 and 48 kHz, over the same input levels. Bit-exact check plus an SQNR table. |

The test inputs are sums of 16 random tones below 4 kHz. For the RC-shaped
input, the tones are weighted by a one-pole response with its corner at
920 Hz. The SQNR compares y with an ideal FIR of the input, delayed one
sample, because the coder's prediction x̂(k) is formed before x(k) is seen.

Measured SQNR at the defaults (dB):

| rms | 0.0003 | 0.001 | 0.003 | 0.01 | 0.03 | 0.1 | 0.25 |
|---|---|---|---|---|---|---|---|
| flat | 7.0 | 13.2 | 10.8 | 13.1 | 12.2 | 9.3 | 12.7 |
| RC-shaped | 9.0 | 13.8 | 16.4 | 16.4 | 15.5 | 14.5 | 15.6 |

The word-length sweep shows the expected threshold. At rms 0.003 with an
RC-shaped input, b = 8/10/12/14/16/18 give −0.1/9.2/14.1/16.1/16.4/16.5 dB.
Above the threshold, the SQNR is limited by the coder itself.

The coder on its own, measured over the whole band up to fs/2 without the
low-pass filter, reaches only 4–10 dB with β = 0.875 from rms 0.001 up. It
is about 2.5 dB better at 48 kHz than at 32 kHz. β = 0.5 is clearly worse than the other leak
factors, and the ideal integrator (β = 1) is worse than β = 0.875 on
average. The low-pass filter removes the coder noise above the signal band.
That removal is most of the gain between the two tables.

## Where this RTL departs from, or goes beyond, the published design

* **Digital coder.** The analog comparator, D/A converter and RC integrator
  are replaced by their sampled integer equivalent. The coder's leak uses the
  same β as the accumulator. The published coder has a leaky RC integrator
  in its feedback path, although its update equation is written without a
  leak.
* **Step rule.** The level moves one place per sample and holds at both ends.
* **DELTA_MAX.** Set to 0.25 of full scale, which is this design's choice.
  The published rule, ten times the optimum linear-DM step, gives about
  1.75 of full scale. At that value the smallest step (2^−10 of it) exceeds
  the small input levels evaluated, so it was not used.
* **Shifting.** A one-cycle barrel shifter replaces a shift register stepped
  by the level counter. This makes the sample period fixed.
* **Storage.** The sign bits and direction bits share one RAM word. Each
  channel owns a ring of N words.
* **Not in the source design.** The pipeline, state machine, handshake,
  overrun flag, reset values, start-up rule, word widths, XOR-fold offset and
  coefficient table are this design's own choices.
* **Not built.** Leak factors that are not of the form 1 − 2^−m
  (β = 1 is available as LEAK_M = 0). A 48 kHz coefficient set.

# Real-time motion-artefact detector for fNIRS: an oversampled RBF-SVM datapath

Functional near-infrared spectroscopy (fNIRS) measures blood-oxygenation changes
in the cortex through light intensity. When the wearer moves, the optodes shift
and the signal fills with motion artefacts. This design flags such artefacts
sample by sample, in hardware, with a support vector machine (SVM) that has a
Gaussian radial-basis-function (RBF) kernel. It is built to be small and
low-power rather than fast. The fNIRS signal changes on a scale of seconds, so
one kernel unit is shared by all 55 support vectors, one per clock cycle,
instead of 55 kernel units working in parallel.

Each sample of two raw features goes through three stages:

1. **Normalisation**, once per feature. The raw value is centred and scaled by
   its running mean and running standard deviation. Both come from
   single-pole IIR filters.
2. **Kernel evaluation**, time-shared. For support vector *i* = 0 … 54, one per
   clock cycle, the unit computes
   `t_i = c_i · exp(−Γ · Σ_f (x_f − sv_i,f)²)`.
   Here `c_i = y_i · α_i` is the signed Lagrange coefficient. The terms are
   collected back into 55 parallel words.
3. **Decision.** An adder tree forms `Σ t_i`. The flag is `1` (motion
   artefact) when that sum is greater than 0. There is no bias term.

All arithmetic is IEEE-754 single precision (binary32). A fixed-point
version of this classifier loses its accuracy because the intermediate values
span too wide a range.

## Clocking: one fast clock, 55 slots per sample

Only one clock exists. `svm_tc` counts the slots 0 … 54 on cycles where
`ce_in` is high, and a base period is those 55 slots. It gives two enables:

| signal     | high when         | used for |
|------------|-------------------|----------|
| `en_last`  | slot 54 (and `ce_in`) | take a raw sample into the preprocessing registers; latch the 55 deserialised kernel terms |
| `en_first` | slot 0 (and `ce_in`)  | register the decision value and the flag |

The sample rate is the clock divided by 55: a 2.5 MHz clock gives 45.45 kHz
samples, and 166.67 MHz gives 3.03 MHz. The top exposes `en_last` as
`sample_en`. The raw inputs may change on every cycle, as a free-running
stream would. Only the value present in slot 54 is used.

The latency from the sampling edge to the result register is 56 enabled
cycles:

```
edge t        : raw_x sampled, normalised features xn registered
slots 0..54   : slot i computes t_i from xn and sv_i, shifts it into the deserializer
edge t+55     : (next en_last) 55 terms latched in parallel; next sample taken
edge t+56     : (en_first) adder tree + compare registered -> decision, ma_flag, out_valid
```

This is one base period, the cost of serialising the kernel, plus one
cycle. `out_valid` pulses for one cycle with each new result. It stays low
for the first period after reset, which carries no sample. While `ce_in` is
low the whole design holds its state.

## The time-shared kernel channel (`svm_serial_channel`)

This part of the design is the hardest to follow. Its pieces are:

- **Serializer.** A multiplexer picks support vector `cnt` and its
  coefficient from `sv_memory`. The normalised sample `xn` stays stable for
  the whole period, because it changes only at `en_last`.
- **`svm_kernel_unit`.** It chains a subtractor per feature, a squarer per
  feature, an adder for the feature sum, a multiply by −Γ, `fp_exp`, and a
  multiply by the coefficient. The chain is purely combinational and
  settles within one slot.
- **`deserializer`.** A 55-word shift register advances on every enabled
  cycle. At `en_last`, an output register takes the 54 stored words plus the
  word arriving in that cycle. All 55 terms of the period then sit in slot
  order on `k[0..54]` until the next period.

Because the kernel chain has no pipeline registers, slot *i* always
belongs to support vector *i*, and no alignment bookkeeping is needed. The
price is a long combinational path: exp plus four multipliers and three
adders. That path is fine at a few MHz, but too long for a 6 ns clock (see
"Limits").

## Binary32 arithmetic units

| module | does | how |
|--------|------|-----|
| `fp_addsub` | a ± b | align the smaller magnitude by a right shift (24 guard bits), add/subtract, renormalise with a 6-step leading-zero shifter |
| `fp_mul` | a · b | exponent add; 24×24 mantissa product split: upper 12 multiplier bits through `*`, lower 12 through a shift-and-add loop |
| `fp_div` | a / b | integer quotient of the mantissas to 25 bits, exponent difference |
| `fp_sqrt` | √a | make the exponent even, halve it, digit-by-digit root of the mantissa |
| `fp_exp` | eᵃ | see below |
| `fp_adder_tree` | Σ of N words | pairwise levels (odd word passes through), N−1 adders, depth ⌈log₂N⌉ (6 for 55) |

Conventions shared by all units (this design's choices):

- Results are truncated, that is, rounded toward zero.
- Subnormal numbers are read as zero, and results below the normal range
  become zero.
- Infinity and NaN propagate in the usual way: x/0 = ∞, 0/0 = NaN,
  √(negative) = NaN, ∞ − ∞ = NaN.
- Each unit is accurate to about one unit in the last place.

**`fp_exp`** works by range reduction plus a polynomial:

1. Shift |a| into a fixed-point word with 7 integer bits and 25 fraction bits
   (Q7.25).
2. Multiply it by log₂e, held as Q1.31, to get t = a·log₂e.
3. Split t into an integer n and a fraction f in [0,1). For negative a,
   n = −⌈|t|⌉ and f = 1 − frac(|t|).
4. Evaluate 2^f = Σₖ₌₀⁹ (ln 2)ᵏ/k! · fᵏ by Horner's rule in unsigned Q2.30.
   The coefficients are ⌊(ln 2)ᵏ/k! · 2³⁰⌋.
5. Output 2^f as the mantissa and n + 127 as the exponent. Arguments with
   |a| ≥ 128 go straight to +∞ or +0.

All multiplies are at most 32×32 bits.

## Normalisation (`preproc_channel`, `iir_mean`)

`iir_mean` computes `y[n] = a·x[n] + (1−a)·y[n−1]`, with `a = 0.01` by
default (parameter `A`, a binary32 word). Its output is combinational from the
current sample, and its state advances only on `en`. `preproc_channel` uses
two of these filters:

```
m  = iir(x)          q  = iir(x·x)
var = q − m·m        sd = sqrt(max(var, 0))
y   = (x − m) / sd   (0 if sd = 0), registered on en
```

The clamp of a negative variance and the zero output for a zero deviation are
this design's choices. They keep NaN and ∞ out of the kernel just after
reset or on a constant input. The first sample after reset always
normalises to about ±9.95, because the filters start at zero.

## Model memory (`sv_memory`)

The trained model is not fixed in the RTL. It is 55 support vectors of two
features plus 55 signed coefficients, 165 binary32 words in all. It is loaded
one word per cycle:

| `wr_sel` | writes |
|----------|--------|
| 0, 1     | feature 0 / 1 of support vector `wr_addr` |
| 2        | coefficient `y_i·α_i` of support vector `wr_addr` |

Reset clears the memory. Load the memory while `ce_in` is low, or accept
that results computed during the load mix old and new entries. For the
trained parameters to carry over, normalise the training features the same
way the preprocessing channel does: running mean and standard deviation with
a = 0.01. Γ is a parameter of the RTL, not a memory entry.

## Top level (`svm_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | fast clock; synchronous active-high reset |
| `ce_in` | in | 1 | clock enable for the whole datapath |
| `raw_x[2]` | in | 32 each | raw features, binary32 |
| `wr_en`, `wr_addr`, `wr_sel`, `wr_data` | in | 1, 6, 2, 32 | model load port |
| `ce_out` | out | 1 | repeats `ce_in` |
| `sample_en` | out | 1 | raw_x is taken on this cycle's edge |
| `decision` | out | 32 | Σ c_i·K_i for the last result |
| `ma_flag` | out | 1 | 1 = motion artefact |
| `out_valid` | out | 1 | one-cycle pulse when `decision`/`ma_flag` update |

The parameters are `NUM_SV` (55), `NUM_FEAT` (2), `A` (0.01) and `GAMMA`
(1.0). Common defaults live in `fp32_pkg`. A board-level differential clock
receiver and the pin mapping are outside this RTL: the top takes a
single-ended clock.

## Where this departs from the reference architecture

- **Stage delay lines.** The reference architecture puts a 55-deep delay
  line behind every arithmetic stage of the shared channel. Here the stages
  form one combinational chain and only the final deserializer is built. The
  latency stays at one base period, and about three 55-word registers are
  saved.
- **Kernel formula.** The kernel follows the RBF formula: the squared
  feature differences are summed and scaled by −Γ before the exponential.
  Block diagrams of the channel draw the square feeding the exponential
  directly.
- **Filter form.** The filter is the running mean `a / (1 − (1−a)z⁻¹)`. A
  sign variant of this transfer function, `a / (1 + (1−a)z⁻¹)`, would not
  average, so it was not used.
- **Arithmetic details.** Rounding, subnormal handling, the exponential's
  method and the split point of the multiplier are this design's own.
- **Load port and valid strobe.** The model write port and `out_valid` are
  additions.

## Limits and trust

- Each block has a self-checking testbench. Every testbench was also run
  against a deliberately broken copy of its module and reported failures.
- The references are real-valued models built from the input bit patterns,
  which are independent of the RTL arithmetic.
- No real fNIRS data or trained model ships with this RTL. Classification
  accuracy on real data is therefore not reproduced here. The end-to-end
  test uses random models and synthetic streams.
- No timing analysis was done. At 2.5 MHz the single-cycle kernel chain and
  the 6-level adder tree have 400 ns per cycle. A 166 MHz clock would need
  pipeline registers in `svm_kernel_unit` and `fp_adder_tree`.
- The design is large in logic because binary32 dividers and square roots
  are combinational. Open-source synthesis of the full top takes many
  minutes.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_svm_top \
  -Irtl -Itb rtl/fp32_pkg.sv tb/tb_fp_pkg.sv tb/tb_svm_top.sv -o sim
./obj_dir/sim
```

Replace `tb_svm_top` with any other `tb_<module>` to test that module alone.
`tb_svm_top` runs the design at its default size: 55 support vectors, two
features, 300 samples. It has random clock-enable stalls and injected bursts
of large values. It checks every decision value, every unambiguous flag and
the 56-cycle latency. It also counts flag mismatches in `error_count`, and
fails if any mechanism (model load, samples, both flag values, stalls) is
never exercised. `tb_fp_pkg` holds the real-number helpers the testbenches
share.

# A 128× decimation filter for a wideband sigma-delta ADC

A sigma-delta modulator produces a coarse word (here 3 bits) at a very high
rate. Its quantisation noise has been pushed to high frequencies. The
decimation filter removes that noise and lowers the rate, here by 128, to a
12-bit word at the Nyquist rate. For example, a 102.4 MHz modulator clock
gives 0.8 MHz output samples.

The design puts as little hardware as possible at the fast rate:

* **Comb section.** Three multiplier-free comb (sinc) stages do the first 16× of
  decimation. They use only adders and wire shifts. All three are written in
  polyphase form, so each computes once per output sample instead of once per input sample.
* **Sharpening section.** Two halfband filters and one FIR filter do the last
  8×, each decimating by 2. They run at 1/16 of the clock rate or less. Half of a
  halfband filter's taps are zero. All non-zero taps are multiplied by
  shifts and adds of their canonical-signed-digit (CSD) form, so there are no
  hardware multipliers.

The stage orders, decimation factors and the polyphase splits of the comb
stages follow the published design this RTL implements. The halfband and FIR
coefficients, the word lengths, rounding, the interface and the OSR bypass
scheme are choices made here, described below.

## The chain

| # | module | filter | ↓ | input → output bits | rate at output (102.4 MHz in) |
|---|--------|--------|---|---------------------|--------------------|
| 1 | `nr_comb1` | (1+z⁻¹)⁴, non-recursive | 2 | 3 → 7 | 51.2 MHz |
| 2 | `nr_comb2` | (1+z⁻¹)³, non-recursive | 2 | 7 → 10 | 25.6 MHz |
| 3 | `cic_sinc3` (or `cic_recursive`) | ((1−z⁻⁴)/(1−z⁻¹))³ | 4 | 10 → 16 | 6.4 MHz |
| 4 | `hbf_dec` ORDER=6 (HBF I) | 7-tap halfband | 2 | 16 → 16 | 3.2 MHz |
| 5 | `hbf_dec` ORDER=14 (HBF II) | 15-tap halfband | 2 | 16 → 16 | 1.6 MHz |
| 6 | `fir_dec` ORDER=36 | 37-tap lowpass + droop equaliser | 2 | 16 → 12 | 0.8 MHz |

The first stage is 4th order because the modulator is 3rd order. A comb of
order L+1 is needed to suppress the noise of an order-L modulator before it
folds into the band. `decim_top` wires the stages together.

## Comb stages: polyphase instead of integrators

The usual way to build a sinc filter is Hogenauer's CIC: integrators at the
input rate, then combs at the output rate. The integrators are recursive,
run at the highest clock rate, and carry the full final word length there.
This design instead expands each comb into its FIR taps and splits them into
polyphase branches. Branch j sees only inputs j, j+D, j+2D, …:

* `nr_comb1`: (1+z⁻¹)⁴ = 1,4,6,4,1 → even branch 1+6z⁻¹+z⁻², odd branch
  4+4z⁻¹. The stage keeps two even and two odd past samples (3-bit each).
  On every even input it forms `x[2m] + 6·x[2m-2] + x[2m-4] + 4·(x[2m-1] + x[2m-3])`.
* `nr_comb2`: (1+z⁻¹)³ = 1,3,3,1 → branches 1+3z⁻¹ and 3+z⁻¹.
* `cic_sinc3`: (1+z⁻¹+z⁻²+z⁻³)³ = 1,3,6,10,12,12,10,6,3,1 → four branches
  1+12z⁻¹+3z⁻², 3+12z⁻¹+z⁻², 6+10z⁻¹, 10+6z⁻¹. Only three input registers
  (the commutator) run at the input rate. The branch histories and the adder tree
  update once every four inputs.

Every constant (3, 4, 6, 10, 12) is one or two shifted adds. No stage has a
feedback loop, and each stage is exactly as wide as its DC gain needs (16, 8,
64): 3 → 7 → 10 → 16 bits. So the comb section cannot overflow and needs no rounding.

`cic_recursive` is the same third stage in Hogenauer form: three integrators,
↓4, three combs. It is kept as a build option (`decim_top #(.CIC_RECURSIVE(1))`)
for comparing the two forms. Its 16-bit integrators overflow constantly. This is
harmless: the true result always fits in 16 bits, so two's-complement wrap-around
cancels in the combs. Its output is bit-identical to `cic_sinc3`. The testbenches check
both forms, and check that the wrap-around really occurs.

## Halfband and FIR stages

**Transposed polyphase form.** Each of these stages splits its taps into an
even branch (fed by even-indexed inputs) and an odd branch (fed by
odd-indexed inputs). Each branch is built in transposed direct form. A new
sample is multiplied by every tap at once, and the products are added into a
chain of partial-sum registers, so the longest path is one CSD multiplier
and a short adder chain. The taps are symmetric, so each distinct product is formed once and
used twice.

**Halfband (`hbf_dec`).** For order 4K+2 every tap at an even distance from the centre
is zero, and the centre tap is ½. The odd branch therefore collapses to a delay
of K half-rate samples followed by a 1-bit shift. The even branch has 2K+2
taps and K+1 distinct products: 2 for HBF I, 4 for HBF II.

**FIR (`fir_dec`).** 37 taps: an even branch of 19 taps (10 distinct) and an odd branch of 18
(9 distinct). The odd branch's result is held from the odd input and
added to the even branch's result on the next even input.

**CSD multipliers (`csd_mult`).** A constant is recoded at elaboration into
digits −1/0/+1 with no two neighbours non-zero (`decim_pkg::csd_digits`).
Each non-zero digit becomes one add or subtract of the shifted input. A 16-bit
constant needs at most 9 non-zero digits; the taps used here have 1 to 6.

**Coefficients** (`decim_pkg`, Q1.15, 16-bit signed), designed for this RTL:

* HBF I / HBF II: h[n] = ½·sinc((n−N/2)/2)·w[n], with w a Kaiser window
  (β = 2 for order 6, β = 4 for order 14). The taps are rounded to 15 fractional bits, with the
  centre forced to exactly ½ and the outer taps adjusted so the DC gain is exactly 1.
  HBF I = {−1532, 0, 9724, 16384, …}; HBF II = {−132, 0, 766, 0, −2497, 0, 10055, 16384, …}.
* FIR: least-squares linear-phase fit with 37 taps. Over 0…0.2 of its input rate the
  target is 1/|H₁(f)·H₂(f)·H₃(f)| (undoing the comb droop). Over 0.3…0.5 the target is 0,
  with weight 10. The taps are rounded to 15 fractional bits, and the DC gain is 1.0004.

Any other set of Q1.15 taps can be dropped into `hbf_coef` / `fir_coef`. The
halfband module relies on the zero pattern and the ½ centre tap.

**Rounding and saturation.** Each halfband rounds its 34-bit sum to nearest (ties towards +∞)
and saturates to 16 bits. The FIR rounds away 19 bits (15 coefficient bits plus the 16 → 12 reduction)
and saturates to 12 bits. A step from full-scale positive to full-scale negative
overshoots and saturates; the end-to-end test makes this happen.

## Selecting the oversampling ratio

`osr_sel` lets the same filter serve modulators clocked at a lower
oversampling ratio. The first, 4th-order stage always runs:

| `osr_sel` | path | total ↓ |
|-----------|------|---------|
| `OSR128` (0) | nr_comb1 → nr_comb2 → sinc3 → HBF I → HBF II → FIR | 128 |
| `OSR64`  (1) | nr_comb1 → sinc3 → …  (nr_comb2 bypassed) | 64 |
| `OSR32`  (2) | nr_comb1 → nr_comb2 → … (sinc3 bypassed) | 32 |

A bypassed path is shifted left by the skipped stage's gain (×8 or ×64). HBF I
therefore always sees the same 16-bit full scale, and the output scaling does not depend on
the mode. A change of `osr_sel` is registered, then flushes every stage for one clock,
so the new mode starts from empty filters. Inputs arriving in those two clocks are
lost. The published design offers the three ratios. Which stages are bypassed to
get them is this design's choice: its block diagram draws the comb stages
in a different order from its text, and the text's order is used here.

## Interface and timing

`decim_top` (package `decim_pkg`):

| port | dir | width | |
|------|-----|-------|-|
| `clk` | in | 1 | modulator-rate clock; all logic is in this one domain |
| `rst` | in | 1 | synchronous, active high; clears all sample history |
| `osr_sel` | in | `osr_e` (2) | see above |
| `in_valid` | in | 1 | a modulator sample is present (normally high every clock) |
| `in_data` | in | 3, signed | modulator output −4…+3 |
| `out_valid` | out | 1 | one-clock pulse per output sample |
| `out_data` | out | 12, signed | output; modulator level +4 would read as +2048 |

Every stage uses the same valid/data convention and has no back-pressure. The first
sample after reset (or after a flush) has index 0. A stage with factor D produces
y[m] = Σ h[k]·x[D·m−k] when it accepts input D·m, and raises `out_valid` one
clock later. For the whole chain, output m appears 6 clocks after input 128·m
was accepted, and outputs are exactly 128 accepted inputs apart. The lower rates are
only strobes: the sharpening stages do their work on the clock edges where
their `in_valid` is high.

Assertions (active in simulation with `--assert`) check that no
decimating stage raises `out_valid` on two consecutive clocks, and that
`osr_sel` never takes the undefined value 3. With value 3 the filter
produces no output. On a device, multicycle constraints could exploit
this, or the strobes could be turned into separate clocks.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/decim_pkg.sv tb/tb_ref_pkg.sv tb/tb_decim_top.sv --top-module tb_decim_top
obj_dir/Vtb_decim_top
```

(`tb_decim_response` and `tb_csd_mult` do not need `tb_ref_pkg.sv`.) The testbenches are:

* **Stage tests.** `tb_nr_comb1`, `tb_nr_comb2`, `tb_cic_sinc3`, `tb_cic_recursive`, `tb_hbf_dec`
  (HBF I), `tb_hbf_2` (HBF II) and `tb_fir_dec` each send random and full-scale
  samples, with random gaps in `in_valid`. The expected outputs come from a plain
  convolution model (`tb_ref_pkg`), which shares no code with the polyphase RTL. Each test
  also checks the output count and that every output arrives one clock after its
  triggering input.
* **`tb_csd_mult`.** Checks 16 constants exhaustively over all 16-bit inputs: every tap in use, plus
  0, ±1, 2¹⁵−1, −2¹⁵, 0x5555 and −0x5556.
* **`tb_decim_top`.** End to end, default build. A behavioural 3rd-order 3-bit
  modulator (`sd_modulator_model`, error-feedback form) feeds a sine. Each of the three
  OSR modes is checked bit-exactly against the chained reference model, and a full-scale
  step segment forces saturation. The test counts modes, mode switches, the use of each
  bypass path and saturation events. At OSR 128 the output sine's swing is 458 LSB,
  against the 460 LSB implied by the input amplitude.
* **`tb_decim_top_recursive`.** The same test on the recursive-sinc3 build. It also counts
  integrator wrap-arounds.
* **`tb_decim_response`.** Frequency response of the whole ADC path. Passband gain is
  0.00 dB at 0.05 fo and 0.2 fo, and −0.04 dB at 0.4 fo (fo = output rate). Tones at
  0.6, 0.9, 1.9, 3.9, 8.1 and 31.9 fo would alias into the band. None of them produces any
  output: each is below ½ LSB, i.e. attenuated by more than 53 dB relative to a 0.45-step input.

## How far to trust it

* The comb stages realise exactly the published transfer functions, and their
  polyphase branches are the exact splits of those functions' taps.
* The halfband and FIR coefficients are not the published ones, which were not
  given. The orders, the zero pattern and the CSD shift-add realisation match.
  Different coefficients change the frequency response only, not the structure.
* The published design uses the recursive and non-recursive comb names
  inconsistently for the third stage. Both forms are provided; the polyphase
  form is the default.
* Word lengths after the comb section (16 bits), rounding, saturation, reset,
  the valid-strobe interface, the bypass scheme for OSR 64/32 and the flush on
  a mode change are this design's own.
* The modulator is not part of the RTL. `tb/sd_modulator_model.sv` is only a
  stimulus model.
* Timing closure at a 102.4 MHz clock has not been measured. Each stage is one
  register level, with a comb adder tree or a CSD multiplier plus one adder.

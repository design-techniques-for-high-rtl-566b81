# Multiplierless multirate multistage FIR filters

This is synthesizable SystemVerilog for narrow-band FIR channel filters that
need no hardware multipliers. The filters are made fast by never propagating a
carry inside the filter core, and small by doing most of the filtering at a low
sample rate. The example design is the channel filter of a first-generation
CDMA cellular receiver:

| specification (19.6608 MHz sampling) | value |
|---|---|
| passband edge | 0.064087 pi |
| stopband edge | 0.125 pi |
| passband ripple | 0.1 dB |
| stopband attenuation | 40 dB |

A direct design needs 69 taps. This design uses three ideas instead:

1. **Interpolated FIR (IFIR) decomposition.** The narrow filter is written as
   `H(z) = I(z) * G(z^4)`. `G(z^4)` is a *periodic model filter*: only every
   4th tap is non-zero, and it shapes the band edges. `I(z)` is an *image
   suppressor*: a short filter that removes the extra passbands that
   `G(z^4)` creates at multiples of 2pi/4. The image suppressor can itself be
   split, `I(z) = I1(z) * I2(z^2)`, giving 7 + 7 + 19 taps in place of 69.
2. **Multirate execution.** A decimator can move its down-sampler forward
   through the cascade (the noble identity): `I1` runs at the input rate and
   drops every other sample, `I2` runs at half rate, and `G` at a quarter rate.
   Each section is a polyphase filter whose arithmetic runs once per output.
   The interpolator is the mirror image of this.
3. **Multiplierless carry-save arithmetic.** The coefficients are constants
   written in canonic signed digit (CSD) form. Each product is therefore a few
   hard-wired shifted copies of the input. All additions up to the filter
   output are done in carry-save form, so a tap costs two full-adder delays
   whatever the word length. A single carry-propagate adder, the vector merge
   adder (VMA), turns the result into two's complement at the output.

The top level, `mmfir_top`, holds three independent engines built from these
blocks:

| engine | module | structure | rate |
|---|---|---|---|
| IFIR filter | `ifir_filter` | `I1(z) I2(z^2) G(z^4)`, 7 + 7 + 19 taps | 1 in, 1 out per clock |
| decimator by 8 | `ms_decim` | `I1` down 2, `I2` down 2, `G` down 2 | 1 in per clock, 1 out per 8 |
| interpolator by 8 | `ms_interp` | up 2 `G`, up 2 `I2`, up 2 `I1` | 1 in per 8 clocks, 1 out per clock |

Both the IFIR filter and the decimator also have the two-section variant
`I(z) G(z^4)` (15 + 19 taps). For the decimator this is `I` down 4, then `G`
down 2. Select it with `IMG_STAGES = 1` or `NSTAGE = 2`.

## Coefficients

`rtl/fir_pkg.sv` holds the four coefficient sets, as integers scaled by
2^10 (`CF = 10` fraction bits):

| set | taps | role | SPT terms |
|---|---|---|---|
| `COEF_G` | 19 | model filter G, used as `G(z^4)` | 54 |
| `COEF_I` | 15 | single-stage image suppressor | 40 |
| `COEF_I1` | 7 | first image-suppressor stage | 15 |
| `COEF_I2` | 7 | second stage, used as `I2(z^2)` | 19 |

The tap lengths and decomposition factors follow the original article. The
coefficient values are this design's own. They are equiripple
(Parks-McClellan) designs, each quantised to the nearest value with at most
four signed power-of-two (SPT) terms. Cascaded, they meet the specification:

* `I1 I2(z^2) G(z^4)`: 0.09 dB ripple, 42.7 dB attenuation.
* `I G(z^4)`: 0.09 dB ripple, 42.8 dB attenuation.

Every filter takes its coefficients as an `int` array parameter. It recodes
them to CSD while it elaborates, so a new set is a parameter change. The
magnitudes must stay below 2^14 (`CSD_P = 16` digit positions). If you change
a set, also update its `ABS_*` magnitude sum in the package: the cascades use
it to size their word lengths.

## The arithmetic, step by step

This part is the least obvious. Every filter module is built from it.

### CSD terms and the MSB fix (`csd_sop`)

CSD recoding writes a coefficient with digits in {-1, 0, +1}, with no two
non-zero digits next to each other. For example, 393 = 2^9 - 2^7 + 2^3 + 2^0.
Each non-zero digit at position p becomes one shifted copy of the B-bit input
x. Sign-extending every copy to the full accumulator width would load the
sign bit heavily. The "MSB fix" avoids this. Each copy is written as an
unsigned B-bit vector:

* digit +1: `{~x[B-1], x[B-2:0]} << p`, which equals `x*2^p + 2^(B-1+p)`;
* digit -1: `{x[B-1], ~x[B-2:0]} << p`, which equals `-x*2^p - 2^p + 2^(B-1+p)`.

Each copy therefore carries a known constant surplus. `fir_pkg::csd_const`
returns minus that surplus for a whole coefficient. A filter sums these
constants over all its taps while it elaborates, into one **compensation
vector (CV)**. The CV enters the tap chain once, at its far end. The copies
themselves are added by a carry-save tree (`csa_tree`, a Wallace-style tree of
3:2 adders). The tree leaves a sum vector and a carry vector whose total is
`sum(c*x) - const` modulo 2^W.

### Carry-save tap chain

The filters use the transposed direct form. The input is broadcast to every
tap, and the delay registers hold partial sums. Each tap register holds a
sum/carry pair. A tap adds its product, which is also a sum/carry pair, with
two rows of full adders (a 4:2 compression). So the chain has no carry
propagation, and its critical path is two full-adder delays whatever the
filter length and word length.

Because the CV enters at the far end, a tap register that has not yet met
the constants of the taps nearer the output holds a value offset by exactly
those constants. The registers therefore reset to those offsets, which are
computed at elaboration. The result is that the first output after reset is
already exact, as if the input history were all zeros.

### Pipelining and the VMA

With `PIPE = 1`, a register follows every level of each multiplier tree. All
trees are padded to the depth of the deepest one, so every product has the
same latency. The chain waits, held at its reset state, until the first real
sample leaves the trees. The VMA (`vma`) is a plain `+` followed by a
register, so it forms its own pipeline stage. Synthesis can choose a
carry-lookahead or carry-select adder for it. It also applies the arithmetic
right shift that drops the fraction bits.

### One-adder chain (`ONE_ADDER = 1`)

For the highest clock rates, `lp_tdf_fir` can pipeline the chain down to one
full-adder delay. A register goes between the two adder rows of every tap.
The first row adds the sum half of the product and the second row adds the
carry half. The carry half is delayed by one register so that both halves
belong to the same sample. This changes the chain's timing in one of two
ways:

* **`ZS > 1`.** The extra register takes the place of one of the `ZS`
  tap-spacing registers. The response is unchanged and only one cycle of
  latency is added.
* **`ZS = 1`.** Every tap now delays the chain by two samples instead of one.
  To keep the response, tap k reads its input from a delay line, N-1-k
  samples back. This costs the mirror sharing (one multiplier per tap) and
  N-1 more cycles of latency.

The option is off by default. None of the CDMA filters needs it.

### Symmetry sharing (mirror taps and mirror filter pairs)

The coefficients are symmetric (linear phase), so `lp_tdf_fir` and
`tdf_interp` build one multiplier per *distinct* coefficient, ceil(N/2) in
all. Each product feeds the two mirror taps k and N-1-k. In the interpolator,
the mirror taps sit in two different polyphase subfilters, m and L-1-m. This
is the "mirror symmetric filter pair" that shares its multipliers. Symmetry is
detected from the coefficient values. An anti-symmetric set
(h[k] = -h[N-1-k], for example a differentiator or Hilbert transformer) shares
its multipliers in the same way. The mirror tap adds the bitwise inverse of
the shared sum/carry pair. Because -(s + c) = ~s + ~c + 2, each such tap is
short by 2, and that constant is folded into the compensation vector together
with the MSB-fix constants. Any other asymmetric set simply gets one
multiplier per tap.

## Multirate structures

### Decimator: folded polyphase chain with shared registers (`tdf_decim`)

The decimator computes `y[n] = sum_k h[k] x[nM + M-1 - k]`, counting samples
from 0 after reset. It works as follows:

1. A commutator shifts input samples into a small register file.
2. On every M-th sample it copies the newest M samples into a block register.
   `blk[0]` is the newest sample, and `blk[m]` is the one m samples older.
3. Write each coefficient index as `k = M*j + m`. Tap j of a single folded
   chain computes `sum_m h[M*j+m] * blk[m]` in one carry-save tree (all M
   products together).
4. The tap adds this into the chain, which advances once per block.

The M polyphase subfilters thus share one chain of ceil(N/M) accumulator
registers instead of owning N registers between them. This is the
memory-saving arrangement, and it makes all the arithmetic run at 1/M of the
input rate. The tree pipeline registers also advance once per block.

### Interpolator: mirror pairs and an output commutator (`tdf_interp`)

The interpolator computes `y[nL + m] = sum_j h[m + L*j] x[n - j]`, which is
zero-stuffing followed by filtering. It works as follows:

1. Every input sample is registered and fed to L transposed carry-save
   chains, one per output phase m, each running at the input rate.
2. After each input, a commutator reads the L chain outputs in turn, one
   every `STRIDE` clocks.
3. The reading passes through a single shared VMA.

Inputs must be at least `L*STRIDE` clocks apart; an assertion checks this.
In `ms_interp`, the strides (4, 2, 1) space each section's outputs to match
the next section's input rate. The last section then delivers one sample per
clock.

### Cascades and word lengths

Inputs are 12-bit two's complement (`IN_W`). Inside a section the accumulator
is `B + clog2(sum|h|) + 1` bits wide. That is exact for every input, so
nothing inside a section ever overflows. Between sections, `ifir_filter` and
`ms_decim` drop the 10 fraction bits with an arithmetic shift, which rounds
toward minus infinity. Each section output is therefore two bits wider than
its input. `ms_interp` drops one bit fewer per up-by-2 section (two fewer for
up-by-4), which restores the gain lost by zero insertion. The output widths
are 18 bits for the IFIR filter and the decimator, and 21 bits for the
interpolator. The interpolator's gain is 8 in total, so a full-scale input
can use all of those bits.

## Interfaces and timing

All modules use one clock (`clk`) and an asynchronous active-low reset
(`rst_n`). Streams are `in_valid`/`in_x` and `out_valid`/`out_y`. There is no
back-pressure.

| module | input | output |
|---|---|---|
| `lp_tdf_fir` | at most one per clock; the pipeline advances only on `in_valid` | response to the sample given LAT valid cycles earlier, LAT = 3 + tree depth (3 with `PIPE = 0`), +1 with `ONE_ADDER`, a further +(N-1) with `ONE_ADDER` and `ZS = 1` |
| `ifir_filter` | as `lp_tdf_fir` | sum of the three section latencies |
| `tdf_decim` | at most one per clock | one output per M inputs, regular when the input is regular |
| `ms_decim` | one per clock | exactly one output every 8 clocks once running |
| `tdf_interp` | at least `L*STRIDE` clocks apart | L outputs, `STRIDE` clocks apart |
| `ms_interp` | every 8 clocks (or slower) | 8 outputs per input; back to back at full rate |

For the default 19-tap `lp_tdf_fir`, LAT is 5. Every coefficient has at most
four CSD terms, so each tree has two levels.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | constants, coefficient sets, CSD and tree-size functions |
| `rtl/csa.sv` | one 3:2 carry-save adder row |
| `rtl/csa_tree.sv` | carry-save reduction tree, optional per-level pipelining |
| `rtl/vma.sv` | vector merge adder (registered carry-propagate add, shift) |
| `rtl/csd_sop.sv` | CSD constant multiplier / sum of products with MSB fix |
| `rtl/lp_tdf_fir.sv` | linear-phase transposed FIR, tap spacing `ZS` for `G(z^L)` |
| `rtl/ifir_filter.sv` | single-rate IFIR cascade |
| `rtl/tdf_decim.sv` | folded polyphase transposed decimator |
| `rtl/ms_decim.sv` | multistage decimator by 8 |
| `rtl/tdf_interp.sv` | polyphase transposed interpolator with mirror pairs |
| `rtl/ms_interp.sv` | multistage interpolator by 8 |
| `rtl/mmfir_top.sv` | the three engines side by side |
| `tb/tb_ref_pkg.sv` | bit-true reference models (direct convolution) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cdma_spec.sv` | tone test of the channel specification |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. A watchdog ends a hung run with a failure. To run one with Verilator
5:

```sh
verilator --binary --timing --assert -Wno-fatal \
    -y rtl -y tb rtl/fir_pkg.sv tb/tb_ref_pkg.sv tb/tb_mmfir_top.sv \
    --top-module tb_mmfir_top
./obj_dir/Vtb_mmfir_top
```

Replace `tb_mmfir_top` with any other testbench name. `tb_csa_tree`,
`tb_vma` and `tb_csd_sop` do not need `tb/tb_ref_pkg.sv`, but including it
does no harm. Each run builds in about 15 s and simulates in well under a
second.

What the testbenches check:

* **Block tests.** Every output sample is compared with a bit-true reference,
  a plain convolution with the same shifts between sections. The tests also
  check:
  * output rates: one decimator output per 8 inputs, back-to-back
    interpolator outputs, and no gaps in the IFIR output;
  * the 5-cycle `lp_tdf_fir` latency;
  * the one-adder chain, with `ZS = 1` (24-cycle latency) and `ZS = 4`;
  * anti-symmetric coefficient sets in `lp_tdf_fir` and `tdf_interp`
    (shared, inverted products);
  * pipeline holds when `in_valid` drops;
  * full-scale square waves.
* **`tb_mmfir_top`.** Runs all three engines at their default sizes, at the
  same time. It counts the pipeline holds, the blocks completed by each
  decimator section, and the phase sets commutated by each interpolator
  section. A mechanism that never occurred counts as a failure.
* **`tb_cdma_spec`.** Measures the gain of the IFIR filter and of the
  decimator for passband and stopband tones.

## Where this design departs from, or goes beyond, the original

* **Coefficients and word lengths.** The coefficient values, the 12-bit input
  width, the truncation between sections and the interpolator gain scaling
  are this design's own choices. The original gives only the specification,
  the tap counts and the factors.
* **Pipelining.** By default, the tap adds its carry-save product with two
  adder delays. The multiplier trees are pipelined to one adder delay per
  level. The one-adder chain is an option. How it is retimed (the delayed
  carry half, and the input delay line for `ZS = 1`) is this design's own
  arrangement.
* **Anti-symmetric sharing.** The original mentions sharing multipliers
  between anti-symmetric taps but shows no circuit for it. The inverted
  sum/carry pair with the +2 folded into the compensation vector is this
  design's realisation.
* **Two-section decimator factors.** The two-section decimator is built as
  down 4 followed by down 2, which is what an overall factor of 8 with L = 4
  requires.
* **The interpolator.** The original describes the multistage interpolator
  only as the counterpart of the decimator and gives no example of one. Its
  factors, filters and commutator timing here mirror the decimator.
* **Interfaces.** The valid handshake, the reset behaviour and the grouping
  of the three engines in one top are this design's choices.
* **Not included.**
  * The 64-QAM demodulator filter of the original: its coefficients are not
    available, but `lp_tdf_fir` is the architecture it uses.
  * The conventional 69-tap filter and the single-stage polyphase decimator
    used as baselines.
  * The direct-form alternatives (a decimator with mirror pairs and an
    interpolator with shared input registers), which the original rejects
    for high speed.
  * The coefficient optimisation method (variable filter order selection),
    which is a design-time algorithm.
* **Not verified.** No timing or power analysis was done. Nothing here
  confirms the clock rates reported for the original (200 MHz input for the
  CDMA filters, 714 MHz for the pipelined single-rate filter).

# Coefficient-segmented FIR filter

Most of the dynamic power of a CMOS FIR filter goes into its multiplier, and much of that
is bit switching at the multiplier's inputs. Two's complement coefficients make this worse.
Whenever consecutive coefficients change sign, the sign-extension bits at the top of the
word all flip.

Coefficient segmentation removes most of that switching. Every coefficient `h` is split
into two parts, `h = s + m`:

* `s` is a signed power of two, `±2^e`. Its product with a sample is a shift.
* `m` is what remains. It is never negative and is always small, so it goes to the
  multiplier's coefficient input.

Every `m` has the same sign, so no sign bits toggle. Every `m` is also below
`2^(WIDTH-2)`, so the two top bits of the coefficient input never move. The filter output
is the sum of two convolutions: `y = y_s + y_m`, where `y_s = Σ s_k·x(n-k)` and
`y_m = Σ m_k·x(n-k)`.

This repository holds synthesizable SystemVerilog for such a filter. The default size is
8-bit data, 8-bit coefficients and up to 89 taps. It has one shared barrel shifter, one
shared two's complement array multiplier, a hardware unit that segments coefficients as
they are loaded, and a switching monitor on the multiplier's coefficient input.

## Splitting a coefficient

For a coefficient `h`, let `i` be the smallest integer with `2^i ≥ |h|`. Then:

| case | `s` | `m = h − s` |
|---|---|---|
| `\|h\| = 2^i` (already a power of two) | `h` | 0 |
| `h > 0`, not a power of two | `2^(i−1)` | `h − 2^(i−1)`, in `1 .. 2^(i−1)−1` |
| `h ≤ 0`, not a power of two | `−2^i` | `h + 2^i`, in `1 .. 2^(i−1)−1` (0 gives 1) |

A positive `h` takes the power of two just below it. A negative `h` takes the negative
power of two just beyond it. Either way `m` is positive and at most `2^(WIDTH-2) − 1`.

A zero coefficient falls into the third row with `i = 0`, so it becomes `s = −1, m = 1`.
That costs nothing, because the sum is still zero. Only this reading of the rule is
well defined for zero: the "positive" branch would ask for `2^(−1)`.

Worked example (8-bit): `H = (−97, −15, −127, −29, −119, −103, 93, 57, −111, 127)` becomes
`S = (−128, −16, −128, −32, −128, −128, 64, 32, −128, 64)` and
`M = (31, 1, 1, 3, 9, 25, 29, 25, 17, 63)`. Cycling through `H` switches the coefficient
input 34 times per pass. Cycling through `M` switches it 16 times. The filter testbench
measures both numbers.

`coef_segmenter` carries out this rule in hardware, in the way the rule is usually
stated. A search state raises `i` by one per clock until `2^i ≥ |h|`. A second step then
picks the row of the table. The search keeps the logic small, and loading is rare.
`s` is stored as a sign bit and an exponent (`s_neg`, `s_exp`). `m` is stored as a
WIDTH-bit word whose two top bits are zero, which an assertion checks.

## Datapath

```
 coef_h ──► coef_segmenter ──► coefficient store (s_neg, s_exp, m) per tap
                                        │ tap k
 x_in ──► circular delay line ──► x(n-k)│
                                        ▼
                     operand registers (x, s_neg, s_exp, m)
                         │                         │
                  pow2_shifter               array_mult
                   x·2^s_exp                    x·m
                         │                         │
             acc_s ± (sign of s)              acc_m +
                         └──────────► y = y_s + y_m
                                          │
        toggle_counter on the multiplier coefficient input ──► coef_toggles
```

* **`seg_fir`** (top) holds the coefficient store and a circular delay line of MAX_TAPS
  samples. Its sequencer walks `k = 0 .. L−1`, one tap per clock, reading `x(n−k)` and the
  segmented `h_k`. It does this for every output sample. The multiplier's coefficient input
  therefore sees `m_0, m_1, …, m_{L−1}`, then `m_0` again, which is exactly the cyclic
  sequence whose switching the method reduces.
* **`seg_mac`** registers the operands, then shifts and multiplies. It keeps two
  accumulators. `acc_s` adds or subtracts the shifted sample, according to the sign of `s`.
  `acc_m` adds the product. The operand registers load only on a valid tap, so the
  multiplier inputs stay still between frames.
* **`pow2_shifter`** is a logarithmic barrel shifter that computes `x·2^e`, sign-extended
  to 2·WIDTH bits. The sign of `s` is applied in the accumulator, so the unit only shifts.
* **`array_mult`** is a Baugh-Wooley WIDTH×WIDTH two's complement array. Each row is a
  ripple chain of full adders that adds one weighted partial-product row.
* **`toggle_counter`** adds up, every clock, the Hamming distance between the bus and its
  value one clock earlier. It saturates at its maximum.
* **`seg_fir_pkg`** holds the default sizes and the state and branch enums.

The accumulators are `2·WIDTH + clog2(MAX_TAPS)` bits wide (23 at the defaults), which is
enough for any sum of products.

## Interface and timing of `seg_fir`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `num_taps` | in | filter length L, 1..MAX_TAPS; keep it steady while a sample is processed |
| `coef_valid`, `coef_ready`, `coef_addr`, `coef_h` | in/out/in/in | load raw coefficient `h_k` at index `k` |
| `coef_done`, `coef_branch` | out | one-clock pulse when a segmented coefficient is stored, and which table row produced it |
| `in_valid`, `in_ready`, `x_in` | in/out/in | sample input |
| `out_valid`, `y`, `y_s`, `y_m` | out | output sample and its shift and multiplier parts, valid for one clock |
| `toggle_clear`, `coef_toggles` | in/out | switching count at the multiplier coefficient input |

* **Coefficient load.** One coefficient is taken at a time. It is stored `i+2` clocks
  later, with `i ≤ WIDTH−1`, and then `coef_ready` returns. Loads are accepted only while
  the filter is idle. When a sample and a coefficient are offered in the same clock, the
  sample goes first. Loading does not clear the delay line.
* **Samples.** After reset the delay line holds zeros, so the first outputs are those of a
  filter started from rest. A sample taken at clock edge 0 gives `out_valid` after edge
  `L+1`. `in_ready` rises again after edge `L`. With samples waiting, the filter therefore
  takes one sample every `L+1` clocks. The result for one sample appears in the same clock
  in which the next sample is taken.
* The coefficient store is not reset. Load every tap below `num_taps` before sending
  samples.

## Switching on realistic filters

How much segmentation saves depends on the coefficients. `tb_seg_fir_filters` measures the
saving on ten filter specifications: five lowpass and five bandpass, with 32 to 89 taps.
It designs each filter by the window method, quantises it to 8, 16 and 24 bits (largest
coefficient = full scale), and streams zero-mean uniformly distributed samples through the
filter. The filter design rests on these choices:

* the sampling rate is twice the last band edge;
* each cutoff lies in the middle of its transition band;
* each filter uses its Hamming, Blackman or Kaiser window, and a Hamming window where the
  specification names none.

The table gives the transitions per pass at the multiplier coefficient input, summed over
all ten filters:

| word length | raw coefficients | segmented `m` | reduction |
|---|---|---|---|
| 8 bits | 1736 | 650 | 62.6 % |
| 16 bits | 4338 | 2812 | 35.2 % |
| 24 bits | 6504 | 4972 | 23.6 % |

The saving comes mostly from the sign and the top bits. Its share therefore shrinks as the
word grows and more of the switching sits in the low-order bits. These figures are toggle
counts on a single bus. They are not the multiplier's switched capacitance, which also
depends on the data input and on how activity spreads through the array.

## What is taken from the method, and what is this design's own

Taken from the method:

* the splitting rule, including the iterative search for `i`;
* applying `s` by a shift and `m` by a two's complement array multiplier;
* the two partial sums `y_s` and `y_m`, added at the end;
* equal data and coefficient word lengths (8, 16 or 24 bits);
* counting transitions at the multiplier's coefficient input as the measure of switching.

This design's own choices:

* segmenting in hardware at load time, rather than in software beforehand;
* a single multiply-accumulate unit, time-shared over all taps, with the taps in the order
  `k = 0..L−1`;
* the handshakes, the operand registers, the two-stage timing and the throughput of one
  sample per `L+1` clocks;
* the Baugh-Wooley cell arrangement;
* the accumulator width;
* `MAX_TAPS = 89`, the longest filter of the evaluation set, so that filters of 32 to 89
  taps all fit.

Not in the RTL:

* **Power measurement.** Switched capacitance is the sum, over all gates, of toggle count
  times gate capacitance. It needs layout data and a gate-level simulation, so it is not
  part of this RTL. `coef_toggles` counts transitions only, at one bus.
* **A conventional filter for comparison.** The testbench computes the switching that the
  raw coefficients would cause, for reference.
* **Shifter overhead.** The shifter's extra power is small next to the multiplier's. It
  is not modelled.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_array_mult` | all 65 536 operand pairs at 8 bits, plus extreme and 20 000 random pairs at 16 and 24 bits, against the signed product |
| `tb_pow2_shifter` | every sample and every shift amount |
| `tb_toggle_counter` | 34 and 16 transitions for the example `H` and `M`; random buses; clear; saturation |
| `tb_coef_segmenter` | the worked example against the listed `S` and `M`; every 8-bit value against a `$clog2`-based reference, including the `i+1`-clock search time and held outputs |
| `tb_seg_mac` | 300 random frames, with and without idle clocks, against integer sums; `out_valid` timing |
| `tb_seg_fir` | full default size; see below |
| `tb_seg_fir_wide` | the whole filter at 16 and 24 bits with random coefficients, one `seg_fir_stream_check` instance per width |
| `tb_seg_fir_filters` | the ten window-designed evaluation filters at 8, 16 and 24 bits; every output and the switching counts |

`tb_seg_fir` runs the top at its default size. It proceeds in three steps:

1. It runs the ten-tap example and compares all ten `Ys`, `Ym` and `Y` values with the
   known results. For example, `Y = (−2037, 5893, −14026, −594, …, 44743)`. It also checks
   16 transitions per pass.
2. It loads filters of lengths 53, 71, 42, 61, 89, 73, 34, 54, 32 and 80 with random
   coefficients. The random values favour powers of two, zero and −128.
3. It streams samples through each filter. Every output is checked against a direct
   convolution with the raw coefficients. The testbench also checks latency, throughput,
   and the per-pass switching against the cyclic Hamming distance of the `m` sequence.

The testbench also confirms that each of these happens at least once:

* all three segmentation cases;
* input back-pressure;
* a sample winning over a coefficient offered in the same clock;
* a coefficient reload;
* a change of filter length;
* a wrap of the delay line.

`tb_seg_fir_wide` repeats the random-filter part at 16 and 24 bits, with all ten
evaluation lengths at each width. It checks every output, the latency, the switching per
pass and the bound on `m`, and it requires all three segmentation cases to occur.

Simulation with Verilator (run from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/seg_fir_pkg.sv \
    rtl/array_mult.sv rtl/pow2_shifter.sv rtl/toggle_counter.sv rtl/coef_segmenter.sv \
    rtl/seg_mac.sv rtl/seg_fir.sv tb/tb_seg_fir.sv --top-module tb_seg_fir
./obj_dir/Vtb_seg_fir
```

For a single block, list the package, that block's module (plus what it instantiates) and
its testbench.

## Changing the size

`WIDTH` sets both the data and the coefficient word length. The method is also evaluated
at 16 and 24 bits. All modules are written for any `WIDTH ≥ 3`, and the filter is tested at
8, 16 and 24 bits. The block testbenches other than `tb_array_mult` run at 8 bits only. `MAX_TAPS` sets the depth of the delay line
and of the coefficient store. The accumulator width follows from both parameters.

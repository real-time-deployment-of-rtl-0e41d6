# Parallel Volterra nonlinear equalizer with pruned and clustered weights

A 30 Gb/s PAM4 intensity-modulation/direct-detection receiver for a passive
optical network sees a band-limited channel and nonlinear distortion from the
modulator and the optical amplifier. The equalizer here removes both with a
third-order Volterra filter. It takes one sample per symbol at 15 GBd from a
6-bit ADC. A logic clock of 234.375 MHz cannot take one symbol per cycle, so
the filter is unrolled 64 times: every clock, 64 new samples go in and 64
equalized symbols come out.

Two ideas keep the hardware affordable:

* **Shared products.** Neighbouring output lanes need almost the same
  products of input samples. Each distinct product is formed once and
  shared by all lanes.
* **Simplified weights.** Small weights are pruned, so their taps build no
  logic. Most of the remaining weights are rounded to a sum of one or two
  powers of two, so their multiplications become shifts and adds.

## The filter

For output sample `i`, the equalizer computes

```
y[i] =   sum_{j1=-m1..m1}                  a1[j1]        x[i-j1]
       + sum_{-m2<=j2<=j1<=m2}             a2[j1,j2]     x[i-j1] x[i-j2]
       + sum_{-m3<=j3<=j2<=j1<=m3}         a3[j1,j2,j3]  x[i-j1] x[i-j2] x[i-j3]
```

The memory lengths are `L1 = 2*m1+1 = 121`, `L2 = 15` and `L3 = 5`. This gives
121 linear taps, `15*16/2 = 120` second-order taps and `5*6*7/6 = 35`
third-order taps: 276 taps per output symbol. All three kernels are centred
on the same sample `x[i]`.

**Tap numbering.** This numbering is used everywhere: in the RTL, in the
weight vectors and in the testbenches. In each kernel, window position `t`
runs from 0 (oldest sample, `j = +m`) to `L-1` (newest sample, `j = -m`).

* First-order tap `t` is weight slot `t`.
* Second-order taps are the pairs `(a, b)` with `a <= b`, numbered with `a`
  as the outer loop. For `L = 3` the order is (0,0) (0,1) (0,2) (1,1) (1,2)
  (2,2). `vnle_pkg::pair_idx` gives the slot number.
* Third-order taps are the triples `a <= b <= c`, numbered by three nested
  loops in the same way. `vnle_pkg::triple_idx` gives the slot number.

## Parallel structure and shared products

```
 in_x[0..63] --> sample_window --win[0..183]--+--> x1 register ---------------+
   (6 bit)       (keeps 120                   |                                |
                 old samples)                 +--> prod2_mux (centre 78 smp) --+--> 64 x vnle_lane --> out_y[0..63]
                                              |                                |     (taps + adder tree)
                                              +--> prod3_mux (centre 68 smp) --+
```

**Window.** `sample_window` keeps the last `L1-1 = 120` samples. Each
clock it appends the new block of `P = 64` samples, which gives a window of
`P + L1 - 1 = 184` consecutive samples. Lane `p` takes its first-order
window at `win[p .. p+120]`. Its centre sample is `win[p+60]`. For the window
latched from input block `n`, lane `p` produces `y[n*64 + p - 60]`. So the
output stream lags the input stream by `m1 = 60` samples, plus the pipeline.

**Second-order products (`prod2_mux`).** The bank takes the 78 central samples
`s[0..77]` of the window. Column `k` holds `s[k]*s[k+d]` for offsets
`d = 0..14`. Lane `p` needs the pair `(a, b)` of its own 15-sample window, and
finds it in column `p+a` at offset `b-a`. The bank forms 1065 products per
clock. Without sharing, the lanes would form `64*120 = 7680`. Slots where
`k+d` falls past the window are never used, and are constant zero.

**Third-order products (`prod3_mux`).** The same scheme is applied to the 68
central samples. Column `k` holds `s[k]*s[k+d1]*s[k+d2]` for every pair
`0 <= d1 <= d2 < 5` (15 slots). Lane `p` finds triple `(a, b, c)` in column
`p+a`, at slot `pair_idx(5, b-a, c-a)`.

**Lanes.** Each of the 64 `vnle_lane` instances holds 276 `tap_weight`
instances and one adder tree. The tap weights are the same in every lane.
Only the inputs differ.

## Weights: pruning and clustering

The weights are constants fixed at elaboration (`W1`, `W2`, `W3`). The
equalizer is trained offline, then the trained weights are built into the
circuit. Because the weights are constants, synthesis can remove whole taps
and turn multiplications into fixed shifts. `tap_weight` builds one of
three forms of a tap:

| weight `w` (Q1.10, 12 bits) | hardware |
|---|---|
| `w == 0`, or `|w| < THR` | nothing: the tap is pruned |
| `CLUSTER = 1` and `0 < |w| < 0.875` | `w` is rounded to the nearest `2^-n + 2^-m` or `2^-n` (`1 <= n, m <= 10`, `n != m`). The tap computes `(d >>> n) + (d >>> m)`, negated when `w < 0` |
| otherwise | a 12x12 signed multiplier; the product is shifted right by 10 |

An example: `w = 775/1024 = 0.7568`. This weight becomes `0.75 = 2^-1 + 2^-2`,
and the tap computes `(d>>>1) + (d>>>2)`. The largest centre is 0.75 and the
next power of two is 1.0. Their midpoint is 0.875, so every weight inside the
clustering range rounds to a centre no more than 0.125 away. When two centres
are equally close, the smaller one wins. The `THR` parameter applies the
pruning rule `a = 0 if |a| < THR` to the supplied weights. It is meant for
experiments. In the normal flow, pruning and re-training happen offline, and
the weights arrive with zeros already in them.

**Supplying weights.** Each vector is `vnle_pkg::wvec_t`, which has 256
twelve-bit slots. Slot `k` is in bits `[12k +: 12]`, holding two's-complement
Q1.10. Unused slots are ignored. The default vectors come from
`vnle_pkg::default_weights`. This is an example set, not a trained equalizer:

* a fixed integer hash keeps about one weight in four, which is the density
  of the pruned equalizer;
* the kept weights are small random values;
* the first-order centre tap is 1.0.

With these defaults, each lane has 73 live taps. 72 of them are
shift-and-add, and one (the 1.0 centre tap) is a multiplier. For a
full-precision equalizer, set `CLUSTER = 0` and supply dense weights.

## Number formats and widths

| quantity | format |
|---|---|
| input sample `x` | signed 6 bits, 5 fraction bits (the ADC code as a fraction in [-1, 1)) |
| first-order term | `x * 32`, Q1.10, 12 bits |
| second-order term | `x*x`, exactly Q1.10, 12 bits |
| third-order term | `floor(x*x*x / 32)`, Q1.10, 12 bits |
| weight | Q1.10, 12 bits |
| weighted term | 14 bits, 10 fraction bits |
| `out_y` | 23 bits, 10 fraction bits |

The output is wide enough that the accumulation cannot overflow, so no
saturation is needed. Bits are dropped (floor) only when a term or a
weighted term is formed; the accumulation itself is exact. The output is the soft symbol
value. A PAM4 slicer, if one is needed, goes after it.

## Interface and timing (`vnle_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock, 234.375 MHz for 15 GBd |
| `rst_n` | in | 1 | asynchronous, active low; clears the history to zero samples |
| `in_valid` | in | 1 | `in_x` holds a new block |
| `in_x` | in | P x 6 | P consecutive samples, `in_x[0]` oldest |
| `out_valid` | out | 1 | `out_y` holds an output block |
| `out_y` | out | P x 23 | equalized symbols, lane `p` = `y[n*P + p - (L1-1)/2]` |

A block presented before rising edge `e` comes out on `out_y` after edge
`e+3`, with `out_valid` high. The pipeline has four register stages:

1. window;
2. shared products, plus a copy of the first-order window;
3. per-order partial sums in each lane;
4. final sum.

`in_valid` may be low on any clock. The window then holds, and no output
block is flagged for that clock. A block can be accepted on every clock, so
the throughput is P samples per clock.

Parameters: `P` (64), `L1` / `L2` / `L3` (121 / 15 / 5, which must be odd,
with `L2, L3 <= L1` and at most 256 taps per order), `W1` / `W2` / `W3`, `CLUSTER` (1) and `THR` (0).
Elaboration stops with an error for sizes that break these rules.

## Files

| file | content |
|---|---|
| `rtl/vnle_pkg.sv` | formats, tap numbering, pruning and clustering functions, example weights |
| `rtl/sample_window.sv` | parallel delay line |
| `rtl/prod2_mux.sv`, `rtl/prod3_mux.sv` | shared second- and third-order product banks |
| `rtl/tap_weight.sv` | one tap: pruned, shift-and-add or multiplier |
| `rtl/vnle_lane.sv` | one output channel: 276 taps and the adder tree |
| `rtl/vnle_top.sv` | the P-lane equalizer |
| `tb/vnle_ref_pkg.sv` | bit-exact reference model, written from the arithmetic rules |
| `tb/vnle_top_checker.sv` | end-to-end stimulus and scoreboard |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the full-size and configuration testbenches |

## Verification

Every testbench compares against the reference model in `tb/vnle_ref_pkg.sv`
and ends with a `TB_RESULT checks=N failures=M` line. The reference model
finds the clustering centre by brute-force search over all codes with one or
two set bits. It does not reuse the RTL's function.

* `tb_tap_weight`: every tap form, including rounding ties, both edges of
  the clustering range, -2048 and 2047, and `CLUSTER = 0`.
* `tb_sample_window`, `tb_prod2_mux`, `tb_prod3_mux`: contents, unused zero
  slots and one-clock latency, with random input gaps.
* `tb_vnle_lane`: full Volterra sum with a mix of pruned, clustered and
  multiplied taps and a pruning threshold. Checks the two-clock latency.
* `tb_vnle_top`: reduced size (P = 8, L = 9/5/3). Runs 300 blocks with
  random gaps and full-scale (-32) blocks, checks every output and the
  output clock, and reports that gaps, pruned taps, clustered taps and
  multiplied taps all occurred.
* `tb_vnle_top_full`: the default configuration (P = 64, L = 121/15/5,
  default weights), 40 blocks end to end.
* `tb_vnle_top_fullprec`: the full-precision configuration. Clustering is
  off, the weights are dense, and every live tap is a multiplier. It uses
  L = 121/15/5 with P = 8 lanes.
* `tb_vnle_top_fig1`: the smallest textbook example, L = 3/3/1, with a pure
  cube as the third-order term.

To run one testbench with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_vnle_top \
  -y rtl -y tb +libext+.sv rtl/vnle_pkg.sv tb/vnle_ref_pkg.sv tb/tb_vnle_top.sv
./obj_dir/Vtb_vnle_top
```

At the default size, Verilator needs about a minute to build, and the run
takes under a second.

## Limits and departures

* **Weights.** The default weights are an example. A real receiver needs
  weights from offline LMS training, with pruning and fine-tuning, for its
  own link. That training is not hardware and is not part of this RTL.
* **Chosen here, not given by the original design:**
  * the sample, term and output formats, and the floor rounding;
  * the tie rule of the clustering;
  * the pipeline depth;
  * the valid interface and the reset behaviour.
* **Third-order sharing.** The original design describes the shared products
  for the second order only. The third-order bank applies the same scheme.
* **Timing.** Timing closure at 234.375 MHz has not been checked. Each lane
  adds up to 276 terms in two register stages. A deeper adder pipeline may
  be needed, and it only adds latency.
* **Not included.** The ADC, the FPGA transceivers that receive its samples,
  the clock division from the 15 GHz ADC clock, and the pre-processing that
  brings the samples to one per symbol. The equalizer input is assumed to be
  signed 6-bit symbols, already aligned.

# Multi-resolution filter bank with distributed-arithmetic sub-filters

A spectrum sensor that must watch channels of different bandwidths usually
splits the band with a DFT filter bank whose resolution is fixed by the
narrowest channel. This design instead splits the band with a *fast filter
bank* (FFB): a binary tree of small sub-filters, each of which hands an
original (low) response and its complementary (high) response to the next
stage. The resolution is changed at run time, without new hardware, in two
ways: a 2-bit select `S` changes the interpolation factor M of every
sub-filter (`H(z)` becomes `H(z^M)`), and three enable bits switch the deeper
stages of the tree on or off. The coefficient products inside each sub-filter
are made by distributed arithmetic (DA): a table of coefficient sums and a
shift-and-add accumulator instead of multipliers. A Baugh-Wooley array
multiplier version of the sub-filter is included as a build option.

Samples are 8-bit two's complement. The tree has four stages (1, 2, 4 and 8
sub-filters), so the finest setting yields 16 sub-bands.

## The tree and its outputs

```
x(n) ─► [1st] ─┬─ Y{1,0} ─►&(en0)─► [2nd] ─┬─ Y{2,0} ─►&(en1)─► [3rd] ─ ... ─► [4th] ─ Y{4,*}
               │                           └─ Y{2,2} ─►&(en1)─► [3rd] ─ ...
               └─ Y{1,1} ─►&(en0)─► [2nd] ─┬─ Y{2,1} ─► ...
                                           └─ Y{2,3} ─► ...
```

Every sub-filter drives two outputs. The one fed by `Y{s-1,r}` drives
`Y{s,r}` (original response) and `Y{s,r+2^(s-1)}` (complementary response),
so the outputs of a level come out in bit-reversed order of the tree
position: the stage-3 block fed by `Y{2,0}` drives `Y{3,0}` and `Y{3,4}`, and
so on. The top-level ports carry all 30 of them: `y1[i]` is `Y{1,i}`, and
likewise `y2[0..3]`, `y3[0..7]` and `y4[0..15]`.

Each input of stages 2, 3 and 4 passes through an AND gate driven by the
stage's enable: `en[0]` gates stage 2, `en[1]` stage 3, `en[2]` stage 4.
Stage 1 is always on.

## Choosing the resolution: S and en

`S` (`sel`) picks the tap spacing M of all 15 sub-filters:

| S  | M (samples) |
|----|-------------|
| 00 | 10 |
| 01 | 20 |
| 10 | 40 |
| 11 | 80 |

The intended pairings of `S` with the enables, from the finest to the
coarsest resolution, are:

| S  | en[0] en[1] en[2] | deepest stage on | nominal channel bandwidth |
|----|-------------------|------------------|---------------------------|
| 11 | 1 1 1 | 4 | 0.05 |
| 10 | 1 1 0 | 3 | 0.1 |
| 01 | 1 0 0 | 2 | 0.2 |
| 00 | 0 0 0 | 1 | 0.4 |

The hardware does not enforce these pairs; any `S`/`en` combination is
accepted and takes effect with the next sample. Which outputs a system
treats as "the channels" of a setting is left to the consumer: every enabled
stage drives both of its outputs.

A disabled sub-filter empties its delay line, drives zeros and does no
arithmetic. When it is enabled again it starts from rest. A change of `S`,
by contrast, keeps every delay line's history: only the tap positions move.

## One sub-filter (`mrfb_subfilter`)

A sub-filter computes

```
orig[n] = sat( (sum_k c[k] * x[n - k*M]) >>> 7 )
comp[n] = sat( x[n - 3*M] - orig[n] )
```

with the 7-tap prototype `c = [-4 0 36 64 36 0 -4]` (Q1.7, i.e. the
maximally flat half-band filter `[-1 0 9 16 9 0 -1]/32`, DC gain exactly 1).
The complementary output subtracts the filtered signal from the input delayed
by the filter's group delay, `(7-1)/2 * M = 3M` samples, which is simply the
centre tap. `sat` clamps to the 8-bit range [-128, 127]. The right shift
truncates towards minus infinity.

The taps come from `reconfig_delay`: one shift register of `6 * 80 = 480`
samples per sub-filter, with a 4-way multiplexer on each tap that reads
position `k*M - 1` for the M chosen by `S` (tap 0 is the incoming sample
itself). This is the "four delays and a multiplexer" reconfiguration, folded
into a single line so that the larger spacings reuse the storage of the
smaller ones.

## Distributed arithmetic (`da_fir`)

DA rewrites the sum of products over the bits of the samples rather than
over the samples. With `x[k] = -x_{B-1}[k]·2^(B-1) + sum_{b<B-1} x_b[k]·2^b`
(two's complement, B = 8):

```
y = sum_k c[k] x[k]
  = sum_{b=0}^{B-1} w_b · 2^b · LUT[ x_b[6] ... x_b[1] x_b[0] ],   w_b = -1 for b = B-1, else +1
```

where `LUT[a]` is the sum of the coefficients `c[k]` whose bit `k` is set in
`a`. The LUT has `2^7 = 128` entries of 12 bits and is computed from the
coefficient parameter at elaboration, so changing the coefficients needs no
table editing.

Hardware:

1. **Bit shift registers**: on `load`, the seven tap samples are copied into
   seven 8-bit registers that shift right by one bit each clock, so bit-plane
   `b` is presented on clock `b`, least significant first.
2. **Arithmetic table**: the seven current bits address the LUT.
3. **Scaling accumulator**: `acc <= (acc >>> 1) + (±LUT · 2^(B-1))`, with
   the minus sign on the last (sign) plane. The right shift before each add
   gives plane `b` the weight `2^b` at the end; since each word enters scaled
   by `2^(B-1)`, no bit is lost and the result is exact. The accumulator is
   `12 + 8 = 20` bits wide.

After B = 8 clocks the accumulator holds `y`, and `valid` pulses. The unit
is therefore bit-serial: one inner product per 8 clocks, no multiplier and
a single 20-bit accumulator adder.

## Baugh-Wooley option (`bw_mult`, `MULT = MULT_BW`)

With `MULT_BW` each sub-filter instead captures its seven taps and forms
seven 8x8 signed products in parallel with `bw_mult`, summed in one clock.
`bw_mult` is the standard Baugh-Wooley array: partial product bits
`a_i·b_j` in column `i+j`, the bits that pair one sign bit with one non-sign
bit inverted, the sign-by-sign bit kept, a 1 added in columns `WA-1` and
`WB-1` (one 1 in column 8 for 8x8), and the top bit of the sum inverted. No
sign extension is needed. The widths are parameters.

Both options produce bit-identical outputs; they differ in latency and area.

## Timing and handshake (`mrfb_top`)

```
clk        _/‾\_/‾\_/‾\_/‾\_ ... _/‾\_/‾\_
in_valid   ‾‾‾‾‾‾\___________ ... ___/‾‾‾
in_ready   ‾‾‾‾‾‾\___________ ... ___/‾‾‾
out_valid  __________________ ... ___/‾\__
            ^ accept                ^ DW+2 = 10 clocks later (DA), 2 (BW)
```

- A sample is accepted on a rising edge where `in_valid && in_ready`.
- All 15 sub-filters start on that edge. Stage `s` works on what stage `s-1`
  produced for the previous sample, so the tree is a four-sample pipeline:
  `Y{4,*}` lags `Y{1,*}` by three samples.
- `out_valid` pulses 10 clocks after acceptance with DA (the taps are loaded
  on the acceptance edge, 8 clocks of bit-planes, 1 to re-quantise, 1 for the
  flag) and 2 clocks after it with Baugh-Wooley.
  `in_ready` is low until `out_valid` rises and high again with it, so the
  input rate is at most one sample per 10 clocks (DA) or per 2 clocks (BW).
- Outputs change one clock before `out_valid` rises and then hold until the
  next sample's results, except that a stage disabled at acceptance clears
  its outputs on the acceptance edge.
- `rst_n` is an asynchronous active-low reset that clears every register,
  the delay lines included.

Assertions check that a sub-filter never starts while its DA unit is busy
and that all blocks of a stage finish in the same clock.

## Parameters

All defaults live in `mrfb_pkg` and can be overridden on `mrfb_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `DW` | 8 | sample width (also the number of DA bit-planes) |
| `CW` | 8 | coefficient width |
| `CF` | 7 | coefficient fraction bits (output shift) |
| `NTAPS` | 7 | prototype length (odd, symmetric, for the centre-tap complement) |
| `SPACINGS` | {10, 20, 40, 80} | spacing M per value of `S` (entry 0 is `S=00`) |
| `COEFS` | {-4, 0, 36, 64, 36, 0, -4} | prototype coefficients, entry k for tap k |
| `MULT` | `MULT_DA` | `MULT_DA` or `MULT_BW` |

Storage: 15 sub-filters x 480 samples x 8 bits = 57,600 delay-line bits.

## Where this departs from, or fills in, the source design

The source publication gives the tree, the enable gates, the spacing
selection (10/20/40/80), the DA structure, the Baugh-Wooley matrix and the
`S`/`en` pairings. The following are this design's own choices:

- **Prototype coefficients and length.** None are published. The 7-tap
  half-band filter was chosen because its complement splits the band in two.
  The published simulation shows a constant input of 5 settling at 475, which
  implies coefficients summing to 95; with the half-band prototype used here
  `Y{1,0}` settles at 5 and `Y{1,1}` at 0.
- **Word widths.** Every stage output is re-quantised to 8 bits (shift by 7,
  saturate). The published simulation shows a 32-bit full-precision filter
  output; keeping full precision through four stages was not adopted.
- **Same spacing in every stage.** The published drawing details only the
  first stage's reconfigurable delays, and draws no select line to the fourth
  stage. Here all stages use the same table and the same `S`.
- **No modulated sub-filters.** In a fast filter bank the sub-filters
  other than the first of each stage are described as modulated versions of
  the prototype, but no modulation is specified. All 15 sub-filters here use
  the same prototype, each followed by its complement. `mrfb_subfilter`
  takes its coefficients as a parameter, so per-block coefficient sets can
  be wired in at `mrfb_top`'s generate loop.
- **Channel counts.** The published configuration table lists 16, 4, 2 and
  1 channels for the four settings; the enabled stages of this tree deliver
  16, 8, 4 and 2 outputs at their deepest level. The design does not hide
  any outputs.
- **Baugh-Wooley matrix.** The published matrix also marks a split into 4x4
  quarters with extra inverted bits and constants; taken together with the
  8x8 terms these do not produce the signed product, so only the standard 8x8
  Baugh-Wooley array is built.
- **Handshake, pipelining between stages, disabled-stage behaviour and
  reset** are not specified by the source and were chosen as described above.
- The DFT filter bank used as a comparison baseline is not included.

Area, delay and power figures of the original work came from an ASIC
synthesis flow and are not reproduced or checked here.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_bw_mult` | all 65,536 8x8 operand pairs, plus random 6x10 pairs |
| `tb_da_fir` | 3,000 random and extreme sample sets against a direct dot product; result exactly 8 clocks after `load` |
| `tb_reconfig_delay` | every tap for every `S` against a kept history, with `S` changing between samples and a clear |
| `tb_mrfb_subfilter` | DA and Baugh-Wooley sub-filters against the reference, latency, disable/re-enable, saturation |
| `tb_mrfb_top` | the whole bank at default parameters, 6,000 samples, all 30 outputs compared after every sample, through all four `S`/`en` pairings, mixed settings, a constant-5 stretch, input offered while busy |
| `tb_mrfb_top_bw` | the same run with `MULT_BW` |
| `tb_mrfb_dc_input` | constant input 5 in each of the four `S`/`en` pairings, run until every stage has settled: all outputs against the reference, and the settled values (5 along the low branch, 0 elsewhere) |

The reference (`tb/mrfb_ref_pkg.sv`) recomputes each sub-filter directly from
its input history with integer arithmetic, independently of the DA and
Baugh-Wooley datapaths.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mrfb_pkg.sv tb/mrfb_ref_pkg.sv tb/tb_mrfb_top.sv --top-module tb_mrfb_top
./obj_dir/Vtb_mrfb_top
```

Replace `tb_mrfb_top` by any testbench name above. Each runs in about a
second.

## Files

| file | content |
|------|---------|
| `rtl/mrfb_pkg.sv` | default sizes, spacing table, prototype coefficients, multiplier choice |
| `rtl/mrfb_top.sv` | four-stage tree, enable gates, sample handshake |
| `rtl/mrfb_subfilter.sv` | one sub-filter: delay line, products, original and complementary outputs |
| `rtl/reconfig_delay.sv` | delay line with `S`-selected tap spacing |
| `rtl/da_fir.sv` | distributed-arithmetic inner product |
| `rtl/bw_mult.sv` | Baugh-Wooley signed multiplier |
| `tb/mrfb_ref_pkg.sv` | reference model used by the testbenches |
| `tb/tb_*.sv` | testbenches |

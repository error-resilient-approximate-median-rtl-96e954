# Inexact 3x3 median filter for salt-and-pepper noise, with look-ahead clock gating

Salt-and-pepper noise sets random pixels of a grey-scale image to full white
(255, "salt") or full black (0, "pepper"). A 3x3 median filter removes it: every
output pixel is the median of its 3x3 neighbourhood. In hardware, the median is
found by a network of comparators. Almost all of its area and switching power
sits in those comparators.

This design makes the comparators *inexact* to make them cheaper, but does it in
a controlled way. Every comparison against 0 or 255 stays exact, so the filter
removes salt and pepper exactly as an exact filter would. Comparisons between
two ordinary grey values may be wrong by a little. A wrong comparison only
changes which of two similar neighbours is picked as the median. On top of
that, the pipeline registers are clock gated with *look-ahead clock gating*.
A register's clock pulse is suppressed whenever the register feeding it did not
change on the previous edge.

## Structure

```
 win_i (9 px) ──► R0 ──► 3 x TDS (columns) ──► R1 ──► 3 x TDS ──► R2 ──► TDS ──► R3 ──► median_o
 in_valid ──────► en0      │                    ▲en1   (min of maxima,   ▲en2  (median)  ▲en3
                           └─ chg0 ─────────────┘       median of medians,│               │
                                          └─ chg1 ──────max of minima) ───┘               │
                                                              └─ chg2 ────────────────────┘
```

| module | role |
|---|---|
| `imf_median_filter` | top: the sorting network, the four gated pipeline registers, valid pipeline |
| `tds` | ternary data sorter: three pixels in, max/med/min out, three comparators |
| `mmc` | 8-bit magnitude comparator built from four 2-bit slices |
| `tbc` | 2-bit slice comparator, exact or one of three inexact variants |
| `ec` | equality checker that chains the slice decisions |
| `lacg_reg` | pipeline register with look-ahead clock enable and change flag |
| `icg` | clock gating cell (latch + AND) |
| `imf_pkg` | pixel type, comparator mode enum |

## The sliced comparator and where it may be wrong

`mmc` cuts both 8-bit operands into four 2-bit slices. Each slice has a two-bit
comparator (`tbc`) with two outputs:

* `h`: the slice of x is greater.
* `l`: the slice of x is smaller.

When both are 0 the slices count as equal, and the decision moves to the next
lower slice. The equality checkers (`ec`) form an AND chain from the most
significant slice down. The most significant slice that is not "equal" decides
`gt`. If no slice decides, `gt = 0`, `max_o = y` and `min_o = x`.

The inexact comparators save logic by dropping product terms from the exact
equations for `h` and `l`. A salt is 11 in every slice and a pepper is 00 in
every slice. So a comparison against 255 or 0 stays exact as long as:

1. every K-map cell of `h` with an 11 (salt) or 00 (pepper) operand is exact, and
2. `l` is wrong only in cells where `h` is 0.

With rule 2, a wrong `l` makes the slice look "equal" instead of "less". The
decision then falls to lower slices, where `h` is exact. When one operand is 0
or 255, those lower slices can never report the wrong "greater".

| mode | `h` | `l` | exact against | wrong cells (x y) |
|---|---|---|---|---|
| `CMP_EXACT` | x1y1' + x1x0y0' + x0y1'y0' | x1'y1 + x1'x0'y0 + x0'y1y0 | everything | none |
| `CMP_IMFP` | (x1+x0)(y1+y0)' | x1'y1 | 0 | h: 6 cells without 00; l: 00 01, 10 11 |
| `CMP_IMFS` | x1x0(y1y0)' | x1'y1 | 255 | h: 6 cells without 11; l: 00 01, 10 11 |
| `CMP_IMFSP` | x1y1' + x0y0' | x1'y1 | 0 and 255 | h: 01 10; l: 00 01, 10 11 |

All three inexact variants share the same reduced `l`. Its two wrong cells are
the two places where a naive approximation would break the guarantee. Cell
00 01 matters for peppers and cell 10 11 for salts. In both cells `h` is 0 in
every variant, so rule 2 holds.

`N_APPROX` sets how many slices, counted from the least significant, use the
inexact `tbc`. The slices above them are exact. The guarantee against 0 and 255
holds for any `N_APPROX`; only the error on ordinary pixels grows with it.

## The ternary data sorter

`tds` compares (a,b), (b,c) and (a,c) in parallel. The three `gt` bits select
which input goes to each output. Inexact comparators can give a contradictory
set of decisions, for example a>b, b>c but not a>c. In that case the sorter
trusts the (a,b) and (b,c) decisions. The outputs are therefore always a
permutation of the inputs, and a 0 or 255 always ends up at the correct end.

## Median network and pipeline

The classic 3x3 median network is used:

* Stage S1: three sorters sort the three columns of the window.
* Stage S2: three sorters handle the column results by rank:
  * the minimum of the three column maxima,
  * the median of the three column medians,
  * the maximum of the three column minima.
* Stage S3: a final sorter takes the median of those three values.

That is 7 sorters and 21 comparators in total. With exact comparators the result
is exactly the median of the nine pixels. Because every comparison against 0 or
255 is exact, the thresholded images "pixel = 0" and "pixel = 255" pass through
the network exactly. The inexact filter therefore outputs 0 (or 255) exactly
when the exact filter does.

The design has four pipeline registers:

* R0: the input window.
* R1: after the column sort.
* R2: after the second rank of sorters.
* R3: the output.

The filter accepts one window per clock. A window presented with `in_valid` in
cycle n appears on `median_o` with `out_valid` in cycle n+4. Windows are given
in parallel in row-major order: `win_i[3*r + c]` is row r, column c. Forming
windows from a pixel stream (line buffers) is not part of this design.

## Look-ahead clock gating

Plain clock gating derives an enable from the register's own logic, in the same
cycle. An auto-gated flip-flop compares D and Q (an XOR) and stops its own clock
when they are equal. This gives it almost no time to do so.

Look-ahead gating computes the enable one cycle early instead. Take register
R(k+1), which holds f(Rk). If Rk did not change at the last edge, f(Rk) cannot
have changed either, so R(k+1) does not need the next clock pulse. Each
`lacg_reg` therefore:

* clocks `q` through an `icg` gated by `en`;
* computes `en & (d != q)`, the OR of the bitwise XOR of d and q, qualified by
  its own enable. This is "I am changing at this edge";
* captures that value on the free-running clock as `chg`;
* passes `chg` on as the enable of the next register.

The enable is thus ready a whole cycle before the edge it gates. Its timing is
as relaxed as that of any register-to-register path.

Correctness rests on one invariant. After every edge, each register whose
upstream flag `chg` is 0 already holds f(upstream). At reset every `chg` is 1,
so the first edge loads the whole pipeline once. R0 has no register in front of
it, so its enable is `in_valid` itself.

R1 and R2 are gated in two cases:

* a bubble (cycle without `in_valid`) is on its way through the pipeline;
* a window equals the previous one, which happens in flat image areas.

R3 is also gated when the new median equals the previous one. The small valid
shift register and the `chg` flip-flops are not gated: they are few, and they
toggle too often for gating to pay. `stage_en_o` exposes the enables of R1..R3
so that gating activity can be measured in simulation.

The gated clocks are real derived clocks: a latch-based `icg` per register. The
latch in `icg` is intentional, and lint tools report it as a latch.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MODE` (`imf_median_filter`, `tds`, `mmc`, `tbc`) | `CMP_IMFSP` | comparator variant (`CMP_EXACT`, `CMP_IMFP`, `CMP_IMFS`, `CMP_IMFSP`) |
| `N_APPROX` (`imf_median_filter`, `tds`, `mmc`) | 2 | inexact 2-bit slices, counted from the LSB |
| `W` (`tds`, `mmc`) | 8 | pixel width, even; the filter itself uses `imf_pkg::PIX_W` = 8 |
| `W` (`lacg_reg`) | 8 | register width |

## Accuracy

`tb_imf_modes` generates a 48x48 test image with values 1..254 and corrupts it
with salt-and-pepper noise. Measured mean absolute deviation from the exact
filter's output:

| noise density | IMFSP, 2 inexact slices (default) | IMFSP, 4 | IMFP, 4 | IMFS, 4 |
|---|---|---|---|---|
| 10% | 1.01 | 6.67 | 6.52 | 6.44 |
| 30% | 0.86 | 7.07 | 9.53 | 12.11 |
| 50% | 0.59 | 6.44 | 15.68 | 14.74 |

In every run, IMFSP left exactly the same salt and pepper pixels as the exact
filter. IMFP matched it on peppers only and IMFS on salts only. The single-noise
variants leave the other kind of noise behind, at several times the exact
filter's count.

## Cost

The whole filter was mapped to two-input generic gates. This count comes from
a generic logic synthesis run, with no technology library. It includes 183
flip-flops and 4 gating latches.

| configuration | gates + flip-flops + latches |
|---|---|
| exact comparators | 2051 |
| IMFSP, 1 / 2 / 3 / 4 inexact slices | 1955 / 1927 / 1855 / 1751 |
| IMFP, 4 inexact slices | 1659 |
| IMFS, 4 inexact slices | 1631 |

So the default configuration saves about 7% of the combinational logic
compared with exact comparators. IMFSP with all slices inexact saves about 16%.
The single-noise variants save more, because only one set of K-map cells has
to stay exact.

## How this follows the design it implements, and where it departs

These parts follow the original design:

* the sliced comparator with two-bit comparators and equality checkers;
* the rules for which K-map cells must stay exact;
* the shared inexact `l`;
* the three variants;
* the ternary-sorter-based pipelined filter;
* look-ahead gating, with its XOR change detection and its one-cycle-early,
  cycle-long enable.

The following are this implementation's own choices:

* **Inexact equations.** The exact reduced equations in the table above were
  chosen to satisfy the stated rules. Other reductions within the same rules are
  possible.
* **Default configuration.** The salt-and-pepper variant with two inexact slices
  is this implementation's default.
* **Sorter internals.** The sorter uses three parallel comparators, and has a
  rule for contradictory decisions.
* **Comparator count.** The network uses 7 sorters, 21 comparators. A 12-comparator
  structure is mentioned for the original filter, but it is not described in
  enough detail to rebuild.
* **Pipeline.** The stage boundaries, the `in_valid`/`out_valid` handshake and
  the asynchronous active-low reset are this design's own.
* **Granularity of gating.** Gating is done per register, not per flip-flop.
* **Holding the change flag.** The flag is held in a flip-flop rather than a
  latch.
* **Flip-flop type.** An ordinary edge-triggered flip-flop stands in for the
  master-slave auto-gated flip-flop.

Delay, area and power figures were not reproduced. They depend on the target
technology and tools.

## Simulation

Every testbench checks its results itself. Each one ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tbc` | all 16 cells of all four modes against K-map tables; exactness on salt/pepper cells |
| `tb_ec` | all 8 input combinations |
| `tb_mmc` | all 65536 operand pairs in five configurations, against a slice-by-slice model; exactness against 0/255 |
| `tb_tds` | orderings, ties, 200k random triples; exact sorting, permutation, reference model |
| `tb_icg` | gated clock stays clean while the enable toggles in both clock phases |
| `tb_lacg_reg` | register and change flag against a model, random enables |
| `tb_imf_median_filter` | 64x64 noisy image at default parameters (see below) |
| `tb_imf_modes` | all variants side by side at 10/30/50% noise, accuracy table above |

`tb_imf_median_filter` streams the image with random idle cycles. It checks:

* every median against a model;
* the 4-cycle latency;
* the salt/pepper equivalence with an exact median.

It also requires each of the following to happen at least once:

* an idle input cycle;
* gating of R1, R2 and R3;
* gating after a repeated window;
* removal of a salt and of a pepper;
* a median changed by the approximation.

The shared reference functions are in `tb/imf_ref_pkg.sv`. To run a testbench
with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/imf_pkg.sv tb/imf_ref_pkg.sv rtl/tbc.sv rtl/ec.sv rtl/mmc.sv rtl/tds.sv \
  rtl/icg.sv rtl/lacg_reg.sv rtl/imf_median_filter.sv tb/tb_imf_median_filter.sv \
  --top-module tb_imf_median_filter -o sim
./obj_dir/sim
```

Replace the last testbench file and `--top-module` to run another one. Lint
a module with `verilator --lint-only -Wall rtl/imf_pkg.sv rtl/<module>.sv -Irtl`.

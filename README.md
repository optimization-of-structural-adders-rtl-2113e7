# Transposed-form FIR filter with bisected structural adders

A fixed-coefficient FIR filter in transposed direct form (TDF) adds every
coefficient product q_i = x·c_i into a running partial sum that is passed
from tap to tap through a register. The partial sum quickly grows to the
full output width, but the products near the output end of a typical
low-order-tail filter are short. The "structural adders" there are therefore
long adders that mostly add sign-extension bits.

This design cuts those adders short. From one tap on, the partial sum is
carried as two parts, `u·2^h + l`:

* the **upper part** `u` is only delayed, it is not added to anything;
* the **lower part** `l` is a few bits wider than `h` and is the only part
  the coefficient products are added to.

The lower adders are then only `h+2` or so bits wide instead of the full
output width. The cost is the extra register bits of `l` above `h` and one
short merge adder wherever the parts are recombined.

## The taps

`fir_tdf_sa_opt` (top) builds, for tap `i = N-1 … 0`:

| tap kind | module | what it does |
|---|---|---|
| coefficient product | `csd_const_mult` | `q_i = x·c_i`, shift-and-add over the CSD digits of `c_i` |
| input end (i = N-1) | register in the top | first delay holds `q_{N-1}` |
| plain tap | `sa_tap` | `p_{i-1} <= p_i + q_i` |
| first split | `sa_bisect_tap` | `u <= p[W-1:h]`, `l <= {0,p[h-1:0]} + q` |
| reduced tap | `sa_reduced_tap` | `u <= u`, `l <= l + q` |
| merge/split | `sa_merge_bisect_tap` | new `h' <= h`: `u <= u·2^(h-h') + (l >>> h')`, `l <= {0,l[h'-1:0]} + q` |
| output (i = 0) | `sa_final_merge` | `lf = l + q_0`; `y = {u + (lf >>> h), lf[h-1:0]}` |

At a merge/split tap the two additions are independent, so the tap is no
slower than a reduced tap. Only tap 0 has two adders in series. This adds
roughly one full-adder delay there.

## How the split plan is chosen

Everything is decided at elaboration time from `COEF` and `WX`:

1. Each product range is `[v-, v+]` over the input range. Each signal gets
   the smallest two's complement width that holds its range. This covers
   products, partial sums and lower parts (lower start `[0, 2^h-1]`, plus
   the products of its segment).
2. The first split may only occur at a tap where that tap, and every tap
   after it, has `n(p_i) - n(q_i) >= MIN_DELTA` (6).
3. The split position at tap `i` is the largest `ceil(log2 v+)` /
   `ceil(log2 -v-)` over taps `i … i-LOOKAHEAD` (look-ahead 5). Going
   towards the output, the split position never increases.
4. A dynamic program over all (start, end) segment pairs picks the first
   split and the merge/split taps. It maximises a full-adder saving in
   which each segment scores: adder bits saved at its non-final taps (none
   at zero coefficients), minus `RHO` × extra register bits, minus the
   merge width. `RHO` is the FA:FF area ratio, 1 by default. If nothing is
   saved, the filter stays a plain TDF filter.

The per-tap tables (`NQ`, `WS`, `PLAN`, `SEG_H`, `WL_OUT`, `WU_OUT`) are
localparams of the top and can be printed from a testbench. With the default
coefficients, the first split is at tap 52, followed by 26 merge/split
taps. The split position falls from 17 to 7 bits.

## Parameters and interface

`N=121`, `WX=8`, `WY=25`, `RHO=1`, `LOOKAHEAD=5`, `MIN_DELTA=6`,
`COEF` (unpacked `int` array, `COEF[0]` nearest the output).
Ports: `clk`, `rst_n` (synchronous, active low, clears all delay
registers), `x` (signed WX), `y` (signed WY). `y` is combinational from
`x`, as in the textbook TDF form: `y[n] = Σ c_i·x[n-i]`. After reset the
output is exact from the first sample.

The default `COEF` (in `fir_sa_pkg`) is a 121-tap, 14-bit highpass. It is a
Kaiser-windowed ideal highpass with cut-off 0.77π and β ≈ 7.86, scaled by
2^15 and rounded, with band edges at 0.74π and 0.8π. It stands in for a
benchmark filter of that size whose coefficients are not available here. It
needs 24 output bits; `WY` is kept at 25.

## Departures and choices

* The products are plain CSD networks, one per coefficient. No common
  subexpressions are shared across coefficients.
* Widths are exact range widths. A `ceil(log2(max))+1` formula would be one
  bit short for a positive power of two.
* Split positions are kept non-increasing, so a merge never needs bits from
  the upper part.
* The reset and the unregistered output are this design's own choices.

## Status and trust

All modules lint cleanly under Verilator `-Wall` (only width and unused
warnings remain) and elaborate in Yosys/slang. `tb/tb_fir_tdf_sa_opt.sv`
checks the whole filter at its default parameters against a 64-bit
convolution model, every cycle. It drives random input, both worst-case
input sequences (largest positive and largest negative output) and a
mid-stream reset. It passes with 1798 checks. It also confirms that the
final merge both carries and borrows into the upper part.

**The tap modules have no self-checking testbenches of their own.** They
are covered only through the whole filter, and only with the default
coefficient set.

Simulate with:

    verilator --binary --timing -Irtl rtl/fir_sa_pkg.sv tb/tb_fir_tdf_sa_opt.sv --top tb_fir_tdf_sa_opt
    ./obj_dir/Vtb_fir_tdf_sa_opt

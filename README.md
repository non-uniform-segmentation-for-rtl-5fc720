# Function evaluation on non-uniform segments

Piecewise-linear approximation is the cheapest way to evaluate a function in
hardware. You need one table read, one multiply and one add per result. With
uniform segments, however, a function that bends sharply somewhere needs tiny
segments everywhere. `sqrt(-ln x)` on a 32-bit input is the extreme case: it
would need about 2^30 equal segments to reach a worst-case error of 0.03.

This design places segment boundaries at powers of two. Near a point where the
function bends, segments shrink by half at each step; in flat regions they are
large. With boundaries at `2^k` and `2^W - 2^k`, finding the segment that holds
an input is a matter of counting its leading zeros or leading ones. Two gate
cascades and a small adder do that, with no comparators and no search. Each
segment keeps its own line `y = c1*x + c0` in a small ROM. Each coefficient
carries a power-of-two scale factor, so slopes as large as 10^8 fit a 6-bit
multiplier operand.

The RTL contains the three function evaluators of a Box-Muller Gaussian noise
generator:

| function      | input  | segments | c1 / c_s1 / c0 / c_s0 bits | table bits | worst error (measured) |
|---------------|--------|----------|----------------------------|------------|------------------------|
| sqrt(-ln x)   | 32 bit | 59       | 6 / 5 / 32 / 5             | 2832       | 0.0086                 |
| cos(2*pi*x)   | 16 bit | 21       | 8 / 4 / 16 / 4             | 672        | 0.0020                 |
| sin(2*pi*x)   | 16 bit | (shares the cosine table)    |                            | 0          | 0.0020                 |

Together the tables hold 3504 bits. Every block is fully pipelined: one
result set per clock, all three results leaving 7 clocks after their inputs.

## Finding the segment: the prefix cascades (`nus_seg_addr`)

Call the segment field `s`, `SB` bits wide. Two cascades run from its top
bits downwards:

```
OR  cascade  o[k] = s[SB-1] | s[SB-2] | ... | s[k]     k = SB-2 .. 0
AND cascade  a[k] = s[SB-1] & s[SB-2] & ... & s[k]     k = SB-1 .. 0
```

`o[k]` is 1 exactly when `s >= 2^k`. `a[k]` is 1 exactly when
`s >= 2^SB - 2^k`. Each cascade output is a *tap*, and each tap marks one
segment boundary:

- The OR taps give boundaries `1, 2, 4, ..., 2^(SB-2)`. Segments grow by a
  factor of two moving away from zero.
- The AND taps give boundaries `2^SB - 2^k`. Segments shrink by half towards
  the top of the range.

The adder counts the taken taps that are 1. That count is the number of
boundaries at or below `s`, so it is the segment index.

Leaving a tap out merges the two segments on either side of it. Segments can
therefore grow or shrink by factors of 4, 8 and so on where the function
allows. The tap choice comes in on the `or_en` / `and_en` inputs, so one
calculator can serve intervals with different tap sets.

For an 8-bit field, take all 13 gate outputs: the 7 OR taps and the 6 AND
taps `a[6..1]`. This gives 14 segments:

- `[0,1/256)`, `[1/256,1/128)`, ..., `[1/8,1/4)`
- one central segment `[1/4,3/4)`
- `[3/4,7/8)`, ..., `[127/128,1)`

The bare top bit `a[SB-1]` is available as an extra tap. It puts a boundary at
1/2.

The critical path runs from `s[SB-1]`/`s[SB-2]` through one cascade to the
adder output. Setting `PARALLEL = 1` replaces the ripple cascades with a
log-depth parallel-prefix network (Sklansky form). It gives the same results
with a shorter path and more gates; the evaluators use the default ripple
form. Pipeline registers between the cascade gates are not built:
`nus_func_eval` registers the segment address instead.

## Intervals and the ROM address (`nus_addr_gen`)

The top `IB` bits of an input choose one of `2^IB` uniform intervals. The
remaining bits go to the cascades, using that interval's taps (`OR_TAPS[i]`,
`AND_TAPS[i]`). This nesting lets the cosine table place its segments where
its curvature needs them, something boundaries spread from the two ends alone
cannot do.

The ROM stores the segments of all intervals back to back. The address is the
interval's base (the number of segments in all lower intervals) plus the
segment index. The bases are constants computed at elaboration from the tap
masks. If the masks do not add up to `NSEG` segments, elaboration stops with
an error.

## Coefficients and scaling (`nus_lin_datapath`, `nus_scale_shift`)

Each ROM word is `{c1, c_s1, c0, c_s0}`. All four fields are two's complement,
with `c1` in the top bits. For an input `X` (an integer), the datapath computes:

```
acc = c1*X * 2^c_s1  +  c0 * 2^c_s0        (units of 2^-F)
y   = clamp( floor((acc + 2^(F-YF-1)) / 2^(F-YF)), 0, 2^YW - 1 )
```

A positive scale factor shifts left and a negative one shifts right
arithmetically (floor). `c1` multiplies the whole input `x`, not an offset
inside the segment, so `c0` is the line's y-intercept.

Near `x = 1` the line for `sqrt(-ln x)` is steep, and `c1*x` and `c0` are
both large and nearly cancel. The precision therefore sits in `c0`, which is
why `c0` has 32 bits while `c1` has only 6. The internal widths are sized for
the largest possible shift, so no coefficient can overflow the sum.

The pipeline in `nus_lin_datapath` has three stages:

1. product `c1*X` and scaled `c0`
2. scaled product plus scaled `c0`
3. rounding and clamping

### How the tables were computed

The tables are `rtl/nus_sqrtln_coef.hex` and `rtl/nus_cos_coef.hex`, one hex
word per segment. For each segment `[a, b]`:

1. `g = (f(b) - f(a)) / (b - a)` is the secant slope. For a function of
   fixed convexity this is the minimax slope.
2. `c_s1` is the smallest scale for which `c1 = round(g * 2^(F - c_s1))` fits
   in `C1W` signed bits. The neighbours `c1 +/- 1, 2` are also tried, and the
   one with the lowest resulting error is kept.
3. Let `r(X) = f(X)*2^F - c1*X*2^c_s1` be the residual for the chosen `c1`.
   `c0*2^c_s0` is rounded from the midpoint `(max r + min r)/2`. `c_s0` is the
   smallest scale that lets `c0` fit in `C0W` bits.

The tap masks came from a greedy search:

- `sqrt(-ln x)`: start from every available boundary and remove the tap whose
  removal raises the worst-case error least, until 59 segments remain.
- cosine: start from 4 plain intervals and add the tap that lowers the
  worst-case error most, until there are 21 segments.

Resulting boundaries:

- **sqrt(-ln x)**, `x = X/2^32`:
  - `2^-30, 2^-29, ..., 2^-1`
  - `1 - 2^-2, 1 - 2^-3, ..., 1 - 2^-29`
  - The first segment is `[0, 2^-30)`; the last is `[1 - 2^-29, 1)`.
  - `X = 0` is outside the domain and returns the first segment's value.
- **cos(2*pi*r)**, `R = r*2^16` in `[0, 2^14)`. There are four intervals of
  4096, and boundaries are given relative to each interval:
  - interval 0: `512, 1024, 2048, 3072, 3584, 3840`
  - interval 1: `256, 1024, 2048, 3072, 3584, 4064`
  - interval 2: `256, 512, 1024, 3072, 3584`
  - interval 3: no inner boundary

To change a function, regenerate the hex file with the steps above. Then set
the matching widths and tap masks in `nus_pkg`.

## Sine and cosine from one quarter-wave table (`nus_trig_fold`, `nus_sincos_eval`)

Only `cos(2*pi*r)` for `r` in `[0, 1/4)` is tabulated. The fold works on the
16-bit angle `x` (one turn = 2^16):

- Let `p = x` for the cosine and `p = x - 2^14` for the sine, since
  `sin(t) = cos(t - pi/2)`.
- Split `p` into quadrant `q = p[15:14]` and `R = p[13:0]`.
- Pick the table argument and sign:

  | q | table argument | sign |
  |---|----------------|------|
  | 0 | `R`            | +    |
  | 1 | `2^14 - R`     | -    |
  | 2 | `R`            | -    |
  | 3 | `2^14 - R`     | +    |

- When `R = 0` in quadrants 1 and 3, the mirrored argument is exactly a
  quarter turn. Those inputs give 0 directly.

Cosine and sine each have their own fold, datapath and multiplier. They read
the one table through the two ports of `nus_coef_rom`.

`nus_sincos_eval` has 7 pipeline stages:

| stage | action                  |
|-------|-------------------------|
| 1     | fold                    |
| 2     | segment address         |
| 3     | ROM read                |
| 4-6   | datapath                |
| 7     | sign (`nus_trig_sign`)  |

## Top level (`nus_gauss_func_top`)

| port        | dir | width | format                                           |
|-------------|-----|-------|--------------------------------------------------|
| `clk`       | in  | 1     |                                                  |
| `rst_n`     | in  | 1     | asynchronous, active low; clears the valid pipelines only |
| `in_valid`  | in  | 1     | `u0`, `u1` are valid; may be high every clock    |
| `u0`        | in  | 32    | `u0 = U0/2^32`, `U0 > 0`                          |
| `u1`        | in  | 16    | angle, one turn = 2^16                           |
| `out_valid` | out | 1     | exactly 7 clocks after `in_valid`                |
| `ln_y`      | out | 16    | `sqrt(-ln u0)`, unsigned Q3.13                   |
| `cos_y`     | out | 16    | `cos(2*pi*u1)`, signed Q2.14                     |
| `sin_y`     | out | 16    | `sin(2*pi*u1)`, signed Q2.14                     |

There is no back-pressure. The `sqrt(-ln)` evaluator takes 5 clocks, so its
result goes through two more registers to leave together with cosine and
sine. An assertion checks that the two valid pipelines stay in step.

The design uses two ROMs (59x48 and 21x32) and three multipliers:

- 6x32 for `sqrt(-ln)`, which needs two 18x18 multiplier blocks on an FPGA
- two 8x14 for cosine and sine, one block each

## Accuracy and what to trust

- `ln_y` is within 0.0086 of `sqrt(-ln u0)` on every input tried: over 40,000
  spread to reach every segment, including the smallest input `2^-32`, where
  the value is about 4.71. Its top 8 bits (Q3.5) are the 8-bit result the
  design targets, whose error bound is 2^-5.
- `cos_y` and `sin_y` are within 0.0020 of the true values over all 65,536
  inputs. The target is 0.0035, i.e. 8 fraction bits.
- The outputs carry more fraction bits than that accuracy. This is so they
  can be compared bit for bit with an integer model; the extra bits are not
  extra accuracy.

## Departures and open points

- **Latency.** The latency is 7 clocks. A reference implementation of the
  same evaluators had 14 stages at 133 MHz. This RTL has not been timed on an
  FPGA. The deepest logic per stage is the 6x32 multiply in `sqrt(-ln)` and
  the shift-and-add of a 54-bit sum.
- **Segment boundaries.** The boundaries come from the greedy search above,
  not from a published set. This explains why the measured errors are below
  the targets (0.031 and 0.0035).
- **Output width.** The output word widths, the rounding and the clamping are
  this design's choices.
- **Not built.** The offline segmentation procedure (balanced-error boundary
  placement followed by snapping to cascade taps) is software and is not part
  of the RTL. Pipeline registers inside the cascades are also not built.

## Files

| file | contents |
|------|----------|
| `rtl/nus_pkg.sv` | widths, tap masks, table file names of both configurations; `fold_t` |
| `rtl/nus_seg_addr.sv` | prefix OR/AND cascades and counting adder |
| `rtl/nus_addr_gen.sv` | interval select, per-interval taps, ROM base + offset |
| `rtl/nus_coef_rom.sv` | two-port synchronous coefficient ROM (`$readmemh`) |
| `rtl/nus_scale_shift.sv` | signed power-of-two shifter |
| `rtl/nus_lin_datapath.sv` | multiply, scale, add, round; 3 stages |
| `rtl/nus_func_eval.sv` | complete evaluator, 1 or 2 channels on one table; 5 stages |
| `rtl/nus_trig_fold.sv`, `rtl/nus_trig_sign.sv` | quarter-wave folding and sign restore |
| `rtl/nus_sincos_eval.sv` | cosine + sine on the shared table; 7 stages |
| `rtl/nus_gauss_func_top.sv` | the three evaluators, aligned |
| `rtl/*.hex` | coefficient tables, read by path `rtl/...` |
| `tb/nus_ref_pkg.sv` | reference models: boundary-list segment search, 64-bit datapath, real functions |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Run the simulations from the directory that holds `rtl/` and `tb/`, because
the tables are read by relative path. For example, the end-to-end test at
full size:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nus_pkg.sv tb/nus_ref_pkg.sv tb/nus_gauss_func_top_tb.sv \
    --top-module nus_gauss_func_top_tb -Mdir obj_top
./obj_top/Vnus_gauss_func_top_tb
```

Each testbench ends with one line, `TB_RESULT checks=N failures=M`. Each also
has a watchdog that ends the run as a failure if it hangs.

The top-level test runs 60,000 clocks in well under a second. It compares
every result with the real functions and with the integer model. It fails if
any of the following was never exercised:

- any table segment;
- either cascade region;
- a mirrored quadrant or a negated quadrant;
- the quarter-turn zero case;
- full-rate bursts or idle gaps.

Other testbenches:

- `nus_sincos_eval_tb` sweeps all 65,536 angles.
- `nus_func_eval_tb` checks the `sqrt(-ln)` evaluator alone and the 5-clock
  latency.
- `nus_seg_addr_tb` checks the 8-bit, 14-segment calculator exhaustively.

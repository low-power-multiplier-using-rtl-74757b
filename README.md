# ANT multiplier: a 12 x 12 multiplier that tolerates its own timing errors

Lowering a circuit's supply voltage cuts its dynamic power roughly with the square of
the voltage. Lowering it *below* the critical voltage, where the longest path no longer
fits in the clock period, saves even more, but some results then come out wrong. These
are *soft errors*. Algorithmic noise tolerance (ANT) accepts them and repairs them. The
wide main multiplier runs at the over-scaled voltage. A small replica with reduced
precision, whose paths are short enough to stay correct, computes an approximation of
the same product. Whenever the two disagree by more than a threshold `TH`, the main
result is taken to be corrupted and the replica's result is used instead:

```
y_hat = ya   if |ya - yr| <= TH
y_hat = yr   if |ya - yr| >  TH
```

This RTL implements that scheme for unsigned 12-bit operands and a 24-bit product:

* **Main block** (`wallace_mult`): an exact multiplier built around a
  reduced-complexity ("modified") Wallace tree.
* **Replica** (`fixed_width_rpr`): a *fixed-width* truncated multiplier. It produces
  only the upper 12 product bits and never forms about half of the partial products.
  A cheap, data-dependent correction keeps its error small.
* **Error correction** (`ant_error_correction`): a subtractor, an absolute value, a
  comparator against `TH`, and a 2:1 multiplexer.

## Structure and timing

```
            +-------------------+  p_main   ya_err_mask
 i1 ---+--->| wallace_mult      |----------(XOR)---->[reg ya]--+------------> ya
 i2 -+-|--->| (exact, 24 bit)   |                              |
     | |    +-------------------+                              v
     | |    +-------------------+  p_rpr                 +-------------+
     | +--->| fixed_width_rpr   |------------------>[reg yr]->| ant_error_  |--> y_hat
     +----->| (upper 12 bits)   |                              | correction  |--> diff, err
            +-------------------+                        +-------------+
                                                                   yr ----> yr
```

`ant_multiplier` is the top. On each rising edge of `clk` it registers the main-block
product and the replica product of the current `i1`, `i2`. The error-correction logic
after the registers is combinational. So `y_hat`, `ya`, `yr`, `diff` and `err` hold
the result of the operands sampled at the last rising edge. The latency is one clock,
and the unit takes one new operand pair every clock. `rst_n` is active low and
synchronous, and it clears both registers.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `i1`, `i2` | in | 12 | unsigned operands |
| `ya_err_mask` | in | 24 | emulated soft errors, XORed into the main result; tie to 0 |
| `y_hat` | out | 24 | corrected product |
| `ya` | out | 24 | registered main product (including injected errors) |
| `yr` | out | 24 | registered replica product; bits 11..0 are always 0 |
| `diff` | out | 24 | `|ya - yr|` |
| `err` | out | 1 | 1 when the replica result was selected |

### Emulating voltage over-scaling

RTL has no delays, so the timing failures that ANT exists to absorb cannot happen in
simulation. The `ya_err_mask` input stands in for them. Its bits are XORed into the
main product just before the `ya` register, which is where a late-arriving path would
corrupt the sampled value. In silicon the input is tied to 0. The replica path has no
such input, because the scheme relies on the replica staying correct.

## The main block: reduced-complexity Wallace reduction

This is the part that takes the most care to read. The multiplier works in three
phases.

1. **Partial products.** There are 144 AND terms `a[i] & b[k]`, each with weight
   `i+k`. In every column they are packed towards the top, which is the "inverted
   pyramid" arrangement. Column `j` holds `min(j, 22-j) + 1` bits.
2. **Reduction.** Let `r` be the number of rows, which is the height of the tallest
   column. A reduction stage turns them into
   `r' = 2*floor(r/3) + (r mod 3)` rows.
   * Every complete group of three bits in a column goes into a full adder. The sum
     stays in the column and the carry moves one column up.
   * A leftover group of one or two bits passes through unchanged.
   * A half adder does not reduce the bit count, so it is used only when a column
     would otherwise end up taller than `r'`. That happens when the carries coming
     in from the column below push it over.

   The stages repeat until two rows remain. For 12 x 12 the row counts are
   12, 8, 6, 4, 3, 2. That is five stages, using 104 full adders and only 6 half
   adders.
3. **Carry-propagate adder.** A 24-bit ripple-carry adder sums the two final rows.

The tree is not drawn by hand. The functions in `ant_pkg` replay the rule column by
column at elaboration time:

* `tree_info()` returns the column heights, the full-adder and half-adder counts per
  stage and column, the row counts, and the number of stages.
* The generate loops in `rcw_reduce` place cells from those numbers.

So changing `N` rebuilds a correct tree of the same kind. Each stage's bits are a
separate signal (`g_lvl[s].bits`), so no net feeds back into itself. Carries out of
column 23 are left open, because the product always fits in 24 bits and they are
always 0.

## The replica: a fixed-width truncated multiplier

The replica gets the same two 12-bit operands but keeps only the 12-bit upper half of
the product.

* **Deletion.** Product bits 0..11 are never computed. The partial products of
  columns 0..10, which are 66 of the 144, are not formed at all, and the lower half
  of the adder tree goes with them.
* **Correction vector.** Leaving the deleted part out would make the result too small
  every time, by up to 45057. So the 12 terms `a[i] & b[11-i]` of column 11, the
  largest-weight part of what was deleted, are formed anyway. They are added into
  column 12, each with weight 4096. This estimate of the missing part depends on the
  data. It needs no gates beyond the AND terms, and it shrinks the error to the range
  **-9785 .. +7737**, measured as exact product minus replica over all 2^24 operand
  pairs.
* **Summation.** The remaining bits go through the same reduced-complexity Wallace
  tree code. The injected terms make column 12 tall (23 bits), so the rows run
  23, 11, 8, 5, 4, 3, 2, which is six stages of 58 full adders and 8 half adders. A
  12-bit ripple-carry adder then sums the result. The main block's carry-propagate
  adder is 24 bits long and dominates its delay, so the replica's path is the
  shorter one.

`T` (the number of deleted columns) and `CORR` (use the correction vector) are
parameters. With `CORR = 0` the replica is plain truncation. Its error range is then
0 .. 45057, and `TH` must be raised to match.

## Choosing the threshold

`TH` must be at least the replica's worst error. Otherwise an error-free main result
could be replaced by the coarser replica. The default `TH = 9785` is exactly that
worst case, which is the largest `|a*b - yr|` over all operand pairs. With a lower
`TH`, clean results near the worst case would be replaced. With a higher `TH`, larger
soft errors would slip through. A soft error is always caught when it is larger than
`2*TH`, in this design 19570, for example a flip of any product bit from 15 up. A
smaller soft error is caught only if it pushes `|ya - yr|` past `TH`. Otherwise it is
passed on, and it is then no larger than about `2*TH`. That bounded residual error is
what ANT trades for the power saving.

The top carries an assertion, `a_clean_result_kept`. It stops simulation if a product
that was sampled without an injected error is ever replaced, which means `TH` is
below the replica's worst error.

If you change `N`, `T` or `CORR`, work out `TH` again as
`max over all a, b of |a*b - R(a,b)|`, where `R` is the replica value:

```
R(a,b) = a*b - sum_{i+k < T} a_i b_k 2^(i+k) + 2^T * sum_{i+k = T-1} a_i b_k
```

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `ant_multiplier` | `N` | 12 | operand width; product is `2N` bits |
| | `CORR` | 1 | correction vector in the replica |
| | `TH` | 9785 | threshold; valid for `N = 12`, `CORR = 1` only |
| `fixed_width_rpr` | `T` | `N` | deleted low columns (the top always uses `T = N`) |
| `ant_error_correction` | `W`, `TH` | 24, 9785 | |

## Files

| file | contents |
|---|---|
| `rtl/ant_pkg.sv` | elaboration-time functions that plan the Wallace tree |
| `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/cpa.sv` | adder cells, ripple-carry adder |
| `rtl/rcw_reduce.sv` | partial-product generation (with deletion and correction) and the reduction tree |
| `rtl/wallace_mult.sv` | main block |
| `rtl/fixed_width_rpr.sv` | fixed-width replica |
| `rtl/ant_error_correction.sv` | difference, threshold test, multiplexer |
| `rtl/ant_multiplier.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module above and one for the top |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. The package has
to come first on the command line:

```
verilator --binary --timing --assert -Irtl rtl/ant_pkg.sv rtl/ant_multiplier.sv \
          tb/tb_ant_multiplier.sv --top-module tb_ant_multiplier -Mdir obj_top
./obj_top/Vtb_ant_multiplier
```

Swap in `wallace_mult` / `tb_wallace_mult`, `fixed_width_rpr` / `tb_fixed_width_rpr`
or `ant_error_correction` / `tb_ant_error_correction` for the other testbenches.
Verilator finds the submodules through `-Irtl`.

What the testbenches check:

* `tb_wallace_mult` checks all 2^24 operand pairs against `a*b`. It also checks that
  the tree's row counts follow the `2*floor(r/3) + r mod 3` sequence 12, 8, 6, 4, 3, 2.
* `tb_fixed_width_rpr` checks all 2^24 operand pairs against the formula for
  `R(a,b)` above. It also checks that the low 12 bits are zero and that the error
  range is exactly -9785 .. +7737.
* `tb_ant_error_correction` checks differences of exactly `TH-1`, `TH` and `TH+1` in
  both directions, extreme values, and random pairs.
* `tb_ant_multiplier` runs the top at its default parameters for one million
  products, each with a soft-error mask that is zero, a single high bit, a single low
  bit, or random. It checks every output one clock later against its own model, and
  it checks a reset in mid-run. It counts clean products passed through, errors
  corrected by the replica, small errors tolerated, and resets. Each of these must
  occur.

* `tb_mult_widths` builds the main block at `N` = 3, 5 and 8 and the replica at
  `N` = 5 and 8, and checks every operand pair. This shows that the tree planning
  also works away from the default width.

All of these run in well under a minute each.

## Design choices and departures

* Operands are unsigned, 12 bits wide, and the outputs are 24 bits. These widths
  are those of the original design's top-level interface.
* That interface has seven 24-bit outputs whose meaning is not defined. This top
  brings out `y_hat`, `ya`, `yr`, `diff` and `err` instead.
* The clock, the synchronous reset and the one-cycle latency are choices of this
  design. Only the registers on `ya` and `yr` come from the ANT structure.
* The correction terms are meant to stay off the replica's critical path. Here they
  enter the reduction tree at its input, which makes the replica's tree one stage
  deeper than the main block's. The replica still has the shorter total path,
  because its carry-propagate adder is half as long. Moving the correction later
  would need a tree that leaves room in column 12.
* A second, finer correction term for the replica was left out. It would use the
  next deleted column to trim the remaining error further, but no logic for it is
  defined.
* The replica receives full-precision operands. Its precision is reduced only in
  its output and in the partial products it forms.
* The carry-propagate adders are ripple-carry. Any faster adder can replace `cpa`
  without changing the function.
* Timing errors are emulated with `ya_err_mask`. Nothing here models actual delays
  or supply voltage.
* A plain array multiplier, the usual baseline for this comparison, is not
  included.

# FIR filter built on reduced-complexity Wallace tree multipliers

A direct-form FIR filter spends almost all of its logic in its multipliers: one
per tap. This design builds each multiplier as a Wallace tree. Partial products
come from a plain AND array. A tree of full and half adders compresses them to
two rows in a logarithmic number of stages. A square-root carry-select adder
then adds those two rows. The tree follows the *reduced-complexity* Wallace
scheme: it keeps the classic Wallace stage count and uses as few half adders
as it can, so it needs fewer cells than a standard Wallace tree.

The RTL provides:

* `wallace_mult`: a W×W unsigned combinational multiplier (W = 16 by default).
* `fir_direct`: a direct-form FIR filter with one `wallace_mult` per tap
  (8 taps of 16-bit samples and coefficients by default).
* `mac_add16`: a 16-bit multiply-accumulate unit around one `wallace_mult`.
* `fir_wallace_top`: the top level, which places the filter and the MAC unit
  side by side.

Everything is synthesizable SystemVerilog-2017. There are no vendor primitives
and no latches.

## Multiplier datapath

```
a[W-1:0] ─┐
          ├─ pp_gen ── W×W bits ── rcw_tree ── row0, row1 (2W bits) ── sqrt_csla ── p[2W-1:0]
b[W-1:0] ─┘
```

### Partial products (`pp_gen`, `pp_row`)

`pp_row` is one row of W AND gates. Every bit of the multiplicand `z` is gated
with a single multiplier bit `y`. `pp_gen` stacks W of these rows, so
`pp[i][j] = a[j] & b[i]`, with weight 2^(i+j). Viewed by column, column c of
the 2W-bit result holds min(c+1, 2W-1-c) bits. Stacked, this is the
inverted-triangle matrix that the tree starts from.

### Reduction tree (`rcw_tree`, `wallace_pkg`)

This is the least obvious part of the design. The tree is not written out by
hand. Constant functions in `wallace_pkg` plan it at elaboration time for any W:

1. **Stage targets.** Wallace groups the rows in threes. Each group of three
   becomes two rows, and any rows left over pass through. After a stage with r
   rows there are `2*floor(r/3) + r mod 3` rows. So 8 rows go
   8 → 6 → 4 → 3 → 2 (four stages), and 16 rows go
   16 → 11 → 8 → 6 → 4 → 3 → 2 (six stages).
2. **Adders per column.** Within a stage, columns are visited from the least
   significant upwards. Take a column with h bits that receives `cin` carries
   from the column below. It gets the fewest full adders (each removes two
   bits) that bring `h + cin` down to the stage target. It gets one half adder
   (which removes one bit) only if one bit is still too many. A full adder
   needs three of the column's own bits and a half adder needs two, so the
   counts are limited by h.
3. **Wiring.** `m[s][c][k]` is bit k of column c at the input of stage s. In
   stage s, column c feeds its first 3F bits to F full adders, the next 2G bits
   to G half adders, and passes the rest through. At stage s+1, column c holds,
   in order: the F+G sums, the passed bits, then the carries from column c-1.

The per-column placement rule is this design's own. The source specifies the
Wallace-style stage structure and says that half adders are kept to a
minimum. The resulting adder counts are:

| W  | stages | row count per stage      | full adders | half adders |
|----|--------|--------------------------|-------------|-------------|
| 8  | 4      | 8, 6, 4, 3, 2            | 35          | 7           |
| 16 | 6      | 16, 11, 8, 6, 4, 3, 2    | 195         | 15          |

After the last stage, column 0 holds one bit and every other column at most
two. The two rows come out as `row0` and `row1`. The top column of a W×W
product never receives a carry out, so the 2W-bit sum is exact.

To change W, set the parameter. The plan is recomputed. `wallace_pkg::MAX_W`
(64) bounds the size of the planning arrays.

### Final adder (`sqrt_csla`, `rca`, `bec`)

The final adder is an N-bit carry-select adder (N = 2W = 32) with groups of
growing size. For N = 32 the groups are 2, 2, 3, 4, 5, 6, 7 and 3.

* Group 0 is a ripple-carry adder fed by the real carry-in.
* Every later group computes its sum once, with carry-in 0, in a ripple-carry
  adder (`rca`).
* A binary-to-excess-1 converter (`bec`, y = x + 1) derives the carry-in-1
  result from the carry-in-0 result by incrementing `{cout, sum}`.
* The carry arriving from the group below drives a 2:1 multiplexer that picks
  one of the two results and the group's carry out.

The groups grow by one bit each because the select for a higher group arrives
later. The BEC takes the place of a second ripple adder, which is the
area-saving form of this adder.

## MAC unit (`mac_add16`)

| port            | width | meaning                                      |
|-----------------|-------|----------------------------------------------|
| `clk`, `reset`  | 1     | rising-edge clock; synchronous, active-high reset |
| `A`, `B`        | 16    | operands                                     |
| `prod`          | 32    | combinational `A*B`                          |
| `mult`          | 32    | product register: `mult <= prod`            |
| `accum`         | 32    | accumulator: `accum <= accum + mult`, wraps modulo 2^32 |
| `RES`           | 32    | equal to `accum`                             |

A pair applied in cycle t shows on `prod` in the same cycle. It is in `mult`
after the next edge and has been added into `accum` after the edge after that.
While `reset` is high, `mult` and `accum` are held at zero and `prod` still
follows the inputs. The port names and widths come from the source's MAC
simulation. The two-register pipeline is this design's choice.

## FIR filter (`fir_direct`)

z[n] = Σ_{k=0}^{TAPS-1} h[k] · a[n-k]

* `a_in` is a[n]. A shift register of TAPS-1 words holds a[n-1] … a[n-TAPS+1].
* Each tap has its own `wallace_mult`, and a chain of adders sums the
  products. This is the classic direct form: one multiplier per tap and no
  time sharing.
* On a rising edge with `in_valid` high, z[n] is stored in `z_out`,
  `out_valid` goes high for that cycle, and the delay line shifts in `a_in`.
  The latency from sample to output is one clock. With `in_valid` low the
  delay line holds and `out_valid` drops.
* `reset` (synchronous, active high) clears the delay line, `z_out` and
  `out_valid`.
* Samples and coefficients are unsigned, like the multiplier. `z_out` has full
  precision: OW = 2W + clog2(TAPS) = 35 bits, so it never overflows.
* The coefficients `h[TAPS-1:0][W-1:0]` are input ports and are meant to be
  held constant. Tie them to constants at a higher level for a fixed filter.

Parameters: `W` (16), `TAPS` (8, at least 2), `OW` (derived).

## Top level (`fir_wallace_top`)

The filter and the MAC unit share `clk` and `reset`. All other ports are
brought out separately with `fir_` and `mac_` prefixes. Parameters `W` and
`TAPS` pass through to the units.

## Where this design departs from, or goes beyond, its source

* **Final adder.** The source mentions a carry-select variant that uses a
  D-latch in place of the BEC. A latch inside a combinational adder has no
  defined timing, so the BEC form (RCA + BEC + MUX) is used.
* **Group sizes** of the carry-select adder are the usual square-root split.
* **Adder placement** in the reduction tree comes from the rule above, not from
  a drawn dot diagram. The stage count matches an 8×8 reduced-complexity tree
  (four stages).
* **Filter order** is not fixed by the source. 8 taps is a default.
* **Arithmetic** is unsigned throughout. There is no signed (Baugh-Wooley or
  Booth) support.
* **Strobes, output register, reset style** and the MAC register pipeline are
  this design's choices.
* The adder chain of the filter uses ordinary `+`. The source does not say
  which adder it uses there.
* Area, delay and power figures for FPGA implementations were reported for the
  original multiplier (about 120 LUTs, 75 slices, 19.2 ns). They have not been
  reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_full_adder`, `tb_half_adder` | exhaustive truth tables |
| `tb_pp_gen`          | every partial-product bit and the weighted sum, random operands |
| `tb_rcw_tree`        | the planned row counts per stage (8-6-4-3-2 and 16-11-8-6-4-3-2), and that the two rows add to a·b: 3000 random 16×16 pairs and all 8×8 pairs |
| `tb_sqrt_csla`       | 32-bit: carries through every group boundary and 5000 random sums; 9-bit: swept |
| `tb_wallace_mult`    | the three MAC-example operand pairs (49178 × 13429 = 660411362 bit for bit), corners, 5000 random pairs, all 8×8 pairs |
| `tb_mac_add16`       | cycle model of `mult`/`accum`, reset holding zeros, the one- and two-edge latency, accumulator wrap-around |
| `tb_fir_direct`      | reference convolution, impulse response returning h[0..7], full-scale input, gaps in `in_valid`, reset mid-stream |
| `tb_fir_wallace_top` | both units end to end at the default sizes. It counts reset, sample gaps, impulse taps, full-scale output, MAC accumulation and wrap-around, and fails if any of them never happened |

Each testbench has also been run against a deliberately broken copy of its
module, and it reports failures.

To simulate one, for example the top level:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wallace_pkg.sv tb/tb_fir_wallace_top.sv \
          --top-module tb_fir_wallace_top -o sim
./obj_dir/sim
```

`-Irtl` lets Verilator find each module in the file of the same name.
`wallace_pkg.sv` must be listed first, because `rcw_tree` imports it. All
testbenches finish in well under a second of simulation time.

Lint: `verilator --lint-only -Wall` reports only `UNUSEDSIGNAL` in `rcw_tree`,
for the adder slots of columns that use fewer than W adders. Those bits are
tied to zero on purpose.

## Files

* `rtl/wallace_pkg.sv`: reduction-tree planning functions
* `rtl/full_adder.sv`, `rtl/half_adder.sv`: 3:2 and 2:2 counters
* `rtl/pp_row.sv`, `rtl/pp_gen.sv`: AND-array partial products
* `rtl/rcw_tree.sv`: reduced-complexity Wallace tree
* `rtl/rca.sv`, `rtl/bec.sv`, `rtl/sqrt_csla.sv`: final carry-select adder
* `rtl/wallace_mult.sv`: the multiplier
* `rtl/mac_add16.sv`: multiply-accumulate unit
* `rtl/fir_direct.sv`: direct-form FIR filter
* `rtl/fir_wallace_top.sv`: top level
* `tb/tb_*.sv`: one testbench per module above (except the helpers `pp_row`,
  `rca`, `bec`, which are covered through their parents)

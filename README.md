# TACBM: a truncated Booth multiplier with approximate carry compensation

Many signal-processing and learning workloads tolerate small arithmetic errors.
A full signed 16 x 16 multiplier spends a large share of its adder tree on the
low product columns. Those columns barely move the high half of the result.
The TACBM (Truncated and Approximate Carry-based Booth Multiplier) does not
build that part of the tree. Every partial-product bit below a chosen column
`Z`, the *truncation factor*, is removed. The carry that those columns would
have sent upward is replaced by a cheap estimate taken from the two highest
removed columns. The result is a 32-bit product whose low `Z` bits are zero
and whose upper bits are very close to the exact product. It costs much less
area and power than an exact Booth multiplier.

The configuration built by default is the one the method is evaluated at:
16-bit two's-complement operands and `Z = 10`.

## Datapath at a glance

```
 b ──► booth_encoder x8 ──digits──┐
                                  ▼
 a ──────────────────────► booth_pp_gen x8 ──rows──┬──► kept columns (>= Z) ──┐
                                                   │                         ▼
                                                   └─► columns Z-1, Z-2 ──► approx_carry_comp ──► + at column Z ──► p
```

`tacbm_mult` is the combinational multiplier. `tacbm_top` places it between
an input register stage and an output register stage.

## Radix-4 Booth rows

The multiplier `b` gets a zero appended below its LSB. It is then cut into
overlapping 3-bit groups `{b[2i+1], b[2i], b[2i-1]}`, i = 0..7. Each group is
one digit `d_i = -2*b[2i+1] + b[2i] + b[2i-1]` in {-2, -1, 0, +1, +2}, with
`b = Σ d_i·4^i`. So a 16-bit multiplier needs 8 partial products instead
of 16.

- `booth_encoder` turns a group into three flags (`booth_digit_t` in
  `tacbm_pkg`): `one` means |d| = 1, `two` means |d| = 2, and `neg` means
  d < 0. The group `111` is encoded as +0, so a zero digit always gives an
  all-zero row.
- `booth_pp_gen` forms a 17-bit row: `a` sign-extended, `a << 1`, or zero.
  For a negative digit the row is inverted. The +1 that completes the
  negation comes out as a separate `neg` bit, and the adder places it at the
  row's LSB column `2i`. The rule is `signed(row) + neg = d·a`. Keeping the
  +1 separate lets the corner case `-2 · (-32768) = 65536` work, even though
  that value does not fit in 17 signed bits.

Row `i` is weighted by `4^i`, so it starts at product column `2i`.

## Truncation

Row `i` covers product columns `2i .. 2i+16`. For every row, the bits in
columns `< Z` are not formed. The same goes for any `neg` bit whose column
`2i` is below `Z`. With `Z = 10`, that removes the low bits of rows 0–4 and
the `neg` bits of rows 0–4. The kept part of each row is added with its sign
extension. The output bits `p[Z-1:0]` are constant zero, and synthesis
removes them.

In `tacbm_mult` the sum is written as one parallel add of the masked,
sign-extended rows. Synthesis turns it into a compressor tree; the RTL does
not fix a particular tree structure.

## The approximate carry (the part that matters for accuracy)

Call the value of the removed bits `T`. An exact truncated-and-corrected
multiplier would add `floor(T / 2^Z)` at column `Z`. With no correction at
all, the product is always too small: at `Z = 10`, by about 1900 on average.
TACBM estimates the carry from only the two highest removed columns:

```
carry = (2·ones(column Z-1) + ones(column Z-2) + BIAS) >> 2        (BIAS = 3)
```

Here is why this works. Column `Z-1` is worth `2^(Z-1)` and column `Z-2` is
worth `2^(Z-2)`. So `2·n1 + n2`, in units of `2^(Z-2)`, is the part of `T`
carried by those two columns. Each row's bits below them are worth, on
average, about half of their range. The constant `BIAS` stands in for them
and also rounds to the nearest value. Dividing by 4 converts to units of
`2^Z`. At `N = 16` each column has at most 9 bit slots: one per row that
reaches it, plus a possible `neg` bit. The carry is 0–5, so it fits in 3 bits.
`approx_carry_comp` implements this as a weighted ones-count, and synthesis
reduces it to a small piece of logic.

The method specifies only that an approximate carry from the truncated part
is added at column `Z`. It does not fix its logic. The two-column estimate and
`BIAS = 3` are this design's choices, tuned so that the mean error of the
16-bit, `Z = 10` multiplier is close to zero.

Measured accuracy at `N = 16`. The figures are over 20,000 uniformly random
signed operand pairs, with products of zero left out. MRED is the mean of
|error| / |exact|.

| Z  | MRED       | mean error |
|----|------------|------------|
| 4  | 0.000026 % | +3.8       |
| 6  | 0.00021 %  | +11        |
| 8  | 0.00072 %  | +23        |
| 10 | 0.0025 %   | +0.4       |
| 12 | 0.012 %    | −395       |
| 14 | 0.043 %    | −3077      |
| 16 | 0.15 %     | −18404     |

`BIAS` is centred for `Z = 10`. At larger `Z` a bigger bias would re-centre
the error, because the rows then have more removed bits below the two
observed columns. The published accuracy target for this configuration is an
MRED of 0.02 %, and the design is well inside it. MRED is dominated by rare
operand pairs with very small products. A set rich in such pairs (for
example, operand ±1) raises it to about 0.01 %.

## Top level: `tacbm_top`

| port        | dir | width | meaning                                   |
|-------------|-----|-------|-------------------------------------------|
| `clk`       | in  | 1     | clock                                     |
| `rst_n`     | in  | 1     | synchronous reset, active low             |
| `in_valid`  | in  | 1     | `a`, `b` hold an operand pair             |
| `a`, `b`    | in  | N     | multiplicand, multiplier (two's complement)|
| `out_valid` | out | 1     | `p` holds a product                       |
| `p`         | out | 2N    | approximate product, `p[Z-1:0] = 0`       |

Suppose a pair is driven with `in_valid` during cycle k. The input registers
sample it at the end of that cycle. Its product is on `p`, with `out_valid`
high, during cycle k+2. That is a latency of 2 with one product per cycle and
no back-pressure. A reset drops any pair in flight. At the defaults the top
holds 66 flip-flop bits: 32 operand, 32 product and 2 valid. The register
wrapper, the valid flag and the reset style are this design's choices. The
method itself is the combinational multiplier.

## Parameters

| parameter | default | where                         | meaning |
|-----------|---------|-------------------------------|---------|
| `N`       | 16      | all multiplier modules        | operand width, even |
| `Z`       | 10      | `tacbm_mult`, `tacbm_top`     | truncation factor, `2 <= Z <= N` |
| `BIAS`    | 3       | `tacbm_mult`, `tacbm_top`, `approx_carry_comp` | rounding bias of the carry estimate |

The defaults live in `tacbm_pkg`. `N = 16` and `Z = 10` are the evaluated
configuration. `BIAS` is this design's own value. An illegal `N`/`Z`
combination stops elaboration with an error.

## How far to trust it, and where it is this design's own

- The Booth recoding, the row format, the truncation below column `Z` and
  the compensation added at column `Z` are the method as described. The
  multiplier matches a separate arithmetic reference model bit for bit:
  exhaustively at `N = 8` for `Z = 2` and `Z = 4`, and on tens of thousands of
  random and corner pairs at `N = 16` for `Z = 4..16`.
- The carry-estimate logic is this design's own. The method derives its
  compensation from hand-modified Karnaugh maps, and those maps are not
  available. So the product bits of this RTL need not match another TACBM
  implementation bit for bit, although its accuracy is of the same order or
  better.
- The removed `neg` bits below column `Z` are treated as part of the truncated
  part. This is an interpretation.
- Area, power and delay were reported for a Virtex-6 FPGA implementation
  (about 96 LUTs, 96 flip-flops, 7.1 ns). They have not been reproduced here.
- A reconfigurable FIR filter built from these multipliers is mentioned as a
  motivation, but no structure for it is given. It is not included.

## Files

`rtl/`

- `tacbm_pkg.sv`: digit type, default sizes
- `booth_encoder.sv`: 3-bit group to Booth digit
- `booth_pp_gen.sv`: Booth digit and multiplicand to partial-product row
- `approx_carry_comp.sv`: carry estimate from columns Z-1 and Z-2
- `tacbm_mult.sv`: combinational truncated multiplier
- `tacbm_top.sv`: registered top level

`tb/`

- `tacbm_ref_pkg.sv`: arithmetic reference model shared by the testbenches
- one self-checking testbench per module: `<module>_tb.sv`
- `tacbm_zsweep_tb.sv`: accuracy sweep over `Z`; prints the table above

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. The
top-level testbench runs `tacbm_top` at its default parameters. It streams
20,000 pairs with idle cycles and a reset in mid-stream. It checks latency and
values, and it also fails if any Booth digit value, a non-zero compensation
carry, an approximate product, an idle cycle or a dropped pair never
occurred.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tacbm_pkg.sv tb/tacbm_ref_pkg.sv tb/tacbm_top_tb.sv \
    --top-module tacbm_top_tb -Mdir obj_top
./obj_top/Vtacbm_top_tb
```

Replace `tacbm_top_tb` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/tacbm_pkg.sv rtl/tacbm_top.sv`. Every
run finishes in well under a second.

To try another compensation, change `approx_carry_comp`, and `ref_carry` in
`tb/tacbm_ref_pkg.sv` to match. Then run `tacbm_zsweep_tb` to see the effect
on MRED and mean error.

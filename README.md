# Truncated approximate radix-4 Booth multiplier with error compensation

A signed 8 × 8 multiplier that trades a small, bounded error for less
hardware. It is meant for error-tolerant work such as signal processing,
image processing and neural-network inference. Three ideas are combined:

1. **Radix-4 (modified) Booth recoding** halves the number of partial
   products from eight to four.
2. **Truncation.** The four least significant columns of the partial product
   array (truncation factor `W = 4`) are never summed. In their place a
   single **compensation bit** stands in for the carry those columns would
   have sent upward.
3. **Compressor reduction.** The columns that remain are reduced to two rows
   by a single chain of exact 5:2 and 4:2 compressors. A carry-propagate
   adder then adds the two rows.

The product `op` is 16 bits, and its four low bits are always zero. Setting
`W = 0` gives an exact Booth multiplier built from the same parts.

Everything is combinational. There is no clock and no reset: the product is
valid one combinational delay after `a` and `b` settle.

## Top level: `tabm_mul`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | 8  | multiplicand, two's complement |
| `b`  | in  | 8  | multiplier, two's complement (this operand is Booth-recoded) |
| `op` | out | 16 | approximate product, two's complement; `op[W-1:0] = 0` |

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 4 | number of discarded low product columns, allowed 0..4 |

The operand width (8) is fixed in `tabm_pkg` (`N`, `NPP = N/2` partial
products, `PW = 2N` product width). The reduction array is laid out for
exactly four partial products.

```
 b ──► 4 × booth_ppgen ──► pp[0..3] (16-bit each) ──┬──► error_comp ──► comp
 a ──┘   (booth_encoder inside)                     │                    │
                                                    └──► pp_reduction ◄──┘
                                                          │ sum_row, carry_row
                                                          ▼
                                                   vector_merge_adder ──► op
```

## Partial products (`booth_encoder`, `booth_ppgen`)

The multiplier is padded with `b[-1] = 0` and split into four overlapping
groups `{b[2i+1], b[2i], b[2i-1]}`. Each group stands for one digit
`d_i = -2·b[2i+1] + b[2i] + b[2i-1]` in {-2, -1, 0, +1, +2}, so that
`a·b = Σ d_i·a·4^i`.

`booth_encoder` turns a group into three selection signals (`booth_sel_t`):

* `one` (|d| = 1): `b[2i] ^ b[2i-1]`
* `two` (|d| = 2): `(b[2i+1] ^ b[2i]) & ~one`
* `neg` (d < 0): `b[2i+1] & ~(b[2i] & b[2i-1])`

The extra term in `neg` makes group `111` produce a clean zero row.

`booth_ppgen` is the decoder. Each bit of a 9-bit row is an AND-OR of
`one & (a[j]^neg)` and `two & (a[j-1]^neg)`, which gives the one's
complement of ±a or ±2a. The row is sign-extended to 16 bits and `neg` is
added at bit 0. Each partial product therefore leaves the generator as a
**complete 16-bit two's complement word** `d_i·a`, not yet shifted. No
separate negation bits enter the reduction tree.

Example: `a = -78`, `b = 99` gives digits −1, +1, −2, +2. The partial
products are 78, −78, 156 and −156.

## Truncation and the compensation bit (`error_comp`)

This is the part that makes the multiplier approximate. After shifting row
`i` by `2i`, product column `j` holds the bit `pp[i][j-2i]` of every row
that reaches it. With `W = 4`, columns 0–3 contain `pp1[3:0]` and
`pp2[1:0]`, which are never added. On its own that would lose both the low
four bits and the carry those columns send into column 4.

Computing that carry exactly needs a 2-bit adder across the truncated
columns:

    carry = pp1[3]&pp2[1] | (pp1[3]^pp2[1]) & pp1[2] & pp2[0]

`error_comp` instead uses only the most significant truncated column:

    comp = OR of the bits in column W-1        (W = 4: pp1[3] | pp2[1])

In Karnaugh-map terms, this sets the cells where exactly one of `pp1[3]`
and `pp2[1]` is 1. There, `comp` adds 2^W even when the exact carry is 0.
On average that cancels much of the downward bias from throwing away the
low columns, and the circuit is a single OR gate.

Results over all 65 536 operand pairs at `W = 4`:

| compensation | MRED |
|--------------|------|
| this OR (as built) | 0.74 % |
| exact carry | 1.29 % |
| AND of the top pair only | 1.44 % |

`comp` is 1 for 39 936 of the pairs. The error is `comp·2^W` minus the
value of the discarded bits. At `W = 4` it always lies between −11 and +8.

The Karnaugh-map idea comes from the source design, but this particular
map is this design's own choice. A different map can be dropped into
`error_comp` without touching anything else.

## Compressor chain (`pp_reduction`, `compressor_5_2`, `compressor_4_2`)

Columns `W..15` are reduced by one compressor per column:

| column | cell | inputs |
|--------|------|--------|
| `W` (4) | 5:2 | the column's pp bits (three for W=4) and `comp` as I4; `cin1 = cin2 = 0` |
| `W+1` (5) | 4:2 | the column's three pp bits; `cout2` of the 5:2 as `x4`; `cout1` of the 5:2 as `cin` |
| `W+2 .. 15` | 4:2 | four pp bits, `cin` = `cout` of the column below |

Each cell's `sum` goes to `sum_row[j]` and its `carry` to `carry_row[j+1]`.
Carries out of bit 15 are dropped, which is correct modulo 2^16 because
every partial product is fully sign-extended. The placement needs column
`W+1` to hold at most three pp bits, hence `W ≤ 4`, which is checked at
elaboration.

**4:2 compressor (exact).** Two chained full adders. The first adds
`x1, x2, x3` and produces `cout`. The second adds the first adder's sum,
`x4` and `cin`, and produces `sum` and `carry`. The identity is
`x1+x2+x3+x4+cin = sum + 2·(carry + cout)`. Because `cout` does not depend
on `cin`, the horizontal chain ripples through at most one cell.

**5:2 compressor (exact, two horizontal carries).** The identity is
`I1+…+I5+cin1+cin2 = sum + 2·(carry + cout1 + cout2)`. Neither `cout1` nor
`cout2` depends on the carry-ins:

* `cout1 = majority(I1, I2, I3)`
* `cout2 = I4` if `I4 == I5`, otherwise `I1^I2^I3`
* `sum` = XOR of all seven inputs
* `carry = (cin1 & cin2) | ((cin1 ^ cin2) & (X ^ B))`, where
  `X = I1^I2^I3` and `B = I4^I5`

`carry` is built as two multiplexers. The first passes 0 or `X^B`,
selected by `cin1^cin2`. The second forces a 1 when both carry-ins are
set. This cell is exhaustively verified against the identity.

**Final adder.** `vector_merge_adder` is a 16-bit ripple-carry adder of
`sum_row` and `carry_row`.

## How far it can be trusted

* Every block has an exhaustive or randomized self-checking testbench, and
  all pass. Each testbench was also confirmed to fail on a deliberately
  broken copy of its block.
* `tb_tabm_mul` runs the default configuration on all 65 536 operand pairs.
  Its reference is built independently with integer arithmetic: the exact
  product, minus the value of the bits in the discarded columns, plus the
  compensation bit. It also checks two worked examples, `-78·99 → -7728`
  (exact −7722) and `54·83 → 4480` (exact 4482), together with their
  partial product words. It counts that both values of `comp`, every Booth
  digit, the 5:2 `cout2`, and both exact and inexact results all occur.
* `tb_tabm_mul_exact` checks that `W = 0` is exact for all 65 536 pairs.
  It also checks the partial products of `-106·53`, `43·73`, `-103·53`,
  `89·39` and `-1·-1`.
* The compressor equations, the Booth recoding and the four-stage structure
  are standard and fully verified. Three choices are this design's own, and
  they decide the accuracy and structure:
  * the compensation function;
  * where the 5:2 cell sits;
  * that carries go to a separate carry row instead of into the
    neighbouring compressor.
* The MRED of 0.74 % at `W = 4` is higher than the 0.01–0.19 % range quoted
  for this family of multipliers. That range is given without operand width
  or truncation factor, so it does not pin down this configuration.
* No timing, area or power figures come with this RTL. Gate-level
  transistor cells (6-transistor XOR/XNOR, AO22) are represented only by
  their logic function. A 6:3 counter is mentioned for this family but has
  no defined place in the datapath and is not included.

## Files

| file | contents |
|------|----------|
| `rtl/tabm_pkg.sv` | widths `N`, `NPP`, `PW`; `booth_sel_t` |
| `rtl/booth_encoder.sv` | radix-4 Booth encoder |
| `rtl/booth_ppgen.sv` | partial product generator (encoder + decoder row + negation) |
| `rtl/full_adder.sv` | full adder |
| `rtl/compressor_4_2.sv` | exact 4:2 compressor |
| `rtl/compressor_5_2.sv` | 5:2 compressor with two horizontal carries |
| `rtl/error_comp.sv` | compensation bit |
| `rtl/pp_reduction.sv` | truncation + compressor chain |
| `rtl/vector_merge_adder.sv` | final ripple-carry adder |
| `rtl/tabm_mul.sv` | top level |
| `tb/tb_<block>.sv` | one self-checking testbench per block; `tb_tabm_mul_exact.sv` for `W = 0` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and then
finishes. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tabm_pkg.sv \
          tb/tb_tabm_mul.sv --top-module tb_tabm_mul -Mdir obj -o sim
./obj/sim
```

Replace `tb_tabm_mul` with any other testbench name. The package file must
come first on the command line; the other files are found through `-I`.
Each run takes well under a second.

To try another truncation factor, instantiate `tabm_mul #(.W(k))` with `k`
from 0 to 4. The reference in `tb_tabm_mul` follows its local `WT`
constant, so set that to the same value.

# Reversible-logic single precision floating point multiplier

This is a combinational IEEE 754 binary32 multiplier. Every bit of its
arithmetic is built from one reversible gate, the 3x3 **Peres gate**. A
reversible gate maps its inputs one to one onto its outputs, so no information
is erased. That is the property that makes reversible logic of interest for
low-power, quantum and optical computing. The multiplier does not round or
normalise: it returns the exact 48-bit significand product with its exponent,
so that a following multiply-and-accumulate stage loses no precision.

## The Peres gate and the cells built from it

The Peres gate has inputs A, B, C and outputs

    P = A
    Q = A xor B
    R = (A and B) xor C

With C = 0 the gate gives an XOR on Q and an AND on R. Outputs that a cell does
not need are *garbage outputs*. They exist only to keep the gate reversible,
and the RTL leaves them unconnected (lint reports them as unused signals, and
that is expected).

| cell | gates | wiring |
|---|---|---|
| `rev_half_adder` | 1 | (a, b, 0): Q is the sum, R is the carry |
| `rev_full_adder` | 2 | gate 1 (a, b, 0) gives t = a^b and g = ab; gate 2 (t, ci, g) gives the sum a^b^ci on Q and the carry (a^b)ci ^ ab on R |
| `sign_unit` | 1 | (sx, sy, 0): Q = sx xor sy is the product sign |
| partial product | 1 | (x_i, y_j, 0): R = x_i·y_j |

The carry of the full adder, (a^b)·ci ^ ab, is the usual majority
function ab + a·ci + b·ci: the two terms can never both be 1.

## Datapath

```
 x[31:0] ─┬─ sign ──────────────┐
          ├─ exp[7:0] ──┐       │
          └─ frac[22:0] │ ┐     │
 y[31:0] ─┬─ sign ──────┼─┼─────┤ sign_unit (1 Peres gate) ─────────────► product[63]
          ├─ exp[7:0] ──┤ │     │
          └─ frac[22:0] │ │
                        ▼ │
        exponent_unit: 8-bit reversible ripple carry adder
                       sum1 = {cout, sum} = Ex + Ey   (9 bits)
                       exp_out = sum1 - 127           ─────────────────► product[55:48]
                          │
                          ▼
        rev_mult24x24: {1,frac_x} × {1,frac_y}
                       3 bytes × 3 bytes → nine rev_mult8x8
                       summed with 48-bit reversible adders ──────────► product[47:0]
```

The three parts are independent: there is no feedback from the significand
product to the exponent.

### Exponent path

`rev_rca` is a ripple carry adder with a half adder at bit 0 and full adders
above it. Each stage's carry goes to the next. At its default width of 8 it
adds the two biased exponents. Its carry out and sum form the 9-bit value
`sum1 = Ex + Ey`. The bias is then removed with an ordinary `-` operator rather
than a reversible subtractor, which keeps the circuit small.
`exp_out` is 10-bit two's complement (range −127…383), so that results outside
the 8-bit field stay visible to the flag logic.

### Significand path

Each 23-bit fraction gets its hidden 1, which gives two 24-bit significands.
`rev_mult24x24` cuts each significand into three bytes: part 1 is bits 7:0 and
part 3 is bits 23:16. It forms the nine byte products with `rev_mult8x8`. Each
16-bit byte product is shifted to its weight 2^(8(i+j)). The nine shifted
products are summed one after another in a chain of eight 48-bit `rev_rca`
adders.

`rev_mult8x8` generates its 64 partial products x_i·y_j with 64 Peres gates,
PG0…PG63. Gate 8j+i handles x_i and y_j. It then adds the rows one at a time:

- The y_0 row is the starting value. Its bit 0 is product bit 0.
- For each following row j, an 8-bit `rev_rca` adds the row to the running
  upper 8 bits. The bit 0 of the sum becomes product bit j. The carry and the
  sum's bits 7:1 become the new running part.
- After row 7, the running part is product bits 15:8.

## Result format

```
product[63]     sign
product[62:56]  0
product[55:48]  exp_out[7:0]      (Ex + Ey - 127, unnormalised)
product[47:0]   significand product, binary point between bits 46 and 45
value = (-1)^sign * 2^(exp_out - 127) * product[47:0] / 2^46
```

The significand product lies in [1, 4). When bit 47 is set, a normalised result
would need a right shift by one and `exp_out + 1`. This design leaves that step,
and rounding, to the consumer. Rounding by truncation would just mean keeping
the upper 24 bits after that shift.

Worked example: x = y = `0x41530000` (13.1875). The exponents are 130 and 130,
which gives sum = 4, cout = 1, sum1 = 260 and exp_out = 133. The significands
are 0xD30000, whose product is 0xADE900000000. The result is
`product = 0x0085ADE900000000`, which reads back as 173.91015625 = 13.1875².

### Overflow and underflow

`overflow` and `underflow` are derived from the normalised exponent
`exp_out + product[47]`:

- `overflow` is set when that exponent is 255 or more.
- `underflow` is set when that exponent is 0 or less.

In either case the 8-bit exponent field of `product` is not meaningful (it
holds `exp_out` modulo 256).

## Where this RTL departs from, or adds to, the original design

- **No clock.** The original design was described in one place as pipelined.
  Its interface (x, y and product only) and its simulation show a
  combinational block, and that is what is built here. Pipeline registers
  could be added between the three stages without other changes.
- **Overflow and underflow flags** are this design's own outputs. The original
  only states that such handling can be added. They make the top 130 I/O bits
  wide instead of 128.
- **No special operands.** Zero, subnormal, infinity and NaN inputs are not
  detected. The hidden 1 is always inserted, so 0.0 × y returns a nonzero
  product.
- **Summation structure.** The original specifies the partial-product gates and
  the split into nine 8x8 multipliers. It does not say how the rows of an 8x8
  multiplier, or the nine 8x8 products, are added. The row-ripple array and
  the chain of 48-bit ripple adders are this design's choices. Both use only the
  Peres-gate half and full adders.
- **Gate library.** NOT and Feynman (controlled-NOT) gates belong to the same
  family of reversible gates, but this multiplier uses only Peres gates, so
  neither is provided.
- **Reversibility in name only.** The RTL describes the logic function of each
  reversible gate. Synthesised to CMOS or an FPGA it is ordinary irreversible
  logic. The gate structure is kept so that gate, garbage-output and
  quantum-cost counts can be read off the netlist. A Peres gate has quantum
  cost 4. The full adder uses 2 gates and the 8x8 multiplier uses
  64 + 7·(1 + 7·2) = 169 gates.

## Files

| file | content |
|---|---|
| `rtl/rsp_fpm_pkg.sv` | widths, bias, `fp32_t` and `product_t` structs |
| `rtl/peres_gate.sv` | Peres gate |
| `rtl/rev_half_adder.sv`, `rtl/rev_full_adder.sv` | 1- and 2-gate adders |
| `rtl/rev_rca.sv` | parameterised ripple carry adder (`WIDTH`, default 8) |
| `rtl/exponent_unit.sv` | exponent add and bias removal |
| `rtl/sign_unit.sv` | sign XOR |
| `rtl/rev_mult8x8.sv` | 8x8 multiplier |
| `rtl/rev_mult24x24.sv` | 24x24 multiplier from nine 8x8 multipliers |
| `rtl/rsp_fpm.sv` | top: ports `x`, `y`, `product`, `overflow`, `underflow` |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the module against a reference computed in the
testbench itself and prints `TB_RESULT checks=N failures=M`.

- The gates, adders and sign unit are checked exhaustively.
- `rev_rca` (8 bit) and `exponent_unit` are checked on all 65 536 operand pairs.
  `rev_rca` is also checked on random 48-bit operands.
- `rev_mult8x8` is checked on all 65 536 operand pairs.
- `rev_mult24x24` is checked on corner values and on 20 000 random pairs.
- `rsp_fpm_tb` runs the worked example and a few fixed cases, then 20 000
  random operand pairs. Half of those pairs have exponents near the bias, so
  that most results are in range.
  - It checks every output field by formula.
  - It checks every in-range result by value against a double-precision
    product. That product is exact for 24-bit significands.
  - It counts negative results, significand products below and at or above 2,
    overflows and underflows. It fails if any of these never occurs.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/rsp_fpm_pkg.sv tb/rsp_fpm_tb.sv --top-module rsp_fpm_tb
./obj_dir/Vrsp_fpm_tb
```

Every testbench finishes in well under a second.

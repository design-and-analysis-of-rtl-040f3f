# Divide-and-conquer binary squarer with selectable adders

A squarer computes `a*a`. Since both operands are the same number, it needs
much less hardware than a general multiplier. Split an N-bit input into a
high half `ah` and a low half `al`, each H = N/2 bits wide:

    a*a = ah^2 * 2^N  +  2 * (ah*al) * 2^H  +  al^2

The two squares of the halves are smaller squarers of the same kind. The
cross product `ah*al` appears twice, so it is computed once and shifted left
by one bit, not added twice. What remains is a single N-bit addition and an
increment of the top H bits. Applied recursively, this gives a 4-bit squarer
built from 2-bit squarers, an 8-bit squarer built from 4-bit squarers, and a
16-bit squarer built from 8-bit squarers.

The one N-bit adder in each stage can be built in five ways: ripple carry,
carry look-ahead, carry skip, carry select or carry increment. A parameter
selects the structure. Carry look-ahead is the default.

All of the RTL is purely combinational. There is no clock and no reset.

## Hierarchy

```
squarer16                    16-bit in, 32-bit out  (top)
├── squarer8  x2             a[15:8]^2, a[7:0]^2
│   ├── squarer4  x2
│   │   ├── squarer2  x2     inverter + two AND gates
│   │   ├── mult2            2x2 multiplier: 4 AND gates, 2 half adders
│   │   └── square_combine   middle adder + carry merge
│   ├── vedic_mult4          4x4 cross product a[7:4]*a[3:0]
│   └── square_combine
├── vedic_mult8              8x8 cross product a[15:8]*a[7:0]
│   ├── vedic_mult4  x4
│   ├── csa  (W=8)
│   └── or_ibo (W=4)
└── square_combine (H=8)
    ├── par_adder (W=16) -> rca_adder | cla_adder | cska_adder | csel_adder | cia_adder
    └── or_ibo (W=8) -> ibo
```

`squarer_pkg` defines `adder_e`, the adder selector. `half_adder` and
`full_adder` are the leaf cells.

## The combining stage (`square_combine`)

This stage holds all the arithmetic that is not in a smaller squarer or
multiplier. For a 2H-bit input it receives three partial results, each 2H
bits wide:

| signal | value    | weight in `a*a` |
|--------|----------|-----------------|
| `i0`   | `al*al`  | 1               |
| `i1`   | `ah*al`  | 2 * 2^H         |
| `i2`   | `ah*ah`  | 2^(2H)          |

The stage builds the result in three parts:

- **Bits `m[H-1:0]`** are `i0[H-1:0]`. Nothing else reaches these bits.
- **Bits `m[3H-1:H]`** come from one 2H-bit adder with carry-in 0:
  - first operand: `{i2[H-1:0], i0[2H-1:H]}`;
  - second operand: `{i1[2H-2:0], 1'b0}`, the cross product shifted left by one bit.
- **Bits `m[4H-1:3H]`** are `i2[2H-1:H]` plus two carries that have the same weight:
  - the adder's carry out;
  - `i1[2H-1]`, the bit that the shift pushed out of the adder.

### The carry merge (`or_ibo`)

The classic form of this circuit merges the two carries with an OR gate. The
OR output drives an increment-by-one circuit (IBO), a chain of half adders,
on the top H bits. The OR gate is right only if the two carries are never 1
at the same time:

| stage                       | inputs where both carries are 1 |
|-----------------------------|---------------------------------|
| 4-bit squarer               | none                            |
| 4x4 Vedic multiplier        | none                            |
| 8-bit squarer               | a = 222 and a = 223             |
| 8x8 Vedic multiplier        | 248 of 65536 operand pairs      |
| 16-bit squarer (top merge)  | 2358 of 65536 inputs            |

For those inputs, the bare OR form returns `a*a - 2^(3H)`. For example, it
returns 45188 for 222² instead of 49284.

`or_ibo` therefore has a parameter `EXACT`:

- **`EXACT = 0`**: only the OR gate and one IBO.
- **`EXACT = 1`**: also an AND gate of the two carries, driving a second IBO.
  This is exact because `c0 + c1 = (c0 | c1) + (c0 & c1)`.

The defaults follow the table:

- `squarer4` and `vedic_mult4` default to `EXACT = 0`. The bare form is already exact there.
- `squarer8`, `vedic_mult8` and `squarer16` default to `EXACT = 1`.

The correction is this design's own addition to the classic structure. With
`EXACT = 0` you get the classic structure exactly, including its wrong
results at 8 and 16 bits. The IBO's carry out of the top bit is dropped,
because the square always fits in 2N bits.

## Vedic multiplier (`vedic_mult4`, `vedic_mult8`)

This multiplier computes the cross product `ah*al`. It uses the
"vertical and crosswise" split on both operands. Four half-width multipliers
form these products:

- `i0 = b_lo*a_lo`
- `i1 = b_lo*a_hi`
- `i2 = b_hi*a_lo`
- `i3 = b_hi*a_hi`

The result is assembled as follows:

- `m[H-1:0]` is `i0[H-1:0]`.
- A three-operand carry-save adder (`csa`) adds `i1`, `i2` and
  `{i3[H-1:0], i0[2H-1:H]}`. Its sum gives the middle bits.
- The CSA produces two carries of weight 2^(2H):
  - the carry of the top carry-save cell;
  - the carry of the ripple adder that merges the sum and carry vectors.
- These two carries go through the same `or_ibo` merge onto `i3[2H-1:H]`.

`vedic_mult4` uses `mult2` as its half-width multiplier. `vedic_mult8` uses
four `vedic_mult4`. This 8x8 version exists only because the 16-bit squarer
needs an 8x8 cross product.

## 2-bit building blocks

- **`mult2`**: four partial products, `m[0] = x0y0`.
  - Half adder 1 adds `x1y0 + x0y1` and gives `m[1]`.
  - Half adder 2 adds `x1y1` and the carry of half adder 1, and gives `m[2]` and `m[3]`.
- **`squarer2`**: squaring 2 bits reduces to `s = {x1&x0, x1&~x0, 0, x0}`.
  - `MODIFIED = 1` (default): one inverter and two AND gates.
  - `MODIFIED = 0`: an AND gate and a half adder. It gives the same function.

## Adder structures

All five have the same ports, `a`, `b`, `cin` → `sum`, `cout`, and they give
the same results. They differ only in delay and area. `par_adder` picks one
with `TYPE`.

| `TYPE`     | module       | structure |
|------------|--------------|-----------|
| `ADD_RCA`  | `rca_adder`  | chain of full adders (`p=a^b`, `s=p^c`, `c'=ab + pc`) |
| `ADD_CLA`  | `cla_adder`  | sum-of-products look-ahead carries inside 4-bit groups (`GRP`); the carry ripples between groups |
| `ADD_CSKA` | `cska_adder` | ripple blocks of `BLK` bits; if every bit of a block propagates, a multiplexer passes the block's carry-in straight out |
| `ADD_CSEL` | `csel_adder` | each upper block has two ripple adders (carry-in 0 and carry-in 1); a multiplexer picks one using the lower block's carry |
| `ADD_CIA`  | `cia_adder`  | blocks add with carry-in 0, all at once; then a half-adder incrementer adds the lower block's carry |

`par_adder` sets the block size: 4 bits, or 2 bits when the adder is 4 bits
wide or less. This way even the 4-bit middle adder has two blocks to skip,
select or increment across. The group and block sizes are this design's own
choice. The `TYPE` of a squarer is passed down to the squarers inside it.

The carry-save adder's merging adder is always ripple carry. `TYPE` affects
only the squarers' middle adders.

## Parameters and ports

| module        | ports                    | parameters (default) |
|---------------|--------------------------|----------------------|
| `squarer16`   | `a[15:0]` → `m[31:0]`    | `TYPE` (`ADD_CLA`), `EXACT` (1) |
| `squarer8`    | `a[7:0]` → `m[15:0]`     | `TYPE` (`ADD_CLA`), `EXACT` (1) |
| `squarer4`    | `a[3:0]` → `m[7:0]`      | `TYPE` (`ADD_CLA`), `EXACT` (0) |
| `vedic_mult8` | `a[7:0]`, `b[7:0]` → `m[15:0]` | `EXACT` (1) |
| `vedic_mult4` | `a[3:0]`, `b[3:0]` → `m[7:0]`  | `EXACT` (0) |

Bit 1 of a square is always 0. The `m[1]` output of every squarer is
therefore a constant 0, and synthesis removes the logic behind it.

## Where this departs from the classic description

- **Exact carry merge.** `EXACT = 1` is the default at 8 and 16 bits. Set
  `EXACT = 0` to get the OR-only circuit.
- **16-bit squarer.** Only the 4-bit and 8-bit stages exist as detailed
  block diagrams. The 16-bit stage and its 8x8 Vedic multiplier repeat the
  8-bit pattern with every width doubled.
- **Carry look-ahead sum.** The sum is `p XOR c`. The look-ahead is split
  into 4-bit groups.
- **Choices of this design.** The following are not given by the classic
  description:
  - block sizes of the skip, select and increment adders;
  - the carry-save adder's internals: a full-adder row plus a ripple merge;
  - selecting the adder type by parameter.
- **Not reproduced.** The FPGA delay, slice and LUT figures that motivate
  the choice of adder came from a vendor tool flow. Nothing here reproduces them.

## Testbenches

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from plain integer arithmetic (`a*a`, `a+b+cin`), not from the RTL's structure.

- `tb_squarer16`: end-to-end test of the top.
  - Runs all 65536 inputs on five instances, one per adder type.
  - Uses an arithmetic model of the partial products to count how often each
    mechanism fires: the top OR increment, the top correction, the
    correction inside the 8-bit squarers, and the correction inside the 8x8
    multiplier.
  - Fails if any mechanism never fires.
- `tb_squarer16_full`: the top with default parameters.
  - All inputs, plus 12 → 144, 128 → 16384 and 65535 → 4294836225.
- `tb_squarer8`, `tb_squarer4`:
  - Exhaustive on all five adder types.
  - `tb_squarer8` also checks that the bare OR form is wrong for exactly
    a = 222 and a = 223, and by exactly 2^12.
- `tb_vedic_mult8`:
  - Exhaustive.
  - Checks that the bare form is wrong exactly where the model predicts.
- The other testbenches cover the remaining blocks: the adders, `csa`,
  `ibo`, `or_ibo`, `mult2` and `squarer2`. Each uses exhaustive or random
  vectors.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/squarer_pkg.sv tb/tb_squarer16.sv --top-module tb_squarer16 -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

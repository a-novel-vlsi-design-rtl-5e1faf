# Vedic multiplier with carry-save, Kogge-Stone and carry-select adders

An unsigned 8 x 8 -> 16-bit combinational multiplier. The partial products
come from the Urdhva Tiryakbhyam ("vertically and crosswise") rule of Vedic
arithmetic: each operand is cut in half, the four half-by-half products are
formed in parallel, and the only real work left is adding them at the right
offsets. This design adds them with three fast adders chained so that as
little as possible waits on a long carry:

1. a **carry save adder** squeezes three overlapping partial products into a
   sum and a carry vector without propagating any carry;
2. a **Kogge-Stone** parallel-prefix adder resolves those two vectors;
3. a **carry-select** stage adds the Kogge-Stone carry to the top partial
   product bits, which otherwise pass straight through a multiplexer.

The same structure, with 8 x 8 sub-multipliers, gives a 16 x 16 -> 32-bit
multiplier; the top module covers both through its `WIDTH` parameter.

## Module hierarchy

```
vedic_multiplier (WIDTH=8)
 +- 4 x vedic_mul4x4            half-width sub-products p0..p3
 |    +- 4 x vedic_mul2x2       (4 AND gates, 2 half_adder)
 |    +- 3 x ripple_adder       (Adder1, Adder2, Adder3; full_adder chain)
 +- carry_save_adder (W=8)      (row of full_adder)
 +- kogge_stone_adder (W=8)
 +- carry_select_adder (W=3)    (half_adder chain + 2:1 muxes)
```

With `WIDTH=16` the four sub-multipliers are `vedic_multiplier #(.WIDTH(8))`
instances, and the adders become 16, 16 and 7 bits wide. Any power of two
from 8 upward elaborates the same way.

All modules are purely combinational: no clock, no reset, no handshake. The
product is valid one combinational delay after the operands change.

## The 2x2 block

For X = X1X0 and Y = Y1Y0:

| bit | formed from |
|-----|-------------|
| P0  | X0·Y0 (vertical) |
| P1  | sum of half adder 1 on X0·Y1 and X1·Y0 (crosswise) |
| P2  | sum of half adder 2 on X1·Y1 and the carry of half adder 1 |
| P3  | carry of half adder 2 |

## The 4x4 block

Split X into XH = X[3:2], XL = X[1:0] and Y likewise. Four 2x2 blocks give

    p0 = XL·YL    p1 = XH·YL    p2 = XL·YH    p3 = XH·YH     (4 bits each)

P[1:0] is p0[1:0] unchanged. The rest uses three ripple-carry adders:

| adder  | width | operands                    | result   |
|--------|-------|-----------------------------|----------|
| Adder1 | 6     | {p3, 00} + {00, p2}         | S2[5:0]  |
| Adder2 | 4     | p1 + {00, p0[3:2]}          | S1[3:0]  |
| Adder3 | 6     | S2 + {00, S1}               | P[7:2]   |

Adder1 and Adder2 work in parallel. None of the three can overflow for 4-bit
operands; their carry outs are unused, and an assertion says so.

## Adding the four sub-products: the core of the design

With H = WIDTH/2, the sub-products are 2H bits wide and the product is

    P = p0 + (p1 + p2)·2^H + p3·2^(2H)

Seen from bit H upward, three operands overlap fully over 2H bits: p1, p2,
and the word A = {p3[H-1:0], p0[2H-1:H]} made of p0's upper half and p3's
lower half. Only p3's upper half, p3[2H-1:H], sticks out above them. The
stages follow from that:

| stage | input | output |
|-------|-------|--------|
| none | p0[H-1:0] | P[H-1:0] |
| carry save | A, p2, p1 | S[2H-1:0], C[2H-1:0] with A + p1 + p2 = S + 2C |
| none | S[0] | P[H] |
| Kogge-Stone | C, {p3[H], S[2H-1:1]} | P[3H:H+1], carry out Cin |
| carry-select | p3[2H-1:H+1], Cin | P[4H-1:3H+1], carry out dropped |

Why the Kogge-Stone operands look odd: S + 2C shifted right by one bit is
S[2H-1:1] + C, both aligned at product bit H+1. In that frame, product bit 3H
falls at position 2H-1, which S[2H-1:1] leaves empty. So p3's lowest
protruding bit, p3[H], fills that position for free, and the remaining
p3[2H-1:H+1] start exactly where the Kogge-Stone carry out lands.

Concrete slices:

| WIDTH | P from p0 | P = S[0] | Kogge-Stone | carry-select |
|-------|-----------|----------|-------------|--------------|
| 8     | P[3:0]    | P[4]     | P[12:5]     | P[15:13] from p3[7:5] |
| 16    | P[7:0]    | P[8]     | P[24:9]     | P[31:25] from p3[15:9] |

### Carry-select stage

Per bit, one half adder and one 2:1 multiplexer. The half adders form a
ripple incrementer fed by Cin. When Cin = 0 the multiplexers pass the p3 bits
through unchanged, so the incrementer's result is not used. When Cin = 1 they
take the incremented value. A further multiplexer gives Cout, the last
half-adder carry when Cin = 1 and 0 otherwise. The full product always fits in
2·WIDTH bits, so Cout is always 0 and the multiplier leaves it unconnected; an
assertion in `vedic_multiplier` checks this.

### Kogge-Stone adder

The textbook radix-2 form: bit generate/propagate (g = a&b, p = a^b) merged
over ceil(log2 W) levels with spans 1, 2, 4, ..., every bit at every level.
After the last level the group generate of bit i is the carry out of bit i, so
sum[i] = p[i] ^ G[i-1] and the carry out is G[W-1]. It has no carry input.
The last level skips the group propagate, which nothing reads.

## Where this design makes its own choices

The block diagrams fix the partitioning, operand slices and stage order. These
points are this implementation's own:

- **Adder types inside the 4x4 block.** They are only described as regular
  adders. Ripple-carry full-adder chains are used.
- **Internals of the carry save and Kogge-Stone adders.** They are given by
  name only. Both use their standard forms, described above.
- **Carry-select incrementer.** The first half adder's carry input is Cin
  itself, and the Cout multiplexer's 0 input is a constant 0.
- **Half adders in the 2x2 block.** Both use an XOR for the sum and an AND for
  the carry.
- **Signedness.** Operands are unsigned.
- **Widths beyond 8.** The 16-bit form reuses the 8-bit multiplier as its
  sub-block. The top module instantiates itself at half width; `WIDTH` must
  be a power of two, at least 8.

Not included:

- the Booth multiplier and the Brent-Kung-based Vedic multiplier the
  design is compared against;
- any timing, power or FPGA-resource claims. The design was characterised
  on a Xilinx FPGA flow at about 15 ns, 56 mW and 31 four-input LUTs for the
  8-bit Kogge-Stone version. None of that is reproduced or checked here.

## Files

`rtl/`:

| file | module |
|------|--------|
| `vedic_multiplier.sv` | top, parameter `WIDTH` (default 8): ports `x`, `y` [WIDTH], `p` [2·WIDTH] |
| `vedic_mul4x4.sv` | 4x4 Vedic block |
| `vedic_mul2x2.sv` | 2x2 Vedic block |
| `ripple_adder.sv` | `W`-bit ripple adder with carry in/out |
| `carry_save_adder.sv` | `W`-bit 3:2 carry save adder |
| `kogge_stone_adder.sv` | `W`-bit Kogge-Stone adder, W >= 2 |
| `carry_select_adder.sv` | `W`-bit carry-select incrementer |
| `full_adder.sv`, `half_adder.sv` | one-bit cells |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_vedic_multiplier16.sv` for the 16-bit form. Each prints
`TB_RESULT checks=N failures=M` at the end and has a time-out that counts as
a failure.

## Verification

| testbench | what it covers |
|-----------|----------------|
| `tb_vedic_multiplier` | All 65,536 operand pairs of the default 8-bit multiplier, checked against `x*y`. Also counts how often the carry-select stage passes p3 through (Cin = 0, 53,783 pairs) and increments it (Cin = 1, 11,753 pairs); Cin is derived from the reference product, not read from the design. Each case must occur. |
| `tb_vedic_multiplier16` | `WIDTH=16`: corner operands plus 200,000 random pairs, with the same two carry-select counts. |
| `tb_vedic_mul4x4`, `tb_vedic_mul2x2` | Exhaustive. |
| `tb_kogge_stone_adder` | Exhaustive at 8 bits; corner and random operands at 16 bits. |
| `tb_carry_select_adder` | Exhaustive at 3 and 7 bits, both values of Cin. |
| `tb_ripple_adder` | Exhaustive at 6 bits, with carry in. |
| `tb_carry_save_adder` | Random and corner operands at 8 bits; checks S = a^b^c and S + 2C = a + b + c. |

Each testbench was also run against a deliberately broken copy of its module
and reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_vedic_multiplier \
    tb/tb_vedic_multiplier.sv
./obj_dir/Vtb_vedic_multiplier
```

Substitute any other testbench name. Each run takes well under a second. To
lint a module on its own:

```
verilator --lint-only -Wall -Irtl rtl/vedic_multiplier.sv
verilator --lint-only -Wall -Irtl -GWIDTH=16 rtl/vedic_multiplier.sv
```

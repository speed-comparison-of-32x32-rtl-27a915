# 32x32 Vedic multiplier (Urdhva Tiryakbhyam, hierarchical)

This is an unsigned 32-bit by 32-bit combinational multiplier built on the
*Urdhva Tiryakbhyam* ("vertically and crosswise") sutra of Vedic mathematics.
A conventional array multiplier shifts and adds N partial-product rows. This
one splits each operand into halves and forms all the vertical and crosswise
sub-products at once. It repeats that split until the pieces are 2 bits wide.
The result is a regular tree of small multipliers:

```
vedic_32x32                      (top: a[31:0], b[31:0] -> q[63:0])
 ├─ 4 x vedic_16x16
 │    ├─ 4 x vedic_8x8
 │    │    ├─ 4 x vedic_4x4
 │    │    │    ├─ 4 x vedic_2x2        (leaf cell: 4 AND gates, 2 half adders)
 │    │    │    └─ vedic_combine #(H=2)
 │    │    └─ vedic_combine #(H=4)
 │    └─ vedic_combine #(H=8)
 └─ vedic_combine #(H=16)        (each combiner holds 2 x carry_save_adder)
```

There are 256 leaf cells and 85 combiners. The design has no clock, no
registers and no reset: a product appears after one combinational delay.

## Vertically and crosswise

The decimal form of the method builds the product one column at a time. For
a column, you take the vertical digit product, or the sum of the crosswise
products, and add the carry from the column before. The low digit is the
result digit and the rest carries on. For example, 325 x 738 takes five
steps and gives 239850.

In binary, with operands of two "digits" this becomes the leaf cell
`vedic_2x2`:

| column | terms                   | circuit                          |
|--------|-------------------------|----------------------------------|
| 0      | a0·b0 (vertical)        | AND → q[0]                       |
| 1      | a1·b0 + a0·b1 (cross)   | half adder → q[1], carry c1      |
| 2      | a1·b1 + c1 (vertical)   | half adder → q[2], carry → q[3]  |

The same picture holds one level up if the "digits" are halves of the
operands. Take an N-bit operand split into H = N/2-bit halves, so
A = A_H·2^H + A_L, and B likewise. Then:

```
A·B = A_H·B_H · 2^(2H)                (vertical, high)
    + (A_H·B_L + A_L·B_H) · 2^H       (crosswise)
    + A_L·B_L                         (vertical, low)
```

Each level (`vedic_4x4`, `vedic_8x8`, `vedic_16x16`, `vedic_32x32`) creates
these four sub-products with four instances of the level below. All four
run in parallel. The level then passes them to `vedic_combine`.

## The combiner: where the bits go

`vedic_combine #(H)` is the only place where anything is added. It is also
the easiest part to get wrong. For the 32x32 level (H = 16) the routing is:

```
 A_H*B_H [31:0]   A_H*B_L [31:0]   A_L*B_H [31:0]   A_L*B_L [31:0]
      |                 \               /           [31:16]|  [15:0]
      |                  \             /      ______________/    |
      |                middle carry save adder  (3 operands)     |
      |                 mid[33:0]                                |
      |           mid[33:16] /      \ mid[15:0]                  |
 upper carry save adder (A_H*B_H + mid[33:16])     |             |
      | [31:0]                                     |             |
   q[63:32]                                     q[31:16]      q[15:0]
```

* The low H bits of A_L·B_L have nothing to add to them. They pass straight
  to q[H-1:0], so a quarter of the combiner's outputs are plain wires.
* The middle adder sums three 2H-bit values: the two crosswise products and
  the upper half of A_L·B_L. **That sum can be up to 2H+2 bits wide.** Its
  low H bits are final, q[2H-1:H]. Everything above them goes to the upper
  adder: the upper H bits and also the two carry bits, mid[2H+1:2H]. If only
  the upper H bits went on, the carries would be lost. Any product with large
  crosswise terms would then be wrong, for example FFFFFFFF x FFFFFFFF. The
  testbenches count how often these carry bits are non-zero. In the
  32x32 test they are set in about 57,000 of its 200,000 vectors.
* The upper adder adds A_H·B_H to that forwarded value, giving q[4H-1:2H].
  The full product fits in 4H bits, so this adder can never carry out. An
  immediate assertion in `vedic_combine` checks this.

`carry_save_adder #(W)` is a textbook three-operand adder. A row of W full
adders produces a sum vector (XOR) and a carry vector (majority), with no
carry propagation. A single carry-propagate addition, `sum + (carry << 1)`,
then gives the W+2-bit result. The upper adder uses the same module with its
third operand tied to zero, so the netlist has the same two-adder shape at
every level.

## Interfaces

All modules are combinational and all operands are unsigned.

| module             | parameters         | ports                                            |
|--------------------|--------------------|--------------------------------------------------|
| `vedic_32x32` (top)| none               | `a[31:0]`, `b[31:0]` in; `q[63:0]` out           |
| `vedic_16x16`      | none               | `a[15:0]`, `b[15:0]` in; `q[31:0]` out           |
| `vedic_8x8`        | none               | `a[7:0]`, `b[7:0]` in; `q[15:0]` out             |
| `vedic_4x4`        | none               | `a[3:0]`, `b[3:0]` in; `q[7:0]` out              |
| `vedic_2x2`        | none               | `a[1:0]`, `b[1:0]` in; `q[3:0]` out              |
| `vedic_combine`    | `H` = 16           | `p_hh`, `p_hl`, `p_lh`, `p_ll` [2H-1:0] in; `q[4H-1:0]` out |
| `carry_save_adder` | `W` = 16           | `x`, `y`, `z` [W-1:0] in; `s[W+1:0]` out         |

Each smaller level is a complete multiplier that can be used on its own.
Widths other than powers of two from 4 to 32 are not provided. To build a
64x64 multiplier, add a `vedic_64x64` that follows the same pattern as the
other levels (four `vedic_32x32` and `vedic_combine #(.H(32))`).

## What follows the original design and what is chosen here

Taken from the original design:
* the 2x2 → 4x4 → 8x8 → 16x16 → 32x32 hierarchy built from 2x2 cells;
* partial products added with carry save adders;
* the 32x32 arrangement of four 16x16 multipliers, a middle and an upper
  carry save adder, and the bit ranges each receives.

Chosen here:
* **Unsigned operands.** Signedness is never stated, but every example is
  unsigned.
* **No pipelining.** The design is characterised only by a propagation delay
  of about 31.5 ns on a Spartan-3E (xc3s500e-5) FPGA, so it is kept purely
  combinational. Registers would be added around `vedic_32x32` in a wrapper.
* **Forwarding the middle adder's two carry bits.** The original block
  diagram labels the link from the middle to the upper adder as the middle
  result's upper 16 bits only. That is not enough for a correct product, so
  bits 33..16 are forwarded.
* **Gate form of the 2x2 cell** and the **internals of the carry save
  adder** (a 3:2 row plus one adder written with `+`, which synthesis maps to
  its own adder structure).
* **The same combiner at every level.** The original shows it for the 32x32
  level only.

Not included:
* The board demonstration wrapper that showed the 64-bit product on an LCD.
  Its controller is not specified. Its displayed value, A0A0A09F5F5F5F60,
  equals FFFFFFFF x A0A0A0A0, and the top-level testbench checks that
  product.
* The Nikhilam-sutra multiplier (radix selection, exponent determination,
  complement multiplication). It is a separate technique that was only
  discussed alongside this one, and its sub-blocks are not specified.
* The Karatsuba-Ofman multiplier. It was the speed baseline this design was
  compared with, not part of the design.
* Timing. The published FPGA delays (15.4 ns for 8 bits, 22.6 ns for 16
  bits and 31.5 ns for 32 bits, against 31.0, 46.8 and 82.8 ns for Karatsuba)
  are FPGA results. RTL simulation does not reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the output
with the simulator's own multiplication or addition and ends with a
`TB_RESULT checks=N failures=M` line. A watchdog stops a run that hangs.

| testbench              | stimulus                                                         |
|------------------------|------------------------------------------------------------------|
| `tb_vedic_2x2`         | all 16 operand pairs; checks that the crosswise carry occurs     |
| `tb_carry_save_adder`  | W=3 exhaustive (512 triples); W=32 corners and 20,000 random     |
| `tb_vedic_combine`     | H=16, partial products of 50,000 random and corner operand pairs |
| `tb_vedic_4x4`, `tb_vedic_8x8` | exhaustive (256 and 65,536 pairs)                        |
| `tb_vedic_16x16`       | 64 corner pairs and 200,000 random                               |
| `tb_vedic_32x32`       | 64 corner pairs, 200,000 random, the display product, the decimal examples; all defaults |

The tests on the combiner and on every level also count the vectors in
which the middle adder's carry bits were non-zero. A test fails if that
never happened. All testbenches pass. Each one was also run against a
deliberately broken copy of its module, and each one failed: OR for XOR in
the 2x2 cell, the carry vector not shifted, the carry bits dropped in the
combiner, and a wrong half fed to one sub-multiplier.

To run one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl --top-module tb_vedic_32x32 \
          tb/tb_vedic_32x32.sv
./obj_dir/Vtb_vedic_32x32
```

The 32x32 test takes under a second. Lint any module with
`verilator --lint-only -Wall -y rtl rtl/vedic_32x32.sv`.

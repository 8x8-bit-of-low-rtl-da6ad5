# Two 8x8 low-power multipliers: radix-4 modified Booth and carry-save array

This RTL holds two independent 8-bit by 8-bit integer multipliers. They were
designed as alternatives for DSP and arithmetic datapaths where power, delay and
area all matter:

* **Radix-4 modified Booth (MBE) multiplier** (`mbe_multiplier`). The multiplier
  operand is recoded into radix-4 digits in {-2, -1, 0, +1, +2}. That roughly
  halves the number of partial products a shift-and-add multiplier needs. Each
  digit needs only a shift and/or a complement of the multiplicand. The rows are
  summed with carry look-ahead adders.
* **Array multiplier** (`array_multiplier`). This is an unsigned grid of AND gates
  feeding rows of half and full adders, with a ripple row at the bottom. It is
  regular and cheap, but its delay grows with the operand width.

`multipliers_top` places both side by side. Each keeps its own ports and they
share nothing. Both are purely combinational: no clock, no reset, no registers.
A product is valid one propagation delay after the operands change.

```
              +-------------------- mbe_multiplier ---------------------+
 x, tc ------>| booth_encoder x5 --sel--> booth_decoder x5 (MUX,XOR,HA) |
 a, tc ------>|                             |  10-bit rows              |
              |                      pp_sign_extend (own-MSB extension) |
              |                             |  16-bit aligned rows      |
              |          cla_adder -> cla_adder -> cla_adder -> cla_adder|--> p[15:0]
              +---------------------------------------------------------+

 a, b ------> array_multiplier: 64 AND, 8 HA, 48 FA ----------------------> p[15:0]
```

## Booth recoding

The multiplier `x` is widened to 10 bits, and a 0 is appended below its LSB. The
widening uses sign bits in signed mode (`tc = 1`) and zeros in unsigned mode
(`tc = 0`). Digit *i* looks at the three bits `{x[2i+1], x[2i], x[2i-1]}`.
`booth_encoder` turns them into three control wires, bundled as
`mult_pkg::booth_sel_t`:

| x(2i+1) x(2i) x(2i-1) | neg (MI) | one (X) | two (X2) | digit |
|:---:|:---:|:---:|:---:|:---:|
| 000 | 0 | 0 | 0 | 0 |
| 001 | 0 | 1 | 0 | +1 |
| 010 | 0 | 1 | 0 | +1 |
| 011 | 0 | 0 | 1 | +2 |
| 100 | 1 | 0 | 1 | -2 |
| 101 | 1 | 1 | 0 | -1 |
| 110 | 1 | 1 | 0 | -1 |
| 111 | 1 | 0 | 0 | -0 |

The gate network is `neg = x(2i+1)`, `one = x(2i) ^ x(2i-1)` and
`two = (x(2i+1) ^ x(2i)) & ~one`. The code 111 sets `neg` with neither multiple
selected. The decoder turns that into a zero row, as described in the next
section.

An 8-bit operand needs five digits (digits 0 to 4). In signed mode digit 4
always sees 000 or 111, so it adds nothing. In unsigned mode it is +1 whenever
`x[7]` is set. That one extra digit is what makes unsigned operands possible.
A signed-only 8x8 Booth multiplier needs just four.

## Partial-product generation and the negative rows

`booth_decoder` builds one row, `digit * a`, as a 10-bit two's complement
number. Before entering the row, the multiplicand `a` is widened by one bit in
the same way as `x`. Each bit is a `booth_decoder_cell`:

1. A multiplexer takes `a[j]` for a 1x digit, `a[j-1]` for a 2x digit (the
   shift), or 0.
2. An XOR with `neg` inverts the bit, giving the one's complement of the
   multiple.

A ripple chain of half adders then adds `neg` at bit 0, which completes the
two's complement inside the row. Nothing is left to add in the summation stage
for negative rows. For the -0 code the row is all ones plus one, which is zero.
The chain's carry out is dropped.

Ten bits are needed so that +2 x 255 = 510 fits in unsigned mode. For a
signed-only multiplier, 9 bits are enough (parameter `W` of `booth_decoder`).

## Sign extension

`pp_sign_extend` widens every row to the 16-bit product width. It repeats the
row's own top bit, which is the sign of the partial product, not the sign of the
multiplicand. It then shifts row *i* left by 2*i* places and cuts it to 16
bits. With the negation and sign already inside each row, the rows add modulo
2^16 with no correction constants. The block is pure wiring.

## Carry look-ahead summation

The five aligned rows go through a chain of four 16-bit adders. Each sum feeds
the next adder. Each adder (`cla_adder`) has two levels:

* four `cla4` groups, each forming `g = a & b`, `p = a ^ b` and `s = p ^ c`;
* a carry unit `cla_lookahead` that computes all four carries at once:

```
c1 = g0 + p0.cin
c2 = g1 + p1.g0 + p1.p0.cin
c3 = g2 + p2.g1 + p2.p1.g0 + p2.p1.p0.cin
c4 = g3 + p3.g2 + p3.p2.g1 + p3.p2.p1.g0 + p3.p2.p1.p0.cin
```

The same unit also produces a group generate and a group propagate. A second
copy uses those to deliver the carry into each 4-bit group, so the 16-bit adder
uses one circuit at two levels. If `W` is wider than 16, `cla_adder` chains
16-bit sections.

The original circuit builds these functions from NAND gates, and its full adder
is a 30-transistor cell built around 6-transistor XORs. Those are
transistor-level choices with no RTL counterpart. Only the logic is kept, and
the XOR cell is a module of its own (`xor_gate`) so that the gate structure
stays visible.

## Array multiplier

`array_multiplier` forms the 64 summands `a[j] & b[k]`. Row 1 adds summand
rows 0 and 1 with seven half adders. Rows 2 to 7 each add one more summand row
with seven full adders:

* sums move one place to the right;
* carries go straight down (carry-save);
* product bit *k* leaves the right end of row *k*.

A final row of one half adder and six full adders ripples the remaining sums
and carries into `p[15:8]`. That is N^2 AND gates, N(N-2) full adders and N
half adders. The longest path runs through about 2N cells. The array is
unsigned only.

## Interfaces

| module | parameters (default) | ports |
|---|---|---|
| `multipliers_top` | `N` (8) | `mbe_tc`, `mbe_a[N]`, `mbe_x[N]` -> `mbe_p[2N]`; `arr_a[N]`, `arr_b[N]` -> `arr_p[2N]` |
| `mbe_multiplier` | `N` (8, even, >= 4) | `tc`, `a[N]` multiplicand, `x[N]` recoded operand -> `p[2N]` |
| `array_multiplier` | `N` (8, >= 3) | `a[N]`, `b[N]` -> `p[2N]` (unsigned) |
| `booth_encoder` | - | `grp[3]` -> `sel` (`booth_sel_t`) |
| `booth_decoder` | `W` (10) | `a[W-1]`, `sel` -> `pp[W]` |
| `pp_sign_extend` | `NPP` (5), `PPW` (10), `OUTW` (16) | `pp[NPP][PPW]` -> `rows[NPP][OUTW]` |
| `cla_adder` | `W` (16, multiple of 4) | `a`, `b`, `cin` -> `s`, `cout` |
| `cla4`, `cla_lookahead`, `full_adder`, `half_adder`, `xor_gate` | - | see the file headers |

`tc = 1` treats both Booth operands as two's complement, and the product is
signed. `tc = 0` treats them as unsigned. Either way, `p` is the exact 2N-bit
product.

## Where this RTL departs from or adds to the original design

* **Signed/unsigned input `tc`.** The original algorithm covers both signed and
  unsigned operands, but no mode pin is described. Its worked 4-bit example is
  signed: 0110 x 1010 = 1101 1100, that is 6 x -6 = -36. Its reported 8x8
  result is unsigned: all-ones operands give 1111 1110 0000 0001, which is
  255 x 255. The mode input, the fifth Booth digit and the tenth decoder bit
  exist so that both cases work. With `tc = 1` the fifth digit is always zero,
  and the design behaves as the 4-digit, 9-bit-decoder signed multiplier.
* **Adder arrangement.** The original sends the rows to carry look-ahead
  adders without saying how they are combined. Here they go through a linear
  chain of two-level CLAs. A Wallace or Dadda tree would be faster but is not
  part of the design.
* **Output width.** The product is 16 bits.
* **Array cell placement.** The original fixes the cell counts and the HA/FA
  rows. The exact wiring of each cell inside a row follows the standard
  carry-save array that meets those counts.
* **Not modelled.** Nothing here models transistor-level delay, power or
  transistor counts. Those were the original measures of merit (45 nm CMOS,
  1 V).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a timeout watchdog.

* `tb_multipliers_top` is the end-to-end test at the default size. It runs all
  65536 operand pairs through the Booth multiplier in both modes and through the
  array multiplier, and compares every product with integer multiplication. It
  also recodes the operands itself and counts each Booth mechanism: every
  digit code at every digit position, negative rows, the unsigned-only top
  digit, negative signed products and the array's final carry. A mechanism that
  never occurs counts as a failure. It ends with 255 x 255 = 65025 on both
  multipliers.
* `tb_mbe_multiplier` and `tb_array_multiplier` are exhaustive at N = 8 and
  N = 4. The first also checks the worked 4-bit example.
* `tb_booth_encoder` checks the truth table above. `tb_booth_decoder` checks
  every 9-bit multiplicand with every control word.
* `tb_cla_lookahead` and `tb_cla4` are exhaustive. `tb_cla_adder` runs random
  operands and carry-chain corner cases at 16 and 24 bits.
* `tb_pp_sign_extend` checks the alignment and extension of random rows.

Each testbench was also run against a copy of its module with one deliberate
bug, such as a dropped look-ahead term or a missing two's complement increment.
Every such run failed.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/mult_pkg.sv \
  --top-module tb_multipliers_top tb/tb_multipliers_top.sv
./obj_dir/Vtb_multipliers_top
```

Replace the top-module name and the file to run any other testbench.
`rtl/mult_pkg.sv` must come first, because the Booth modules import it. The
full end-to-end run takes well under a second.

To change the operand width, set `N` on `multipliers_top`. The Booth
multiplier needs an even `N`. The internal row width, row count and adder width
follow from `N`.

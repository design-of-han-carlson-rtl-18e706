# 32-bit carry-select adder with Han-Carlson first-level adders

A carry-select adder (CSLA) breaks the carry chain of a wide addition into
blocks. Each block computes its slice twice, once as if its carry-in were 0
and once as if it were 1, before that carry arrives; when the carry from the
block below does arrive it only steers a multiplexer. The classic
"square-root" CSLA grows the block widths towards the most significant end so
that each block's internal adder finishes at about the time its select carry
arrives.

A plain CSLA pays for its speed with two ripple-carry adders per block. The
area-saving form keeps one adder (carry-in 0) and derives the carry-in-1 result
from it with a Binary to Excess-1 Converter (BEC), a small +1 circuit. This
design goes one step further on speed: the remaining first-level adder of every
block is a **Han-Carlson parallel-prefix adder** instead of a ripple-carry
adder, so the in-block delay grows with log2 of the block width rather than
linearly.

## Structure

```
 sqrt_csla32 (32 bits, combinational)
 ├─ block 0, bits 1..0  : hc_adder (takes cin)
 ├─ block 1, bits 3..2  : csla_group ─┬─ hc_adder, carry-in 0  -> {c0,s0} = a+b
 ├─ block 2, bits 6..4  : csla_group  ├─ bec, WIDTH+1 bits     -> {c1,s1} = a+b+1
 ├─ block 3, bits 10..7 : csla_group  └─ 2:1 mux on the carry out of the block below
 ├─ block 4, bits 15..11: csla_group
 ├─ block 5, bits 22..16: csla_group
 └─ block 6, bits 31..23: csla_group  -> cout
```

| file | content |
|------|---------|
| `rtl/csla_pkg.sv` | `gp_t` (generate, propagate) pair, the prefix operator `gp_combine`, the block partition `CSLA_BLOCK_W` and `csla_block_lsb()` |
| `rtl/hc_adder.sv` | Han-Carlson adder, any width, optional speculative variant |
| `rtl/bec.sv` | Binary to Excess-1 Converter |
| `rtl/csla_group.sv` | one carry-select block: adder + converter + multiplexer |
| `rtl/sqrt_csla32.sv` | the 32-bit adder (top) |

Everything is combinational: there is no clock, no reset and no handshake.
`sum`/`cout` are valid one propagation delay after `a`, `b`, `cin` change.

## The Han-Carlson prefix tree

Every parallel-prefix adder computes, for each bit i, the group generate
G(i:0) = "a carry leaves bit i", using the associative operator

    (g, p)_hi o (g, p)_lo = (g_hi | p_hi & g_lo,  p_hi & p_lo)

starting from g_i = a_i & b_i and p_i = a_i ^ b_i. The carry into bit i+1 is
G(i:0) and sum_i = p_i ^ carry_i.

Kogge-Stone applies the operator at every bit in every row (spans 1, 2, 4,
...), which gives log2(n) rows but many cells and wires. Han-Carlson is a
sparse Kogge-Stone: it works on every other bit only and adds one row to make
up for it. `hc_adder` builds:

1. **Brent-Kung row** - each odd bit i combines with bit i-1, giving (i:i-1).
2. **Kogge-Stone rows on odd bits** - spans 2, 4, 8, ...; odd bit i combines
   with odd bit i-span. Afterwards every odd bit holds (i:0).
3. **Final row** - each even bit i >= 2 combines with odd bit i-1, giving
   (i:0).

For n a power of two this is 1 + log2(n) rows with fan-out 2; the 4-bit adder
has three rows: (1:0), (3:2); then (3:0); then (2:0). Widths that are not a
power of two (the 3-, 5-, 7- and 9-bit blocks here) use as many Kogge-Stone
rows as the highest odd bit needs to reach bit 0. The carry-in is merged into
bit 0 before the tree (g_0 := g_0 | p_0 & cin), so the tree itself has no
special case for it. The code is one `always_comb` that walks the rows with
local arrays; `WIDTH` defaults to 4.

### Speculative variant

`REMOVED_LEVELS = r > 0` leaves out the last r Kogge-Stone rows. Each carry
then only sees a window of l = n / 2^r bits: odd bit i ends with (i : i-l+1),
even bit i with (i : i-l), bits below l stay exact, and the tree has
1 + log2(l) rows. The sum is wrong whenever a carry chain is longer than the
window (about 5 % of random 8-bit operand pairs for l = 4). The variant has
no error detection or correction and is not used by the carry-select adder;
the default `REMOVED_LEVELS = 0` is the exact adder.

## The carry-select block and the converter

`csla_group` adds its slice once, with carry-in 0, giving the (WIDTH+1)-bit
result {c0, s0}. Because a + b + 1 = (a + b) + 1 and a + b + 1 never exceeds
2^(WIDTH+1) - 1, the carry-in-1 result {c1, s1} is just {c0, s0} + 1, which
`bec` computes without an adder: y_i = x_i XOR (x_{i-1} & ... & x_0). The
multiplexer then passes {c1, s1} when `sel` (the carry of the block below) is 1.
The carry out is selected together with the sum, so the chain of block
carries passes through one 2:1 multiplexer per block.

## Where this departs from, or adds to, the published design

- **Block partition.** The published design fixes only the total width (32
  bits) and the square-root rule. The widths 2,2,3,4,5,7,9 are this
  design's choice; change `CSLA_NUM_BLOCKS` and `CSLA_BLOCK_W` in
  `csla_pkg.sv` to try another (an elaboration check insists they add up to
  32).
- **Lowest block.** It is a lone Han-Carlson adder taking `cin`, without a
  select stage, as the blocks above the lowest one are the ones described
  with three levels.
- **Converter logic.** Only its function (+1, n+1 bits for an n-bit block) is
  given; the running-AND form is the simplest circuit for it.
- **Carry-in merge, odd widths, speculative windows.** The published tree is
  given for power-of-two widths and carry-in 0; the carry-in merge and the
  odd-width generalisation are this design's. The speculative window formula
  is the one that follows from removing Kogge-Stone rows from this tree.
- **Timing and area.** The published comparison reports FPGA slice, LUT and
  I/O utilisation and a delay of 7.898 ns for the 4-bit Han-Carlson adder
  against 16.689 ns for a ripple-carry adder, on an unnamed Xilinx device.
  None of that can be checked in RTL simulation; the testbenches check
  function and the prefix depth formula (an elaboration check in
  `hc_adder`).
- The ripple-carry adder and ripple-carry CSLA it is compared with are not
  included.

## Testbenches

Each testbench is self-checking against integer arithmetic (or, for the
speculative adder, an independent window model), applies one vector per
clock cycle of a local clock, has a watchdog, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_hc_adder.sv` | 4-bit exact adder exhaustively; 9-bit and 32-bit random plus carry chains of every length; speculative 4-bit (l = 2) and 8-bit (l = 4) exhaustively against the window model, and that the 8-bit one really differs from the exact sum |
| `tb/tb_bec.sv` | 5- and 10-bit converters, every input |
| `tb/tb_csla_group.sv` | 4-bit block exhaustively with both select values; 9-bit block random; both results selected |
| `tb/tb_sqrt_csla32.sv` | the full 32-bit adder: corner cases, a carry generated at every bit and rippling to the top, 20 000 random additions; counts for every block how often it took its carry-in-0 and its carry-in-1 result, and how often a carry passed through all block multiplexers, failing if any of these never happened |

The top has no parameters, so `tb_sqrt_csla32` runs the design at its full
size. To run one with Verilator (from the folder holding `rtl/` and `tb/`):

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/csla_pkg.sv tb/tb_sqrt_csla32.sv --top-module tb_sqrt_csla32 -o sim
./obj_dir/sim
```

Replace the testbench name for the others. All of them finish in well under
a second.

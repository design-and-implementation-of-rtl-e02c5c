# Radix-4 Booth multiplier with a regular N/2-row partial-product array

A radix-4 (modified) Booth multiplier halves the number of partial products
of an N x N multiplication, but in its textbook form it does not quite reach
N/2 rows. Every negative Booth digit is produced as a one's complement plus a
correction bit `neg` that has to be added at the row's LSB. The `neg` of the
last row has nowhere to go, so the array grows to N/2 + 1 rows. The rows are
also ragged at their low ends.

This multiplier removes both problems:

* the `neg` bit of each row except the last is absorbed into that row's LSB
  by a half adder. Its carry fills an empty slot of the next row;
* the last row is not complemented plus `neg` at all. It is the exact
  two's complement of the selected multiple, formed by a carry-free
  complement circuit instead of a +1 adder;
* sign extension is replaced by a fixed pattern of inverted sign bits and
  constant 1s.

The result is exactly N/2 rows of nearly equal length. They are reduced to
two words by carry-save adders, and a single carry-propagate adder (ripple
carry, carry lookahead or carry select) forms the product.

The whole multiplier is combinational. Operands `a` (multiplicand) and `b`
(multiplier) are N-bit two's complement. The product `p = a * b` is 2N-bit
two's complement and appears one combinational delay later. There is no
clock, register or handshake.

## Module map

| module | role |
|---|---|
| `regular_booth_multiplier` | top: array, then reduction tree, then final adder |
| `regular_pp_array` | Booth recoding of `b`, N/2 rows, their placement in 2N-bit vectors |
| `booth_encoder` | one multiplier triplet to `{neg, two, one}` |
| `booth_pp_row` | rows 0 .. N/2-2: select 0/A/2A, one's complement, LSB half adder |
| `booth_last_row` | last row: exact digit x A through `twos_complement` |
| `twos_complement` | two's complement without a +1 carry chain |
| `csa_tree` | carry-save reduction to sum + carry, with 3:2 or 4:2 cells |
| `full_adder`, `compressor_4_2` | the 3:2 and 4:2 compressor cells |
| `ripple_carry_adder`, `carry_lookahead_adder`, `carry_select_adder` | final adders |
| `booth_pkg` | `booth_digit_t` struct and `adder_kind_e` enum |

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | operand width; must be even and at least 4 (elaboration assertion) |
| `FINAL_ADDER` | `ADD_RCA` | `ADD_RCA`, `ADD_CLA` or `ADD_CSLA` |
| `COMPRESSOR` | 3 | 3 = full-adder (3:2) tree, 4 = 4:2 compressor tree |

## Booth recoding

`b` gets a 0 appended below its LSB and is cut into N/2 overlapping
triplets: triplet i is `{b[2i+1], b[2i], b[2i-1]}`. Its digit
`d = -2*b[2i+1] + b[2i] + b[2i-1]` lies in {-2, -1, 0, +1, +2} and row i
carries `d * a * 4^i`. `booth_encoder` produces

    neg = x_i
    two = ~x_i & x_(i-1) & x_(i-2)  |  x_i & ~x_(i-1) & ~x_(i-2)
    one = x_(i-1) ^ x_(i-2)

Triplet `111` is a "negative zero": neg = 1, one = two = 0. A normal row then
becomes all ones plus `neg`, which is 0. The last row simply yields 0.

## The regular array (the core of the design)

Each row's multiple of `a` needs N+1 bits, since 2A can reach 2^N in
magnitude. Rows 0 .. N/2-2 are built by `booth_pp_row`:

    pb  = (one ? {a[N-1], a} : two ? {a, 0} : 0) ^ {N+1{neg}}   // one's complement
    t0  = pb[0] ^ neg      // half adder: replaces the LSB
    c   = pb[0] & neg      // its carry, weight 2^(2i+1)
    s   = pb[N]            // row sign

The last row (`booth_last_row`) computes the exact value `d * a` in N+2 bits.
It takes the selected multiple, sign-extended, and substitutes its two's
complement when `neg` is set. Bits 0..N are `t`, and bit N+1 is the true
sign `s`.

`regular_pp_array` places the rows as follows (N = 8 shown; `~s` is the
inverted sign, and the leading 1 of the last row falls off the 16-bit
product):

    bit     15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
    row 0                 ~s0 s0 s0 p8 p7 p6 p5 p4 p3 p2 p1 t0
    row 1           1 ~s1 p8 p7 p6 p5 p4 p3 p2 p1 t0 c0
    row 2     1 ~s2 p8 p7 p6 p5 p4 p3 p2 p1 t0 c1
    row 3  ~s3 t8 t7 t6 t5 t4 t3 t2 t1 t0 c2

For general N, row i occupies bits 2i .. 2i+N. Row 0 adds `s0, s0, ~s0` at
N+1 .. N+3. Row i >= 1 adds `~s_i` at 2i+N+1 and a 1 at 2i+N+2. Carry
`c_(i-1)` goes to bit 2i-1 of row i.

**Why the sign pattern is right.** A row's top bit has weight -2^k in two's
complement. Writing `-s * 2^(k+1) = ~s * 2^(k+1) - 2^(k+1)` (with the sign
conceptually one bit above the row) turns every row into an unsigned field
plus a constant. The constants -2^(N+1+2i) of all N/2 rows, together with
the extra 2^(N+1) + 2^(N+2) hidden in row 0's `s0 s0 ~s0`, sum to
-2^(2N+1) + 2^(2N+1) = 0 modulo 2^(2N). So the 1s in the array are exactly
the precomputed sign-extension correction.

**Why the last row needs N+2 bits.** The digit -2 times a = -2^(N-1) gives
+2^N. That value does not fit in N+1 signed bits: a plain (N+1)-bit two's
complement of 2A would wrap back to -2^N. The other rows avoid this because
their `neg` is added outside the N+1-bit word. The last row instead takes its
sign from bit N+1. This case occurs for operands such as (-128) x (-128) at
N = 8, and the testbenches exercise it.

## Carry-free two's complement

`twos_complement` implements -x without an incrementer:

1. `abar = ~x`
2. `axor[0] = abar[0] ^ 1`, `axor[i] = abar[i] ^ abar[i-1]`
3. From the LSB up to and including the first 1 of `axor`, the result takes
   `axor`. Above that it takes `abar`.

Step 3 works because `abar + 1` turns the trailing 1s of `abar` into 0s,
sets the first 0, and leaves the rest alone. That is exactly what the `axor`
bits show. The "has a 1 of axor appeared below this bit" signal is a prefix
OR. It is computed by a log-depth tree of conversion signals: 2-bit groups,
then 4-bit, then 8-bit, and so on, where the top signal of each lower half
forces the whole upper half to 1. Depth is ceil(log2(N+2)) OR levels.

## Reduction and final addition

`csa_tree` groups the operands in threes. Each group passes through one
full adder per column (a 3:2 compressor word). The carry word shifts left
by one and drops its top bit, because the product is taken modulo 2^(2N).
Operands left over pass to the next level, and levels repeat until two words
remain. The level count is worked out at elaboration: for 4 rows, 2 levels;
for 8 rows, 4 levels.

With `COMPRESSOR = 4`, groups of four go through a row of 4:2 compressors.
Each column's `Cout` (independent of its `Cin`) feeds the `Cin` of the next
column, so there is no ripple.

The final adders take `ci`, `a` and `b` of width W = 2N:

* `ripple_carry_adder`: W chained full adders.
* `carry_lookahead_adder`: 4-bit blocks with bit generate `g = a&b` and
  propagate `p = a|b`. In-block carries are fully expanded. Each block's
  carry generator gives `G* | P* & Cin` to the next block (one lookahead
  level).
* `carry_select_adder`: a 4-bit ripple block for the low bits. Every higher
  4-bit block has two ripple adders (carry in 0 and 1) and a mux, with block
  carry `c0 | cin & c1`.

## Where this implementation departs from or adds to the scheme

* Operands are signed only. No unsigned mode is built.
* The default is 16 bits. 8 x 8 is the size the array drawings use, and it
  is a parameter setting. The generalisation of the array layout to any even
  N is derived here, not taken from a drawing.
* The recoder uses `one = x_(i-1) ^ x_(i-2)` from the recoding truth table.
  A gate-level form sometimes given for this signal, `x_(i-2) & (x_(i-1) ^
  x_i)`, disagrees with that table (triplet 010 must select +A) and is not
  used.
* The last row uses N+2 bits for its two's complement (see above). The
  original 8 x 8 drawings show only N+1.
* The two's-complement scan is carried out with the log-depth conversion
  signal tree. The original describes the XOR method and the tree as
  separate techniques.
* The reduction tree grouping (greedy, lowest operands first) and the 4:2
  option are choices of this implementation. The reference used plain
  carry-save adders.
* The carry-select adder uses uniform 4-bit blocks. A 6-4-3-2-1 partition,
  also common for 16 bits, would only change the block boundaries.
* Timing, area and power figures from an FPGA implementation of the scheme
  are not reproduced: the RTL is technology-independent and unregistered.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
ends by printing `TB_RESULT checks=<n> failures=<n>`. Highlights:

* `tb_regular_booth_multiplier`: all 65536 operand pairs at N = 8 for each
  final adder and for the 4:2 tree, plus 20000 random and corner pairs at
  N = 16 with the 4:2 tree and with the carry-lookahead and carry-select
  adders. It also counts, from the operands, that every
  digit value occurs in middle and last rows, along with the negative zero,
  an LSB half-adder carry, the last-row complement, and the +2^N corner. Any
  mechanism never seen counts as a failure.
* `tb_regular_booth_multiplier_full`: the default configuration (16 bit,
  3:2, ripple carry), with corner operands in all combinations and 50000
  random pairs.
* `tb_regular_pp_array`: the rows must sum to a*b (exhaustive at N = 8,
  random at 16). Each row's digit must be correct and no row may have bits
  below its carry slot.
* The remaining testbenches are exhaustive or randomized unit tests against
  arithmetic reference expressions.

All testbenches pass. Each also fails when its module carries a deliberate
single fault, for example a wrong recoder equation, an ungated LSB carry, a
last-row sign taken one bit too low, or a wrong carry-select mux polarity.

## Simulating

With Verilator 5 (the testbenches use `#` delays, so `--timing` is needed),
from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        rtl/booth_pkg.sv tb/tb_regular_booth_multiplier.sv \
        --top-module tb_regular_booth_multiplier
    ./obj_dir/Vtb_regular_booth_multiplier

Replace the testbench name to run any other one. Each runs in well under a
second of simulated work. To lint the RTL alone:

    verilator --lint-only -Wall -y rtl rtl/booth_pkg.sv \
        rtl/regular_booth_multiplier.sv

The lint reports a few unused-signal warnings. These cover the carry bit
that leaves the top of a carry-save word, the spare bits of the row-placement
scratch vector, and the Booth digits that the top does not bring out. All of
them are intentional.

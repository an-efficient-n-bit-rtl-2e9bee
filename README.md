# Vedic (Urdhva Tiryakbhyam) N-bit multiplier

This is a combinational unsigned multiplier for N-bit operands, where N is a power
of two. It is built by applying one idea again and again. The idea is the
*Urdhva Tiryakbhyam* ("vertically and crosswise") method of Vedic arithmetic.

Write each operand as two digits, a high half and a low half. The product then has
three columns:

- a **vertical** right column, `aL*bL`;
- a **crosswise** middle column, `aH*bL + aL*bH`;
- a **vertical** left column, `aH*bH`.

Each column is shifted by half the operand width from the one before it:

    a * b = (aH*bH) << N  +  (aH*bL + aL*bH) << N/2  +  aL*bL

The four half-size products are themselves built the same way, down to 2x2-bit
multipliers. So an 8x8 multiplier has four 4x4 multipliers and three 8-bit ripple
carry adders. Each 4x4 multiplier has four 2x2 multipliers and three 4-bit ripple
carry adders. Every partial product of a level is formed at once, in parallel, and
the adders only combine them. The default size is N = 8.

Worked example in binary, with A = 1011 and B = 1101 (11 x 13):

| column     | halves            | value     |
|------------|-------------------|-----------|
| right      | AL x BL = 11 x 01 | 0011      |
| middle     | 10 x 01 + 11 x 11 | 1011      |
| left       | AH x BH = 10 x 11 | 0110      |
| product    | shifted and added | 10001111  |

The same method works with decimal digits: 44 x 32 = 1408.

## The 2x2 leaf (`vedic_mul2`)

For 2-bit operands, each "digit" is one bit, and each column is at most two bits:

| product bit | formed as                                                |
|-------------|----------------------------------------------------------|
| `p[0]`      | `a0 & b0` (vertical)                                     |
| `p[1]`      | sum bit of a half adder on `a1&b0` and `a0&b1` (crosswise) |
| `p[2]`      | sum bit of a half adder on `a1&b1` and that crosswise carry |
| `p[3]`      | carry out of that second half adder                      |

It uses four AND gates and two half adders (`half_adder`).

## The adder stage (`vedic_combine`)

This is the one part of the design that needs care. The method fixes what the stage
must compute and that it uses three N-bit ripple carry adders (`rca`). It does not fix
how the three adders are wired. Let H = N/2. The four N-bit inputs are `pp_ll`,
`pp_hl`, `pp_lh` and `pp_hh`. The stage forms the 2N-bit product like this:

    bits:            2N-1 ........ N+H   N+H-1 ..... N   N-1 ...... H   H-1 ..... 0
    pp_ll                                                [ pp_ll hi  ]  [ pp_ll lo ]
    pp_hl + pp_lh                          [ ---------- adder 1 ---------- ]
    pp_hh           [ --------------- adder 3 ---------------- ]

1. **Adder 1 (crosswise):** `s1 = pp_hl + pp_lh`, with carry `c1`.
2. **Adder 2 (middle):** `s2 = s1 + (pp_ll >> H)`, with carry `c2`. This adds the part
   of the right column that overlaps the middle one.
3. **Carry merge:** `c1` and `c2` both weigh 2^N within the middle column, which is
   bit N+H of the product. A half adder turns them into a two-bit count.
4. **Adder 3 (upper):** `s3 = pp_hh + {count, s2[N-1:H]}`. The count sits at bit H
   of this operand.
5. **Result:** `p = {s3, s2[H-1:0], pp_ll[H-1:0]}`. The low H bits of `pp_ll` pass
   straight through, because nothing else reaches that column.

When the inputs really are the four products of two N-bit numbers, two bounds hold.
First, the middle column is below 2^(N+1), so `c1` and `c2` are never both 1. Second,
the product fits in 2N bits, so adder 3 never carries out. The half adder makes the
stage exact without relying on the first bound. Two `assert final` statements check
both bounds in simulation. If you drive the stage alone with arbitrary inputs, they
will fire.

## The tree (`vedic_mul`, the top)

`vedic_mul` builds the recursion as an explicit tree, one level at a time, instead
of a module that instantiates itself. Let L = log2(N).

- **Level 0** holds 4^(L-1) `vedic_mul2` leaves.
- **Level k** (k >= 1) holds 4^(L-1-k) `vedic_combine` stages of width S = 2^(k+1).
- **Node j** of level k takes children 4j, 4j+1, 4j+2 and 4j+3 of level k-1. They act
  as its `aL*bL`, `aH*bL`, `aL*bH` and `aH*bH` products.
- Each level keeps its products in an array `g_tree.g_lvl[k].prod[]`. This is a handy
  place to probe a simulation.

The hard part is which operand bits each leaf sees. The function `leaf_offset`
works this out. Read leaf index j in base 4, with the least significant digit first.
Digit t is the choice made where a 2^(t+2)-bit multiplication is split. Its bit 0
picks the high half of `a`, and its bit 1 picks the high half of `b`. Taking the high
half moves that operand's 2-bit slice up by 2^(t+1) bits.

Cost at N = 8:

- 16 leaves: 64 AND gates and 32 half adders;
- 4 four-bit stages: 12 four-bit adders and 4 merge half adders;
- 1 eight-bit stage: 3 eight-bit adders and 1 merge half adder.

In all that is 72 full adders and 37 half adders. No delay figure is claimed for this
RTL; timing depends on the target technology. The 32 I/O pins (8 + 8 + 16) match an
8-bit multiplier with no clock or control pins.

## Interface and timing

| port | dir | width | meaning           |
|------|-----|-------|-------------------|
| `a`  | in  | N     | multiplicand      |
| `b`  | in  | N     | multiplier        |
| `p`  | out | 2N    | product `a * b`   |

- **Parameter:** `N` is an `int unsigned` with default 8. It must be a power of two
  and at least 2; any other value stops elaboration with an error.
- **Timing:** The design is purely combinational. It has no clock, reset, registers
  or handshake, so the product is valid once the logic settles. To meet a clock
  target, register the inputs and outputs around it, or pipeline it between levels.
- **Signedness:** Operands are unsigned. Signed multiplication needs a separate
  correction step, which this design does not include.

The building blocks can be used on their own:

- `rca #(W)` is a W-bit ripple carry adder with carry in and carry out, made of
  `full_adder` cells.
- `vedic_combine #(N)` is one adder stage.
- `vedic_mul2` is the 2x2 leaf.

## What is fixed by the method and what is a design choice

Fixed by the method:

- the vertical-and-crosswise split;
- four half-size multipliers and three full-width ripple carry adders per level;
- 2x2 leaves;
- an 8-bit main configuration.

Choices made here:

- the gate-level form of the 2x2 leaf (AND gates and half adders);
- the order in which the three adders of a stage combine the products, and the
  half-adder carry merge;
- carry in and carry out ports on the ripple adder;
- product width exactly 2N;
- unsigned operands;
- no registers;
- the explicit level-by-level tree;
- rejecting an N that is not a power of two, rather than padding it.

A conventional array (Braun) multiplier serves only as a point of comparison for
this design. It is not included.

## Verification

Every testbench checks itself. It prints `TB_RESULT checks=<n> failures=<m>` and has
a watchdog. The designs under test are combinational, so each test applies one case
per clock cycle and checks the result in that same cycle.

| testbench             | what it covers |
|-----------------------|----------------|
| `tb_vedic_mul2`       | all 16 operand pairs of the 2x2 leaf |
| `tb_rca`              | all 131072 cases of the 8-bit adder (x, y, carry in) |
| `tb_vedic_combine`    | all 65536 8-bit operand pairs, with the half products formed by the testbench. It also counts crosswise-adder and middle-adder carries, and fails if either never occurs. |
| `tb_vedic_mul`        | the top at its default N = 8: all 65536 pairs and both worked examples. From the operands alone it counts the carries the structure must produce: leaf crosswise carries, plus crosswise-adder and middle-adder carries at the 4x4 and 8x8 levels. It fails if any of them never occurs. |
| `tb_vedic_mul_sizes`  | N = 2 and N = 4 exhaustively, including 1011 x 1101; then N = 16, 32 and 64 with corner cases and 20000 random pairs |

All pass. Each testbench was also run against a copy of its block with one
deliberate bug, and each one failed:

- the leaf drops its crosswise carry;
- the adder has a broken carry chain;
- the stage drops the middle carry;
- the tree miswires a child.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_mul.sv --top-module tb_vedic_mul
    ./obj_dir/Vtb_vedic_mul

To lint a size other than the default, for example `-GN=32`:

    verilator --lint-only -Wall -Irtl rtl/vedic_mul.sv -GN=32

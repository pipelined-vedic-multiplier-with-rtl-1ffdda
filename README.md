# 64 x 64-bit Vedic multiplier with selectable leaf size

This is an unsigned 64 x 64 → 128-bit multiplier built the "Vedic" way: a
wide multiplication is broken into four half-width multiplications, each of
those again into four, and so on, until the pieces are small enough to be
done directly with the *Urdhava Tiryakbhyam* ("vertically and crosswise")
column rule. The point of the construction is that the size of the smallest
pieces decides how wide every adder in the design is. Small leaves mean many
short additions instead of a few long ones; the preferred configuration
stops at 2 x 2-bit leaves, giving 1024 leaf multipliers and the narrowest
adders. Four other configurations (leaves of 4, 8, 16 or 32 bits) are the
same RTL with one parameter changed.

The whole multiplier is combinational: the product follows the operands
after one propagation delay. There is no clock, register, handshake or reset.
The word "pipelined" below is the traditional name of the leaf multiplier's
column-by-column method. It does not mean register stages.

## Hierarchy

```
vedic_mul64            top: N = 64, PM_W = 2
└─ vedic_modified_vm   the tree of modified multipliers, generated level by level
   ├─ ut_pipelined_vm  × 4**L   leaf column multipliers, PM_W x PM_W
   └─ vedic_pp_accum   × (4**L - 1)/3   partial product accumulators, one per inner node
```

Here `L = log2(N / PM_W)` is the number of splitting levels. At the defaults,
`L = 5`, so there are 1024 leaves and 341 accumulators.

| `PM_W` | leaf multipliers | accumulator levels (node widths) |
|-------:|-----------------:|----------------------------------|
| 32 | 4    | 64 |
| 16 | 16   | 32, 64 |
| 8  | 64   | 16, 32, 64 |
| 4  | 256  | 8, 16, 32, 64 |
| 2  | 1024 | 4, 8, 16, 32, 64 (default) |

## The leaf: column (vertical-and-crosswise) multiplier — `ut_pipelined_vm`

For N-bit operands `a` and `b`, step `k` (k = 0 … 2N−2) adds every bit
product `a[i] & b[j]` with `i + j = k`. The first and last steps each have
one term: `a[0]b[0]` and `a[N-1]b[N-1]`, the "vertical" products. Every step
between them is a "crosswise" sum. The steps are joined from the bottom up:
each step adds the carry left by the step below. It keeps the low bit as
product bit `k` and passes the rest up as the next carry. The carry left
after the last step is product bit `2N−1`.

Worked example, 2 x 2 bits, `11 × 11`:

| step | terms | sum + carry in | product bit | carry out |
|-----:|-------|---------------:|------------:|----------:|
| 0 | a0b0 | 1 | 1 | 0 |
| 1 | a0b1 + a1b0 | 2 | 0 | 1 |
| 2 | a1b1 | 1 + 1 = 2 | 0 | 1 |
|   | final carry | | 1 | |

The result is `1001` = 9. A 2 x 2 leaf needs carries only when both digits
are `11`. Any other pair of digits fits without them.

A column sum is at most N and a carry at most N. The running sum is
therefore `clog2(2N+1)` bits wide.

## The node: partial product accumulation — `vedic_pp_accum`

A 2H x 2H node gets four 2H-bit partial products from its children:

```
PP1 = a_lo * b_lo     PP2 = a_lo * b_hi
PP3 = a_hi * b_lo     PP4 = a_hi * b_hi
```

Each partial product is cut into an H-bit low half and an H-bit high half.
The 4H-bit product is then assembled as four H-bit fields, least
significant first:

```
field 0 = PP1.lo
field 1 = PP1.hi + PP2.lo + PP3.lo                  -> carry c1 (0..2)
field 2 = PP4.lo + PP2.hi + PP3.hi + c1             -> carry c2 (0..2)
field 3 = PP4.hi + c2
```

Only the two middle fields need real adders. Each adds three H-bit values
(plus a small carry), so each carry is two bits wide and can be 0, 1 or 2.
Field 3 cannot overflow, because the product always fits in 4H bits. For the
4 x 4 case (H = 2) the four fields are the 2-bit groups `P8-7 P6-5 P4-3 P2-1`.

## The tree — `vedic_modified_vm`

Written as recursion, a node of width W holds four nodes of width W/2. The
RTL generates the tree level by level instead:

* Level 0 holds the `4**L` leaves. Level `l` holds `4**(L-l)` nodes of
  operand width `PM_W << l`. Level `L` is the single N x N node.
* Node `j` of level `l` takes the products of nodes `4j, 4j+1, 4j+2, 4j+3`
  of level `l-1` as PP1 … PP4. These are, in order, lo·lo, lo·hi, hi·lo and
  hi·hi.
* A leaf's operand slices follow from its index. Read the index in base 4.
  In the digit for level `m`, the high bit selects the upper half of `a` at
  that level and the low bit selects the upper half of `b`. Each selected
  upper half adds `PM_W << (m-1)` to the slice offset.

`N` and `PM_W` must be powers of two with `2 <= PM_W <= N`. An elaboration
`$error` enforces this. With `PM_W = N` the tree is a single leaf.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|--------:|---------|
| `vedic_mul64` | `N` | 64 | operand width |
| `vedic_mul64`, `vedic_modified_vm` | `PM_W` | 2 | leaf width: 2, 4, 8, 16 or 32 select the five architectures |
| `vedic_modified_vm` | `N` | 64 | operand width |
| `ut_pipelined_vm` | `N` | 2 | operand width of one column multiplier |
| `vedic_pp_accum` | `H` | 2 | half width of the node's partial products (node is 2H x 2H) |

## Interface and timing

`vedic_mul64`: inputs `a[63:0]` and `b[63:0]`, output `p[127:0] = a * b`. All
values are unsigned. It is purely combinational. For use in a clocked
design, register the operands and product outside. The critical path runs
through one leaf's column chain, then one field adder per level, and at each
level the carry runs into the next field. The design has no internal
pipeline registers. Choosing where to cut it is left to the user.

## Choices not fixed by the architecture

* **Unsigned only.** Signed operands would need a sign correction outside.
* **Combinational.** "Pipelined" is read as the name of the column method,
  and no register stages are added. Nothing in the architecture fixes
  register positions, latency or reset.
* **Adders are `+` operators.** The architecture defines which fields are
  added. It does not define how the adder is built, so synthesis chooses.
* **Carry widths.** Each middle-field carry is 2 bits, and each column carry
  in a leaf is `clog2(2N+1) − 1` bits. These are the smallest widths that
  cannot overflow.
* **Level-by-level generation** replaces a self-instantiating module. The
  wiring is the same as the recursive description.
* **The 64 x 64 node** accumulates its four 32 x 32 products in the same way
  as the smaller nodes.

Not included: FPGA timing and LUT figures for the five architectures, and
the other multipliers (Booth, array, earlier Vedic designs) used only as
comparisons. The relative ranking reported for this architecture (2 x 2
leaves fastest and smallest) is an FPGA measurement and has not been
reproduced here.

## Testbenches

Each testbench checks itself, prints `TB_RESULT checks=N failures=M` and
stops through a cycle watchdog if something hangs. The multipliers are
combinational. Each testbench changes the operands on a clock edge and
checks the product 1 time unit later against SystemVerilog's own `*`.

| testbench | what it covers |
|-----------|----------------|
| `tb_ut_pipelined_vm` | column multiplier: 2x2, 4x4 and 8x8 exhaustively, 32x32 random and corner, plus `11 × 11 = 1001` |
| `tb_vedic_pp_accum` | accumulator with H = 2 (all 4x4 operand pairs) and H = 16 (random). Fails unless carries of 1 and 2 out of the lower adder and a carry out of the upper adder all occur |
| `tb_vedic_modified_vm` | tree: 8x8 exhaustively with 2-, 4- and 8-bit leaves, then 16x16 (2-bit leaves) and 32x32 (4-bit leaves) with random and corner operands |
| `tb_vedic_mul64` | the top at its defaults (64 bits, 2-bit leaves): 512 corner pairs and 20000 random pairs. Counts leaf carries and the three carry cases at the 64-bit node, and fails if any never occurs |
| `tb_vedic_architectures` | all five architectures (PM_W = 32, 16, 8, 4, 2) side by side on the same 5004 operand pairs |

Running one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl +libext+.sv \
    --top-module tb_vedic_mul64 tb/tb_vedic_mul64.sv
./obj_dir/Vtb_vedic_mul64
```

Replace the module name to run another testbench. The 64-bit builds with
1024 leaves take a few seconds to compile. Each simulation runs in seconds.

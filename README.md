# Radix-4 modified Booth multiplier with a regular partial-product array, in a small ALU

A signed 8 × 8 multiplier built on radix-4 modified Booth encoding (MBE) needs
only four partial-product rows. The catch is that each negative Booth digit
needs a "+1" to finish the two's complement of its row. Conventional MBE adds
those bits as a fifth, irregular row. This design absorbs them into the four
rows themselves, so the array stays at N/2 rows. The rows are then summed by a
small pipelined binary tree of adders. The root of that tree is an adder with
spurious power suppression (SPST): when the upper half of both operands is
only sign extension, it switches off its upper half and produces that half's
result directly.

The multiplier comes in two variants that differ only in the carry-propagate
adders inside the tree:

| variant | tree and SPST sub-adders | parameter |
|---|---|---|
| proposed multiplier | ripple-carry chain of full adders | `KIND = RIPPLE` |
| extension multiplier | Ladner-Fischer parallel-prefix adder | `KIND = LADNER_FISCHER` (default) |

The extension multiplier is used in a generic ALU together with a 9-bit adder,
bitwise AND and OR, and a programmable clock divider that sets the ALU's rate.

## The regular partial-product array (`mbe_pp_array`)

This is the least obvious part of the design.

**Booth digits.** The multiplier `b` is cut into overlapping triplets
`b[2i+1], b[2i], b[2i-1]`, with `b[-1] = 0`. Each triplet becomes a digit in
{−2, −1, 0, +1, +2}. The digit is carried by three signals (`mbe_encoder`):

| triplet | digit | neg | two | one |
|---|---|---|---|---|
| 000 | +0 | 0 | 0 | 0 |
| 001, 010 | +A | 0 | 0 | 1 |
| 011 | +2A | 0 | 1 | 0 |
| 100 | −2A | 1 | 1 | 0 |
| 101, 110 | −A | 1 | 0 | 1 |
| 111 | −0 | 0 | 0 | 0 |

**Row bits.** Bit j of row i is produced by `mbe_selector`:
`p_ij = one·(a_j ⊕ b2i+1) + two·(a_j−1 ⊕ b2i+1)`. The multiplicand is
sign-extended by one bit (`a_N = a_N−1`) and `a_−1 = 0`. For a negative digit
this is the one's complement of ±A or ±2A. The missing +1 has weight 2^(2i).

**Folding the +1 into the row.** The row's LSB `p_i0` and the +1 (`neg_i`)
are added in place:

- `τ_i0 = one_i · a0` stays at weight 2^(2i);
- the carry `c_i = neg_i · ¬(one_i · a0)` has weight 2^(2i+1).

Row i+1 starts at bit 2i+2, so bit 2i+1 is free there, and `c_i` is placed in
row i+1. The array is regular: row i occupies bits 2i−1 and up.

**The last row.** Row N/2−1 has no next row to take its carry. Its carry is
added to that row's own bit 1 instead. This gives a new bit and a new carry:

- `τ_i1 = one_i · ε + two_i · a0`, with `ε = a1 ⊕ (a0 · b2i+1)`;
- the carry `d_i` of `p_i1 + c_i`, with weight 2^N. It is formed directly
  from the operand bits:
  `d_i = b2i+1 · ¬a0 · ¬[(b2i−1 + a1)(b2i + a1)(b2i + b2i−1)]`.

Neither waits for `c_i` or `p_i1`, so they are not later than the other row
bits.

**Absorbing `d` into row 0.** Row 0's sign bit `s0` sits at bit N. Its
compressed sign extension is `¬s0 s0 s0` at bits N+2..N. Adding `d` to those
three bits can never overflow (at most 100 + 1). The sum gives three new bits:

- `α2 = ¬s0 + d`
- `α1 = s0 · ¬d`
- `α0 = s0 ⊕ d`

**Sign extension of the other rows (this design's choice).** Row 0's form
carries a constant offset of +2^(N+2). Row 1 is written as `¬s1` at bit N+2
with ones above it; that is its signed value minus 2^(N+2), so rows 0 and 1
together hold an exact value. Rows 2 and up use plain sign extension, with
`s_i` repeated to the top bit. All rows therefore sum to `a·b mod 2^(2N)`.

The first-level pair sums of the tree are then exact signed values, except
for the two carries (`c_1` and `d`) that cross between the pairs. This is what
lets the SPST adder find pure sign patterns.

With the more common `1 ¬s_i` form, the pair sums carry fixed offsets (0x1000
and 0xF000 for N = 8). The SPST adder could then never switch off. The total
product is correct with either form.

## The SPST adder (`spst_adder`)

The default is 32 bits, split into a 16-bit lower part (LSP) and a 16-bit
upper part (MSP). In the multiplier tree it is 16 bits, split 8/8.

- **LSP adder.** It always runs and gives `SUM_LSP` and a carry.
- **Detection logic.** It computes `A_and` / `A_nor` and `B_and` / `B_nor` on
  the MSP operands. `close` is high when each MSP operand is all zeros or all
  ones.
- **Latches.** These are AND gates. While `close` is high they force the MSP
  adder's operands and carry-in to zero, so the MSP adder does not toggle.
- **Sign-extension unit.** With both MSPs pure sign patterns, the MSP result
  is always `{sign, …, sign, carr_ctrl}`:
  - `sign = A_and·B_and + (A_and ⊕ B_and)·¬c`
  - `carr_ctrl = A_and ⊕ B_and ⊕ c`
  - the carry out is `A_and·B_and + (A_and + B_and)·c`

  Here c is the LSP carry.
- **Normal path.** When `close` is low, the MSP adder adds the operands with
  the LSP carry.

Either way `{cout, sum} = a + b + cin` exactly. The decision is
combinational. The adder has no clock, and no separately timed "asserting"
stage is modelled.

## Tree adder and pipeline (`pp_tree_adder`, `mbe_multiplier`)

The N/2 rows are added pairwise, level by level. For N = 8 that is A0+A1 and
A2+A3, then their sum. Every level is registered, and the single adder of the
last level is the SPST adder.

- **Latency.** log2(N/2) enabled cycles: 2 for 8 × 8, 3 for 16 × 16.
- **Throughput.** One product per enabled cycle.
- **Control.** `en` is a clock enable. `reset` is synchronous, active high,
  and clears the pipeline.

`mbe_multiplier` has the ports `clk, reset, en, x, w, product`. `x` is the
multiplicand, and `w` is the multiplier that gets Booth-recoded. Both are
signed. N must be even, with N/2 a power of two. The internal signal
`spst_close` shows the root adder's decision.

## The ALU (`alu_top`)

| `operation` | `alu_out` |
|---|---|
| 00 | `a + b`, unsigned, 9 bits, zero-extended |
| 01 | `a * b`, signed, 16 bits |
| 10 | `a & b`, zero-extended |
| 11 | `a \| b`, zero-extended |

All four units work in parallel on `a` and `b`. A multiplexer selects one
result into the 16-bit register `alu_out`. The adder is a ripple-carry chain
of full adders (`rca_adder`). The multiplier is the extension variant.

**Rate.** The clock divider (`clk_divider`) produces `clk_out`, whose period
is `div_ratio` clk cycles; values below 2 act as 2. It also produces a
one-cycle `tick` at each rising edge of `clk_out`. The result register and the
multiplier pipeline load only on `tick`, so the whole ALU stays in the `clk`
domain and advances at the `clk_out` rate.

**Latency, counted in ticks.**
- Add, AND and OR: the result is on `alu_out` one tick after the inputs.
- Multiply: the result is on `alu_out` from the third tick (two pipeline
  stages plus the result register).

**Reset.** `rst` is synchronous and active high. It clears the register, the
pipeline and the divider, and `clk_out` rises in the first cycle after it.

**Other ports.** `sum` and `product` are brought out for observation.

The divider is re-programmable at run time. A ratio change takes effect at the
next wrap of its counter; the period in which the change happens may be
shortened or stretched. `clk_out` never rises without a tick.

## Where this design departs from, or adds to, its source

The source describes the array equations, the SPST structure and the ALU's
block diagram. It does not describe:
- the Ladner-Fischer adder, the clock divider or the conventional adders
  beyond their names;
- the pipeline;
- the detection rule and the sign/carry logic of the SPST adder;
- the sign extension of rows 1 and up.

These parts were filled in as described above. In particular:

- **SPST placement.** The SPST adder is the root of the tree. The source says
  only that one of the tree's adders is an SPST adder.
- **Last-row carry.** For the digit −A the carry `d` is `¬a0 · ¬a1`, the
  carry of `¬a1 + ¬a0`. It is formed by the gate equation above, and the
  exhaustive test confirms it.
- **`ε` term.** `ε` uses `a0·b2i+1`. Using `b2i` there gives wrong products
  for the digit +A.
- **AND/OR codes.** The codes 10 = AND and 11 = OR are this design's
  assignment.
- **Multiplier inputs.** `a` drives the multiplicand and `b` the Booth-recoded
  input.
- **Added ports.** The ports `div_ratio`, `en` and `tick` are additions. The
  divider's enable is tied high inside the ALU.
- **Clocking.** The result register is clock-enabled by the divider's tick. It
  is not clocked by `clk_out` directly.
- **Product values.** The product values in the source's waveform screenshots
  are not the products of the operands shown there. This design computes the
  exact signed product (for example 69 × 35 = 2415 on `alu_out`).
- **Scope.** Only signed multiplication is provided. The SPST adder adds only;
  it does not subtract.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_rca_adder` | all 8-bit operand pairs, both carry-ins |
| `tb_lf_adder` | corner cases and 20,000 random 16-bit additions; 5-bit width exhaustive |
| `tb_mbe_encoder` | the Booth table above, all 8 triplets |
| `tb_mbe_selector` | all triplets and both neighbouring bits against the ±A / ±2A rule |
| `tb_mbe_pp_array` | 8 × 8 exhaustive: rows sum to the product; array is regular; α bits equal `{¬s0,s0,s0} + d`; pair sums exact up to the crossing carries. 4 × 4 exhaustive, 16 × 16 random |
| `tb_spst_adder` | 40,000 vectors biased to sign-pattern upper halves, both sub-adder kinds. Checks the sum, `close` against an independent detection, gating of the upper-part operands, and the sign-extension output; counts both decisions |
| `tb_pp_tree_adder` | 4-row and 8-row trees: latency, enable holds, reset, SPST activity |
| `tb_mbe_multiplier` | both 8 × 8 variants, all 65,536 operand pairs back to back: exact product after exactly 2 cycles, enable gaps; 16 × 16 random with 3-cycle latency; SPST switched off and on |
| `tb_clk_divider` | period and high time for ratios 0–12 and 255; tick aligned with every rise, including during ratio changes; enable low; reset |
| `tb_alu_top` | the whole ALU at default parameters for 200,000 cycles. Random operands, codes and ratios against a reference model of the pipeline and result register; a reset mid-run. Every operation, both SPST decisions, negative × negative products, adder carry-out and ratio changes must each occur |

The ALU run takes well under a second. Two assertions are part of the RTL:
`clk_divider` never ticks without `clk_out` high, and `spst_adder` never lets
data into its upper-part adder while that part is switched off. Simulate with
`--assert` to enable them.

## Simulating

All sources are SystemVerilog 2017. The package `mbe_pkg.sv` must come first.
For example, with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mbe_pkg.sv tb/tb_alu_top.sv \
          --top-module tb_alu_top -Mdir obj_alu
./obj_alu/Vtb_alu_top
```

Replace `tb_alu_top` with any other testbench name. Modules are found through
`-Irtl`, one module per file, named after the module.

## Lint notes

Verilator `-Wall` reports two unused signals. Both are deliberate:
- the `neg` field of the Booth code in `mbe_selector`, which inverts with
  `b2i+1` instead;
- `spst_close` in `mbe_multiplier`, which is kept as an observation point.

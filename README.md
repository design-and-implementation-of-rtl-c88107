# Ternary multiply-accumulate unit, 16 trits

This is a multiply-accumulate (MAC) unit whose numbers are written in base 3
rather than base 2. Each digit is a *trit* with the value 0, 1 or 2. The unit
takes two unsigned 16-trit operands every clock and multiplies them into a
32-trit product. It then adds that product to a 33-trit running sum:

    dataout = sum over i of dataa_i * datab_i      (mod 3^33)

All of the arithmetic is built from three small ternary cells: a 1-trit
multiplier, a ternary half adder and a ternary full adder. Each cell is
described the way a multi-valued logic circuit is. The cell decodes every
input trit into three one-hot *literals* (x^0, x^1, x^2). An output trit is
then the OR of a "value 2" group of product terms and a "value 1" group of
product terms. Bigger units are built from these cells: a 2-trit multiplier,
a tree of them that forms the 16-trit multiplier, a ripple-carry adder and
the accumulator.

The RTL is ordinary synthesizable binary logic. Every trit is carried on two
wires. So the design can be simulated and synthesized with standard tools,
and it can also be read as a model of the ternary circuit.

## Number representation

| trit value | wires `[1:0]` |
|-----------:|:-------------:|
| 0          | `00`          |
| 1          | `01`          |
| 2          | `10`          |
| (unused)   | `11`          |

- The type is `tern_pkg::trit_t` (`logic [1:0]`).
- A number is a packed array of trits, `trit_t [N-1:0]`, with index 0 as the
  least significant trit. For example, 11 = 102 in base 3, which is
  `{2'b01, 2'b00, 2'b10}` for trits 2..0.
- Numbers are unsigned. Neither balanced nor signed ternary is used.
- The decoder (`tern_pkg::decode`) maps `11` to no literal at all. A cell fed
  with `11` therefore acts as if that input matched no row of its table. No
  cell ever produces `11`.
- The binary code is a choice of this implementation. The original design
  describes the cells as ternary gates (decoders, product terms and
  T-gates), not as a binary code.

## The three cells

Each cell satisfies a simple arithmetic identity. The testbenches check the
identity for every input combination.

| cell | module | identity | output range |
|---|---|---|---|
| 1-trit multiplier | `t_mul1` | a·b = 3·c + p | p 0..2, c 0..1 |
| half adder | `t_half_adder` | a + b = 3·c + s | s 0..2, c 0..1 |
| full adder | `t_full_adder` | a + b + ci = 3·co + s | s 0..2, co 0..2 |

The product terms, in the source design's notation (a term times 1 gives
level 1, a bare term gives level 2):

- **1-trit multiplier**
  - p = a^1b^2 + a^2b^1 + 1·(a^1b^1 + a^2b^2)
  - c = 1·a^2b^2
  - Only 2·2 = 4 = 11₃ produces a carry.
- **Half adder**
  - s = a^2b^0 + a^1b^1 + a^0b^2 + 1·(a^1b^0 + a^0b^1 + a^2b^2)
  - c = 1·(a^2b^1 + a^1b^2 + a^2b^2)
- **Full adder**
  - The sum has nine value-2 minterms (a+b+ci equal to 2 or 5) and nine
    value-1 minterms (a+b+ci equal to 1 or 4).
  - The carry is 2 only for a^2b^2ci^2 (2+2+2 = 6 = 20₃).
  - The carry is 1 whenever two of the inputs already add up to 3 or more, or
    when all three are 1.
  - A carry-in of 2 is legal, which is why the carry-out can be 2. In the
    adders of this design the carry-in never exceeds 1.

## The 2-trit multiplier (`t_mul2`)

Four 1-trit multipliers form the partial products a_i·b_j. Each one is a
product trit s_ij and a carry trit c_ij, and the carry has the next higher
weight. Half and full adders then reduce the columns:

| output | weight | inputs | carry out to |
|---|---|---|---|
| m0 | 1  | s00 | – |
| m1 | 3  | FA(s01, s10, c00) | k1 |
| m2 | 9  | FA(s11, c01, c10) → t, k2a; HA(t, k1) | k2b |
| m3 | 27 | FA(c11, k2a, k2b) | cout |

- The largest product is 8·8 = 64 = 2101₃. It fits in four trits, so `cout`
  is always 0 for valid inputs.
- The choice of cells follows the source design: four 1-trit multipliers,
  HA/FA cells, outputs m3..m0 and a Cout. The exact column wiring above is
  this implementation's own.

## The multiplier tree (`t_mul`, N = 16)

The 16-trit multiplier is hierarchical. Each operand is cut into 2-trit
blocks, and every block pair is multiplied in a `t_mul2`: 8 × 8 = 64 leaf
multipliers. Each level above combines four products of half-size blocks
(H trits each) into the product of a full block:

    x·y = {xH·yH, xL·yL}  +  (xL·yH << H)  +  (xH·yL << H)

- `{,}` is trit concatenation. The two half-size products do not overlap, so
  placing them side by side costs no adder.
- `<<` is a shift by whole trits.
- The two additions are 2S-trit ternary ripple-carry adders, where S is the
  block size at that level.
- The levels are: 64 products of 2-trit blocks, 16 of 4-trit blocks, 4 of
  8-trit blocks, and 1 product of the full 16-trit operands.
- `t_mul` is purely combinational, and the final product never overflows.
- N must be a power of two, at least 2. Elaboration stops with an error
  otherwise.

This is the longest combinational path in the design. Each tree level adds
two ripple chains, of 8, 16 and 32 trits. Nothing inside the multiplier is
pipelined.

## Ripple-carry adder and accumulator

`t_rca` is a chain of N ternary full adders (N defaults to 33). It has a
carry-in and a carry-out, and satisfies x + y + ci = 3^N·co + s.

`t_accumulator` is a register with an adder in front of it:

- It holds W = 33 trits.
- On each enabled clock, `q <= q + b`, where `b` is the 32-trit product
  zero-extended to 33 trits.
- The adder output is also brought out as `sum`; the MAC calls it
  `adder_out`.
- The final carry is dropped, so the sum wraps modulo 3^33. Since
  3^33 / (3^16 − 1)^2 ≈ 3, two full-scale products always fit. A third may
  wrap.
- There is no overflow flag or saturation.

## MAC pipeline and timing (`mac_unit`)

```
dataa ─► dataa_reg ─┐
                    ├─► t_mul ─► multa ─► multa_reg ─► (+) ─► adder_out ─► dataout
datab ─► datab_reg ─┘                                   ▲                     │
                                                        └─────────────────────┘
```

There are three register stages, all on the rising edge of `clk`:

| edge | what is captured |
|---|---|
| k   | `dataa_reg`, `datab_reg` ← operands present at edge k |
| k+1 | `multa_reg` ← their product |
| k+2 | `dataout` ← `dataout + multa_reg` |

- **Throughput:** one new operand pair per clock.
- **Latency:** an operand pair affects `dataout` right after the third rising
  edge, counting the one that sampled it. Holding one operand pair constant
  adds its product once per clock.
- **`clken`:** when high, all three stages advance; when low, the whole
  pipeline holds.
- **`rst`:** active high and asynchronous. It clears every register,
  including the accumulator, which gives the clear-to-zero function.

Ports (widths in trits; multiply by 2 for wires):

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 bit | clock |
| `rst` | in | 1 bit | asynchronous clear |
| `clken` | in | 1 bit | pipeline enable |
| `dataa`, `datab` | in | N = 16 trits | operands |
| `dataout` | out | ACC_W = 33 trits | running sum of products |

Parameters: `N` (16) and `ACC_W` (2N+1 = 33) on `mac_unit`; `N` on `t_mul`
(power of two); `N` on `t_rca`; `BW`, `W` on `t_accumulator`. The design has
194 flip-flop bits (97 trits: 16 + 16 + 32 + 33).

## Where this RTL departs from, or fills in, the source design

- **Pipeline depth.** The source says the whole multiply-accumulate happens
  in a single clock cycle. Its simulation waveform, however, shows registered
  signals named `dataa_reg`, `datab_reg` and `multa_reg`. The RTL follows the
  waveform's three stages. One MAC per clock is kept either way. If you want
  a single-cycle MAC, remove the operand and product registers.
- **"Bit" read as trit.** The source calls its 1-trit multiplier a "1 bit
  multiplier". "16-bit" is read as 16 trits, and the "33 bit output" as a
  33-trit accumulator. A 17-bit accumulator also mentioned in the source
  belongs to the 8-bit Booth MAC it uses for comparison.
- **Cell truth tables.** The cells compute exact ternary arithmetic, for
  example 1·2 = 2 with no carry and 2+1 = 10₃. Where the source's
  multiplication rules, tables and equations disagree with one another,
  arithmetic decided.
- **Multiplier tree.** The hierarchical multiplier follows the source's
  description: 1-trit multipliers, half and full T-adders, combined
  hierarchically. How the sub-products are added is this design's choice.
- **Own choices** where the source is silent:
  - the two-wire trit code;
  - the asynchronous clear;
  - `clken` gating every stage;
  - wrap-around on overflow.
- **Not built:** cumulative subtraction and saturation. The source lists
  them among what MAC units in general provide. Its proposed unit shows only
  multiply, accumulate and clear.
- **Not reproduced:** the source's FPGA results (1.3 mW, 35.6 ns,
  303 LUTs on a Spartan-3). They belong to its own implementation and tools.

## Files

`rtl/`

- `tern_pkg.sv`: trit type, the decoder and the encoder
- `t_mul1.sv`, `t_half_adder.sv`, `t_full_adder.sv`: the ternary cells
- `t_mul2.sv`: 2-trit multiplier
- `t_mul.sv`: N-trit multiplier tree
- `t_rca.sv`: ripple-carry adder
- `t_accumulator.sv`: adder plus register
- `mac_unit.sv`: the top level

`tb/`

- `tern_tb_pkg.sv`: integer ↔ trit-vector conversion and random trit vectors
- `tb_<module>.sv`: one self-checking testbench per module

## Simulating

Every testbench compares the design with plain integer arithmetic. Each one
ends by printing `TB_RESULT checks=<n> failures=<m>`, and each has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_t_mul1`, `tb_t_half_adder`, `tb_t_full_adder`, `tb_t_mul2` | exhaustive: 9, 9, 27 and 81 cases |
| `tb_t_rca` | 33-trit corner cases and 2000 random additions, carry-in 0..2 |
| `tb_t_mul` | 16-trit corner cases, including the largest operands, and 3000 random products |
| `tb_t_accumulator` | 3000 cycles against a model: random enables, asynchronous clears, forced wrap-around |
| `tb_mac_unit` | the full-size top, described below |

`tb_mac_unit` runs the top at its default size with no parameter overrides:

- It checks the three-edge latency exactly.
- It checks one accumulation per clock while one pair (11, 6) is held.
- It runs 4000 random cycles against a cycle-accurate model, with the
  pipeline frozen, clears and wrap-around.
- It counts how often each of those mechanisms happened, and fails if any of
  them never did.

To run one testbench with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mac_unit \
    rtl/tern_pkg.sv tb/tern_tb_pkg.sv tb/tb_mac_unit.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_mac_unit
```

For another module, replace `tb_mac_unit` with that module's testbench. The
`-y` options let Verilator find the modules each testbench uses. All
testbenches finish in well under a second of simulation time.

## Changing the size

- To change the operand width, set `mac_unit #(.N(...))`. N must be a power
  of two. `ACC_W` follows as 2N + 1 unless you set it.
- The testbenches use 64-bit integer reference models, and these are exact
  up to N = 16 with a 33-trit accumulator. Larger sizes need a wider
  reference model.

# 32-bit carry select adder on hybrid-logic 4-bit CLA blocks

A wide ripple-carry adder is slow because the carry has to walk through every
bit. This adder attacks the problem at two levels:

* **Across the word** it is a *carry select* adder. The upper 16 bits are added
  twice in parallel, once as if the carry from the lower half were 0 and once
  as if it were 1. When the lower half finishes, its carry-out only steers a
  row of 2:1 multiplexers. The worst path is one 16-bit adder plus one mux.
* **Inside each 16-bit adder** the basic unit is a 4-bit *carry look-ahead*
  (CLA) block. It computes all four carries of its nibble at once from the
  generate and propagate terms. Four such blocks are chained to make 16 bits.

The circuit this RTL models was designed at transistor level. Its point is
that the CLA's generate gate (AND) and propagate gate (XOR) use a *hybrid*
style: pass transistors plus a few static CMOS devices instead of full static
CMOS gates, and the output multiplexers are transmission gates. That choice
saves transistors, power and delay, but it does not change the logic. The RTL
therefore keeps the hierarchy and the per-cell case structure of the circuit,
and models each cell by its Boolean function. It is synthesizable,
combinational logic: no clock, no reset, no state.

## Block structure

```
csa32
├── adder16  u_lo    bits [15:0],  carry-in = cin     -> sum[15:0], C16
├── adder16  u_hi0   bits [31:16], carry-in = 0       -> candidate sum/C32
├── adder16  u_hi1   bits [31:16], carry-in = 1       -> candidate sum/C32
├── vector_mux2 (16 x tg_mux2)   sel = C16           -> sum[31:16]
└── tg_mux2                       sel = C16           -> cout (C32)

adder16 = 4 x cla4_hybrid chained C0 -> C4 -> C8 -> C12 -> C16

cla4_hybrid
├── 4 x hybrid_and   G_i = A_i & B_i
├── 4 x hybrid_xor   P_i = A_i ^ B_i
├── cla_carry4       C1..C4 from G, P, C0
└── 4 x hybrid_xor   S_i = P_i ^ C_i
```

Sizes are in `rtl/adder_pkg.sv`: `CLA_BITS = 4`, `HALF_BITS = 16`,
`WORD_BITS = 32`.

## The look-ahead carries (`cla_carry4`)

The carry recurrence is `C(i+1) = G(i) | P(i) & C(i)`. Rippling it would bring
back the chain the CLA exists to avoid, so each carry is its own two-level
gate, written out in full:

```
C1 = G0 | P0 C0
C2 = G1 | P1 G0 | P1 P0 C0
C3 = G2 | P2 G1 | P2 P1 G0 | P2 P1 P0 C0
C4 = G3 | P3 G2 | P3 P2 G1 | P3 P2 P1 G0 | P3 P2 P1 P0 C0
```

In the transistor circuit each line is one complex gate (a pull-up and
pull-down network followed by an inverter). The RTL builds the same
sum-of-products with loops, so a synthesis tool sees the flat form, not a
ripple. The sum of each bit is the second XOR of a two-XOR cascade,
`S_i = P_i ^ C_i`, where the first XOR is the propagate cell itself.

Between the four CLA blocks of a 16-bit adder, the carries do ripple (C4, C8,
C12). There is no second level of look-ahead. Speed across the word comes from
carry selection instead.

## The hybrid cells

**Generate (`hybrid_and`).** An inverter makes `B'`. A pMOS gated by `B'` passes
`A` to the output when `B = 1`. When `B = 0`, an nMOS gated by `B'` pulls the
output low. A further nMOS gated by `A` passes `B` when `A = 1`; in that case
`B` is 0, so it only reinforces the low level. Result: `G = B ? A : 0 = A & B`.

**Propagate (`hybrid_xor`).** Four transistors. A pMOS gated by `B` passes `A`
(used when `B = 0`). A pMOS gated by `A` passes `B` (used when `A = 0`). Two
series nMOS gated by `A` and `B` pull the output low when both are 1. Result:
`P = A ^ B`. The always_comb block follows these three cases in order.

**Multiplexer (`tg_mux2`, `vector_mux2`).** Each input has a transmission gate
to the output, driven by the select and its complement. `sel = 1` passes
`in1`. The vector mux is 16 of these sharing one select line.

## Carry selection (`csa32`)

Both upper adders start at the same time as the lower one. When the lower
adder's carry-out C16 is 0, the mux takes the sum and carry-out of `u_hi0`;
when it is 1, those of `u_hi1`. The carry-out C32 of the whole adder is chosen
the same way. An immediate assertion checks in simulation that the carry-in-1
candidate always equals the carry-in-0 candidate plus one, which is what makes
the selection correct. The per-bit carry outputs of the 16-bit adders are left unused
at this level.

### Interface

| port   | dir | width | meaning                                   |
|--------|-----|-------|-------------------------------------------|
| `a`    | in  | 32    | operand A                                 |
| `b`    | in  | 32    | operand B                                 |
| `cin`  | in  | 1     | carry into bit 0 (tie to 0 for A + B)     |
| `sum`  | out | 32    | A + B + cin, low 32 bits                   |
| `cout` | out | 1     | carry out of bit 31 (C32)                 |

All outputs are combinational functions of the inputs.

`adder16` and `cla4_hybrid` also output `c`, the carry into each bit position
(bit 0 is the carry-in). Each block's own carry-out is `cout`.

## Where this RTL departs from, or fills in, the reference design

* **Carry-in port.** The reference block diagram shows no carry input on the
  lower 16-bit adder. `cin` is added here; with `cin = 0` the adder is exactly
  the reference's A + B.
* **Sum multiplexer split.** The reference diagram draws the upper sum mux as
  two boxes (bits 16-23 and "24-32") next to a separate C32 mux. Its text
  describes one 16-bit vector mux plus the C32 mux. The RTL follows the text:
  a 16-bit mux for sum[31:16] and a 1-bit mux for C32.
* **Mux select polarity.** The transmission-gate schematic does not say which
  select level passes which input. Here select = 1 takes the candidate
  computed with carry-in 1.
* **Sum XOR cell.** The reference says only that each sum bit comes from two
  cascaded XORs. Here the propagate XOR is reused as the first one, and the
  hybrid XOR cell is used for the second.
* **C1 gate input.** One transistor of the reference C1 gate is labelled G2.
  The carry equation for C1 uses G0, and G0 is what is built.
* **Only the logic is modelled.** Transistor sizing, the 1 V supply, power and
  delay have no RTL counterpart. The reference reports about 0.56 ns and
  323 µW for the 32-bit adder in a 90 nm process. These figures are not
  reproduced or checked here.
* **Not included.** The static-CMOS CLA, the CMOS-mux carry select adder and
  the 32-bit ripple-carry adder exist in the reference only for comparison.
  They are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench        | what it checks                                                     |
|------------------|--------------------------------------------------------------------|
| `tb_hybrid_and`  | all 4 input cases against the AND truth table                      |
| `tb_hybrid_xor`  | all 4 input cases against the XOR truth table                      |
| `tb_tg_mux2`     | all 8 input cases                                                  |
| `tb_vector_mux2` | walking ones/zeros on both inputs, 500 random vectors              |
| `tb_cla_carry4`  | all 512 G/P/C0 combinations against the recursive carry definition |
| `tb_cla4_hybrid` | all 512 A/B/cin combinations: sum, carry-out, per-bit carries      |
| `tb_adder16`     | carries across each block boundary, 2000 random vectors            |
| `tb_csa32`       | corners and 20 000 random vectors at full 32-bit size              |

`tb_csa32` also counts how often each mechanism occurred, and fails if one
never did:

* C16 = 0 and C16 = 1 (each upper candidate is selected);
* an all-propagate upper half, where the two candidate carry-outs differ;
* a carry out of every one of the eight CLA blocks;
* C32 = 1;
* a carry travelling the full length, from bit 0 to C32.

Run a testbench with Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/adder_pkg.sv tb/tb_csa32.sv --top-module tb_csa32
./obj_dir/Vtb_csa32
```

To test another module, swap in its testbench. Every testbench finishes in well
under a second.

# Sparse-4 diminished-1 modulo 2^16+1 adder

Residue number systems, Fermat-number transforms and some ciphers need fast
addition modulo 2^n+1. A residue modulo 2^n+1 takes values 0..2^n, so it needs
n+1 bits in ordinary binary. The *diminished-1* code stores it in n bits plus a
flag instead:

| value A | zero bit `az` | number part `A*` |
|---------|---------------|------------------|
| 0       | 1             | all zeros        |
| 1..2^n  | 0             | A - 1            |

Example for n = 4 (modulus 17): A = 5 is `az = 0`, `A* = 0100`.

When both operands are non-zero, the sum in this code is an
*inverted-end-around-carry* (IEAC) addition of the number parts:

    S* = (A* + B* + cin) mod 2^n,   cin = NOT(carry out of A* + B*)

This RTL implements a 16-bit IEAC adder in which the end-around carry costs no
extra logic level. It uses a *sparse* parallel-prefix carry network: the
network forms only the carries at 4-bit boundaries, and 4-bit carry-select
blocks produce the sum bits. The prefix cells come in two polarities that
alternate from stage to stage, so the network needs no inverters between
stages. Purely combinational logic around the adder handles zero operands.

## Top level

`sparse4_mod2n1_adder` is combinational and has no clock:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `az`, `a` | in | 1, 16 | operand A: zero bit, number part |
| `bz`, `b` | in | 1, 16 | operand B |
| `sz`, `s` | out | 1, 16 | sum (A + B) mod 65537, diminished-1 |

Inside it, data passes through these parts in order:

```
 a,b ──► dim1_preprocess ──(gn,k)──► sparse4_ieac_carry ──carries──┐
 (stage 0: NAND, NOR, XOR)  │        (stages 1-4)                  ▼
                            └──(h,gn,k)──────────────► 4 × cs_block ──► s_ieac
 az,bz,a,b,h,s_ieac ──► dim1_zero_select ──► sz, s
```

The constants `N = 16`, `GROUP = 4` and the `dim1_t` struct (zero bit plus
number part) are in `mod2n1_pkg`.

## Resolving the end-around carry without a loop

Connecting the carry out back to the carry in through an inverter would form a
combinational loop. Adding one more prefix level after a normal adder removes
the loop, but it also adds delay. This design avoids both by working out the
carries in closed form. Let G(i:j) be the generate of bits i..j. Let
T(i:j) = AND of (a_k OR b_k) be their transmit. Then the carries are:

    carry into bit 0:      c(-1) = NOT G(15:0)
    carry out of bit i:    c(i)  = G(i:0) OR T(i:0) AND NOT G(15:i+1)

The second line holds because the prefix operator is idempotent in an inverted,
circular way. In effect, the bits above i wrap around below bit 0, and there
they act with **inverted operands**. For inverted operands, the
generate/transmit pair of a bit group becomes

    (generate', transmit') = (NOT G AND K,  NOT G)      with K = NOT T

Both terms come cheaply from the complemented group signals that the
even-numbered stages produce anyway.

When A* + B* = 2^16 - 1, the carry out is 0 and every bit propagates. The
equations then give c(-1) = 1 and all carries 1, so S* comes out as all zeros.
That is the correct number part of a zero sum (A + B = 2^16 + 1 ≡ 0). The zero
bit is set separately (see below).

## The five stages and the two cell polarities

Carry logic in CMOS is cheapest as inverting gates: AOI21, OAI21, NAND and NOR.
The network therefore uses two versions of each prefix cell:

| cell | inputs | outputs | gates |
|------|--------|---------|-------|
| `odd_dot` | (Gbar, K) of two spans | (G, Kbar) | OAI21 + NOR2 |
| `even_dot` | (G, Kbar) of two spans | (Gbar, K) | AOI21 + NAND2 |
| `odd_semidot` | (Gbar, K) and an inverted lower carry | carry | OAI21 |
| `even_semidot` | (G, Kbar) and a lower carry | inverted carry | AOI21 |

Odd stages use odd cells and even stages use even cells, so the polarities
line up and adjacent stages need no inverters. An edge that skips a stage, or
a wrapped term that needs the opposite polarity, gets an inverter (one NAND2 in
one case). For 16 bits the network in `sparse4_ieac_carry` is:

| stage | cells | forms |
|-------|-------|-------|
| 0 (`dim1_preprocess`) | NAND, NOR, XOR per bit | Gbar_i, K_i, half sum h_i |
| 1 odd | 8 × `odd_dot` at bits 1,3,…,15 | 2-bit (G, Kbar) |
| 2 even | 4 × `even_dot` at bits 3,7,11,15 | 4-bit group (Gbar_j, K_j), j = 0..3 |
| 3 odd | 3 × `odd_dot`: group j with group j-1 (j = 1..3) | G(7:0), G(11:4), G(15:8) with their transmits |
| | 1 × `odd_dot`: group 0 with group 3 wrapped | G(3:0) OR T(3:0)·Gbar3·K3, T(3:0)·Gbar3 |
| | 1 × `odd_semidot`: group 0 with group 3 wrapped | x = G(3:0) OR T(3:0)·NOT G(15:12) |
| 4 even | 4 × `even_semidot` | carries into the groups (below) |

Stage 4 forms these carries:

- carry into group 0: `NOT(G(15:8) OR T(15:8)·G(7:0))` = NOT G(15:0). This is
  the true end-around carry, because the even cell inverts.
- inverted carry into group 1: from the wrapped stage-3 node of group 0, with
  lower input NOT G(11:4).
- inverted carry into group 2: from G(7:0), with lower input NOT G(15:8).
- inverted carry into group 3: from G(11:4), with lower input x.

Group 0 gets a true carry and groups 1-3 get inverted ones. Each `cs_block` has
a `CIN_ACTIVE_LOW` parameter that swaps its select inputs for an inverted
carry, which costs no logic.

The carry path is four prefix levels (log2 16) plus the preprocessing gate and
the carry-select multiplexer. No extra level is spent on the end-around carry.

## Carry-select blocks

Each `cs_block` runs two 4-bit ripple chains on its bits' generate and
transmit. One chain assumes a block carry-in of 0 and the other assumes 1. The
block XORs each chain with the half sums and uses the group carry from the
network to choose between the two results. The generate and kill of a block's
top bit are not used, because only the carry network needs a block's carry out.

## Zero operands

`dim1_zero_select` applies the rules of the diminished-1 code:

| az | bz | sz | s |
|----|----|----|---|
| 0 | 0 | 1 if every half sum is 1 (A*+B* = 2^16-1), else 0 | IEAC sum |
| 1 | 0 | 0 | B* |
| 0 | 1 | 0 | A* |
| 1 | 1 | 1 | 0 |

## Where this RTL makes its own choices

- **Network wiring.** The stage count (five), the four cell types, the
  odd/even alternation and the inverter rule follow the published
  architecture. The placement of the wrap-around nodes and the NAND2 for
  group 3's wrapped generate were derived here from the carry equations
  above, then checked by simulation.
- **Stage-4 cells.** Only even semi-dot cells are used in stage 4. The single
  odd semi-dot is in stage 3. This keeps to the rule that odd stages use odd
  cells.
- **Zero handling.** Zero operands are handled by a selection stage after the
  adder rather than inside it. The zero flag of a sum of two non-zero operands
  is taken from the AND of all half sums.
- **Zero bits as ports.** The zero bits are ports, which gives 51 port bits. A
  version of this adder that has only 16-bit operands and result (48 I/O bits)
  would tie `az`/`bz` to 0 and leave `sz` open.
- **Kill polarity.** The generate and kill leave stage 0 in complemented form
  (NAND and NOR). This choice makes stage 1 odd.
- **Fixed width.** The width is fixed at 16 bits. `sparse4_ieac_carry` is
  wired by hand for four groups. Other widths would need a new stage-3/4
  network: the wrapped group terms must then be built from inverted-operand
  pairs, not simply from complemented signals.

Not included: the plain (non-modular) sparse-4 integer adder and the other
parallel-prefix adders (Ladner–Fischer, Kogge–Stone) that this adder is
usually compared with. The weighted (n+1-bit) modulo 2^n+1 adder is also left
out.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

- **Cells.** `tb_odd_dot`, `tb_even_dot`, `tb_odd_semidot` and
  `tb_even_semidot` try every input combination against the prefix operator.
- **Stage 0 and zero selection.** `tb_dim1_preprocess` and
  `tb_dim1_zero_select` check against per-bit and per-case truth tables.
- **Carry-select block.** `tb_cs_block` tries all 4-bit operand pairs with
  both carry values and both carry polarities.
- **Carry network.** `tb_sparse4_ieac_carry` checks 200,000 operand pairs
  against integer arithmetic. The pairs include sums of 2^16-1 and single
  broken propagate chains.
- **Whole adder.** `tb_sparse4_mod2n1_adder` runs the top at its default size.
  It checks about 560,000 additions against (A + B) mod 65537:
  - corner values;
  - additive inverses;
  - every A against B = 1, 0 and 65536, and the reverse;
  - random pairs.

  It counts each case: carry out, end-around increment, zero sum of two
  non-zero operands, A zero, B zero, both zero. It fails if any case never
  occurs.

All testbenches pass. Breaking any one module in a way that matters makes its
testbench fail.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl rtl/mod2n1_pkg.sv tb/tb_sparse4_mod2n1_adder.sv \
          --top-module tb_sparse4_mod2n1_adder -o sim && ./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; the package is
named explicitly because it must be read first. Swap the testbench file and `--top-module` to run any other testbench. The
full adder test takes well under a second.

# Reversible universal adder/subtractor bit slice

This is one bit of an arithmetic unit that adds and subtracts in the same
circuit, using only reversible gates. From three input bits A, B and C it
produces four outputs at the same time:

| output     | function         | meaning                              |
|------------|------------------|--------------------------------------|
| `cout`     | MAJ(A, B, C)     | carry out of A + B + C               |
| `bout`     | MAJ(~A, B, C)    | borrow out of A − B − C              |
| `sum_diff` | A ⊕ B ⊕ C        | sum bit of the addition, and also the difference bit of the subtraction |
| `gar`      | A ⊕ C            | garbage output, kept so the mapping can be reversed |

The design rests on one observation. Sum and difference are the same bit. The
carry and the borrow are both three-input majorities, and they differ only in
whether A is inverted. So one majority-based reversible gate, the **RQG**,
gives carry and borrow together. Two Feynman gates then fan B out and build the
parity. There is no mode input. Both results are always present, and the user
takes the carry for addition or the borrow for subtraction.

The circuit was conceived for quantum-dot cellular automata (QCA). In QCA the
three-input majority voter is the native gate, and a signal cannot be copied
for free. The RTL keeps that character: every logic function in it is built
from the `maj3` module, and fan-out of B goes through a Feynman gate fed with a
constant 0. As plain CMOS logic it synthesises to ordinary AND/OR/NOT gates.

## The gates

**Majority gate, `maj3`.** `y = a·b + b·c + a·c`. A majority gate with one input
held at 0 is an AND gate; with one input held at 1 it is an OR gate. In QCA
those constants are fixed-polarisation cells (−1.00 and +1.00).

**XOR, `xor2`.** QCA has no native XOR, so it is composed of three majority gates:
`MAJ(MAJ(a, ~b, 0), MAJ(~a, b, 0), 1)`, which is `a·~b + ~a·b`. This particular
arrangement is a common QCA construction, chosen here. The source design only
specifies that its XOR uses fixed ±1.00 cells.

**Feynman gate, `fg_gate`** (controlled NOT, 2×2). `p = a`, `q = a ⊕ b`. The
gate is its own inverse. With `b = 0` it makes a copy of `a`. That is how the
circuit fans out B without breaking reversibility.

**RQG gate, `rqg_gate`** (3×3):

    y1 = MAJ(x1, x2, x3)
    y2 = MAJ(~x1, x2, x3)
    y3 = x1 ⊕ x3

Its truth table is a permutation of the eight input patterns:

| x1 x2 x3 | y1 y2 y3 |
|----------|----------|
| 000 | 000 |
| 001 | 011 |
| 010 | 010 |
| 011 | 111 |
| 100 | 001 |
| 101 | 100 |
| 110 | 101 |
| 111 | 110 |

The third output is X1 ⊕ X3, not X1 ⊕ X2. Only with X1 ⊕ X3 is the gate
reversible with the first two outputs, and it is the value the final Feynman
gate needs.

## The universal circuit, `uc_top`

```
            +-------+ B          +-------+
 B ---------|       |------------| x2    |-- y1 ------------------- cout
 o (=0) ----| FG #1 |     A -----| x1 RQG|-- y2 ------------------- bout
            |       |--+  C -----| x3    |-- y3 (A^C) --+
            +-------+  |         +-------+              |  +-------+
                       |  B^o                           +--| a     |-- p -- gar      = A^C
                       +-----------------------------------| b FG#2|-- q -- sum_diff = A^B^C^o
                                                           +-------+
```

* FG #1 turns (B, o) into (B, B ⊕ o). With o = 0 both are copies of B.
* The RQG turns (A, B, C) into carry, borrow and A ⊕ C.
* FG #2 turns (A ⊕ C, B ⊕ o) into the garbage output A ⊕ C and the sum/difference.

Cost in reversible-logic terms: three gates, one constant input and one
garbage output. As a netlist it has 11 majority gates: two in the RQG for
carry and borrow, and three in each of the three XORs. The longest path, from
`a` or `c` to `sum_diff`, is four majority levels deep.

**Reversibility and the constant input.** The constant input is a port, `o`,
rather than a wire tied to 0 inside. The four inputs (A, B, o, C) map one-to-one
onto the four outputs for both values of `o`, so the whole 4×4 function can be
tested and inverted. For add/subtract use, drive `o` with 0. With `o = 1` the
carry, borrow and garbage outputs are unchanged, and `sum_diff` is inverted.

**Chaining bits.** `uc_top` is one bit position. For an N-bit adder, connect
each slice's `cout` to the next slice's `c`. For an N-bit subtractor computing
A − B, connect `bout` to the next `c` and put the subtrahend bit on `b`. The
testbench builds both chains at 4 bits. The repository itself contains no
multi-bit wrapper, because the source design stops at one bit.

## Timing

All modules are combinational: no clock and no reset. In QCA, signals move
through the layout in four-phase clock zones (switch, hold, release, relax,
each zone a quarter period behind the one before). The QCA layout is reported
to have a latency of 1.74 clock cycles, 227 cells and 0.27 µm². These are
properties of the cell layout. They have no counterpart in this RTL, and the
layout itself is not reproduced. The output of `uc_top` is valid one
combinational delay after the inputs change. A designer who needs a
registered slice should add flip-flops around it.

## Departures from the source description and points to check

* The borrow is MAJ(~A, B, C) = ~A·B + B·C + ~A·C, the borrow of A − B − C. One
  of the source's subtractor equations writes it in a different form. That form
  does not match its own universal-circuit truth table, and it was not followed.
* The truth table given for a stand-alone full subtractor does not correspond to
  subtraction, and it was not used. Subtraction is checked against integer
  arithmetic instead.
* The Feynman gate's XOR is also built from majority gates, which makes the
  netlist majority-only. The source does not say how its Feynman gates are laid
  out.
* In FG #1, the choice of which output is the pass-through only matters when
  `o = 1`. Here the pass-through goes to the RQG.
* Multiplication and division are mentioned as goals of the wider ALU, but they
  are not described and are not built.

## Files

| file | contents |
|------|----------|
| `rtl/maj3.sv`      | three-input majority gate |
| `rtl/xor2.sv`      | XOR from three majority gates with constant inputs |
| `rtl/fg_gate.sv`   | Feynman (CNOT) gate |
| `rtl/rqg_gate.sv`  | RQG reversible gate |
| `rtl/uc_top.sv`    | universal adder/subtractor, the top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Each testbench drives its module exhaustively. It compares the outputs with
references computed independently: counting ones for the majority, the
published truth table for the RQG and the universal circuit, and integer
arithmetic for addition and subtraction. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

`tb/uc_top_tb.sv` runs the top level with its default configuration (the top
has no parameters). It checks the following:

* the eight-row truth table;
* addition and subtraction for every input;
* the one-to-one property over all 16 inputs;
* the input sequence 000…111 applied twice;
* a 4-bit ripple adder and a 4-bit ripple subtractor built from eight slices,
  over all 256 operand pairs, with carry-in and borrow-in at both values.

It also counts carries, borrows, full-length carry and borrow ripples, and uses
of `o = 1`, and it fails if any of these never happens.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module uc_top_tb tb/uc_top_tb.sv -Mdir obj_uc_top
./obj_uc_top/Vuc_top_tb
```

To run another testbench, replace `uc_top_tb` with that testbench's name. For
lint only, use `verilator --lint-only -Wall -y rtl +libext+.sv rtl/uc_top.sv`.

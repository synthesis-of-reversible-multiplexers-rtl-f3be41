# Reversible multiplexers from Feynman, Fredkin, Peres and BJN gates

A reversible gate has as many outputs as inputs, and each output pattern
belongs to exactly one input pattern. Because it erases no information, it
avoids the heat that, in principle, is released whenever a bit is erased. A
multiplexer is not reversible on its own: four data bits and two selects go
in and one bit comes out. To build one from reversible gates, you feed some
gate inputs with fixed **constant inputs** (0 or 1). You then keep the gate
outputs you don't need as **garbage outputs**, which carry the information
the multiplexer would otherwise throw away.

This RTL implements:

* a small library of reversible gates (Feynman, Fredkin, Peres, Toffoli,
  BJN and the "New" gate);
* a reversible **2:1 multiplexer** made from a single Fredkin gate;
* a reversible **4:1 multiplexer** made from six gates, with 4 constant
  inputs and 10 garbage outputs;
* a top level, `rev_mux_top`, that places the two multiplexers and the two
  gates they don't use side by side.

Everything is combinational. There is no clock, no reset and no state, and an
output is valid as soon as its inputs settle. The RTL models the logic
function. It says nothing about power. The motivation for this circuit style
is a transistor-level comparison in a 180 nm process: about 13 pW for the
reversible 2:1 mux against about 55 pW for a NOT/AND/AND/OR mux. That is a
property of the transistor circuit, which this RTL does not model.

## The gate library

Every gate passes its first input through (`P = A`) and changes the others.

| Gate (module)            | Inputs | Outputs                                   | Use as a logic gate            |
|--------------------------|--------|-------------------------------------------|--------------------------------|
| Feynman (`feynman_gate`) | A, B   | P = A, Q = A xor B                        | B = 1 gives A and not A        |
| Fredkin (`fredkin_gate`) | A, B, C| P = A, Q = A'B + AC, R = AB + A'C         | Q is a 2:1 mux, A the select   |
| Peres (`peres_gate`)     | A, B, C| P = A, Q = A xor B, R = AB xor C          | C = 0 gives R = A and B        |
| Toffoli (`toffoli_gate`) | A, B, C| P = A, Q = B, R = AB xor C                | C = 0 gives R = A and B        |
| BJN (`bjn_gate`)         | A, B, C| P = A, Q = B, R = (A or B) xor C          | C = 0 gives R = A or B         |
| New (`new_gate`)         | A, B, C| P = A, Q = AB xor C, R = (A or C) xor B   | (not used here)                |

The Fredkin gate is a controlled swap. When A = 0, B and C go straight
through to Q and R. When A = 1, they change places. The Feynman, Fredkin,
Toffoli and BJN gates are their own inverses. The Peres and New gates are
bijections but not self-inverse.

Every gate module has one parameter, `WIDTH` (default 1). It applies the gate
bit by bit to a bus of that width.

## 2:1 multiplexer (`rev_mux2`)

A single Fredkin gate is the whole circuit. The select `s` drives the control
input A, data input `a` drives B, and data input `b` drives C. The gate's Q
output is then `s ? b : a`, so the mux passes `a` while `s` is low and `b`
while it is high. The other two outputs are garbage:

* `g1` is a copy of `s`;
* `g2` is the input that was not selected.

No constant input is needed. Together, `{q, g1, g2}` identifies `{s, a, b}`
uniquely, and the testbench checks this.

## 4:1 multiplexer (`rev_mux4`)

The 4:1 mux computes `y = I[{s1,s0}]`. It takes the usual two-level form
(two 2:1 muxes on `s0`, then a choice between them on `s1`) and builds every
operation from a reversible gate:

```
 s1, 1 ──► Feynman ──P = s1──────────────────────────┐
                   └─Q = ~s1─────────┐               │
 s0,i0,i1 ─► Fredkin ─Q─► Peres(A=~s1, B, C=0) ─R─┐  │
              P=g1 R=g2        P=g3 Q=g4           │  │
 s0,i2,i3 ─► Fredkin ─Q─► Peres(A=s1,  B, C=0) ─R─┼──┘
              P=g5 R=g6        P=g7 Q=g8           │
                          BJN(A=R of i2/i3 Peres,  │
                              B=R of i0/i1 Peres, C=0) ─R─► y
                              P=g9 Q=g10
```

The circuit works in three steps.

1. **Select phases.** A Feynman gate with its B input tied to 1 turns `s1`
   into two lines: `s1` (P) and `~s1` (Q). A plain fan-out with an inverter
   would not be reversible.
2. **Pair selection.** Two Fredkin gates, both controlled by `s0`, make the
   2:1 choices `s0 ? i1 : i0` and `s0 ? i3 : i2` on their Q outputs. `s0` is
   fanned out to both gates.
3. **Gating and merging.** Each Peres gate has C tied to 0, so it acts as an
   AND. The i0/i1 result is ANDed with `~s1` and the i2/i3 result with `s1`.
   At most one of the two products can be 1. A BJN gate with C tied to 0
   ORs them into `y`.

So there are four constant inputs: one 1 on the Feynman gate and three 0s, on
the two Peres gates and the BJN gate. Every gate output except the final
`y`, the two select phases and the internal links is kept as garbage. That
gives ten garbage outputs, on port `g`, where `g[k-1]` carries gk:

| Garbage | Comes from                   | Value                        |
|---------|------------------------------|------------------------------|
| g1      | P of the i0/i1 Fredkin       | s0                           |
| g2      | R of the i0/i1 Fredkin       | input of i0/i1 not selected  |
| g3      | P of the i0/i1 Peres         | ~s1                          |
| g4      | Q of the i0/i1 Peres         | ~s1 xor (s0 ? i1 : i0)       |
| g5      | P of the i2/i3 Fredkin       | s0                           |
| g6      | R of the i2/i3 Fredkin       | input of i2/i3 not selected  |
| g7      | P of the i2/i3 Peres         | s1                           |
| g8      | Q of the i2/i3 Peres         | s1 xor (s0 ? i3 : i2)        |
| g9      | P of the BJN gate            | s1 & (s0 ? i3 : i2)          |
| g10     | Q of the BJN gate            | ~s1 & (s0 ? i1 : i0)         |

From `{y, g}` you can recover all six inputs: `g7` gives `s1`, `g1` gives
`s0`, and each pair's selected and unselected values sit in g4/g2 and g8/g6.
The testbench checks that all 64 input patterns give distinct outputs. The
counts of constants and garbage are in `rtl/rev_mux_pkg.sv`
(`MUX4_CONST_INPUTS`, `MUX4_GARBAGE`), together with the constant values.

Ports:

| Port         | Width      | Meaning                          |
|--------------|------------|----------------------------------|
| `s1`, `s0`   | 1          | select, `y = I[{s1,s0}]`         |
| `i0`..`i3`   | WIDTH      | data inputs                      |
| `y`          | WIDTH      | output                           |
| `g`          | 10 × WIDTH | garbage g1..g10, `g[k-1]` = gk   |

When `WIDTH > 1`, each bit slice has its own set of gates, and all slices
share the selects.

## Top level (`rev_mux_top`)

The top instantiates `rev_mux4`, `rev_mux2`, `toffoli_gate` and `new_gate`
with no connections between them. Each has its own port group:

* `mux4_s1`, `mux4_s0`, `mux4_i[3:0]`, `mux4_y`, `mux4_g[9:0]`;
* `mux2_s`, `mux2_a`, `mux2_b`, `mux2_q`, `mux2_g1`, `mux2_g2`;
* `tof_a/b/c` → `tof_p/q/r`;
* `new_a/b/c` → `new_p/q/r`.

The Feynman, Fredkin, Peres and BJN gates appear inside the multiplexers.
The Toffoli and New gates belong to the same gate library but neither mux
uses them, so they are brought out on their own ports. The top has one
parameter, `WIDTH` (default 1).

## Choices and departures

* **Fredkin output convention.** Descriptions of this gate don't all agree
  on which of Q and R gets the swapped value. Here it is the standard one:
  `Q = A'B + AC`, so B reaches Q when A = 0. With the opposite convention,
  the 2:1 mux would pass `b` while `s` is low.
* **New gate, R output.** `R = (A or C) xor B` is used. The shorter form
  `R = AC xor B`, which is sometimes given, maps inputs 101 and 110 to the
  same output, so it is not reversible. Note also that the New gate usually
  cited in the literature has `R = A'C' xor B`, the complement of the output
  used here. Both variants are reversible.
* **Select order.** The 4:1 mux selects i0 at `s1s0 = 00`, i1 at 01, i2 at
  10 and i3 at 11, as a standard 4:1 mux does. This ordering is a choice of
  this implementation.
* **Garbage naming for the 2:1 mux.** The Fredkin gate's unused P and R
  outputs are brought out as `g1` and `g2`.
* **Bus width.** `WIDTH` is an addition. The published circuits are single
  bit, which is the default.
* **Not modelled.** The transistor-level realisation of the reversible 2:1
  mux and its power figures are not modelled. The conventional
  NOT/AND/AND/OR 2:1 mux is not included either, because it serves only as
  the baseline for the power comparison.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

* **Gate testbenches.** They drive all input patterns into the single-bit
  gate and compare against a truth table written out in the testbench. They
  also check that the outputs form a permutation, and then check a 5-bit
  instance bit by bit with random buses.
* **`rev_mux2_tb`.** It applies all 8 patterns and checks `q`, `g1` and
  `g2`, that the mapping is one-to-one, and a 6-bit instance.
* **`rev_mux4_tb`.** It applies all 64 patterns and checks `y` and each of
  g1..g10 against hand-derived values. It also checks that the 64 outputs
  are distinct, and a 3-bit instance.
* **`rev_mux_top_tb`.** It runs the top at its default parameters. It sweeps
  all 2^15 combinations of the four parts' inputs and checks every output.
  It also counts how often each mux select value, the Toffoli inversion and
  the New gate's A = 1 half occur, and fails if any never does.

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/rev_mux_pkg.sv \
          tb/rev_mux4_tb.sv --top-module rev_mux4_tb
./obj_dir/Vrev_mux4_tb
```

Replace `rev_mux4` with any other module name. All testbenches finish in
well under a second.

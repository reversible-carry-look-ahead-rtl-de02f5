# Optical reversible carry look-ahead adder on MZI switches

This is a 4-bit carry look-ahead adder/subtractor built only from
reversible gates, with each gate made of semiconductor-optical-amplifier
(SOA) Mach-Zehnder interferometer (MZI) switches. A reversible gate maps
each input pattern to a distinct output pattern, so no information is
erased. The MZI switch is the physical device: a control beam steers a
signal beam to one of two output ports. The RTL models all of it at the
level of light present (1) and absent (0). It can be simulated, checked
for function, and counted in switches and switch stages. It says nothing
about optical power, wavelengths or the SOA physics.

Two variants of the adder are provided, `cla_design1` and `cla_design2`.
They compute the same thing from the same gates. Design 2 adds Feynman
"copying" gates so that the generate signals are duplicated by a gate
rather than by plain fan-out.

## The carry written with XOR

The textbook look-ahead carry is `C(i+1) = G(i) + P(i)·C(i)`, where
`G = A·B` is the generate and `P = A xor B` the propagate. `G(i)` and
`P(i)` can never both be 1, so the two product terms are never both 1.
That means the OR can be replaced by an XOR:

    C(i+1) = G(i) xor P(i)·C(i)
    S(i)   = P(i) xor C(i)

Expanded, the carry out of a 4-bit adder is

    C4 = G3 ^ P3·G2 ^ P3·P2·G1 ^ P3·P2·P1·G0 ^ P3·P2·P1·P0·C0

This rewrite is what makes the adder cheap in reversible logic. An XOR
is a single Feynman gate, and an AND paired with an XOR is a single Peres
gate. The testbenches check the adders' carry out against both the
arithmetic sum and this expanded expression.

## The MZI switch and the beam combiner

`mzi_switch` has a signal input `in_beam` and a control input `ctrl`.
With no control pulse, the interferometer is balanced and the signal
leaves by the cross port. A control pulse saturates one SOA, shifts its
phase and moves the signal to the bar port:

    bar_port   = in_beam & ctrl
    cross_port = in_beam & ~ctrl

`beam_combiner` merges two beams into one, which is an OR. Every
combiner in this design joins two beams that can never be lit at the
same time, so it also acts as an XOR. A deferred assertion in the module
flags any violation of that rule in simulation. A beam splitter is just
fan-out of a net, so it has no module of its own.

Only MZI switches count towards a circuit's **optical cost**. Combiners
and splitters are free. The **optical delay** is the number of MZI
stages on the longest path, in units of one switch delay Δ.

## Gate library

The gates' truth functions are the standard ones. Their MZI arrangements
are this design's own. Each arrangement is built from the same XOR
element: X passes a switch controlled by Y, Y passes a switch controlled
by X, and the two cross ports (`~Y&X` and `~X&Y`) are combined.

| Gate | Module | Function | MZIs | MZI stages |
|---|---|---|---|---|
| Feynman (controlled NOT) | `ofg` | P = A, Q = A ^ B | 2 | 1 |
| Peres | `opg` | P = A, Q = A ^ B, R = A·B ^ C | 4 | 2 |
| Toffoli (controlled-controlled NOT) | `otg` | P = A, Q = B, R = A·B ^ C | 3 | 2 |

In `opg`, the bar port of the first switch (the one B passes under
control of A) supplies A·B. That term then goes into a second XOR
element together with C. With C = 0, the Peres gate delivers both
A xor B and A·B, which is exactly a propagate/generate pair. With B = 0,
a Feynman gate copies A onto both outputs. That is the copying gate.

The Toffoli gate is part of the library, but neither adder uses it. The
top level brings it out on its own pins. The usual quantum construction
of the Toffoli gate uses controlled-V gates (square roots of NOT). Those
have no two-valued equivalent, so `otg` is built directly from switches.

## One bit of the adder

Each bit `i` of `cla_design1` uses four gates:

1. `ofg(sub, B[i])` gives `B'[i] = B[i] ^ sub` (the subtract mode, see below).
2. `opg(A[i], B'[i], 0)`: Q is the propagate `P[i]` and R is the generate `G[i]`.
3. `opg(P[i], C[i], 0)`: Q is the sum `S[i] = P[i] ^ C[i]` and R is `P[i]·C[i]`.
4. `ofg(G[i], P[i]·C[i])`: Q is the carry `C[i+1] = G[i] ^ P[i]·C[i]`.

One more Feynman gate forms `C[0] = cin ^ sub`.

`cla_design2` adds a fifth gate per bit, `ofg(G[i], 0)`, between steps 2
and 4. Its two identical outputs feed the `g` output and the carry gate.
Design 2's description names the copying gate for G0. Here every
`G[i]` is copied, because every generate signal is used twice.

The gates chain bit to bit through the carry gate, so the longest path
is the carry path. The expanded look-ahead form above is what this chain
computes, not a separate block of wide AND gates.

### Subtraction

With `sub = 1`, B is inverted and the carry in is inverted. So
`sub = 1, cin = 0` gives `A - B` in two's complement. `cout = 1` then
means no borrow, and `cin = 1` subtracts one more (borrow in). The adder
is meant to subtract as well as add, but the exact wiring of the mode is
this design's own: Feynman gates controlled by `sub`.

### Cost and delay at 4 bits

These are counted from the RTL. Each MZI is one stage, and inputs are
at stage 0.

| | MZI switches | Carry out at | Last sum bit at |
|---|---|---|---|
| `cla_design1` | 50 = 4·(2·2 + 2·4) + 2 | 14 Δ | 12 Δ |
| `cla_design2` | 58 = design 1 + 4·2 | 14 Δ | 12 Δ |

For `WIDTH = N`, the carry out is ready at stage 3N + 2 in both designs.
In design 2 the copied generate for bit 0 arrives at the carry gate at
stage 4. That is the same stage as `P[0]·C[0]`, so the copying gates
do not lengthen the critical path. The switch counts are also available
as `OPTICAL_COST` in each adder and as functions in `cla_mzi_pkg`.

## Interfaces

The adders (`WIDTH` defaults to 4, from `cla_mzi_pkg::CLA_WIDTH`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry in (borrow in, active low, when subtracting) |
| `sub` | in | 1 | 0 = add, 1 = subtract |
| `sum` | out | WIDTH | sum or difference |
| `cout` | out | 1 | carry out (1 = no borrow when subtracting) |
| `g`, `p` | out | WIDTH | generate and propagate of each bit, after the mode inversion of B |

`cla_mzi_top` places the two adders side by side. Each has its own pins,
prefixed `d1_` and `d2_`. The top also has the Toffoli gate on `t_a`,
`t_b`, `t_c` → `t_p`, `t_q`, `t_r`. Design 2 is an alternative to
design 1, not an extra stage, so nothing connects the two. Everything is
combinational. There is no clock and no reset, and the outputs follow
the inputs after the gates' propagation delay.

Worked examples, with `cin = 0` and `sub = 0`:

- `1011 + 1010` gives `sum = 0101`, `cout = 1`, `g = 1010`, `p = 0001`.
- `1111 + 1101` gives `sum = 1100`, `cout = 1`, `g = 1101`, `p = 0010`.

## How far it can be trusted

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

- The gate and switch tests cover full truth tables. The gate tests also
  check reversibility: all output patterns must be distinct.
- `tb_cla_design1` and `tb_cla_design2` apply all 1024 combinations of A, B,
  `cin` and `sub`. They check `{cout, sum}` against integer arithmetic,
  `g` and `p` against `A & B'` and `A ^ B'`, the carry out against the
  expanded look-ahead expression, and the switch count.
- `tb_cla_mzi_top` runs the top at its default parameters. It drives both
  adders through all combinations, in different orders so that swapped
  pins would show. It also runs the Toffoli gate and the two worked
  examples above. It counts the following behaviours and fails if any
  never occurs: an addition with carry out, subtractions with and without
  borrow, a carry in that runs through all four bits, a G0 that runs
  through to the carry out, and a Toffoli inversion.

The model is purely logical. It establishes the switching structure and
its function, not optical feasibility. Losses, crosstalk, the power a
beam needs to act as a control, and timing skew between beams are
outside it.

## Departures and choices

- The MZI arrangements inside the three gates are this design's own.
  Their costs (2, 4 and 3 switches) follow from that choice.
- The subtract mode is wired with Feynman gates on B and on the carry in.
- Design 2 copies every generate signal, not only G0.
- The adders bring out `g` and `p` as well as `sum` and `cout`, so each
  has 23 pins. The reference FPGA implementations of the two designs
  reported 12 to 14 bonded IOs, so they brought out fewer signals. Their
  pin lists are not known.
- FPGA utilization and delay figures in nanoseconds are not reproduced.
  They depend on the FPGA tool flow, not on this RTL.
- Design 1 also uses plain fan-out for `P[i]` (the `p` output and the sum
  gate). Only design 2 removes fan-out, and only for the generate signals.

## Simulating

Plain Verilator 5 is enough. The package must come first:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cla_mzi_pkg.sv tb/tb_cla_mzi_top.sv --top-module tb_cla_mzi_top
    ./obj_dir/Vtb_cla_mzi_top

Use the same command with `tb_cla_design1`, `tb_cla_design2`, `tb_opg`,
`tb_otg`, `tb_ofg`, `tb_mzi_switch` or `tb_beam_combiner` to test one
block. Each run takes well under a second.

To change the width, override `WIDTH` on `cla_design1`, `cla_design2` or
`cla_mzi_top`. The adder testbenches set it through their local
parameter `W`. They are exhaustive, so keep `W` small: they apply
2^(2W+2) cases.

## Files

| File | Contents |
|---|---|
| `rtl/cla_mzi_pkg.sv` | default width, per-gate switch counts, adder cost functions |
| `rtl/mzi_switch.sv` | MZI switch, logic-level model |
| `rtl/beam_combiner.sv` | beam combiner with its mutual-exclusion assertion |
| `rtl/ofg.sv`, `rtl/opg.sv`, `rtl/otg.sv` | Feynman, Peres and Toffoli gates |
| `rtl/cla_design1.sv`, `rtl/cla_design2.sv` | the two adder/subtractor designs |
| `rtl/cla_mzi_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

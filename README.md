# Reversible COG-gate function generator and 1-bit reversible ALU

In a reversible circuit every gate maps its input vector one-to-one onto its
output vector. No information is erased, so in principle no energy has to be
dissipated for erasure. This has a price. A gate has as many outputs as inputs.
A signal may not fan out. Inputs that a function does not need are tied to
constants, and outputs it does not use are left as *garbage*. Such a circuit is
judged by its gate count, its constant inputs and its garbage outputs.

This RTL builds a small family of reversible circuits around one 3x3 gate, the
COG (Controlled Operation Gate):

* a **2:1 multiplexer** made of a single COG gate;
* a **2^n:1 multiplexer**, a tree of 2^n - 1 COG gates (8:1 by default);
* a **multi-logic function generator** that produces eight functions of two
  bits at once (AND, NOR, OR, NAND, XNOR, XOR, copy of A, NOT B) from seven
  COG gates and one Feynman gate;
* a **controlled function generator**: that generator feeding the 8:1
  multiplexer, so a 3-bit code picks one function;
* a separate **1-bit ALU** made of a carry-save adder cell, a NOT gate, a
  Toffoli gate, a Fredkin gate and a CNOT gate. It adds, subtracts, computes
  AND/OR/XOR/XNOR and buffers or complements A.

Everything is combinational. There is no clock and no reset. The RTL models
each reversible gate by its Boolean equations. It describes the logic
function and the gate-level structure, not a quantum or adiabatic
implementation.

## The gates

| gate | inputs | outputs |
|---|---|---|
| COG (`cog_gate`) | A, B, C | P = A, Q = (B xor C)', R = A'B + AC |
| Feynman / CNOT (`feynman_gate`) | A, B | P = A, Q = A xor B |
| Toffoli (`toffoli_gate`) | A, B, C | P = A, Q = B, R = AB xor C |
| Fredkin (`fredkin_gate`) | A, B, C | P = A, Q = A'B xor AC, R = AB xor A'C |
| carry-save adder cell (`csa`) | A, B, C, D | P = A, Q = B, R = A xor B xor C, S = (BC xor D) xor ((B xor C)A) |

The COG gate does two things. Its R output is a 2:1 multiplexer with A as the
select: A = 0 passes B and A = 1 passes C. Its Q output is the XNOR of the two
data inputs. Its P output returns the select unchanged. The function generator
gets all of its functions from COG gates whose inputs are tied to suitable
constants and signals.

## The multiplexers

`rev_mux2` is one COG gate with select `s0` on A, `i0` on B and `i1` on C.
`y = s0 ? i1 : i0` comes from R. `s_out` (P) is the select handed on, and `g`
(Q) is garbage.

`rev_mux #(N_SEL)` arranges 2^N_SEL - 1 of these cells in N_SEL levels. Level
0 pairs up the data inputs, and each later level halves the candidates. Level
`l` is steered by `sel[l]`, so `sel = k` puts `din[k]` on `y`.

A select line is **not fanned out**. It enters the first cell of its level.
Each cell passes it on through `s_out` to the next cell of the same level. The
garbage outputs are therefore every cell's XNOR output, plus the `s_out` of
the last cell of each level. That makes 2^n + n - 1 garbage bits, 10 for the
8:1 size.

The garbage bus is ordered as follows:

* `garbage[k]` for `k < 2^n - 1` is the XNOR output of cell `k`. Cells are
  numbered level by level from the input side.
* `garbage[2^n - 1 + l]` is the select line `l` coming back out.

## The function generator chain (`mlfg`)

This is the least obvious part of the design. Two operands travel down a chain
of eight gates. Each gate taps one function off them and passes A and B, or
B', on to the next gate. Constant inputs set each COG gate to the function
wanted:

| gate | inputs (A, B, C) | P | Q | R |
|---|---|---|---|---|
| COG1 | A, 0, B | A | B' | **A.B** |
| COG2 | A, B', 0 | A | B | **(A+B)'** = A'B' |
| FG | B, 1 | B | B' | |
| COG3 | A, B, 1 | A | B | **A+B** |
| COG4 | A, 1, B' | A | B' | **(A.B)'** = A' + AB' |
| COG5 | 0, A, B | 0 | **(A xor B)'** | A |
| COG6 | 0, A, B' | G0 | **A xor B** | A |
| COG7 | A, 0, B | **A** | **B'** | G1 = AB |

The Feynman gate's B input is tied to 1, so it splits B into B and B'. COG3's
B input comes from the Feynman gate's B output. COG4's C input comes from the
Feynman gate's B' output. COG5 and COG6 have their control tied to 0. Their R
output then just passes A along, while Q gives the XNOR of the two data inputs:
XNOR(A, B) in COG5 and XNOR(A, B') = XOR in COG6.

The totals are 8 gates, 7 constant inputs and 2 garbage outputs. G0 is always
0 and G1 is AB. Operand B enters twice, at COG1 and at COG7.

The eight functions leave on `f[7:0]` in the order of `rev_pkg::func_e`.

## The controlled function generator (`cmlfg`)

`f[7:0]` drives the data inputs of the 8:1 COG multiplexer. The select
`sel = {S3,S2,S1}` chooses the result:

| sel | function | | sel | function |
|---|---|---|---|---|
| 000 | A.B (AND) | | 100 | AB + A'B' (XNOR) |
| 001 | (A+B)' (NOR) | | 101 | A'B + AB' (XOR) |
| 010 | A+B (OR) | | 110 | A (copy) |
| 011 | (A.B)' (NAND) | | 111 | B' (NOT) |

S1 is the least significant bit and steers the multiplexer level next to the
generator. The circuit has 15 gates. Its garbage is 12 bits:
`garbage[1:0]` = G0, G1 from the generator and `garbage[11:2]` from the
multiplexer. The three select lines come back out on `garbage[11:9]`.

## The 1-bit ALU (`alu1`)

```
        ctrl ----------------------------------------> Fredkin.A --P--> CNOT.A --> u
  0 -> csa.D                     csa.S (carry) ------> Fredkin.B --Q-----------> t
  c -> csa.C   csa.R -------------------------------------------------------> q
  b -> csa.B   csa.Q (B) -> Toffoli.A --P---------------------------------> r (garbage)
  a -> csa.A   csa.P (A) -> NOT -> Toffoli.B --Q-------------> CNOT.B --> s
                          0 -> Toffoli.C --R (A'B, borrow) -> Fredkin.C --R--> p
```

The carry-save cell has D tied to 0, so it is a full adder. R is the sum of
A + B + C, and S is the carry, the majority of A, B and C. The NOT gate and
the Toffoli gate (C tied to 0) form the borrow of A - B, A'B. The Fredkin gate,
controlled by `ctrl`, decides which of carry and borrow appears on `t` and
which on `p`. The CNOT gate XORs `ctrl` into A', giving A or A' on `s`.

| ctrl | c | q | t | p | s |
|---|---|---|---|---|---|
| 0 | carry in | sum | carry out | A'B | A' (complement) |
| 0 | 0 | A xor B | A and B | A'B | A' |
| 0 | 1 | A xnor B | A or B | A'B | A' |
| 1 | 0 | difference A - B | borrow A'B | carry | A (buffer) |

In every mode `r = b` and `u = ctrl`. These two are pass-through outputs that
a reversible gate cannot avoid. The circuit uses two constant inputs (`csa.D`
and `Toffoli.C`). Only `r` is pure garbage.

## Where this RTL interprets or departs from the published design

* **COG multiplexer polarity.** The COG truth table has A = 0 passing B. The
  published 2:1 multiplexer drawing labels its output I0·S0 + I1·S0', which is
  the other way round. This RTL follows the truth table. That is also what the
  published select table needs, since select 000 must give input I0 (AND).
* **Select names.** The select lines are called both S3 S2 S1 and S2 S1 S0 in
  the published material. Here `sel[2:0]` is used, with `sel[0]` driving the
  level next to the data inputs.
* **Function generator wiring.** The published schematic fixes three things:
  which gate produces each function, where the constants enter, and where the
  two garbage outputs leave. The exact wires between gates are this design's
  reconstruction: a wiring that gives those functions with exactly those
  constants and garbage outputs.
* **Carry-save adder.** Only the cell's output equations are given, not its
  internal gates. `csa` implements the equations directly. The published ALU
  gate count (8) and quantum cost (24) assume an internal structure that is
  not reproduced here.
* **Subtraction** is a half subtractor. The borrow is A'B, and a borrow-in on
  `c` is not taken into account. Subtraction is specified only for c = 0.
* **Output names of the ALU** are those of its schematic (q, r, t, p, s, u).
  The published operation tables use a different P/Q/R column naming. The
  operations they list (sum, carry, difference, borrow, AND, OR, XOR, XNOR,
  buffer, complement) all appear on the outputs given above.
* **Cost figures.** The 8:1 multiplexer has 7 gates and 10 garbage outputs.
  The function generator has 8 gates, 7 constant inputs and 2 garbage outputs.
  The controlled generator has 15 gates and 12 garbage outputs. These match
  the published text. Some published comparison-table entries give other
  numbers for the multiplexer (3 gates, 6 garbage).
* The irreversible 8:1 multiplexer and the conventional 1-bit ALU that the
  design was compared against are not included. Neither are the NG and Peres
  gates, which none of these circuits uses.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | `func_e` function-select codes, `alu_ctrl_e` ALU control values |
| `rtl/cog_gate.sv`, `feynman_gate.sv`, `toffoli_gate.sv`, `fredkin_gate.sv`, `csa.sv` | primitive reversible gates |
| `rtl/rev_mux2.sv` | COG 2:1 multiplexer |
| `rtl/rev_mux.sv` | 2^N_SEL:1 COG multiplexer tree (`N_SEL` = 3) |
| `rtl/mlfg.sv` | eight-function generator |
| `rtl/cmlfg.sv` | generator plus 8:1 multiplexer |
| `rtl/alu1.sv` | 1-bit ALU |
| `rtl/rev_logic_top.sv` | top level: controlled generator (`fg_*` ports) and ALU (`alu_*` ports) side by side; they share nothing |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench drives its module through every input combination, or through
random vectors for the 16:1 multiplexer. It compares the results with a
reference written independently: truth tables as constants, the select table
as a case statement, or integer addition and subtraction for the adder cell
and the ALU. Each ends with a line `TB_RESULT checks=N failures=M`.
`tb_rev_logic_top` runs both circuits through all their inputs at default
parameters. It also counts how often each select code and each ALU operation
(add with and without carry in, subtract with and without borrow, AND/XOR,
OR/XNOR, buffer, complement) occurred, and fails if one never did.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/rev_pkg.sv \
    tb/tb_rev_logic_top.sv --top-module tb_rev_logic_top -o sim
./obj_dir/sim
```

Replace `tb_rev_logic_top` with any other testbench name to test one module.
`tb_rev_mux` also builds 4:1 and 16:1 trees to exercise the general
construction.

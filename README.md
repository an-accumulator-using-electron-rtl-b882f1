# Threshold-logic accumulator

A small accumulator register, a bit-sliced unit that holds an N-bit value A
and replaces it on each clock edge with the result of one of nine
micro-operations on A and an input word B. Every gate in it is a **linear
threshold gate**, the primitive that single-electron tunnelling circuits
implement naturally. The default build is the 4-bit version: four identical
stages in cascade.

The RTL models the logic of that circuit. Each gate is an integer weighted
sum compared with a threshold, and the storage element is a JK flip-flop
whose next state comes from threshold gates. The analog single-electron
circuit underneath is not modelled: its capacitor networks, tunnel junctions,
bias voltages and delays have no RTL counterpart.

## Threshold gates

A threshold gate with inputs x_k, signed integer weights w_k and threshold θ
outputs

    y = 1  if  Σ w_k·x_k ≥ θ,  otherwise 0,

written `[w_1, …, w_n; θ]`. One gate can replace a small network of ordinary
gates. For example, `[1,1,1; 2]` is the 3-input majority `AB + BC + CA`, which
takes three ANDs and an OR in ordinary gates. A complemented literal needs no
inverter. Because `~B = 1 − B`, `A·~B = [1, −1; 1]` and `A·~B·C = [1, −1, 1; 2]`:
the complemented input gets a negative weight, and the threshold drops by its
former weight.

`tlg_gate` is the one generic node. Its weights are a parameter array, and every
other gate is a fixed instance of it:

| module      | function            | `[weights; θ]`     |
|-------------|---------------------|--------------------|
| `tlg_and2`  | A·B                 | `[1, 1; 2]`        |
| `tlg_and2n` | A·~B                | `[1, −1; 1]`       |
| `tlg_and3`  | A·B·C               | `[1, 1, 1; 3]`     |
| `tlg_and3n` | A·~B·C              | `[1, −1, 1; 2]`    |
| `tlg_or3`   | A+B+C               | `[1, 1, 1; 1]`     |
| `tlg_or8`   | X1+…+X8             | `[1 ×8; 1]`        |
| `tlg_or9`   | X1+…+X9             | `[1 ×9; 1]`        |
| `tlg_maj3`  | AB+BC+CA            | `[1, 1, 1; 2]`     |
| `tlg_inv`   | ~A                  | `[−1; 0]`          |

In each wrapper, the first port listed drives `x[0]`. The default of
`tlg_gate` itself is the five-input example `[4,3,3,1,1; 7]`, which realises
`x1x2 + x1x3 + x2x3x4 + x2x3x5`.

## Micro-operations

Nine selection lines `sel[9:1]` = S9..S1 choose the operation. At most one may
be high, and an assertion in `accumulator` checks this. With none high, the
register holds.

| line | operation      | effect                                           |
|------|----------------|--------------------------------------------------|
| S1   | add            | A ← A + B + c_in                                 |
| S2   | clear          | A ← 0                                            |
| S3   | complement     | A ← ~A                                           |
| S4   | AND            | A ← A & B                                        |
| S5   | OR             | A ← A \| B                                       |
| S6   | XOR            | A ← A ^ B                                        |
| S7   | shift right    | A_i ← A_(i+1); the top bit takes `sr_in`         |
| S8   | shift left     | A_i ← A_(i−1); the bottom bit takes `sl_in`      |
| S9   | increment      | A ← A + 1                                        |

The output `z` is 1 whenever A = 0.

## How one stage works

Stage i stores bit A_i in a JK flip-flop. Stage 1 is the least significant
bit, and `a[0]` is A_1. The selection lines are mutually exclusive, so each
operation can be designed on its own as a J/K product term, and the terms are
then ORed together. A JK flip-flop holds for J=K=0, clears for K alone, sets
for J alone and toggles for J=K=1. Each operation is expressed in those terms:

- **add (S1).** The new bit is A⊕B⊕C, so A toggles exactly when B⊕C = 1. The
  stage drives both J and K with `B·~C·S1 + ~B·C·S1`.
- **clear (S2).** Drives K only.
- **complement (S3).** Drives J and K.
- **AND (S4).** Clears when B = 0, so K gets `~B·S4`.
- **OR (S5).** Sets when B = 1, so J gets `B·S5`.
- **XOR (S6).** Toggles when B = 1, so J and K both get `B·S6`.
- **Shifts (S7, S8).** Copy a neighbour: J gets `A_(i±1)·S` and K gets `~A_(i±1)·S`.
- **Increment.** Toggles A when the increment carry E_i is 1.

The two sums are therefore

    J = B~C·S1 + ~BC·S1 + S3 + B·S5 + B·S6 + A(i+1)·S7 + A(i−1)·S8 + E_i          (8 terms)
    K = B~C·S1 + ~BC·S1 + S2 + S3 + ~B·S4 + B·S6 + ~A(i+1)·S7 + ~A(i−1)·S8 + E_i  (9 terms)

An 8-input and a 9-input threshold OR form J and K. Each stage also produces
three signals that ripple to its left neighbour:

    C(i+1) = A·B + B·C + C·A     add carry (one majority gate)
    E(i+1) = A·E                 increment carry; E_1 = S9
    Z(i+1) = Z·~A                zero chain; Z_1 = 1, z = Z(N+1)

S9 never reaches the stages directly. It enters as E_1, so the increment is a
ripple counter: stage i toggles when all the bits below it are 1.

`acc_stage` has one parameter, `TLG_MERGED`. Both settings compute the same
function and both are tested:

- **1 (default).** Each product term with a complemented literal is one merged
  threshold gate (`tlg_and2n`, `tlg_and3n`). The carry is one majority gate.
- **0.** The stage is built as an ordinary gate diagram: threshold inverters feed
  plain `tlg_and2`/`tlg_and3` gates, and the carry is three ANDs and a `tlg_or3`.

## The threshold-logic JK flip-flop

`jk_ff` computes `Q+ = J·~Q + ~K·Q` with two threshold gates:

    P  = [J:1, Q:−1; 1]                = J·~Q
    Q+ = [K:−1, P:2, Q:1; 1]           = P + ~K·Q

You can check the second gate against the truth table. With P = 1 the sum is
at least 0 + 2 − 1 = 1, so Q+ = 1. With P = 0 the sum reaches 1 only when Q = 1
and K = 0. A register loads Q+ on the rising clock edge, and a threshold
inverter provides `q_n` for the zero chain.

In the original circuit, a third threshold gate ANDs the clock pulse with Q
to sample the state. In this RTL that gate is an ordinary edge-triggered
register.

## Top level: `accumulator`

```
accumulator #(N = 4, TLG_MERGED = 1)
  input  clk, rst_n            rising-edge clock, asynchronous active-low reset
  input  sel[9:1]              S9..S1 (type tlg_pkg::acc_sel_t)
  input  b[N-1:0]              operand B, b[0] = B_1
  input  c_in                  add carry into stage 1 (C_1)
  input  sr_in, sl_in          serial inputs: A_(N+1) for right shift, A_0 for left shift
  output a[N-1:0]              register A, a[0] = A_1
  output z                     1 when A = 0
  output c_out                 C_(N+1): carry out of A + B + c_in (combinational)
  output e_out                 E_(N+1): 1 while S9 is high and A is all ones
```

**Timing.** One micro-operation per clock: the result is in `a` after the rising
edge on which the selection line was high. `z`, `c_out` and `e_out` are
combinational. They are computed from the present contents of A and the present
inputs, and they ripple through all N stages. Nothing is pipelined.

`tlg_pkg` holds the shared definitions:

- the selection-vector type `acc_sel_t`;
- the enum `acc_op_e`, which names the nine lines;
- `op_to_sel()`, which builds a one-hot selection vector;
- `ACC_BITS` = 4;
- `TLG_MAX_INPUTS` = 16, the size of the weight array of `tlg_gate`.

## Departures from the original design and choices made here

- **Reset.** The original has no reset. Here `rst_n` clears every flip-flop
  asynchronously. The synchronous way to reach zero is still S2.
- **Clock sampling.** The clock-gating threshold gate of the flip-flop is an
  edge-triggered register (see above).
- **Inverter.** The inverter `[−1; 0]` is this design's own threshold vector.
  It follows from the rule that the complement of `[w; θ]` is `[−w; 1−θ]`,
  applied to the buffer `[1; 1]`. The original gives the inverter only as an
  analog circuit.
- **Serial inputs.** The serial input for right shift enters at the top stage
  as A_(N+1), and the one for left shift at the bottom as A_0. This matches
  the shift equations and the cascade drawing. One prose description in the
  original swaps the two; that description is taken to be in error.
- **Carry and complemented literals.** The original draws the stage with
  ordinary gates, and separately derives merged threshold gates for the carry
  and the complemented-literal terms. The default here is the merged form;
  `TLG_MERGED = 0` gives the drawn form.
- **Not modelled.** The single-electron realisation is not modelled: the
  capacitances (fractions of an aF), 16 mV logic levels, tunnel-junction
  switching, error probability, gate delays and switching energies. The
  original estimates about 11.5 ns per stage, hence a clock period of at least
  about 46 ns for four stages (about 21.7 MHz). In RTL this is simply one
  clock per operation.
- **Width.** N is a parameter. The original builds N = 4, and the cascade is
  the same for any N ≥ 2.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if it
hangs.

| testbench              | what it checks                                                        |
|------------------------|-----------------------------------------------------------------------|
| `tb_tlg_gate`          | default node exhaustively against its Boolean form; a negative-weight node and a 12-input node against a weighted sum |
| `tb_tlg_*` (9 gates)   | exhaustive truth table against the Boolean expression                 |
| `tb_jk_ff`             | reset, then 400 random J/K edges against a JK model; `q_n` = ~`q`; all four J/K cases occur |
| `tb_acc_stage`         | both `TLG_MERGED` forms side by side; fixed single-stage cases (add 0+1+1 gives sum 0 and carry 1, clear, complement, AND/OR/XOR tables, shift-in from each side); 600 random cycles with the ripple outputs checked before each edge |
| `tb_accumulator`       | default 4-bit top; increment 1001→1010, add with carry out, increment wrap of 1111, both serial shifts, then 1500 random operations against an integer model, with `z`, `c_out`, `e_out` checked every cycle; fails if any operation, hold, carry in/out, increment overflow, zero high/low or serial-1 shift never occurs |
| `tb_accumulator_wide`  | the same at N = 8 in the gate-level form (`TLG_MERGED = 0`), 3000 random operations |

Simulating with Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tlg_pkg.sv tb/tb_accumulator.sv \
          --top-module tb_accumulator -Mdir obj_acc
./obj_acc/Vtb_accumulator
```

To run any other testbench, change its name in both places. The simulator
finds the modules through `-Irtl`, because each module lives in a file of its
own name. To lint the design:

```
verilator --lint-only -Wall -Irtl rtl/tlg_pkg.sv rtl/accumulator.sv --top-module accumulator
```

This lint run prints two warnings, and both are expected:

- `ACC_BITS` in the package is unused in modules that import only
  `TLG_MAX_INPUTS`.
- `rst_n` is used both by the asynchronous reset and by the assertion's
  `disable iff`.

## Changing the design

- **Width.** Set `N` on `accumulator`. Nothing else depends on the width.
- **A different gate.** Instantiate `tlg_gate` with `.N(n)`, weights
  `.W('{0: w0, 1: w1, ..., default: 0})` and `.THETA(t)`. Up to
  `TLG_MAX_INPUTS` inputs are allowed; raise that constant in `tlg_pkg` for
  wider gates.
- **A new micro-operation.** Work out its J/K terms the same way as above, add
  them to the two OR gates in `acc_stage` (widening them), and widen `sel`.

# Moore FSM U2: matrix-structured Moore machine with encoded collections of microoperations

A Moore finite state machine usually needs more states than an equivalent
Mealy machine, so its transition table has more rows. Its outputs also
depend on the full state code. When the FSM is built from customized AND/OR
matrices (the PLA-like structures used for control logic in ASICs), both
effects cost chip area. That holds for the next-state logic and for the
output logic alike.

This design, called **U2**, attacks both at once by building every state
code from two fields:

    K(a_m) = K(Y_q) * K(b_q)        (* = concatenation)

- **K(Y_q), the collection field.** It is the code of the *collection of
  microoperations* (CMO) that the state produces. The output logic looks at
  this field only. Since the collection codes can be chosen freely, the
  output matrices can be made as small as possible.
- **K(b_q), the vertex field.** It tells apart states that produce the same
  collection. It needs only enough bits for the largest group of such
  states.

The next-state logic never looks at the state code itself. A small code
transformer maps the state code to the code of its *class of
pseudoequivalent states*: states whose successors are the same under the
same inputs. The transition table is indexed by class, so it has exactly as
many rows as the equivalent Mealy FSM.

The RTL is generic: matrix sizes and matrix contents ("personalities") are
parameters. Its defaults implement a worked example, the control algorithm
**Γ1**: 8 states, 4 logic conditions x1..x4 and 4 microoperations y1..y4.

## Structure

```
          x[1:L] ─►┌──────── BIMF ────────┐ d  ┌────┐  z[1:R_Y]   ┌──── BMO ────┐
                   │ M5 (AND) ─F─► M6 (OR)├───►│ RG │──┬─────────►│ M7 ─► M8    ├─► y[1:N]
            ┌─────►└──────────────────────┘    └────┘  │         └─────────────┘
            │ tau                         start, clk ──┘ z[1:R]  ┌──── BCT ────┐
            └────────────────────────────────────────────────────┤ M9 ─► M10    │◄─┘
                                                                 └─────────────┘
```

| block | matrices | function | module |
|---|---|---|---|
| BIMF, the block of input memory functions | M5 (AND), M6 (OR) | `D = D(tau, x)`: one AND term per table row (class code AND condition); the OR plane turns the rows into the next-state code | `bimf` |
| RG | – | R = R_Y + R_ALPHA D flip-flops. `start` clears it to the code of a1 (all zeros) | `state_register` |
| BMO, the block of microoperations | M7 (AND), M8 (OR) | `y = Y(z[1:R_Y])`: decodes the collection field only | `bmo` |
| BCT, the block of the code transformer | M9 (AND), M10 (OR) | `tau = tau(z)`: turns the state code into its class code | `bct` |
| top | – | wires the above | `moore_fsm_u2` |

`and_matrix` and `or_matrix` are the two generic matrix types; each block
uses one of each. `u2_gamma1_pkg` holds the sizes and personalities of the
example.

### Matrix personalities

An AND matrix with `IN` inputs and `TERMS` terms is described by two masks
per term:
- `TRUE[t][i]` puts input i into term t uncomplemented;
- `COMP[t][i]` puts its complement into term t.

An empty term is constant 1. An OR matrix has one mask per output,
`CONN[o][t]`, which selects the terms that output o ORs together. All
vectors use ascending ranges `[1:n]`, so bit `[1]` is variable 1. A literal
such as `6'b1000_01` reads left to right as x1 x2 x3 x4 τ1 τ2, the order in
which the tables below print it. The number of personality bits equals the
usual area measure of such a matrix: 2·inputs·terms for AND, terms·outputs
for OR.

## Timing

- RG is the only storage. One state transition takes one clock edge.
- `start` is a synchronous clear and takes priority over the next-state
  code.
- `y` is a Moore output. It depends only on RG, so it changes only after a
  clock edge and stays stable for the whole state.
- BMO and BCT work in parallel on the RG outputs. The critical loop is
  therefore RG → BCT (two levels) → BIMF (two levels) → RG.

Ports of `moore_fsm_u2`: `clk`, `start`, `x[1:L]` in; `y[1:N]` out. The
present state code `z[1:R_Y+R_ALPHA]` and its class code `tau[1:R_B]` are
also brought out, for observation only.

An assertion checks that exactly one transition-table row is active in
every cycle. In a well-formed table, the rows of each class have disjoint
conditions that together cover every input.

## The example algorithm Γ1

| state | vertex | produces | class | next state |
|---|---|---|---|---|
| a1 (start/end) | – | nothing (Y1) | B1 | x1 → a2; ¬x1 x2 → a3; ¬x1 ¬x2 → a4 |
| a2 | b1 | y1 y2 (Y2) | B2 | x3 x2 → a5; x3 ¬x2 → a6; ¬x3 x4 → a7; ¬x3 ¬x4 → a8 |
| a3 | b2 | y3 (Y3) | B2 | as a2 |
| a4 | b3 | y4 (Y4) | B2 | as a2 |
| a5 | b4 | y1 y2 (Y2) | B3 | a2 |
| a6 | b5 | y1 y3 (Y5) | B3 | a2 |
| a7 | b6 | y4 (Y4) | B4 | a1 |
| a8 | b7 | y1 y2 (Y2) | B4 | a1 |

Codes (z1 z2 z3 . z4 z5):

| collection | code | | state | code | | class | τ1 τ2 |
|---|---|---|---|---|---|---|---|
| Y1 = {} | 000 | | a1 | 000.00 | | B1 = {a1} | 01 |
| Y2 = {y1,y2} | 010 | | a2 / a5 / a8 | 010.00 / 010.01 / 010.10 | | B2 = {a2,a3,a4} | 00 |
| Y3 = {y3} | 111 | | a3 | 111.00 | | B3 = {a5,a6} | 10 |
| Y4 = {y4} | 011 | | a4 / a7 | 011.00 / 011.10 | | B4 = {a7,a8} | 11 |
| Y5 = {y1,y3} | 110 | | a6 | 110.01 | | | |

Y2 is produced in three states, so the vertex field needs two bits. That
gives 5 flip-flops where a plain binary state code would need 3. This is the
price of the method: BIMF gets more inputs, and a code transformer has to be
added.

The collection codes leave 001, 100 and 101 unused. With these as
don't-cares, each microoperation reduces to one AND term, and M8 is a
one-to-one wiring:

    y1 = z2 ¬z3     y2 = ¬z1 z2 ¬z3     y3 = z1     y4 = ¬z1 z3

The vertex codes are chosen so that each class is one short term of the
state code: B1 = ¬z2, B2 = z2 ¬z4 ¬z5, B3 = z5, B4 = z4. B2 has the code
00, so it never needs to be formed, and the class codes give

    τ1 = z4 ∨ z5        τ2 = z4 ∨ ¬z2

so M9 only passes literals.

The transformed transition table has 9 rows, the terms F1..F9 of M5. The
Φ column lists the D flip-flop inputs set to 1, which are the rows of M6.

| h | class (τ1τ2) | condition | next | code | Φ |
|---|---|---|---|---|---|
| 1 | B1 (01) | x1 | a2 | 010.00 | D2 |
| 2 | B1 (01) | ¬x1 x2 | a3 | 111.00 | D1 D2 D3 |
| 3 | B1 (01) | ¬x1 ¬x2 | a4 | 011.00 | D2 D3 |
| 4 | B2 (00) | x3 x2 | a5 | 010.01 | D2 D5 |
| 5 | B2 (00) | x3 ¬x2 | a6 | 110.01 | D1 D2 D5 |
| 6 | B2 (00) | ¬x3 x4 | a7 | 011.10 | D2 D3 D4 |
| 7 | B2 (00) | ¬x3 ¬x4 | a8 | 010.10 | D2 D4 |
| 8 | B3 (10) | 1 | a2 | 010.00 | D2 |
| 9 | B4 (11) | 1 | a1 | 000.00 | – |

A machine with one-hot or plain binary state codes would need one table
row per transition *out of each state*. For this example that comes to
19 rows, against the 9 above.

### Matrix sizes of the example

| matrix | size | bits |
|---|---|---|
| M5 | 2·(4+2)·9 | 108 |
| M6 | 9·5 | 45 |
| M7 | 2·3·4 | 24 |
| M8 | 4·4 | 16 (one-to-one) |
| M9 | 2·5·3 | 30 (literals only) |
| M10 | 3·2 | 6 |

The published area accounting treats M8 and M9 as absent when they reduce
to wiring like this, and counts 179 units for U2 against 293 for the
conventional matrix Moore FSM (U1). That conventional machine is not part
of this RTL.

## Departures from the published example

- **Codes of a7 and a8.** The published state-code map and transition
  table give a7 the code 010.10 and a8 the code 011.10. Those collection
  fields are Y2 and Y4. The algorithm, however, places vertex b6 (y4) in a7
  and b7 in a8. Here the codes follow the concatenation rule for the
  vertices the algorithm places there: a7 = 011.10 and a8 = 010.10. Rows 6
  and 7 of the table therefore write these codes, and D3 collects rows 2, 3
  and 6 (the published equations give rows 2, 3 and 7). With the published
  codes, the FSM would produce y1 y2 in the state where the algorithm
  requires y4.
- **Microoperations of a8.** The algorithm's drawing labels vertex b7 with
  y1 alone. The surrounding description counts only five collections and
  places b7 in the same group as b1 and b4, which produce y1 y2. The RTL
  follows the description: a8 produces y1 y2.

The following are this design's own choices, because the method leaves them
open:
- the clear is synchronous;
- the order of the inputs of M5 (x first, then τ);
- the mask representation of the personalities;
- keeping M8 and M9 as real, if trivial, matrices so that other algorithms
  can fill them.

## Using it for another algorithm

Set the sizes `L, N, R_B, R_Y, R_ALPHA, H0, T_Y, H_P` and the nine
personality parameters `M5_TRUE … M10_CONN` of `moore_fsm_u2`. The steps
are:

1. Give every operator vertex its own state.
2. Group the states whose vertices lead into the same vertex. These are the
   classes of pseudoequivalent states.
3. Code the distinct collections of microoperations so that BMO needs few
   terms.
4. Code the vertices within each group that shares a collection. The vertex
   field needs ⌈log2⌉ of the largest group size.
5. Code the classes so that BCT needs few terms.
6. Write one table row per (class, condition) pair.

The RTL does not do this synthesis; it only takes its result.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_and_matrix`, `tb_or_matrix` | Every input combination of a small personality covering all line types, against hand-written expressions |
| `tb_state_register` | Load and clear against a model, with random data and random Start pulses |
| `tb_bimf` | All 16 condition vectors for each of the 4 classes: the next code, and that exactly the right row fires |
| `tb_bmo`, `tb_bct` | All eight state codes against the expected outputs and class codes |
| `tb_moore_fsm_u2` | The whole FSM at its default parameters for 800 cycles of random conditions with Start pulses; see below |

`tb_moore_fsm_u2` compares y, z and τ after every clock edge with the
reference model `gamma1_ref_pkg`. That package is written from the
algorithm, not from the matrices. The testbench also counts the following,
and fails if any of them never happens:
- every one of the 9 table rows;
- every class;
- Start clears;
- complete runs from a1 back to a1.

To simulate with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-ASCRANGE -Irtl -Itb \
    rtl/u2_gamma1_pkg.sv tb/gamma1_ref_pkg.sv tb/tb_moore_fsm_u2.sv \
    --top-module tb_moore_fsm_u2 -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` file and `--top-module` for
the other testbenches. Verilator 5 stops on its `ASCRANGE` warning by
default, hence `-Wno-ASCRANGE`. The warning comes from the deliberate
`[1:n]` ranges, which keep the bit numbers equal to the variable numbers
(x1, z1, y1, …).

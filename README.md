# Two-rail checkers from a parity preserving reversible gate

A two-rail checker watches pairs of signals that should always be
complementary. In this design those pairs are the check outputs of two
online-testable blocks. The checker folds the pairs into one
complementary pair of its own. The checkers here are built entirely from
*reversible* gates. Each such gate maps its input patterns one-to-one onto
its output patterns, and each is also *parity preserving*: the XOR of a
gate's outputs always equals the XOR of its inputs. So a whole network of
these gates preserves parity too. If any single internal line goes wrong,
the parity of all the network's outputs stops matching the parity of its
inputs.

The building block is a 4-input, 4-output gate called NPPRG. This RTL gives
the gate, the gate used as a universal logic element, and two checker
netlists built from it. All of it is combinational. There is no clock and no
state.

## The NPPRG gate (`rtl/npprg.sv`)

```
P = A ^ C ^ D
Q = D ^ (B & C)
R = C
S = D ^ (B | C)
```

`tb/npprg_tb.sv` checks all 16 rows against the gate's truth table. It also
checks that the 16 output patterns are all different, which makes the gate
reversible, and that P^Q^R^S = A^B^C^D in every row.

If two inputs are tied to constants, one gate delivers several functions at
once. `rtl/npprg_logic.sv` holds all four configurations:

| constants (A,B,C,D) | P        | Q        | R | S        | used as                       |
|---------------------|----------|----------|---|----------|-------------------------------|
| (0, a, b, 0)        | b        | a&b      | b | a\|b     | AND, OR, two copies of b      |
| (0, a, b, 1)        | ~b       | ~(a&b)   | b | ~(a\|b)  | NAND, NOR, NOT, 1-to-2 decoder |
| (a, 0, 0, b)        | a^b      | b        | 0 | b        | XOR, two copies of b          |
| (a, 0, 1, b)        | ~(a^b)   | b        | 1 | ~b       | XNOR, NOT, 1-to-2 decoder     |

Both checkers use only the first row, the AND/OR configuration. In that row
the gate gives `a&b` on Q and `a|b` on S. It also passes a free copy of its
C input out on R (and on P). Reversible logic forbids fan-out, so a signal
needed twice must be copied by a gate. This copy is what lets the checkers
reuse each input without fan-out.

The Feynman double gate (`rtl/f2g.sv`, P=A, Q=A^B, R=A^C) is the other
parity preserving gate used here. With B = C = 0 it makes three copies of A.

## Two-rail checking

For input pairs (x0,y0) and (x1,y1):

```
e1 = x0&y1 | y0&x1
e2 = x0&x1 | y0&y1
```

If both pairs are complementary (01 or 10), then (e1,e2) is also 01 or 10.
This is a *code word* and means no error was seen. If either pair is 00 or
11, the answer is 00 or 11. That flags an error in the monitored blocks or
in the checker itself. Two examples:

* x0x1 = 11, y0y1 = 00 gives e1=0, e2=1.
* x0x1 = 11, y0y1 = 10 gives 11.

Of the 16 input patterns, 4 are code words and all 4 give a code word
answer. The other 12 give 00 or 11.

In a system, (x0,y0) is the (q,s) check pair of one online-testable
reversible block and (x1,y1) is the (q,s) pair of a second one. Those blocks
are not part of this RTL; their pairs arrive on the checker's inputs.

## Checker design 1: six NPPRG gates in a ring (`rtl/trc_design1.sv`)

This netlist is the least obvious part of the design. Four product terms
are needed, and each of the four inputs appears in exactly two of them:

```
y0&y1   y0&x1   x0&x1   x0&y1
```

Read the terms as a cycle of inputs: y0 - x1 - x0 - y1 - back to y0. Each
neighbouring pair in that cycle forms one term. So four AND-configured gates
are placed on a ring. Each gate takes one primary input on C. It takes the R
copy from its neighbour on B:

```
g1: B = copy(y1) from g4, C = y0  ->  Q = y0&y1, R = copy(y0) -> g2
g2: B = copy(y0) from g1, C = x1  ->  Q = y0&x1, R = copy(x1) -> g3
g3: B = copy(x1) from g2, C = x0  ->  Q = x0&x1, R = copy(x0) -> g4
g4: B = copy(x0) from g3, C = y1  ->  Q = x0&y1, R = copy(y1) -> g1
g5: B = g1.Q, C = g3.Q            ->  S = e2
g6: B = g2.Q, C = g4.Q            ->  S = e1
```

The ring looks like a feedback loop, but it is not one. R equals C and
depends on nothing else, so every signal settles in one pass. All gate
outputs are declared as separate scalar signals, so lint tools see no loop
either. Every gate output is used at most once: there is no fan-out. All
constant inputs are 0. The 14 outputs that go nowhere are brought out on
`garbage`.

## Checker design 2: F2G copiers plus six NPPRG gates (`rtl/trc_design2.sv`)

Design 2 makes its copies of x0 and y0 in two Feynman double gates, so the
ring is not needed. x1 and y1 are still copied through the R output of the
first AND gate they enter:

```
u1 F2G: x0 -> x0_a, x0_b (third copy unused)
u2 F2G: y0 -> y0_a, y0_b (third copy unused)
a1: B = x0_a, C = y1       -> x0&y1, R = copy(y1)
a2: B = y0_a, C = x1       -> y0&x1, R = copy(x1)
a3: B = y0_b, C = copy(y1) -> y0&y1
a4: B = x0_b, C = copy(x1) -> x0&x1
o1: a1.Q | a2.Q            -> e1
o2: a3.Q | a4.Q            -> e2
```

It uses eight gates and has 18 unused outputs, against six gates and 14
unused outputs for design 1. On the FPGA it was measured on, its longest
input-to-output path was slightly shorter: 5.513 ns against 5.544 ns.

## Parity and single faults

Every gate preserves parity, and every internal line leaves one gate and
enters exactly one other. So for a fault-free checker:

```
e1 ^ e2 ^ ^garbage == x0 ^ y0 ^ x1 ^ y1      (all constant inputs are 0)
```

Suppose one internal line is stuck at the wrong value. The gate it enters
then sees input parity off by one. That error travels unchanged to the
primary outputs, so the equation above fails. `tb/trc_parity_fault_tb.sv`
checks this by forcing each internal line of both checkers to 0 and then to
1, for every input pattern:

* All 224 faults that actually change a line are caught by the parity
  equation.
* Only 120 of them are visible on (e1,e2) alone.

This is the practical difference between the parity view and the two-rail
view of the same netlist. The `garbage` ports exist so that a parity
checker outside this design can use them.

## Top level (`rtl/trc_top.sv`)

The two checkers are alternatives that compute the same function. The top
places them side by side, each with its own ports, next to the NPPRG
function unit:

| port                        | width | meaning                                      |
|-----------------------------|-------|----------------------------------------------|
| `d1_in`, `d2_in`            | 4     | `trc_in_t` {x0, y0, x1, y1} of each checker  |
| `d1_code`, `d2_code`        | 2     | `trc_code_t` {e1, e2}                         |
| `d1_garbage`, `d2_garbage`  | 14/18 | unused gate outputs, for parity checking     |
| `gate_a`, `gate_b`          | 1     | operands of the function unit                |
| `gate_fn`                   | 16    | `npprg_fn_t`: AND, OR, NAND, NOR, XOR, XNOR, copies, decoders |
| `gate_garbage`              | 2     | constant outputs of the XOR/XNOR configurations |

The types and the garbage widths are defined in `rtl/trc_pkg.sv`. The
package also provides `is_codeword()`. The top has no parameters.

## How far to trust it, and where it departs from the source

* **Gate equations.** The NPPRG and F2G equations match their published
  truth tables in every row, and the tests check every row.
* **Checker netlists.** The gate counts and gate types come from the
  published schematics. So do which inputs enter which gate directly and
  which gates drive e1 and e2. Some details of the internal wiring could not
  be read unambiguously from the schematics:
  * which copy output (P or R) is used;
  * which OR gate input receives which product term.

  These were chosen so that each netlist computes exactly the checker
  function without fan-out. Any other choice gives the same e1 and e2, but
  the values on the garbage lines would differ.
* **Design numbering.** The source numbers the designs inconsistently in one
  place. Here design 1 is the six-gate netlist and design 2 the eight-gate
  one, as in its schematics and results section. The netlists give 14 and
  18 unused outputs. Those are the two numbers the source's comparison table
  lists, but under a different row label.
* **Configuration labels.** The published labels for the NAND/NOR
  configuration's P output and the XNOR configuration's S output read as a
  plain copy of b. The gate equations give ~b, which matches the NOT
  function the configurations are said to provide. The RTL follows the
  equations.
* **Timing.** The published delays (about 5.1 to 5.5 ns pad to pad) are
  results of an FPGA implementation and are not modelled. In simulation the
  outputs change in the same cycle as the inputs.
* **Not included.** The online-testable blocks that drive the checker
  inputs are not included, because their logic is not part of this design.
  The earlier checker built from R gates, which the source uses only for
  comparison, is also not included.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and stops. Each runs in well under a second.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/trc_pkg.sv \
          tb/trc_top_tb.sv --top-module trc_top_tb
./obj_dir/Vtrc_top_tb
```

Replace `trc_top_tb` with the testbench you want to run:

| testbench                 | what it covers                                              |
|---------------------------|-------------------------------------------------------------|
| `npprg_tb`                | NPPRG truth table, reversibility, parity                    |
| `f2g_tb`                  | F2G truth table, reversibility, parity                      |
| `npprg_logic_tb`          | all functions of the four constant-input configurations     |
| `trc_design1_tb`, `trc_design2_tb` | all 16 inputs: e1/e2, code-word property, whole-netlist parity, worked examples |
| `trc_top_tb`              | 256 combinations across both checkers and the function unit; both designs compared; every answer kind (01, 10, 00, 11) must occur for each design |
| `trc_parity_fault_tb`     | stuck-at faults on every internal checker line, detected by parity |

To change a checker's wiring, edit the instance list in `trc_design1.sv` or
`trc_design2.sv`. If the number of unused outputs changes, update
`D1_GARBAGE` or `D2_GARBAGE` in `trc_pkg.sv` to match.

# Multiple-valued circuits from decision diagrams

A multiple-valued logic function has inputs and outputs that take more than two
values, such as 0, 1, 2. Such a function can be held as a
*multiple-valued decision diagram* (MDD). An MDD is a graph: each inner node
tests one variable and has one arc per value of that variable, and each leaf
holds an output value. An MDD converts into hardware in a direct way:

* **Multiplexer mapping.** Every inner node becomes one multiplexer. Its select
  is the node's variable, and its data input *k* comes from the node's *k*-th
  child: either another multiplexer or a constant.
* **Recoding to a smaller radix.** Sometimes the function is *p*-valued but the
  cells are only *n*-valued, with *n* < *p*. Then each *p*-valued variable and
  output is written as ⌈log_n p⌉ digits of radix *n*. The diagram is rewritten
  over those digits and split into one diagram per output digit. Each of these
  diagrams then maps onto *n*-valued multiplexers.
* **PLA mapping.** The same diagrams can be written as sums of products of
  binary *literals*. These sums program a multiple-valued PLA.

This repository holds three small circuits built this way, side by side under
one top level (`mvl_top`):

| circuit | module | what it is |
|---|---|---|
| sequential circuit | `mvl_seq_fsm` | a machine with a 3-valued input and a 4-valued state; its next-state logic uses eight 3-valued multiplexers |
| multiple-valued PLA | `mvl_pla` | a PLA with literal generators, AND and OR arrays, and output decoders; programmed for a 3-valued function F(x, y) |
| Max tree | `mvl_max3` | 3-valued max(x, y) from three 3-valued multiplexers |

The circuits share nothing except the types in `mvl_pkg`.

## Carrying multiple-valued signals in binary

Every signal is an ordinary binary bus. A 3-valued digit (a *trit*, type
`trit_t`) uses two wires that hold 0, 1 or 2. Code 3 is unused. Given code 3:

* a multiplexer select outputs 0;
* a literal generator outputs Ax = 1, Bx = Cx = 0.

Only a test that drives code 3 on purpose sees these values. The circuits never
produce code 3 on a digit.

## The multiplexer cell and the Max tree

`mvl_mux` is a *P*-valued multiplexer with *W*-bit data. The defaults are P = 3
and W = 2. Its output is `d[sel]`, combinationally.

`mvl_max3` is the smallest example of the mapping. The variable order is
x before y, and the reduced diagram of max is:

```
root = <x, n0, n1, 2>        n0 = <y, 0, 1, 2>        n1 = <y, 1, 1, 2>
```

`<v, a, b, c>` means "test v; go to a, b or c for v = 0, 1, 2". The y node
under x = 2 is left out because all three of its arcs would lead to 2. The
circuit uses three cells, one per inner node.

## The sequential circuit: a 4-valued state on 3-valued cells

This is the least obvious part of the design.

The machine has a 3-valued input `v` and a 4-valued state `q`. Its transition
table:

| q | v ∈ {0,1} | v = 2 |
|---|---|---|
| 0 | 0 | 1 |
| 1 | 1 | 2 |
| 2 | 3 | 0 |
| 3 | 3 | 1 |

### State code

The cells are 3-valued, so `q` is written as two trits (q0, q1):

| q | q0 | q1 |
|---|---|---|
| 0 | 0 | 0 |
| 1 | 0 | 1 |
| 2 | 0 | 2 |
| 3 | 1 | 0 |

When q0 = 0, q1 is the state value; when q0 ≠ 0, the state is 3. That makes
q0 = 2 an unused code, and the logic treats it like q0 = 1 (state 3). The
register feeds the next state straight back as the present state, so the same
code is used on both sides.

### Next-state multiplexers

The next-state diagram is rewritten over (v, q0, q1). It is then split into one
diagram for each next-state digit:

```
Q0 = <v, a, a, 0>     a = <q0, b, 1, 1>     b = <q1, 0, 0, 1>
Q1 = <v, c, c, d>     c = <q0, e, 0, 0>     e = <q1, 0, 1, 0>
                      d = <q0, g, 1, 1>     g = <q1, 1, 2, 0>
```

Example: for v = 2, state 1 is coded (0, 1). The Q1 path is d → g → 2 and the
Q0 path is 0, which gives code (0, 2), i.e. state 2, as the table requires.

In `mvl_nextstate_q`, every one of these eight nodes is an `mvl_mux`
instance. The nodes are named as above.

### Register

`mvl_seq_fsm` adds a four-flip-flop register:

* The state is sampled on the rising edge of `clk`, so `q` changes one cycle
  after `v` is applied.
* `rst_n` is an active-low synchronous reset to state 0.
* An assertion checks that the register never holds an unused code.
* The table gives the machine no outputs, so the state itself is the output:
  `q_code` (the two trits) and `q` (the value 0..3).

## The multiple-valued PLA

`mvl_pla` has four stages.

1. **Literal generators** (`mvl_literal_gen`). There is one per 3-valued input
   x. Each gives three binary literals:

   * Ax = x ∈ {1,2}
   * Bx = x ∈ {0,2}
   * Cx = x ∈ {0,1}

   Any two of them are true together exactly when x has the one value both
   sets contain. So the complement of each literal is the product of the other
   two, for example not Ax = Bx·Cx. As a result, the AND array needs only
   positive literals.

2. **AND array.** Parameter `AND_PLANE[t]` is a bit mask over the literal
   vector. Literal l of input i is bit 3·i + l, with A = 0, B = 1, C = 2. Term
   t is the AND of the literals marked in its mask.

3. **OR array.** Parameter `OR_PLANE[k]` is a mask over the terms. Line h[k] is
   the OR of the terms marked in its mask.

4. **Output decoders** (`mvl_out_encoder`). Each multiple-valued output has
   R lines, which hold its binary code. A lookup table `DEC`, indexed by those
   lines, turns the code back into the output value.

The defaults program the PLA for this function:

| F(x, y) | y=0 | y=1 | y=2 |
|---|---|---|---|
| x=0 | 0 | 0 | 0 |
| x=1 | 1 | 1 | 2 |
| x=2 | 0 | 1 | 2 |

The output is coded on two lines:

* h0 = 1 exactly where F = 2;
* h1 = 1 where F = 1, and is a don't-care where F = 2.

From this code:

```
h0 = Ax·Ay·By
h1 = Ax·Ay + Ax·Cx·By·Cy
```

This uses three terms. The decode table gives 2 whenever h0 = 1, 1 for
h1 h0 = 10, and 0 for h1 h0 = 00. At (x, y) = (1, 2) and (2, 2), the term Ax·Ay
sets h1 even though F = 2. The decoder gives h0 priority, so this is harmless.

To program another function, set `N_IN`, `N_TERMS`, `N_OUT`, `R`, `AND_PLANE`,
`OR_PLANE` and `DEC` together. `tb_mvl_pla` shows a second example: a one-input
PLA that copies its input using the terms Ax·Cx (x = 1) and Ax·Bx (x = 2). All
outputs of one PLA share a single `DEC` table.

## Files and interfaces

```
rtl/mvl_pkg.sv          trit_t, quad_t, state_code_t, encode_state(), decode_state()
rtl/mvl_mux.sv          P-valued multiplexer cell
rtl/mvl_max3.sv         Max tree (3 cells)
rtl/mvl_nextstate_q.sv  next-state logic of the sequential circuit (8 cells)
rtl/mvl_seq_fsm.sv      state register + next-state logic
rtl/mvl_literal_gen.sv  Ax, Bx, Cx of one 3-valued input
rtl/mvl_out_encoder.sv  h lines -> multiple-valued output value
rtl/mvl_pla.sv          literal generators, AND array, OR array, output decoders
rtl/mvl_top.sv          the three circuits side by side
tb/tb_<module>.sv       one self-checking testbench per module
```

All logic is combinational except the four-flip-flop state register.

The ports of `mvl_top`:

* sequential circuit: `clk`, `rst_n`, `v`, `q`, `q_code`;
* PLA: `pla_x`, `pla_y`, `pla_h` (h1 h0), `pla_f`;
* Max tree: `max_x`, `max_y`, `max_z`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. It has a watchdog that
counts a failure if the test hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mvl_pkg.sv tb/tb_mvl_top.sv \
          --top-module tb_mvl_top -Mdir obj_top
./obj_top/Vtb_mvl_top
```

Replace `mvl_top` with any other module name to run that module's testbench.
Verilator finds the submodules through `-Irtl`.

What the tests cover:

* The combinational blocks are checked exhaustively against their truth
  tables, which are written out separately in each testbench.
* `tb_mvl_seq_fsm` and `tb_mvl_top` compare the machine each cycle against a
  table model, including the one-cycle latency and resets.
* `tb_mvl_top` runs all three circuits at their default parameters. It counts
  each event: every transition-table row taken, resets, each output value of
  the PLA and the Max tree, and the h1 don't-care case. An event that never
  happens counts as a failure.

## How far this follows the method, and where it departs

**Follows the method:**

* the multiplexer mapping rule;
* the Max diagram;
* the transition table;
* the two-trit output code of the state (q0 is 1 only for state 3; q1 is the
  state value for states 0..2);
* the order of the next-state multiplexers: v, then q0, then q1;
* the PLA structure: literal generators, AND array, OR array, output decoders;
* the PLA function F, its output code and the two equations for h0 and h1.

**Worked out here:**

* *Literal sets B and C.* The literal sets Bx = {0,2} and Cx = {0,1} were
  derived from the complement relations and from the h0 and h1 equations. With
  the sets the other way round, the equations would not give F.
* *Next-state diagrams.* The published per-digit next-state diagrams read the
  present state with a different code from the one they produce. That is
  correct for the function taken alone, but it does not fit a register that
  feeds Q back as q. The eight nodes above were therefore derived again, with
  one code on both sides. They have the same shape and give the same next
  states as the table.

**Design choices with no source:**

* binary wires for the digits;
* the behaviour of the unused codes;
* the synchronous active-low reset to state 0;
* `DEC` as a lookup table;
* parameter masks as the way to program the PLA.

**Not included:**

* The diagram-building algorithms themselves (CASE, Apply, radix recoding).
  These are CAD software, and their results are what this hardware contains.
* A direct 4-valued multiplexer version of the next-state logic. The method
  mentions it only as the simple case when 4-valued cells are available.
* An implementation with multi-valued switches. It is only mentioned, and
  would be a transistor-level circuit.

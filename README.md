# Fault-tolerant and fail-safe sequential machines

This is a collection of small synchronous state machines. Each one shows a
different way to keep a sequential circuit from failing silently when a
gate or flip-flop develops a stuck-at fault. The machines fall into two
groups:

* **Fail-safe machines.** A fault forces the machine into a recognisable
  "failure state", where it stays, instead of letting it wander through
  legal-looking states.
* **Fault-tolerant machines.** A single fault is masked and the machine
  keeps producing correct outputs. Three schemes are built:
  * a binary counter protected by an error-correcting code and majority
    logic;
  * a graph-structured machine built from triplicated "cell-blocks";
  * a reprogrammable machine whose next-state table lives in a PROM, with
    the table Hamming coded and the control hardware triplicated.

All machines are plain synchronous logic. They use one clock and an
active-high synchronous reset. They are independent of each other and sit
side by side in `ftdm_top`.

## 1. Fail-safe state assignment

### The idea

Pick state codes so that no code word *covers* another. Code A covers B
when A has a 1 everywhere B does. Then build the next-state logic only from
AND and OR gates applied to uncomplemented state variables. The external
input may appear in both polarities.

This logic is monotonic in the state variables. A stuck-at-0 fault can
only turn 1s into 0s. With an incomparable code, the state reached after a
fault can therefore never be another legal state. After at most a few
clocks, the machine falls into the all-zero word, called the **F-state**.
The F-state maps to itself, so the fault is latched and easy to detect.

### The three-state example

The example machine has three states coded in a 2-out-of-3 code:
q1 = 011, q2 = 101 and q3 = 110. It holds its state while x = 0 and
steps round the three states while x = 1:

| present | x = 0 | x = 1 |
|---------|-------|-------|
| 011     | 011   | 101   |
| 101     | 101   | 110   |
| 110     | 110   | 011   |

It is implemented three ways. All three share one interface: `clk`, `rst`,
`x`, the state `y[1:3]` (y1 is the leftmost bit) and an F-state flag.

* `failsafe_tt` — AND-OR logic read straight from the transition table.
  Each D input is the OR of the pair-of-ones AND terms, gated by x or x'.
* `failsafe_km` — minimised equations, for example
  `D1 = y1.y3 + x'.y1.y2 + x.y2.y3`.
* `failsafe_nand` — the same equations in two levels of NAND gates.
  * A stuck-at-0 at the output of a first-level (output-side) NAND forces
    that bit to 1. A stuck-at-0 at a second-level NAND forces 0s.
  * The monotonic argument then works in the dual sense: an output-side
    fault drives the machine to 111 rather than 000.
  * The module therefore flags both `fstate0` (000) and `fstate1` (111).

`failsafe_auto` is a four-state, 4-bit autonomous cycle
1001 → 0011 → 0101 → 1010 → 1001. It has no input and uses the fail-safe
equations `D1 = y2 + y1.y3`, `D2 = y3.y4`, `D3 = y2 + y1.y4`,
`D4 = y1 + y3`.

The testbenches force individual AND gates to 0 and check the exact
sequence into the F-state. For example, the `y1.y3` term of D1 stuck at 0
with x = 0 gives 101 → 001 → 000.

## 2. The fault-masking counter (Reed–Muller code)

This is the hardest part of the design to follow, so it gets the most
space.

### Code

`ft_counter` is a 3-bit up counter. Its information bits are A3 A2 A1, and
it carries three check bits:

    B1 = A1 ^ A2     B2 = A2 ^ A3     B3 = A3 ^ A1

The six bits form a code with minimum distance 3. From any valid word,
each information bit can be computed three independent ways. For A1:

    A1 itself,   A2 ^ B1,   A3 ^ B3

If one flip-flop is wrong, at most one of the three estimates is wrong. A
3-input majority therefore gives the right A1. This "majority element" —
a 3-input majority gate fed by A1 directly and by two XOR gates — is
`rm_majority_element`. The same identities hold with every A replaced by
its complement (the B terms are unchanged), so complemented literals can be
rebuilt the same way.

### Counting

All six flip-flops are T (toggle) flip-flops. Going from one count to the
next, the bits toggle according to:

    TA1 = 1        TA2 = A1        TA3 = A1.A2
    TB1 = A1'      TB2 = A1.A2'    TB3 = A1' + A2'

The B toggles come from the code. For example, B1 = A1 ^ A2 changes
exactly when one but not both of A1 and A2 change.

The counter steps through these states (A3A2A1 | B3B2B1):

    000|000  001|101  010|011  011|110  100|110  101|011  110|101  111|000

### Why every literal has its own majority element

The control logic never reads a flip-flop directly. Every literal it uses
comes out of a majority element:

| Literal | Times used | Majority elements |
|---------|-----------|-------------------|
| A1      | 3         | 3                 |
| A1'     | 2         | 2                 |
| A2      | 1         | 1                 |
| A2'     | 2         | 2                 |

That makes eight elements in total. They are never shared, for two
reasons:

* **A wrong flip-flop is corrected before it is used.** It corrupts at most
  one input of each element. Each element outvotes it, so every toggle is
  computed from corrected values. The faulty flip-flop is toggled the same
  way as its correct value would be. A transient upset therefore vanishes
  on its own, and a permanently stuck flip-flop stays the only wrong bit.
* **A faulty element or gate cannot bring down a whole code word.** It
  corrupts at most one toggle input, and so at most one flip-flop. The
  next cycle treats that as a single wrong bit, as above. If one element
  were shared by several toggle inputs, a single fault in it could upset
  two flip-flops at once. That would be beyond what the distance-3 code
  can correct.

Three more majority elements rebuild A3..A1 for the `count` output, so a
wrong flip-flop never shows at the output either.

### Interface

* Inputs: `clk`, `rst` (loads all zero) and `en` (count enable).
* Outputs: the raw `a[3:1]` and `b[3:1]`, and the corrected `count[2:0]`.

The count advances once per rising edge while `en` = 1.

### How it is tested

The testbench forces, in turn:

* each of the six flip-flops;
* each of the eight majority elements that feed the toggle logic.

It applies both stuck values to each, over full counting cycles, and
checks that `count` never deviates. All 28 cases are masked.

### Four and five stages (`ft_counter_rm`)

The same construction extends to wider counters, given a parity-check
matrix in which every information bit appears in exactly two check rows.
`ft_counter_rm` takes `STAGES` = 3, 4 (the default) or 5 and uses these
check bits:

| Stages | Check bits |
|--------|------------|
| 3 | B1 = A1^A2, B2 = A2^A3, B3 = A1^A3 |
| 4 | B1 = A1^A2, B2 = A2^A3, B3 = A1^A4, B4 = A3^A4 |
| 5 | B1 = A1^A3, B2 = A2^A4, B3 = A3^A5, B4 = A1^A4, B5 = A2^A5 |

The toggle rules follow directly:

* Information bit k toggles when every lower bit is 1:
  TA_k = A1.A2…A(k-1).
* A check bit Ap^Aq toggles when exactly one of its two bits does:
  TB = TA_p ^ TA_q.

Hand-minimised equations could share literals between gates, as in the
three-stage circuit above. This module instead gives every toggle input
its own private set of majority elements. That keeps the "no shared
element" argument true for any width, at the price of more elements. At
4 stages the toggle logic uses 15 elements, plus 4 for the corrected
output.

Its testbench runs all three widths. It sticks each flip-flop and each
toggle input at 0 and at 1, over a full counting cycle. All 96 cases are
masked.

## 3. The triplicated cell-block

### One cell per state

A state graph can be turned into hardware by giving every state its own
cell (`cell_block`). A cell holds one JK flip-flop, which is set while its
state is active, and works like this:

* `J` is the OR of the state inputs. These are the arrows that lead into
  this state from its predecessors.
* The cell offers two state outputs, `out_x1 = Q & X` and
  `out_x0 = Q & ~X`. Each output is wired to the cell that the
  corresponding arrow leads to.
* `K = ~J & (out_x1 | out_x0)`. An active cell resets on the next clock
  *unless* it is also being set.

That gating of K by ~J is what makes a self-loop (an arrow from a state
back to itself) work. An earlier form of the cell, without it, would
reset itself on a self-loop.

Exactly one cell is set at any time. On each clock the active cell hands
its token to the cell chosen by X.

### Triple modular redundancy

`ft_cell_block` puts three such sub-units side by side:

* Each sub-unit has its own copy of X and of every state input.
* Its two state outputs feed six majority gates: three for the X = 1
  output and three for the X = 0 output.
* Majority gate k drives copy k of that output, which goes to sub-unit k
  of the next cell.

A fault in one sub-unit, or in one voter, therefore only ever spoils one
copy of any signal. The next cell's voters outvote it, so faults do not
spread along the chain.

### Machines built from it

* `ft_cell_machine` is a three-state sequence detector, built from three
  fault-tolerant cells. Its output is 1 on the third and every later
  consecutive 1 at the input. Its arrows are:

  | from | x = 0 (output 0) | x = 1               |
  |------|------------------|---------------------|
  | q0   | q0               | q1 (output 0)       |
  | q1   | q0               | q2 (output 0)       |
  | q2   | q0               | q2 (output 1)       |

  * `cell_q[state][copy]` shows all nine flip-flops.
  * `z[2:0]` is the triplicated output, which is cell q2's X = 1 output.
* `ft_cell_ring` is an `N_STATES`-cell ring (default 7). It advances one
  cell per clock when x = 1 and holds when x = 0.

The testbenches check that the voted state outputs never deviate under
these faults:

* single stuck voter outputs on the wires between cells, and a stuck copy
  of X;
* two stuck voters of one cell that carry different signals;
* the same fault at the same position in every cell at once:
  * a stuck sub-unit flip-flop;
  * a dead sub-unit;
  * a stuck voter.

A triplicated chain is meant to survive all of these.

In Verilator, a `force` on a signal inside one instance of a repeated
module can also hit the same signal in every other instance. So the
testbenches only force signals inside a cell in every cell together,
explicitly. Single faults are forced on nets of the enclosing machine.

## 4. PROM-based machines

A PROM makes a machine reprogrammable: the state graph is just the memory
contents. By default the memories hold this five-state example graph
(next state / output):

| state | x = 0   | x = 1   |
|-------|---------|---------|
| q0    | q3 / 0  | q1 / 0  |
| q1    | q0 / 0  | q2 / 0  |
| q2    | q0 / 0  | q3 / 1  |
| q3    | q3 / 0  | q4 / 1  |
| q4    | q4 / 0  | q0 / 1  |

State qN is stored as the binary number N. The unused states 5 to 7
(5 to 15 in the 4-bit system) go to q0 with output 0.

### `rom_system1`

* A 16 × 10 PROM is addressed by a 4-bit state register.
* Each word holds both possible successors with their output bits:
  `{next_x1[3:0], out_x1, next_x0[3:0], out_x0}`.
* A `bit_select` multiplexer picks one half by X. That half supplies the
  next address and the output.

### `rom_system2`

This version puts X into the address instead: address = `{state[2:0], x}`.
Each 4-bit word is `{next[2:0], out}`. This removes the multiplexer and
halves the word width. Both systems share the generic `prom` (asynchronous
read, one synchronous write port used for reprogramming).

### `ft_rom_system`, the fault-tolerant version

Triplicating the PROM would mean programming three memories identically,
so the memory is kept single and protected by a code instead. Each word is
stored as a Hamming (7,4) code word, with bit positions numbered 1..7 from
the left:

| Position | Contents                           |
|----------|------------------------------------|
| 1        | parity over positions 1, 3, 5, 7   |
| 2        | parity over positions 2, 3, 6, 7   |
| 3        | next[2]                            |
| 4        | parity over positions 4, 5, 6, 7   |
| 5        | next[1]                            |
| 6        | next[0]                            |
| 7        | output                             |

All three parity bits are even parity.

The hardware around the memory is triplicated:

* three `hamming_decoder`s;
* three 3-bit address buffers, each loaded from its own decoder;
* a 3-bit majority voter that forms the PROM address from the three
  buffers;
* a voter that forms `z` from the three decoded outputs.

What this covers:

* A single bad bit in any stored word is corrected by every decoder.
* A faulty decoder or buffer is outvoted.
* A faulty buffer is reloaded with the voted-correct value on the next
  clock once the fault is gone.

The decoder computes the syndrome `{c4, c2, c1}`, which is the position of
the bad bit. It inverts only the data positions 3, 5, 6 and 7. An error in
a check bit needs no action.

`ftdm_pkg` holds the word layout and the functions that build all three
default memory images: `graph5`, `sys1_image`, `sys2_image` and
`sys2_ham_image`. A different graph only needs a different `INIT`
parameter, or a write through the `prog_*` port at run time.

## Files

| File | Contents |
|------|----------|
| `rtl/ftdm_pkg.sv` | shared types, majority/Hamming functions, example memory images |
| `rtl/majority_gate.sv` | bitwise 2-of-3 majority |
| `rtl/failsafe_{tt,km,nand,auto}.sv` | fail-safe machines (section 1) |
| `rtl/rm_majority_element.sv`, `rtl/ft_counter.sv`, `rtl/ft_counter_rm.sv` | Reed–Muller counters (section 2) |
| `rtl/cell_block.sv`, `rtl/ft_cell_block.sv`, `rtl/ft_cell_machine.sv`, `rtl/ft_cell_ring.sv` | cell-block machines (section 3) |
| `rtl/prom.sv`, `rtl/bit_select.sv`, `rtl/rom_system1.sv`, `rtl/rom_system2.sv`, `rtl/hamming_decoder.sv`, `rtl/ft_rom_system.sv` | PROM machines (section 4) |
| `rtl/ftdm_top.sv` | all machines side by side, shared clock and reset |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each has a watchdog. The fault-injection tests use `force`/`release` on
internal nets and flip-flops.

`tb/ftdm_top_tb.sv` runs the whole top at default parameters in three
phases:

1. Fault-free operation of every machine.
2. One fault in each machine, all at the same time. The fail-safe
   machines must reach their F-state; the others must mask the fault.
3. Reprogramming both PROM machines with a different graph.

It counts each mechanism it sees happen:

* fail-safe entry into 000 and 111;
* counter wrap and masked counter faults, for both counters;
* masked cell-block faults;
* corrected Hamming reads;
* reprogramming.

It fails if any count is zero.

## Simulating

With Verilator 5, for example for the top-level testbench:

    verilator --binary --timing -Wno-fatal rtl/ftdm_pkg.sv \
        $(ls rtl/*.sv | grep -v ftdm_pkg) tb/ftdm_top_tb.sv --top-module ftdm_top_tb
    ./obj_dir/Vftdm_top_tb

* The package must come first and appear only once.
* Any other testbench runs the same way with its own file and top module.
* The `[1:3]`, `[1:4]` and `[1:7]` ranges are deliberate. They follow the
  y1..y3 and bit-position-1..7 numbering used throughout. Verilator warns
  about them (ASCRANGE).

## Synthesis caution

The fault tolerance relies on logic that is deliberately duplicated:

* identical majority elements in the counters;
* three identical sub-units per cell-block;
* three identical decoders and buffers in the PROM machine.

A synthesis tool that shares common subexpressions will merge those
copies back into one, which removes the redundancy. For example, the
4-stage counter's 19 majority elements shrink to a few dozen gates.
To build real hardware, keep the hierarchy of these instances and mark
the copies so they are preserved, for example with a keep attribute or
by not flattening. The RTL itself carries no tool-specific attributes.

## Where this RTL departs from the source or fills gaps

* **Reset and outputs.**
  * Reset is a synchronous reset into the first state of each graph.
  * The source presets flip-flops directly in its simulator, or sets up the
    first address. It says nothing about a reset input.
  * The F-state flags, the counter's `en` and its corrected `count` output
    are additions.
* **Fail-safe machines.** The gate structures follow the equations and
  NAND levels of the source. The gate-by-gate drawings are used only where
  their labels could be read.
* **Counter.** The source lists the eight majority elements and which
  literals they supply, but does not say which element feeds which gate.
  The pairing used here is one valid choice.
* **Cell-block machines.**
  * The three-state machine and the seven-state ring use the full
    triplicated cell-block.
  * The source ran its seven-state ring on a reduced, non-working cell
    model meant only to save simulator memory. That model is not built.
* **Fault-tolerant PROM machine.**
  * The source names three decoders, three buffers and "majority logic"
    but does not place the voters. Here one voter drives the address and
    one drives the output.
  * The PROM's own address decoder is not protected, which is inherent in
    keeping a single memory.
  * Rows of the 16-word images that the example graph does not use go to
    state 0 with output 0.
* **PROM write port.** The memories are reprogrammable through a simple
  one-word write port. The source only says the devices can be erased and
  reprogrammed.
* **Wider counters.** For 4 and 5 stages the source gives only the
  parity-check matrices. The toggle equations and the element-per-toggle
  structure of `ft_counter_rm` are derived here.
* **Not built.**
  * The design-aid programs.
  * The transistor-level NAND gate used to motivate the fault model.

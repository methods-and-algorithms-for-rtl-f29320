# Complex multiplier from a functional-flow data-flow graph

This design computes the complex product

    (a + jb)(c + jd) = (ac - bd) + j(ad + bc)

It is built the way a functional-flow (FF) high-level synthesis route turns a
program into hardware. The program is compiled into a data-flow graph and a
control-flow graph. Both are then reduced at compile time, and what is left
becomes two separate circuits:

* **Data processing scheme.** Operation units and registers. A resource limit
  of two operations per step gives a three-step schedule on two shared units.
* **Control scheme.** It never looks at data and computes no conditions. It is
  a network of tiny *data-ready automata*: AND gates and flip-flops that pass
  "this value is available" signals along the edges of the control graph.

The control scheme tells the datapath when each step may fire. The last ready
signal is registered in the output port, together with the two result
elements.

## The control graph and its numbering

Every ready signal is named after a vertex of the reduced control graph. The
same numbers run through the RTL: bit `k` of `v_rdy_o` is the ready signal of
vertex `k`.

| vertex | kind | meaning | hardware |
|---|---|---|---|
| 3, 4, 5, 6 | input port | a, b, c, d available | flip-flop, D = port's ready input |
| 7 | data list (a, c) | operands of a*c present | AND(3, 5) |
| 9 | data list (b, d) | operands of b*d present | AND(4, 6) |
| 13 | data list (a, d) | operands of a*d present | AND(3, 6) |
| 15 | data list (b, c) | operands of b*c present | AND(4, 5) |
| 8, 10, 14, 16 | interpretation `*` | a*c, b*d, a*d, b*c ready | flip-flop after 7, 9, 13, 15 |
| 11 | data list (ac, bd) | operands of the `-` present | AND(8, 10) |
| 17 | data list (ad, bc) | operands of the `+` present | AND(14, 16) |
| 12, 18 | interpretation `-`, `+` | real and imaginary part ready | flip-flop after 11, 17 |
| 19 | data list (re, im) | result list complete | AND(12, 18) |
| 20 | result return | output port ready | flip-flop after 19, in the output port |

There are three kinds of automaton:

* **Data-list automaton** (`ff_list_automaton`). It becomes ready once as many
  element-ready signals have arrived as the list has elements. Here every list
  has two elements. The network uses the form "AND gate, then a register".
  The alternative form is a counter whose overflow is the ready signal. It is
  available through `STYLE = LIST_COUNTER` and is tested on its own, but the
  network does not use it.
* **Interpretation automaton** (`ff_interp_automaton`). It applies a function
  to a list, and is the AND of the list's data-ready and the function's ready.
  The functions `*`, `+` and `-` are constants, and a constant's ready signal
  is the constant 1. The gate therefore collapses to a wire. It is kept as a
  module so that the structure of the graph stays visible.
* **Result return automaton** (`ff_return_port`). This is the output port: a
  flip-flop for the ready signal plus the two result registers.

Two kinds of automaton named by the FF method do not appear:

* The constant automaton has become the tied-high `func_rdy_i` inputs.
* The parallel-list automaton is not needed, because every parallel list was
  opened into single operations at compile time.

### Timing of the ready network

All ready signals are levels. Suppose all four inputs become ready in cycle 0
and are held. Then:

* edge 1: vertices 3-6 are high, so the gates 7, 9, 13 and 15 go high;
* edge 2: vertices 8, 10, 14 and 16 are high, so the gates 11 and 17 go high;
* edge 3: vertices 12 and 18 are high, so the gate 19 goes high;
* edge 4: vertex 20 (`out_rdy_o`) is high.

In general, `out_rdy_o` rises four clocks after the last input ready rises.
When the inputs fall, the low level drains through the network the same way.

## The three-step data processing scheme

`cmul_datapath` has two `ff_op_unit` instances. Each unit can multiply, add or
subtract. Multiplies take W-bit operands; additions and subtractions work on
2W+1 bits. The schedule is:

| step | unit 0 | unit 1 | fires when | result goes to |
|---|---|---|---|---|
| 1 | a * c | b * d | lists 7 and 9 ready | product registers |
| 2 | a * d | b * c | lists 13 and 15 ready | product registers |
| 3 | ac - bd | ad + bc | lists 11 and 17 ready | output port (vertex 20) |

At most one step fires per cycle, in order. A step whose lists are not ready
waits; `stall_o` shows this. After step 3 the datapath sits in DONE until the
inputs are withdrawn.

The control network has no idea that only two units exist. It therefore
declares the products of vertices 14 and 16 ready one cycle before step 2
actually computes them. This does no harm, for two reasons:

* Step 1 needs lists 7 and 9, which together cover all four inputs. Once
  step 1 has fired, steps 2 and 3 always find their lists ready, so inside the
  top the datapath never stalls.
* Step 3 happens in the same cycle as gate 19 first goes high, or earlier.
  The result is therefore in the output port by the edge at which
  `out_rdy_o` rises.

An assertion in `cmul_ff_top` checks the second point.

## Interface and handshake (`cmul_ff_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `in_rdy_i` | in | 4 | data-ready of a, b, c, d |
| `in_data_i` | in | 4 x W | a, b, c, d, signed |
| `out_rdy_o` | out | 1 | result ready (vertex 20) |
| `out_re_o`, `out_im_o` | out | 2W+1 | ac - bd and ad + bc, signed and exact |
| `v_rdy_o` | out | 17 | ready signals of vertices 3..19 (observation) |
| `step_o`, `stall_o` | out | 2, 1 | datapath step firing, datapath waiting (observation) |

How to drive the top:

1. Each producer raises its port's ready with its data, at any cycle, and
   holds both stable.
2. When `out_rdy_o` is high, the consumer reads the result.
3. The producers then lower all four readies for at least one cycle. One low
   cycle is enough: the gap travels down the network as a bubble. The next
   operation may raise its readies in the very next cycle.

A result's ready is the first rise of `out_rdy_o` after it has been low. The
previous result's ready can still be high while the next operation's inputs
arrive. It always drops for at least one cycle before the next result.

The ready chain behaves like a pipeline, but the shared datapath cannot start
a new product every cycle. A producer must therefore not withdraw inputs
before `out_rdy_o`. If it did, the network would pass a ready pulse that the
datapath had not matched, and the assertion would fire.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `W` | 16 | `cmul_ff_top`, `cmul_datapath`, `ff_op_unit`, `ff_return_port` | input width; results are 2W+1 bits |
| `N` | 2 | `ff_list_automaton` | list size (every list in this graph has two elements) |
| `STYLE` | `LIST_AND_REG` | `ff_list_automaton` | `LIST_AND`, `LIST_AND_REG` or `LIST_COUNTER` |

The method leaves the word width open ("an integer of some length").
16 bits is this design's choice.

## Where this design makes its own choices

These points are fixed by this design rather than by the FF method:

* **Word width.** 16-bit signed inputs. Results are 2W+1 bits wide, so no
  overflow is possible.
* **Operation units.** The limit "two multiplications / additions /
  subtractions per step" is read as two general units, each able to do all
  three operations.
* **Step order.** a*c and b*d are computed in step 1, a*d and b*c in step 2.
  The method fixes only the three-step shape.
* **Coupling of the two schemes.** Each datapath step is gated by the ready
  signals of its lists, and a small step counter enforces the schedule.
* **Handshake and reset.** The hold-until-ready handshake above, and an
  asynchronous active-low reset that clears every register.
* **Data lists as AND gates.** The method allows a list automaton to be a
  counter or an AND gate with a register. It names the counter for this
  example, but its synthesized circuit uses AND gates and registers. The
  network follows the AND-gate form, which also matches level-style ready
  signals.
* **Counter behaviour.** In the counter form, a ready input that is high for
  one cycle counts as one event. `clr_i` restarts the count.

## Files

| file | content |
|---|---|
| `rtl/ff_pkg.sv` | operation codes, list-automaton styles, port indices, vertex range |
| `rtl/ff_op_unit.sv` | multiply / add / subtract unit |
| `rtl/ff_list_automaton.sv` | data-list automaton, three forms |
| `rtl/ff_interp_automaton.sv` | interpretation automaton (AND of data- and function-ready) |
| `rtl/ff_return_port.sv` | output port: ready register and two result registers |
| `rtl/ff_control_scheme.sv` | ready network, vertices 3..19 |
| `rtl/cmul_datapath.sv` | three-step, two-unit datapath |
| `rtl/cmul_ff_top.sv` | top: control scheme, datapath and output port |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
It has a watchdog that counts a failure if the run hangs. For example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -Irtl -Itb -y rtl -y tb +libext+.sv rtl/ff_pkg.sv tb/tb_cmul_ff_top.sv \
      --top-module tb_cmul_ff_top -o sim
    ./obj_dir/sim

To lint a module, run `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/ff_pkg.sv rtl/<module>.sv`.

What the testbenches check:

* **`tb_cmul_ff_top`** runs at the default W = 16. It sends 500 products
  through the top, with operands that are random or of full negative
  magnitude. The four inputs arrive together or at staggered cycles, and gaps
  between operations are 1 to 6 cycles. It checks both result parts against
  integer arithmetic. It checks the four-clock latency from the last input.
  It checks that each operation takes exactly three datapath steps and that
  no stall occurs. It also requires that each of these cases occurred at
  least once: inputs arriving together, inputs staggered, step 1 waiting on a
  partial set of lists, back-to-back operations and corner operands.
* **`tb_ff_control_scheme`** computes the rise cycle of every vertex from the
  graph, for random arrival times. It then checks every vertex in every
  cycle, and checks that the network drains when the inputs fall.
* **`tb_cmul_datapath`** plays the control scheme, with permissions that arrive
  late or out of order. It checks step order, stalls and results.
* **`tb_ff_list_automaton`** checks all three forms, including the counter
  with N = 2 and N = 3, against a cycle model.
* The remaining testbenches cover the small leaf modules exhaustively or
  randomly.

Each testbench was also run against a copy of its module with one deliberate
bug, and each one caught it.

## Known warnings

Verilator's `-Wall` lint reports three kinds of warning:

* unused package constants, in modules that do not need them;
* `clk` and `rst_n` unused in the AND-only form of the list automaton, which
  keeps the same ports as the registered forms;
* `rst_n` used both as an asynchronous reset and in the assertion's
  `disable iff`.

None of them affects the logic.

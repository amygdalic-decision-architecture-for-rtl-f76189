# Amygdala arbitration: a hardware-bounded action selector

A vision classifier can be wrong, corrupted or fooled. This design makes sure that,
however wrong it is, the actuators it controls can only ever be put in one of a small
set of states fixed when the logic is built. The classifier never drives an actuator
itself. It reports what it sees: one class index per classifier. A small piece of FPGA
logic, called here the *amygdala node*, maps that report onto exactly one of M
pre-wired option pins. No input can select an option that is not wired, because none
exists. The guarantee covers *which* actions are possible. Whether the chosen action is
*right* still depends on the classifier.

The RTL implements the FPGA part of the architecture described in "Amygdalic Decision
Architecture for Embedded AI Systems" (camera → NPU classifier grid → SPI → FPGA lookup
→ actuator drivers). The camera, the NPU and the driver electronics are outside the
FPGA and are not part of this RTL.

## Signal path

```
  inference processor                         FPGA (amygdala_top)
  ------------------    SPI, 1 byte/row    +------------------------------------------+
  N classifier rows --> argmax per row --> | spi_argmax_rx --+--> amygdala_node --> act_drive[M-1:0] (one-hot)
  (lowest index wins a tie)                |                 |
                                           |                 +--> decision_dag  --> dag_action (one-hot)
                                           +------------------------------------------+
```

* **Frame.** For every camera frame the inference side sends N bytes, one per
  classifier row, row 0 first. Byte r is the index of row r's most probable class.
  When two classes tie, the lower index is sent. N defaults to 50.
* **Arbitration.** `amygdala_node` turns the frame into one option. It drives that
  option's pin and holds it until the next good frame.
* **Decision DAG.** `decision_dag` chains several nodes, for tasks that need a
  sequence of bounded decisions (see below). In `amygdala_top` it runs on the same
  frame, next to the single node. A product would normally fit only the one it needs.

## How a node decides: A = f ∘ π

The input space of a node is the product of all rows' class counts. For 50 rows that
is far too large for a flat table. So the table is **sparse**: it lists only the
situations that should cause an action. Anything not listed selects the node's
**safe option** (for example "flag for a human" or "do nothing").

An entry of the table (`amygdala_pkg::lut_entry_t`) reads:

> if row `row` currently reports class `cls`, choose option `opt`.

Several rows can have a matching entry in the same frame, for example "hazard in the
cell" and "part is complete". That conflict is settled by a **fixed row priority**:
row 0 outranks row 1, row 1 outranks row 2, and so on. The highest-ranked row with a
matching entry decides.

In hardware this takes two stages, followed by a register:

1. `sparse_lut` (f) has one 8-bit comparator per table slot, not one per row and
   class. Each slot checks its row's byte against its class. The matches are gathered
   per row into `row_hit[r]` and `row_opt[r]`. Rows that no entry names give
   constant-zero outputs, which synthesis removes.
2. `priority_projection` (π) is a priority encoder over `row_hit`. It takes the
   option of the lowest-numbered hit row. If no row hits, it takes `SAFE_OPT`.
3. The result is registered in `amygdala_node` and decoded one-hot onto `act_drive`.

**Why the output cannot leave the option set.** The register holds an option index.
The pins are a decode of that index against 0..M−1. A table entry that names an
option ≥ M is a construction error, and the node replaces it with `SAFE_OPT` before
the register. Reset also loads `SAFE_OPT`. So exactly one pin is high in every cycle.
An assertion in `amygdala_node` (`$onehot(act_drive)`) checks this in simulation.

**Why the table cannot be rewritten at run time.** The table is a module parameter
(`ENTRIES`, `SAFE_OPT`, `M`). No bus, register file or write port reaches it. To
change the mapping you rebuild the bitstream. That is the point of the design.

### Writing a table

`amygdala_pkg::QC_TABLE` is the default. It is an example for an industrial inspection
option set {0 pass, 1 reject, 2 flag_human, 3 halt_line}, and its safe option is
flag_human:

| slot | row (meaning) | class | option |
|---|---|---|---|
| 0 | 0 cell hazard | 1 | halt_line |
| 1–2 | 1 surface defect | 1, 2 | reject |
| 3 | 1 surface defect | 3 | flag_human |
| 4 | 2 orientation | 1 | reject |
| 5 | 3 completeness | 0 | pass |
| 6 | 3 completeness | 1 | reject |
| 7–15 | unused (`valid = 0`) | | |

To build a node for another task:

* order the rows by priority, most important first, in the inference output;
* list one entry per (row, class) that should trigger an action;
* set `M` to the number of option pins;
* set `SAFE_OPT` to the option used for everything unlisted.

If two valid slots name the same (row, class), the lower slot wins.

Tables are packed arrays with ascending ranges (`lut_entry_t [0:E-1]`). An assignment
pattern `'{...}` therefore lists slot 0 first.

To get an "uncertain" class that routes to the safe option, give the row that class and
no entry for it. No extra logic is needed.

## Decision DAG

Some decisions are sequences: a first node picks among a few options, and some of those
options lead to a further node with its own option set. `decision_dag` builds this
from `NODES` amygdala nodes:

* each node has its own table (`NODE_ENTRIES[v]`), option count (`NODE_M[v]`) and safe
  option (`NODE_SAFE[v]`);
* `CHILD[v][o]` gives the next node after option `o` at node `v`, or `TERMINAL`;
* every child index must be larger than its parent's, or elaboration stops with an
  error. This makes the graph acyclic by construction and bounds the walk to `NODES`
  steps.

All nodes decide in parallel in the first clock. A combinational walk then starts at
`ROOT` and follows `CHILD`. In the second clock it registers the node where it stopped
(`final_node`), the option chosen there (`final_opt`) and the nodes it passed
(`visited`). `action` is one-hot over the union of all option sets. Node v's options
start at bit ΣNODE_M[0..v−1]. So the final action is always one of the
ΣNODE_M wired actions.

The default configuration has four nodes with 3, 3, 5 and 8 options: target
assessment, threat geometry, approach maneuver and a set of K = 8 pre-computed
solutions. The table below gives the routing and the classifier rows each node reads.
The option counts follow the source architecture's four-node example. The routing, the
rows, K and the safe options are this design's choices.

| node | reads rows | options | leads on |
|---|---|---|---|
| 0 | 4, 5 | engage, hold, await_confirmation (safe) | engage → node 1 |
| 1 | 6 | intercept_likely, intercept_unlikely, abort (safe) | intercept_likely → node 2 |
| 2 | 7 | accel_right, accel_left, dive, afterburner, abort (safe) | any maneuver → node 3 |
| 3 | 8 | s_1 … s_8 (safe s_1) | terminal |

## SPI link

The link format is this design's choice. The source only says "8-bit argmax over SPI".

* SPI mode 0: the receiver samples MOSI on the rising edge of SCK. Bits are sent MSB
  first. There is no MISO.
* One frame is one chip-select assertion, and it holds exactly N bytes.
* SCK, CS and MOSI pass through two-flop synchronisers into `clk`, which must run at
  least 4× SCK.
* A frame with too few or too many bytes, or a partial byte, is dropped.
  `frame_err` pulses and the previous frame stays in force. There is no CRC: the
  architecture assumes an uncorrupted bus.

## Timing

All figures below are clk cycles, measured from the first clk edge that sees CS
released:

| event | cycles | at 12 MHz |
|---|---|---|
| `frame_valid` (frame committed) | 3 | 0.25 µs |
| `act_drive` / `act_valid` | 4 | 0.33 µs |
| `dag_action` / `dag_valid` | 5 | 0.42 µs |

A 50-byte frame is 400 SCK periods, about 0.27 ms at SCK = clk/8 = 1.5 MHz (the rate the testbenches use). That is well inside
the architecture's budgets of under 1 ms for SPI transfer and under 0.1 ms for the
lookup. The 12 MHz clock is an assumption, typical of a small iCE40. Each frame is
handled on its own, and no history is kept.

At the defaults, the whole top synthesises to about 415 word-level cells and 570
flip-flop bits. Frame bytes of rows that no table reads are removed by synthesis, so
the size depends on the tables more than on N.

## Files

| file | contents |
|---|---|
| `rtl/amygdala_pkg.sv` | widths, `lut_entry_t`, default single-node and DAG tables |
| `rtl/spi_argmax_rx.sv` | SPI slave, frame check, frame buffer |
| `rtl/sparse_lut.sv` | f: per-slot comparators, per-row gather |
| `rtl/priority_projection.sv` | π: row priority encoder with safe default |
| `rtl/amygdala_node.sv` | f ∘ π, output register, one-hot option pins |
| `rtl/decision_dag.sv` | node chain with routing table |
| `rtl/amygdala_top.sv` | receiver + single node + DAG |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. The
expected values are written out in the testbench from the meaning of the tables, not
read from the RTL parameters.

* `tb_sparse_lut`, `tb_priority_projection`: random frames. The priority test finds
  the expected winner with a lowest-set-bit trick rather than a loop.
* `tb_amygdala_node`: option, deciding row, default flag, one-hot pins, reset value,
  one-cycle latency, and that outputs hold between frames. It also checks the
  replacement of an out-of-set table entry by the safe option.
* `tb_spi_argmax_rx`: good, short, long and stray-bit frames; response 3 cycles
  after CS release; frame time under 1 ms.
* `tb_decision_dag`: all four path depths, leaf safe defaults, one-hot action,
  two-cycle latency.
* `tb_agri_node`: a five-option node for crop monitoring {alert_disease, alert_pest,
  ready_harvest, irrigate, no_action}, showing how the same module is configured for
  another option set.
* `tb_amygdala_top`: the end-to-end test at the default parameters. The testbench acts
  as the inference processor: it draws class scores, takes the argmax with the
  lowest-index tie-break and sends frames over SPI. It checks both arbiters and the
  latencies. It counts and requires the following:
  * explicit hits;
  * safe defaults;
  * priority conflicts;
  * argmax ties;
  * rejected frames;
  * DAG depths 1–4.

Run a testbench with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_amygdala_top rtl/amygdala_pkg.sv tb/tb_amygdala_top.sv
./obj_dir/Vtb_amygdala_top
```

Every testbench runs in a few seconds.

## Where this departs from, or goes beyond, the source architecture

* **π at run time.** The source defines π as a fixed priority on rows that picks the
  highest-priority row with a table entry. It also says that priority resolution
  belongs to table construction, not run time. Here the priority is fixed when the
  logic is built, but it is evaluated every frame by a small priority encoder. The
  result is the same, and the tables stay short.
* **Entry format.** Entries match a single (row, class) pair. Combinations of several
  rows in one entry are not supported.
* **Class count.** The class index is 8 bits, so a row can have at most 256 classes.
  The source's example of a 500-class row would not fit its own 8-bit encoding.
* **Design choices.** The SPI framing, the clock-domain crossing, the reset value
  (the safe option), the table contents, M = 4, the DAG routing and K = 8 are all
  choices of this design.
* **Not built.** The source lists several extensions as open questions, and none of
  them is built:
  * a state buffer that needs T consistent frames before acting;
  * a confidence-threshold gate fed by full softmax outputs;
  * fault detection for FPGA upsets or bus corruption.

  The offline procedure that builds a sparse table from a domain's list of
  meaningful situations is a design-time tool, not hardware. It is not included.

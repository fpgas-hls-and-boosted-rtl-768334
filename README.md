# Boosted-decision-tree inference on FPGAs: a static forest and a Forest Processing Unit

A boosted decision tree (BDT) model is a sum of many small binary trees. Each
inner node compares one input feature with a threshold (`x[f] <= t`; true
goes left). Each leaf holds a value. A prediction walks every tree from its root to
a leaf and adds up the leaf values. This repository holds SystemVerilog for two
ways of putting that on an FPGA:

* **Static forest** (`bdt_forest`, `bdt_tree`, `adder_tree`). The trained
  model is a set of module parameters, so every threshold is a constant
  inside a comparator. All trees are evaluated at once and a new input is
  accepted every clock. The default is 20 trees of depth 5, with a latency of 7 cycles.
  Changing the model means re-synthesising. `bdt_accelerator` wraps the forest
  as a memory-to-memory engine that reads floats and writes float scores.
* **Forest Processing Unit, FPU** (`fpu`, `tree_engine`, `adder_tree`). The
  model is data. Each of 200 *tree engines* holds one tree in its own node
  memory and walks it. A new model is loaded at run time through an
  instruction port, with no re-synthesis.

`conifer_top` instantiates both side by side. They share only clock and
reset.

## Inverting the tree walk (static forest)

Walking a tree is sequential: the next node depends on the last
comparison. The static design turns the walk around. For every node it asks
"does the decision path reach this node?":

* the root is always reached;
* a left child is reached if its parent is reached **and** the parent's
  comparison is true;
* a right child is reached if its parent is reached **and** the comparison
  is false.

None of the comparisons depends on another, so `bdt_tree` computes all of
them in the same cycle (stage 1, registered). The "reached" bits then follow
the tree from the root down as a chain of AND gates. Exactly one leaf's bit is
set, and that bit selects the leaf value through an AND-OR mux (stage 2,
registered). The logic does the same work for every input and contains no
branches, so the tree is fully pipelined (II = 1).

The tree arrays use a flat layout, one entry per node:

| node | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| feature | 4 | 7 | 1 | -2 | -2 | -2 | -2 |
| threshold | 7 | 2 | 9 | - | - | - | - |
| child_left | 1 | 3 | 5 | -2 | -2 | -2 | -2 |
| child_right | 2 | 4 | 6 | -2 | -2 | -2 | -2 |
| value | - | - | - | 0.5 | 0.4 | -0.5 | -1 |

`-2` marks a leaf. This 7-node tree is `bdt_tree`'s default. For example, with
x1 = 12, x4 = 3 and x7 = 5 the path is 0 → 1 → 4, so the tree score is 0.4.
A node that no other node points to is never reached. This lets trees of
different shapes be padded to one size (`N_NODES`).

`bdt_forest` feeds the same features to `N_TREES` trees and sums their scores
in `adder_tree`. That is a pairwise reduction with one register per level
(⌈log2 N⌉ levels). Total latency is `2 + ⌈log2 N_TREES⌉` cycles, which is 7
for 20 trees, and does not depend on tree depth.

### Default model

`conifer_pkg` holds the defaults:

* **Tree 0** is a real example tree. It has 49 nodes, depth 5 and uses features 0..9. Its thresholds
  and leaf values are rounded to 1/1024.
* **Trees 1-19** are complete depth-5 trees that stand in for a trained model. They are generated from
  formulas in `conifer_pkg`:
  * feature = (7t + 3n) mod 10;
  * threshold = ((37t + 101n) mod 41 − 20)/8;
  * leaf value = ((53t + 29n) mod 33 − 16)/16.

To use your own model, override `FEATURE`, `THRESHOLD`, `CHILD_LEFT`,
`CHILD_RIGHT` and `VALUE` on `bdt_forest`. Each is a packed array
`[0:N_TREES-1][0:N_NODES-1][17:0]` of signed integers (thresholds and values
as raw fixed-point numbers).

## Number format

Features, thresholds and scores are signed fixed point: 18 bits, of which 10
are fraction bits, giving the range [−128, 128) in steps of 1/1024. The raw value is
`round(v·1024)`. Sums are wider by ⌈log2 N⌉ bits, so they cannot overflow.
The accelerator converts IEEE-754 single-precision inputs as follows:
* it truncates toward −∞ and wraps on overflow;
* zero, denormals, infinities and NaN all become 0.

Scores are converted back to floats exactly (`float_conv_pkg`).

## The Forest Processing Unit

A tree engine stores one node per memory word. A `fpu_node_t` holds
`is_leaf, feature, threshold, score, child_left, child_right`, and the child
fields are addresses. The root is at address 0. The engine loops through three
states:

| state | action |
|---|---|
| FETCH | read the node at the current address (synchronous RAM) |
| DECIDE | leaf: output its score, finish. Inner node: register `x[feature] <= threshold` |
| STEP | address ← result ? child_left : child_right |

The next read cannot start before the comparison is known. This dependence
sets the cost at 3 cycles per inner node. A leaf at depth *d* is reached
`3d + 2` cycles after start. Throughput comes from running many engines in parallel, not
from pipelining one of them.

`fpu` adds a data bus and an aggregator around `NTE` engines (default 200).

* **LOAD** (`cmd_instr = INSTR_LOAD`, `cmd_valid/cmd_ready`). The unit
  accepts `NTE × NNODES` nodes on `node_valid/node_ready/node_data`, in
  engine-major order: engine 0's addresses 0..NNODES−1, then engine 1, and so on. It
  pulses `load_done` after the last node. Give an engine with no tree a root
  leaf of score 0. The node memories are not reset and keep their contents, so one LOAD
  serves any number of inferences.
* **INFER** (`cmd_instr = INSTR_INFER`) takes `cmd_x` (16 features) and
  starts every engine. When every engine has reached its leaf, it sums their scores in
  an `adder_tree` and pulses `y_valid` with the result. The latency, counted
  from the edge that takes the command, is `5 + 3·(deepest path) +
  ⌈log2 NTE⌉` cycles.

One tree per engine means that the number of engines limits the number of trees in a model.
The memory depth (`NNODES` = 512) limits the size of each tree.

## Accelerator wrapper

`bdt_accelerator` runs `n_samples` samples. For each sample it:
1. reads `N_FEATURES` words from `x_base + N_FEATURES·n + i`;
2. converts them to fixed point and runs the forest;
3. writes the score as a float to `score_base + n`.

It pulses `done` at the end. `n_f` and `n_c` report the number of features and classes (1).
The memory port is a plain valid/ready request channel, plus an in-order
response channel that accepts any read latency. The write channel is valid/ready too. Samples are
processed one after another, not overlapped.

## Files

| file | contents |
|---|---|
| `rtl/conifer_pkg.sv` | number format, tree layout, default models, FPU node type and instructions |
| `rtl/float_conv_pkg.sv` | float ↔ fixed-point functions |
| `rtl/bdt_tree.sv` | one static tree (parallel compare, activation, leaf select) |
| `rtl/adder_tree.sv` | pipelined pairwise sum |
| `rtl/bdt_forest.sv` | static forest |
| `rtl/bdt_accelerator.sv` | memory-to-memory wrapper of the forest |
| `rtl/tree_engine.sv` | FPU tree engine |
| `rtl/fpu.sv` | Forest Processing Unit |
| `rtl/conifer_top.sv` | both designs side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench checks its block against a reference that walks the trees
from the root. It also checks latencies and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl rtl/conifer_pkg.sv rtl/float_conv_pkg.sv \
    tb/tb_conifer_top.sv --top-module tb_conifer_top -o sim
./obj_dir/sim
```

The testbenches are:
* `tb_bdt_tree`: the worked example above, features placed exactly on thresholds, and II = 1.
* `tb_adder_tree`: 20 and 7 inputs, extreme values.
* `tb_bdt_forest`: 20 trees, 7-cycle latency.
* `tb_tree_engine`: 3 cycles per node, and reloading the memory.
* `tb_fpu`: 6 engines, random gaps in the node stream, then a second model loaded.
* `tb_bdt_accelerator`: float memory with stalls.
* `tb_conifer_top`: all parameters at their defaults. It loads the 20 forest trees into the 200-engine FPU and
  checks that the FPU and the static accelerator give the same scores on the
  same samples. It then reloads the FPU with a different model. It runs in well
  under a minute.

The testbenches drive and sample on the falling clock edge. The simulator has
two-state logic, so every register that is read is either reset or written before it is read.
Assertions check that leaf activation is one-hot, that the trees stay in step, and that no start arrives while an engine is busy.
Run with `--assert` to enable them.

## Choices and limits

* Pipeline placement in the static tree (two registers) was chosen so that the 20-tree
  forest has 7 cycles of latency. An alternative registers once per tree level, which makes latency grow with depth. That version is not included.
* Only summation is built as the aggregation. Multi-class models are not supported: each sample gets one
  score. The final link function (for example a sigmoid to a probability) is left to software.
* FPU memory depth (512), feature count (16), bus protocols, node order for
  LOAD and field widths are this design's choices.
* FPGA-vendor interfaces (AXI, DMA, host driver) are not included. The valid/ready
  ports stand where they would connect.
* A tree engine has no limit on walk length. A model that contains a cycle never
  finishes.

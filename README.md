# MAERI: a DNN accelerator built around its interconnect

Most DNN accelerators wire a fixed number of multiply-accumulate units together,
so a layer whose neurons do not match that grouping (a 3x3 filter on a 16-wide
adder tree, a sparse filter with 5 non-zero weights, a 1024-input LSTM gate)
leaves units idle. MAERI (Multiply-Accumulate Engine with Reconfigurable
Interconnect) takes the opposite approach. Multipliers and adders are free-standing
pools, each embedded in a tiny switch (a *switchlet*), and the configurable
networks between them decide at run time which multipliers and adders form one
neuron. A group of multipliers summed into one output is a **virtual neuron
(VN)**. Mapping a layer onto MAERI means choosing VN sizes; VNs of different sizes
can run side by side.

This repository holds synthesizable SystemVerilog for that accelerator: 64
multiplier switchlets, a fat distribution tree with 16 words per cycle at its
root, an augmented reduction tree of 63 adder switchlets, a collection stage
writing 8 outputs per cycle, prefetch buffers and the controllers. Every block
has a self-checking testbench.

## Data path at a glance

```
 host ──► weight buffer ─┐                           ┌──► output buffer ──► host
 host ──► input buffer ──┤                           │       ▲
                         ▼                           │       │ RED_BW writes/cycle
                 maeri_controller ──fire──┐   collection_unit + activation units
                         │ DIST_BW words   │          ▲ one slot per VN
                         ▼                 ▼          │
                   dist_network ──► 64 × mult_switchlet ──► art_network
                 (fat tree of simple     ◄─fwd── (local      (63 adder switchlets,
                  switchlets, multicast)  forwarding)         configured by art_config_ctrl)
```

| module | role |
|---|---|
| `maeri_pkg` | widths (16-bit operands, 32-bit sums), packet kind, reduction op, node record and configuration types |
| `simple_switchlet` | 1:2 switch of the distribution tree, multicast by destination mask, lane packing on fat links |
| `dist_network` / `dist_subtree` | the distribution fat tree (recursive) |
| `mult_switchlet` | weight register, input register, multiplier, forwarding link |
| `adder_switchlet` | one reduction-tree node: add or max, route or emit |
| `art_config_ctrl` | reduction-tree reconfiguration controller: mapping → per-node configuration |
| `art_network` | the augmented reduction tree and its collection lanes |
| `collection_unit`, `activation_unit` | drain results at RED_BW per cycle through ReLU into the output buffer; fold accumulation |
| `prefetch_buffer` | multi-port scratchpad bank (weights, inputs, outputs) |
| `maeri_controller` | runs one layer mapping: configure, distribute weights, stream inputs, fire |
| `maeri_top` | everything wired together |

## Distribution: a fat tree that multicasts

Words leave the buffers as `{last, dest_mask[N], data}`. The 64-bit mask names
every multiplier that should receive the word, so one word can go to one
multiplier (unicast) or to many (multicast, e.g. the same input element to the
matching position of four VNs in a fully-connected layer).

Each `simple_switchlet` forwards a word to its left child, its right child or
both, depending on which half of the mask has bits set. It also cuts the mask in
half on the way down. The tree is *fat*: a link into a subtree of `L` leaves has
`min(DIST_BW, L)` lanes. `DIST_BW = 1` is a plain binary tree and
`DIST_BW = N` is the full fat tree. With this lane rule no link can ever
overflow, as long as each multiplier receives at most one word per cycle. Every
switchlet asserts that.

A switchlet holds each word for one cycle, so a word reaches its multiplier
`log2(N)` = 6 cycles after the controller sends it.

## Multiplier switchlets and local forwarding

A multiplier switchlet keeps a stationary weight and a streaming input, each
loaded by a distributed word of the matching kind. The controller's `fire` pulse
starts a multiply, and the product goes to the reduction tree on the next cycle.

Neighbouring switchlets are joined by one-way forwarding links. On a fire, a
switchlet with `fwd_sel` set takes its *next* input from its right-hand
neighbour's current input. For a sliding-window convolution this shifts the
window by one, so each step needs only one new word per VN instead of a full
window. The `conv_fwd` case of the top-level test runs exactly that.

## The augmented reduction tree (the hard part)

A VN is a run of consecutive active multipliers. `vn_start[i]` marks the first
leaf of a VN and `active[i]` says whether leaf `i` is used at all. The tree has to
sum every VN in the same pass, whatever the sizes, without two VNs needing the
same link at the same time. A plain binary adder tree cannot do that: a VN that
straddles the boundary between two subtrees shares their links with its
neighbours.

Here each tree link carries two partial sums, described by `edge_rec_t`:

* the **left-edge partial**: the partial sum of the VN that touches the
  subtree's left edge and continues further left;
* the **right-edge partial**: the same for the right edge.

A node covering leaves `a..b` with midpoint `m` behaves as follows:

* If leaf `m+1` belongs to the same VN as leaf `m` (`add_en`), the VN crosses the
  node's midpoint. The node's single adder combines the left child's right-edge
  partial with the right child's left-edge partial.
* That sum then does one of three things:
  * It continues as this node's left-edge partial (`sum_left`), if leaves `a..m`
    are all one VN and that VN goes on left of `a`.
  * It continues as this node's right-edge partial (`sum_right`), in the mirror
    case.
  * Otherwise the VN is complete, and the node **emits** it into the output slot
    of the VN's first leaf (`emit_slot`).
* Partials that do not meet at this node pass straight through to the matching
  output lane. These bypass lanes replace both the forwarding links between
  adjacent adders and the extra bandwidth near the root.

A VN of `s` leaves uses exactly `s-1` adders. It completes at exactly one node:
the lowest one that covers it. A VN of one leaf is emitted at its multiplier.
`art_config_ctrl` derives all of this from `vn_start`/`active` in one
combinational pass and registers it when `load` is pulsed.

Emitted sums travel to the root on a collection path with one lane per slot.
They are re-timed level by level, so all results of one fire come out together,
`log2(N)` cycles after the products go in. The tree is fully pipelined and
accepts a new wave every cycle. `red_op = RED_MAX` turns every adder into a
comparator for max pooling.

## Collection and the two bandwidths

`collection_unit` takes a wave with up to 64 valid slots and writes at most
`RED_BW` of them per cycle, lowest slot first, to consecutive output-buffer
addresses. Each one passes through an `activation_unit`: ReLU when `relu_en` is
set, otherwise a plain pass-through.

`maeri_controller` runs a layer in three phases: configuration, weights, then
input steps. A step is the run of input words up to one with `last` set. It
produces one output per VN. The controller sends up to `DIST_BW` words per cycle
and never mixes two steps in one cycle. It fires the step `log2(N)+1` cycles
after the step's last word. Two limits stretch a step, and each is counted:

* **distribution stall** (`dist_stall_count`): a step with more than `DIST_BW`
  words needs several cycles;
* **reduction/collection stall** (`red_stall_count`): a wave of `num_vn`
  outputs drains in `ceil(num_vn/RED_BW)` cycles, so step ends are held at least
  that far apart.

Words of the next step may already be in flight while the current one fires. A
word reaching a multiplier in the same cycle as a fire is kept for the next fire.
This gives back-to-back steps a throughput of one step per cycle when neither
bandwidth limits.

## Programming it

1. Write weight words to the weight buffer (`wb_*`) and input words to the input
   buffer (`ib_*`). The word format is `{last, dest_mask[63:0], data[15:0]}`.
   For inputs, `last` closes a step.
2. Set `vn_start`, `active`, `fwd_sel`, `red_op`, `relu_en`, `n_weights` and
   `n_inputs`, then pulse `start`.
3. Wait for `done`. `n_outputs` results are at output-buffer addresses
   `0 .. n_outputs-1`, step by step, and within a step in VN order.

The mapping compiler is not part of this design. Ordering inputs for sparse
filters and choosing VN sizes are the host's job.

### Neurons larger than the array: temporal folding

A neuron with more inputs than there are multipliers (for example a 1024-input
LSTM gate) is split into folds. Each fold is one run with its own weights and
inputs, and every fold writes the same output addresses. Set `accumulate` for
every fold after the first. The collection unit then reads the word already at
each output address and combines it with the new result (add, or max in pooling
mode) before writing it back. Set `relu_en` only on the last fold, so that the
activation is applied to the complete sum. Within one run every address is
written once, so the read never conflicts with a pending write.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | multiplier switchlets; the configuration evaluated for the architecture |
| `DIST_BW` | 16 | words per cycle into the distribution tree; 16 is the zero-stall point reported for VGG16 CONV1 |
| `RED_BW` | 8 | outputs per cycle into the output buffer; the matching reduction-bandwidth point |
| `DEPTH` | 1024 | words per prefetch buffer (this design's choice) |
| `DATA_W` / `ACC_W` | 16 / 32 | operand / sum widths in `maeri_pkg` (this design's choice) |

`N` must be a power of two, at most 256.

## Where this design follows the architecture and where it chooses

Taken from the architecture:

* separate multiplier and adder switchlets;
* a binary distribution tree with optional fat links and multicast;
* one-way local forwarding links between multipliers;
* a reduction tree that reduces any mix of VN sizes at once, with extra
  bandwidth towards the root;
* a reconfiguration controller that builds VNs from the mapping;
* temporal folding of neurons larger than the array;
* activation units ahead of the output buffer;
* prefetch buffers for inputs, weights and outputs;
* 64 multipliers, with bandwidths in the range the architecture studies.

Choices made here:

* **Reduction tree wiring.** The original reduction tree links adjacent adders
  that have different parents, and completes a crossing VN at that level. Its
  detailed link usage is not available. This design instead carries the edge
  partials upward on bypass lanes and adds them where they meet. The results are
  the same and so is the adder count per VN (`s-1`), but the sums are formed
  higher in the tree and the per-link lane count differs.
* **What is forwarded.** The architecture describes forwarding of weights between
  multipliers. Here the streaming operand is forwarded (inputs, with stationary
  weights), which serves the sliding-window reuse the links exist for. Either
  operand type is loaded through the distribution tree.
* **Collection bandwidth.** It is modelled as outputs written per cycle, not as
  lanes in the tree.
* **Widths, formats and timing.** Operand and sum widths, the buffer word
  format, the fire strobe, one register per tree level, the controller's phases
  and step rules, and asynchronous-read buffers are all this design's own.
* **Fold accumulation.** Where folded partial results are summed is this
  design's choice: in the output buffer, by read-combine-write.
* **Activation.** ReLU is the only activation function.
* **Not built.** The lookup tables shown in the architecture have no described
  function and are not built. DRAM and the host CPU are outside the design.

## Verification

Each block has a testbench in `tb/` that checks its outputs against values
computed independently. Each prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. Each has a watchdog.

* `tb_simple_switchlet`, `tb_dist_network`: random unicast/multicast traffic at
  full root bandwidth; exact 4-cycle delivery in the 16-leaf test.
* `tb_mult_switchlet`: products, forwarding shift, inactive leaves.
* `tb_adder_switchlet`, `tb_art_config_ctrl`, `tb_art_network`: random mixed-size
  mappings with unused leaves. Checked: every VN's sum or max appears in its slot
  after exactly `log2(N)` cycles, each VN uses `s-1` adders and completes once,
  and waves run back to back.
* `tb_collection_unit`: order, addresses, ReLU, busy time `ceil(k/RED_BW)-1`,
  and accumulation onto stored words.
* `tb_maeri_controller`: word order, at most `DIST_BW` words per cycle, fire
  exactly `log2(N)+1` cycles after each step, step spacing under the collection
  limit, stall counters.
* `tb_maeri_top`: the whole accelerator at its default size (no parameter
  overrides). It runs several mappings against a dataflow-level reference model:
  a fully-connected / LSTM-gate style mapping, one 64-wide VN, 21 VNs of 3 with
  ReLU, a sparse 1-D convolution with VNs of 5, 6 and 4 using forwarding,
  2x2 max pooling, 32 VNs of 2 limited by collection bandwidth, a neuron of 48
  inputs run as three accumulated folds, and random mixed mappings. It fails
  unless multicast, forwarding, both stall kinds, max, ReLU clipping, mixed VN
  sizes, one-leaf VNs, unused leaves and folding all occur.

To run one with Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/maeri_pkg.sv tb/tb_maeri_top.sv --top-module tb_maeri_top -o sim
./obj_dir/sim
```

The top-level test takes about a minute to build and a few seconds to run.

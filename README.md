# Parallel decision-forest inference engine for gradient-boosted trees

A trained XGBoost/LightGBM model is a sum of many small decision trees. This
RTL evaluates such a model on an FPGA by giving **every tree its own node
memory and its own traversal engine**, so all trees walk the same feature
vector at the same time, one node per clock, and the prediction is ready a
few tens of clocks after the features arrive, regardless of how many trees
the model has. The host loads the model and streams feature vectors over two
AXI slave ports, which in a complete system sit behind a PCIe-to-AXI bridge.

The architecture (per-tree memories, shared feature registers, ping-pong
feature and prediction memories, burst commands, AXI4-Lite for control and
model, AXI4 for bulk data) follows a published XGBoost-on-FPGA accelerator
that was written in high-level synthesis. That description stops at the
block level; the cycle schedule, the number format details, the register and
address maps and all handshakes here are this design's own, and are listed
under [Departures and choices](#departures-and-choices).

## How a tree is stored

Each node is one 64-bit word (`xgb_pkg::node_t`):

| bits  | field |
|-------|-------|
| 63:57 | reserved |
| 56    | 1 = leaf, 0 = decision node |
| 55:48 | feature index (0..255) |
| 47:40 | index of the right child |
| 39:32 | reserved |
| 31:0  | threshold (decision node) or leaf value (leaf), IEEE-754 single |

Nodes are stored in **pre-order depth-first order**, root at address 0. In
that order the left child of node *i* is always node *i+1*, so only the right
child needs an index. A tree may use up to 256 nodes (`N_NODES`), which is
what the 8-bit right index can address.

Exporting a model means walking each trained tree in pre-order and writing
these words; unused trees (when the model has fewer trees than the hardware)
are loaded with a single leaf of value 0.

## Walking a tree: `tree_engine`

The engine holds the current node index. On `start` it reads node 0 from its
`tree_node_mem` (a synchronous-read RAM). Every following clock it looks at
the word that came back:

* decision node: select `feats[feature_index]`, compare with the threshold
  (`fp32_lt`, strictly less-than), and send the next address straight to the
  RAM: `index+1` if smaller, else the stored right index;
* leaf: latch the value and raise `done`.

Because the next address is formed combinationally from the RAM output, the
engine visits **one node per clock**: a leaf at depth *d* (root = depth 0) is
reached after *d+1* reads and `done` is high *d+2* clocks after `start`. A
step limit of `N_NODES` reads stops a malformed tree (a right index pointing
backwards) and reports `err` with leaf value +0.

The comparison treats +0 and -0 as equal and any NaN as "not smaller", so a
NaN feature (a common encoding for a missing value) always goes right.

## The forest: `tree_forest` and `forest_ctrl`

```
             AXI4 (features)                            AXI4 (predictions)
                   |                                            ^
          +--------v--------+                          +--------+--------+
          | feature memory  |  bank = burst's bank     | prediction mem  |
          |  2 x FMEM_DEPTH |                          |  2 x PMEM_DEPTH |
          +--------+--------+                          +--------^--------+
                   | 1 word/clk                                 | 1 per inference
          +--------v--------+    feats[0..255]    +-------------+------+
          | feature regs    +----+---------+----->| fp32 adder tree    |
          | bank A | bank B |    |         |      | log2(N_TREES) stages|
          +-----------------+  tree 0 ... tree N-1 +--------------------+
                               (engine + own node RAM, loaded over AXI4-Lite)
```

`forest_ctrl` runs one *burst*: `n_infer` feature vectors of `n_feat`
features each, stored densely in one bank of the feature memory (feature *f*
of vector *i* at word *i·n_feat + f*). Three activities overlap:

1. **Fill.** The next vector is copied from the feature memory into the free
   bank of the feature registers, one feature per clock.
2. **Compute.** When the trees are idle and a register bank is full, all
   trees start on that bank. When the last tree reaches its leaf, all leaf
   values enter the adder tree together with the vector number, and the
   register bank is released.
3. **Write-back.** Each sum leaving the adder tree is written to the
   prediction memory, same bank as the burst, at the vector number.

So vector *i+1* is loaded while vector *i* is traversed, and the sum of
vector *i* is formed while vector *i+1* is traversed. Which of the two waits
depends on the model: with few features the fill finishes first and waits
for the trees; with many features the trees wait for the fill. Per vector the
pipeline interval is about max(`n_feat`+3, depth+4) clocks.

A burst of a single vector takes exactly

    n_feat + D + log2(N_TREES) + 5 clocks

from the start command to `done`, where *D* is the depth of the deepest leaf
reached. For 512 trees, 8 features and depth-8 trees that is 30 clocks,
240 ns at the 125 MHz of the reference implementation (PCIe and driver time
not included). The `CYCLES` register reports this count for the last burst.

The two memory banks are the ping-pong at the memory level: while a burst
runs on bank 0, the host writes the next burst's vectors into bank 1 over
AXI4, and reads the previous burst's predictions from the other prediction
bank.

### Summation and numbers

Thresholds, features, leaf values and predictions are IEEE-754 single
precision. The prediction is the plain sum of the leaf values (no base score
or link function is applied; the host adds those). `fp_adder_tree` adds the
leaf values pairwise in a balanced tree of `fp32_add` units with a register
after each level, so it accepts a new vector every clock. `fp32_add` rounds
to nearest-even, treats subnormal inputs as zero and flushes underflow to
zero; infinities and NaNs propagate. The balanced order can differ from a
sequential sum in the last bit.

## Host interface

### AXI4-Lite (`axil_ctrl`): control and model

32-bit data. The top address bit selects the region.

| offset | name   | access | meaning |
|--------|--------|--------|---------|
| 0x00   | CTRL   | W/R    | bit 0: start a burst (ignored while busy); bit 1: bank |
| 0x04   | STATUS | R      | bit 0 busy, bit 1 done (cleared by start), bit 2 err |
| 0x08   | NFEAT  | R/W    | features per vector, 1..`N_FEATURES` |
| 0x0C   | NINFER | R/W    | vectors per burst, 0..`PMEM_DEPTH` |
| 0x10   | NTREES | R      | `N_TREES` |
| 0x14   | CYCLES | R      | clocks taken by the last burst |

Node region (top address bit set), write only: the node *n* of tree *t* is at
byte offset `(t·N_NODES + n)·8`. Write bits 31:0 to offset +0 (latched only),
then bits 63:32 to offset +4 (writes the whole node). Partial strobes,
out-of-range NFEAT/NINFER, writes to read-only registers and node reads
answer SLVERR and change nothing.

The host must keep `NINFER × NFEAT` within one feature bank (`FMEM_DEPTH`
words); larger jobs are split into several bursts.

### AXI4 (`axi_data_port`): features and predictions

32-bit data, one fp32 per beat, INCR and FIXED bursts up to 256 beats, one
outstanding burst per direction, IDs echoed. With the defaults the address
is 16 bits:

* bit 15 = 0: feature memory, write only. Bit 14 = bank, bits 13:2 = word.
* bit 15 = 1: prediction memory, read only. Bit 12 = bank, bits 11:2 = word.

Writes stream one beat per clock; reads take two clocks per beat. WRAP
bursts, partial strobes, writes to predictions and reads of features answer
SLVERR.

### Running a burst

1. Load the model (once): two AXI4-Lite writes per node.
2. Write the vectors of the burst into a feature bank (AXI4).
3. Write NFEAT, NINFER, then CTRL = `{bank, 1}`.
4. Optionally write the next burst's vectors into the other bank.
5. Poll STATUS.done (or use the `done` output as an interrupt).
6. Read NINFER predictions from the same bank (AXI4).

## Parameters

| parameter    | default | origin |
|--------------|---------|--------|
| `N_TREES`    | 512     | trees per model in the main evaluation (128 on the smaller device; 16..256 in the resource sweep); power of two |
| `N_NODES`    | 256     | nodes per tree in the original sizing; also the reach of the 8-bit right index |
| `N_FEATURES` | 256     | chosen: the reach of the 8-bit feature index |
| `FMEM_DEPTH` | 4096    | chosen: words per feature bank |
| `PMEM_DEPTH` | 1024    | chosen: predictions per bank (and the burst length limit) |
| `ID_W`       | 4       | chosen: AXI4 ID width |

Node storage is `N_TREES × N_NODES × 64` bits: 8 Mbit at the defaults,
matching the 1 MiB model size of 512-tree models. The evaluated models have
6 to 15 features, so the 256 feature registers are far more than they need;
lowering `N_FEATURES` shrinks the largest structure of the design, the
256-to-1 feature multiplexer in every tree engine.

## Departures and choices

* **Leaf flag.** The node format defines bit 56 = 1 as leaf; the original
  pseudo-code tests the flag the other way round. The engine stops at 1.
* **Reserved bits.** The original table gives the reserved field as bits
  39..31, overlapping the 32-bit value; here it is bits 39..32.
* **Number format.** The source speaks only of custom floating-point
  operators; IEEE single precision with flush-to-zero is this design's
  choice.
* **Summation order.** Sequential in the source's pseudo-code, balanced and
  pipelined here.
* **Timing.** One node per clock, the fill rate of one feature per clock, the
  latency formula above and the throughput are properties of this RTL, not
  figures from the source (which was HLS-generated and reports only
  end-to-end times including PCIe).
* **Additions:** the step-limit error, the CYCLES register, the `done`
  output and the SLVERR checks.
* **Not included:** the PCIe endpoint, the PCIe-to-AXI bridge and the DMA
  engine (vendor IP that drives the two AXI ports), and the host software
  (model export scripts, driver, library).

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. References are computed independently of the
RTL: `tb_fp_pkg` does fp32 arithmetic by bit manipulation on doubles,
`tb_model_pkg` generates random pre-order trees (depth up to 8) and walks
them in software.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp32_add`, `tb_fp32_lt` | directed corner cases and ~20 000 random operands, bit-exact |
| `tb_tree_node_mem`, `tb_pingpong_ram`, `tb_feature_regs_pp` | read latency, hold, bank independence |
| `tb_tree_engine` | 2 400 random walks: leaf value and latency depth+2; loop guard |
| `tb_fp_adder_tree` | sums, tags and latency with back-to-back inputs |
| `tb_forest_ctrl` | controller with modelled trees: right vector per tree start, every result written once, both stall kinds, cycle counter |
| `tb_axil_ctrl`, `tb_axi_data_port` | register map, node writes, bursts, back-pressure, SLVERR cases |
| `tb_tree_forest` | 8-tree core: bit-exact predictions over several bursts and both banks, exact single-vector latency, err |
| `tb_xgb_accel_top` | whole design through AXI at 16 trees: model loading, four workloads with 8, 13, 15 and 6 features, overlapped host writes, latency, SLVERR, err; counts each mechanism and fails if one never happens |
| `tb_xgb_full` | the same at the default parameters (512 trees): workloads of 154, 61, 600 and 100 vectors, 915 predictions checked bit-exact |

The generated test trees test features 0..5 only (the smallest evaluated
feature count); the reduced-size run keeps trees to 64 nodes to load
quickly, the full-size run uses trees of up to 256 nodes, the hardware
limit.

Running a testbench with Verilator 5 (the full-size one takes about a minute
to build and seconds to run):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/xgb_pkg.sv tb/tb_fp_pkg.sv tb/tb_model_pkg.sv rtl/*.sv \
  tb/tb_xgb_harness.sv tb/tb_xgb_accel_top.sv --top-module tb_xgb_accel_top
./obj_dir/Vtb_xgb_accel_top
```

For a block testbench, list `rtl/xgb_pkg.sv`, the two `tb/*_pkg.sv` files,
`rtl/*.sv` and the testbench, and name it with `--top-module`. The
simulator's two-state values are enough: all state that is read is reset.

# Tree Tensor Network classifier in SystemVerilog

This is an FPGA inference engine for a **Tree Tensor Network (TTN)** used as a
binary classifier. A TTN takes the joint probability tensor that a sample's
features span, a tensor far too big to store, and factors it into a binary tree
of small three-index tensors. Training happens in software. In hardware, each
sample is encoded as a product of two-component vectors, and the tree is
contracted bottom-up, from the leaves to the root. The root vector is the
classifier output: a single number for binary classification.

The engine streams samples in over AXI4-Stream and results out the same way.
The host writes and reads back the tree's weights through AXI4-Lite. Every
value is a 16-bit fixed-point number (Q1.14): 1 sign bit, 1 integer bit and
14 fraction bits, so values lie in [-2, 2) in steps of 2^-14 ≈ 6.1e-5.

## The computation

**Feature map.** The host scales each feature x_i to an angle in [0, π/2].
The hardware turns that angle into the two-component state

    phi_i = [cos x_i, sin x_i]

Both components lie in [0, 1], so they always fit the number format. Each
feature has its own cosine and sine lookup table, 2N tables in all. Each table
has 65536 entries of 16 bits, addressed by the 16-bit angle itself, and a read
takes 2 clock cycles.

**Node contraction.** A node contracts two child vectors, x and y of dimension
X_in, with its weight tensor V of shape X_in × X_in × X_out:

    z[mu] = sum over nu, rho of  V[mu][nu][rho] * x[nu] * y[rho]

In hardware this three-factor product is split into three stages:

* **mult1**: the X_in² products x[nu]·y[rho];
* **mult2**: each of those products times its weight;
* **sum**: the X_out sums over the X_in² weighted terms.

**Tree.** There are N features, with N a power of two. The tree has
L = log2(N) layers, and layer i has N/2^i nodes. Node j of a layer contracts
vectors 2j and 2j+1 of the layer below. The bond dimensions X_i are set at
build time from four numbers (N, the input dimension D0, the bond dimension X0
and the output dimension O) and one of three rules (`ttn_pkg::layer_dim`):

| rule (`XMODE`)           | X_i for 0 < i < L    |
|--------------------------|----------------------|
| `XMODE_FIXED`            | X0                   |
| `XMODE_MINIMAL` (default)| min(X0, D0^(2^i))    |
| `XMODE_MAXIMAL`          | D0^(2^i)             |

In every case X_0 = D0 at the leaves and X_L = O at the root. The default
build is N = 16, D0 = 2, X0 = 8, O = 1 with the minimal rule. That gives
X = 2, 4, 8, 8, 1 and 8·16 + 4·128 + 2·512 + 64 = **1728 weights**.

**Arithmetic.** Each multiplier output is the exact 32-bit product shifted
right by 14 bits (rounding towards minus infinity), then saturated to 16 bits.
A node adds its X_in² weighted terms at full 32-bit width and saturates the sum
once, at the end. The full-parallel and partial-parallel nodes round
identically, so both give bit-identical results.

## Data path

```
 s_axis (N x 16 bit) ──► feature_map ──► [sample_fifo]* ──► ttn_tree ──► m_axis (O x 16 bit)
                          2N trig_rom                        L x ttn_layer
                                                                 N/2^i x node_fp | node_pp
                                                                    dsp_mult, adder_tree
 s_axil ──► axil_crossbar ──► axil_reg_block x NB ──► weight_slice ──► (weights, static)
                                                   * partial parallel only
```

A sample is a single AXI-Stream beat that carries all N features. Feature i is
in `s_axis_tdata[16*i +: 16]`. A result is one beat of O values in the same
format.

## Full parallel and partial parallel

The main trade-off in the design is how many multipliers a node gets. The
parameter `IMPL` chooses between two node types. All of a layer's nodes are of
the same type and run in lockstep. Every multiplier (`dsp_mult`) stands for a
DSP slice with `LAT` pipeline registers (Δt, 4 by default). The latency
formulas below are counted in units of Δt.

### Full parallel (`node_fp`, default)

Each product gets its own multiplier: X_in² for mult1 and X_out·X_in² for
mult2. Each output component has a pipelined adder tree of log2(X_in²) levels,
and each level also takes Δt. A node is a fixed-latency pipeline that takes one
vector pair per clock:

    node latency = Δt · (2 + log2(X_in²))
    multipliers  = sum over layers of (N/2^i) · X_{i-1}² · (X_i + 1)

The tree as a whole takes one sample per cycle. When a result waits for
`m_axis_tready`, the whole pipeline stalls together, feature map included,
and `s_axis_tready` drops.

### Partial parallel (`node_pp`)

Each node has one mult1 multiplier and X_in² mult2 multipliers, and computes
its output components one after another:

1. mult1 forms the X_in² products one by one. It issues the next product when
   the previous one returns, after Δt cycles. The first product uses the input
   bus in the cycle the pair is accepted, so x and y are captured at the same
   time.
2. X_out steps of Δt cycles follow. Each step sends all X_in² stored products,
   times the weights of one component mu, through the mult2 multipliers. The
   last mult1 product goes straight from the multiplier into the first mult2
   step.
3. The weighted terms of component mu are added while mult2 already works on
   component mu+1. The sum takes Δt cycles: one combinational add, Δt−1
   registers and the result register.

The result is held with `out_valid` high until it is taken:

    node latency = Δt · (X_in² + X_out + 1)

Layers pass results to each other with valid/ready, so different layers work
on different samples. The slowest layer sets the throughput, at one sample
every Δt·(X_in² + X_out + 1) cycles. In this mode a 16-entry `sample_fifo`
after the feature map absorbs bursts. `s_axis_tready` drops while fewer free
entries remain than the two samples the feature map may still be holding.

### Numbers for the two documented configurations (Δt = 4)

| N  | X            | type | tree latency (cycles) | multipliers |
|----|--------------|------|-----------------------|-------------|
| 8  | 2, 4, 4, 1   | FP   | 64                    | 272         |
| 8  | 2, 4, 4, 1   | PP   | 192                   | 71          |
| 16 | 2, 4, 8, 8, 1| FP   | 104                   | 2016        |
| 16 | 2, 4, 8, 8, 1| PP   | 692                   | 303         |

The testbenches measure these latencies cycle for cycle. The figures match the
published ones for this architecture, and so do the full-parallel multiplier
counts. The published partial-parallel DSP counts (105 and 501) are higher than
the 1 + X_in² multipliers per node built here. They probably include adders
mapped to DSP slices; this RTL does not model that. Through `ttn_top`, add 2
cycles for the feature map, plus 1 for the FIFO in partial-parallel mode:
106 and 695 cycles for the default N = 16 tree.

## Weight memory

The weights are static during inference. The host can write them and read them
back; the tree only reads them.

* There are `NB = ceil(NW / 1024)` register blocks (`axil_reg_block`). Each
  holds 512 32-bit registers, or 1024 weights. The default tree needs 2 blocks.
* The crossbar (`axil_crossbar`) gives block b the byte addresses
  `b·0x1000 … b·0x1000 + 0x7FF`, so register r is at `b·0x1000 + 4r`. An
  address above the last block gets a DECERR response. One write and one read
  can be outstanding at a time.
* Weight k of the whole tree is in block k / 1024, register (k mod 1024) / 2.
  It is the low half of the register for even k and the high half for odd k.
* The weights are numbered layer by layer from the leaves, and node by node
  within a layer (`ttn_pkg::weight_offset`). Within a node, weight
  `V[mu][nu][rho]` has index `(mu·X_in + nu)·X_in + rho`. Here nu indexes the
  left child (vector 2j) and rho the right child (vector 2j+1).
* `weight_slice` splits the registers into 16-bit weights and registers them
  once. The register stage breaks the long wires to the multipliers. Writes
  become visible to the tree one cycle later. Do not change weights while
  samples are in flight.

## Top-level interface (`ttn_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | single clock; asynchronous active-low reset |
| `s_axil_*` | | AXI4-Lite, 32-bit address and data | weight registers |
| `s_axis_tvalid/tready/tdata` | in/out/in | 1/1/N·16 | one sample per beat |
| `m_axis_tvalid/tready/tdata` | out/in/out | 1/1/O·16 | one result per beat |

Parameters (defaults in brackets):

* `N` [16]: number of features.
* `D0` [2]: input dimension. The feature map supports only 2.
* `X0` [8]: bond dimension.
* `O` [1]: output dimension.
* `XMODE` [`XMODE_MINIMAL`]: bond-dimension rule.
* `IMPL` [`IMPL_FP`]: node type.
* `LAT` [4]: DSP latency Δt.
* `FIFO_DEPTH` [16]: input FIFO depth in partial-parallel mode.
* `APER` [12]: log2 of the address window per register block.

## Files

`rtl/` holds one module or package per file:

* `ttn_pkg`: number format, enums and the functions that derive the tree's shape.
* `axil_pkg`: AXI-Lite request and response structs.
* Samples and tree: `trig_rom`, `feature_map`, `dsp_mult`, `pipe_delay`,
  `adder_tree`, `node_fp`, `node_pp`, `ttn_layer`, `ttn_tree`, `sample_fifo`.
* Weights: `axil_crossbar`, `axil_reg_block`, `weight_slice`.
* Top level: `ttn_top`.

`tb/` holds one self-checking testbench per block (`tb_<module>`). Each prints
`TB_RESULT checks=… failures=…`. They share a reference model written with
plain integer arithmetic (`ttn_ref_pkg`), and the top-level tests use a common
driver (`ttn_top_harness`).

* `tb_ttn_tree`: runs the N = 8, X0 = 4 tree in both modes. It checks every
  result and the exact latencies of 64 and 192 cycles, with output stalls and
  overlapping samples.
* `tb_ttn_top`: runs the whole engine end to end in two configurations,
  partial-parallel at N = 16 and full-parallel at N = 8. It loads weights over
  AXI-Lite, reads them back, probes an unmapped address, measures latency and
  streams samples under random back-pressure. It also counts that stalls,
  back-pressure, FIFO filling and DECERR all occurred.
* `tb_ttn_top_full`: runs the same test on `ttn_top` with every parameter at
  its default, over 500 samples.
* `tb_ttn_workloads`: repeats the published evaluation runs with random
  samples in place of the datasets, and reproduces their latencies. The
  N = 8, X = 2, 4, 8, 1 tree runs 100 samples in both modes (tree latency 72
  and 400 cycles). The N = 16 partial-parallel tree runs 500 samples.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ttn_pkg.sv rtl/axil_pkg.sv tb/ttn_ref_pkg.sv tb/tb_ttn_tree.sv \
    --top-module tb_ttn_tree -o sim && obj_dir/sim
```

Most block tests build in seconds. The full-size top has 2016 multipliers and
32 64K-entry tables, so its C++ takes several minutes to compile. Its
simulation is short.

## Choices not fixed by the design description

These are this implementation's own choices, where the design description
leaves the detail open:

* **Rounding.** Products are rounded by floor and saturation; node sums are
  saturated once, at the end.
* **Lookup tables.** The tables hold `round(f(a/2^14)·2^14)`. They are
  computed at elaboration, not loaded from initialisation files. The hardware
  takes an angle the host has already scaled, so it computes cos x, not
  cos(πx/2).
* **Weight placement.** The weight order, the 4 KiB address window per block
  and the DECERR behaviour.
* **Register slice.** Read as "split each 32-bit register into two weights,
  then register them".
* **Handshakes and stalls.** The full-parallel pipeline stalls as a whole; the
  partial-parallel node uses valid/ready, a one-pass sum stage, and the input
  FIFO with its depth.
* **Clock and reset.** One clock for all interfaces. The published figures
  quote 250 MHz for the stream clock and 500 MHz for the tree alone. Reset is
  asynchronous and active low.
* **Sample format.** A sample is a single stream beat; there is no `tlast`.

## Limits

* The host PCIe/DMA link and the training software are outside this RTL. The
  AXI ports are where they connect.
* The lookup tables are 65536 × 16 bits each (32 of them at N = 16) and are
  filled with real-valued `$sin`/`$cos` at elaboration. That suits simulation
  and FPGA block-RAM inference, but some synthesis tools cannot evaluate it.
  For those, replace the initial block with a table in your tool's format.
* The multipliers are generic `*` operators followed by registers. How they
  map onto DSP slices, and therefore the DSP count, is up to synthesis.

# Tree-based FPGA interconnect (multilevel MFPGA) in SystemVerilog

An FPGA spends most of its silicon on programmable interconnect. This design
replaces the usual mesh of routing channels with a **tree**: logic blocks (LBs)
are the leaves, groups of K LBs form level-1 clusters, groups of K level-1
clusters form level-2 clusters, and so on up to a single root. Signals travel
through two separate, one-directional networks:

* the **downward network**, a butterfly fat tree of *downward mini switch
  boxes* (DMSBs), carries signals from a cluster's inputs towards LB inputs;
* the **upward network** of *upward mini switch boxes* (UMSBs) carries LB
  outputs towards the root and, at every level it passes, feeds them back into
  that level's DMSBs.

The UMSBs are what distinguishes this tree from a plain hierarchical FPGA. All
K children of a cluster meet in the same UMSB crossbars. So every LB of a
cluster reaches exactly the same set of DMSBs at every level. An LB's position
inside its cluster therefore does not matter, and its siblings can share the
UMSB outputs among themselves according to their fanout.

The number of wires at each level follows **Rent's rule**. A level-l cluster has

    Nin(l)  = C_IN  * K^(l*P)     inputs
    Nout(l) = C_OUT * K^(l*P)     outputs

both rounded to the nearest integer. With P = 1 the bandwidth is full. A
smaller P *depopulates* the upper levels: fewer cluster pins, fewer DMSBs and
UMSBs, fewer switches. With this structure the switch count per LB grows as
O(1) for P < 1 and as O(log N) for P = 1, slower than in a mesh.

The RTL is fully parameterised. Its defaults are the two-level example:
arity 4, 16 LBs, each a 4-input LUT with one output, and P = 1.

## What one cluster contains

At level l ≥ 1 a cluster has K children. The children are logic blocks when
l = 1, and otherwise clusters of level l-1. Its switch box (`cluster_sb`) holds:

| part | count | size | drives |
|---|---|---|---|
| DMSB | Nin(l-1) (one per child input pin) | (ceil(Nin(l)/Nin(l-1)) + ceil(K·Nout(l-1)/Nin(l-1))) inputs × K outputs | DMSB *d*, output *o* → input pin *d* of child *o* |
| UMSB | Nout(l-1) (one per child output pin) | K inputs × K outputs | UMSB *j* input *c* ← output pin *j* of child *c* |

Every DMSB and UMSB is a full crossbar. Each of its outputs is a multiplexer
whose select comes from configuration memory. Default level-1 cluster: 16
inputs, 4 outputs, four DMSBs of 5 inputs each (5:1 multiplexers) and one 4×4
UMSB (4:1 multiplexers).

### The wiring rule

The architecture fixes the counts. The way individual wires are assigned below
is this implementation's own choice, and you need it to write a configuration:

* The K·Nout(l-1) UMSB outputs are the **feedback signals**. UMSB *j*'s output
  *o* is feedback signal *f = j·K + o*.
* **DMSB inputs.** DMSB *d* receives:
  * every cluster input *s* with *s mod Nin(l-1) = d*, on port *s div Nin(l-1)*;
  * every feedback signal *f* with *f mod Nin(l-1) = d*, on port
    *A + f div Nin(l-1)*, where *A = ceil(Nin(l)/Nin(l-1))*.

  Ports with no signal are tied to 0.
* **Cluster outputs.** Cluster output *i* (for *i < Nout(l)*) is output
  *i div Nout(l-1)* of UMSB *i mod Nout(l-1)*. When Rent's rule gives a cluster
  fewer outputs than its UMSBs have, this spreads the outputs over all UMSBs.
  So a signal can climb to the root whichever UMSB it entered. A simpler "first
  Nout(l) feedback signals" rule leaves some UMSBs with no way up once P < 1.
* **Path of a signal down the tree.** A signal on cluster input *s* of a
  level-l cluster goes through DMSB *s mod Nin(l-1)*. It arrives on the same
  pin index, *s mod Nin(l-1)*, of whichever child that DMSB output selects. So
  the LB pin a signal can reach is fixed by the feedback index it uses at the
  level where it turns downward. The router in `tb/fabric_bench.sv` uses exactly
  this.

### The root and the pads

The root switch box (`root_sb`) is a cluster switch box with three changes:

* It has **no outside inputs**, so its DMSBs carry only UMSB feedback. In the
  default tree that means 16 DMSBs with one input each. A one-input
  "multiplexer" keeps a single on/off bit, with 0 meaning connected.
* **Input pads** are extra inputs of *every* root UMSB, on inputs K_ROOT …
  K_ROOT+N_IPAD-1.
* **Output pads**: every root DMSB has one extra output, column K_ROOT. The output
  pad cluster (`opad_cluster`) receives these Nin(LEVELS-1) columns, and each
  output pad is a multiplexer over all of them.

The root may have its own arity `K_ROOT` (default K). Larger trees often end
in a two-way root, for example 4×4×4×4×4×2: five levels of arity 4 under a
root with 2 children. The root's crossbars are then sized by K_ROOT in place
of K (K_ROOT-input UMSBs plus the pads, K_ROOT+1-output DMSBs). Its pin counts
still follow Rent's rule with K, so a level-l cluster has the same pins
whatever the root arity.

So every pad can reach, or be reached from, every LB through several paths.
The architecture lets the pad clusters sit at other levels. This design puts
both at the root.

### Logic block

`logic_block` has, for each of its C_OUT outputs, a 2^C_IN-entry LUT followed by
an optional D flip-flop (bit 16 of its configuration selects registered
output). LUT input bit 0 is the least significant address bit. The register
resets to 0 asynchronously on `rst_n`. The register is this design's addition,
the usual form of an FPGA logic element. It is needed to map sequential
circuits.

## Configuration

All multiplexer selects and LUT bits sit in one serial chain (`cfg_chain`).
While `cfg_en` is high, each clock shifts `cfg_in` in at the top. After
CFG_BITS cycles the first bit shifted in is bit 0. `cfg_out` gives the old
contents back bit by bit. At the defaults CFG_BITS = 640 and loading takes
exactly 640 cycles.

Bit layout, from bit 0 up (the functions named here are in `mfpga_pkg`):

1. **Logic blocks.** K_ROOT·K^(LEVELS-1) of them, `lb_bits` = 17 bits each. LB *t* holds
   the LUT in bits 0–15 and the register select in bit 16.
2. **Level-1 switch boxes, then level 2, and so on.** The first bit of level *l*
   is `level_base(...)`. Cluster *x* of that level starts at `sb_bits(...)·x`
   past it. Inside a switch box come first the DMSB selects, output *o* of DMSB
   *d* at *(d·K + o)·w*, then the UMSB selects, output *o* of UMSB *j* at
   *(j·K + o)·w'*. A select of *n* inputs is `sel_w(n)` = ceil(log2 n) bits
   wide (1 bit for n = 1). A select value ≥ *n* disconnects the output, which
   then drives 0.
3. **Root switch box.** Laid out the same way, with K_ROOT+1 outputs per DMSB
   and K_ROOT in place of K.
4. **Output pad selects.** `sel_w(Nin(LEVELS-1))` bits each.

Default sizes: 272 LB bits, 4 × 56 level-1 bits, 128 root bits and 16 pad
bits.

While `rst_n` is low or `cfg_en` is high, every LB output is forced to 0. The
interconnect is full of structural loops (LB → UMSB → DMSB → LB). This
enable keeps a half-loaded configuration from closing an oscillating loop.
Lint and synthesis still report those loops as possible combinational loops.
They are inherent in a programmable fabric. A working configuration closes
none that does not pass through a registered LB.

## Switch count

`mfpga_pkg::tree_switches` evaluates the crossbar model: a crossbar of *i*
inputs and *o* outputs counts *i·o* switches, pads are not counted, and the
root has no outside inputs.

* Two-level tree with P = 0.79: 12 inputs and 3 outputs per level-1 cluster,
  12 DMSBs and 3 UMSBs at the root. The model gives **416** switches, the
  published figure for that example.
* The same tree with P = 1 gives 512. The figure published with it is 521. The
  difference of 9 is not explained by any reading of the crossbar model tried
  here.

Under the same model, in closed form:

    switches per LB = (K^P·C_IN + 2·K·C_OUT) · Σ_{l=1..LEVELS} K^((P-1)(l-1))

## Parameters (`mfpga_top`)

| parameter | default | meaning |
|---|---|---|
| `K` | 4 | cluster arity (4, 8 and 16 are simulated) |
| `K_ROOT` | K | arity of the root |
| `LEVELS` | 2 | tree levels; K_ROOT·K^(LEVELS-1) LBs |
| `C_IN`, `C_OUT` | 4, 1 | LB inputs and outputs (Rent constants) |
| `P` | 1.0 | Rent exponent, the same at every level |
| `N_IPAD`, `N_OPAD` | 4, 4 | pads (own choice) |

Ports: `clk`, `rst_n`, `cfg_en`, `cfg_in`, `cfg_out`, `ipad[N_IPAD]`,
`opad[N_OPAD]`. Pad-to-pad paths are combinational unless they pass a
registered LB.

## Modules

| file | role |
|---|---|
| `rtl/mfpga_pkg.sv` | Rent's rule, select widths, configuration layout, switch-count model |
| `rtl/mfpga_top.sv` | whole fabric; builds the tree level by level |
| `rtl/cluster_sb.sv` | switch box of a non-root cluster (DMSBs + UMSBs + wiring rule) |
| `rtl/root_sb.sv` | root switch box with pad connections |
| `rtl/dmsb.sv`, `rtl/umsb.sv` | mini switch box crossbars |
| `rtl/logic_block.sv` | LUT + optional register |
| `rtl/opad_cluster.sv` | output pad multiplexers |
| `rtl/cfg_chain.sv` | serial configuration memory |

The tree is built without recursive instantiation. `mfpga_top` keeps one bus
of input pins and one of output pins per level. It instantiates the LBs and
the switch boxes of each level on slices of those buses.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* **Crossbars** (`tb_dmsb`, `tb_umsb`, `tb_opad_cluster`), **LB**
  (`tb_logic_block`) and **configuration chain** (`tb_cfg_chain`): random
  stimulus against direct models.
* `tb_cluster_sb`: three switch boxes against a reference model of the wiring
  rule above:
  * level 1, P = 1;
  * level 1, P = 0.79 (12 inputs, 3 outputs);
  * level 2, P = 0.79 (36 inputs, 9 outputs).
* `tb_root_sb`: the default root against a model.
* `tb_mfpga_top`, at the default parameters: routes a four-node netlist by
  hand, loads it through the chain and checks the pads every cycle. The routes
  include pad → LB, LB → LB inside a cluster, LB → LB across the root, a
  registered LB and pad → pad. It also checks the configuration read-back, the
  640-cycle load and the 416-switch model figure. A final sweep shows that
  each of the 16 LBs reaches each of the 16 root DMSBs (256 paths).
* `tb_mfpga_depop`, `tb_mfpga_kr2`, `tb_mfpga_arity8`, `tb_mfpga_arity16`
  and `tb_mfpga_alu4` use `tb/fabric_bench.sv`. This is a generic bench with a small greedy router
  that follows the wiring rule. It runs a netlist spanning the whole tree:
  * `tb_mfpga_depop`: the two-level P = 0.79 tree.
  * `tb_mfpga_kr2`: a 4×4×2 tree (32 LBs, two-way root, P = 0.72, 4 input
    and 6 output pads).
  * `tb_mfpga_arity8`: an 8×8×4 tree (256 LBs, arity 8, four-way root,
    P = 0.8).
  * `tb_mfpga_arity16`: a 16×8 tree (128 LBs, arity 16, eight-way root,
    P = 0.8).
  * `tb_mfpga_alu4`: a five-level tree (1024 LBs, P = 0.66, 14 input and 8
    output pads), the size used for the smallest benchmark circuit. Building
    it takes about a minute.

To run one with plain Verilator from the directory above `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/mfpga_pkg.sv tb/tb_mfpga_top.sv --top-module tb_mfpga_top
    ./obj_dir/Vtb_mfpga_top

## Departures and limits

* One arity K below the root (the root may differ) and one Rent exponent P
  for all levels. Per-level exponents are not expressible.
* The largest tree simulated is the five-level, 1024-LB one. A six-level
  tree (4×4×4×4×4×2, 2048 LBs) passes Verilator's elaboration, but its C++
  build takes well over ten minutes on one core, so it was not simulated.
  Seven-level trees were not tried.
* The fabric holds no mapped benchmark circuits. Placement and routing
  (recursive partitioning, negotiated-congestion routing) is CAD software. Here
  the testbenches route small netlists by hand or with the greedy router.
* Pad cells are outside the design: `ipad`/`opad` are plain logic ports, and
  the pad counts are arbitrary defaults.
* Own choices are:
  * the signal-to-DMSB-port and UMSB-to-cluster-output assignment;
  * encoded multiplexers with an "off" code;
  * the serial configuration chain;
  * the LB register;
  * the output enable during configuration;
  * placing both pad clusters at the root.
* Area and delay are not modelled beyond the switch-count function.

# DNNoC: a Lego-style neural-network accelerator on a multicast mesh

A deep neural network is built here from a small set of reusable hardware
"bricks" rather than as one monolithic accelerator. Each brick, a *NeuLego
block*, does one kind of neuron operation:

- multiply-accumulate (MA), for convolution and dense layers
- max pooling (MP)
- global average pooling (GAP)
- element-wise addition (ADD), for residual connections

Many identical blocks form a *NeuLego PE*. An *extension PE* can follow it and
apply batch normalisation and/or ReLU. The PEs sit in the tiles of an N x N
network-on-chip (NoC). A layer's results go straight from the tiles that
computed them to the tiles of the next layer.

That traffic is one-to-many: every neuron of a layer needs the whole output
of the previous layer. Two mechanisms keep it down:

- **Hamiltonian multicast routing.** One packet carries a bit mask of all its
  destinations. It walks a Hamiltonian path through the mesh and drops a copy
  at each destination on the way. No per-destination copies are made at the
  source.
- **Run-length encoding.** Successive equal values are packed into one body
  flit, as (value, run length) pairs. This pays off after ReLU, which leaves
  long runs of zeros.

The default configuration is:

- a 4 x 4 mesh
- 64 blocks per PE
- 32 lanes per block, so one block consumes 32 inputs per cycle
- 16-bit data
- a 1,925,120-word (3,760 KB) global buffer

## Top level and data flow

`dnnoc_top` contains:

- `global_buffer`, a two-port SRAM model. One port belongs to the host, the
  other to the controller.
- `dnnoc_controller`, which executes a command stream.
- N x N `dnnoc_tile`s connected in a mesh.

Each tile (`dnnoc_tile`) holds:

| part | module | role |
|---|---|---|
| data buffer | `data_buffer` | inputs of the PE; one bank per block, `LINES` lines of `BATCH` words |
| weight memory | `weight_memory` | one bank per block: `LINES*BATCH` weights + 8 parameter words |
| NeuLego PE | `neulego_pe` | `NUM_BLK` blocks of the tile's kind (`KIND`) |
| extension PE | `extension_pe` | BN then ReLU per block, each switched on at run time |
| PE controller | `pe_controller` | configuration registers and run sequencing |
| network interface | `network_interface` | FIFOs, `packetizer`, `depacketizer` |
| router | `router` | 5-port multicast router |

A layer runs in three phases:

1. **Load.** The controller copies inputs from the global buffer into tile
   data buffers, and weights into weight memories (`LOAD_DB`, `LOAD_WM`). This
   is only needed for the first layer and for weights. Later layers get their
   inputs over the NoC.
2. **Run.** `START` arms the chosen tiles. Each tile waits until `RX_EXPECT`
   values have arrived over the NoC, then runs its PE for `ITERS` iterations
   (one line per iteration). It then passes the results through the extension
   PE and sends them to the tiles named in its `DEST` mask.
3. **Store.** After `WAIT`, `STORE` copies a tile's results back to the global
   buffer.

The PE kind of every tile is fixed at build time by `KIND_MAP`, 2 bits per
node ID. The default puts MA on nodes 0-7, MP on 8-11, GAP on 12-13 and ADD on
14-15.

Choosing that placement, and splitting a large model into layer-by-layer
mappings, is done offline. Its result is the `KIND_MAP` parameter plus a
command stream. The hardware does not contain the placement or mapping
algorithms.

## Node numbering and Hamiltonian multicast routing (`router`)

This is the least obvious part of the design.

**Node numbering.** Nodes are numbered along a snake-shaped Hamiltonian path:
left to right on even rows, right to left on odd rows.

```
id(x, y) = y*N + x          (y even)
id(x, y) = y*N + N-1-x      (y odd)
```

For a 4 x 4 mesh:

```
y=3   15 14 13 12
y=2    8  9 10 11
y=1    7  6  5  4
y=0    0  1  2  3
```

**Routing rule.** This rule avoids deadlock because a packet only ever moves
up, or only ever moves down, the numbering. On arrival of a head flit at node
`ME`, with destination mask `D`:

- If `D[ME]` is set, the packet is copied to the local port, and `D[ME]` is
  cleared in the head that is forwarded.
- If any destination above `ME` remains, take the lowest such destination `t`.
  Forward to the neighbour with the largest ID in `(ME, t]`. Because of the
  snake numbering that neighbour always exists: the next node on the path
  qualifies. Often a vertical neighbour skips further ahead.
- Otherwise, if a destination below `ME` remains, take the highest such
  destination `t`. Forward to the neighbour with the smallest ID in `[t, ME)`.

A packet may therefore need the local port and one mesh port at the same time.
The PE controller never mixes directions: it sends one packet for
destinations above its own ID and a separate packet for those below. So the
set of outputs a packet needs is at most {local, one mesh port}.

**Router micro-architecture.**

- Each of the five inputs has a FIFO of `FIFO_DEPTH` flits.
- The route is computed from the head flit at the FIFO output.
- Output allocation is round-robin over the inputs, with one grant per cycle.
- A multicast packet is granted only when every output it needs is free.
  Partial grants are never given, so two multicasts cannot each hold half of
  what the other needs.
- A granted input keeps its outputs until its tail flit leaves. This is
  wormhole switching.
- A flit moves only when every output of its packet is ready, so the copies
  advance in lock-step.
- Port order is 0 local, 1 north (+y), 2 east (+x), 3 south, 4 west.

## Packet format and run-length coding (`packetizer`, `depacketizer`)

A flit is a 2-bit type followed by a payload:

| type | code | payload |
|---|---|---|
| head | `00` | `{src_x, src_y, dest_mask[N*N-1:0]}`, bit *i* = node *i* |
| body | `01` | `{value[15:0], run_length-1}` |
| tail | `10` | unused |

- The run-length field is `ceil(log2 NUM_BLK)` bits wide, because a packet
  carries at most one value per block.
- The flit width is `2 + max(2*ceil(log2 N) + N*N, 16 + ceil(log2 NUM_BLK))`.
  At the defaults that is 24 bits.
- A packet of `S + I` runs is `(S + I + 2)` flits long.

**Packetizer.** It takes one (value, last) pair per cycle from the transmit
FIFO. It keeps extending the current run while the value repeats. It emits a
body flit when the value changes, the run is full, or the input ends. It
emits the head first and the tail after `last`.

**Depacketizer.** It looks up a base address for the packet's source from the
head flit. This is the `RX_BASE` register for that source node, so the
results of different sender tiles land in different parts of the data buffer.
It then expands each body flit into `run_length` writes of the value, one per
cycle. It counts received values for the PE controller and pulses `pkt_done`
on the tail.

## NeuLego blocks and PE (`neulego_blk_*`, `neulego_pe`)

Every block has the same interface:

- `in_valid`, `first`, `last`, a `BATCH`-wide input line
- `lane_en`, which masks the unused lanes of a short final line
- `result`, valid one cycle after the line marked `last`

Each block kind works as follows:

- **MA.** Sums the `BATCH` products of a line, accumulates over lines in a
  48-bit accumulator, then shifts right 8 bits and saturates to 16 bits.
- **MP.** Takes the maximum of a line and folds it into a running maximum.
  The running maximum starts at the most negative number, so all-negative
  windows are handled.
- **GAP.** Sums like MA without weights, then multiplies by a reciprocal of
  the element count held in weight memory. A divider is not needed.
- **ADD.** Adds lanes 0 and 1 (the two operands of a residual addition) with
  saturation.

**PE.** `neulego_pe` contains `NUM_BLK` copies of one kind and a block
controller. The controller reads one data-buffer line (and, for MA, one
weight line) per cycle into all blocks in parallel.

- A run of `ITERS` lines ends with `done`, `ITERS + 2` cycles after `start`.
- The results stay registered until the next run.
- MP and ADD are memory-less: they never read the weight memory.

**Extension PE.** `extension_pe` applies `y = gamma*(x - mu)*inv_std + beta`,
then `max(0, y)`.

- Each stage is enabled by a configuration bit.
- `1/sqrt(var + eps)` is stored precomputed, so no square root or divider
  exists.
- Latency is two cycles whether or not a stage is used.

## Memories and their addressing

**Data buffer.**

- Word `w` of a bank is line `w / BATCH`, lane `w % BATCH`.
- Loads from the global buffer either *scatter* element `e` to bank
  `e % NUM_BLK`, word `e / NUM_BLK`, or *broadcast* it to word
  `e % (LINES*BATCH)` of every bank.
- Broadcast serves layers where all neurons read the same inputs.
- NoC writes use the same two modes (`RX_BCAST` register).
- There are two write ports: NoC and controller. Reads are one registered
  line per cycle.

**Weight memory.**

- Addresses are bank-major. Each bank is `LINES*BATCH` weights followed by
  8 parameter words: mu, gamma, inv_std, beta, GAP reciprocal, and three
  spares.
- The parameters reset to neutral values, so an enabled BN stage with nothing
  loaded passes data through.

**Global buffer.** A plain two-port synchronous RAM. Port B (controller) wins
a write collision on the same word.

## Controller and command stream (`dnnoc_controller`, `dnnoc_pkg::cmd_t`)

A command is `{op[2:0], tile[7:0], a[31:0], b[31:0], c[31:0]}`, accepted with
a `cmd_valid`/`cmd_ready` handshake:

| op | meaning |
|---|---|
| `SETREG` | tile register `c` <- `b` |
| `LOAD_DB` | copy `b` words from global address `a` into the data buffer at element `c[30:0]`; `c[31]` = broadcast |
| `LOAD_WM` | copy `b` words from global address `a` into weight memory at `c` |
| `START` | start every tile set in the mask `a` |
| `WAIT` | stall until all started tiles are done |
| `STORE` | copy `b` results of `tile` to global address `a` |

Tile registers (`REG_*` in `dnnoc_pkg`):

| register | meaning |
|---|---|
| `ITERS` | number of lines per run |
| `LAST_LANES` | lanes used in the last line |
| `EXT` | bit 0 BN, bit 1 ReLU |
| `DEST` | destination mask |
| `RX_BCAST` | NoC writes broadcast instead of scatter |
| `RX_EXPECT` | values to wait for |
| `NRES` | results to send |
| `RX_BASE0 + n` | data-buffer element base for data from node `n` |

`idle` is high when no command is pending and no tile is busy.

## Number format

All data are 16-bit two's complement. This design's choice is Q8.8: 8
integer bits and 8 fraction bits. Products are Q16.16, and are rescaled
before saturation. BN parameters and GAP reciprocals use the same Q8.8
format.

## Where this RTL departs from, or adds to, the published design

The published architecture gives the block structure, the packet contents,
the routing scheme and the evaluated sizes. The following are choices made
here:

- Routing:
  - the snake numbering formula
  - the dual-path rule
  - atomic multicast allocation
  - round-robin arbitration
  - FIFO depths
  - port numbering
- Packet format: the flit type codes and the "length - 1" run field.
- The register set, the command format and the per-source receive base
  addresses. The original only says the controllers send "control signals".
- The MP reset value. It is the most negative number, where a zero initial
  value is drawn in the original.
- Data formats:
  - Q8.8 arithmetic
  - the 48-bit accumulator
  - GAP division by a stored reciprocal
  - BN with a stored `1/sqrt(var + eps)`
- Sizes:
  - `LINES = 16`, which gives 512 inputs per block per run
  - the parameter layout of the weight memory
- BN and ReLU are chained in one extension PE with enable bits, instead of
  being two separately placed PEs.
- The off-chip DRAM is not modelled. The host port of the global buffer
  stands in for it.

## Capacity at the default size

- A tile computes up to 64 neurons per run, each with up to 512 inputs
  (`LINES * BATCH`).
- A neuron with a larger fan-in must be split into partial sums that an ADD
  tile combines. The largest layers of AlexNet (9,216 inputs) and ResNet-18
  (4,608) need this.
- The global buffer holds 1,925,120 words. That is enough for the largest
  layer of LeNet-5 or MobileNet v1. It is not enough for AlexNet's FC6
  (37.7M weights) or ResNet-18's last 3x3 convolution (2.36M weights). Those
  have to be streamed through the host port in parts.

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/`. Each ends by
printing `TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
t=tb_router
verilator --binary --timing --assert --timescale 1ns/1ps --top-module $t \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dnnoc_pkg.sv tb/$t.sv -o sim
./obj_dir/sim
```

- `tb_dnnoc_top` runs the whole system on a 3 x 3 mesh (PE size 4, batch 4)
  and takes seconds.
- `tb_dnnoc_full` runs the same scenario with every default parameter (4 x 4
  mesh, PE size 64, batch 32). Compiling it takes about 9 minutes; the
  simulation itself takes seconds. Both share `tb/tb_dnnoc_body.svh`.

The scenario is:

1. Two MA layers with broadcast and scatter loads, BN and ReLU.
2. Multicast to an MP tile and an ADD tile, with run-length-compressed
   packets and output contention.
3. A GAP tile.
4. Stores, checked against a reference model computed in the testbench.

It counts every mechanism (local multicast copies, run-length runs,
allocation stalls, BN, ReLU clipping, broadcast loads, multi-iteration runs)
and fails if any of them never occurred.

The individual testbenches cover the routing decisions, a worked
run-length example and randomised packets with back-pressure.

## Limitations

- The placement and dynamic-mapping algorithms are not hardware. They have to
  be run offline to produce `KIND_MAP` and the command stream.
- There is no DRAM controller.
- Neurons whose fan-in exceeds `LINES * BATCH` rely on the command stream to
  split them into partial sums.
- There is no timing or area characterisation. The memories are plain arrays,
  to be replaced by SRAM macros in a real implementation.

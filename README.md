# SCAC-Net: a synchronous X-net for a grid of SIMD nodes

SCAC-Net is the neighbourhood network of a massively parallel SoC. The SoC is a
grid of execution nodes, and each node pairs a control unit (SLCU) with a cluster
of compute elements. The network does one kind of transfer. **Every node sends one
word in the same direction (one of eight), over the same distance, in the same
cycle.** Because every word moves in lockstep along parallel paths, no two words
ever want the same link. The routers therefore have no buffers, no flow control
and no routing algorithm. They are combinational multiplexers set by the
broadcast direction. Each node's own register is the only storage on the path,
and the words advance one hop per clock.

This RTL implements the network: per node, the communication controller and
the two routers, and the grid wiring around them. The size, the topology
(linear, ring, mesh or torus) and the link width (16+1, 4+1 or 1 bit) are
parameters. The default is a 4x4 torus with 16-bit data plus an activity wire.
The control units, compute elements and memories around the network are not
included. Their side of the interface is brought out as ports.

## The X wiring

Each node owns two routers, and each router has four *diagonal* ports. In this
RTL they are numbered 0 = NW, 1 = NE, 2 = SE and 3 = SW.

* **R-SLCUXnet** sits at the node's control unit. Its demux puts the node's
  word on one diagonal port. Its mux takes the arriving word from one diagonal
  port and hands it to the node.
* **R-Xnet** sits south-east of the control unit, in the middle of four nodes:
  (r,c), (r,c+1), (r+1,c+1) and (r+1,c). It is a 4x4 crossbar between those
  four nodes.

```
   SLCU(r,c) ------------- SLCU(r,c+1)
        \  SE           SW  /
         \                 /
          NW   R-Xnet   NE
              (r,c)
          SW            SE
         /                 \
        / NE           NW   \
   SLCU(r+1,c) ---------- SLCU(r+1,c+1)
```

Each port of a node's R-SLCUXnet meets the facing port of one R-Xnet:

* NW meets the SE port of R-Xnet(r-1,c-1).
* NE meets the SW port of R-Xnet(r-1,c).
* SE meets the NW port of R-Xnet(r,c).
* SW meets the NE port of R-Xnet(r,c-1).

Every hop therefore crosses three routers: out of the sender's R-SLCUXnet,
across one R-Xnet, and into the receiver's R-SLCUXnet. The direction table
below gives the two settings per direction. Both are plain port numbers.

| code | direction | R-SLCUXnet sends on | R-Xnet forwards to | receiver's R-SLCUXnet takes from |
|---|---|---|---|---|
| 0 | NW | 0 (NW) | 0 (NW) | 2 (SE) |
| 1 | N  | 0 (NW) | 1 (NE) | 3 (SW) |
| 2 | NE | 1 (NE) | 1 (NE) | 3 (SW) |
| 3 | E  | 1 (NE) | 2 (SE) | 0 (NW) |
| 4 | SE | 2 (SE) | 2 (SE) | 0 (NW) |
| 5 | S  | 2 (SE) | 3 (SW) | 1 (NE) |
| 6 | SW | 3 (SW) | 3 (SW) | 1 (NE) |
| 7 | W  | 3 (SW) | 0 (NW) | 2 (SE) |

Worked example, North: node (r,c) sends on NW. The word enters R-Xnet(r-1,c-1)
on its SE port and leaves on NE. It arrives at node (r-1,c) on that node's SW
port.

The first two setting columns are the design's own direction table. Reading
its entries as these port numbers is this design's interpretation. It is the
reading under which all eight moves land on the right neighbour.
`scac_pkg.sv` derives the other two columns from the wiring:

* The R-Xnet input is the port facing the sender, `(send port + 2) mod 4`.
* The receiver's port is `(R-Xnet output + 2) mod 4`.

The router arbiters (two in the R-SLCUXnet, one per output in the R-Xnet) are
fixed-priority. In this network each arbiter never sees more than one request,
because all nodes share one direction. The arbiters are present to match the
described router structure, not because contention can occur.

## One transfer: Read, Transfer, Write

All nodes receive the same micro-instruction together. It holds the operation
(`OP_SEND` or `OP_RECEIVE`), the direction code and a 4-bit distance `k`.
Each node's COM-Control then steps through four states in lockstep with every
other node:

| state | cycles | what happens |
|---|---|---|
| Idle | - | waits; `instr_ready` is high, and `data_in` / `active` are sampled with the instruction |
| Read | 1 | loads the node's pipeline register with the word and its activity bit; routers open |
| Transfer | k | every register takes the word arriving from its neighbour: all words advance one hop per cycle |
| Write | 1 | routers closed; the word in the register is stored in `rcom` if the store rule allows |

A transfer takes `k + 2` cycles on the default 16+1-bit links. `done` is high
in the Write cycle. `rcom` and `rcom_wr` change on the clock edge that ends
the Write cycle. A distance of 0 goes from Read straight to Write, and every
node keeps its own word.

For a long transfer, the word passes through the registers of the nodes in
between, whether those nodes are active or not. This is what lets idle nodes
serve as pipeline stages.

### The activity bit

Each node has an `active` input. Its value travels with the word on the extra
link wire. The rules are this design's reading of the described SEND/RECEIVE
behaviour:

* **SEND**: each word carries its sender's `active` bit. The destination stores
  the word if that bit is set, whatever the destination's own state. Only
  active nodes actually deliver.
* **RECEIVE**: every node sends with the bit set. Only active destinations
  store.

All routers are open in both cases, because inactive nodes must still act as
pipeline stages. Of the described behaviour, this keeps the store rule but
does not keep "only active routers open" for SEND.

### Narrow links

The link width `BUS_W` can be 16, 4 or 1. With 16 or 4, a link is `BUS_W`
data wires plus an activity wire. The word is cut into `DATA_W/BUS_W` slices,
and the Read/Transfer/Write sequence runs once per slice, with Write going back
to Read until the last slice. With `BUS_W = 1` there is no separate activity
wire. The activity bit is sent as an extra first slice, so 17 slices make up a
word. A transfer therefore takes `NSLICE * (k + 2)` cycles:

| link | NSLICE | cycles at k = 14 |
|---|---|---|
| 16+1 | 1 | 16 |
| 4+1 | 4 | 64 |
| 1 | 17 | 272 |

These counts match the published latency-versus-distance curves within a few
cycles. The per-slice repetition itself is inferred from those curves.

## Topologies and edges

The X wiring in `scac_net.sv` is always the fully wrapped one. The other
topologies are made from it by *seam cuts*. A cut makes an R-Xnet refuse any
path that enters on one side of a grid seam and leaves on the other, so the
word is lost. A lost word arrives as all zeros, including the activity bit,
so it is never stored.

| `TOPO` | rows wrap | columns wrap | note |
|---|---|---|---|
| `TOPO_TORUS` | yes | yes | default |
| `TOPO_MESH` | no | no | words moved off the edge are lost |
| `TOPO_RING` | no | yes | 1D: `ROWS` must be 1; only E and W deliver |
| `TOPO_LINEAR` | no | no | 1D: `ROWS` must be 1; only E and W deliver |

Each R-Xnet gets parameters `EDGE_ROW` and `EDGE_COL`. They mark which of its
ports reach across the bottom or right seam. `cut_row` and `cut_col` come
from the topology. The seam mechanism is this design's own. The source
describes the four topologies only as generic choices.

## Files

| file | contents |
|---|---|
| `rtl/scac_pkg.sv` | direction, port, op and topology enums; `com_instr_t`; direction-table lookup functions; `DIST_W = 4` |
| `rtl/fixed_prio_arb.sv` | combinational fixed-priority arbiter |
| `rtl/r_slcuxnet.sv` | R-SLCUXnet demux/mux (combinational) |
| `rtl/r_xnet.sv` | R-Xnet 4x4 crossbar with seam cut (combinational) |
| `rtl/com_control.sv` | COM-Control state machine, pipeline register, R_COM |
| `rtl/slcu_com.sv` | one node: COM-Control, R-SLCUXnet and R-Xnet |
| `rtl/scac_net.sv` | the network, top level |

`scac_net` parameters:

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 4, 4 | grid size |
| `TOPO` | `TOPO_TORUS` | topology |
| `DATA_W` | 16 | word width |
| `BUS_W` | 16 | link width: 16, 4 or 1 |

Ports:

* `clk`, `rst_n` (synchronous, active low).
* `instr_valid`, `instr` (`com_instr_t`) and `instr_ready`. Only issue an
  instruction while `instr_ready` is high; an assertion checks this.
* Per node, index `r*COLS + c`: `active`, `data_in`, `rcom` and `rcom_wr`.
* `done`.

Assertions check two invariants: all nodes stay in lockstep, and the distance
counter never underflows.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=... failures=...`
line.

| testbench | what it checks |
|---|---|
| `tb_r_xnet` | every direction, open or closed, with and without seam cuts, against the direction table written as constants |
| `tb_r_slcuxnet` | demux and mux ports for every direction |
| `tb_com_control` | three pairs of controllers with 16+1, 4+1 and 1-bit links, each pair wired as a 2-node ring; R_COM, the store rules, the open cycles and the `NSLICE*(k+2)` latency |
| `tb_slcu_com` | one node with its ports looped back as in a 1x1 network: all directions, distances and cut settings |
| `tb_scac_net` | five networks side by side, each with a reference model in `scac_net_checker` (see below) |
| `tb_scac_net_full` | the default network with no parameter overrides (see below) |

The five networks in `tb_scac_net` are:

* a 4x4 torus with 16+1-bit links
* a 4x4 mesh with 4+1-bit links
* an 8-node ring with 1-bit links
* a 16-node linear array
* a 3x5 torus

`tb_scac_net` also counts how often each mechanism occurs, and fails if one
never occurs: wrap-around, edge loss, a word carried through an inactive node,
distance 0, sliced words, 1-bit serial, and an inactive receiver skipping a
store.

`tb_scac_net_full` first runs a parallel sum. It does four RECEIVE steps (W
at distance 1, W 2, N 1, N 2), and the testbench adds after each step. Every
node must end with the sum of all 16 values, and each step must take `k + 2`
cycles. It then runs a random regression.

`tb_fir` runs a 16-tap FIR filter over 64 inputs twice: once on a 16-node
linear array and once on the default 4x4 torus. The compute elements'
multiply-accumulate is modelled in the testbench, and all 64 outputs are
compared with a direct convolution. The mapping is output-stationary. Node
`j` of a 16-node chain builds the outputs with `n mod 16 = j`, the control
unit broadcasts one tap per step, and the input samples shift one node along
the chain between steps.

* **1D array**: a shift is one RECEIVE to the west, 63 transfers in all.
* **Torus**: the chain runs in row-major order. A shift is a RECEIVE to the
  west by all nodes, which wraps column 0 into column 3. It is followed by a
  RECEIVE to the north in which only the last column is active. That makes
  2 x 63 = 126 transfers.

Each transfer takes 3 cycles.

`tb_latency` times one east SEND on 4x4 tori with each link width, at
distances 0, 2, 6, 10 and 14, and checks the delivered words. It measures:

| distance | 16+1 | 4+1 | 1 bit |
|---|---|---|---|
| 0 | 2 | 8 | 34 |
| 2 | 4 | 16 | 68 |
| 6 | 8 | 32 | 136 |
| 10 | 12 | 48 | 204 |
| 14 | 16 | 64 | 272 |

`tb_scale` runs random regressions on 2x2 and 8x8 meshes and tori with
16+1-bit and 1-bit links. The parameters also allow 16x16 (256 nodes), but
that size has not been simulated: its simulator build takes well over ten
minutes.

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/scac_pkg.sv tb/tb_scac_net.sv --top-module tb_scac_net -o sim
./obj_dir/sim
```

## Limits and departures

* **Not built.** The first-level control unit and its memory, the SLCU
  instruction decoder, the compute elements and their memories, and the
  control bus are outside this RTL. The instruction format (op, 3-bit
  direction, 4-bit distance) is this design's own; distances go up to 15.
* **Inferred behaviour.** The activity-bit semantics, distance 0 meaning
  "keep own word", the per-slice repetition of the state sequence and the
  seam-cut implementation of mesh and linear edges are inferred. They are
  not specified by the source.
* **Arbitration.** Arbitration is fixed priority and never contended.
* **Not reproduced.** The published FPGA area and bandwidth figures are not
  reproduced. The published FIR communication times also count the compute
  program, so they cannot be compared with the transfer counts above.
* **Register count.** A node holds 85 flip-flops here: the instruction fields,
  two counters, the word to send, the pipeline register, a receive buffer and
  R_COM. The published figure for a router is 49 registers. A leaner build
  could drop the separate word and receive buffers when the link is full
  width.
* **2D FIR mapping.** The 2D FIR in `tb_fir` is one reading of the described
  "west by all, then north by the last column" scheme: a row-major chain
  folded onto the torus. It uses 126 transfers for 64 inputs, where the
  published count is 128.

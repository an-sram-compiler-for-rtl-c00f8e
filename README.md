# Multi-port SRAM array for a two-tier monolithic 3D stack

This RTL describes a large on-chip SRAM that is *physically distributed but
logically shared*. The memory is cut into SRAM blocks, and each block sits
directly under one processor core of a stacked logic tier. A core reaches its
own block over a short vertical connection, without any network hop. It reaches
every other block through a mesh network that lives in the memory tier. This
gives every core a fast local port and one shared address space, with no
copies and no coherence protocol.

The default configuration is a **2 MB array**: 4×4 tiles, each with a
**128 KB block** built from 256 subarrays of **64 word lines × 64 bit lines**.
All data paths are **32-bit words**.

```
 core(0,0)    core(1,0)   ...        (processor tier, not part of this RTL)
    |            |
 +--v-----+   +--v-----+
 | mem_ni |---| mem_ni |--- ...      memory tier: one tile per core
 | router |   | router |
 | block  |   | block  |
 +--------+   +--------+
    |             |
   ...           ...                 4 x 4 mesh, X-then-Y routing
```

The hierarchy, bottom-up:

| level | module | what it is |
|---|---|---|
| subarray | `sram_subarray` | bit-cells, row decoder + word-line drivers, single-ended dynamic sense amplifiers, write drivers; all 64 columns accessed in parallel |
| block | `sram_block` → `sram_htree` → `htree_node`, `sram_col_mux` | subarrays joined by a pipelined 4-way H-tree; single port, one access per cycle |
| tile | `mem_tile` → `mem_ni`, `noc_router`, `sram_block` | a block, its mesh router and the interface to the core above |
| array | `sram_array` (top) | `MESH_X × MESH_Y` tiles wired as a mesh |

`sram_pkg` holds the shared enums and constants. `rr_arbiter` is the
round-robin arbiter the router uses.

## Addresses

A core issues **word addresses** of `GA_W` bits (19 bits at the default).

```
 global word address  [18:15] block = tile y*MESH_X + x
                      [14:0]  word inside the block
 word inside a block  [14:7]  subarray   (2 bits per H-tree level, root first)
                      [6:1]   row        (word line)
                      [0]     word within the 64-bit row
```

Each block holds one contiguous 128 KB slice of the address space. The slice
order and the bit order inside a block are this design's choices. Only the
existence of an address-to-block mapping is part of the architecture.

## Timing: the part to understand first

Everything is one clock, and every stage that crosses a distance is one
register. That makes the latencies exact and easy to predict:

* **Block access**: `2·L + 1` cycles, where `L` is the number of H-tree levels.
  The request takes one register per level on the way down, spends one cycle
  in the subarray, then takes one register per level on the way up. The
  latency is the same for every address. At the default (256 subarrays, L = 4)
  it is **9 cycles**. A 32 KB block of 128×128 subarrays (16 subarrays, L = 2)
  takes 5 cycles.
* **Local access** (a core to its own block): exactly the block latency. The
  interface feeds the request to the block in the same cycle it is accepted.
* **Remote access** with no contention: `block latency + 2·hops + 3` cycles.
  Each router hop costs one cycle each way. There is one cycle at the
  destination router's local port, one in the response queue, and one at the
  source router's local port. `hops` is the Manhattan distance, at most 6 in
  a 4×4 mesh.
* Contention adds queueing on top of this. Local and remote responses can
  therefore return out of order, which is why every request carries a tag.

## Subarray (`sram_subarray` and its parts)

One request per cycle: `req_valid`, `req_we`, `req_row`, 64-bit `req_wdata`,
and a 64-bit `req_wmask`. In the request cycle:

1. `sram_row_decoder` raises one word line. It predecodes the two 3-bit
   halves of the row address, then ANDs the two lines for each row.
2. For a write, `sram_write_driver` drives the masked columns. Unmasked
   columns stay undriven, which reads as precharged-high. `sram_bitcell_array`
   updates only those cells at the clock edge.
3. For a read, the selected row drives the single-ended bit lines. A stored 0
   discharges its line, and a stored 1 leaves it high.
   `sram_sense_amp` models the dynamic sense amplifier:
   * with EN high it precharges and its output is 1;
   * with EN low it evaluates, and a discharged bit line pulls the output low.

   The subarray holds EN low only in read cycles.

`rsp_valid`, `rsp_we` and the 64-bit `rsp_rdata` appear one cycle later.

The sense amplifier is modelled at clock-cycle level. The analog internal node
and output become one register per column: it is set in a precharge cycle and
loaded from the bit line in an evaluate cycle. The bit-cell array locates the
active row from the one-hot word lines with an OR-encoder. That keeps it a
plain single-port memory for synthesis, without changing behaviour.

The parameter `SUB_TYPE` (`SUB_STF`, `SUB_MTF_BL`, `SUB_MTF_ALL`) names the
three placement variants: everything in one tier, bit-line peripherals stacked
above the cells, or all peripherals stacked. They share one schematic and
differ only in layout, so the parameter is a label and changes no logic.

## SRAM block and H-tree

`sram_col_mux` sits outside each subarray. It turns the 64 parallel columns
into one 32-bit word. On writes it copies the word into both slots and enables
only the selected slot through the column mask. On reads it selects the slot
named by the registered word index.

`sram_htree` builds the tree recursively. A tree of N > 1 subarrays is an
`htree_node` with 4 sub-trees, or 2 at the root when N is an odd power of two.
A tree of one subarray is the leaf: column mux plus subarray.

`htree_node`:

* Downward, it registers the request and raises `valid` only towards the
  child named by the top address bits, stripping those bits.
* Upward, it ORs the child responses into a register. Only one child can
  answer in a cycle, and an assertion checks this.

The block's request tag travels down and back up with the data. The network
interface uses the tag to tell local responses from remote ones.

## Memory network

### Router (`noc_router`)

Five ports: local, north (y−1), east (x+1), south (y+1), west (x−1). Each
port has two virtual channels (VCs):

* **VC0** carries requests and **VC1** carries responses. A flit never
  changes VC.
* Every input VC has a `BUF_DEPTH`-entry FIFO (4 by default).
* The head flit is routed **X first, then Y**, which is deadlock-free on a
  mesh.
* Each output grants one input VC per cycle, round robin. It grants only when
  the receiving buffer on that VC has room. The receiver's `ready` comes from
  its FIFO occupancy alone, so no combinational path leads from a router's
  `valid` back to itself.
* A flit accepted at one edge can leave in the next cycle.

Packets are single flits. Fields, MSB first:
`dst_x, dst_y, src_x, src_y, is_rsp, we, tag, block address, data`.
This is 61 bits at the default.

The separate request and response VCs matter. A response never waits behind a
request, so requests stuck at a busy block cannot stop the responses that
would let that block drain.

### Network interface (`mem_ni`)

This is the junction of core, block and router.

* **Routing requests.** It decodes the target block from the address. A local
  request goes straight to the block. A remote request becomes a VC0 flit, and
  its `core_req_ready` follows the router's VC0 space.
* **Sharing the block port.** The block has a single port, so a local request
  and a request from the network compete. While the core has a local request
  waiting, the turn alternates every cycle. On the network's turn a waiting
  remote request goes first. On the core's turn the router is held off.
  The router only offers a flit when the interface is ready, so a conflict
  cannot be seen and answered after the fact. The turn therefore runs on
  time, not on observed conflicts.
* **Response-slot reservation.** A remote request enters the block only if a
  slot in the `RSP_DEPTH`-entry response queue (8 by default) is reserved for
  its answer. The 9-stage block pipeline therefore never has to stall on a
  full network.
* **Queued responses** go out on VC1, ahead of new core requests on the same
  injection port.
* **Core response port.** A local block response has priority. A network
  response waits one cycle when both arrive together.

Every request, including a write, gets exactly one response with the core's
tag (`core_rsp_we` = 1 for writes). The core must accept a response in the
cycle it is valid. It may keep up to 2^`TAG_W` requests outstanding.

## Top-level interface (`sram_array`)

All port arrays are indexed by tile number `t = y·MESH_X + x`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of all control state (memory contents are not reset) |
| `core_req_valid[t]` / `core_req_ready[t]` | in / out | 1 | request handshake of core t |
| `core_req_we[t]` | in | 1 | 1 = write |
| `core_req_addr[t]` | in | `GA_W` (19) | global word address |
| `core_req_wdata[t]` | in | 32 | write data |
| `core_req_tag[t]` | in | `TAG_W` (4) | returned with the response |
| `core_rsp_valid[t]`, `core_rsp_we[t]`, `core_rsp_rdata[t]`, `core_rsp_tag[t]` | out | 1/1/32/4 | response |

Parameters: `MESH_X`, `MESH_Y` (4, 4), `BLOCK_BYTES` (131072), `SUB_ROWS`,
`SUB_COLS` (64, 64), `DATA_W` (32), `TAG_W` (4), `BUF_DEPTH` (4),
`RSP_DEPTH` (8), `SUB_TYPE` (`SUB_STF`). `BLOCK_BYTES·8 / (SUB_ROWS·SUB_COLS)`
must be a power of two, and `SUB_COLS` a multiple of `DATA_W`.

## Where this RTL follows the architecture and where it chooses

Taken from the architecture:

* the subarray organisation: cells, decoder and drivers, single-ended dynamic
  sense amplifier with precharge and evaluate, write drivers, no column
  multiplexing inside, 32-bit words selected outside;
* the three subarray variants sharing one schematic;
* the H-tree that multiplexes reads up and demultiplexes writes down;
* one register stage per H-tree level and per router hop;
* a single-ported block;
* the mesh of blocks with a router per block and virtual channels for
  deadlock freedom;
* direct local access without the router, and any port reaching any address;
* the 2 MB = 4×4 × 128 KB configuration with 64×64 subarrays and a 32-bit
  bus.

Choices made here:

* the address map;
* 4-way H-tree nodes;
* the predecoder structure;
* the router itself: a compact VC router with single-flit packets, XY
  routing, request/response VCs, valid/ready links and round-robin
  allocation. It stands in for an existing open-source VC router, whose
  internals are not reproduced;
* the flit format;
* write acknowledgements and tags;
* the block-port arbitration and response-slot reservation;
* reset style;
* cycle-level models of the analog sense path.

Not in this RTL: the processor cores and their own core-to-core network,
which plug into the `core_*` ports. Also absent are the physical aspects with
no logic function: tier assignment, inter-tier vias (including the multi-via
word-line and bit-line paths), power grid, and layout generation.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sram_array \
          rtl/sram_pkg.sv tb/tb_sram_array.sv
obj_dir/Vtb_sram_array
```

Replace the top module name for the other benches.

| testbench | what it covers |
|---|---|
| `tb_sram_row_decoder`, `tb_sram_write_driver`, `tb_sram_sense_amp`, `tb_sram_bitcell_array` | subarray parts, exhaustive or random against reference values |
| `tb_sram_subarray` | 64×64 subarray, random masked writes and reads, 1-cycle latency |
| `tb_sram_col_mux`, `tb_htree_node` | word select, tree node routing and 1-cycle stages |
| `tb_sram_block` | 32 KB block of 128×128 subarrays: data, order, tags, latency 5 every access |
| `tb_noc_router` | XY routes, VC kept, per-VC order, back-pressure, 1-cycle hop |
| `tb_mem_ni`, `tb_mem_tile` | interface rules cycle by cycle; tile with a neighbour played by the bench |
| `tb_sram_array` | end to end (below) |

`tb_sram_array` runs the full 4×4 mesh with 2 KB blocks of 16×64 subarrays
and shallow buffers. It works in three phases:

* isolated accesses to every block, checking the exact local and remote
  latencies above;
* all 16 cores at once with a hot block;
* all cores reading everywhere.

It checks every response against a reference copy. It also counts local and
remote accesses, block-port conflicts, refusals for lack of response slots,
router back-pressure, responses overtaking requests, response collisions at
the core port, and 6-hop routes. The test fails if any of these never happens.

**Sizes simulated.** The block has been simulated at its full 128 KB default
(256 subarrays, 9-cycle latency): it passes, but Verilator turns it into
about 55–80 MB of C++ and takes a few minutes to build. The full 2 MB array
would be sixteen times that, so no testbench runs the top at its default
size. The largest configuration simulated end to end is the 4×4 mesh with
2 KB blocks. Since the mesh, interface and H-tree are parameterised, the
default differs from it only in block depth: 4 H-tree levels instead of 2.
All RTL files pass Verilator lint (warnings only, see below) and elaborate in a second SystemVerilog front end at their default sizes, the full 2 MB top included.

## Lint notes

* Verilator reports `UNOPTFLAT` on the mesh link arrays in `sram_array` and
  `mem_tile`. It treats each whole array as one signal. There is no real
  loop: every `ready` that a link's `valid` depends on comes from FIFO
  occupancy or from core-side inputs.
* Linted on its own as a top, `sram_htree` draws `UNDRIVEN` reports on its
  root's child-response nets: Verilator does not expand a recursive module
  that is itself the top. Inside `sram_block` the children are built and
  drive those nets.
* The assertions use `$onehot0` and simple implications. They are active in
  simulation with `--assert`.

# DCOS: a mesh switch with the coherence directory inside it

In a distributed-shared-memory multiprocessor on chip, every block of memory
has a *home* node: the node whose shared L2 bank and memory bank back that
address. With a conventional directory protocol the directory lives next to
those banks, so every miss travels to the home node, is looked up there, and
only then is sent on — to the L2 bank, to the memory, or to the core that
holds the block modified. DCOS ("Directory Cache On a Switch") moves both
directories of a node, the one for its shared L2 bank and the one for its
shared memory bank, into that node's network switch. The switch resolves
coherence as the request arrives and sends it straight to the unit that can
answer it, without a home-bank access first. That saves home-node accesses
and shortens cache-to-cache transfers.

This repository holds synthesizable SystemVerilog for the network side of
that system. It covers the 4x2 mesh, the wormhole crossbar switch, the
full-map MSI directory controller and its two directory caches, plus
self-checking testbenches. The processors, their L1 caches, the shared L2
banks and the memory banks are not included. Their switch ports are brought
out, and the testbench stands in for them.

## System organisation

* **Mesh.** Eight nodes in a 4-column x 2-row mesh. Node `n` is at column
  `n % 4`, row `n / 4`.
* **What each node attaches.**
  * A core with its private L1 cache.
  * One bank of the shared L2 cache.
  * One bank of the shared memory.
* **Switch ports.** Each switch has eight ports: north, east, south, west,
  core, L2, memory, and an internal port to its directory controller
  (`dcos_pkg::port_e`).
* **Packets.** A packet is a chain of 8-byte flits: head, body…, tail, or a
  lone single flit. Each flit carries a 2-bit flit-type sideband. Requests,
  forwards and invalidations are single flits. A data reply is a head flit
  plus two flits holding a 16-byte L1 line.
* **Channels.** Neighbouring switches are joined by one channel per
  direction (`chan_link`). Each channel has 32 data wires clocked at twice
  the switch clock (500 MHz against 250 MHz). It carries a flit as two
  phits, so it keeps pace with one flit per switch cycle.
* **Header (`hdr_t`).** Message type, sender, destination node, destination
  unit (core / L2 / memory / directory), original requester, and a 32-bit
  address.
* **Address map.**
  * Coherence is tracked per 64-byte block (the L2 line).
  * Address bits [8:6] give the block's home node.
  * The bits above them index the directory caches.

## How a request is resolved in the switch

A core sends a read (`M_RD`) or write (`M_WR`, a request for an exclusive
copy) to unit `U_DIR` of the block's home node. The network carries it to
the home switch, where the crossbar delivers it to the directory controller.
The controller looks the block up in both directory caches in the same cycle:

| directory | entries | entry |
|---|---|---|
| shared L2$ directory | 32 | L1 state, block tag, 8 presence bits |
| shared memory directory | 2048 (512 and 1024 also meaningful) | L1 state, L2 state, block tag, 8 presence bits |

The L1 state is one of empty, shared or modified. The presence bits say
which nodes' L1 caches hold a copy. The L2 state says whether the home L2
bank holds the block. The controller then sends, one flit per cycle, back
into the crossbar:

1. **Recall invalidations.** These go out if the new block takes the place
   of a valid memory-directory entry. Every L1 copy that entry records gets
   `M_INV`, so no cached copy is left untracked.
2. **Invalidations** (writes only). Every other node with its presence bit
   set gets an `M_INV`.
3. **The routed request.** It goes to one of three places:
   * **Owner forward.** If the block is modified in another node's L1, the
     controller sends `M_FWD_RD` / `M_FWD_WR` to that core. The owner
     replies to the requester directly. This is the cache-to-cache transfer,
     and it never touches the home banks.
   * **Memory bypass.** If the memory directory knows the block but records
     that the home L2 bank does not hold it, the request goes straight to
     the memory bank instead of missing in the L2 first.
   * **L2 bank.** In every other case, including a block neither directory
     knows, the request goes to the home L2 bank.

After a read, the requester is added to the sharers and the block is shared.
After a write, the writer is the only holder and the block is modified. The
entry is written into the memory directory. It is also written into the L2
directory whenever the L2 bank ends up holding the block, which is every
case except a forward. The requester is carried in every packet, so the
bank or owner that answers sends its `M_DATA` reply straight to the
requester.

The attached banks report changes through two update inputs per switch:

| input | comes from | kinds |
|---|---|---|
| cache dir update | L2 bank | `UPD_L2_EVICT`: the L2 dropped the block. The L2 directory entry is removed and the memory directory's L2 state becomes empty, so later misses bypass the L2. `UPD_L2_FILL`: the L2 loaded the block. |
| memory dir update | memory side | `UPD_L1_WB`: node `node` wrote back or dropped its L1 copy. Its presence bit is cleared; with no holders left the block becomes empty. |

Updates take priority over requests. The controller handles one request at a
time, so requests to the same home are serialised there.

### Timing

| step | cycles |
|---|---|
| request accepted → first packet out of the controller | 2 |
| each further packet from the controller (if not stalled) | 1 |
| flit crossing a switch, FIFO head to the channel | 1 |
| flit crossing a channel, sender to the next switch's FIFO | 2 |
| update accepted → entry written | 2 (the controller is free again 2 cycles after accepting the update) |

The banks' own latencies are not part of the RTL. The testbench uses the
evaluated platform's numbers: 15 cycles for the L2 bank, 70 for memory and
2 for an L1 answering a forward.

## The channel (`chan_link`)

The mesh has two clocks: `clk` for the switches and `clk_ch` for the
channels. `clk_ch` must be exactly twice `clk`, with every rising edge of
`clk` on a rising edge of `clk_ch`.

* **Where it runs.** All of the channel's flops run on `clk_ch`.
* **Finding switch edges.** A flop toggling on `clk`, compared with a copy
  taken on `clk_ch`, marks which `clk_ch` edges are also switch edges.
* **Sending.** On such an edge the sender takes a flit. It puts the low 32
  bits and the 2-bit flit type on the wires, then the high 32 bits half a
  switch cycle later.
* **Receiving.** The receiver rebuilds the flit into a 4-entry buffer. Its
  outputs, like the sender's `in_ready`, change only on switch edges. To
  both switches the channel therefore looks like an ordinary single-clock
  valid/ready port.
* **Flow control.** It uses credits. The sender starts with one credit per
  buffer entry. The receiver returns a credit, held for one switch cycle,
  each time the next switch takes a flit. A credit comes back four switch
  cycles after its flit left, so four entries sustain full rate.

## The switch datapath (`dcos_switch`)

* **Input buffers.** Each of the eight inputs has a 4-flit FIFO
  (`flit_fifo`). A mesh port at the border of the mesh has no neighbour, so
  it gets no buffer (parameter `MESH_USED`).
* **Routing.** A head flit at a FIFO head computes its output
  (`route_compute`). It uses X-then-Y dimension-order routing towards other
  nodes, and the named unit when the destination is this node.
* **Allocation.** Each output has a round-robin arbiter (`rr_arbiter`). It
  chooses among the head flits waiting for that output while the output is
  free.
* **Wormhole switching.** The winning input holds the output until its tail
  flit has passed. Flits of two packets therefore never interleave on a
  link, and a blocked packet stays spread over the buffers along its path.
* **Crossbar.** The crossbar (`crossbar`) is an AND-OR multiplexer driven by
  the connection matrix.
* **Handshakes.** All links use valid/ready. A FIFO's `in_ready` comes only
  from its fill register, so chains of switches have no combinational loop.

## Files

| file | contents |
|---|---|
| `rtl/dcos_pkg.sv` | mesh size, flit/header/directory types, port and message encodings |
| `rtl/dcos_mesh.sv` | top: 4x2 mesh of switches, local ports and update inputs as arrays |
| `rtl/chan_link.sv` | one direction of a 32-bit double-rate channel between switches |
| `rtl/dcos_switch.sv` | one switch: FIFOs, routing, arbiters, crossbar, directory controller |
| `rtl/dir_controller.sv` | MSI full-map directory controller with the two directory caches |
| `rtl/dir_cache.sv` | direct-mapped directory cache |
| `rtl/rr_arbiter.sv`, `rtl/crossbar.sv`, `rtl/route_compute.sv`, `rtl/flit_fifo.sv` | switch building blocks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters:
* `dcos_mesh` / `dcos_switch`: `L2_ENTRIES` (32), `MEM_ENTRIES` (2048) and
  `FIFO_DEPTH` (4).
* `dcos_switch` / `dir_controller`: `NODE`, the node's id.
* The mesh size is set by `MESH_X`/`MESH_Y` in `dcos_pkg`. The presence
  vector width follows from them.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/dcos_pkg.sv tb/tb_dcos_mesh.sv --top-module tb_dcos_mesh -Mdir obj -o sim
./obj/sim
```

Replace `tb_dcos_mesh` with any other testbench name.

* `tb_dcos_mesh` runs the whole mesh at its default sizes. Its clocks are 20
  time units for `clk` and 10 for `clk_ch`. It takes about a minute to
  build and a few seconds to run. The testbench models every core
  and bank.
  * First, one block is walked through every protocol case, and the test
    checks which unit serves each request and who gets invalidated.
  * Then all eight cores issue random reads and writes while every local
    output stalls at random. The test checks that every request gets exactly
    one reply, from the home bank or from another node's core.
  * It counts each mechanism (L2 route, memory bypass, forward, invalidation,
    recall, both update inputs, multi-flit packets, heads blocked by a busy
    output, link stalls) and fails if one never occurs.
* `tb_dir_controller` checks the exact packet sequence for the same protocol
  walk, with and without output stalls. It also checks the 2-cycle latency.
* `tb_chan_link` checks full rate, the 2-cycle latency, two phits per flit
  and in-order delivery under random stalls.
* `tb_dcos_dirsize` runs three meshes side by side, with memory
  directories of 512, 1024 and 2048 entries (see below). It takes about
  three minutes to build and under a second to run. Its environment is in
  `tb_mesh_env`.
* `tb_dcos_switch` checks routing, wormhole non-interleaving, the 1-cycle hop
  and the directory path through one switch.
* The block testbenches (`tb_flit_fifo`, `tb_rr_arbiter`, `tb_crossbar`,
  `tb_route_compute`, `tb_dir_cache`) compare against reference models.

## Where this RTL goes beyond, or departs from, the source design

The source design fixes these points:
* the mesh size;
* the flit size;
* wormhole switching;
* two directory caches per switch, with their entry contents (L1 state, L2
  state, address, one presence bit per node) and sizes;
* the MSI full-map states;
* the channel width and the switch and channel clock rates;
* update inputs from the node's L2 bank and memory bank feeding the
  directory controller, which feeds the arbiter.

The following are this implementation's own choices:

* **Protocol details.** Forwarding to a modified owner, the memory bypass
  rule, recall on directory-entry replacement, and unacknowledged
  invalidations. Also the update-message encoding, and serialising one
  request at a time per home.
* **Directory organisation.** Direct-mapped with a one-cycle read. The
  directories are the only directory in the system. A block absent from
  both is treated as uncached, and recall keeps that safe.
* **Switch micro-architecture.** 4-flit input FIFOs, round-robin arbitration,
  XY routing, valid/ready links, and the directory controller as an eighth
  crossbar port.
* **Channels.** Phit order, the flit-type sideband wires, credit flow
  control, the receive-buffer depth and the way switch edges are found.
* **Granularity.** Coherence is tracked per 64-byte block, while an L1 line
  is 16 bytes, so a presence bit covers a whole L2 line.

### Limits to keep in mind

* Invalidations and forwards are not acknowledged. A real system also needs
  the cores to order these against their own outstanding requests, and that
  part is not modelled.
* An L1 write-back is reported only through the memory dir update input.
  The write-back data path belongs to the banks and is not part of this RTL.
* The L2 directory's L2-state field is stored but not used.

## Benchmarks and sizes

The evaluated system ran FFT (32K points), Radix (1M keys, radix 1024),
Ocean (100x100 grid) and Barnes-Hut (2048 bodies). These run on the
processors, which are outside this RTL. What matters for the switch is the
directory reach: 8 nodes x 2048 entries x 64 bytes is 1 MiB of shared data
tracked at once. Larger working sets still run correctly, but memory-
directory entries get replaced, and each replacement recalls the L1 copies
it records.

The size of the memory directory was the parameter the evaluation varied,
over 512, 1024 and 2048 entries with the L2 directory fixed at 32.
`tb_dcos_dirsize` shows what that size does in this RTL, on traffic whose
outcome can be worked out by hand:

* Core 0 writes 1536 blocks of one home, so it owns all of them.
* Core 1 then reads the same blocks.
* A read whose directory entry survived the writes is forwarded to core 0
  and never reaches the home banks.
* Every other read goes to the home L2 bank.

| memory directory | forwards to owner | home-bank accesses | recalls |
|---|---|---|---|
| 512 | 0 | 3072 | 2560 |
| 1024 | 512 | 2560 | 1536 |
| 2048 | 1536 | 1536 | 0 |

The simulated counts match these numbers exactly. A larger on-switch
directory keeps more ownership information at the switch, so fewer requests
touch the home node. That is the effect the design is built for.

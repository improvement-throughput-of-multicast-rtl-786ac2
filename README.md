# Multicast GALS network-on-chip with continuous-time replication

A one-to-many packet (cache invalidations, operand delivery, barrier
notification, neural-network spike fan-out) is expensive on an ordinary
network-on-chip: sending it as a string of unicasts repeats the same flits on
the same links, and a path that visits the destinations one after another adds
latency per destination. This design routes a multicast packet as a tree on a
2-D mesh. Each router stores an incoming packet once and lets every output
branch that needs it read it **in parallel and at its own pace**: a branch
whose next hop is free does not wait for a branch whose next hop is busy. Each
router may run on its own clock (globally asynchronous, locally synchronous,
GALS), and every link can work either as a plain synchronous valid/ready link
or as an asynchronous four-phase handshake link.

The default build is an 8 x 8 mesh (64 nodes) with 64-bit flit payloads.

## Packets and addressing

A flit is `noc_pkg::flit_t`: a 2-bit kind (`FLIT_HEAD`, `FLIT_BODY`,
`FLIT_TAIL`; 0 is idle) and a 64-bit payload. A packet is one header, any
number of bodies and one tail; there is no single-flit packet.

The header's payload is the **destination bit string**: bit `n` set means
node `n = y*MESH_X + x` is a destination. Unicast, multicast and broadcast
are the same format. Body and tail payloads are user data and are never
modified.

Routing is XY (first along x, then along y), with north = y-1. For each
router and output direction there is a **partition string**: the set of
nodes reached through that output under XY routing. East holds all nodes
with a larger x, west all with a smaller x, north/south the nodes in the
same column above/below, local only the node itself
(`noc_pkg::xy_partition`).

At each branch the header's bit string is ANDed with that branch's
partition string. Because the partitions of one router's outputs do not
overlap, each destination survives in exactly one copy, and a destination
receives the packet once, with a header that holds only its own bit. A
branch whose masked string is empty is not taken.

## Router

`router` has five ports, ordered N=0, E=1, S=2, W=3, local=4. Each port has
an input port module (`ipm`) and an output port module (`opm`). There are no
U-turns, so every `ipm` has four branches, and every `opm` has four possible
sources. Branch `k` of the `ipm` at port `p` feeds input `3-k` of the `opm`
at port `(p+1+k) mod 5`. The router's coordinates come in on the `x`/`y`
strap inputs, so all routers of a mesh are the same design.

### Input port module: CMR buffer, RCU and AMUs

This is the part of the design that does the multicast work.

* **`cmr_buffer`** (continuous-time multicast replication buffer) is a
  circular buffer of `DEPTH` flits with one write port and four read ports.
  Each read port has its **own read pointer**. A flit is freed only when
  every selected branch has read it, so the writer sees the buffer as full
  when the slowest selected branch is `DEPTH` flits behind. A fast branch
  can run up to `DEPTH` flits ahead of a slow one.
* **Speculative header.** The flit under each read pointer is always on that
  branch's data lines. A new header is therefore presented to all four
  branches at once, already masked by each branch's AMU, before the route is
  known. A branch raises its request to its `opm` only once the route is
  known and selects it; the other branches are throttled.
* **`rcu`** (route computation unit) copies the header address into a
  one-entry buffer when the header is written. One clock later it sets
  PathEnabled: branch `k` is selected when the address shares a bit with
  branch `k`'s partition. The RCU then stays closed for the rest of the
  packet.
* **Tail rule.** After a tail has been stored, the `ipm` refuses the next
  header until every selected branch has read that tail. At that point
  `pkt_done` pulses, all read pointers are set level with the write
  pointer, and the RCU reopens. The next packet can then be routed
  differently. This is the clocked form of "acknowledge the tail only when
  all correct outputs have taken it".
* **`amu`** (address modifier unit), one per branch, ANDs a header's address
  with the branch's partition. Bodies and tails pass unchanged.
* A packet whose masked address selects no branch is drained through branch
  0's pointer without being offered anywhere. An example is a packet injected
  with only its own node's bit set.

Cycle timing, synchronous links, no contention: a header written into the
buffer at clock edge `t` is offered to its selected `opm`s after edge `t+1`.
It leaves through a synchronous output at edge `t+2`, where it is written
into the next router. So a header advances **two clocks per hop**. Body and
tail flits follow at one flit per clock.

### Output port module

`opm` chooses one of its four requesting branches by round robin, starting
after the previous winner. The winner keeps the output from header to tail
(wormhole switching), so flits of different packets never interleave on a
link. The chosen flit goes to `link_tx`.

## Links: synchronous or asynchronous (`link_tx`, `link_rx`)

A link is three signals: `req`, `flit` and `ack`. Its protocol is chosen by a
static mode bit, which is meant to change only during reset:

* **Synchronous** (`async_mode=0`): `req` acts as valid and `ack` as ready,
  in one shared clock. A flit moves on every clock where both are high.
  There is no added register: `link_tx` passes the flit straight through,
  and `link_rx`'s `ack` is the buffer's write-ready. Both ends must be on
  the same clock.
* **Asynchronous** (`async_mode=1`): four-phase return-to-zero bundled
  data. `link_tx` copies the flit into a holding register and raises `req`.
  It drops `req` after it sees `ack` high through a two-flop synchronizer,
  and takes the next flit after it sees `ack` low. `link_rx` synchronizes
  `req` with two flops and offers the flit. It raises `ack` in the clock
  after the buffer takes the flit, and lowers `ack` once `req` has fallen.
  The flit lines are stable whenever the synchronized `req` is seen high.
  The two ends may run on unrelated clocks. Each flit costs about two
  synchronizer delays in each direction, roughly 6 to 10 clocks, against 1
  clock on a synchronous link.

## Mesh (`noc_mesh`, the top)

`noc_mesh` builds the `MESH_X` x `MESH_Y` mesh and brings out each node's
local injection and ejection links:

| port | width | meaning |
|---|---|---|
| `clk` | `MESH_X*MESH_Y` | one clock per router |
| `rst_n` | 1 | active-low reset, asserted asynchronously |
| `mesh_async` | 1 | protocol of every router-to-router link |
| `local_async` | per node | protocol of that node's local links |
| `inj_req`, `inj_flit`, `inj_ack` | per node | injection link (into the router) |
| `ej_req`, `ej_flit`, `ej_ack` | per node | ejection link (out of the router) |

If `mesh_async=0`, all routers must share one clock. If `mesh_async=1`, every
router may have its own clock. A node whose local link is synchronous must
drive that link from its router's clock. Ports on the mesh edge are tied off,
and no partition ever routes toward them.

Parameters, with their defaults:

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 8, 8 | `noc_mesh`, `router`, `ipm` |
| `DEPTH` (CMR buffer flits, power of two) | 4 | `noc_mesh`, `router`, `ipm`, `cmr_buffer` |
| `ADDR_W` (payload / destination string) | 64 | `noc_pkg` |
| `COORD_W` (coordinate straps) | 4 | `noc_pkg` |

The mesh can have at most 64 nodes, one per bit of the destination string,
and at most 16 routers per side.

## Where this design makes its own choices

The multicast mechanism follows a published parallel-multicast router
design: the per-output read pointers, the speculative header, PathEnabled,
tail handling and AMU masking with XY partitions. That design also calls for
port modules that support both synchronous and asynchronous transfer.
Everything below was decided here:

* The asynchronous router it describes replicates in continuous time,
  without a clock. Here every module is clocked, and only the links can be
  asynchronous. Branches are still independent, but their rates are
  quantized to the clock of the router.
* The two link protocols, the two-flop synchronizers, and the rule that the
  mode is static.
* `DEPTH = 4`, 64-bit payloads, the flit-kind encoding, the port numbering,
  north = y-1, and the asynchronous-assert reset.
* Round-robin, packet-locked arbitration in the `opm`.
* Route computation takes one clock. The next header is held off at the
  write side, rather than the tail's acknowledge being delayed.
* Packets that select no branch are dropped.
* **Deadlock and packet length.** A branch can run at most `DEPTH` flits
  ahead of its slowest sibling. If a multicast packet is no longer than
  `DEPTH` flits, it fits in one buffer and its branches never wait for each
  other. Each branch then behaves like an XY unicast, and the network is free
  of deadlock. A longer multicast packet is not safe. Two such packets in one
  router can each win one of the two outputs the other also needs, run
  `DEPTH` flits ahead on it, and then wait forever for the other output.
  **Multicast packets must be at most `DEPTH` flits.** Unicast packets, which
  have a single branch, may be of any length.

What is not covered:

* The continuous-time replication of a fully asynchronous router, as said
  above. Two branches of one router cannot differ by less than a clock.
* Only the 2-D mesh with XY routing is built. The partition strings and the
  four-branch port modules are specific to it; other topologies would need
  other partitions.
* Only tree-based multicast is built, not the serial path-based scheme it is
  usually compared with. No power or timing figures are reproduced.

The source reports FPGA results for a much smaller router: a few dozen LUTs
on a Spartan-3E. Those numbers cannot be compared with this 64-bit, 8x8
build.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_amu` | headers masked, other flits untouched |
| `tb_rcu` | PathEnabled against independently computed masks; route valid exactly two clocks after the header; held until `pkt_done` |
| `tb_cmr_buffer` | per-reader in-order delivery at four different rates, throttling, full condition, tail hold, `pkt_done` timing, speculative header, drop path |
| `tb_link_tx`, `tb_link_rx` | both protocols, against a model of the other end on an unrelated clock; handshake ordering and data stability |
| `tb_opm` | round-robin order, packet locking, no loss; sync and async output |
| `tb_ipm` | per-branch delivery and header masking for random multicasts; header offered two clocks after it is written; sync and async input |
| `tb_router` | all five inputs loaded at once; per input/output pair order; multicast, drops, contention; all-sync and all-async |
| `tb_noc_mesh` | full 8x8 mesh at default parameters; random unicast (some longer than a buffer), multicast and broadcast from every node; one correctly masked copy per destination, in order per source; a synchronous phase and a GALS phase with different router clocks; checks that buffer-full stalls, tail holds, contention, drops of packets addressed only to their sender, back-pressure and both link modes all occurred |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -o sim && ./obj_dir/sim
```

Use the same command for any other testbench. Clocked immediate assertions
in the RTL check the handshake rules: a packet starts with a header, a header
arrives only while the RCU is open, a grant is taken with a header, and an
asynchronous request is raised only with a flit held for it.

Building the full-mesh testbench takes one to two minutes of C++
compilation; running it takes a few seconds. The mesh testbench drives the
synchronous local links on the falling clock edge, so its inputs never change
at the routers' sampling edge; do the same when driving the mesh from a
simulation model.

## Files

`rtl/noc_pkg.sv` holds the types, the port and direction constants and the
partition function. Each module is in `rtl/<module>.sv`, and its testbench
is in `tb/tb_<module>.sv`.

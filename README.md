# Hybrid Torus MPSoC: clusters on an electrical mesh, joined by an arbitrated optical torus

The Hybrid Torus MPSoC (HTM) splits a many-core chip into clusters. Inside a
cluster, IPs talk over an ordinary electrical network-on-chip (a mesh of
wormhole routers). Between clusters, traffic leaves through a *cluster
interface* (CI), is serialized onto light, and crosses a torus of optical
routers to the destination cluster. Optical switches cannot buffer or
decide anything themselves, so one central *arbiter* sets up each optical
circuit: it takes a request from a CI, resolves clashes between requests
for the same destination, works out the path through the torus from a
small table, switches the routers on that path, and acknowledges the CI
one clock after the request. Nearby traffic stays electrical and distant
traffic goes optical.

This repository holds synthesizable SystemVerilog for the electrical layer,
the cluster interface and the arbiter. It also holds a behavioural model of
the photonic routers, plus self-checking testbenches for every block and
for the whole system.

## Structure

```
htm_top
├── cluster_noc  ×(KX·KY)        one NX×NY mesh per cluster
│   └── hermes_router ×(NX·NY)   5-port wormhole router (+ CI port at one router)
│       └── circ_fifo            input buffer per port
├── cluster_interface ×(KX·KY)
│   ├── circ_fifo ×2             TX queue (to optics), RX queue (to mesh)
│   └── ci_serdes                flit <-> 1 bit per clock
├── arbiter                      one for the whole chip
│   ├── crb                      conflict detection + round-robin per destination
│   └── dsb                      path walk, one lite_lut per hop
│       └── lite_lut             per-switch routing table, filled by palc_pkg
└── optical_torus                KX×KY torus (behavioural)
    └── optical_router ×(KX·KY)  5×5 non-blocking ring switch (behavioural)
```

`htm_pkg` holds the shared types: `flit_t`, `link_t` (valid + flit), `opt_t`
(light + bit), `ocfg_t` (optical output setting), and the port numbers.
`palc_pkg` holds the shortest-path analysis that fills the routing table.

Default size: 3×3 clusters, each a 5×5 mesh, so 225 IPs and 9 optical
routers. This is the arrangement drawn for the architecture. Every size is a
parameter of `htm_top` (`KX`, `KY`, `NX`, `NY`).

## Packets and addressing

A flit is 16 bits. A packet is:

| flit | content |
|------|---------|
| 0 | header: `[11:8]` destination cluster, `[7:4]` x, `[3:0]` y; `[15:12]` free |
| 1 | size S, the number of payload flits |
| 2 .. S+1 | payload |

Clusters are numbered `y*KX + x` over the torus and routers `y*NX + x` over
a mesh (x grows east, y grows north). The 4-bit fields limit a mesh to
16×16 and the system to 16 clusters. A packet crossing clusters may hold at
most `MAX_PKT` flits (66 by default, so 64 payload flits, or 128 bytes).
Longer messages must be split. The reason is under *Back-pressure* below.

## Electrical layer: `hermes_router`, `cluster_noc`

Each router follows the HERMES organisation:

- one input buffer (`circ_fifo`, 16 flits) per port: East, West, North,
  South, Local;
- one central control that routes one waiting header per clock, chosen
  round-robin among the inputs;
- XY routing;
- credit flow control.

Links are `link_t` plus a credit bit going the other way. The credit is high
while the receiving buffer has room. A sender raises `valid` only while it
holds credit, and the flit is written at that edge. An assertion flags a
flit sent without credit.

Switching is wormhole. When a header is routed to a free output, that input
owns the output until the last flit, counted from the size flit, has passed.
A header waits if its output is busy, and the round-robin pointer moves on
so that other inputs get their turn. Timing: a flit written into a buffer at
edge *t* can leave at edge *t+1* at the earliest. A header therefore takes
two clocks per router, and a lone packet from (0,0) to (2,2) arrives in 9
clocks.

**Reaching the optical layer.** One router per cluster, by default the
centre one at (NX/2, NY/2), has a sixth port, `P_CI`, wired to the
cluster's interface. Because it is an extra port, every router keeps its
own IP. The routing rule is extended:

- header for another cluster: route XY towards the CI router, then leave
  through `P_CI`;
- header for this cluster: plain XY.

Packets arriving from other clusters enter through `P_CI` and are routed by
XY like any others.

## Cluster interface: `cluster_interface`, `ci_serdes`

The CI decouples the layers with two circular queues of 128 flits. An IP
hands a remote packet to the mesh and carries on. The CI does the rest:

1. **IDLE**: a header is at the head of the TX queue. Latch its cluster
   field as `arb_dest`.
2. **REQ**: hold `arb_rx` until `arb_ack`.
3. **SEND**: feed the packet to the serializer. It sends MSB first, one bit
   per clock, with no gap between flits, so a packet of F flits keeps the
   channel lit for exactly 16·F clocks.
4. **DRAIN**: after the last bit, wait `DRAIN_CYCLES` clocks (hops + 2) so
   that no light is still inside the torus.
5. **TAIL**: hold `arb_tail` until `arb_tail_ack`, then go back to IDLE.

The deserializer rebuilds flits from the incoming bits. A packet always
holds whole flits, so bit counting stays aligned without framing. The
rebuilt flits go into the RX queue, which drains into the mesh through the
CI port.

### Back-pressure

Light cannot be paused, so the receiver has to be ready before the sender
starts. Each CI raises `dest_ready` while its RX queue has room for a whole
`MAX_PKT` packet. The arbiter grants no path to a destination whose
`dest_ready` is low. This is why remote packets have a maximum length. If a
longer packet is sent anyway, the sticky `ci_overflow` flag rises and an
assertion fires.

## Arbiter: `arbiter`, `crb`, `dsb`, `lite_lut`, `palc_pkg`

This is the hardest part to follow.

### Port handshake

Each cluster has one port on the arbiter:

| signal | meaning and timing |
|--------|-------------------|
| `rx[i]`, `dest[i]` | request a circuit to cluster `dest[i]`; hold both until `ack[i]` |
| `ack[i]` | registered; rises one clock after a servable request; stays high while the circuit is held |
| `tail[i]` | end of use; the circuit is released at the next edge, where `ack[i]` falls |
| `tail_ack[i]` | `tail[i]` delayed by one clock |
| `output_conflict[j]` | combinational; two or more ports are waiting for destination j |
| `cfg[r*5+o]` | registered setting of output o of optical router r: `{en, input port}` |

A request waiting on a conflict is granted at the same edge that releases
the circuit it waits for. So with ports 1 and 64 both asking for output 1:

- one edge after the request, port 64 holds the circuit and port 1 waits;
- `output_conflict` flags output 1 only while both are waiting;
- port 1 is acknowledged at the edge where port 64's `tail` is taken.

### What happens in the clock before an ack

1. **Path computation (`dsb` + `lite_lut`).** For every port at once, the
   DSB walks the torus from the source. Starting with light on the source
   router's injection input, it reads the table entry for (current router,
   destination). That entry is the output port to use. The DSB records
   "router r, output o ← input p", moves to the neighbour behind that
   output, and repeats until the entry says *eject*. A shortest path in a
   KX×KY torus crosses at most KX/2 + KY/2 + 1 routers, so the walk is
   unrolled to that depth, with one table copy per step. Each port gets a
   bit mask of the router outputs its path uses, and the input each output
   must select.
2. **The table (`lite_lut`).** The table stores only one switch's share of
   each path: N×N entries of 3 bits. It never stores whole routes. The
   contents come from `palc_pkg`, which runs Dijkstra's algorithm over the
   torus (all links weigh 1) while the design elaborates. At each router
   the next hop is the first of east, west, north and south that brings the
   light one hop closer. Following the entries from any source gives a
   shortest path.
3. **Eligibility.** A waiting request is eligible when all three hold:
   - no router output on its path is held, apart from outputs being
     released in this clock;
   - the destination's ejection output is among those path outputs, so the
     destination itself must be free;
   - `dest_ready` of the destination is high.
4. **Conflict resolution (`crb`).** The waiting requests form a matrix,
   sources × destinations. For every destination column in parallel, the
   CRB flags a conflict when the column has more than one request. It then
   picks one eligible requester round-robin: each column remembers the
   source it served last, and the pointer starts at 0 after reset.
5. **Admission.** The column candidates are admitted in destination order.
   Each candidate is admitted only if its path does not overlap a path
   admitted earlier in the same clock. Admitted ports get `ack` at the
   edge, and their path outputs are written into the reservation table that
   drives `cfg`.

The optical routers are strictly non-blocking, so any set of circuits that
share no router output can be held at once.

## Optical layer: `optical_router`, `optical_torus` (behavioural)

The real router is photonic: a 5×5 strictly non-blocking switch built from
16 identical microring resonators on six waveguides. `optical_router` keeps
only what the control side sees:

- five inputs (injection, N, S, E, W) and five outputs (ejection, N, S, E, W);
- per output, an enable and the input it is coupled to.

The model does not say which rings realise a connection. It adds one clock
per router so that a ring of routers is not a zero-delay loop in
simulation. A real device needs no clock; the CI's drain wait allows for
this delay. `optical_torus` wires KX×KY of these routers into a wrap-around
torus, with router r serving cluster r.

## How far it can be trusted

Every block has a self-checking testbench in `tb/`, built against an
independent reference model. Each testbench also fails when the block is
deliberately broken in one way. The end-to-end tests (`tb_htm_top` at 3×3
clusters of 3×3 routers, and `tb_htm_full` at the defaults) run three
traffic phases: complement, uniform all-to-all, and local. They check every
packet's destination and contents. They also require each mechanism to
occur at least once:

- destination conflicts in the arbiter;
- several optical circuits held at once;
- `dest_ready` back-pressure;
- credit stalls in the meshes.

The reduced test reports mean latencies of about 3400 clocks for the
complement pattern, 6300 for uniform and 50 for local. The uniform number
includes a phase where cluster 0 deliberately stalls. The serial optical
link, at 16 clocks per flit, dominates the remote latencies.

Departures and gaps, where this RTL chooses for itself:

- **One clock.** The architecture allows every cluster its own clock (GALS).
  This RTL has one clock domain and no clock-domain crossing.
- **Torus link conflicts.** Paths are reserved link by link. A request waits
  while any router output on its path is busy, not only its destination.
  This goes beyond destination-only conflict detection, and it is needed
  because two circuits in a torus can share a link.
- **Conflict rule.** "Conflict" means two or more requesters. A NOT-XOR/OR
  formulation of the column test would miss three simultaneous
  requesters.
- **Chosen, not specified.** Flit width, packet format, buffer and queue
  depths, `MAX_PKT`, `dest_ready`, the drain wait, the CI attachment router,
  the next-hop tie-break order, the round-robin pointer reset, and
  releasing and re-granting a circuit in the same clock.
- **Deadlock.** Under sustained overload a cycle is possible. Full TX
  queues wait for remote `dest_ready`, while RX queues wait for meshes
  clogged by traffic towards those TX queues. The tests run below that
  point. Nothing in the design breaks such a cycle.
- **Generic IPs.** The IPs are not part of the RTL. Their router ports are
  the ports of `htm_top`.
- **Other sizes.** The intended systems range from 2×2 clusters of 3×3
  meshes to 3×3 clusters of 15×15 meshes. Set `KX`,
  `KY`, `NX` and `NY` to build them. The table computation runs at elaboration and grows as N³ per entry
  (N = number of clusters). That is trivial at 9 clusters, but it will slow
  elaboration for tori of 64 routers and more.

## Simulating

Name the packages and the testbench. Verilator finds the modules in
`rtl/` and `tb/` through `-y`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/htm_pkg.sv rtl/palc_pkg.sv tb/tb_ref_pkg.sv tb/tb_htm_top.sv \
  --top-module tb_htm_top -o sim
./obj_dir/sim
```

Every testbench ends with one line, `TB_RESULT checks=<n> failures=<m>`, and
has a watchdog. The full default system (`tb_htm_full`, 225
routers, each with its own coordinates as parameters) spends most of its
time in the C++ build, about 15 minutes on one core, so pass `-j`. It
then simulates in about 20 seconds, delivering 1350 packets. The reduced `tb_htm_top` takes under a
minute. For other sizes, change the parameters on `htm_top` and the
matching ones on `htm_traffic` in `tb_htm_top.sv`. Remote packets must stay
within `MAX_PKT` flits, and `CI_DEPTH` must be at least `MAX_PKT`.

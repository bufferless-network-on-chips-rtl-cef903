# DeC: a bufferless network-on-chip with bridged subnetworks

A bufferless network-on-chip router keeps no flit queues. Every flit that
enters a router must leave it in the next cycle, so when two flits want the
same output, the loser is *deflected*: sent out of some other free port,
usually away from its destination. Under load deflections multiply, flits
wander, latency climbs and the network saturates early.

Deflection Containment (DeC) splits the network into **M independent physical
subnetworks** with narrower links (together as wide as one unsplit network,
256 data bits), and at every node joins the M sub-routers with a
**bypass ring**. A flit that loses contention in one subnetwork is not thrown
onto a detour. It moves over the bypass ring to the sub-router of the next
subnetwork at the same node, and one cycle later competes there again for the
port it wanted. The main configuration here, DeC2, has two subnetworks of 128
data bits each, on an 8x8 mesh. A torus is the same design with one
parameter changed.

The router also replaces the usual sequential, strictly ordered port
allocation with a **parallel port allocator**. Only the oldest flit is
guaranteed its port. All other allocations are made at once from a small
rule, described below. The oldest flit therefore always moves toward its
destination, which keeps the network free of livelock.

## Structure

```
dec_noc                      K_X x K_Y nodes, mesh or torus links, event totals
 +- dec_ni        (per node) packet -> flits, one injection queue per subnetwork
 |   +- dec_inj_queue  (x M)
 +- dec_router    (per node) M sub-routers, bypass ring m -> (m+1) mod M
     +- dec_subrouter (x M)
         +- dec_route_compute     X-Y routing (mesh) / shortest-way X-Y (torus)
         +- dec_partial_perm_net  2-stage ranking of the 4 neighbour flits
         |   +- dec_perm_block (x4)
         +- dec_ejector           removes one local flit
         +- dec_injector          adds the node's flit if a channel is free
         +- dec_port_alloc        parallel STEP 1 / STEP 2 allocation
         +- dec_crossbar          5x5, outputs N, S, E, W, Bypass
```

`dec_pkg` holds the shared types: `flit_t` (valid bit, 32-bit header,
128-bit payload), `chan_t` (a flit plus the port it requested) and `port_e`.

### Flit and header

Each subnetwork link carries 1 valid bit, 128 payload bits and a 32-bit
header on separate wires. Every flit is routed on its own, so every flit
carries a full header:

| field | bits | meaning |
|---|---|---|
| dst_x, dst_y | 4 + 4 | destination node |
| src_x, src_y | 4 + 4 | source node |
| seq | 2 | flit number within its packet |
| ts | 14 | cycle the packet was accepted by its NI; smaller means older |

The 4-byte header size and 128-bit payload follow the original design. The
split into fields is this design's choice. 4-bit coordinates allow up to
16x16 nodes. Time stamps are compared modulo 2^14, which is exact as long as
no flit is more than 8191 cycles older than another.

## The sub-router pipeline

A hop costs three clock cycles: one link cycle and two router stages. All
three registers hold one flit per channel and nothing else.

| register / stage | what happens |
|---|---|
| link register `r0` | latches the four neighbour links N, S, E, W |
| stage 1 | route computation for the four flits; partial permutation network puts the oldest on channel 0 |
| stage register `r1` | four ranked channels with their requested ports |
| stage 2 | channel 4 = flit arriving on the bypass ring (route recomputed); eject; inject; allocate; crossbar |
| output register `r2` | drives the four links and the bypass output |

The bypass output of one sub-router enters **stage 2** of the next one
directly. A bypassed flit therefore reaches the other subnetwork's output
register one cycle after it would have left its own. A deflection would
instead cost at least two extra hops, six cycles or more.

Priority rules:

* The four neighbour flits are ranked by the **partial permutation network**:
  stage A compares channel pairs (0,1) and (2,3), and stage B compares the two
  winners and then the two losers. Channel 0 always ends up with the oldest
  flit. The others are only roughly ordered, which is enough for the
  allocator.
* The bypassed flit is not ranked. It sits on channel 4, after the neighbour
  flits.
* The injected flit takes the highest-numbered empty channel, so it is never
  ahead of a flit already in the network.

### Ejection and injection (stage 2, before allocation)

The ejector removes the lowest-channel flit whose route says Local and
delivers it on `ej_flit` in the same cycle. Only one flit is ejected per
cycle per subnetwork. A second local flit stays in its channel and is
bypassed or deflected like a loser.

Ejection happens first, so it frees a channel before injection is decided.
The injector then grants the NI's flit only if the router holds fewer flits
than it has output ports: 5 inside the network, 3 or 4 on mesh edges and
corners. Otherwise injection is **throttled**: `inj_grant` stays low and the
flit waits at the head of its NI queue. This rule guarantees that every flit
in stage 2 gets a port. An assertion in `dec_subrouter` checks this.

### Parallel port allocator

Inputs are five channels, each with a valid bit and a requested port. Ports
missing at mesh edges are masked out. Both steps are computed at the same
time:

1. **STEP 1.** A flit gets the direction it asked for if no other flit asks
   for the same one. The flit on channel 0 gets its request in any case. A
   contended port therefore goes to channel 0 or to nobody. Local requests
   never succeed here.
2. **STEP 2.** Each flit that failed STEP 1 counts the failed flits on lower
   channels, *k*. It takes the *k*-th port that is still free, searching in
   the fixed order **Bypass, North, South, East, West**.

Example, all five channels full: flit0→W, flit1→E, flit2→N, flit3→E, flit4→E.
STEP 1 grants W to flit0 and N to flit2. The free ports are Bypass, South and
East. flit1, flit3 and flit4 take them in that order, so flit1 is bypassed,
flit3 is deflected South and flit4 happens to get East. `tb_dec_port_alloc`
checks exactly this case.

No flit ever requests Bypass, so it is always free in STEP 2. Because it
comes first in the search order, the first loser in a router always takes
the bypass channel. Later losers are deflected.

### Route computation

* **Mesh:** dimension-order X then Y. x grows to the East and y to the North.
* **Torus** (`TORUS=1`): X then Y, but in each dimension the flit goes the
  shorter way round the ring. When both ways are equally long it goes East or
  North. Edge nodes gain wrap-around links, so every router has five ports.

## Network interface

`dec_ni` takes one packet at a time on `pkt_valid`/`pkt_ready`. A packet is
1 flit (16-byte control packet) or 4 flits (64-byte data packet), with its
payload in `pkt_data`, flit *i* in bits `[128i+127:128i]`. The NI writes one
flit per cycle into one of M injection queues, 8 flits deep each. Each flit
goes to the queue of the subnetwork whose sub-router at this node holds the
fewest flits (`load`). Ties go to the shorter queue, then to the lower
subnetwork, and full queues are skipped. Each queue head feeds only its own
sub-router, so one blocked subnetwork does not stall the other. The next
packet is accepted in the cycle its predecessor's last flit is queued.

Packets are **not reassembled**. Flits of one packet may take different
subnetworks and paths and arrive in any order. The top delivers every
ejected flit on `ej_flit[node][subnet]`, and the header's `src` and `seq`
identify it. The original design also leaves destination reassembly
unspecified and assumes unlimited reassembly buffers.

## Top-level interface (`dec_noc`)

| parameter | default | meaning |
|---|---|---|
| `K_X`, `K_Y` | 8, 8 | grid size (at most 16 each with 4-bit coordinates) |
| `TORUS` | 0 | 0 mesh, 1 torus |
| `M` | 2 | subnetworks; must equal `dec_pkg::NUM_SUBNETS`, which sets the flit width |
| `QDEPTH` | 8 | NI queue depth per subnetwork, in flits |

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (valid bits and counters only) |
| `pkt_valid[n]` / `pkt_ready[n]` | in / out | packet handshake of node n = y*K_X + x |
| `pkt_dst_x[n]`, `pkt_dst_y[n]`, `pkt_len[n]`, `pkt_data[n]` | in | destination, length in flits (1..4), payload |
| `ej_flit[n][m]` | out | flit ejected at node n from subnetwork m (valid inside) |
| `cnt_inject`, `cnt_eject`, `cnt_deflect`, `cnt_bypass`, `cnt_throttle` | out | running 32-bit totals since reset |

A flit that is ejected appears on `ej_flit` during stage 2. That is two
cycles after it entered the last router's link register, and it is not
registered again.

## How far it follows the original design

Taken from the original design:

* M = 2 bridged subnetworks with 256 aggregate data bits and a 4-byte header
  per subnetwork.
* The one-directional bypass ring at every node.
* The two-stage pipeline with one link cycle (P = 3).
* The two-stage partial permutation network ranking by time stamp, with
  bypassed and injected flits at the lowest priority.
* Both steps of the parallel port allocator and its search order.
* Ejection before injection, with throttling when the router is full.
* Per-subnetwork NI queues with least-load subnetwork selection.
* X-Y routing on the mesh and the lowest-hop-count variant on the torus.
* 64-byte data and 16-byte control packets.

This design's own choices, where the original gives no detail:

* Header field layout and time-stamp width, with wrap-aware comparison.
* Wiring of the partial permutation network.
* Ejector selection: lowest channel.
* The "free channel" test against the port count at mesh edges.
* Which free channel the injected flit takes.
* The bypassed flit entering stage 2 directly, with its route recomputed.
* Ring order m → m+1.
* NI queue depth 8, subnetwork selection at enqueue time and its
  tie-breaks, and one flit per cycle serialisation.
* Torus tie-breaking East/North.
* Reset style.
* The STEP 2 "lookup table" is computed as prefix counts, which gives the
  same table.

Differences and omissions:

* **Clock gating.** The original gates the clocks of the pipeline
  registers. Here the data registers load only when their flit is valid, the
  enable form that gate-insertion tools turn into clock gating.
* **Not included:**
  * The cores, caches and coherence protocol that produce the traffic.
  * Packet reassembly.
  * End-to-end flow control or retransmission; none is used in the original
    either.
  * The wormhole-routing variant and subnetwork power gating, which the
    original discusses only as alternatives or future work.
* **Changing `M`** requires changing `dec_pkg::NUM_SUBNETS` as well, because
  the flit payload width `256/M` is fixed in the package.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it shows |
|---|---|
| `tb_dec_route_compute` | every source/destination pair on an 8x8 mesh, an 8x8 torus and a 5x3 torus against a distance-based reference |
| `tb_dec_partial_perm_net` | 4000 random sets: the output is a permutation and channel 0 is the oldest |
| `tb_dec_port_alloc` | the five-flit example above, then 20000 random cases against a sequential reference, with edge masks |
| `tb_dec_ejector`, `tb_dec_injector`, `tb_dec_crossbar` | random cases against reference models |
| `tb_dec_subrouter` | 3-cycle hop, bypass of the loser, deflection of the third contender, 2-cycle ejection, 1-cycle bypass and injection paths, throttling in a full router and in a corner router |
| `tb_dec_router` | a loser crossing into the other subnetwork and leaving one cycle later, the ring in both directions, a flit bypassed twice |
| `tb_dec_ni` | least-load queue choice, queue-full fallback, headers, payload slices and time stamps under random traffic |
| `tb_dec_noc` | 4x4 mesh and 4x4 torus side by side: uniform random, tornado and bit-complement traffic and a saturating burst. Every packet must arrive intact, and injection, ejection, bypass, deflection and throttling must each occur |
| `tb_dec_noc_full` | the default 8x8 mesh through the same sequence (4466 packets, 11114 flits) |

The testbench helper `tb_noc_traffic` generates the synthetic patterns and
checks every ejected flit against its destination, header and payload.

Run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dec_pkg.sv tb/tb_dec_noc.sv --top-module tb_dec_noc -o sim
./obj_dir/sim
```

Building the 8x8 network takes about five minutes. The simulation itself
takes well under a second.

In one run, the 4x4 mesh delivered 8088 flits with a mean flit latency of 14
cycles, 0.49 deflections per flit and 0.68 bypass transfers per flit. That
load includes a saturating burst. Under the same traffic the 4x4 torus
averaged 10 cycles.

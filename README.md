# S-SMART++ mesh network-on-chip in SystemVerilog

S-SMART++ is a low-latency mesh network-on-chip. Its routers let a packet
cross several routers in one clock cycle. The basis is SMART multi-hop bypass:
a packet announces its trip one cycle ahead on dedicated request wires, and
the routers on the way set up a straight-through path for it. Two things are
added on top of that:

* **Speculative setup of the next multi-hop.** The router where a multi-hop
  ends learns the packet's destination one cycle early. It requests the
  *next* multi-hop while the packet is still on its way, so consecutive
  multi-hops cost one cycle each instead of three.
* **Few deep buffers instead of many virtual channels.** Each input has one
  FIFO that holds several packets. A packet may bypass a router whose buffer
  is not empty, as long as that buffer has room for it (non-empty buffer
  bypass, NEBB). So the network needs no virtual channels to perform well,
  and the router stays small.

This RTL builds the hardware configuration: a 4x4 mesh, at most 3 hops per
cycle (HPC_MAX), one 8-packet buffer per input, single-flit packets with
32-bit payloads, XY routing, and SMART_1D multi-hops (each one stays within a
row or a column).

## Terms

| term | meaning |
|---|---|
| multi-hop | one cycle in which a flit crosses up to HPC_MAX links and the routers between them |
| SSR | SMART-hop Setup Request: {length, destination, spec bit}, broadcast along the row or column ahead of a flit |
| spec-SSR | SSR sent by the router where the previous multi-hop ends, before the flit has arrived |
| final router | the router at distance *length* from the SSR's sender, where the flit lands |
| premature stop | the flit lands earlier than planned, because a router on the way gave its output to someone else |
| SA-L / SA-G | local switch allocation (buffered flits) / global allocation (SSRs, bypass paths) |
| Pipe_In | the register at each input that catches every flit that is not bypassed |

## How a flit moves

A flit's route from (0,0) to (3,3) in the default mesh. Each cycle is one
clock period, and a `->` marks a register update at the end of the cycle.

| cycle | source (0,0) | (1,0), (2,0) | turn router (3,0) | (3,1), (3,2) | destination (3,3) |
|---|---|---|---|---|---|
| 1 | SA-L wins East -> stage A | | | | |
| 2 | SSR {len 3} on East wires; SA-G -> stage B | SA-G grants W->E bypass | SSR ends here: record destination | | |
| 3 | stage B drives East link | flit passes through bypass | flit -> Pipe_In[W]; spec-SSR {len 3} on North wires; own SA-G grants Pipe_In[W]->North | SA-G grants S->N bypass | spec-SSR ends here: record |
| 4 | | | Pipe_In[W] drives North link | flit passes through bypass | flit -> Pipe_In[S] |
| 5 | | | | | SA-L wins Local -> stage A |
| 6 | | | | | -> stage B = ejection output |

Counted from the clock edge that takes the flit into the source router, the
flit appears at the ejection port 6 edges later. A route with one multi-hop
takes 5. Each further chained multi-hop adds 1 edge. Without the speculative
request each one would add 3: the flit would be buffered at the turn router
and run SA-L, SSR and traversal again. The testbenches check these numbers:
5 and 6 on the 4x4 mesh. An 8x8 mesh with HPC_MAX = 2 gives 8 for a
7-hop row (hops of 2, 2, 2, 1) and 12 for corner to corner.

A flit that lands in Pipe_In and does not leave speculatively goes into the
input FIFO. If the FIFO is empty, it goes straight into SA-L in the next
cycle. That gives SMART's three cycles per multi-hop when speculation does
not apply.

## The routing rules (SA-G)

SA-G is the core of the design (`rtl/sa_g.sv`). It runs in every router,
every cycle, on all the SSRs that reach the router. Its rules guarantee that
a router never receives a flit it did not expect on a bypass path. What can
happen is that a flit expected on a bypass path fails to show up; the path
then simply stays unused.

1. **Per input: the nearest sender wins, and standard SSRs beat spec-SSRs.**
   For each input, the router takes the SSRs whose length reaches it. The
   nearest standard SSR wins. Only if there is none does the nearest spec-SSR
   win; the router's own spec-SSR counts as distance 0.
2. **A final router records instead of arbitrating.** If the winner's length
   equals its distance, this router is where the flit will land. It stores
   the destination, and `spec_ssr_gen` turns that into a spec-SSR in the
   next cycle. Spec-SSRs may turn into the other dimension. Each output
   keeps the longest one. A local flit's standard SSR on the same output
   replaces it (SSR_Mux).
3. **Per output: local flit, then standard bypass, then own spec-SSR, then
   spec bypass.** A flit that won SA-L here always gets its output. Because
   of this local priority, a sender blocks every flit from farther upstream
   at its own router. So the flit that physically arrives at an input is
   always the one that input's winner was expecting, or none.
4. The result is registered. In the next cycle it drives each output mux:
   crossbar (stage B), bypass from the opposite input link, the Pipe_In of
   some input, or idle. A lost bypass request marks a premature stop: the
   flit is caught in Pipe_In and buffered.

A spec-SSR can win a path that its packet never uses. This happens when the
packet was stopped early on its previous multi-hop. Giving spec-SSRs the
lowest priority means such unused wins never stop another packet.

## Buffer room instead of credits

A flit can be stopped at any router of its multi-hop, so every one of those
routers must be able to hold it. Each input buffer raises a *room* flag
while at least ROOM_MIN = 4 of its 8 slots are free. The flag is wired back
to the HPC_MAX routers upstream. When a flit runs SA-L, `la_rc` sizes its
multi-hop: the distance left in the current dimension, at most HPC_MAX,
ending just before the first router without room. Length 0 means the flit
waits. Four slots are enough because at most three flits can already be
committed to a buffer without showing in its occupancy: one in Pipe_In and
two on the links. An assertion in `input_unit` checks for overflow.

This is this design's own back-pressure scheme. The original hardware used
credits, but no multi-hop credit protocol is specified. The price is that
half of each buffer serves as reserve, and a buffer shallower than ROOM_MIN
never accepts a flit.

## Files and hierarchy

```
ssmart_mesh            top: K x K routers, links, SSR wires, room wires
└─ ssmart_router       one 5-port router (x, y)
   ├─ input_unit  x5   Pipe_In, Spec_Dem, 8-packet FIFO, room flag
   ├─ la_rc       x5   XY output port and multi-hop length
   ├─ sa_l             5 x grant_hold_arbiter (round-robin, grant-hold)
   ├─ spec_ssr_gen     spec-SSRs at the final router + SSR_Mux (4 x la_rc)
   └─ sa_g             SSR priority arbitration, output arbitration, bypass setup
ssmart_pkg             flit_t, ssr_t, out_sel_e, router_ev_t, port numbers
```

Ports are N=0 (y+1), E=1 (x+1), S=2 (y-1), W=3 (x-1), L=4. Router (x, y)
is index y*K + x in the top's port arrays. `flit_t` is {valid, head, tail,
dst_x[4], dst_y[4], data[32]}. A flit on `inj[r]` is taken at a clock edge
if `inj_ready[r]` is high. Keep it stable until it is taken. `ej[r]` is valid
for one cycle per flit and cannot be refused. `ev[r]` counts, per cycle:
bypasses, non-empty buffer bypasses, premature stops, spec-SSRs generated
and dropped, speculative paths used and left idle, SA-L conflicts and
refused injections.

Parameters of `ssmart_mesh`, with the hardware configuration as default:

| parameter | default | note |
|---|---|---|
| K | 4 | mesh side, at most 16 (4-bit coordinates) |
| HPC_MAX | 3 | hops per cycle, at most 15; the cycle-level studies use 7 on 8x8 and 15 on 16x16 |
| DEPTH | 8 | packets per input buffer |
| ROOM_MIN | 4 | free slots needed to accept new multi-hops; must not be below 4 |

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/ssmart_pkg.sv tb/tb_ssmart_mesh.sv \
          --top-module tb_ssmart_mesh -o sim && ./obj_dir/sim
```

* `tb_ssmart_mesh`: default 4x4 mesh. It checks zero-load latencies, runs
  uniform random and hotspot traffic with a scoreboard, and requires each
  mechanism listed under `ev` to occur at least once.
* `tb_ssmart_router`: one router with driven neighbours. It covers the
  standard SSR and the traversal, bypass, premature stop, spec-SSR with a
  turn, and ejection, with their timing.
* `tb_sa_g`, `tb_spec_ssr_gen`, `tb_la_rc`, `tb_sa_l`, `tb_input_unit`,
  `tb_grant_hold_arbiter`: each compares its block with a reference model
  under random stimulus.

Larger meshes are simulated by overriding `K` and `HPC_MAX` on
`ssmart_mesh`. The largest run so far is 8x8, with HPC_MAX 7 and with
HPC_MAX 2: the zero-load latencies above plus 2000 cycles of uniform random
traffic at 15% load, all 18,700+ flits delivered. Building that model takes
more than ten minutes, so no 8x8 testbench is included.

Verilator reports `UNOPTFLAT` on the top's link array. The loop it sees is
only at the level of the whole array. Bypass paths run straight from one
link to the next, so no bit depends on itself; the warning stands for that
reason.

## What differs from the original design, and what is missing

* Back-pressure uses room flags, not credits (see above).
* Only single-flit packets are carried. The grant-hold arbiter that
  allocation per packet needs is built and tested, but in this network
  every flit is both head and tail, so it never locks. Five-flit packets,
  which the cycle-level studies also use, are not supported.
* One buffer per input, no virtual channels. The multi-VC configurations
  used in resource comparisons, and the three virtual networks needed for
  cache-coherence traffic, are not built.
* No speculative path into the ejection port: a packet that reaches its
  destination is buffered and ejected through SA-L.
* Spec-SSRs are only generated at the planned final router. None is made
  after a premature stop.
* Ties between spec-SSRs of equal length go to the lowest input number.
  Reset is asynchronous and active low. Buffer contents are not reset.
* Cores, caches and network interfaces are outside the design.

The latency claims checked here follow from the RTL's pipeline. Throughput
and saturation behaviour have been exercised for correctness (every flit
delivered, no overflow) but not compared quantitatively with published
curves.

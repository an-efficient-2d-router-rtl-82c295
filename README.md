# SlideAcross: a 2D router with single-cycle bypass for inhomogeneous 3D NoCs

An inhomogeneous 3D network-on-chip saves area, power and through-silicon vias by
giving only a few nodes of each layer a 3D router with vertical ports. All other
nodes have ordinary 5-port 2D routers. The cost is latency. A packet for another
layer must first cross its own layer to one of the few vertical hubs, and each 2D
hop on the way costs a full router pipeline plus any queuing.

SlideAcross attacks this inside the 2D router. It keeps a normal adaptive
virtual-channel (VC) pipeline for packets that turn or meet contention. It also
adds a pre-set straight-through path from each input to the output on the
opposite side (West→East, East→West, South→North, North→South). A flit that is
allowed on this path crosses the router **and** the link in one cycle. The buffered
pipeline needs three.

Two ideas keep the bypass decision cheap:

* **The slide virtual channel (SVC).** Every port has one extra VC, the SVC, and
  only flits travelling in the SVC may bypass. To decide whether a flit can go
  straight, the router never has to decode a VC number or look up per-VC credits.
  It only checks the one SVC of the one opposite output.
* **SVC tagging.** Any packet that wins an output port may be moved into that
  port's SVC for the next hop. Each flit carries a one-bit SVC tag. So the bypass
  is not reserved for one traffic class: whichever packet gets the SVC slides
  through the next router if it keeps going straight.

This repository holds synthesizable SystemVerilog for the router, its parts, a
network-interface injector, and a 4×4 layer built from these routers.

## The two datapaths and their timing

Each cycle below ends at a clock edge. "Arrives" means the flit is on the router's
input link.

| cycle | bypass path | buffered (adaptive) path |
|---|---|---|
| t   | bypass control (BC) accepts the flit; Mux2 puts it into the opposite output's link register | BC rejects it; the flit is written to its lane (BW). Route computation (RC) on the same flit is stored next to it |
| t+1 | flit is at the next router | selection, SA-I, SA-II and VC/SVC allocation; the winner moves to the output's switch-traversal register |
| t+2 | | Mux2 passes the switch-traversal register into the output link register |
| t+3 | | flit is at the next router |

The bypass path and the crossbar share the output link through **Mux2**, the
multiplexer in front of each inter-router output. The bypass path of an output is
"set up" in every cycle in which switch allocation granted that output nothing in
the previous cycle. In that case the switch-traversal register is empty and the
link is free. This condition comes from a register, so the bypass decision uses
only registered state plus the arriving flit.

### When a flit may bypass (`bypass_control`)

Let *o* be the output opposite the input the flit arrived on. A **head** flit
bypasses when all of these hold:

1. its SVC tag is set;
2. continuing to *o* is a productive (minimal) move toward its target;
3. *o* carries no crossbar flit this cycle;
4. *o*'s SVC is not held by another packet, and the downstream SVC buffer is empty
   (all its credits are back);
5. this input's own SVC buffer is empty.

A bypassing head takes *o*'s SVC. **Body** flits of that packet then bypass as long
as the input's SVC buffer stays empty, *o* is idle and a downstream SVC credit is
left. The **tail** releases the SVC.

If any flit cannot bypass, it is written to the SVC buffer. The flits after it
queue behind it, so order is kept. They then go through the crossbar on the same
output VC, which the lane already holds. A bypassed flit never uses a buffer slot,
so its credit goes back upstream at once.

### SVC tagging (`svc_tagger`)

Each inter-router output has a tagging unit. The ejection port has none. When the
output's SA-II winner is a head flit, it gets the SVC tag if two conditions hold:

* the output's SVC is not held by any packet;
* the downstream SVC buffer is empty.

Otherwise the head keeps its own class VC. Body flits follow their head's tag, and
the tail frees the SVC. A flit that bypasses into the same output in the same
cycle has priority over the crossbar for the SVC.

Because of the "downstream empty" rule, an SVC buffer never holds more than one
packet. That matters for deadlock: many packets share the SVC, but it can never
chain the turns of VC0 and VC1 into a cycle.

## The adaptive pipeline

* **Route computation (`route_compute`)** is minimal and fully adaptive. It gives
  at most one X port and one Y port toward the *in-layer target*, or the ejection
  port once the target is reached. The in-layer target is:
  * the destination, when the destination is on this layer;
  * otherwise the vertical hub (3D router) whose x, y the header carries.
* **Selection (`selection_unit`)** masks each congested candidate. A candidate is
  congested when neither its SVC (by the tagging rules) nor the packet's class VC
  can be taken. If two candidates are left, it picks the one with more free
  downstream credits for the packet's class VC. A tie goes to X.
* **SA-I (`sa_input_arbiter`)** is a round-robin choice among the ready lanes of
  one input. It drives that input's multiplexer in the crossbar.
* **SA-II (`sa_output_arbiter`)** is one 5:1 round-robin arbiter per output.
* **VC allocation (`vc_allocator`, `svc_tagger`)** runs on the SA-II winner in the
  same cycle. It is not speculative. A packet never changes its class VC (VC0 or
  VC1), so allocation only checks whether the packet's own VC at that output is
  free, unless the tagging unit gives it the SVC. A head asks only for a port
  where one of the two can be taken, so this allocation cannot fail.
* **Crossbar (`slide_crossbar`)** is built from two sets of multiplexers. Input
  multiplexers pick the SA-I winner's lane and output multiplexers pick the
  SA-II winner's input. The same module holds Mux2.
* **Flow control** uses credits per downstream lane (`credit_counter`). Each
  router starts with VC_DEPTH credits for VC0 and VC1 and SVC_DEPTH credits for
  the SVC.

## Deadlock freedom

Minimal fully adaptive routing needs an escape from cyclic dependencies. Each
packet gets a class VC once, at injection (`slide_ni_inject`), from where its
in-layer target lies:

* **VC0** if the target is to the left (smaller x);
* **VC1** if it is to the right;
* the VC with more free credits if the target is in the source's own column.

Within VC0 all packets travel west or straight north/south, and within VC1 east
or north/south. So neither VC can form a cycle of turns. The SVC holds at most one
packet (see above), so it cannot join the two VC classes into a cycle. The layer
testbench runs random traffic from all 16 nodes to completion without a stall.

## Flit format (`slide_pkg`)

| bits | field |
|---|---|
| 131:130 | type: head, body, tail, head-tail |
| 129 | class VC (0/1) |
| 128 | SVC tag |
| 127:0 | payload |

A head flit carries its header in payload bits 9:0: destination x, y, z and the
in-layer hub x, y, 2 bits each, enough for a 4×4×4 mesh. The injector also writes
a 32-bit packet id into bits 63:32 and the flit index into bits 71:64, which the
testbenches use. Packets are 5 flits. The ports are numbered Local 0, East 1 (+x),
West 2, North 3 (+y) and South 4.

## Module hierarchy

```
slide_mesh_layer            4x4 layer: routers, injectors, ejection ports
├── slide_ni_inject         packetizer + class-VC assignment (one per node)
└── slideacross_router      one 5-port router
    ├── route_compute       per input, on the arriving flit
    ├── bypass_control      per inter-router input
    ├── flit_fifo           3 lanes per input (VC0, VC1, SVC)
    ├── selection_unit      per lane
    ├── sa_input_arbiter    SA-I per input   ─┐
    ├── sa_output_arbiter   SA-II            ─┴─ rr_arbiter
    ├── credit_counter      per output
    ├── vc_allocator        per output
    ├── svc_tagger          per inter-router output
    └── slide_crossbar      input/output multiplexers + Mux2
```

### Router interface (`slideacross_router`)

All signals are synchronous to `clk`. `rst_n` is an asynchronous active-low
reset.

* **Inputs:** `in_valid[p]` and `in_flit[p]` for each of the 5 ports. A flit is
  taken in every cycle `in_valid` is high. The sender must hold a credit for the
  flit's lane; an assertion flags overflow.
* **Credits to the upstream router:** `in_credit[p][lane]` is a one-cycle pulse,
  one per freed slot, for lanes VC0, VC1 and SVC. It is registered.
* **Outputs:** `out_valid[o]` and `out_flit[o]`, registered.
* **Credits from downstream:** `out_credit[o][vc]`, one pulse per freed slot.
* **`byp_event[o]`** marks an output flit that came through the bypass path.

The parameters are `MY_X`, `MY_Y`, `MY_Z` (the router's position), `VC_DEPTH`
(default 4) and `SVC_DEPTH` (default 5).

### Layer interface (`slide_mesh_layer`)

Per node *n = y·4 + x*:

* **Injection:** a packet request `pkt_valid`/`pkt_ready` with `pkt_hdr` and
  `pkt_id`.
* **Ejection:** `ej_valid` and `ej_flit`. Ejection always accepts.
* **Statistics:** `byp_event[n][o]`.

Links on the mesh edge are tied off. A packet for another layer is ejected at its
hub node. That node's local port stands in for the vertical port of the 3D router,
which is not part of this RTL.

## Worked example (checked in `tb_slide_mesh_layer`)

A packet is injected at (0,0) for a node on another layer whose hub is at (3,2).
In an empty layer:

1. It leaves (0,0) East and is tagged SVC there.
2. It bypasses (1,0) and (2,0).
3. It is buffered at (3,0) to turn North and is tagged SVC again.
4. It bypasses (3,1).
5. It is ejected at (3,2).

The head takes 3 + 1 + 1 + 3 + 1 + 3 = 12 cycles from the source router's input
to ejection, against 18 without bypass. The testbench checks both the 12 cycles
and the 15 bypass events (5 flits × 3 hops).

## Simulating

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`
and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/slide_pkg.sv rtl/*.sv \
    tb/tb_slide_mesh_layer.sv --top-module tb_slide_mesh_layer -o sim
./obj_dir/sim
```

Use the same command for any `tb/tb_<module>.sv`. The testbenches are:

* **`tb_slide_mesh_layer`:** the layer at default parameters, the worked example
  plus random traffic from all 16 nodes. It also counts bypass hops, buffered
  flits, SVC tags, non-XY adaptive choices, credit stalls and ejections; each must
  occur. A third part sends inter-layer traffic in a layer where one node in four
  (1,1), (3,1), (1,3), (3,3) hosts a 3D router. Each source uses its nearest hub.
* **`tb_slideacross_router`:** one router at default parameters, with the
  testbench acting as the four neighbours and the network interface. It covers:
  * a 1-cycle bypass of a whole SVC packet;
  * the 3-cycle buffered path with SVC tagging;
  * a turn, an ejection, and an other-layer packet sent to its hub;
  * adaptive selection away from a congested port;
  * a bypass refused because the crossbar took the output;
  * random traffic. A scoreboard checks order, the productive port, the class
    VC, no interleaving inside an output VC, and that an SVC head only enters an
    empty downstream SVC.
* **One testbench per block,** each against a reference model.

The layer testbench takes about 15 s to build and under a second to run.

## Choices made where the design description is silent

The following follow the design description:

* the two datapaths;
* the SVC, its tagging rules and the one-packet SVC;
* RC in parallel with BW;
* SA in two stages (input, then output multiplexers);
* VC allocation after SA that keeps the packet's VC;
* congestion masking in selection;
* the left/right class-VC rule;
* the 128-bit datapath, 5-port router, 4×4×4 mesh and 5-flit packets.

The following are this implementation's own choices:

* **Buffers:** private FIFOs per lane, 4 flits for VC0 and VC1 and 5 (one packet)
  for the SVC. A shared buffer would also fit the description.
* **Virtual networks:** a single one with two class VCs. Separate message classes
  would need one more VC pair per class.
* **Arbitration and flow control:** round-robin arbitration in SA-I and SA-II, and
  credit-based flow control. The downstream SVC counts as empty when all its
  credits are back.
* **Congestion measure:** free credits of the packet's class VC; ties go to X.
* **Bypass set-up:** "no request for this output" is taken as "no SA grant last
  cycle", which is the same thing here because every request is pre-qualified.
  Rules for body and tail flits on the bypass are this design's.
* **Reaching another layer:** the hub is named in the header by the source. The
  description does not say how the proposed router picks a 3D router.
* **3D routers and TSV links:** not implemented. Their position in the layer is
  not given either, so the layer is all SlideAcross routers and the hub node
  ejects.
* **Pipeline cut:** a switch-traversal register between SA and the output link,
  giving the 3-stage buffered pipeline. Bypass flits skip it.

## Limits

* Timing figures (a 0.2 ns bypass path, 0.05 ns SVC decision logic) belong to a
  45 nm implementation study and are not checked here.
* The application benchmarks used to rate the design (a multimedia system, two
  E3S suites and an audio-visual benchmark on a 4×4×4 mesh) come with no traffic
  data. They are not reproduced. The layer testbench uses uniform random traffic.

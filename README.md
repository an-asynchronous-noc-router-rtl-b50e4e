# Double-plane 2-VC mesh router with lazy end-to-end credits

This is a network-on-chip router node for a 2D mesh. It is written from the
published description of an asynchronous router, "An Asynchronous NoC Router
in a 14nm FinFET Library: Comparison to an Industrial Synchronous
Counterpart". That router uses two-phase handshakes with bundled data and
has three main features:

* **Two planes.** A node holds two identical routers that share nothing. The
  request plane carries requests and the response plane carries responses,
  so a response can never wait behind a request.
* **One switch per virtual channel (VC).** A plane has two VCs. Each VC has
  its own complete 5x5 switch, with input buffers, routing, a crossbar and
  output arbitration. The two VCs meet only at the output link of each port,
  where a small flow-control unit merges their flits.
* **End-to-end credits with lazy update.** The sender keeps one credit
  counter per VC, counting the free slots in the next router's input buffer.
  Returned credits are only queued. The counter changes once per flit sent,
  and that one update takes in every queued return along with the decrement.
  So a credit return never competes with a send. If a VC runs out of credit,
  a timer checks for queued returns at a fixed rate and unblocks the VC.

The RTL here is a **clocked equivalent** of that asynchronous design. Every
channel keeps its two-phase encoding: a new item is waiting whenever `req`
differs from `ack`, and each transition of a credit wire returns one slot.
Both ends sample these wires on one clock. The structure, port count, VC
count, buffer depth and credit rule are the router's own. Cycle counts,
widths and the timer rate belong to this implementation.

## Structure

```
router_node                       top: two planes side by side
├── router_plane u_req_plane      request plane
│   ├── switch_vc  g_switch[0..1] one switch per VC
│   │   ├── circ_fifo  x5         7-slot circular input buffer per port
│   │   ├── ipm        x5         route computation and request
│   │   ├── crossbar              5x5 request/grant/flit steering
│   │   └── opm        x5         arbitration and packet lock per output
│   └── port_if    g_port[0..4]   Local, North, East, South, West
│       └── vc_ctrl               output-link VC flow control
│           ├── full_detector x2  credit counter per VC (lazy update)
│           ├── vc_timer      x2  forced credit check per VC
│           └── mutex2            arbitration between the two VCs
└── router_plane u_rsp_plane      response plane (identical)
```

`noc_pkg` holds the shared constants, the flit types and the XY routing
function. Every file begins with a comment describing its interface and
timing.

## A flit's path

Ports are numbered Local 0, North 1, East 2, South 3, West 4.

1. **Link in.** The upstream router toggles `in_req` with `in_data`. The
   data holds the flit plus a VC bit. `port_if` writes the flit into this
   port's buffer in the switch of that VC, and toggles `in_ack`. The
   receiver never refuses a flit, because the sender's credits guarantee a
   free slot.
2. **IPM.** The input port module takes the head flit and computes the
   output port with XY routing: X first, with east as +x and north as +y.
   It raises one request bit toward that output port module (OPM). The flit
   itself goes to all OPMs through the crossbar. The IPM holds the route
   until the tail flit passes, so body flits need no header.
3. **OPM.** The output port module arbitrates round-robin among the IPMs
   that request it. Once a head flit wins, the OPM stays locked to that IPM
   until the tail flit has passed (wormhole switching). It latches the flit
   and toggles its two-phase channel to the port interface. It takes the
   next flit only after that channel has been acknowledged.
4. **VC flow control (`vc_ctrl`).** A VC may compete for the link only when
   all three hold: its OPM channel has a flit waiting, its full detector
   reports credit, and the link is idle (`out_req == out_ack`). The mutex
   picks one VC and breaks ties alternately. The winner's flit goes out
   with its VC bit, `out_req` toggles, and the winner's OPM is acknowledged.
5. **Credit return.** Each flit that leaves an input buffer toggles that
   VC's `in_credit` wire back to the upstream router.

An idle plane takes 3 clock edges from an `in_req` transition to the
matching `out_req` transition: buffer write, OPM latch, link latch. A link
carries at most one flit per handshake round trip. Against a receiver that
acknowledges one cycle after it sees a request, that is one flit every 2
cycles.

## Credit rule in detail

`full_detector` keeps `credit`, which starts at 7, and `queued`. In each
cycle, the first matching rule applies:

| event in the cycle                          | result                                              |
|---------------------------------------------|-----------------------------------------------------|
| flit sent (`send`)                          | `credit += queued + inc - 1`, `queued = 0`           |
| `credit == 0` and timer pulse (`check`)     | `credit = queued + inc`, `queued = 0` (if non-zero) |
| credit return only (`inc`)                  | `queued += 1`                                        |

`valid` (credit available) is `credit != 0`. The check uses `credit` only,
not `credit + queued`. A VC with queued returns but zero credit therefore
stays blocked until its timer fires. The timer (`vc_timer`) runs only while
the VC is blocked and pulses every `TIMER_PERIOD` cycles (default 4).
Assertions check that no flit is sent without credit and that `credit +
queued` never exceeds the buffer depth.

## Interfaces of the top (`router_node`)

Every signal exists once per plane, with the prefix `req_` or `rsp_`. Arrays
are indexed by port.

| signal                       | dir | width     | meaning                                        |
|------------------------------|-----|-----------|------------------------------------------------|
| `clk`, `rst_n`               | in  | 1         | clock; active-low asynchronous reset           |
| `my_x`, `my_y`               | in  | 4         | this node's mesh coordinates                   |
| `*_in_req` / `*_in_ack`      | in/out | 5      | incoming links: two-phase request / acknowledge |
| `*_in_data`                  | in  | 5 x 35    | `{vc, head, tail, payload[31:0]}`              |
| `*_in_credit`                | out | 5 x 2     | credit returns to upstream, one wire per VC    |
| `*_out_req` / `*_out_ack`    | out/in | 5      | outgoing links                                 |
| `*_out_data`                 | out | 5 x 35    | as `in_data`                                   |
| `*_out_credit`               | in  | 5 x 2     | credit returns from downstream                 |

Flit format: bit 34 is the VC, bit 33 is head, bit 32 is tail, and bits 31:0
are the payload. A head flit carries its destination as `{dst_y, dst_x}` in
payload bits 7:0. A one-flit packet has both head and tail set. All
two-phase wires reset to 0, which means idle. A node connected to a
neighbour must start with 7 credits per VC for that neighbour. `vc_ctrl`
does this itself on reset.

## Parameters

| name           | default | where                      | origin                                    |
|----------------|---------|----------------------------|-------------------------------------------|
| `NUM_PORTS`    | 5       | `noc_pkg`                  | router as published                       |
| `NUM_VCS`      | 2       | `noc_pkg` (fixed in logic) | router as published                       |
| `BUF_DEPTH`    | 7       | `DEPTH` on the modules     | router as published                       |
| `DATA_W`       | 32      | `noc_pkg`                  | own choice                                |
| `COORD_W`      | 4       | `noc_pkg`                  | own choice (meshes up to 16x16)           |
| `TIMER_PERIOD` | 4       | `vc_timer`, `vc_ctrl`      | own choice; only "a fixed rate" is given  |

The switch modules take `NP` as a parameter. The port interfaces, the VC
bit and `mutex2` support exactly two VCs.

## Where this departs from the published router

* **Clocked, not self-timed.** The published router is built from
  hand-mapped gates: latches, C-elements, mutex cells and delay chains that
  meet one-sided timing constraints. Here every latch is a flip-flop, the
  mutex is a 2-input arbiter, and all handshakes are sampled on `clk`. The
  protocol and the structure match. The timing does not: latencies here are
  in cycles, and the published area, latency and power figures do not carry
  over.
* **Own choices where the description gives no detail:** XY routing,
  wormhole locking, round-robin OPM arbitration, alternating mutex
  priority, flit width and header layout, the VC bit on the link, credit
  returns as one transition per slot, the timer rate, and reset behaviour.
  The inside of the circular buffer is also unspecified; here it is a
  register array with wrapping pointers and a counter.
* **Not included:** the synchronizing wrapper used to validate the router
  against clocked test equipment, the terminal on the local port, and the
  7-port and 8-VC variants. The 7-port variant would need up/down ports and
  3D routing. The 8-VC variant would need eight switches, a wider VC field
  and an 8-way arbiter in `vc_ctrl`.

## Testbenches

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
`tb/plane_traffic.sv` is a non-synthesizable model of the five neighbours
of one plane. It is a source with credit counting, a 7-slot sink per output
VC that drains at a random rate, and a scoreboard. The scoreboard checks the
route, the VC, that each packet's flits are contiguous and in order, that
there is no overflow, exactly-once delivery and latency.

`tb_router_node` runs the whole node at its default size. It sends 60
packets per port on both planes, with random lengths of 2 to 6 flits,
random VCs and destinations spread evenly over a 5x5 mesh. Output drain
alternates between fast and slow. The test checks the 3-cycle idle
latency. It also counts each mechanism and fails if any of them never
happens: OPM contention, wormhole-lock stalls, VC mutex contention, credit
blocking, timer release, lazy credit folding, full input buffers, and both
planes busy at once. It takes about 1,700 cycles.

`tb_mesh2x2` connects four nodes in a 2x2 mesh on both planes. A
request/response terminal (`tb/mesh_terminal.sv`) sits on every local port.
Each terminal sends 25 requests to the other nodes over the request plane.
Every request it receives is answered with a 2-flit response over the
response plane. The test checks multi-hop XY routes and credit exchange
between real routers. It also checks that each request gets exactly one
response and that no flit reaches a link at the mesh edge.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    --top-module tb_router_node rtl/noc_pkg.sv tb/tb_router_node.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The same command with another `tb_<module>` runs any other test.
`tb_vc_ctrl` checks the one-flit-per-two-cycles link rate and the credit
accounting against a slow receiver. `tb_full_detector` compares the counter
with an independent model of the rule in the table above.

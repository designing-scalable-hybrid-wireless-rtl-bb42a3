# Hybrid wired/wireless reply network for a GPU

A GPU's network-on-chip carries very lopsided traffic. Dozens of shader cores
send short requests to a handful of memory controllers (MCs). The MCs send
back long replies, which are most of the bytes. Every reply starts at one of
the few MC nodes, so the mesh routers next to the MCs become hot spots. Far
destinations also cost many mesh hops.

This RTL adds a second layer to the reply network. Each MC gets a
wireless router as well as its wired one, and the wireless routers form a
small mesh of their own, with one node per MC. A reply for a far
destination jumps over the wireless layer to the MC node of the
destination's cluster, then finishes on the wired mesh. A reply for a near
destination stays on the wired mesh. Requests use a separate, ordinary wired
mesh.

Default configuration (SystemVerilog parameter defaults):

| item | value |
|---|---|
| wired meshes | 8 x 8 routers, one for requests, one for replies |
| clusters | 2 x 4 clusters of 4 x 2 routers, one MC per cluster |
| wireless mesh | 2 x 4 wireless routers, 20 directed links |
| flit / packet | 128-bit payload plus header side-band, 4 flits per packet |
| router | 5 ports, 2 VCs x 4 flits per port, X-Y routing, lookahead route |
| wired link | 1 cycle |
| wireless link | 9 cycles per flit (128 bit at 20 Gb/s, 1.4 GHz clock), not pipelined |
| bandwidth epoch | 50000 cycles, up to 3 borrower/lender pairs |

## Module map

```
hybrid_noc_top
├── wired_mesh  u_req_mesh          request network
├── wired_mesh  u_rep_mesh          wired layer of the reply network
│   ├── vc_router  (x64)
│   └── mesh_link  (one per mesh link)
├── wl_network  u_wl                wireless layer
│   ├── wl_router  (x8)  ── vc_router in wireless mode
│   ├── wl_channel (one per directed link: its private channel)
│   ├── token_mac  (one per channel)
│   └── bw_allocator
└── mc_ni  (x8)                     MC network interfaces
shared: hnoc_pkg (types, X-Y route function), flit_fifo, rr_arb
```

## Flits and routing

`hnoc_pkg::flit_t` holds the flit type (head, body, tail, head-tail), the VC,
a lookahead route, the destination node `(dst_x, dst_y)`, the destination
cluster `(dst_cx, dst_cy)` and 128 data bits. Every flit carries the header
fields, but routers read them only from head flits.

Routing is lookahead X-Y. A head flit arrives already carrying the output
port it must take at this router. While the flit crosses the switch, the
router computes the port for the next router and writes it into the flit.
Whoever injects a packet must therefore fill in the route for the first
router. `mc_ni` does this, and so do the testbenches for the request mesh.
Wired routers route on `(dst_x, dst_y)`. Wireless routers route on
`(dst_cx, dst_cy)`, and `mc_ni` fills these in.

## The router (`vc_router`)

Each input port has two VC buffers of four flits. Flow control is credit
based. A router holds one counter per downstream VC and returns a credit
upstream, as `{valid, vc}`, for each flit that leaves one of its buffers.

Timing of one wired hop:

1. At the clock edge the flit is written into its VC buffer.
2. In the next cycle, allocation and switch traversal happen together:
   - every input port picks one ready VC, round-robin;
   - every output port picks one input, round-robin;
   - a winning head flit takes the lowest free output VC that has a credit;
   - the winner leaves in the same cycle.
3. It reaches the link register at the next edge. The downstream buffer
   gets it one edge later.

So a hop costs 2 cycles. For an isolated packet, the head reaches the
destination's ejection port `2*hops + 1` cycles after injection (checked in
`tb_wired_mesh`). A VC stays allocated from head to tail (wormhole within a
VC).

`out_ready` lets an output refuse a flit, which a busy wireless channel
needs. `out_want` tells the MAC that a flit is waiting for a port. It does
not depend on `out_ready`, so there is no combinational loop.

## The wireless layer (`wl_network`)

**Links and channels.** Directed link `l = 4*r + (port-1)` leaves wireless
router `r` through a mesh port. Slots that would leave the mesh do not exist.
Each real link owns one channel (`wl_channel`). A channel is the digital
timing of the radio path:
- it accepts a flit only when idle;
- it is then busy for 9 cycles;
- the flit appears at the receiver on the 9th cycle.

That gives one flit per 9 cycles per channel, which is why borrowing matters.
The radio itself (oscillators, modulators, amplifiers, antennas) is not
modelled.

**Borrow from the rich (`bw_allocator`).**
- It counts the flits each link sends during an epoch.
- At the end of the epoch it runs up to 3 rounds. Each round pairs the
  busiest unpaired link with the least used unpaired link, if the first is
  strictly busier.
- The least used link's channel is then shared by both links.
- The scan visits one link per cycle, so a reallocation takes
  `2 * 3 * 32 = 192` cycles.

**Token MAC (`token_mac`).** The owner and the borrower of a shared channel
form a two-member token ring:
- The owner keeps the token while it has traffic.
- When the owner is quiet, the channel is free and the borrower has a flit
  waiting, the owner passes the token. The pass takes one cycle over the
  control network.
- The borrower sends one packet, or stops when it runs out of flits, and
  returns the token.
- A new pairing is taken over only while the owner holds the token.

**Two channels, one receiver.** A borrowing link sends on its private
channel when that is free, otherwise on the borrowed one.
- Every flit on a channel carries the tag of the link it belongs to.
- A receiver collects, from every channel, the flits tagged with its own
  link.
- A link starts at most one flit per cycle and all channels have the same
  latency, so a packet spread over both channels still arrives in order.

**W_th.** `wait_th` is the top's `w_th`, with 0 meaning off. A head flit
that has waited this many cycles at the front of a wireless buffer without
getting an output VC is sent out of the local port instead. The MC interface
then moves it to the wired mesh.

Receive-buffer credits go back over the control network with one cycle of
latency.

## The MC network interface (`mc_ni`)

For each reply packet, the interface decides on the head flit and keeps the
decision until the tail:

- **wired** if the X-Y hop count is below `hop_th`, or the destination is in
  the MC's own cluster, or the wireless injection queue holds more than
  `l_th` flits (buffer depth minus credits held);
- **wireless** otherwise, addressed to the destination's cluster.

Packets that come out of the wireless router are buffered per VC and
re-injected into the wired mesh. Packets never go from wired to wireless.
This rule keeps the two networks free of deadlock between them: a wired
packet can never wait on a wireless one.

On the wired local port:
- MC packets use VC 0;
- re-injected packets use VC 1;
- when both are ready, they alternate flit by flit.

The thresholds are inputs, so software can tune them at run time.

## Where this departs from, or goes beyond, the source design

The following are this implementation's own choices:

- **VCs and allocator.** The router has 2 VCs. The allocator is separable
  and round-robin, with allocation and traversal in one cycle.
- **Flow control.** Credit based.
- **Floorplan.** Clusters are 4 x 2 routers. MC positions: edge placement
  uses the outer column of each cluster, distributed placement (the default,
  `MC_PLACE = 1`) the column and row nearest the chip centre.
- **Token MAC.** The owner has priority, the token is passed only to a
  borrower with traffic, the borrower keeps it for one packet, and a token
  hop takes 1 cycle.
- **Allocator.** Pool size 3; usage is measured in flits sent; the scan is
  sequential.
- **Channel use.** A flit goes on the private channel first. The
  link-tag scheme on shared channels is also this design's own.
- **Admission control.** `mc_ni` always sends own-cluster destinations over
  the wired mesh, uses the VC split above, and reads the queue length from
  its credit count.
- **Threshold defaults.** There are none. `hop_th`, `l_th` and `w_th` are
  inputs. The testbenches use 4, 2 and 24.
- **Request network.** It is a plain copy of the wired mesh.
- **Not built.** The GPU cores, the memory controllers and the radio
  front-end. They sit outside the ports of `hybrid_noc_top`.
- **No power model.** The energy figures (0.5 pJ/bit transmit, 0.7 pJ/bit
  receive) have no counterpart in the RTL.
- **256-node network.** Not built at the defaults. Setting
  `MESH_X = MESH_Y = 16` builds the wired part, since coordinates are 4 bits,
  but the number of MCs and the wireless mesh size for that network are
  unknown.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_vc_router` | X-Y port choice, lookahead route, 1-cycle router latency, VC allocation under contention, credit stall and resume |
| `tb_wired_mesh` | 8x8 mesh: `2*hops+1` latency, random all-to-all traffic delivered intact |
| `tb_wl_channel` | 9-cycle latency, one flit per 9 cycles, tags |
| `tb_token_mac` | owner priority, pass and return timing, one packet per visit, exclusive grants |
| `tb_bw_allocator` | correct pairs from known usage, no pair when usage is equal, reallocation time |
| `tb_wl_router` | cluster routing, private/borrowed channel steering, W_th ejection |
| `tb_wl_network` | 4-hop latency `10*hops+1`, borrowing halves the time of a one-link burst (about 435 to 228 cycles), W_th under contention |
| `tb_mc_ni` | the three admission rules, routes and VCs, re-injection with credits |
| `tb_hybrid_noc_top` | whole design with a 1500-cycle epoch: MC replies and core requests, every packet delivered intact; counts each mechanism (near-wired, wireless, L_th, W_th, re-injection, reallocation, token pass, borrowed flit) and fails if any never happened or if the network has not drained 4000 cycles after the traffic stops |
| `tb_hybrid_noc_full` | the same traffic with every parameter at its default, for 52000 cycles: the first 50000-cycle epoch ends inside the run, so it also shows one reallocation and borrowing after it |

The top-level testbenches share their traffic and checks through
`tb/tb_top_body.svh`.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hnoc_pkg.sv tb/tb_hybrid_noc_top.sv \
          --top-module tb_hybrid_noc_top -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. Files are one module per
file, named after the module. Building the full design takes a few minutes
of C++ compilation.

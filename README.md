# BMNoC: a bus-and-mesh network-on-chip with packet priority control

Most traffic in a many-core chip is between a few cores that work closely
together. The BusMesh NoC (BMNoC) exploits that. Cores that talk a lot are
grouped into a **cluster node (CN)** and share a plain local bus. A word from
one core to another in the same CN crosses that bus directly, with no
packetizing and no router. Only traffic between CNs becomes packets in a
wormhole mesh of **mesh routers (MRs)**. Each MR serves several CNs as well
as its mesh neighbours.

The routers add **packet transmission priority control (PTPCM)**. A packet
that has already started through a router's crossbar and is then blocked
downstream gets a priority flag. When space frees up, it finishes ahead of
packets that have not started yet. Without the flag, plain round-robin
arbitration lets a half-sent packet sit in buffers along its whole path while
other packets take turns. The flag needs no extra buffer, only one bit per
arbiter input.

This repository holds synthesizable SystemVerilog for the whole network:
- the routers;
- the local bus;
- the network interface;
- the cluster node;
- a top level with the configuration evaluated for this architecture.

That configuration is a **(4,2)-BMNoC**: four cores per CN and two CNs per
MR. With a 2x2 mesh that makes 4 MRs, 8 CNs and 32 cores. The cores are not
part of the design. Their bus ports are the ports of the top level.

```
             core core core core        core core core core
               |    |    |    |           |    |    |    |
             ==+====+====+====+==+=     ==+====+====+====+==+=   local bus (CN)
                                 NI                         NI
                                  \                        /
                                   `-------[ MR 2 ]-------'  ---- E ----  [ MR 3 ]
                                              |                             |
                                              N/S                           N/S
                                              |                             |
                                           [ MR 0 ] -------- E/W -------- [ MR 1 ]
```

## Addresses, packets and flits

Every CN has an 8-bit address with three fields, most significant first:
- **MRid**: 3 bits;
- **ESid**: 3 bits;
- **CNid**: 2 bits.

ESid serves the hierarchical variant, which puts a level of edge switches
(ESes) between CNs and MRs. By default the top level has no edge switches, so
ESid is always 0. CN number `c` sits on local port `c % 2` of MR `c / 2`, and
its address is `{MRid = c/2, ESid = 0, CNid = c%2}`. MR `m` sits at column
`m % MESH_X` and row `m / MESH_X`.

Setting `ES_PER_MR` to a value above 0 builds the edge-switch level:
- every MR gets `ES_PER_MR` local ports, each leading to an ES;
- the MR's CNs are split evenly over its ESes;
- CN `l` of ES `e` of MR `m` has the address `{m, e, l}`;
- an MR then sends a packet for its own MRid to the local port given by the
  ESid (route parameter `LOCAL_BY_ES`).

`ES_PER_MR = 1` with the other defaults is the (4,2,1) configuration: 4 cores
per CN, 2 CNs per ES and 1 ES per MR. Traffic between the two CNs of an ES
turns round in the ES and never reaches the MR.

A flit is 34 bits: a 2-bit **DataType** and 32 bits of data. The DataType
codes are:

| code | meaning |
|------|---------|
| `01` | head flit |
| `10` | tail flit |
| `00` | body flit |
| `11` | single-flit packet (accepted, never generated) |

A packet is at most 8 flits: one head flit and up to 7 data words. The head
flit's 32 data bits are the header `hdr_t`, packed from the most significant
bit:

| field | bits | meaning |
|-------|------|---------|
| `dst` | 8 | destination CN address |
| `src` | 8 | source CN address |
| `flag` | 8 | bit 7 is SPB, the service priority bit; bits 6:0 are PktId, a sequence number |
| `dst_core` | 4 | core on the destination CN's bus |
| `src_core` | 4 | core that sent it |

The routers use `dst` only. SPB and PktId are carried end to end, but nothing
in the hardware acts on them. There is no CRC field.

The same `hdr_t` is what a core puts on its local bus in the address phase of
a transfer. A transfer and a packet therefore carry the same header, which
makes the network interface simple.

All of these types live in `bmnoc_pkg`.

## Cluster node: local bus and network interface

`bmnoc_cluster_node` joins a `bmnoc_local_bus` and a `bmnoc_ni`. The bus has
K+1 masters and K+1 slaves. Numbers 0..K-1 are the cores and number K is the
NI. A transfer is a header followed by 1 to 7 words.

**Bus timing.** An idle bus sees a request in cycle t. It arbitrates in round
robin during t, grants at t+1 and drives the address phase at t+2. Data words
follow one per cycle from t+3. That gives two cycles from request to address
and three from request to the first data word.

**Bus decode.** A header whose `dst` equals this CN's address goes to core
`dst_core`. If that core does not exist, the transfer is discarded. Any other
`dst` goes to the NI.

**Bus handshake.** Slaves never stall. Cores are assumed always ready. The
NI raises `can_accept` while its transmit FIFO has room for a whole packet,
and a transfer bound for the NI only enters arbitration while `can_accept` is
high. A master holds `m_req` and `m_hdr` from its request to its last word,
and moves to the next data word on each `m_beat`.

**NI transmit side.** The NI turns each transfer into a packet:
- the header becomes the head flit;
- each word becomes a body flit;
- the last word becomes the tail flit.

The flits wait in a 16-flit FIFO. A new packet claims the router's input VC
only once all its credits are back, which means the router's buffer for that
VC is empty. The packet holds that VC until its tail is sent. Every flit also
needs a credit.

**NI receive side.** Flits from the router are kept in one 8-flit FIFO per
VC, and a credit goes back for every flit removed. When a VC holds a complete
packet, the NI requests the bus as master K and streams the packet to the
named core. A bus transfer from the NI therefore never waits on the network.

## Router

`bmnoc_router` is an input-buffered wormhole router with virtual channels
(VCs). The top level uses it with six ports:
- ports 0, 1, 2, 3 go to the neighbours N, E, S and W;
- ports 4 and 5 go to the two CNs.

Each input port has `NVC = 2` VCs. Each VC is an 8-flit FIFO with its own
small state machine:

1. **Route.** When a head flit reaches the front of its FIFO, `bmnoc_route`
   finds the output port from `dst`. A mesh router looks the destination
   MRid up in a route table that is filled at elaboration with X-then-Y
   routes. A packet for the router's own MRid goes to the local port given
   by CNid. An address that names no node makes the VC discard the packet.
2. **VC allocation.** The VC then asks its output port for an output VC.
   Each output grants one request per cycle, in round robin, and gives the
   lowest-numbered VC that no packet holds.
3. **Crossbar allocation.** Each flit of the packet then competes for the
   output link in that port's `bmnoc_ptpcm_arb`. The arbiter has one input
   per input VC, 12 in all. A flit is eligible only if its output VC has a
   credit.
4. **Output register.** The winning flit is registered and appears on the
   link in the next cycle. The tail flit frees the output VC and returns the
   input VC to idle.

**Credits.** Each output VC has a credit counter. It starts at the
downstream buffer depth, goes down for every flit sent, and goes up for every
credit pulse that comes back. Every flit popped from an input FIFO sends a
pulse upstream one cycle later.

**Latency.** A head flit that arrives in cycle t is written into its FIFO at
t+1 and leaves on the output wires at t+5. That is four cycles of header
processing plus one across the wires, with `HDR_CYCLES = 4`. Raising
`HDR_CYCLES` adds wait cycles between route computation and VC allocation.
Body flits follow one per cycle.

An output VC is handed to a new packet as soon as the previous packet's tail
has been *sent*. The new head may then sit in the same downstream FIFO behind
that tail. This keeps links busy, and it is what lets a packet be blocked in
mid-flight, the case the priority control exists for.

**Edge-switch role.** `ROLE = ROLE_ES` turns the same router into an edge
switch. It compares MRid and ESid of `dst` with its own. On a match the
packet goes to port 1 + CNid; otherwise it goes to port 0, the uplink to the
MR. The top level uses this role when `ES_PER_MR > 0`.

## Packet transmission priority control

This is the least obvious part of the design. It lives in `bmnoc_ptpcm_arb`,
one instance per output port. Each arbiter input `i` (an input VC) provides
four signals:

| input | meaning |
|-------|---------|
| `req[i]` | it has a flit for this output |
| `ready[i]` | its output VC has a credit, so the buffer downstream is not full |
| `mid[i]` | its packet's head has already gone through the crossbar |
| `tail[i]` | the flit it offers is the tail |

The arbiter keeps a round-robin pointer and one flag per input. The rules
are:
- **Blocked:** `req & ~ready & mid`. A packet already part-way across is held
  up by a full buffer. Its flag is set.
- **Flagged inputs win.** If any flagged input is eligible (`req & ready`),
  only flagged eligible inputs take part, in round robin among themselves.
  Otherwise all eligible inputs take part in plain round robin. While a
  flagged packet is still blocked, the other packets keep flowing.
- **Clear.** A flag clears when that input's tail flit is granted, and the
  input goes back to round robin.
- **Switched off.** `PTPCM = 0` keeps the flags clear, which gives a plain
  round-robin arbiter. That is useful for comparisons.

A small example:
1. Inputs 1, 2 and 4 share an output.
2. Input 2's packet is mid-way and its VC runs out of credits. Its flag is
   set, and inputs 1 and 4 alternate.
3. Input 2 gets a credit back. It is granted first, ahead of whichever of 1
   and 4 round robin would have picked, and keeps the output until its tail.
4. The flag then clears and round robin resumes where the pointer was.

`tb_bmnoc_ptpcm_arb` runs exactly this case. It also runs 3000 random cycles
against a reference model, with the control on and off.

Output VCs bind a packet to one VC downstream, so two packets on the two VCs
of one link can interleave flit by flit. The flag therefore matters whenever
one of them stalls.

## Top level

`bmnoc_top` builds a `MESH_X` x `MESH_Y` mesh of routers with `CN_PER_MR`
cluster nodes on each.

Neighbouring routers are connected port to opposite port. At the edge of the
mesh, the unused ports get no flits and no credits, and X-then-Y routing
never selects them.

The core ports are flat arrays indexed by core number `c*K + j`, where `c` is
the CN and `j` the core within it. Each core has its own master signals and
its own slave strobes `core_rx_hdr_valid` and `core_rx_valid`. The slave
header, data and last signals are shared by the cores of a CN
(`cn_rx_hdr[c]`, `cn_rx_data[c]` and `cn_rx_last[c]`), as on a real bus.

With the defaults, a 4-word transfer from core 0 to core 29 takes 33 cycles
from the request to the last word arriving. It crosses two mesh hops, so
three routers. The derivation is in `tb_bmnoc_top`.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 2, 2 | top, router, route | mesh size; at most 8 MRs fit the 3-bit MRid |
| `CN_PER_MR` / `N_LOCAL` | 2 | top / router | CNs per mesh router |
| `K` | 4 | top, CN, bus | cores per CN; at most 16 fit the 4-bit core number |
| `NVC` | 2 | top, router, NI | virtual channels per link |
| `BUF_DEPTH` | 8 | top, router, NI | flits per VC buffer |
| `HDR_CYCLES` | 4 | top, router | header processing cycles, at least 3 |
| `PTPCM` | 1 | top, router, arbiter | priority control on or off |

## What follows the architecture and what was chosen here

Taken from the architecture:
- the two-level structure of cores on a bus in CNs and CNs on a mesh of
  routers;
- the CN address fields and their widths;
- the 34-bit flit and its DataType codes;
- packets of 8 flits;
- 8-flit buffers;
- the five-cycle router (four header cycles plus one on the wires);
- the bus's two cycles to address and three to data;
- routing on DstAddr alone, with a route table in mesh routers and an
  MRid/ESid compare in edge switches;
- hop-to-hop credit flow control;
- a VC router with route computation, VC allocator and priority-controlled
  crossbar allocator;
- the priority control rules;
- the (4,2) configuration.

Chosen here, because the architecture leaves them open:
- **Routing.** The architecture calls its routing partially adaptive but
  gives no rule. This design uses deterministic X-then-Y routes, so packets
  never overtake each other and PktId is not needed for reordering.
- **Router organisation.** The earlier description of the routers speaks of
  output queuing. This design follows the later router organisation with VC
  input buffers.
- **VCs and crossbar.** Two VCs, a crossbar input per VC, and round-robin VC
  allocation.
- **Arbiter type.** The router's block diagram calls its arbiter a priority
  matrix arbiter, while the arbitration is described as round robin with
  priority rules on top. This design implements a round-robin pointer plus
  the priority flags. A matrix arbiter would serve the least recently granted
  input instead, which is close to round robin but not identical.
- **Clearing the priority flag.** It clears when the tail passes this
  router's crossbar, not when the tail reaches the destination, which a
  router cannot see.
- **Core numbers.** They are carried in the header. The architecture
  addresses only CNs.
- **Bus protocol.** The signal-level protocol, round-robin bus arbitration,
  and slaves that never stall.
- **NI internals.** Its FIFO sizes, `can_accept`, whole-packet delivery, and
  waiting for a fully drained VC before starting a packet.
- **Invalid addresses.** Packets to nonexistent nodes are discarded.
- **Reset.** Synchronous, active low (`rst_n`).

Not built:
- the cores;
- the service difference between guaranteed-throughput and best-effort
  packets that SPB would select;
- CRC.

A 3x3 mesh (9 MRs, 18 CNs), which a 72-task application would need, does not
fit the 3-bit MRid.

## Testbenches

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it with a
failure if it hangs.

| testbench | what it checks |
|---|---|
| `tb_bmnoc_route` | every address against an independent X-then-Y model, for two mesh routers and an edge switch |
| `tb_bmnoc_ptpcm_arb` | the blocked-port example above; random cycles against a reference model, with PTPCM on and off |
| `tb_bmnoc_router` | the 5-cycle head latency and back-to-back body flits; 240 random packets from all six inputs into stalling downstream models; routes, order, integrity and no buffer overflow; requires both VCs of a link to be held and priority flags to be raised |
| `tb_bmnoc_local_bus` | 2 cycles to address and 3 to data; decode to cores, to the NI and to nowhere; no transfer to the NI while `can_accept` is low |
| `tb_bmnoc_ni` | packetizing and unpacking in both directions, with interleaved VCs, credits and stalls; requires `can_accept` back-pressure and credit waits |
| `tb_bmnoc_cluster_node` | local and outgoing transfers from four cores plus incoming packets, through bus and NI together |
| `tb_bmnoc_es_router` | the router as an edge switch (uplink plus two CN ports): latency, routing by MRid/ESid compare, integrity, no overflow, priority flags |
| `tb_bmnoc_top` | the full 32-core network at default parameters |
| `tb_bmnoc_top_es` | the (4,2,1) network with edge switches (`ES_PER_MR = 1`) under synthetic traffic. Every delivery is checked. It requires packets that turn round inside an ES, packets up to and down from the MRs, and mesh hops |
| `tb_bmnoc_ptpcm_compare` | two full networks, priority control on and off, under identical traffic; every delivery checked; average and worst latency printed |

`tb_bmnoc_top` runs in two phases. First it sends one packet alone and checks
the 33-cycle delivery. Then all 32 cores send random transfers, and a final
hot-spot phase has every core send to one CN. Every transfer must arrive once
and intact. The test also counts each mechanism and fails if any of them never
happens:
- local transfers;
- remote packets;
- two-hop packets;
- NI refusals;
- NI credit waits;
- router outputs out of credits;
- both VCs of a mesh link in use;
- priority flags.

`tb_bmnoc_ptpcm_compare` drives both networks through
`tb_bmnoc_traffic_agent`. The agent derives every transfer from a hash of a
seed, the core number and the transfer number rather than from a random
generator, so both networks see the same traffic. Each core sends 24
transfers back to back, and 40 % of them go to one hot CN. Under that load
the two networks deliver in about the same average time, roughly 250 cycles
per transfer. The bottleneck is the hot CN's bus, not the routers. The worst
case is a little better with the control on: 2592 against 2722 cycles. The
test reports these numbers but does not require either network to win.

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bmnoc_pkg.sv \
    tb/tb_bmnoc_top.sv --top-module tb_bmnoc_top -Mdir obj_top
./obj_top/Vtb_bmnoc_top
```

Replace `tb_bmnoc_top` with any other testbench name. The other modules are
found in `rtl/` by file name.

# Level-1 dual-ring multimedia network node

This is synthesizable SystemVerilog for one access point of a 100 Mb/s
dual-ring local network built for multimedia traffic. The network is the
level-1 tier of CUM LAUDE NET, a hierarchical network. The access point has
three parts:

- a **router** that sits on two counter-rotating rings (A and B);
- a **hub** hanging off the router;
- up to **16 host interface cards** on the hub.

Fixed-size packets travel the rings one byte per clock. Access to a ring is
shared fairly by a control packet that circulates once per *cycle*. Each
router may append a limited number of packets behind it (the ACTA scheme:
Adaptive Cycle Tunable Access). One router on each ring is the *head of
bus*. It removes packets that have gone all the way round, counts them, and
uses that load to size the next cycle. Hosts share the router through the
hub: downstream the hub broadcasts everything, and upstream it polls the
cards one at a time.

The top module is `clnet_node`. Chain instances ring-to-ring to build a
network, or loop a node's outputs back to its inputs to test it alone.

## Bytes and packets

Every link carries 9-bit bytes. Bit 8 separates data (1) from *access
control bytes* (0).

A router access control byte holds these bits (8 down to 0):

| bit | name | meaning |
|-----|------|---------|
| 8 | DT | 0 = control byte |
| 7 | PS | 1 = header, 0 = trailer |
| 6 | HUB | 0 = router byte |
| 5 | CS | cycle start: marks a control packet |
| 4 | SO | slot occupied: a data packet |
| 3 | IP | 1 = IP destination, 0 = VCI destination |
| 2 | NM | network management |
| 1 | | priority: 1 = reserved service (this design's use of a spare bit) |
| 0 | | unused |

A hub command byte holds DT=0 in bit 8 and HUB=1 in bit 6. Bits 5:4 are the
command: 00 poll, 01 force release of all cards, 11 allow. Bits 3:0 are the
polled address.

A data packet is 582 bytes:

- 1 header byte;
- 4 destination bytes, either an IPv4 address or a 24-bit VCI (virtual
  channel identifier, used for multicast) in the first three bytes;
- a 576-byte IP datagram;
- 1 trailer byte.

The control packet is 6 bytes:

- 1 header byte with CS set;
- 2 bytes: unreserved slots left, N_u;
- 2 bytes: reserved slots left, N_r;
- 1 trailer byte.

Both counts are sent most-significant byte first. `clnet_pkg` holds these
types, along with helper functions that classify bytes.

## Ring engine (`ring_channel`)

The heart of the design. There is one ring engine per ring. It reads the
ring's receive FIFO and writes the ring's transmit FIFO. It can also write
the local output queue towards the hub and read the local input queue from
the hub.

**Routing** looks only at the header and the destination.

- An IP destination matches when it falls in the router's subnet
  (`my_ip` under `ip_mask`).
- A VCI destination matches when the CAM holds it.

The five header bytes are then replayed, and the rest of the packet streams
through until the trailer. A matching packet is written to the ring and the
local queue at the same time: it is forwarded and copied. A multicast packet
therefore reaches every router on the ring that subscribed. If the local
queue is more than half full, the packet is still forwarded but is not
copied; this is counted as `local_drop`. Network-management packets (NM
set) that match go to a separate per-ring management queue for the
router's control processor (`mgmt_rd` / `mgmt_data` / `mgmt_empty`),
never to the hub.

**Insertion.** When the control packet arrives, the engine holds it back. It
then appends whole packets from its local input queue. Packets are taken in
order, as long as two conditions hold for the packet's priority level:

- the control packet still offers slots at that level (N > 0);
- this router has sent fewer than its quota (`nq_unres` / `nq_res`) at that
  level in this cycle.

The engine then releases the control packet with each count reduced by the
number sent. Anything behind the control packet on the ring waits meanwhile.
A router's packets therefore always sit right after the control packet it
released. Only whole packets are inserted: the local accessing module counts
trailers, and the engine waits for a complete packet.

**Head of bus** (`is_head`). At the head, arriving packets are erased
instead of forwarded. They are still copied locally if they match. Occupied
slots are counted per level. When the control packet comes back, the cycle
is over, and the head opens the next one with:

- `N_r = n_res_cycle`;
- `N_u = min(occupied unreserved slots + cycle_min, cycle_max)`.

A busy ring therefore gets longer cycles and an idle ring short ones. The
head then inserts its own packets like any other router and sends the
control packet on.

The head must fit its whole quota in its own receive FIFO. Nothing else
moves while it inserts, so its first packets come back round before it has
finished. With 582-byte packets and 2048-word FIFOs, the head's
`nq_unres + nq_res` must be 3 or less. Other routers have no such limit.

**Lost control packet.** If a link is rewired while the control packet is
in flight, the control packet can be cut in half. Without recovery the ring
would stop for good. Two measures prevent this:

- a header byte arriving where packet bytes were expected restarts parsing
  at that header;
- a head that has not seen its control packet return for `cp_timeout`
  clocks opens a fresh cycle. Set `cp_timeout` well above the longest cycle
  (about `N × 588` clocks plus the ring latency); 0 turns the timeout off.

Both measures are this design's additions.

**Timing.** The engine moves one byte per clock. A routed packet costs six
extra clocks: one for the address decision and five to replay the header.
A 582-byte packet therefore takes 588 clocks. To keep up with a link, the
clock must run at least 1.1 % faster than the link's byte rate: 12.63 MHz
for 100 Mb/s of data. In practice the engine clock comes from a faster
local oscillator.

Each engine keeps event counters (`ring_stats_t`):

- forwarded, copied, local drops and erased packets;
- inserted packets and released control packets;
- turns ended by the quota and turns ended by running out of slots;
- cycles opened, and cycles reopened after a loss;
- management packets delivered to the processor.

## Router (`router`, `ring_controller`)

`router` follows the third and final generation of the router hardware. For
each ring it has:

- a **transceiver module** (`xcvr_module`): receive and transmit FIFOs
  behind the serial TAXI chips;
- a **local accessing module** (`local_access`): the input and output
  queues to the hub.

Both rings share one **ring controller** (`ring_controller`). It contains:

- the two ring engines;
- a 256 × 48-bit **CAM** (`cam`), searched by both engines at once, with
  key = `{24'b0, VCI}`;
- the **wrap crossbar** for fault tolerance.

When a link or a neighbour fails, the controller sets `wrap_b_to_a`.
Everything arriving on B IN, plus ring B's insertions, then leaves on
A OUT, so the two rings join into one loop. `wrap_a_to_b` is the mirror
case. The engine whose transmitter has been taken over is held until the
wrap is removed. A cut link is handled by the two routers at its ends. A
dead router is handled the same way by its two neighbours: one wraps
A IN onto B OUT, the other B IN onto A OUT. Exactly one engine on the
resulting loop must stay head of bus. Deciding when to wrap (fault
detection) is left to the controlling processor; the `xcvr_status` and
error counters are what it has to go on.

In the original router, a control processor (a DSP) reads each header and
starts a DMA to the trailer. Here that per-packet work is done by logic. The
processor's configuration and status registers are ports: quotas, head
flag, subnet, cycle limits, CAM load port, wrap controls, FIFO flags and
counters.

All FIFOs (`sync_fifo`) are 9 bits wide and first-word-fall-through. Their
flags are empty, half full (more than half) and full. The depth is 2048
words, which holds three packets.

## Hub (`hub`) and polling

**Downstream**, the hub broadcasts both rings' local output queues on one
downlink. It alternates between them one whole packet at a time. Hub
commands can be slipped between any two bytes, even in the middle of a
packet.

**Upstream**, only one card may talk at a time. For host X the hub runs
this sequence:

1. It sends *poll X*.
2. Card X turns its transmitter on and sends SYNC.
3. The hub answers *allow X*.
4. The card sends one packet.
5. On the packet's trailer, the hub sends *force release* and moves to
   host X+1.

The packet goes into ring A's input queue, or ring B's if bit X of
`up_ring_b` is set. Other rules:

- A card with nothing to send stays silent. After `POLL_TIMEOUT` (16)
  clocks the hub releases it and moves on.
- If a packet has no trailer within `RECV_TIMEOUT` (4096) clocks, it is
  given up.
- A host is polled only if its bit in `poll_enable` is set and the target
  input queue is at most half full.

The timeouts and both masks are this design's choices.

**Choosing the ring.** A packet travels from the router that inserts it
to the head of bus, where it is erased. It therefore reaches only the
routers between those two points. On ring A, that means the routers
downstream of the sender and upstream of the head; ring B covers the rest.
The hub picks the ring per host (`up_ring_b`), not per packet. A host
whose destinations lie on both sides needs its bit changed between
packets, or its packets must go to the ring that reaches them. The
exception is multicast: with `mc_both` set, the hub writes every packet
with a VCI destination into both rings' input queues at the same time.
The two copies then cover both sides of the sender, and the head's own
hosts receive the packet once from each ring. Whether a group has members
on both sides is known to the network manager, not to the hub, so
`mc_both` is a configuration input and applies to all VCIs. When the
rings are wrapped into one loop after a fault, the head's router lies on
the loop twice. A packet for that router's own hosts can then be copied
by both of its engines.

## Host interface card (`nic`)

The card keeps:

- packets for its own IP address (`my_ip`);
- packets for any of the `NVCI` (4) VCIs the host loaded into it.

It strips header, destination and trailer, and hands the host the bare
datagram:

- bit 8 of `host_rx_data` marks the last byte;
- `irq` pulses once per datagram.

A packet that finds the receive FIFO over half full is dropped and counted.
The host writes whole packets (header to trailer) into the transmit FIFO.
The card sends one packet each time it is polled and allowed.

## Top (`clnet_node`)

`clnet_node` wires one router, one hub and `NHOSTS` (16) cards together.
Card *i* answers polling address *i*. The cards share the uplink as a wired
OR gated by each card's transmitter enable, and an assertion checks that at
most one is on. Three groups of signals are ports:

- the parallel sides of the four TAXI chips: `taxi_rx_*` / `taxi_tx_*`,
  index 0 = ring A;
- the router's and hub's configuration;
- every host's side of its card.

`ring_stats` carries `ring_stats_t` as a plain 176-bit vector (eleven 16-bit counters).

To build a ring, connect ring A OUT of each node to ring A IN of the next,
and ring B in the opposite direction. Exactly one node per ring has
`is_head` set.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| sync_fifo | WIDTH / DEPTH | 9 / 2048 | width from the original; depth chosen |
| cam | ENTRIES / WIDTH | 256 / 48 | original |
| cam | NSRCH | 2 | one search port per ring, chosen |
| hub | NHOSTS | 16 | original (4-bit polling address) |
| hub | POLL_TIMEOUT / RECV_TIMEOUT | 16 / 4096 | chosen |
| nic | TX_DEPTH / RX_DEPTH / NVCI | 2048 / 2048 / 4 | chosen |
| clnet_node | NHOSTS / DEPTH / CAM_ENTRIES / NVCI | 16 / 2048 / 256 / 4 | as above |

Run-time settings (ports): `nq_unres`, `nq_res`, `n_res_cycle`,
`cycle_min`, `cycle_max`, `cp_timeout`, `my_ip`, `ip_mask`, `is_head`,
`wrap_*`, `poll_enable`, `up_ring_b`, `mc_both`.

## Where this design departs from the original, or fills gaps

- The next-cycle rule, the control packet's byte layout, and the priority
  bit are this design's choices. The original says only that the occupied
  count predicts the load and sets the cycle length.
- Routing and streaming are done by logic, not processor firmware. The
  processor's registers are ports.
- FIFO depth, the hub's timeouts and masks, the card's host interface and
  VCI table, and the drop rules are this design's choices.
- ACTA is usually explained with empty fixed-size slots that the head
  sends round and routers fill. The network's implementation replaces
  the slots with counts in the control packet. This design follows the
  implementation: no empty slots travel.
- The lost-control-packet recovery is an addition.
- The router compares an IP destination with its subnet under `ip_mask`,
  so one compare covers all its hosts. The original describes a direct
  compare with the address, which is the case `ip_mask = 32'hFFFFFFFF`.
- The card interrupts the host once per received datagram. The original
  card interrupts the host periodically. A host that wants periodic service
  can poll `irq` on its own timer.
- The original router has one CAM on a shared bus, serving both rings in
  turn. Here the CAM has two search ports, so the rings never wait for each
  other.
- The management queue is this design's way of handing network-management
  packets to the processor. The original only says such packets are for
  the routers, not the hub, and does not say what the processor does with
  them.
- Only the third router generation is built. The first two were PC-driven
  prototypes of the same data path.

## Not included

- The TAXI serial transmitter and receiver: vendor chips with analog
  serialisers. Their byte interfaces are ports.
- The router's DSP and its firmware.
- The host PCs.
- The higher, gigabit level of the network hierarchy and its gateways.

## Testbenches

Each file in `tb/` is self-checking. It ends with a `TB_RESULT checks=…
failures=…` line and has a watchdog. The shared helpers are in
`tb/clnet_tb_pkg.sv`: packet and control-packet builders.

| testbench | what it checks |
|-----------|----------------|
| tb_sync_fifo | random traffic against a queue model; flag thresholds |
| tb_cam | writes, masked search, valid bit, lowest-index priority |
| tb_xcvr_module | violation and sync filtering, overrun count, transmitter handshake |
| tb_local_access | whole-packet counting with random fill and drain |
| tb_ring_channel | the 588-clock packet time, and the two-node insertion sequence: the upstream node sends up to its quota, the next node forwards and then sends what slots remain. Also priority levels, local drop, management packets, erasure and the cycle-length rule at the head |
| tb_ring_controller | both engines with the shared CAM, multicast, and both wrap directions |
| tb_router | one router looped back on both rings: IP packets on A, multicast on B, violation drops, wrap of B onto A, and a throughput loopback on both rings at once: three packets per ring circulate through a non-head router and each link must stay at least 98 % busy (measured 98.6 % on each); a management packet reaching the management queue |
| tb_hub | polling order, SYNC/allow/release, timeouts, ring selection, commands inside packets, multicast packets on both rings |
| tb_nic | address filter, datagram stripping, last-byte flag, irq, drop, the polled transmit sequence |
| tb_ring3 | three routers built into a dual ring, head of bus at node 0: unicast and multicast on both rings, then a cut between nodes 1 and 2 with both neighbours wrapping into one loop, then a failed router (node 1) that nodes 0 and 2 wrap around |
| tb_clnet_node | the whole node at default sizes, in three phases (below) |

The phases of `tb_clnet_node`, with both rings looped back:

1. **IP, multicast and priority traffic** between hosts. Then, with
   `mc_both` set, a multicast packet goes out on both rings and its
   members receive one copy from each.
2. **Stall:** a held transmitter makes packets pile up, which then drain
   under the quota across growing cycles.
3. **Link fault:** the link is cut and ring B is wrapped onto ring A. The
   cut destroys the control packet, and the head replaces it.

It counts each mechanism and fails if one never happens: poll timeouts,
grants, insertion, erasure, copying, quota stops, cycle growth, stall,
multicast, multicast on both rings, wrapped delivery, and control-packet replacement.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/clnet_pkg.sv tb/clnet_tb_pkg.sv tb/tb_clnet_node.sv \
    --top-module tb_clnet_node -Mdir obj_tb
./obj_tb/Vtb_clnet_node
```

Replace the testbench name to run any of the others.

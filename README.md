# Network interface for a two-level WDM packet network

This is the logic of a network interface card (NI) for a hierarchical
wavelength-division-multiplexed (WDM) optical network. Nodes are grouped into
clusters. Each hierarchy level, cluster-local (level 0) and cluster-to-cluster
(level 1), owns a share of the C optical wavelengths. The split is set by a
*partition point* x1: level 0 uses wavelengths 0..x1-1, and level 1 uses x1..C-1.

On each level the nodes share their wavelengths with a collision-free,
reservation-based media access protocol. There is no dedicated control channel:
- Short *control packets* are broadcast on every wavelength of the level, one
  slot per node.
- Some control packets are *reservations*. From the reservations, every node
  independently works out the same schedule for the *data cycle* that follows,
  which carries large data packets.
- Each data packet travels on one wavelength. The transmitter is a fast laser
  array. The receiver tunes slowly and is pointed, slot by slot, at the wavelength
  that will carry its packet.

A distributed clock per level keeps the slots aligned across nodes. If the node
that keeps this clock fails, another node takes over.

The card has three parts, clocked independently and joined by FIFOs:

```
 host (PCI bridge local bus)                                    optics / SerDes
        |                                                              |
 host_if_ctrl --4 FIFOs--> marc ---- 1 FIFO per level and direction ---- phy_if_ctrl
  (host_clk)  <-2 FIFOs--  (marc_clk)                                    (phy_clk)
                            |- level_mac (level 0): level_sync, resv_unit
                            |- level_mac (level 1): level_sync, resv_unit
                            |- traffic_monitor, partition-point register x1
```

`ni_top` instantiates all of it. The commercial parts are outside the RTL: the PCI
bridge, the 8B/10B encoder/decoder, the serialiser/deserialiser, the laser array,
the tunable receiver and the wavelength partitioner. Their signals are ports of
`ni_top`.

## Default configuration

| item | value |
|---|---|
| hierarchy levels | 2 |
| wavelengths C | 4, split 2 + 2 at reset (x1 = 2) |
| nodes per level | up to 16 (`MAX_NODES`) |
| word | 32 bits |
| control packet | 16 words (64 bytes) |
| data packet | 2048 words (8 Kbytes) |
| guard time per slot | 16 word times (`GUARD`) |
| line rate | one word per `phy_clk` per level; 26.5625 MHz gives 850 Mb/s, the 8B/10B payload rate of a 1.0625 Gb/s link |

All of these are parameters of `ni_top`, or constants in `ni_pkg`.

## Packet formats

Every packet begins with a header word:

```
 31      24 23      16 15       8 7        0
 |  level  |   type   |   dest   |  sender  |
```

Type codes: 1 clock, 2 control (host payload), 3 reservation, 4 data,
5 probe. On the line every packet has its full fixed size. Words the MAC
generates itself are zero-padded.

| packet | contents after the header |
|---|---|
| clock | word 1: `{transmit_time[31:16], propagation_delay[15:0]}` |
| reservation | `dest` is the node the data packet will go to |
| control | the host's words 1..15 |
| data | the host's words 1..2047 |

The MAC always overwrites `level` and `sender` in the header with its own level
and `my_id`.

On the host side a packet is a valid/ready stream of words, with `last` on its
final word. `host_if_ctrl` reads the level and type from the header. It then
puts the packet into one of four FIFOs: level 0 or 1, control or data.
- A short packet is zero-padded to the network size.
- A long packet is cut at the network size.
- A packet whose level is above 1 is dropped, and `bad_level` pulses.

Received packets are merged back into one stream, a whole packet at a time,
alternating between the levels when both have one waiting.

## Cycle and slot timing (`level_mac`)

Each level runs cycles of this shape, one tick per `marc_clk`:

```
| clock slot | ctrl slot 0 | ctrl slot 1 | ... | ctrl slot n-1 | data slot 0 | ... | data slot D-1 |
```

- The clock node sends the **clock slot**. Every node owns one **control slot**,
  given by `my_slot`; `n_nodes` sets their number.
- The **data cycle** has exactly as many slots D as the reservations of this
  control cycle need, from 0 to `MAX_NODES`. With no reservations the next cycle
  starts at once.
- Every slot has the same shape:

```
pos 0          receiver tuning command
pos 1..len     packet words (len = 16 for clock/control slots, 2048 for data slots)
then GUARD     idle word times
```

The guard absorbs what the clock cannot align: the different fibre delays to each
receiver, and one tick of clock error.

In the clock and control slots, every packet goes out on all wavelengths of the
level, and every receiver listens on the level's first wavelength. In a data slot
a node sends only if the schedule gave it this slot. It then uses the one
wavelength it was assigned. Each receiver tunes to the wavelength its table holds
for the slot; the default is the level's first wavelength.

In its control slot a node sends one packet, chosen in this order:
1. a reservation, if a whole data packet is waiting in its data FIFO;
2. a host control packet;
3. otherwise a *probe*: an empty packet whose only purpose is to time the round
   trip to the star and back.

When a reservation and a control packet are both waiting, they alternate, so
neither starves. A node therefore reserves at most one data slot per cycle.

Receive side: every word that arrives is examined.
- Reservations go to `resv_unit`.
- The clock word goes to `level_sync`.
- The node's own packets coming back end a round-trip measurement.
- Control and data packets addressed to this node are copied to the receive FIFO,
  but only if the whole packet fits. Otherwise the packet is dropped and
  `rx_drop` pulses.

A node that is not yet running cycles keeps its receiver on the level's first
wavelength, waiting for a clock packet.

## Reservation processing (`resv_unit`)

Every node sees the same reservations, its own included, in the same order.
Each node applies the same rule to them, so all nodes end up with the same
schedule without exchanging it.

1. Each reservation is checked against the destinations already placed in the
   current data slot. If a destination repeats, the slot is closed, even though
   it has free wavelengths, and the packet opens the next slot. This is the
   *receiver-collision rule*. It wastes some capacity, but it needs only one
   comparison per reservation.
2. Otherwise the packet takes the next free wavelength of the slot. Wavelengths
   are handed out first-come-first-served.
3. When all wavelengths of the slot are taken, the data cycle grows by one slot.
4. If the destination is this node, the slot's entry in the receive-wavelength
   table is set to the wavelength.
5. If the source is this node, the slot and wavelength are kept for sending.

The wavelength range is latched at the start of each cycle. A change of the
partition point therefore takes effect from the next cycle on.

## Level clock and clock node (`level_sync`)

Each level has its own clock, a 16-bit tick counter `now`. At the start of every
cycle the clock node sends a clock packet. The packet carries the time at the
start of the cycle and the clock node's own one-way delay to the star.

A receiving node sets its clock to:

    transmit time + word offset of the time word + clock node's delay + own delay

The receiving node then re-enters the cycle at the matching position, so that all
nodes' slot boundaries line up.

**Delay measurement.** A node measures its own delay as half the round trip of
its own control packet, which comes back from the star. Every node sends
something in every control slot; that is what the probe packet is for.

**Early clock packets.**
- Until a node has measured its delay, it uses the clock node's delay as its
  estimate.
- A clock packet that carries a delay of zero comes from a clock node that has
  not yet measured its own. No node follows such a packet, but it still counts as
  a sign that a clock node is present.

**Takeover.** A node with `clock_node_en` that hears no clock packet for
`TAKEOVER_TICKS + my_id * TAKEOVER_STEP` ticks becomes clock node.
- The default timeout is twice the longest possible cycle.
- The per-id step makes the lowest id win.
- A clock node that hears a clock packet from a lower id gives up its role.
- A node that was already running cycles keeps their timing when it takes over.
  The other nodes therefore stay aligned when the old clock node fails.

## Clock domains and FIFOs

| domain | runs | connects to the MARC through |
|---|---|---|
| `host_clk` | `host_if_ctrl` | 4 transmit FIFOs (control/data x level) and 2 receive FIFOs |
| `marc_clk` | `marc` | - |
| `phy_clk` | `phy_if_ctrl` | 1 FIFO per level and direction |

- All FIFOs are `ni_fifo`: dual-clock, with Gray-coded pointers and
  first-word-fall-through.
- The MARC reads fill counts, so it starts a packet only once the whole packet is
  in its FIFO.
- Each domain has its own reset synchroniser.

**Clock-rate restriction.** The MARC writes one word per tick into the line
transmit FIFO and expects the physical interface to keep up, so **`marc_clk` must
not be faster than `phy_clk`**. If the physical interface runs dry inside a frame,
it reports `tx_underrun`. The receive FIFOs likewise report `rx_overflow`. Running
the MARC at the PCI rate (33 MHz) against a 26.5625 MHz line clock would need
flow control this design does not have. Equal clocks, or a slower MARC, work.

Wavelength control travels in-band. A word in a line transmit FIFO is either:
- a data word, with its laser-enable mask; or
- a tuning command (`cmd = 1`) carrying the receiver wavelength.

`phy_if_ctrl` turns tuning commands into `rx_sel`. It sends data words to the
encoder port with `laser_en`.

## Reallocating wavelengths (`traffic_monitor`, `marc`)

`traffic_monitor` counts the reservations seen on each level over a window of
`MON_WINDOW` ticks. It then compares the reservations per wavelength of the two
levels. If one level carries more than twice the load of the other, the monitor
proposes moving one wavelength to it (`reconf_req`, `x1_new`). A level never
drops below one wavelength.

The partition point `x1` changes in one of two ways:
- the host writes it (`x1_wr`, `x1_cfg`); or
- with `auto_reconf` set, the monitor's proposal is applied directly.

**Limit.** The design has no protocol for agreeing on a new partition point
between nodes. All nodes of the network must switch in the same cycle. The
intended use is that host software, which sees `reconf_req`, coordinates the
change.

## Differences from the reference design, and limits

- **Reconfiguration agreement.** Only the local decision of the reconfiguration
  scheme is built, as described above; the agreement between nodes is not.
- **Reservation carrying a payload.** The reference format lets a control packet
  carry a reservation and a payload at the same time. Here they are separate
  packets that alternate in the node's control slot. A host control packet can
  use words 1..15, not just 32 bytes.
- **Invented mechanisms.** These are this design's own choices:
  - the slot shape (tuning word, packet, guard);
  - probe packets;
  - the delay-measurement method;
  - the takeover timeout and id ordering;
  - the traffic-monitor rule and window.
- **Clock packet payload.** The reference clock packet can carry network-control
  payload after its time word. Here the rest of the clock packet is always zero.
- **Clock rate.** `marc_clk <= phy_clk` is required, see above.
- **Static configuration.** `my_id`, `my_slot`, `n_nodes` and `clock_node_en` are
  meant to be held constant while running.
- **Board chips not modelled.** The PCI bridge bus protocol, the 8B/10B and
  SerDes chips, the clock generator and the configuration memory are not modelled.

## Files

`rtl/`

| file | contents |
|---|---|
| `ni_pkg.sv` | widths, packet types, word structs, `make_hdr` |
| `ni_top.sv` | the whole card |
| `host_if_ctrl.sv` | host-side sorting and merging |
| `marc.sv` | the two MACs, the monitor and `x1` |
| `level_mac.sv` | the per-level sequencer, transmit and receive |
| `resv_unit.sv` | reservation processing |
| `level_sync.sv` | level clock and takeover |
| `traffic_monitor.sv` | load comparison |
| `phy_if_ctrl.sv` | physical interface controller |
| `ni_fifo.sv` | dual-clock FIFO |
| `reset_sync.sv` | reset synchroniser |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:
- `star_net.sv`: a behavioural passive star. It applies per-node fibre delays and
  counts collisions on each wavelength.
- `tb_ni_top.sv`: the end-to-end test. It uses four cards, two stars and reduced
  packet sizes and timeouts. It drives random traffic through both levels and
  checks every packet word by word. It counts each mechanism and fails if one
  never occurs:
  - takeover at start-up, and again after the clock node fails;
  - resynchronisation;
  - the receiver-collision rule;
  - data-cycle extension;
  - control and data delivery on both levels;
  - padding;
  - drops while a host is not reading;
  - rejection of an invalid level;
  - reallocation requests and a partition-point change.
- `tb_ni_top_full.sv`: two cards with every parameter at its default. It covers
  the full takeover timeout and 2048-word data packets.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_ni_top -y rtl -y tb -Irtl rtl/ni_pkg.sv tb/tb_ni_top.sv
./obj_dir/Vtb_ni_top
```

Replace `tb_ni_top` with any other testbench name. The end-to-end test takes
under a second; the full-size test takes about one second.

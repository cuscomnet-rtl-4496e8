# CusComNet: a direct FPGA-to-FPGA network for accelerator clusters

In a cluster where every host carries an FPGA accelerator, results that one
accelerator produces and another needs normally travel accelerator → PCIe →
host CPU → Ethernet → host CPU → PCIe → accelerator. CusComNet removes the
hosts from that path. The FPGAs' own serial transceivers are cabled directly
to each other in a 2D torus. A small network inside each FPGA then moves
packets between the user logic of any two nodes. Packets for distant nodes are
forwarded hop by hop through the nodes in between.

This repository holds synthesizable SystemVerilog for that network and
self-checking testbenches for it. The reference configuration is a 16-node
cluster wired as a 4 × 4 torus:

- four transceiver lanes per node;
- a 100 MHz fabric clock;
- 2 Gb/s lines, which carry 16 data bits per cycle after 8B/10B coding;
- payloads of up to 64 bytes;
- output queues of 64 packets.

The repository also includes one application block. It is the circuitry that an
N-body simulation uses to share each iteration's partial results among all
nodes over this network instead of over MPI.

Every node runs the same build, and the node number is an input. Several
things are build-time choices:

- the packet size;
- the queue depths;
- the number of priority levels;
- the routing module;
- the scheduling module.

The router and the scheduler are separate modules so that they can be swapped.

## A node at a glance

```
             GTP tile 0..3 (outside: 8B/10B, serialiser, clock recovery)
                │ 16 bit + 2 K flags per cycle, each direction
          ┌─────┴─────┐
          │  gtpif    │  ×4   word alignment, one register stage
          ├───────────┤
          │ datalink  │  ×4   framing, CRC-32, ACK/NAK, retransmission, counters
          └─────┬─────┘
                │ whole packets
          ┌─────┴──────────────────────────────────────────────┐
          │ pktif: 5 input registers → torus_router per input   │
          │        → rr_scheduler → 5 prio_queues (local + 4)   │
          │        + source/identifier stamping, duplicate drop │
          └─────┬──────────────────────────────────────────────┘
                │ user port: send (dest, prio, type, len, data) / receive packet
     cuscomnet_node  ── shared with ──  result_exchange (N-body) in cuscomnet_fpga
```

| File | Role |
|---|---|
| `rtl/cuscomnet_pkg.sv` | Sizes, header layout, packet struct, control characters |
| `rtl/cuscomnet_fpga.sv` | **Top**: the network plus the N-body result exchange, with a select for who owns the user port |
| `rtl/cuscomnet_node.sv` | The network of one node: 4 × (gtpif + datalink) + pktif |
| `rtl/gtpif.sv` | Byte-boundary realignment of the received stream; register stage each way |
| `rtl/datalink.sv` | Link protocol of one lane |
| `rtl/crc32.sv` | CRC-32 over 16-bit words, one word per clock |
| `rtl/pktif.sv` | Packet switch and user wrapper |
| `rtl/torus_router.sv` | Shortest-path output choice in the torus (combinational) |
| `rtl/rr_scheduler.sv` | One round-robin arbiter per output, one packet per output per clock |
| `rtl/prio_queue.sv` | One FIFO per priority level, most urgent non-empty level served first |
| `rtl/pkt_fifo.sv` | Whole-packet FIFO used by `prio_queue` |
| `rtl/result_exchange.sv` | N-body partial-result exchange |

## Packets

A packet is a 16-bit header followed by 0 to 32 payload words of 16 bits (0 to
64 bytes). On the wire a packet therefore takes 16 to 528 bits. The header
fields are sized from the build constants:

| Bits | Field | Width at 16 nodes |
|---|---|---|
| 15:12 | destination node | 4 (`$clog2(NUM_NODES)`) |
| 11:8 | source node | 4 |
| 7:6 | type: data, control, two spare | 2 |
| 5 | priority (1 = urgent) | `$clog2(PRIO_LEVELS)` |
| 4:0 | packet identifier | whatever is left (5) |

The header carries no length field. The receiving link counts words between
the start and end markers. Inside a node, a packet is kept as the `packet_t`
struct: header, a 6-bit word count, and 32 payload words (534 bits).

The user only supplies the destination, type, priority, length and payload. The
switch fills in the source. It also fills in the identifier, which is a counter
kept per destination. As a result, consecutive packets from one node to another
carry consecutive identifiers.

## The link protocol (`datalink`, `gtpif`, `crc32`)

Each lane is full duplex and carries one 16-bit word per clock. A word is a
control word when both of its K flags are set. The control words are:

| Word | Bytes | Meaning |
|---|---|---|
| IDLE | K28.5 K28.5 | nothing to send |
| SYNC | K28.5 K28.1 | channel synchronisation; also the alignment pattern |
| SOF / EOF | K27.7 ×2 / K29.7 ×2 | frame delimiters |
| ACK / NAK | K23.7 ×2 / K30.7 ×2 | frame accepted / frame must be repeated |

A frame looks like this:

```
SYNC  SOF  header  payload[0 .. len-1]  EOF  CRC[31:16]  CRC[15:0]
```

The CRC covers the header and the payload. It uses polynomial 0x04C11DB7,
starts from all ones, takes input most significant bit first, and applies no
final inversion. A zero-payload frame is 6 words and a full frame is 38.

The protocol is **stop-and-wait**:

- The sender keeps the frame until the opposite direction of the same cable
  returns ACK.
- NAK, or silence for `ACK_TIMEOUT` cycles, makes the sender send the frame
  again.
- ACK and NAK can be slipped between any two words of a frame going the other
  way. The frame simply pauses for that cycle.
- The receiver answers NAK in three cases:
  - the CRC is wrong;
  - the frame is malformed;
  - the packet switch has no free input register (busy refusal).
- Busy refusal is the network's only flow control. Nothing is ever dropped for
  lack of space.

Each lane counts five kinds of event, so that the state of every cable can be
read at run time:

- CRC failures;
- busy refusals;
- repeated frames;
- timeouts;
- half-K words (a damaged or misaligned character).

A lane is reported up once it has seen a SYNC. A SYNC also goes out after
`SYNC_PERIOD` idle cycles.

The transceiver tile aligns only to bytes, so a received word can be one byte
late. `gtpif` detects this when K28.1, the second byte of SYNC, arrives in the
high half of a word. From then on it rebuilds words from the previous low byte
and the current high byte, and it switches back when a SYNC arrives whole.

## The packet switch (`pktif`)

There are five inputs: the local user and the four links. There are five
outputs: local delivery and the four links. Ports are numbered 0 local,
1 North, 2 East, 3 West, 4 South. Transceiver lanes 0..3 are North, East, West
and South.

1. **Input register.** Each input holds one packet. While it is occupied, the
   user sees `usr_tx_ready` low and a link answers new frames with NAK.
2. **Routing** (`torus_router`). Node *n* sits at column *n* mod 4 and row
   *n* div 4. The column distance is closed first, then the row distance. Each
   takes the shorter way round its ring. A tie at half a ring goes East or
   South, and a packet for this node goes to port 0.
3. **Scheduling** (`rr_scheduler`). For each output, one waiting input is
   granted per clock, in rotating order. An input only asks for its output if
   the queue level for its priority has room. The granted packet is written
   into the queue on that same clock edge.
4. **Queues** (`prio_queue`). Each output has `PRIO_LEVELS` FIFOs of
   `QUEUE_DEPTH` packets each: 2 × 64 by default. `LEVEL_DEPTH` can give each
   level its own depth instead. Nodes can also differ, for example a hub node
   with deeper queues. The most urgent non-empty level is served, so urgent
   packets overtake ordinary ones, and order is kept within a level.
5. **Local delivery.** A packet whose source and identifier equal those of the
   last packet delivered from that source is discarded and counted in
   `dup_drops`. This removes the copy the link layer sends when an ACK is lost.

A packet moves from one input register, through its queue, to the link in the
best case in two clocks. The hop latency measured below includes the link
framing and the cable.

## N-body result exchange (`result_exchange`, `cuscomnet_fpga`)

In the N-body application every node computes new position and velocity vectors
for its own share of the particles. Before the next iteration, every node needs
everyone's results. `result_exchange` does that transfer in hardware.

- **Sending.** It reads the local records two at a time into a packet, from a
  memory with one-cycle read latency. Word 0 of the payload is the index of the
  first record, and 24 words of records follow. It then offers that packet to
  the network once for each of the other nodes, in turn. The network has no
  broadcast.
- **Receiving.** Every received packet is unpacked, one word per clock, into the
  memory of all particles at ((source × `PARTS_PER_NODE`) + index) ×
  `REC_WORDS` + word.
- **Finishing.** `done` pulses once all local packets have been taken by the
  network and (NODES − 1) × `PARTS_PER_NODE` records have arrived. Records of
  the next iteration that arrive early are counted towards it.

A record is 12 words: 3 position and 3 velocity components of 32 bits. The
defaults are sized for 81,920 particles on 16 nodes, which is 5120 per node.

`cuscomnet_fpga` is the top. It puts the network and the exchange block side by
side and hands the network's single user port to the exchange block while
`exch_sel` is 1. Change `exch_sel` only while both sides are idle. The force
kernel and the two particle memories are outside the top, and their ports are
brought out.

## Interfaces and timing

- **Clock and reset.** There is one clock. Reset `rst_n` is asynchronous and
  active low. It empties every queue and drives IDLE towards the transceivers.
- **Handshakes.** Every handshake is valid/ready and completes on the rising
  edge where both are high.
  - `usr_rx_valid` holds its packet until it is taken.
  - The link-to-switch offer inside a node is a single cycle, made only when
    the switch has room.
- **Transceiver ports.** `gtp_tx_data/charisk` and `gtp_rx_data/charisk` are the
  parallel side of a GTP tile: 16 bits and 2 K flags per cycle.
- **Statistics.** The status outputs are per-lane 16-bit counters plus
  `dup_drops` and `routed_pkts` (packets forwarded to a link).

## Measured behaviour

These figures come from the testbenches, with cables modelled as 3 or 4 clocks
of delay:

| Quantity | This RTL | Published prototype |
|---|---|---|
| Zero-payload latency, neighbour (user to user) | 16 cycles = 0.16 µs | 0.83 µs |
| Added per intermediate hop | 14 cycles = 0.14 µs | 0.57 µs |
| Full 64-byte packets back to back, bare link (3-clock cable) | ≈ 47 cycles per packet ≈ 1.09 Gb/s | — |
| Full 64-byte packets, user to user between neighbours (4-clock cable) | ≈ 52 cycles per packet ≈ 0.99 Gb/s | 1565 Mb/s (93–97 % of 1.6 Gb/s) |
| Same, 1000 packets, sender's queue full most of the time | ≈ 0.98 Gb/s | 1565 Mb/s |
| Payload sweep 2 / 8 / 16 / 32 / 48 / 64 bytes | 77 / 268 / 459 / 713 / 875 / 986 Mb/s | 1479 Mb/s average for small packets |
| One N-body exchange, 81,920 particles, 16 nodes | 1,382,538 cycles ≈ 13.8 ms | not reported separately |

The latency numbers are lower than the prototype's because real transceivers
and cables add tens of cycles that the cable model leaves out.

## Where this design departs or chooses on its own

- **Link efficiency.** Stop-and-wait with a full ACK round trip per frame costs
  about 9 to 14 cycles on top of each 38-word frame. That gives 62–68 % of the
  1.6 Gb/s data rate for full packets, well below the published 93–97 %. This
  is the main known shortfall.
  - Even with no gaps at all, a frame of SYNC, SOF, header, EOF and two CRC
    words carries 32 payload words in 38, which is 84 %. So the published
    figures cannot come from this frame layout at 16 bits per clock. The
    published protocol is described only at the level of SYNC, SOF, EOF, CRC
    and confirm-or-resend.
  - Keeping two or more numbered frames in flight would approach that 84 %.
- **Choices the published design leaves open.** All of the following are this
  design's own:
  - the header field order;
  - the 2-bit type field and 5-bit identifier;
  - two priority levels;
  - the K-character codes;
  - the CRC parameters;
  - the ACK/NAK encoding;
  - `SYNC_PERIOD` = 1024 and `ACK_TIMEOUT` = 256;
  - the tie rule and dimension order of the router;
  - the one-packet input registers;
  - `gtpif`'s realignment job;
  - the N-body record layout;
  - the port-sharing select.
- **Duplicate rejection.** A repeat is only detected against the last
  identifier delivered from each source. That covers the one-frame-in-flight
  link, but not reordering over different paths. Paths are fixed, so packets
  from one source to one destination never overtake each other unless their
  priorities differ.
- **Deadlock.** Dimension-order routing on a torus without virtual channels can
  in principle deadlock around a ring when every queue on it is full. The
  64-packet queues make this unlikely, and none of the simulations, including
  the full 614,400-packet exchange, locked up. It is not prevented, though.
- **Scale.** The header has room for 16 nodes. Larger clusters, such as the
  1024-node tori projected for this network, need a wider header. `NUM_NODES`,
  `TORUS_COLS` and the header layout in the package must be changed together.
- **Not built here:**
  - the transceivers themselves;
  - the host interface and PCIe;
  - the DDR2 controller;
  - the N-body force kernel;
  - the host side.

## Simulating

Each block has a self-checking testbench in `tb/`. Each testbench prints a
`TB_RESULT checks=… failures=…` line and stops itself with a watchdog.
`tb/gtp_link_model.sv` is a behavioural cable plus transceiver model used by the
system testbenches. It adds delay, can shift the byte boundary, can damage a
data word, and can swallow an ACK. With Verilator 5:

```sh
# one block, e.g. the data link (-y lets verilator find the modules it uses)
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cuscomnet_pkg.sv tb/tb_datalink.sv --top-module tb_datalink -o sim
./obj_dir/sim

# the 16-node network with fault injection (latency, all-to-all, CRC error,
# lost ACK, hot spot with busy refusals and priority overtaking)
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cuscomnet_pkg.sv tb/tb_cuscomnet_node.sv --top-module tb_cuscomnet_node -o sim

# below, "..." stands for the same options as above
# bandwidth between two neighbours: payload sweep and a 1000-packet stream
verilator ... tb/tb_bandwidth.sv --top-module tb_bandwidth -o sim

# the top at full size: 16 nodes, 81,920-particle exchange (about 35 s)
verilator ... tb/tb_cuscomnet_fpga.sv --top-module tb_cuscomnet_fpga -o sim
```

The system testbenches count how often each mechanism happened and fail if one
never did. The mechanisms are:

- forwarding;
- realignment;
- CRC refusals;
- repeated frames;
- timeouts;
- duplicates removed;
- busy refusals;
- full queues;
- urgent packets overtaking;
- mode switches.

To change a size, edit the parameter defaults or the constants in
`cuscomnet_pkg`. The header widths follow from `NUM_NODES` and
`PRIO_LEVELS`, and the identifier gets whatever bits are left.

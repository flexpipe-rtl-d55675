# FlexPipe packet pipeline in SystemVerilog

FlexPipe is the packet path of a SmartNIC. It runs packets through a chain of
hardware offloads: checksum, firewall, SHA-3 authentication, AES, JPEG decoding
and receive-side scaling (RSS). The chain can be different for every flow and
can be changed at run time. Two common designs make a trade-off here:

- A fixed pipeline is fast but pushes every packet through every offload.
- A central crossbar with a scheduler can send packets anywhere, but its
  wiring and queues grow with the square of the number of units.

FlexPipe keeps the pipeline but makes every stage optional. The offloads stay
connected one after another in a fixed order. Each packet carries metadata
that names the next offload it needs. An offload whose type is not named lets
the packet pass. An offload whose type is named processes the packet on the
least-loaded of its parallel units. A packet that needs its offloads in a
different order from the pipeline's goes through the pipeline a second time
(recirculation).

The datapath is 512 bits wide at 250 MHz: one 64-byte beat per cycle, or
128 Gbit/s.

```
 network ─► Pre-Processor ─► Ingress TC ─► CRC ─► FW ─► SHA-3 ─► AES ─► JPEG ─► RSS ─► Egress TC ─► DMA
                                 ▲                                                           │
                                 └──────────────────── recirculation ───────────────────────┘
```

Each Offload has this inside:

```
            ┌─► Load Balancer ─► unit input queues ─► Offload Units (outside) ─┐
 in ─► Traffic Splitter                                                          Traffic Arbiter ─► out
            └──────────────────────────── bypass ─────────────────────────────────┘
```

This repository has the synthesizable logic of the pipeline: the
Pre-Processor, the traffic controllers, and the splitting, balancing and
arbitration inside every Offload. It does not have the offload cores or the
DMA engine. Each core is a design of its own and only has a port on the top
module; the testbenches attach a behavioural model that has the core's width,
clock and latency.

## Beats and metadata

Every link between blocks is an AXI4-Stream with valid/ready handshakes.

- The beat type is `axis_beat_t`: `tdata[511:0]`, `tkeep[63:0]`, `tlast` and
  `tuser`.
- Byte i of a beat is in `tdata[8*i +: 8]`.
- `tuser` holds the packet metadata `pkt_meta_t`. It is a sideband of about
  100 bits, so the 512 data bits carry only packet bytes. Every beat of a
  packet has the same metadata.

| field | meaning |
|---|---|
| `pkt_len` | packet size in bytes |
| `flow_id`, `prio` | flow type and priority class from classification |
| `chain[8]`, `chain_len` | the offload ids the packet needs, in order |
| `hop` | index into `chain` of the next required offload |
| `next_off` | `chain[hop]`, or `OFF_NONE` (7) when the chain is done |
| `timestamp` | cycle the packet was classified (for latency) |

Offload ids are the positions in the pipeline: CRC 0, firewall 1, SHA-3 2,
AES 3, JPEG 4, RSS 5. All types and constants are in `rtl/flexpipe_pkg.sv`. It
also has the `advance_hop` function, which moves the metadata on to the next
chain entry.

## Pre-Processor (`pre_processor`)

The Pre-Processor has two match-action stages and a latency of two cycles at
one beat per cycle.

Stage 1 parses the first beat of a packet:

- It reads an Ethernet II frame carrying IPv4 without options and TCP/UDP
  ports.
- The size is the IPv4 total length plus 14 bytes. A frame that is not IPv4
  counts as 1518 bytes.
- It matches the 5-tuple against 16 ternary entries (key and mask). The first
  valid hit gives the flow type and the priority. A miss gives flow 0, and
  flow 0's chain is normally empty, so such a packet goes straight to the DMA
  engine.

Stage 2 looks up the flow's chain in a 16-entry table and builds the metadata.

Both tables have write ports (`cfg_flow_*` and `cfg_chain_*`). These are the
ports an SDN controller uses to change the chain of a flow while traffic runs.
A write applies to every packet whose first beat is parsed after it.

## Inside an Offload (`offload`)

### Traffic Splitter (`traffic_splitter`)

The splitter compares `next_off` with the Offload's id. Packets that match go
to the Load Balancer and the others go to the bypass queue. It is
combinational and routes whole packets.

### Load Balancer (`load_balancer`)

Sending packets to the units in turn spreads them badly, because packet sizes
differ widely. The balancer keeps a load counter for each unit instead:

- The counter goes up by the packet's size in beats when the packet's first
  beat is written into that unit's input queue.
- It goes down by one each time the unit fetches a 512-bit fragment from its
  queue.

The counter is therefore the number of beats the unit has been given but not
yet taken. A new packet goes to the unit with the lowest counter; on a tie the
lowest index wins. The unit stays selected until the packet's last beat, so a
packet is never split between units. The selection is combinational, so
packets follow each other without gaps.

A unit input queue holds 32 beats, which is one 1518-byte frame (24 beats)
with room to spare.

### Offload Units (outside this RTL)

A unit fetches its packet from `unit_in_*`, one beat per handshake, at its own
pace. It returns the processed packet on `unit_out_*` with `tuser` unchanged.

The top module puts all units of all Offloads on flat arrays. Unit u of
Offload k has index `base_of(NUM_UNITS, k) + u`.

The unit counts give each Offload at least the pipeline's 128 Gbit/s. They are
calculated as ceil(512/w_unit × 250/f_unit + non-pipelined cycles):

| Offload | unit input width | unit clock | units | total bandwidth |
|---|---|---|---|---|
| CRC | 64 b | 250 MHz | 8 | 128 Gbit/s |
| firewall | 8 b | 150 MHz | 128 | 154 Gbit/s |
| SHA-3 | 64 b | 150 MHz | 39 | 374 Gbit/s |
| AES | 128 b | 250 MHz | 4 | 128 Gbit/s |
| JPEG | 32 b | 100 MHz | 40 | 128 Gbit/s |
| RSS | 256 b | 200 MHz | 3 | 154 Gbit/s |

This gives 222 units in all. The unit ports run in the 250 MHz pipeline clock.
A unit that runs on a slower clock needs its own clock-domain crossing, and
that crossing is not part of this RTL.

### Traffic Arbiter (`traffic_arbiter`, `rr_scheduler`)

This is the most involved block. It merges bypassed and processed packets back
into one stream and keeps their order within each group.

1. Each unit writes into its own 32-beat output queue.
2. A nested round-robin scheduler (`rr_scheduler`) loops over the units. It
   grants a unit only when that unit's queue holds a whole processed packet.
   The granted packet then moves, whole, into the *processed queue*.
3. On the way into the processed queue, `advance_hop` updates the metadata:
   `hop + 1`, and a new `next_off`. This is how a processed packet comes to
   ask for the next offload of its chain.
4. The bypass queue and the processed queue each hold 16 kB (256 beats).
5. A *highest-demand-first* scheduler chooses between the two queues:
   - Only a queue that holds at least one complete packet can be chosen.
   - Between two such queues it takes the one with the higher fill level.
     On a tie it takes the processed queue.
   - The queue it chooses keeps the output until that packet's last beat.
   - The choice is made combinationally while the output is idle. So the
     output goes from waiting to sending, and from one queue to the other,
     without a lost cycle.
   - `out_src` shows which queue the current beat comes from.

Both queues are store-and-forward. A packet waits there until it is complete.
This costs latency, one cycle per beat of packet length, at each Offload a
packet bypasses. In return, a packet that has started on the output is never
interrupted.

## Recirculation (`ingress_traffic_controller`, `egress_traffic_controller`)

At the end of the pipeline the Egress Traffic Controller checks `next_off`.

- `OFF_NONE` means the chain is complete, and the packet goes to the DMA
  engine.
- Any other value names an Offload that lies before the one the packet last
  visited. That happens for a chain such as CRC → AES → SHA-3. Such a packet
  goes back to the Ingress Traffic Controller.

The ingress side stores returning packets in a 16 kB queue. At every packet
boundary it prefers a complete recirculated packet over a new packet from the
network. This keeps the loop draining, so it can never fill up and block the
pipeline. New packets pass through without delay.

Recirculated packets use pipeline bandwidth a second time. At an offered load
L (a fraction of 128 Gbit/s), a share f of recirculated packets is carried
only while L·(1 + f) ≤ 1. At 90 Gbit/s (L = 0.7) that is f ≤ 0.43. Above it,
the network input is throttled through back-pressure.

## Top module (`flexpipe_top`) and parameters

`flexpipe_top` connects the blocks as in the diagram above. Its ports are:

- `net_in_*`: the network input.
- `dma_out_*`: the output to the DMA engine.
- `cfg_*`: the table writes.
- `unit_in_*` and `unit_out_*`: the 222 unit ports, as flat arrays.
- `now`: the timestamp counter.

All parameters default to the full design:

| parameter | default | meaning |
|---|---|---|
| `NUM_UNITS` | `'{8,128,39,4,40,3}` | units per Offload, in pipeline order |
| `Q_DEPTH` | 256 | bypass and processed queue depth per Offload, in beats (16 kB) |
| `UNIT_Q_DEPTH` | 32 | unit input and output queue depth, in beats |
| `RECIRC_DEPTH` | 256 | recirculation queue depth, in beats |
| `FLOW_ENTRIES` | 16 | ternary classification entries |
| `NUM_FLOWS` | 16 | flow types, i.e. chain-table entries |

`pkt_fifo` is the one queue used everywhere. It is a first-word-fall-through
array FIFO with beat and packet counts. All blocks have a synchronous,
active-low reset. Handshake rules are checked by concurrent assertions in the
RTL.

## Where this RTL goes beyond or departs from the published architecture

The published design sets these points: the block structure, the offload
order, the unit counts, the 512-bit and 250 MHz datapath, the 16 kB queues,
the load-counter rule, and the two arbiter schedulers. The rest are choices
made here:

- **Metadata layout and widths**: up to 8 chain entries, 16 flows and 8
  priority classes, and a 32-bit timestamp.
- **Header format and classification**: fixed Ethernet/IPv4/TCP-UDP parsing
  and first-hit ternary matching, in two stages.
- **Unit queues**: a 32-beat input queue and a 32-beat output queue per unit.
  The load counts are in beats.
- **Two queues in the arbiter**: the arbiter has a bypass queue and a
  processed queue, with the tie going to the processed queue. The metadata is
  advanced in the arbiter.
- **Recirculation**: recirculated packets are preferred at the ingress, and
  the recirculation queue is 16 kB.
- **Priority class**: it is carried in the metadata but no scheduler uses it.
- **Slow units**: units that run on clocks below 250 MHz get no clock-domain
  crossing here; it belongs with the unit.
- **Not built**: the six offload cores, the DMA engine and the SDN
  controller. Only their ports are provided.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each one also has a watchdog.

Compile the files with plain Verilator 5, in this order: the two packages
first, then the RTL, the unit model and the testbench. For example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/flexpipe_pkg.sv tb/fp_tb_pkg.sv \
  rtl/pkt_fifo.sv rtl/rr_scheduler.sv rtl/traffic_splitter.sv rtl/load_balancer.sv \
  rtl/traffic_arbiter.sv rtl/offload.sv rtl/pre_processor.sv \
  rtl/ingress_traffic_controller.sv rtl/egress_traffic_controller.sv rtl/flexpipe_top.sv \
  tb/offload_unit_model.sv tb/tb_flexpipe_top.sv --top-module tb_flexpipe_top
./obj_dir/Vtb_flexpipe_top
```

`tb/fp_tb_pkg.sv` has helpers for building packets and expected traces.
`tb/offload_unit_model.sv` is the behavioural unit. It fetches beats at the
rate its width and clock allow and adds its non-pipelined delay. It writes its
id into a trace field in bytes 56–63 of the first beat, so the sink can check
which offloads a packet visited and in which order.

| testbench | what it shows |
|---|---|
| `tb_pkt_fifo`, `tb_traffic_splitter`, `tb_egress_traffic_controller`, `tb_rr_scheduler` | the single blocks against reference models, under random traffic and back-pressure |
| `tb_load_balancer` | least-loaded choice, counter arithmetic, whole packets per unit, full queues |
| `tb_traffic_arbiter` | round-robin fairness, the highest-demand-first rule at every decision, no idle cycles, `advance_hop` |
| `tb_ingress_traffic_controller` | recirculated-first at boundaries, packet integrity, a full recirculation queue |
| `tb_pre_processor` | parsing, ternary matching, misses, a table write at run time, 2-cycle latency |
| `tb_offload` | one Offload with unit models: one-cycle bypass after the last beat, line rate, balancing |
| `tb_flexpipe_top` | end to end with fewer, faster units: 300 packets at 90 Gbit/s, five flows, recirculation, a chain rewrite, DMA stalls; counts every mechanism |
| `tb_flexpipe_full` | the full 222-unit pipeline at default parameters: 11000 packets at 90 Gbit/s, throughput measured over received packets 500 to 10500 |
| `tb_workload_sweep` | offered load from 64 to 128 Gbit/s, and recirculated shares of 20 %, 35 % and 60 % at 90 Gbit/s |

Measured results:

- **`tb_flexpipe_full`**: 89.3 Gbit/s delivered of 90 Gbit/s offered. Mean
  latency is 745–1614 cycles (3.0–6.5 µs), depending on the flow's chain.
- **`tb_workload_sweep`**:
  - The load sweep delivers 63.0, 78.4, 94.4, 108.4 and 122.0 Gbit/s at
    offered loads of 64, 80, 96, 112 and 128 Gbit/s.
  - Recirculated shares of 20 % and 35 % are carried at the full input rate.
  - A share of 60 % throttles the input to about 79 Gbit/s, as the bandwidth
    bound predicts.

The full-size testbench spends most of its time in the C++ compile, several
minutes; the simulation itself takes seconds.

# ONOC: a priority-aware 2-D mesh network-on-chip

This is synthesizable SystemVerilog for a small packet-switched network-on-chip with three
traffic classes. **High** carries single-flit control messages, **Mid** carries real-time
data and **Low** carries bulk transfers. The network is meant to deliver High and Mid traffic
within tight latency bounds even when bulk traffic congests it. It does this without
over-provisioning: every node serves waiting High requests first and uses round robin among
the ports within a class. This scheme is called *priority-based round robin* (PBRR).

The RTL is a cycle-level realisation of the ONOC system-level model, a 4x4 mesh described as
communicating classes: Producer, Input Buffer, Scheduler, Router, Output Buffer and Consumer.
Each class becomes a module here. Where the original model gives only behaviour, this RTL
chooses widths, encodings and cycle timing. Those choices are listed below, under
"Departures and design choices".

## The network at a glance

```
            N                      Node (x,y)
            |          +------------------------------------------+
   W ---  [IB]  ---->  |  IB N  IB E  IB S  IB W  IB NI            |
            ...        |    \     |     |     |    /   requests    |
                       |     +--- one-hot mux ---+ <--- Scheduler   |
                       |             |               (PBRR,         |
                       |          Router              tables)       |
                       |   Idle -> Data -> ComputeRoute -- port -->  |
                       |             |          <-- confirm --       |
                       |  OB N  OB E  OB S  OB W  OB NI              |
                       +------------------------------------------+
                         to neighbours        to the local Consumer
```

* `onoc_mesh` (top): `MESH_X` x `MESH_Y` nodes (4x4 by default). X grows to the East and Y
  to the South, so node (0,0) is the north-west corner. Every node has a producer on its NI
  (network interface) input and a consumer on its NI output. A free-running 16-bit counter
  provides the time stamps.
* `onoc_node`: five input buffers, one scheduler, one router and five output buffers.
* Links between nodes: a flit bus, a `valid` signal and a `buff_avail` signal from the
  receiving input buffer back to the sender. A flit crosses a link in a cycle where `valid`
  and `buff_avail` are both 1.

## Flits

Every flit carries a full header, so each flit is routed on its own. There is no
wormhole or packet state anywhere in the network.

| field       | bits | meaning                                  |
|-------------|------|------------------------------------------|
| `prio`      | 2    | 0 High, 1 Mid, 2 Low                     |
| `timestamp` | 16   | cycle in which the producer made the flit |
| `src_x/y`   | 2+2  | source node                              |
| `dst_x/y`   | 2+2  | destination node                         |
| `payload`   | 16   | data (the producer's sequence number)    |

The field order follows the original header. The widths are this design's choice and live
in `onoc_pkg`. Meshes larger than 4x4 need a wider `COORD_W`. `onoc_mesh` stops elaboration
with an error if the mesh does not fit the coordinate width.

## One transaction through a node: request, grant, route, confirm

The hardest part to follow is how the control part (scheduler) and the data part (router)
of a node cooperate. They are deliberately separate. A node has **one** router datapath, so
it moves one flit at a time. Each move is a three-cycle transaction:

| cycle | scheduler                                     | router          | input buffer *i*                         |
|-------|-----------------------------------------------|-----------------|------------------------------------------|
| 0     | ARB: picks a request and pulses `node_grant_fast[i]` or `node_grant_slow[i]` | Idle: latches the flit | drives the granted flit, remembers which entry it was |
| 1     | WAIT                                          | Data: extracts the destination | holds the flit                          |
| 2     | looks up `output_port` in the availability table; pulses `confirm[i]` if that output buffer has room | ComputeRoute: drives `output_port`; on confirm writes the flit into that output buffer | on `confirm` removes the flit |
| 3     | ARB again                                     | Idle            |                                          |

If the output buffer is full, the scheduler gives no confirm. The flit then simply stays in its
input buffer and requests again later. Nothing is lost, and nothing has to be undone.

* **Requests.** An input buffer holds flits of all classes in one shared store of
  `IB_DEPTH` entries. It raises `short_data_in_buff` while it holds a High flit and
  `data_in_buff` while it holds a Mid or Low flit. A fast grant is answered with the oldest
  High flit. A slow grant is answered with the oldest Mid flit, or the oldest Low flit if
  there is no Mid. So Mid always goes before Low, and the order within each class is kept.
* **PBRR arbitration.** High requests always win over Mid/Low requests. Each of the two
  classes has its own round-robin pointer over the five ports.
* **Refused High grants.** If a High grant is refused because its output buffer is full,
  the next arbitration serves a waiting Mid/Low request first. Without this rule, one
  blocked High flit would occupy the datapath every three cycles and starve all other
  traffic through the node.
* **Availability table.** The scheduler keeps a registered copy of the five output buffers'
  `buff_avail` signals. It is always current when read, because the last write into an
  output buffer happened at least three cycles earlier.

Timing that follows from this: through an idle node, a flit leaves on `link_out_valid` four
cycles after the cycle in which it entered. A saturated node moves one flit every three cycles.
A flit that crosses *h* links from producer to consumer has a latency of 1 + 4(*h*+1) cycles
in an empty network. Corner to corner in the 4x4 mesh (six links, seven nodes) that is 29.

## Routing

The router uses dimension-order XY routing: first East/West until the column matches, then
North/South, then out of the NI port. A flit never turns from the Y dimension back into X.
That turn prohibition makes the channel dependencies acyclic, so the mesh cannot deadlock.
Ports at the mesh edge are tied off (no incoming flits, no room downstream). A destination
inside the mesh never selects them.

## Output buffers and flow control

An output buffer is a FIFO of `OB_DEPTH` flits with two independent sides. The input side
takes flits from the router while there is room. The output side sends the oldest flit
whenever the next node's input buffer reports room. Flow control is therefore purely local.
The router writes only with a confirm (room in the output buffer), and an output buffer sends
only into an input buffer with room. No flit is ever dropped.

## Traffic generation and latency measurement

`onoc_producer` is configured at run time through a `prod_cfg_t` struct, one per node:

* `pattern`:
  * `DIST_UNIFORM`: one flit every `interval` cycles. The classes cycle Mid, Low, High,
    so every third flit is High.
  * `DIST_EXPONENTIAL`: gaps with mean `interval`, from a 16-bit LFSR. A gap is
    (leading zeros + a uniform fraction) x ln 2 x `interval`, which approximates an
    exponential distribution. The class is drawn at random.
  * `DIST_BERNOULLI`: a flit in each cycle with probability `rate`/256. The class is drawn
    at random.
* `dst_random` selects a uniformly random destination among the other nodes. Otherwise the
  destination is `dst_x`/`dst_y`.
* `max_flits` stops the producer after that many flits (0 means no limit). `enable`
  switches it on.

The producer holds one flit. While that flit waits for room, no new flit is generated, so the
offered load falls under back-pressure. The time stamp is always the generation cycle.
`onoc_consumer` always accepts flits and strips the header. It reports the payload, the source,
the class and the latency (now minus time stamp) for one cycle. It also keeps count, sum and
maximum of the latency per class.

## Parameters

| module     | parameter  | default | notes |
|------------|------------|---------|-------|
| onoc_mesh  | `MESH_X`, `MESH_Y` | 4, 4 | the 4x4 example network; at most 4 with `COORD_W` = 2 |
| onoc_mesh, onoc_node | `IB_DEPTH` | 4 | flits per input buffer (shared by all classes) |
| onoc_mesh, onoc_node | `OB_DEPTH` | 2 | flits per output buffer |
| onoc_pkg   | `COORD_W`, `TS_W`, `PAYLOAD_W` | 2, 16, 16 | header field widths |
| onoc_producer | `SEED` | 16'hACE1 | LFSR seed; the mesh gives each node its own |

No sizes for the buffers were given, so the defaults are choices. The original study sweeps the
buffer size over 1, 2, 3, 4, 5 and 10, and `tb_onoc_buffer_sweep` runs all six sizes.

## Measured behaviour

From the testbenches (Verilator 5):

* Idle-node latency: 4 cycles. Corner-to-corner latency in the idle 4x4 mesh: 29 cycles.
* Saturated node throughput: 100 flits in 300 cycles.
* A 4x4 mesh with all 16 nodes injecting 150 flits to random destinations delivered every flit
  with the three patterns. Mean latencies, High/Mid/Low:
  * uniform, interval 6: about 64/82/333 cycles.
  * Bernoulli, 40/256: about 58/110/307 cycles.
  * exponential, mean 5: about 60/107/335 cycles.
* Buffer-size sweep (uniform, interval 5, 120 flits per node, random destinations), mean
  latency in cycles:

  | IB_DEPTH | High | Mid | Low |
  |----------|------|-----|-----|
  | 1        | 78   | 84  | 95  |
  | 2        | 80   | 89  | 185 |
  | 3        | 69   | 82  | 262 |
  | 4        | 62   | 79  | 320 |
  | 5        | 65   | 89  | 414 |
  | 10       | 51   | 116 | 675 |

  The High latency stays low and roughly flat, while the Low latency grows with the buffer size.
  This is the qualitative trend the original PBRR study reports. The absolute numbers are not
  comparable: the original traffic load and time unit are unknown.

## Departures and design choices

* Only the PBRR scheduler is implemented. The priority-only (PB), plain round-robin (RR) and
  first-come-first-served (FCFS) schedulers, which the original study compares against, are
  not included.
* The refused-High rule (serve Mid/Low next) is an addition of this design.
* The original "init" input, which sets the free space of a buffer, is the reset here. The
  space is fixed by the depth parameters.
* The producers and consumers stand in for the computing resources behind each network
  interface, which are not specified. The original example places producers and latency
  displays at only a few nodes. Here every node has both, and any subset can be enabled.
* The consumer never applies back-pressure.
* There is no multi-flit packet framing. Every flit is self-contained, so "packetizing"
  means splitting data into independently routed flits.
* All cycle timing (three cycles per transaction, one cycle in the producer) is this design's
  choice. The original is a discrete-event model with no clock-level timing.
* Reset is asynchronous and active low.
* Relative size is not reproduced. In an FPGA build of the original classes, the router
  took more gates (about 9,400) than the PBRR scheduler (about 5,800). Here the router holds
  one flit and a small state machine, and the scheduler holds only pointers and tables. After
  generic synthesis the router has more flip-flops (49 against 17) but fewer word-level
  cells (33 against 114). The original router also carried dedicated data lines per
  direction, which this router shares on one bus into the output buffers.

## Files

| file | contents |
|------|----------|
| `rtl/onoc_pkg.sv` | flit, class, port, configuration and statistics types |
| `rtl/onoc_input_buffer.sv` | shared-class input buffer with request/grant/confirm |
| `rtl/onoc_scheduler.sv` | PBRR scheduler with request and availability tables |
| `rtl/onoc_router.sv` | Idle/Data/ComputeRoute router with XY routing |
| `rtl/onoc_output_buffer.sv` | two-sided output FIFO |
| `rtl/onoc_node.sv` | one node |
| `rtl/onoc_producer.sv` | traffic generator and NI |
| `rtl/onoc_consumer.sv` | sink, header stripping, latency statistics |
| `rtl/onoc_mesh.sv` | top level: the mesh |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_onoc_mesh` (end to end at the defaults) and `tb_onoc_buffer_sweep` (the buffer-size workload) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Example with
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_onoc_mesh \
    -y rtl -y tb +libext+.sv -Irtl rtl/onoc_pkg.sv tb/tb_onoc_mesh.sv -o sim
./obj_dir/sim
```

Replace `tb_onoc_mesh` with any other testbench name. `tb_onoc_mesh` runs the full 4x4 design
at its default parameters in a few seconds. `tb_onoc_node` and `tb_onoc_mesh` read a few
internal signals by hierarchical name to count how often each mechanism occurred: High served
ahead of waiting Mid/Low requests, refused grants, full input buffers and stalled producers.

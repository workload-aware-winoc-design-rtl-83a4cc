# Traffic-aware reconfigurable wireless hubs for an 8x8 hybrid NoC

A 64-core mesh network-on-chip is split into four 4x4 subnets. Each subnet
has one wireless hub with three millimetre-wave transceivers. Each
transceiver has a fixed point-to-point channel to a hub in another subnet.
So a packet can jump between subnets in one wireless hop, instead of
crossing the mesh hop by hop.

A hub is wired to all sixteen routers of its subnet, but only three of them
are linked to it at any time. The usual approach puts the wireless access
at fixed routers. That is a poor fit when traffic moves around the chip, for
example while tasks migrate between cores. In this design the three links
of every hub are chosen at run time:

1. Each router reports the packets it has to drop because a downstream
   buffer stayed full.
2. When every subnet has seen enough drops, a small neural network runs.
   Its input is an 8x8x3 snapshot of recent traffic.
3. The network scores every router, and the three best routers of each
   subnet become that hub's new links.
4. Each link switches only at a moment when no packet is cut in half.

The RTL covers everything that is specific to this scheme:

- the hub;
- the wireless channels, as a model;
- the additions each wired router needs;
- the wireless-aware routing decision;
- the traffic monitor;
- the drop-counting trigger;
- the neural network engine.

The conventional wormhole router (input buffers, two virtual channels,
crossbar, link handshake and drop timeout) is not part of this RTL. Its
interfaces to the wireless parts are ports of the top level, `winoc_top`.

## Numbering

| thing | encoding |
|---|---|
| node | 6 bits `{y[2:0], x[2:0]}`, x grows east, y grows south |
| subnet | `{y[2], x[2]}`: 0 north-west, 1 north-east, 2 south-west, 3 south-east |
| router inside a subnet (R0..R15) | `{y[1:0], x[1:0]}` |
| flit (`flit_t`) | `{type[1:0], dst[5:0], src[5:0], data[31:0]}`; type HEAD, BODY, TAIL or HEADTAIL |
| packet | 4 flits |

`winoc_pkg` holds these types and the helpers `subnet_of`, `local_of`,
`node_of`, `mdist` (Manhattan distance) and `tx_index`.

## The wireless channels

Transmitter `k` of hub `h` (k = 0..2) is paired with receiver `k` of hub
`(h + k + 1) mod 4`. Every hub therefore reaches each of the three others
over its own channel, which makes twelve one-way channels in total. No
channel is shared, so the only arbitration is inside each hub.

`wi_link` is a behavioural model of one transmitter, its channel and the
paired receiver:

- A flit accepted at the transmitter reaches the receiver buffer after
  `LATENCY` = 2 cycles. This cost equals two wired hops, which is the
  ratio of a 16 Gb/s radio to a 32-bit wired link.
- The transmitter accepts a flit only when the receiver buffer has room
  for it plus every flit still in the air. The channel therefore never
  drops a flit.

## The hub (`wireless_hub`)

```
 16 routers ──► 3 x 16:1 MUX ──► Buffer_from_tile[3] ──► 3x3 switch ──► transmitters[3]
 16 routers ◄── 3 x 1:16     ◄── Buffer_to_tile[3]   ◄── 3x3 switch ◄── receivers[3]
                   ▲
             hub_control (allocator, Available_i, priorities)
```

Each of the three slots has:

- a router select;
- a `Buffer_from_tile`, which holds flits from the router on their way to a
  transmitter;
- a `Buffer_to_tile`, which holds flits from a receiver on their way to the
  router.

Each buffer is a 4-flit `flit_fifo`.

**Transmit switch.** The destination subnet of a packet fixes its
transmitter. When two slots want the same free transmitter, the slot
whose router the instruction ranked higher wins. Once a head flit wins, the
transmitter stays with that slot until the tail flit has passed (the
token-hold rule), so packets never interleave on a channel.

**Receive switch.** A received packet goes to the slot linked to its
destination router. If that router is not linked (its hub link changed
while the packet was in flight), the packet goes to the linked router
nearest to the destination instead, and travels the rest of the way over
wires.

### Relinking without cutting packets

The `hub_control` allocator takes a 12-bit instruction: three 4-bit router
numbers, the most wanted in bits [11:8].

**Choosing slots.** A router that is already linked keeps its slot. Only
the slots whose router was dropped from the instruction take new routers.
Linking R1, R2, R4 followed by an instruction for R2, R7, R1 therefore
changes one MUX, not three.

**Available_i.** A slot whose router changes waits in `OUT_i_new` until
its `Available_i` is high. `Available_i` means no packet is part-way
through either of the slot's buffers:

- the to-tile buffer has not handed out part of a packet;
- the from-tile buffer has not taken in part of a packet.

`flit_fifo` tracks this with two flags, `rd_open` and `wr_open`. Each flag
records whether the last flit through that end was a tail. The flags stay
correct when a buffer drains in the middle of a packet, a case a
"buffer is empty" test would get wrong.

**When the select switches.** The MUX select changes in the same cycle as
`Available_i` goes high. `relink` pulses in that cycle, and `busy` stays
high while any slot is still waiting. A slot that keeps its router takes
its new priority rank at once. A relinked slot takes its new rank when it
switches.

**After reset.** Each hub is linked to R5, R6 and R9, the routers at
tiles (1,1), (2,1) and (1,2) of the subnet.

## Router additions (`router_wi_port`)

Only the router linked to a hub sees traffic on its wireless ports:

- **Output_port_WI** carries the router crossbar's wireless-bound flits to
  the hub. It is held not-ready while `wi_sel` is low.
- **Input_port_WI** feeds a DEMUX:
  - a packet for this router leaves at once through a second ejection
    port, **Local2**;
  - any other packet enters the router's local-direction input buffer and
    continues over wires.

The local-direction input buffer is also where the processing element
injects its packets. A MUX shares the buffer between the two sources:

- It switches owner only after a tail flit has been written, so packets
  never mix.
- At a packet boundary the wireless path goes first.
- `wi_wait` shows a wireless packet waiting for a PE packet to finish.

## Routing (`wi_route_compute`)

The rule compares a direct wired path with a path through the hubs. For a
packet at node `c` bound for node `d` in another subnet:

- `W_s` is the router linked to the local hub nearest to `c`;
- `W_d` is the router linked to the destination hub nearest to `d`.

The packet takes the wireless path when

    D(c, d) > D(c, W_s) + D(W_d, d) + 2

where `D` is the Manhattan distance and the `+2` is the wireless hop.
On the wireless path the packet goes XY (x first) to `W_s` and leaves
there through the WI direction. Otherwise it follows plain XY.

Mixing wireless hops with XY can form a cyclic dependency, which can
deadlock. To prevent it:

- a packet that has crossed a wireless link moves into the wired virtual
  channel (`wired_only`);
- a packet in the wired virtual channel never asks for wireless again.

The module is purely combinational. It reads the live hub links, so a
relink changes routing decisions at once.

## Reconfiguration loop

### Trigger (`reconfig_trigger`)

- Each subnet counts the drop pulses of its sixteen routers. Several drops
  in one cycle all count.
- When all four counters have reached `THRESHOLD` (3), `start` pulses and
  the counters clear.
- While a run is still in progress (`hold`: the network is computing or a
  hub still has a pending relink), no new start is issued.

### Traffic snapshot (`traffic_monitor`)

Every `WINDOW` = 100 cycles it latches three 8-bit features per tile:

| feature | what it counts |
|---|---|
| 0, packet duration | sum of the latencies of packets delivered at the tile, divided by 16 |
| 1, throughput | flits the tile's router forwarded |
| 2, cross-subnet frequency | packets the tile sent to another subnet |

Values saturate at 255.

### Neural network (`ann_engine`)

| layer | computation |
|---|---|
| input | 8x8x3 features, unsigned 8 bit |
| convolution | one 2x2x3 kernel, stride 1, giving 7x7 = 49 values; each passes ReLU, `>> 2`, saturation to 8 bits |
| fully connected | 64 neurons over the 49 values; 8-bit signed weights, 16-bit biases |
| output | hard sigmoid `clamp(128 + acc/64, 0, 255)`, one probability per tile |

Output neurons 16s to 16s+15 belong to R0 to R15 of subnet `s`. The three
highest of each group form that subnet's instruction, with the highest in
bits [11:8]. On equal probabilities the lower router number wins.

The work is split over four lanes, standing for the four intelligent nodes
at the centre of the chip:

- Convolution: each lane computes every fourth output, 12 products per
  cycle, which takes 13 cycles.
- Fully connected layer: each lane computes 16 neurons with one
  multiply-accumulate per cycle, which takes 16 x 49 = 784 cycles.
- Selection takes one more cycle.

A run therefore takes 798 cycles from `start` to `done`. `done` loads the
instructions into all four hubs.

Weights are trained off-line and written through `w_we`, `w_addr` and
`w_data`:

| address | contents |
|---|---|
| 0..11 | kernel, index `(dy*2+dx)*3+channel` |
| 12 | convolution bias |
| 64+n | bias of neuron n |
| 128 + 49n + j | weight from convolution output j to neuron n |

Weight storage has no reset, so load all of it before the first run.

## Top level (`winoc_top`)

`winoc_top` instantiates:

- 4 hubs;
- 12 channel models;
- 64 `router_wi_port` and 64 `wi_route_compute`;
- the monitor, the trigger and the network engine.

All per-router signals are arrays indexed by node number.

| parameter | default | meaning |
|---|---|---|
| `BUF_DEPTH` | 4 | hub buffer and receiver depth, in flits |
| `WI_LATENCY` | 2 | wireless hop, in cycles |
| `THRESHOLD` | 3 | drops per subnet that start a reconfiguration |
| `WINDOW` | 100 | traffic sampling window, in cycles |

## Departures and limits

- **Wired routers are not included.** Link latency, throughput and packet
  drops therefore come from outside the RTL. The wireless path and the
  reconfiguration loop are complete.
- **Where the network engine runs.** The neural network is one engine with
  four lanes. It is not spread over four routers that exchange partial
  results as packets. Traffic features reach it through event ports, not
  as packets on the network.
- **Feature definitions.** How the three features are counted and scaled
  is this design's own choice.
- **Number formats.** The network's formats, the ReLU and the hard sigmoid
  are this design's own choices, as is the tie rule of the top-3 selection.
- **Available_i is stricter.** A to-tile buffer whose first flit is a head
  flit still waiting to be read also counts as busy. Relinks can therefore
  wait a few cycles longer than a bare head/tail test would allow, but
  never cut a packet.
- **Threshold meaning.** "The threshold is exceeded" is implemented as
  "the counter has reached `THRESHOLD`".
- **Channel pairing and receive-side fallback.** The pairing rule and the
  nearest-router fallback described above are this design's choices.
- **Reset links.** The R5, R6, R9 links after reset are this design's
  choice.

## Simulation

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_winoc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/winoc_pkg.sv tb/tb_winoc_top.sv
./obj_dir/Vtb_winoc_top
```

`tb_winoc_top` runs the whole design at its default parameters, in a few
seconds of simulation. It:

1. loads network weights that lead to known instructions;
2. sends wireless packets that end at Local2, and one that is handed to a
   neighbour router while its processing element is mid-packet;
3. makes two packets compete for one transmitter;
4. starts a reconfiguration by pulsing drops in all subnets, while a
   half-sent packet holds one slot.

It then checks:

- the instructions;
- the deferred relink;
- the 798-cycle run time;
- a packet over a new link.

It also counts each mechanism and fails if any of them never occurred.

`tb_winoc_traffic` drives the full design with synthetic traffic, also at
the default parameters, in about five seconds of simulation. The wired
mesh is a behavioural model inside the testbench, where a wired leg costs
one cycle per hop and there is no contention. Each processing element
injects 0.028 packets per cycle. The testbench runs four mixes of 21000
cycles each:

| mix | patterns |
|---|---|
| Mix1 | Transpose1 (x,y)→(7−y,7−x) and Transpose2 (x,y)→(y,x), alternating every 4000 cycles |
| Mix2 | Transpose1 and a uniform random pattern, alternating |
| Mix3 | Transpose1, Transpose2 and uniform random, in turn |
| Random | uniform random |

Heads that wait too long at a linked router report drops. Drops start
reconfigurations, so hubs relink while packets are in flight. A packet
whose router loses its link before the head flit is accepted walks on to
the nearest router that is still linked.

The testbench checks:

- every routing decision, against its own evaluation of the distance rule;
- that every wireless packet arrives exactly once, complete and in order;
- that each packet arrives at a legal place: Local2 of its destination, or
  a linked router in the destination subnet.

A typical run moves about 15000 wireless packets per mix, with 4 to 10
reconfigurations per mix. Latency and throughput figures for the whole
network need a real wired router model, which this testbench does not
provide.

The block testbenches (`tb_flit_fifo`, `tb_hub_control`, `tb_wi_switch`,
`tb_wi_link`, `tb_wireless_hub`, `tb_router_wi_port`,
`tb_wi_route_compute`, `tb_reconfig_trigger`, `tb_traffic_monitor`,
`tb_ann_engine`) compare each block with a reference model written in the
testbench.

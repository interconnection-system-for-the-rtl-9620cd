# NetCOPE interconnection system in SystemVerilog

NetCOPE is an FPGA platform for network cards: packets come in from Ethernet
ports, pass through application logic, and have to reach host RAM over PCI,
PCI-X or PCI Express. Data are moved by a DMA controller that software can
program. This RTL implements the three buses that tie such a card together:

* the **internal bus**: 64-bit full-duplex packet links at 125 MHz, for bulk
  data between FPGA components and the PCI bridge;
* the **local bus**: a 16-bit address/data bus for configuration and status
  registers;
* the **control bus**: 16-bit full-duplex packet links that carry short
  messages ("new packet at offset X", "acknowledge") between the DMA
  processor and the components that need DMA.

All three buses are **trees**. A root sits at the top, switches form the
branches, and endpoints are the leaves. Every switch registers its signals,
so a switch is also a pipeline stage. This matters in an FPGA, where a wide
bus that crosses the chip is limited by routing delay. Drawn flat, a chain of
switches is a pipelined bus with one tap per endpoint.

The largest part is the **control bus root**. It is the DMA processor's view
of the control bus: sixteen receive queues and sixteen transmit queues, one
of each per endpoint. They live in two-port memories and are driven through
a small set of pointer registers. Most of this document covers it.

## Files

| file | contents |
|------|----------|
| `rtl/nc_pkg.sv` | shared types: control bus word, local bus link structs, constants |
| `rtl/fl_reg.sv` | two-entry register slice for a packet stream (the pipeline stage) |
| `rtl/fl_arb.sv` | packet-granular round-robin arbiter |
| `rtl/dp_ram.sv` | two-port memory (one write, one synchronous read port) |
| `rtl/ib_switch.sv` | internal bus switch, 1 upstream + 2 downstream links, address routing |
| `rtl/lb_root.sv`, `rtl/lb_switch.sv`, `rtl/lb_endpoint.sv` | local bus master, broadcast switch, slave |
| `rtl/cb_switch.sv`, `rtl/cb_endpoint.sv`, `rtl/cb_root.sv` | control bus switch, endpoint, root with queues |
| `rtl/cb_msg_rx.sv`, `rtl/cb_msg_tx.sv` | control bus message parser and builder for the packet buffers |
| `rtl/buf_reader.sv` | streams a run of words out of a two-port memory at one word per cycle |
| `rtl/sw_rxbuf.sv`, `rtl/sw_txbuf.sv` | software receive and transmit packet buffers |
| `rtl/netcope_ics_top.sv` | the three trees, joined by the two packet buffers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_netcope_ics_top` end to end |
| `tb/cb_stream_*.sv`, `tb/fl_stream_*.sv` | testbench stream drivers and collectors with random gaps and stalls |

## Packet streams

The internal bus and the control bus use the same stream handshake. It is
compatible in spirit with FrameLink and Xilinx LocalLink:

| signal | meaning |
|--------|---------|
| `data` | one word (64 bits on the internal bus, 16 on the control bus) |
| `sop` | first word of a packet, which is always the header |
| `eop` | last word of a packet |
| `src_rdy` | the sender offers a word |
| `dst_rdy` | the receiver can take a word |

A word moves on a clock edge where `src_rdy` and `dst_rdy` are both high.
Either side can pause the transfer at any time. A word that is offered and
not taken stays on the wires unchanged. `fl_reg` asserts this rule on its
output. **All signals are active high here.** FrameLink itself is
active-low, so put inverters at the boundary if you connect FrameLink cores.

`fl_reg` is a two-entry skid buffer. Every output, `in_dst_rdy` included,
comes from a flip-flop, yet it still passes one word per cycle. It is what
turns each switch and endpoint into a pipeline stage.

## Internal bus switch (`ib_switch`)

Each switch has one upstream link (towards the PCI bridge) and two downstream
links. Every link is full duplex, so there are three inputs and three outputs.

Routing uses the **header**, the first word of a packet. In this design,
header bits [31:0] hold the destination address. Downstream port *i* owns the
addresses where `(addr & Pi_MASK) == Pi_BASE`. The defaults give port 0 the
addresses `0x0xxxxxxx` and port 1 the addresses `0x1xxxxxxx`.

| packet arrives from | goes to |
|---------------------|---------|
| upstream | the matching downstream port; dropped if neither port matches |
| branch 0, addressed to branch 1 | straight across to port 1 |
| branch 1, addressed to branch 0 | straight across to port 0 |
| a branch, any other address | upstream |

The cross path lets two endpoints in different branches talk to each other
without using bandwidth on the link above the switch.

Each output has an `fl_arb`. It grants one input for a whole packet and
rotates round robin between packets. Inputs and outputs are register-sliced:
a word takes two cycles through an idle switch, and each output sustains one
word per cycle. At 125 MHz that is 8 Gb/s per direction at `DW = 64`, or
16 Gb/s at `DW = 128`.

The original platform's header carries more control information than this
design uses. This switch routes on the address alone, and it does not
implement internal bus transactions such as reads and completions.

## Local bus (`lb_root`, `lb_switch`, `lb_endpoint`)

The local bus is for register traffic, so only the root starts transactions.
The link is 16 bits wide. Addresses and data are 32 bits and go as two
halves, low half first:

```
write:  DWR  Al  Ah  D0l D0h D1l D1h ...        read:  DWR  Al  Ah
        ADS  1   1                                     ADS  1   1
        WR           1   1   1   1                     RD           1   1   1   1
        RDY          (one per written word, later)     DRD/RDY      (one per word, later)
```

* `ADS` marks the two address halves.
* Each `WR` cycle writes one 16-bit word. Each `RD` cycle asks for one. The
  address counts 16-bit words and goes up by one per word.
* The endpoint answers every word with `RDY`; for a read, `DRD` carries the
  data in the same cycle. The root sends all its words back to back and then
  waits for as many `RDY`s as it sent words. Extra pipeline stages in the
  tree, or registers at an FPGA boundary, therefore only delay the answers.
  No separate bridge is needed to cross between chips.

`lb_switch` does no routing. It copies the root's signals to every downstream
port, one cycle later. It ORs the answers of its ports towards the root, also
one cycle later. This works because an endpoint outside its address window
drives zeros.

`lb_endpoint` owns `2**AW` words starting at `BASE`. It drives a plain memory
port, `u_addr`, `u_wdata`, `u_we` and `u_re`, one cycle after the bus word.
It expects `u_rdata` one cycle after `u_re` and raises `RDY` two cycles after
the bus word.

`lb_root` takes one request at a time (`req_wr`, `req_addr`, `req_len`):

* It pulls write data with `wdata_take`: present the next word on the cycle
  after a take.
* It returns read data on `rdata`/`rdata_vld`.
* It pulses `done` one cycle after the last `RDY`.

There is no time-out. A request to an address that no endpoint owns never
completes.

## Control bus (`cb_switch`, `cb_endpoint`)

The control bus carries 16-bit packet streams. Header bits [3:0] hold an
**endpoint identification**: the destination on the way down, the source on
the way up. This caps the bus at sixteen endpoints. The root can talk to any
endpoint, and any endpoint can talk to the root, but endpoints cannot talk to
each other.

* `cb_switch` (N downstream ports) copies every packet from the root to all
  its ports. A word leaves the switch only when every port has taken it, so
  one slow port holds back the others. In the other direction the switch
  merges its ports' packets whole, round robin. A word takes two cycles
  through an idle switch.
* `cb_endpoint` (parameter `ID`) passes its user only the packets whose
  header carries its own ID, and quietly consumes the others. It writes `ID`
  into bits [3:0] of the header of every packet its user sends, so the user
  cannot spoof its source.

## Control bus root (`cb_root`)

The root sits inside the DMA controller, where a PowerPC runs the DMA
program. The processor does not read the bus directly. Everything the
endpoints send lands in per-source queues in memory that the processor can
cache, and everything it sends goes out of per-destination queues.

```
                 +---------------- cb_root ----------------+
 control bus --->| input slice -> RX memory (16 x 64 items) |---> rxm_addr / rxm_rdata
 (from switch)   |        queue = header[3:0]              |
                 | status/control registers (per queue)    |<--> reg_addr / reg_we / reg_rdata
 control bus <---| output slice <- controller <- TX memory  |<--- txm_we / txm_addr / txm_wdata
 (to switch)     +-----------------------------------------+
```

Each memory holds `NQ * 2**QAW` 16-bit items: 16 queues of 64 items, 1024 x 16
by default, which is one 18 Kbit BlockRAM. Queue *q* occupies addresses
`{q, offset}`. Each queue is a circular buffer with two pointers:

* the **start pointer** is where the next item goes in;
* the **end pointer** is the oldest item not yet consumed.

### Receiving

1. A packet arrives. Its header bits [3:0] (the source endpoint) select the
   RX queue. Its words are written from that queue's start pointer onwards.
2. When the last word is stored, the start pointer and the item count both
   advance by the packet length. Only whole packets ever show up in the
   count.
3. The processor reads the count (`sel 1`) and the pointers (`sel 0`). It
   then reads items from the RX memory at `{q, end + i}`; data come one
   cycle after the address.
4. The processor writes the number of items it consumed to the RX control
   register. The end pointer advances and the count drops.

If a queue has no room for the next word, the root holds `cb_in_dst_rdy`
low. This stalls the whole upstream tree until the processor frees items.
Nothing is dropped. Two caveats follow:

* A packet longer than the queue can never complete.
* One full queue stalls traffic from every endpoint.

Give the queues room for their largest message.

### Transmitting

1. The processor reads the TX start pointer of queue *q* (`sel 2`, low half).
2. It writes the packet into the TX memory at `{q, start + i}`.
3. It writes the packet length to the TX control register. The start pointer
   advances and a send is queued. Each queue can have one send pending. A
   write while the queue is busy (`sel 3` bit 31) is ignored, and so is a
   length larger than the free room.
4. The controller serves the queues with a pending send, round robin. It
   reads the items and writes *q* into header bits [3:0], so the packet
   reaches endpoint *q*. It sends them as one packet, at one word per cycle
   when the bus is not stalling.
5. After the last word the TX end pointer advances and busy clears.

### Register map

`reg_addr = {sel[1:0], queue[3:0]}`. Registers are 32 bits wide, and read
data come one cycle after the address.

| sel | read | write |
|-----|------|-------|
| 0 | `{RX end pointer[31:16], RX start pointer[15:0]}` | number of RX items consumed |
| 1 | RX item count | number of TX items to send (starts a send) |
| 2 | `{TX end pointer[31:16], TX start pointer[15:0]}` | – |
| 3 | `{busy[31], TX free items[30:0]}` | – |

Pointers are `QAW` bits wide and wrap; software must mask them to the queue
size.

## Packet buffers (`sw_rxbuf`, `sw_txbuf`)

The two buffers sit between the network interface, the internal bus and the
control bus. They never decide anything themselves: the DMA processor tells
them, by control bus messages, what to do with each packet.

### Messages

A message is one control bus packet. The header word holds the message type
in bits [15:12] and the endpoint identification in bits [3:0]. One 16-bit
word per parameter follows.

| type | name | direction | parameters |
|------|------|-----------|------------|
| 1 | `NEW_PKT` | receive buffer → processor | offset, length, flags |
| 2 | `SEND_PKT` | processor → receive buffer | offset, host address high, host address low, length |
| 2 | `SEND_PKT` | processor → transmit buffer | offset, length, flags |
| 3 | `ACK` | buffer → processor | offset of the packet just handled |
| 4 | `RELEASE` | processor → receive buffer | number of words to free |

Offsets and lengths count buffer words (`DW` bits). Each buffer holds
`2**BAW` words: 512 x 64 bits, or 4 KiB, by default.

### Reception (`sw_rxbuf`)

1. A packet from the network is written into a circular buffer. With its
   last word the buffer samples `net_in_flags` and sends `NEW_PKT`.
2. The processor answers with `SEND_PKT`, naming a host address. The buffer
   writes the packet to the internal bus: one header word with the address
   in bits [31:0], then the data.
3. After the last word the buffer sends `ACK`.
4. The processor sends `RELEASE`, which frees the oldest words. Packets
   must therefore be released in the order they arrived.

A full buffer stalls the network input. So does a `NEW_PKT` that cannot be
sent yet. Otherwise the buffer takes one word per cycle from the network.
Its internal bus packet also runs at one word per cycle, because the buffer
starts reading its memory while the header word goes out. When an `ACK` and
a `NEW_PKT` both wait, the `ACK` goes first.

### Transmission (`sw_txbuf`)

1. The host side writes the packet over the internal bus. The header's bits
   [BAW-1:0] give the buffer offset, and the data words go to consecutive
   offsets. The buffer never stalls these writes.
2. The processor sends `SEND_PKT` with offset, length and flags. The buffer
   streams the words to the network interface, with the flags alongside.
3. After the last word it sends `ACK`.

The buffer handles one message at a time. A second `SEND_PKT` waits on the
control bus link until the first packet and its `ACK` are out.

In the full platform, a separate DMA controller moves the data and sends the
acknowledgement for the transfer. Here the receive buffer does its own
internal bus write, and its `ACK` stands for that acknowledgement.

## Top level (`netcope_ics_top`)

All parts share the clock and the reset.

* **Internal bus:** one `ib_switch`. Its upstream link, which the PCI bridge
  would drive, is a top port (`ib_up_*`). Downstream port 0 (addresses
  `0x0xxxxxxx`) serves the packet buffers: writes from the host land in
  `sw_txbuf`, and `sw_rxbuf`'s writes go up. In the full platform an
  internal bus endpoint with a bus-master controller sits between the switch
  and the buffers; here the buffers are wired to the port directly.
  Downstream port 1 (addresses `0x1xxxxxxx`) is a top port (`ib_p1_*`), where
  the DMA controller's own internal bus endpoint would attach.
* **Local bus:** `lb_root` → `lb_switch` (2 ports) → two `lb_endpoint`s,
  256 words each, at word addresses `0x000` and `0x100`. The root's request
  port (`lb_req_*`) and the endpoints' user ports (`lbe_*`) are top ports. In
  the full system the request port is driven by the bridge from the internal
  bus.
* **Control bus:** `cb_root` → `cb_switch` with 2 ports. Port 0 feeds
  endpoint 0, the DMA controller's own bus master. Port 1 feeds a second
  `cb_switch` with 3 ports, which feeds endpoints 1, 2 and 3. Those are, in
  that order, the packet buffers' bus master, the transmit buffer and the
  receive buffer. Endpoints 2 and 3 are wired to `sw_txbuf` and `sw_rxbuf`.
  The root's processor side (`cbr_*`) and the user streams of endpoints 0
  and 1 (`cbe_*`) are top ports.
* **Network:** `net_rx_*` feeds the receive buffer, and `net_tx_*` comes from
  the transmit buffer. Both carry 16 flag bits beside the data.

In the full platform these parts also join the buses. None of them is
included:

* the PCI bridge, its DMA engine and the internal bus root;
* the internal-bus-to-local-bus and internal-bus-to-PLB bridges;
* the PowerPC and its memories, and so the DMA program itself: its side is
  the control bus root's user port;
* the bus master of the packet buffers;
* the RocketIO chip-to-chip bridges;
* the network interfaces.

Scatter-gather lists and their formats are not defined here.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog stops a hung run. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nc_pkg.sv rtl/*.sv tb/cb_stream_src.sv tb/cb_stream_sink.sv \
    tb/fl_stream_src.sv tb/fl_stream_sink.sv tb/tb_netcope_ics_top.sv \
    --top-module tb_netcope_ics_top -o sim && obj_dir/sim
```

Replace the last testbench file and `--top-module` to run a single module's
bench. Verilator may warn that the package is declared twice, because the
glob also matches `nc_pkg.sv`; the warning is harmless.

What each testbench covers:

* `tb_ib_switch`: every route at once (across, up, down, dropped) under
  random stalls; order, framing and data per source; one word per cycle on a
  64-word packet.
* `tb_cb_root`: runs at the default size. It covers sorting by source,
  pointers and counts, freeing, a full queue stalling the bus and then
  recovering without loss, three TX queues released together and leaving
  round robin, and wrapping of pointers.
* `tb_cb_switch`, `tb_cb_endpoint`: broadcast under per-port stalls,
  whole-packet merging, pass-through latency, one word per cycle in both
  directions, filtering and source stamping.
* `tb_lb_root`, `tb_lb_endpoint`, `tb_lb_switch`: address halves, word
  counts, read data, RDY timing, silence outside the window, and the one-cycle
  switch delay.
* `tb_sw_rxbuf`, `tb_sw_txbuf`: every message, data and flags through the
  buffer, wrap-around, a full receive buffer stalling the network side,
  messages queued behind a busy buffer, and a 64-word packet passing in and
  out at one word per cycle.
* `tb_netcope_ics_top`: runs the whole top at the default parameters. The
  testbench plays the processor through the root's registers and memories.
  It runs receive flows (network → `NEW_PKT` → `SEND_PKT` → packet at the
  host address on the upstream link → `ACK` → `RELEASE`) and transmit flows
  (host write, once from port 1 across the switch → `SEND_PKT` → packet and
  flags on `net_tx` → `ACK`). It also runs random internal bus traffic,
  local bus transfers, and control bus traffic with endpoints 0 and 1. It
  counts that each mechanism occurs and fails if one never does. The
  mechanisms are cross-branch, up, down and dropped internal bus packets;
  input stalls; local bus writes and reads; endpoint filtering; switch
  merging; the full-queue stall; several pending sends; the receive buffer
  holding back the network input; and the receive and transmit flows.

The simulations run in seconds.

## How far to trust it

The following follow the published description of the platform:

* the three tree-shaped buses, with roots, switches and endpoints;
* switches acting as pipeline stages;
* link widths and the 125 MHz clock;
* the SOP/EOP/SRC_RDY/DST_RDY framing;
* the local bus signal set and the order of address and data halves;
* the local bus switch forwarding to all ports without routing;
* the control bus broadcasting down and merging up, with no endpoint-to-
  endpoint traffic;
* the root's sixteen RX and TX queues in two-port memories, sorted by source
  identification, with start and end pointers, item counts, and control
  registers that consume RX items and launch TX packets;
* the topology of the example DMA connection;
* the message flow of the reception and transmission examples: new packet
  (offset, length, flags), request, acknowledgement, release.

These are this design's own choices, and they are where it is most likely to
differ from the original hardware:

* the header layouts: internal bus address in bits [31:0], control bus
  identification in bits [3:0];
* the address decoding and drop rule of the internal bus switch;
* active-high signalling;
* local bus word addressing, RDY as a per-word acknowledge for writes, and
  the one-cycle endpoint latency;
* the queue size (64 items), the register map, stalling on a full queue, and
  one pending send per TX queue;
* round-robin arbitration everywhere;
* the message encoding, the packet buffer organisation, the buffer size, and
  the receive buffer doing its own internal bus write.

Each RTL file's opening comment says the same for its module.

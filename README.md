# Credit-based network port for FPGA stream computing

Stream computing spreads one deep pipeline over several FPGAs. Data then
has to flow from one board to the next without loss, and a stalled
pipeline stage on the receiving board must be able to stop the sender.
Serial transceiver links and Ethernet switches give neither guarantee. A
MAC drops frames when its buffers fill, and a point-to-point serial link
has no return channel for a "stop" signal.

This RTL is the network port that sits between an FPGA's computing
pipeline and its link IP core (a serial-lite link or a 40 Gb Ethernet MAC).
The port turns the link into a lossless stream channel with backpressure.
The core of the design is a **credit-based flow controller (FC)**:

- The sender may only send data flits for which the receiver has reserved
  buffer space.
- The receiver hands that space back, as "credits", while its application
  drains the buffer.
- In switched mode, every FC packet is wrapped in an Ethernet frame with
  fixed MAC addresses. A layer-2 switch then forwards it like a
  point-to-point connection.

All RTL is SystemVerilog-2017 and synthesizable. The testbenches run on
Verilator 5.

## One port at a glance

```
 application clock                         |  network clock
                                           |
 app_tx ─► width_conv ─► dual_clock_fifo ──┼─► flow_controller ─► frame_encoder ─► link_tx ─► MAC/PHY
                                           |    (fc_tx: TX buffer,                (switched mode only)
                                           |     credit counter)
 app_rx ◄─ width_conv ◄─ dual_clock_fifo ◄─┼── flow_controller ◄─ frame_decoder ◄─ link_rx ◄─ MAC/PHY
                                           |    (fc_rx: RX buffer,
                                           |     credit return)
                                cycle_counter (stall statistics)
```

The top module is `fpga_network_node`. It holds one port. A board with two
links instantiates it twice. The link IP core, the transceivers, the cable
and the switch are not part of this RTL. The top brings their stream
interfaces out as `link_tx_*` (valid/ready, sop/eop/empty) and `link_rx_*`
(valid only: a MAC's receive side cannot be stopped).

`SWITCHED` chooses between two link types:

| `SWITCHED` | link | framing | RX buffer to use |
|---|---|---|---|
| 1 (default) | 40G Ethernet through a switch | 14-byte Ethernet header, pad to 46 bytes | 2048 flits |
| 0 | direct point-to-point serial link | none: FC flits go straight to the IP core | 512 flits |

## The flow-control protocol

### Flits and packets

A **flit** is one `W`-bit word (256 bits by default), moved in one network
clock cycle. The FC sends **packets**: one *control flit* (the header)
followed by `len` *data flits*. The header is 28 bits wide and sits in the
low bits of the control flit. The other bits of the flit are zero.

| flit bits | field | meaning |
|---|---|---|
| 27:16 | `len` | number of data flits that follow (0 for a credit-only packet) |
| 15 | `sop` | the first data flit starts an application message |
| 14 | `eop` | the last data flit ends an application message |
| 13 | `co` | credit-only packet: no payload, only credits |
| 12 | `res` | reserved, sent as 0, ignored |
| 11:0 | `cu` | credit update: receive-buffer slots freed on the sender's side |

The link carries no flag that marks a flit as control or data. The
receiver knows from position alone: the flit after a packet's last data
flit is always the next header.

### The credit loop

The whole protocol rests on one loop:

1. `fc_tx` holds a **credit counter**. It starts at the peer's RX buffer
   depth (`REMOTE_RX_DEPTH`) and drops by one for every data flit sent.
2. At the other end, `fc_rx` writes data flits into its **RX buffer**. The
   application reads that buffer. Each read frees a slot, which `fc_rx`
   counts as one credit owed back (`ret_pending`).
3. The local `fc_tx` puts all owed credits into the `cu` field of the next
   header it sends, whatever kind of packet that is.
4. The original sender's `fc_rx` finds `cu` in that header and adds it to
   its own transmitter's credit counter.

When the receiving application stops reading, credits stop coming back.
The sender's counter then runs down to zero and it stops sending. That is
how the backpressure crosses the link. Because the sender never sends
without a credit, the RX buffer cannot overflow. `rx_overflow` exists only
as a check.

One case needs extra care. A side that has nothing to send still owes
credits, for example the sink of a one-way (half-duplex) stream. Once
`D_CU` credits are owed and no data packet is due, that side sends a
**credit-only packet**: a header with `co = 1` and `len = 0`. So half
duplex needs no mode setting.

### When a data packet leaves

The TX buffer is store-and-forward. A packet starts when one of these holds:

- the buffer holds `D_CU` flits (a full packet);
- the buffer holds the last flit of an application message (EOP). A packet
  never spans two messages, and new input waits until this packet starts;
- flits have waited `FORCE_SEND_CYCLES` cycles without either of the above
  (**force send**). This keeps a slow trickle from sitting in the buffer.

In every case the credit counter must be above zero. A packet is cut to the
credits left, so the sender can use its last credits. The event outputs
report which rule fired: `ev_full_packet`, `ev_eop_packet`,
`ev_force_send`. `ev_credit_stall` is high in each cycle a due packet waits
for credits.

Timing: the header goes out in the same cycle the packet is decided, and
the data flits follow back to back. A full TX buffer takes a new
application flit in the same cycle one leaves. A continuous stream
therefore costs exactly one header cycle per `D_CU` data flits. The
efficiency is `D_CU / (D_CU + 1)`, which is 32/33 on a direct link. In
switched mode each frame also needs one tail flit, which gives 32/34.

### Connection handshake

After reset, neither side knows whether the other is alive, or whether a
switch path exists yet. Until the connection is up, `fc_tx` sends nothing
but **sync flits**:

- the top 32 bits hold `0x53594E43`;
- bit 0 is an acknowledge flag. It is set once this side has itself
  received a sync flit.

`link_up` rises when this side has received a sync flit with the
acknowledge set, and has sent its own acknowledged sync flit (or the
peer's acknowledgement proves that the peer heard it). Before `link_up`,
the receiver drops everything else. After `link_up`, late sync flits are
dropped. Both ends run the same logic, so either may come out of reset
first. The testbench holds one node in reset for 300 cycles to check this.

### Choosing the buffer sizes

Three rules, where `D_link` is the one-way delay in cycles: link latency,
plus TX buffer depth, plus receive write-forward time.

- TX buffer depth = `D_CU`. The packet overhead is `1/(1 + D_CU)`.
- `D_CU` ≤ link latency in cycles, so credits come back in time.
- RX buffer depth > `2·D_link + D_CU`. The receiver must be able to absorb
  everything in flight during one credit round trip.

Example, direct link: 82 cycles latency, `D_CU` = 32, 4 cycles
write-forward. Then `D_link` = 118 and the RX buffer needs more than 268
flits, so 512 is used. Through a switch, the one-way delay is around 1.15
µs, about 180 cycles at 155 MHz. That needs more than about 460 flits, and
2048 leaves room for several switch hops. `D_CU` = 32 keeps the largest FC
packet at 33 × 32 = 1056 bytes, under the 1500-byte Ethernet MTU.

The length and credit fields are 12 bits wide, so `D_CU` and the RX depth
must stay at or below 4095.

## Ethernet framing (switched mode)

`frame_encoder` puts a 14-byte header in front of each FC packet:
destination MAC, then source MAC, then type/length. The packet itself is
the frame payload, unchanged. The MAC IP core adds preamble and FCS.

Bytes go most significant byte first. The header therefore fills the top 14
bytes of the first output flit, and every payload flit straddles two output
flits. The encoder keeps the low 14 bytes of each input flit in a carry
register and sends them at the top of the next output flit:

```
input :  [ P0 (32 B) ][ P1 ] ... [ P(N-1) ]
output:  [ HDR 14 | P0 hi 18 ][ P0 lo 14 | P1 hi 18 ] ... [ P(N-1) lo 14 | pad/unused ]
```

- A packet of N flits leaves as N+1 flits. `in_ready` is low during the
  tail flit.
- `out_empty` gives the unused bytes of the last flit.
- Type/length holds the payload length in bytes before padding.
- Payloads under 46 bytes are zero-padded up to the Ethernet minimum. In
  practice only a credit-only packet is that short: 32 bytes, padded to 46.

`frame_decoder` does the reverse:

1. It reads type/length to learn how many payload flits follow.
2. It rebuilds each payload flit from the carry and the top 14 bytes of the
   next input flit.
3. It drops the padding up to the end of the frame.

The decoder has no buffer and no backpressure. It delivers one flit per
input flit, combinationally. A frame that ends before its length field
says sets the sticky `frame_error`. Flits already passed on are not
recalled. A MAC discards frames with a bad checksum, so this flag should
never rise on a working link.

Both modules need `W` ≥ 256 bits and a whole number of bytes. This makes
sure a one-flit packet plus header fits in two flits.

## Clock domains and width conversion

The computing pipeline runs on its own clock (`app_clk`, up to 225 MHz in
the reference platform). The FC, the framing and the link run on the link
IP core's clock (`net_clk`). For example, this is about 155 MHz for 40G
Ethernet with a 256-bit bus.

- `dual_clock_fifo` (16 entries by default) crosses the two domains in each
  direction. It uses Gray-coded pointers with two-flop synchronisers and a
  first-word-fall-through read port.
- `width_conv` sits on the application side. It adapts the pipeline's word
  (`APP_W`, n × 32 bytes for n parallel pipelines) to the 256-bit flit.
  - Narrowing sends slices least significant first.
  - Widening packs words the same way. A message that ends inside a group
    closes that group early, and its unused upper slices are zero.
  - With `APP_W = W` (the default) it is a single register stage.

The FC passes messages through with their framing intact. `app_tx_sop`
and `app_tx_eop` arrive unchanged as `app_rx_sop` and `app_rx_eop` at the
other end.

## Status and counters

All status outputs are in the `net_clk` domain:

- `link_up`: the connection handshake is done.
- `credits`: the current credit counter.
- `rx_count`: the RX buffer fill.
- `rx_overflow`, `frame_error`: sticky error flags.
- One-cycle event pulses: `ev_full_packet`, `ev_eop_packet`,
  `ev_force_send`, `ev_credit_only_tx`, `ev_credit_only_rx`,
  `ev_credit_stall`, `ev_frame_rx`.
- `cycle_counter`, two 48-bit saturating counters:
  - `cnt_total` counts the network cycles since `link_up`;
  - `cnt_stalls` counts the cycles in which the FC refused a flit that the
    application offered.

  `1 - cnt_stalls/cnt_total` is the stream's utilisation. `cnt_clear`
  zeroes both counters.

## Parameters of `fpga_network_node`

| parameter | default | meaning |
|---|---|---|
| `W` | 256 | flit width (link datapath) |
| `APP_W` | 256 | application word width (32 bytes per unit pipeline) |
| `TX_DEPTH` | 32 | TX buffer depth; keep equal to `D_CU` |
| `D_CU` | 32 | largest data packet, and credits owed before a credit-only packet |
| `RX_DEPTH` | 2048 | local RX buffer depth (use 512 for direct links) |
| `REMOTE_RX_DEPTH` | `RX_DEPTH` | peer's RX depth, the credit counter's start value |
| `FORCE_SEND_CYCLES` | 64 | waiting time before a partial packet is forced out |
| `SWITCHED` | 1 | 1: Ethernet framing; 0: direct link |
| `MTU` | 1500 | largest frame payload in bytes (checked by an assertion) |
| `APP_FIFO_DEPTH` | 16 | depth of each clock-crossing FIFO (power of two) |
| `SRC_MAC`, `DST_MAC` | locally administered example addresses | set per port to match the switch setup |

Both ends of a link must agree on `W`, `D_CU` and the two RX depths.

## Where this RTL departs from, or adds to, the reference design

The protocol follows a published description. These points are choices
made here:

- **Credit return.** The reference returns a credit message every `D_CU`
  RX buffer reads. Here, every header carries all credits owed so far, and a
  credit-only packet goes out only when `D_CU` are owed and no data is due.
  Under load, credits therefore return sooner than once per `D_CU` reads.
  The buffer-sizing rule above still holds.
- **Receive write-forward** is 1 cycle here, not 4: the RX buffer is a
  first-word-fall-through register array. The 4 in the sizing example
  describes a vendor FIFO.
- **Sync flit encoding and the acknowledge bit.** The reference asks only
  for a unique bit pattern repeated until the link is established. The
  pattern, the acknowledge bit and the exact `link_up` condition are this
  design's.
- **Packet rules.** The force-send period is not specified and is
  arbitrarily set to 64 cycles. This design also adds two rules of its
  own: a packet is cut to the credits left, and it never spans two
  messages.
- **Header bit positions** within the flit, the Ethernet byte order, the
  type/length meaning (unpadded length) and zero padding are this design's.
- **Width converter and cycle counters.** Only their purpose was given. The
  simplest working form was built.
- **The clock-crossing FIFO's** depth and structure are this design's.

Not included, because they are vendor IP, external equipment, or
application logic whose contents are not defined here:

- the serial-lite and 40G Ethernet MAC/PHY cores;
- the Ethernet switch;
- DDR controllers, DMA engines and PCIe;
- the stencil processing pipelines;
- the floating-point stream compression used on the links;
- bundling two links into one logical channel. How a stream is split
  across the links and put back together is not defined here.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_fc_tx` | 64-bit flits, small buffers, 70 % link-ready. A reference model tracks every packet, header field and the credit count. |
| `tb_fc_rx` | header/data separation, credit extraction, SOP/EOP rebuild, credit return per read, sync-flit handling |
| `tb_flow_controller` | two FCs, 128-cycle link, `D_CU` = TX = 128, RX 512. Full rate is 128/129. Reading every other cycle gives 0.5 with the credit counter hitting 0. A stopped reader never overflows the buffer. |
| `tb_frame_encoder` | packets of 1–40 flits: byte-exact frames, padding, `empty`, output backpressure |
| `tb_frame_decoder` | random frames with extra pad flits and a truncated frame |
| `tb_dual_clock_fifo` | 4.4 ns vs 6.4 ns clocks: exact full/empty, order, no loss |
| `tb_width_conv` | 512→256, 256→512, 256→1024 with random handshakes, framing, full-rate checks |
| `tb_cycle_counter` | counts against a model, clear priority, saturation |
| `tb_fpga_network_node` | two ports at **default parameters** behind a 203-cycle switch model, see below |
| `tb_fpga_network_node_direct` | the same scenario with `SWITCHED = 0`, RX 512, an 82-cycle link and 512-bit application words |
| `tb_stream_workloads` | single 32 B, 4 KB and 1 MB transfers, timed over a switched link and a direct link, plus a TX buffer depth sweep (see below) |

The end-to-end test runs these phases in order:

1. staggered reset and handshake;
2. four 1024-flit messages each way;
3. random messages;
4. one-way traffic, which forces credit-only packets;
5. a receiver that stops and then reads every other cycle, which drains the
   sender's credits to zero;
6. a 2 % trickle, which needs force send.

It checks every flit's content and its SOP/EOP. It counts each mechanism and
fails if one never happened. Measured rates:

- 0.941 flits/cycle switched, against the 32/34 bound;
- 0.969 flits/cycle direct, against the 32/33 bound.

The test takes a few seconds in Verilator.

`tb_stream_workloads` runs six node pairs side by side. Each pair sends one
message and times it from the first flit written to the last flit read.

| link | clock | one-way delay | 32 B | 4 KB | 1 MB | 1 MB bandwidth |
|---|---|---|---|---|---|---|
| switched | 154.99 MHz | 126 cycles (0.81 µs) | 0.88 µs | 1.94 µs | 225.7 µs | 4.65 GB/s (bound 4.67) |
| direct | 150.81 MHz | 53 cycles (0.35 µs) | 0.41 µs | 1.47 µs | 224.7 µs | 4.67 GB/s (bound 4.68) |

The link model has no MAC preamble, inter-frame gap or serial-lane
framing, so real links deliver less: about 4.4 GB/s through a 40G MAC and
4.3 GB/s over the serial-lite link. A 4 KB message pays one extra
store-and-forward fill of 32 cycles before its first full packet leaves.
Subtracting the link delay from the 32 B time leaves the time spent in
the two nodes: about 0.06 µs switched and 0.05 µs direct. The reference
hardware measured a node latency of 0.336 µs with Ethernet framing and
0.245 µs without. Those numbers include the vendor MAC and FIFO cores, which
are not modelled here.
Streams far longer than 1 MB (hundreds of MB per simulation step) behave
like the 1 MB case. They were not simulated because of run time.

The same testbench also repeats the single-transfer timing on the direct
link with three TX buffer depths. Each depth is also the packet size `D_CU`.

| TX depth | 4 KB | 128 KB |
|---|---|---|
| 32 | 2.78 GB/s | 4.58 GB/s |
| 64 | 2.45 GB/s | 4.62 GB/s |
| 128 | 2.44 GB/s | 4.58 GB/s |

Short messages favour the small buffer. The TX buffer is store-and-forward,
so a deeper buffer waits longer before its first packet leaves. On long
streams the depths converge, since the header costs only 1/33 to 1/129 of
the link. This is why 32 is the default. The reference design
measured this on two bundled links. Only one link is modelled here.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv -Irtl \
    rtl/fc_pkg.sv tb/tb_fpga_network_node.sv --top-module tb_fpga_network_node
./obj_dir/Vtb_fpga_network_node
```

Replace the testbench name to run the others. The RTL alone lints cleanly
with `verilator --lint-only -Wall`, apart from two kinds of warning:

- unused package constants;
- the reset being marked as used both asynchronously and synchronously.
  That second use is only the `disable iff` of the assertions.

## Files

- `rtl/fc_pkg.sv`: header and Ethernet types, constants.
- `rtl/fc_tx.sv`, `rtl/fc_rx.sv`, `rtl/flow_controller.sv`: the flow
  controller.
- `rtl/sync_fifo.sv`: TX/RX buffer.
- `rtl/frame_encoder.sv`, `rtl/frame_decoder.sv`: Ethernet framing.
- `rtl/dual_clock_fifo.sv`, `rtl/width_conv.sv`, `rtl/cycle_counter.sv`:
  application-side support.
- `rtl/fpga_network_node.sv`: the top.
- `tb/`: testbenches, plus the traffic source/sink, the link delay model
  and the timed node pair (`tb_transfer_pair`) they share.

# EPEE USB core: one board bus, three services to the accelerator

A software-defined radio accelerator on an FPGA needs three things from its host:
- register access;
- bulk transfer of whole frames in both directions;
- interrupts.

With PCIe, the link provides all three. A USB 3.0 evaluation board offers none of them. It offers one 32-bit data bus shared by both directions, plus two flags that say whether the board holds downlink data and whether it has room for uplink data.

This core turns that single bus into the same user interface a PCIe core would present:
- a PIO register bus with request/acknowledge;
- 16-channel frame DMA through FIFOs, host-to-FPGA (H2F) and FPGA-to-host (F2H);
- three interrupt lines with request/acknowledge.

An accelerator written against these ports does not need to know which link it sits behind.

The core does this with a small packet protocol on top of the bus. Every transfer in either direction is a packet: one header double word (DW, 32 bits) followed by a payload. A bus controller decides which direction owns the bus. The receive side sorts packets by type. The transmit side merges everything the core wants to send into one uplink stream.

The design follows the EPEE 3.0 host-FPGA communication framework. The block structure, the user port list, the 32-DW descriptors, the TP codes, the 16 channels and the fetch-on-request DMA policy come from it. Bit-level formats, the bus policy, the register map, FIFO depths and handshake details are this design's own; they are listed at the end.

## Block map

```
             +-------------------+   rx words   +--------------+  DMA pkts  +-----------------+
 USB board --| usb_trans_control |------------->| usb_rx_engine|----------->| dma_ds_selector |--> dma_h2b_engine
  bus        | (bus direction)   |              +--------------+            +-----------------+    (H2F DMA)
             |                   |                 |  PIO wr  | PIO rd
             |                   |                 v          v
             |                   |        pio_wr_logic     pio_rd_logic --> user PIO read bus
             |                   |           |   \-> user PIO write bus   \ (completions)
             |                   |           v                             \
             |                   |      epee_reg_file (ids, doorbells,      \
             |                   |      interrupt enable/clear, counters)    \
             |                   |   tx packets  +---------------+            |
             |                   |<--------------| usb_tx_engine |<-----------+  priority 1
             +-------------------+               |               |<-- dma_us_selector <-- dma_h2b_engine
                                                 |               |      (round robin)  <-- dma_b2h_engine (F2H DMA)
                                                 |               |<-- intr_intf          priority 3
                                                 +---------------+
```

`epee_usb_top` wires these blocks together. `epee_fifo` is the one FIFO used everywhere: show-ahead, with a power-of-two depth. `epee_pkg` holds the packet header type, the packet type codes, the register map and the TP codes.

One clock, `clk_usr`, runs everything, the board bus included. Reset `rst_n` is asynchronous and active low.

## Packets

Each packet starts with a header DW (`pkt_hdr_t`):

| bits | field | meaning |
|---|---|---|
| 31 | dir | 0 host to FPGA, 1 FPGA to host |
| 30:28 | ptype | packet type, below |
| 27:24 | chan | DMA channel, or interrupt source |
| 23:16 | rsvd | zero |
| 15:0 | len | payload DWs that follow the header |

| ptype | name | direction | payload |
|---|---|---|---|
| 0 | DATA | both | part of a data frame |
| 1 | CTRL_DESC | down | 32-DW control descriptor |
| 2 | H2F_STAT | up | 32-DW status descriptor of an H2F frame |
| 3 | H2F_REQ | up | none: "send me the next frame of channel `chan`" |
| 4 | PIO_WR | down | address, data |
| 5 | PIO_RD | down: address; up: read data | |
| 6 | INTR | up | none; `chan` = 0 H2F, 1 F2H, 2 user defined |
| 7 | F2H_STAT | up | 32-DW status descriptor ending an F2H frame |

The receive engine (`usb_rx_engine`) checks each header:
- the type must be a downlink type;
- the length must fit the type: PIO write 2, PIO read 1, and at least 1 for a DMA packet.

A packet that fails is consumed and counted (`bad_cnt`).

DMA packets then pass through `dma_ds_selector`. It forwards a packet only if its channel and type are what the H2F engine is waiting for at that moment, and a descriptor only if it is exactly 32 DW. Anything else is consumed and counted (`drop_cnt`). The routing decision is made on the first payload word and held for the rest of the packet.

### Descriptors

Descriptors are 32 DW. The first four DW belong to the core and the other 28 to the user:

| DW | contents |
|---|---|
| 0 | FRAME_ADDR (used by chained DMA on PCIe; ignored here) |
| 1 | [31:24] TP (low nibble 4'b0101 for USB, 4'b0100 for PCIe), [23:16] QN (channel), [15:0] reserved |
| 2 | NEXT_DESC_ADDR (PCIe only; ignored here) |
| 3 | LEN, frame length in bytes |
| 4..31 | user defined |

The H2F engine reads only LEN. It rounds LEN up to whole DWs, and that many data DWs make up the frame. Status descriptors use the same layout. The H2F engine takes the channel of a status packet from the QN field of the status descriptor the accelerator wrote. The accelerator may therefore already be working on another channel when the status goes out.

## Sharing the bus (`usb_trans_control`)

The board bus model is:
- `usb_dq_i`, `usb_dq_o` and `usb_dq_oe`: the shared data bus;
- `usb_rx_flag`: the board has downlink data;
- `usb_tx_flag`: the board can take an uplink word;
- `usb_rd` and `usb_wr`: one-cycle strobes. A downlink word is valid on `usb_dq_i` in the cycle `usb_rd` is high. An uplink word is taken in the cycle `usb_wr` is high.

The controller has four states: RX, TURN_TX, TX and TURN_RX. Each direction change costs one idle cycle, in which the data bus changes driver. The policy:
- An uplink packet is never cut. Once its first word is written, the bus stays in TX until its last word, even if the board holds downlink data. The host's packet parser can therefore assume contiguous packets.
- At a packet boundary in TX, the bus turns to RX as soon as the board has downlink data.
- In RX, the bus turns to TX when the core has something to send and either the board has no more downlink data or RX_BURST (256) words have been read since the turn. This keeps a steady downlink stream from starving interrupts and PIO completions.
- `usb_rd` is only raised when the receive engine can take the word, so downlink back-pressure reaches the board.

Assertions check that a turn never splits an uplink packet and that `usb_rd` and `usb_wr` are never high together. `turn` pulses on each direction change for monitoring.

## Host-to-FPGA DMA (`dma_h2b_engine`)

No frame is buffered ahead of a request. A frame is fetched only when the accelerator asks for it. Frames can therefore be far longer than the on-chip FIFO (16 KB frames pass through a 4 KB FIFO), at the cost of one host round trip per frame.

1. The host writes the H2F doorbell register: channel in [19:16], number of new frames in [15:0]. The engine keeps a count per channel. `h2f_indication[c]` is high while channel c has frames waiting.
2. The accelerator waits for `h2f_ready`, chooses a channel from `h2f_indication` (which one is its decision), puts it on `h2f_qnum`, and raises `h2f_req`.
3. The engine raises `h2f_ack` and holds it until `h2f_req` falls. `h2f_err`, valid with the ack, is set if the channel had no frame waiting; the accelerator then starts again.
4. On an accepted request the engine decrements the count and sends an H2F_REQ packet for the channel.
5. The host answers with a CTRL_DESC packet. Its 32 DW go to the control descriptor FIFO (`h2f_cd_*`).
6. The host then sends the frame as DATA packets of any size. The DWs go to the data FIFO (`h2f_df_*`), and `h2f_df_last` marks the frame's last DW. Extra DWs beyond LEN are dropped.
7. The accelerator writes its 32-DW status descriptor into `h2f_sd_*`. Once 32 DW are in that FIFO, the engine sends them as an H2F_STAT packet, independent of steps 2–6.
8. The accelerator may then raise the H2F interrupt.

One frame is in flight at a time. `h2f_ready` returns once the frame's last DW has entered the data FIFO.

## FPGA-to-Host DMA (`dma_b2h_engine`)

The F2H side mirrors the H2F handshake:
- The host posts free buffers per channel through the F2H submit register.
- `f2h_indication` shows channels with a free buffer.
- `f2h_req`, `f2h_qnum`, `f2h_ack` and `f2h_err` behave as on the H2F side. An accepted request uses up one buffer.

After that the accelerator writes the frame into `f2h_df_*`, marking the last DW, and then 32 status DWs into `f2h_sd_*`. There is no control descriptor FIFO on this side.

The hardest part is framing. A packet header carries its length, so the engine must know a packet's length before sending its first word. The frame itself may be longer than the FIFO:
- The write side counts each frame's DWs and pushes the count into a small length FIFO when the last DW is written.
- While no count is queued, every DW in the data FIFO belongs to the current, unfinished frame. The engine then sends only full packets of MAX_PKT_DW (256) DW, each once all of it is in the FIFO.
- Once the count is known, the remainder goes out in packets of at most 256 DW.
- The 32-DW F2H_STAT packet follows.

The accept side and the sending side are decoupled. Accepted channels wait in a four-entry FIFO, and `f2h_ready` stays high while that FIFO has room. The accelerator can therefore write the next frame while the previous one is still leaving. Frames and status descriptors go out in the order the requests were accepted.

Because at most four frames are outstanding, the four-entry length FIFO cannot overflow; an assertion checks this. The accelerator must write only frames it has been granted, and in grant order.

## PIO and the register file

`pio_wr_logic` and `pio_rd_logic` carry out PIO_WR and PIO_RD packets.

Address bit 17 selects the target:
- Bit 17 set: the core's own register file, `epee_reg_file`, at word address [7:0]. The access completes in one cycle.
- Bit 17 clear: the accelerator's PIO bus, with the 17-bit address [16:0] on `pio_wr_addr`/`pio_rd_addr`.

The user bus uses a four-phase handshake:
1. The core drives address (and write data) and raises `*_req`.
2. The accelerator raises `*_ack`; for a read, `pio_rd_data` must be valid in the first ack cycle.
3. The core drops `*_req`.
4. The core waits for `*_ack` to fall before the next request.

An accelerator can therefore take as many cycles as it needs. Every read, of either space, returns a PIO_RD completion packet: the header plus one data DW.

| word | name | access | contents |
|---|---|---|---|
| 0 | ID | RO | [31:28] TP = 4'b0101, [27:0] version 0x0003000 |
| 1 | INT_EN | RW | [2:0] interrupt enables: H2F, F2H, user defined |
| 2 | INT_CLR | W1 | [2:0] clear a raised interrupt |
| 3 | INT_PEND | RO | [2:0] interrupts sent and not yet cleared |
| 4 | H2F_DOORBELL | WO | [19:16] channel, [15:0] frames added |
| 5 | F2H_SUBMIT | WO | [19:16] channel, [15:0] buffers added |
| 6 | H2F_IND | RO | `h2f_indication` |
| 7 | F2H_IND | RO | `f2h_indication` |
| 8 | ERR_CNT | RO | [31:16] malformed packets, [15:0] dropped DMA packets |
| 9 | SCRATCH | RW | free |

## Interrupts (`intr_intf`)

There are three sources: H2F, F2H and user defined. Each has `int_enable` (from INT_EN), `int_req` (from the accelerator) and `int_clr` (to the accelerator). They are brought out as 3-bit vectors, with bit 0 = H2F, 1 = F2H and 2 = user defined.

The cycle for one source:
1. The accelerator raises `int_req[i]`.
2. The core sends one INTR packet with `chan = i` and marks the interrupt pending.
3. The host clears it through INT_CLR.
4. The core raises `int_clr[i]` as the acknowledgement and holds it until `int_req[i]` falls.

A source cannot raise a second interrupt before the host has seen the first, and none is lost. When several are waiting, the lowest number goes first.

## Uplink ordering (`usb_tx_engine`, `dma_us_selector`)

The uplink has three packet sources:
- PIO read completions;
- DMA packets, which `dma_us_selector` merges from the two engines, round robin, one whole packet at a time;
- interrupts.

`usb_tx_engine` serves them in that priority order and never interleaves packets.

Interrupts come last on purpose. An H2F interrupt announces a status descriptor, so it must not reach the host before that descriptor's packet.

## Where this departs from, or adds to, the framework description

The framework gives the block structure, the user signals, the descriptor size and fields, the TP codes, the 16 channels and the DMA policy. The following are choices made here:

- **Packet format.** Only the header's contents (direction, type, channel, length) are given. The bit positions, the type codes and the H2F_REQ packet are this design's.
- **Bus model.** The board bus is modelled as a single-cycle flag/strobe bus of 32 bits, on the core clock. A real CYUSB3014 slave FIFO interface has its own timing, latencies and watermark flags. It needs an adapter, or changes in `usb_trans_control`, which is the only block that sees the bus.
- **Descriptor layout.** The descriptor figure puts TP and QN in the upper bytes of the first 64-bit row and LEN in the upper half of the second. Each 64-bit row is taken as two DWs, low DW first. LEN is taken to be in bytes.
- **Register map, doorbells and error counters** are this design's. So is the use of address bit 17 to reach them.
- **PIO signal directions.** The interface table lists the PIO address, data and request as inputs, while it lists the DMA and interrupt signals the core drives as outputs. Because the host starts PIO accesses, this core drives address, data and request, and the accelerator answers.
- **`h2f_err`** is raised for a request on a channel with no frame waiting. The framework does not say when it is raised.
- **The F2H ports** are modelled on the H2F ones, since the framework says they are almost the same.
- **The PIO interface block** shown next to the register file is folded into the two PIO logic blocks, because the read and write buses are separate.
- **FIFO depths** are 1024 DW for data and 64 DW (two descriptors) for descriptors. The F2H packet size is 256 DW. The framework gives none of these.
- **Not included:** the PCIe version (transaction-layer packet handling, chained DMA, the vendor PCIe core), and the USB board and host software themselves. The testbench models the board and the host.

## Performance at default parameters

The rates below assume a 100 MHz clock and the 32-bit board bus, which is 3.2 Gbps raw. For comparison, the framework's published USB 3.0 results are 2.56 Gbps host-to-FPGA and 2.40 Gbps FPGA-to-host.

`tb_usb_frame_sizes` uses an always-ready board and a host that answers at once. It runs 1 KB, 8 KB and 15.8 KB frames, submitted 1 to 8 at a time:

| frames | H2F | F2H |
|---|---|---|
| 1 KB | 2.25 Gbps | 2.34 Gbps |
| 8 KB | 3.04 Gbps | 3.04 Gbps |
| 15.8 KB | 3.11 Gbps | 3.10 Gbps |

What costs bandwidth:
- **H2F, per frame:** the H2F_REQ packet, the 33-DW control descriptor, the 33-DW status packet, and four bus turns.
- **H2F, per packet:** one header.
- **F2H:** one header per 256 DW.
- **F2H, 1 KB frames:** a 256-DW frame fits in one packet, and that packet can only leave once it has been written completely.

`tb_epee_usb_top` has a phase with a busy accelerator model and random host packet sizes. There, 16 KB H2F frames reach 2.72 Gbps.

After synthesis, the whole core is about 1,140 flip-flops and 72.8 kbit of FIFO memory:
- two data FIFOs of 1024 DW (the H2F one 33 bits wide, to carry the last flag);
- descriptor FIFOs of 64 × 32 bits.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_epee_usb_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/epee_pkg.sv tb/tb_epee_usb_top.sv
./obj_dir/Vtb_epee_usb_top
```

To run another testbench, replace the top module and file name. `tb_epee_usb_top` runs the whole core at its default parameters in about ten seconds.

It uses a host/board model and an accelerator model. Together they exercise:
- PIO to both spaces;
- H2F and F2H frames of random length between 1 and 16 KB on several channels;
- all three interrupt types;
- refused requests on both DMA sides;
- a stray DMA packet and a malformed packet;
- mixed two-way traffic that forces the RX_BURST yield;
- the throughput phase above.

At the end it prints how often each mechanism occurred (bus turns, board stalls in both directions, burst yields, refusals, interrupts, multi-packet frames) and counts a failure for any that never happened.

`tb_usb_frame_sizes` gives the throughput table above, also at default parameters.

The unit testbenches shrink FIFO depths, packet size or RX_BURST where that makes the corner cases quick to reach.

Simulation uses two-state values, and nothing relies on X. Every register that is read has a reset value.

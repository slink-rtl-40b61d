# SLink controller in SystemVerilog

SLink is a lightweight serial link that joins two chips point to point. It
is built for the case where a full routed stack such as PCIe costs too much
latency and area. One chip, S0, programs a small set of registers. The link
then copies a block of up to 512 KB from S0's memory into the memory of the
other chip, S1, or copies a block from S1 back. Data travel in short
packets: a single 64-bit header, the data and an optional CRC. The packets
go over one, two or four 8b10b-coded lanes. With CRC enabled, the receiver
answers each packet with RIGHT or ERROR. The sender then retransmits on
its own from its transmit buffer, with no software involved.

This repository holds one end of the link, `slink_top`. It covers the
transaction layer (registers and an AXI3 DMA engine), the data link layer
(framing, CRC-16, retransmission, lane striping and lane synchronization)
and the digital half of the physical layer (8b10b). The serializer and
the LVDS pins, i.e. the SerDes, are not included. They connect to a 20-bit
parallel symbol port per lane.

```
            reg port                                   AXI3 master (64 bit)
               |                                              |
         +-----------+   start/config   +-----------------------------------+
         | slink_regs|----------------->|             slink_dma             |
         +-----------+<-----------------| sequencer, AXI read/write engines |
                          done          +-----------------------------------+
                                          | header+data           ^ header     ^ data
                                          v                       |            |
                            +---------------+  +--------------+   |     +--------------+
                            | slink_tx_link |<>| slink_buffer |   |     | slink_buffer |
                            | hdr, CRC,     |  | (Tx, 512 KB) |   |     | (Rx, 512 KB) |
                            | retry, K-codes|  +--------------+   |     +--------------+
                            +---------------+                     |            ^
                                  |   ^ RIGHT/ERROR          +---------------+ |
                                  |   +----------------------| slink_rx_link |-+
                                  v                          | crc check,    |
                           +----------------+                | header decode |
                           | slink_dispatch |                +---------------+
                           +----------------+                        ^
                                  v                          +----------------+
                           +----------------+                | slink_assemble |
                           |  slink_phy  TX |                +----------------+
                           |  8b10b encode  |                        ^
                           +----------------+  +------------+ +------------+
                                  |            | slink_phy  |>| slink_sync |
                                  v            | RX decode  | +------------+
                           tx_sym[4][20]       +------------+
                                                     ^
                                               rx_sym[4][20]
```

## Operations and programming

S0 always starts an operation and S1 only answers. S1 needs no programming
at all: it takes the lane count, the CRC setting and the addresses from the
headers it receives.

| Register | Offset | Contents |
|---|---|---|
| CTRL | 0x00 | bit 0 `SOFT_RESETN` (resets to 1; 0 holds everything but the registers in reset), bit 1 `GTPS` (lane rate, 0 = 2.5 Gbps, 1 = 5 Gbps, driven out on `phy_rate`), bit 4 `START` (write 1 to start; reads 0) |
| HDR | 0x04 | low half of the header: bit 0 request type (0 write, 1 read), bit 4 CRC enable, bits 7:5 lane mode (0 x1, 1 x2, 2 x4), bits 23:8 length in 64-bit words |
| RADDR | 0x08 | remote address: the write destination in S1, or the read source in S1 |
| LADDR | 0x0C | local address: the write source in S0, or the read destination in S0 |
| STATUS | 0x10 | bit 0 BUSY, bit 1 DONE, bit 2 LINK_UP, bits 15:8 retransmissions by this end, bits 23:16 CRC errors found by this end's receiver (both cleared by START) |

The software sequence is as follows:

1. If the lane rate changes, write CTRL = 0 first. This resets the link
   layers and makes the link retrain.
2. Write HDR, RADDR and LADDR.
3. Write CTRL = `SOFT_RESETN | GTPS<<1 | START`, e.g. 0x11 at 2.5 Gbps.
4. Poll STATUS until bit 0 clears.

Addresses are byte addresses and must be 8-byte aligned. START is ignored
while BUSY is set.

When an operation counts as finished:

* **Write without CRC:** when the last symbol of the packet (END) has left
  S0. The data may still be on its way into S1's memory.
* **Write with CRC:** when S1 has answered RIGHT. S1 sends RIGHT only
  after the checked data has been written to its memory, so by then the
  data is in place. ERROR answers are handled in hardware and make S0 send
  the packet again. There is no retry limit and no timeout.
* **Read:** when all the returned data is in S0's memory.

## Packets

Every packet begins with a 64-bit header control word:

| Bits | Field |
|---|---|
| 63:32 | remote address |
| 31:24 | reserved |
| 23:8 | data length, in 64-bit words (up to 65535, just under 512 KB) |
| 7:5 | lane mode: 0 x1, 1 x2, 2 x4 |
| 4 | CRC enable |
| 3:2 | packet type: 0 request, 1 CRC response, 2 read data |
| 1 | reserved |
| 0 | request type: 0 write, 1 read. In a CRC response: 0 RIGHT, 1 ERROR |

There are four packet kinds:

* **Write request:** the header, then `length` data words, then, with CRC,
  one CRC word whose bits 15:0 hold the CRC.
* **Read request:** the header only, with no CRC word even when CRC is
  enabled.
* **Read data:** S1's answer to a read request. It is built exactly like a
  write request, with packet type 2. S1 sends it in the lane mode and CRC
  setting of the request, and S0 writes the data to LADDR.
* **CRC response:** the header only, with packet type 1. It is sent in the
  lane mode of the packet it judges.

The CRC is CRC-16 with polynomial x^16 + x^15 + x^2 + 1 (0x8005). It starts
at 0 and folds in every 64-bit word, MSB first, from the header through the
last data word. There is no reflection and no final XOR.

On the lanes each packet is framed by K-codes:

| K-code | Value | Use |
|---|---|---|
| COM, K28.5 | 0xBC | training pattern after reset |
| IDL, K28.3 | 0x7C | between packets; on lanes the current mode does not use |
| STP, K27.7 | 0xFB | start of packet |
| PAD, K23.7 | 0xF7 | filler inside a packet while the next data word is not yet ready |
| END, K29.7 | 0xFD | end of packet |

## Lanes and symbols

The datapath is 64 bits wide. Each lane carries 16 bits per clock, as two
8b10b symbols, so one clock moves 20 line bits per lane. At 2.5 Gbps per
lane the clock is therefore 125 MHz, and at 5 Gbps it is 250 MHz. The
whole controller runs on this one clock.

`slink_dispatch` splits each 64-bit word as follows:

* **x4:** one clock. Lane *l* gets bits [16*l*+15 : 16*l*].
* **x2:** two clocks. Lanes 0 and 1 get bits 31:0, then bits 63:32.
* **x1:** four clocks on lane 0, starting with bits 15:0.

A K-code takes one clock and fills both symbol slots of every lane in use.
Within a lane, byte [7:0] is the first symbol: it sits in `tx_sym[l][9:0]`
and goes on the line first. Each symbol is `abcdei fghj` with `a` in bit 9.

The receiver needs no lane-mode setting. `slink_assemble` looks at the
clock that carries STP. If lanes 0-3 all carry it, the packet is x4; if
lanes 0 and 1 carry it, x2; otherwise x1. The words are then rebuilt in the
same order they were sent.

## Link training

After a reset, each transmitter sends COM on all four lanes.
`slink_sync` marks a lane synchronized after `SYNC_CNT` consecutive clocks
of COM, and the link is up when all four lanes are. The transmitter keeps
sending COM for `TRAIN_CYCLES` more clocks after its own receiver is up,
so the far end also sees enough COM. Then both ends send IDL.

A synchronized lane may see COM again after other symbols. This means the
far end has been reset, for example by a lane-rate change on S0 alone. The
lane then drops its sync and counts again, so the link retrains without
software on the other side. The SerDes is assumed to deliver
symbol-aligned 10-bit codes.

## CRC check and retransmission

This is the most involved part of the design. It spans `slink_tx_link`,
`slink_rx_link` and the two buffers.

**Sender (`slink_tx_link`).** The DMA engine hands over the header and then
streams the data words as AXI reads return them. Each word goes into the
Tx buffer while the CRC runs alongside. The framer sends STP and the
header at once. It then sends each data word as soon as the buffer holds
it, filling gaps with PAD, so a packet is already on the lanes before its
last word has been read from memory. The CRC word and END follow. The Tx
buffer keeps the whole packet.

**Receiver (`slink_rx_link`).** With CRC enabled, the data words are written
to the Rx buffer but not yet *committed*, so the DMA write engine cannot see
them. At END the received CRC word is compared with the CRC computed over
the words received:

* **Match:** the words are committed and flow on to memory. A RIGHT
  response is sent once the DMA write engine reports that all of them are
  in memory (`slink_top` holds it back until then).
* **Mismatch:** the words are discarded and an ERROR response is requested.

Without CRC, every word is committed as it arrives (bypass, cut-through).

**Responses.** The receiver's transmit side sends the response as soon as
it is between packets. On ERROR, the original sender *rewinds* its Tx
buffer to the start of the packet and sends it again. The DMA engine is
not involved, and memory is not read again. A response can arrive before
the sender has finished sending the packet, because the error may lie in
an early word. Such a response is held and acted on after END. Every
retransmission is counted in STATUS[15:8] of the sender. Every CRC
failure is counted in STATUS[23:16] of the receiver.

In a read, the data packet travels from S1 to S0. S0 therefore checks the
CRC and answers, and S1 retransmits.

Because CRC-checked data are held until the whole packet has passed, a
CRC write moves data to memory in one block at the end. This makes a CRC
write clearly slower than a bypass write (see the timings below).

## DMA engine and memory side

`slink_dma` is an AXI3 master with a 32-bit address and 64-bit data. It has
no ID signals. It issues INCR bursts of at most 16 beats and never crosses a
4 KB boundary. Each direction has one burst outstanding at a time. RRESP
and BRESP are ignored.

The engine contains:

* **A sequencer.** It runs the operation started from the registers and the
  read requests that arrive from the far end.
* **A read engine.** It reads memory and feeds the transmit side.
* **A write engine.** It writes to memory as soon as the Rx buffer holds
  committed words. A header that arrives while the previous packet is
  still being written (possible after a write without CRC) waits in a
  one-entry register. Its data queue behind the earlier data in the Rx
  buffer.

Both buffers (`slink_buffer`) are 65536 × 64 bits by default, enough for the
largest packet, so the buffers never run full.

## Performance

The table shows `tb_slink_modes` results for 512-byte transfers, with
memory latency 4 clocks. Latency runs from the first source read on AXI to
the first destination write. T runs from the same read to the last
destination write. Clock counts do not depend on the lane rate. One clock
is 8 ns at 2.5 Gbps and 4 ns at 5 Gbps.

| Mode | latency, no CRC | T, no CRC | latency, CRC | T, CRC |
|---|---|---|---|---|
| x1 | 21 clocks | 272 clocks | 279 clocks | 352 clocks |
| x2 | 19 clocks | 144 clocks | 149 clocks | 222 clocks |
| x4 | 18 clocks | 100 clocks | 102 clocks | 175 clocks |

Without CRC, the first word is written to the far memory about 20 clocks
after it was read, whatever the lane count. With CRC, nothing is written
until the whole packet has been checked.

Reads take the same number of clocks as writes. The same testbench also
moves the largest packet, 65535 words, both ways in x4 at 5 Gbps. A write
with CRC takes 167945 clocks, because the data reaches memory only after
the whole packet has been checked. A read without CRC takes 90123 clocks. The x1 figure at 5 Gbps
is 3.76 Gbit/s of payload, 94 % of the 4 Gbit/s left after 8b10b. The x4
case is limited by the AXI read bursts, not by the lanes.

## Where this design departs from, or adds to, the protocol definition

* **One clock domain.** The protocol places the transaction layer on a slower
  clock (100 MHz) than the link, with the buffers bridging the two domains.
  Here a single clock drives everything, so the buffers are synchronous
  RAMs.
* **Register bits.** The reference programming sequence adds the rate bit,
  SOFT_RESETN (value 1) and START (1 << 4) into one CTRL word. That would
  put the rate bit on top of SOFT_RESETN. This design moves GTPS to bit 1.
* **Length unit.** The 16-bit length is taken as a count of 64-bit words,
  which is what makes the stated 512 KB maximum reachable.
* **Own choices.** The protocol does not fix these, so this design chooses
  them:
  * packet type codes;
  * how RIGHT/ERROR is coded in a response;
  * CRC polynomial, start value and bit order;
  * CRC word layout;
  * that the CRC covers the header;
  * how a read is answered (a data packet of type 2);
  * use of PAD inside packets;
  * COM training rule;
  * lane-mode detection from STP;
  * symbol order within a lane.
* **Module boundaries versus layers.** In the protocol's layering, building
  the header and its CRC and analysing received headers belong to the
  transaction layer, and checking the CRC belongs to the data link layer.
  Here both sides of that boundary live in `slink_tx_link` and
  `slink_rx_link`. A received header is decoded as it arrives, ahead of its
  data, so that the DMA engine knows the address before the first word
  leaves the Rx buffer.
* **Simplified physical layer.** The 8b10b decoder does not check running
  disparity, and comma alignment is left to the SerDes.
* **One operation at a time.** There is no arbitration if both ends start
  operations together. There is no response timeout, no retry limit and
  no interrupt output: completion is polled.
* **Not included.** The SerDes/PIPE, the processors and memories of the two
  chips, and the bus bridge that carries register accesses.

## Files

| File | Contents |
|---|---|
| `rtl/slink_pkg.sv` | K-codes, header struct, packet and register constants, CRC word update |
| `rtl/slink_top.sv` | one end of the link |
| `rtl/slink_regs.sv` | function registers |
| `rtl/slink_dma.sv` | sequencer and AXI3 master |
| `rtl/slink_tx_link.sv` | packet framing, CRC generation, retransmission, training |
| `rtl/slink_rx_link.sv` | header decode, CRC check, response requests |
| `rtl/slink_crc16.sv` | running CRC-16 over 64-bit words |
| `rtl/slink_buffer.sv` | packet buffer with commit / discard / rewind |
| `rtl/slink_dispatch.sv` | lane striping |
| `rtl/slink_assemble.sv` | lane gathering and lane-mode detection |
| `rtl/slink_sync.sv` | per-lane COM synchronization |
| `rtl/slink_phy.sv`, `slink_enc8b10b.sv`, `slink_dec8b10b.sv` | 8b10b for four lanes |
| `tb/tb_axi_mem.sv` | AXI3 slave memory model with fixed read latency and a 4 KB check |
| `tb/tb_ref_pkg.sv` | bit-serial CRC reference |
| `tb/tb_slink_<block>.sv` | self-checking test of each block |
| `tb/tb_slink_top.sv` | two controllers back to back with error injection |
| `tb/tb_slink_modes.sv` | all 24 modes at 512 bytes, with timing |

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/slink_pkg.sv \
    tb/tb_slink_top.sv --top-module tb_slink_top
./obj_dir/Vtb_slink_top
```

Replace `tb_slink_top` with any other testbench name.

`tb_slink_top` builds two controllers at their default sizes, including the
full 512 KB buffers, each with its own memory model. A channel between
them can flip one bit. The test covers:

* writes and reads in x1, x2 and x4;
* a corrupted write and a corrupted read answer, each of which must be
  retransmitted once;
* a transfer across a 4 KB page;
* a lane-rate change that resets S0 alone;
* eight operations in random modes and lengths, each started as soon as
  the previous one ends.

Every destination word is compared with the source. The test also counts
CRC RIGHT and ERROR responses, retransmissions, PAD clocks, the packets of
each lane mode, 4 KB burst splits and retraining, and each of these must
occur at least once.

Some block testbenches shrink parameters to run faster: the buffer depth,
`TRAIN_CYCLES` and `SYNC_CNT`. The top-level testbenches use the defaults.

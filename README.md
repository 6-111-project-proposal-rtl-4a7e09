# Network-attached RGB laser projector

A laser projector draws a picture by steering one beam with two galvanometer
mirrors (x and y) and modulating red, green and blue laser diodes, point after
point, fast enough that the eye sees a still image. This design lets such a
projector take its pictures straight from an Ethernet network: the network
stack runs in FPGA logic instead of on a processor. Frames of
(x, y, r, g, b) points arrive as UDP datagrams over 100 Mbps Ethernet. They
are collected in a double-buffered point memory and then scanned out to five
DACs over five SPI buses that run at the same time.

The network side also handles enough of the protocols to be a well-behaved
host on a LAN, and through a gateway on the internet. It answers ARP, keeps a
small ARP cache and a routing table, and answers ping.

Everything is synthesizable SystemVerilog in one clock domain: the 50 MHz
RMII reference clock of the Ethernet PHY.

```
 RMII RX ─► mac_rx ─► ethertype_demux ─┬─► arp_engine ───────────────┐
  (2 bit)   (FCS)      (dst MAC,        │     │ learn   ▲ req         │
                        EtherType)      │     ▼         │             ▼
                                        │  arp_cache ◄─ route_table   itp_tx_arbiter ─► mac_tx ─► RMII TX
                                        │     │ MAC       ▲ next hop  ▲
                                        └─► ipv4_rx ─┬─► icmp_echo ───┘
                                           (checksum,│
                                            protocol)└─► udp_laser_rx ─► framebuffer ─► display_ctrl ─► 5 × spi_dac
                                                          (points)       (2 banks)      (scan, blank)    x y r g b
```

## The ITP stream: how the blocks talk

Every link in the network stack carries the same byte stream, the
Intermodule Transport Protocol (ITP). It is AXI-stream-like, but it has a
*pause* where AXI has a *ready*, and it is framed by *valid* rather than by a
`last` flag. The types are in `itp_pkg.sv`.

* **valid is the packet envelope.** It rises with or before the first byte
  and falls after the last. A packet ends when valid falls. Valid must then
  stay low across at least one clock edge, so two packets can never merge.
* **A byte moves in a clock where valid = 1 and pause = 0.**
* **Receive streams (`itp_rx_t`) flow one way only.** The sender drives
  pause: "the packet is still running, but no byte this clock". The MAC
  delivers one byte every four clocks (100 Mbit/s at 50 MHz), so three clocks
  in four are paused. Every layer can run as a pipeline without buffers.
* **Transmit streams (`itp_tx_t` plus a separate `pause`) have
  backpressure.** Here pause is driven by the receiver. The sender holds data
  and valid until pause is low.
* **Receive streams also carry an end-of-packet status, `done` and `ok`.**
  Both are valid in the first clock after valid falls. The Ethernet FCS is
  known only after the last byte, so a layer has often handed bytes on
  before it knows whether the frame was intact. `done`/`ok` passes the
  verdict up the stack. Each layer ANDs in its own checks, and the top
  layer acts on the verdict: ARP answers only intact requests, ICMP only
  replies to intact pings, and the framebuffer rewinds corrupted datagrams.

Most receive-side blocks register their output, so each layer adds one clock
of latency. A layer strips its header by holding pause high during the
header bytes. It raises its own valid once it has decided to forward the
payload. A packet it rejects never raises valid downstream, so nothing above
ever sees it.

## Ethernet MAC (`mac_rx`, `mac_tx`, `crc32_dibit`)

The PHY interface is RMII: `crs_dv`/`rxd[1:0]` in, `tx_en`/`txd[1:0]` out,
with one dibit per 50 MHz clock and the low bit first.

* `crc32_dibit` advances the CRC-32 register (polynomial 0x04C11DB7, preset
  to ones, MSB-first "BZIP2" form) by two wire bits per clock. Fed with the
  bits in wire order, this form gives exactly the IEEE 802.3 FCS.
  * The transmitter sends the complemented register, bit 31 first.
  * The receiver runs data and FCS through the register and expects the
    constant residue 0xC704DD7B.
* `mac_rx` waits for the preamble, syncs on the SFD's final `11` dibit and
  packs four dibits into each byte. It delays bytes by four so that the FCS
  never leaves the MAC. When `crs_dv` falls, `ok` reports whether the residue
  matched and the frame held a whole number of bytes. The RMII habit of
  toggling `crs_dv` at the end of a frame, while the PHY drains its FIFO, is
  not handled: `crs_dv` is taken as a clean frame envelope.
* `mac_tx` sends the preamble and SFD, then the frame. It pads the frame with
  zeros to 60 bytes, appends the FCS and waits a 48-clock inter-packet gap.
  It takes the first byte on the last SFD dibit and then one byte every four
  clocks. The wire cannot stall, so a sender must always have its next byte
  ready within four clocks. Every sender in this design builds its frame
  from registers or a RAM, so this always holds.

## Layers 2 and 3 (`ethertype_demux`, `ipv4_rx`, `arp_engine`, `icmp_echo`)

* `ethertype_demux` keeps frames sent to `MY_MAC` or to broadcast. It steers
  the payload to ARP (0x0806) or IPv4 (0x0800) and shows the sender's MAC on
  `src_mac`.
* `ipv4_rx` sums the header's 16-bit words as they stream past, options
  included. It accepts the packet only if all of these hold:
  * the sum is 0xFFFF and the version is 4;
  * the packet is not a fragment;
  * it is addressed to `MY_IP` or to 255.255.255.255.

  It cuts the payload to the IP total length, which removes Ethernet
  padding. Protocol 1 goes to ICMP and protocol 17 to UDP. ICMP has no
  EtherType of its own, so the IPv4 receiver, not the layer-2 demux, sends
  it to the ICMP block.
* `arp_engine` takes the 28-byte ARP body and acts on packets whose target
  address is `MY_IP`:
  * It writes the sender's address pair to `arp_cache`.
  * For a request, it sends a 42-byte reply (the MAC pads it).
  * On `req_en` it broadcasts a request for `req_ip`.
* `icmp_echo` writes an echo request into a `MAX_LEN`-byte RAM and runs two
  one's-complement sums as it goes:
  * a sum over the whole message, which checks the request;
  * a sum over bytes 4 on, which becomes the reply checksum, because the
    reply's type/code word is zero.

  Once the packet is known to be intact, `icmp_echo` asks `route_table` for
  the next hop and `arp_cache` for its MAC, through one combinational path.
  It then builds the whole reply frame itself: the Ethernet header, an IPv4
  header with a new checksum and TTL 64, ICMP type 0, and the echoed bytes.

  If the next hop's MAC is unknown, the reply is dropped and `ping_no_route`
  pulses. The top turns that pulse into an ARP request for the next hop, so
  the next ping gets through. There is no queue for the dropped packet.

  `icmp_echo` also checks Time Exceeded messages (type 11). A router sends
  one when it drops one of our packets because its TTL ran out. A good one
  pulses `ttl_exceeded` on the top, with the router's address on
  `ttl_exceeded_from`. Messages that arrive while a reply is being sent are
  not seen.
* `route_table` is a small RAM of (network, mask, gateway) entries. The
  first match in index order wins, so put specific routes at lower indices.
  A gateway of 0.0.0.0 means the destination is on-link. At reset, entry 0 is
  the local /24 and entry 1 is the default route through `GATEWAY`. The write
  port on the top can rewrite any entry at run time.
* `arp_cache` is fully associative. It updates a known address in place and
  replaces entries round robin. Entries never age.
* `itp_tx_arbiter` grants the MAC to one sender (ARP or ICMP) for a whole
  packet, round robin, and pauses the other.

## Laser points (`udp_laser_rx`, `framebuffer`, `display_ctrl`, `spi_dac`)

**Wire format.** UDP datagrams to port `LASER_PORT` (7000) carry points of
ten bytes each: x, y, r, g and b as 16-bit big-endian words. The low 12 bits
of each word go to the DAC. Bit 15 of x marks the last point of a frame. A
frame may span any number of datagrams. The UDP checksum is not checked,
because the Ethernet FCS already covers the datagram.

**Double buffering with rewind.** `framebuffer` holds two banks of `DEPTH`
points.
* The network writes one bank and the display scans the other.
* A bank is *filled* when a last-flagged point arrives or the bank is full.
* Each datagram ends with `wr_commit` (FCS good) or `wr_abort` (FCS bad). An
  abort moves the write pointer back to where the datagram began.
* The commit that closes a filled bank swaps the banks.

So the display only ever shows a whole frame, built only from intact
datagrams. An outage or a corrupted packet mid-frame leaves the previous
picture on screen.

**Scan-out.** `display_ctrl` reads one point every `POINT_CLKS` clocks
(1667, which is 30 k points/s at 50 MHz) and loops over `0 .. frame_len-1`.
It starts all five `spi_dac` masters in the same clock, so x, y, r, g and b
change together. Until the first frame arrives it sends a blank point: the
beam is centred and all three lasers are off.

**SPI word.** Each `spi_dac` sends a 16-bit word: 4 command bits (`CMD`,
default `0011`), then 12 data bits, MSB first, in SPI mode 0. A half period
of SCLK is `CLK_DIV` clocks, which gives 12.5 MHz by default. cs_n rises
after the last bit to latch the DAC. A point takes 66 clocks on the buses,
far below `POINT_CLKS`.

The analog stages after the DACs are not logic and are not part of this
RTL:
* x and y: offset about mid-rail, then an adjustable gain into the bipolar
  galvo inputs;
* r, g and b: scaled from 0–3.3 V up to the laser drivers' 0–5 V.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `MY_MAC` | 02:00:00:00:00:01 | station MAC |
| `MY_IP` | 192.168.1.50 | station IPv4 address |
| `LOCAL_NET` / `LOCAL_MASK` | 192.168.1.0 / 255.255.255.0 | reset on-link route |
| `GATEWAY` | 192.168.1.1 | reset default route |
| `LASER_PORT` | 7000 | UDP port for points |
| `ARP_ENTRIES` | 8 | ARP cache size |
| `ROUTE_ENTRIES` | 4 | routing table size |
| `ICMP_MAX_LEN` | 1480 | largest echo request answered (1500-byte MTU) |
| `FB_DEPTH` | 1024 | points per bank |
| `POINT_CLKS` | 1667 | clocks per point (30 k points/s) |
| `SPI_CLK_DIV` | 2 | clocks per SCLK half period |

The 12-bit DAC width is `laser_pkg::DAC_BITS`.

The only fixed numbers are the protocol constants and the PHY: 100 Mbps
full duplex on RMII at 50 MHz. All of the defaults above are choices made
for this design, not values the interfaces require.

## What is not here

* **TCP.** The laser data uses UDP, which is unreliable. Lost datagrams are
  tolerated because a frame is only shown when it is complete. A retransmitting
  transport would replace `udp_laser_rx` on the same ITP stream.
* **ICMP errors.** The design receives Time Exceeded messages but never
  sends them or any other ICMP error. It is an endpoint and never forwards,
  so it never decrements a TTL.
* **Deferred ARP.** A packet waiting for ARP resolution is not kept. A
  retried ping is answered, but the first one is lost.
* **Reassembly.** IP fragments are dropped.
* **Outside the FPGA.** The Ethernet PHY, the DACs and the op-amp stages are
  not modelled.

## Simulating

Every module in `rtl/` has a self-checking testbench in `tb/`, named
`tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M`. The testbenches
check against models written independently of the RTL, in
`tb/eth_tb_pkg.sv`:
* a byte-reflected CRC-32;
* frame, IPv4, ARP, ICMP and UDP builders;
* the Internet checksum.

They also check the rates: one byte per four clocks, one point per
`POINT_CLKS`, and the SPI word time.

`tb_laser_projector_top` runs the whole design at its default parameters
over RMII and five SPI slave models. It covers:
* blanking before the first frame;
* ARP replies and ARP requests;
* pings from the LAN and from beyond the gateway, before and after the
  gateway's MAC is known;
* a frame with a bad FCS;
* two replies contending for the MAC;
* two laser frames, one arriving in halves and one hit by a corrupted
  datagram, with no tearing;
* a routing-table rewrite at run time;
* a Time Exceeded message from a router beyond the gateway.

It counts each of these events and fails if any of them never happens. It
runs in well under a second.

`tb_full_frame_line_rate` also uses the default top. It sends a full
1024-point bank as seven back-to-back UDP datagrams at 100 Mbit/s. It
checks that the bank swaps once, with `frame_len` = 1024, within 20 clocks
of the burst ending on the wire, and that all 1024 points then come out of the DACs in
order.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
  rtl/itp_pkg.sv rtl/laser_pkg.sv tb/eth_tb_pkg.sv \
  tb/tb_laser_projector_top.sv --top-module tb_laser_projector_top
./obj_dir/Vtb_laser_projector_top
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. To run the
test of a single block, swap in that block's testbench file and top-module
name, for example `tb/tb_framebuffer.sv` and `tb_framebuffer`.

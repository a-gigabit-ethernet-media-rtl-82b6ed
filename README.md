# Gigabit Ethernet MAC for processor-free TCP/UDP streaming

This is a gigabit Ethernet media access controller that pushes a continuous
32-bit data stream from FPGA logic to a PC, with no processor or software
stack on the FPGA side. The user logic writes words into an AXI Stream port.
The controller cuts the stream into packets and puts Ethernet, IPv4 and TCP
or UDP headers in front of them. The frames leave through the RGMII pins of an
external gigabit PHY. Data the PC sends back comes out of a second AXI Stream
port. A small register file on an AXI4 port holds the settings, and it can
also write the PHY's registers over MDC/MDIO.

The controller comes in two versions, chosen by the `PROTOCOL` parameter of
`gbmac_top`:

* **UDP**: each packet goes out as soon as it is complete. Nothing is
  acknowledged.
* **TCP**: the controller is a TCP *client*. It opens a connection to one fixed
  server and streams the packets as a numbered byte sequence. It acknowledges
  the server's data, and it closes the connection at the end of the stream.

Both versions answer ARP requests for their own IP address, so the PC can
find the board's MAC address. All addresses and ports are fixed at
elaboration (module parameters).

In simulation, at line rate, the design delivers 116 MB/s of TCP payload and
117 MB/s of UDP payload with 1024-byte packets. That is about 93% of the
125 MB/s raw line rate. Only Ethernet framing is lost:

    payload / (preamble 8 + header + payload + FCS 4 + gap 12)
    TCP: 1024 / 1102 * 125 MB/s = 116.2 MB/s     UDP: 1024 / 1090 * 125 MB/s = 117.4 MB/s

With the largest packet size, 1500 bytes, back-to-back TCP segments reach 118.8 MB/s.

## Block structure

```
            clk_user                                   clk_125 / rgmii_rxc
 s_axis ──► axis_in_fifo ──► pkt_create_tcp  ──AXIS──► temac ───GMII──► gmii_to_rgmii ──► RGMII pins
 (32 bit)   (payload +       or pkt_create_udp ◄─AXIS── │  async FIFOs  ◄──GMII──
            descriptors)     ├ frame_tx                 │  temac_tx / temac_rx
 m_axis ◄────────────────────┘ rx_frame_parser          └ miim_master ─────────────────► MDC / MDIO
                                                              ▲
 AXI4 ──► mm_config_regs (clk_mm) ── cfg, phy_write ──────────┘  (+ packet_size, enable → clk_user)
```

| Clock | Frequency | What runs on it |
|---|---|---|
| `clk_user` | ≥ 31.25 MHz (100 MHz in the testbenches) | user streams, input FIFO, packet creation |
| `clk_125`, `clk_125_90` | 125 MHz, 0° and 90° | GMII transmit. `clk_125_90` only drives the TXC pin. |
| `rgmii_rxc` | 125 MHz from the PHY | GMII receive |
| `clk_mm` | 10 MHz typical | AXI4 registers, MIIM master |

The minimum user clock comes from the line rate: 125 MB/s divided by 4 bytes
per word is 31.25 MHz. The clocks are inputs; a PLL outside this RTL makes
them.

`rst` is asynchronous and active high. Each domain has its own
synchronizer (`sync_bits`) that releases the reset synchronously. The words
`packet_size` and `enable` cross from `clk_mm` to `clk_user` through
two-flop synchronizers. Each bit crosses on its own, so change
`packet_size` only while `enable` is low. The status word crosses back the
same way. It is made of the TCP state, the underrun flag and the overflow
flag.

## Input FIFO and packet descriptors (`axis_in_fifo`)

The TCP checksum sits in the header, but it covers the payload that follows
it. A streaming design that sends the header first therefore needs the
payload's sum before the payload goes out. The input FIFO solves this. It
stores the user words in a RAM FIFO (`sync_fifo`). While a packet is being
stored, it adds the packet's 16-bit halves in one's complement. When the
packet is complete, it pushes a **descriptor** into a second small FIFO:
`{length in bytes, payload sum, end of stream}`.

* A packet is complete after `packet_size` bytes, or earlier when the user
  asserts `tlast`.
* `packet_size` is rounded down to a multiple of 4.
* `tlast` also marks the end of the whole stream.
* `s_axis_tready` drops when either FIFO is full. This back-pressure is the
  only flow control toward the user.

The packet creation block starts a frame only when a descriptor is present.
By then the whole payload is already in the FIFO, so a frame never waits for
data halfway through. This matters because the MAC cannot pause a frame on
the wire.

Sizes: 1024 payload words (two packets of 1500 bytes) and 8 descriptors.

## Packet creation

### Frame layout and word alignment (`frame_tx`)

Frames travel as 32-bit words, with the first byte in bits [31:24]. The
headers are fixed-size, with no IP or TCP options:

| Frame | Header bytes | Contents |
|---|---|---|
| UDP data | 42 | Ethernet 14 + IPv4 20 + UDP 8 |
| TCP segment | 54 | Ethernet 14 + IPv4 20 + TCP 20 |
| ARP reply | 42 | Ethernet 14 + ARP 28 |

All three header lengths are 2 bytes past a word boundary. `frame_tx` sends
the header's whole words first, then realigns the payload:

* each outgoing word is the previous FIFO word's low half followed by the
  next FIFO word's high half;
* the frame ends with one half word (`tkeep = 4'b1100`, `tlast = 1`).

One barrel stage does all the alignment. A frame of `n` payload words takes
`hdr_words + n + 1` clocks. The MAC pads short frames (an ARP reply, a pure
ACK) to 60 bytes.

IPv4 fields: version 4, IHL 5, TOS 0, DF set, TTL 64. The identification
counts up by one per frame. The header checksum is computed per frame from
the header constants, the length and the identification.

### UDP version (`pkt_create_udp`)

When streaming is enabled and a descriptor is waiting, the block sends one
datagram. The header is constant except for:

* the two length fields, which follow the packet length;
* the IPv4 identification;
* the IPv4 header checksum.

The UDP checksum is sent as 0, which IPv4 allows and which means "not
computed". Frames follow each other back to back.

### TCP version (`pkt_create_tcp`)

The TCP block is a client with a deliberately small state machine:

```
 CLOSED ──enable──► SYN_SENT ──SYN+ACK (ack = 1)──► ESTABLISHED ──sent end-of-stream packet──► DRAIN
                                                                                                │ all data acknowledged
 CLOSED ◄──!enable── DONE ◄──FIN acknowledged── FIN_WAIT ◄──────── send FIN|ACK ◄──────────────┘
```

**Sequence numbers.** The initial sequence number is 0, so the SYN carries
SEQ 0. Packet `k` carries SEQ `1 + k*N`, and the FIN carries `1 + X*N`.
The connection is complete when the server acknowledges `2 + X*N`.

**Flags.**

* Data segments carry ACK|PSH, and with it the current receive
  acknowledgement.
* The FIN carries FIN|ACK.
* A pure ACK goes out after the server's SYN+ACK, and whenever the server
  sends data.

**TCP checksum.** It is the one's-complement sum of three parts:

* the pseudo header and TCP header fields, all known when the frame starts;
* the payload sum taken from the descriptor;
* then complemented. The transmit path never has to see the payload
  twice.

**Send priority.** When several frames are due, the block sends them in this
order: ARP reply, SYN, FIN, pending ACK, data.

**Receiving from the server.**

* Acknowledgements are cumulative. Any ACK in the range (oldest
  unacknowledged, next to send] moves the acknowledged point forward.
* Server data is accepted only in order. Its payload goes to `m_axis` and it
  is acknowledged.
* A segment with an unexpected sequence number is dropped and answered with
  the current ACK.

Limits, by design:

* **No retransmission** and no send window. The block relies on a direct,
  loss-free link to the server, as in a lab set-up.
* A lost SYN or FIN leaves the state machine waiting. Toggling `enable` from
  DONE starts a new connection.
* RST and URG are ignored.
* The receive window is advertised as 2048 bytes (`WINDOW`).

### ARP responder and receive path (`rx_frame_parser`)

Frames from the MAC core are first stored whole in a 512-word frame buffer.
Their first 16 words are also kept in registers. When the frame ends without
an FCS error, `rx_frame_parser` presents the decoded header fields:

* Ethernet: addresses and EtherType;
* ARP: format check, operation, sender and target;
* IPv4: header check, protocol, addresses;
* UDP/TCP: ports, sequence and acknowledgement numbers, flags, payload
  length.

The protocol block then decides in one clock to forward or drop the frame. A
forwarded payload is realigned to bit 31 and cut to the IP length, which
removes the Ethernet padding. While a frame is being decided or forwarded,
the parser holds `tready` low, so later frames wait in the MAC's receive
FIFO.

An ARP reply is queued for a request that has all of:

* hardware type 1 and protocol 0x0800;
* address lengths 6 and 4;
* operation 1;
* the local IP address as target.

The reply goes to the requester's MAC and IP address.

## MAC core (`temac`)

The MAC core moves frames between the 32-bit user side and the 8-bit GMII
side. Each direction has a dual-clock FIFO (`async_fifo`: dual-port RAM,
Gray-coded pointers, two-flop synchronizers, first-word fall-through). Each
FIFO is 512 words of `{data, keep, last}`. The receive FIFO adds an error
bit, which becomes `m_axis_tuser` on the last word.

**Transmit (`temac_tx`).** A frame starts as soon as its first word is in
the FIFO. The transmitter then sends, one byte per clock:

1. seven 0x55 bytes and the 0xD5 start-of-frame delimiter;
2. the frame bytes;
3. zero padding up to 60 bytes;
4. the CRC-32 FCS, least significant byte first;
5. 12 idle clocks.

`tx_en` stays high for `8 + max(L, 60) + 4` clocks.

If the FIFO runs empty inside a frame, the current byte goes out with
`tx_er`. The rest of that frame is discarded and a sticky `underrun` flag is
set. The packet creation block writes every frame without gaps at a word
rate well above 31.25 MHz, so this only happens when `clk_user` is too slow.

**Receive (`temac_rx`).** The receiver works as follows:

* It waits for the SFD after the preamble.
* It packs bytes into words through a 4-byte delay line, so the FCS never
  reaches the FIFO.
* It checks the running CRC against the residue 0xDEBB20E3.
* The last word carries `keep`. Its error bit is set for a bad FCS, for
  `rx_er`, or for a frame too short to hold an FCS.
* A full FIFO cuts the frame, flags it and sets a sticky `overflow` flag.

**MIIM (`miim_master`).** The MIIM master sends IEEE 802.3 clause-22 write
frames, most significant bit first:

    32 ones (optional) | 01 | 01 | PHYAD[4:0] | REGAD[4:0] | 10 | DATA[15:0]

* MDC is `clk_mm / clk_div`. It toggles only during a frame. MDIO changes
  on the falling edge of MDC.
* Dividers below 2 count as 2. With a 10 MHz register clock, `clk_div = 4`
  gives the 2.5 MHz maximum MDC.
* The `no_preamble` register removes the 32 ones.
* Read frames are not implemented.
* The MDIO pad is split into `mdio_o` and `mdio_oe` for an external
  tristate buffer.

## RGMII converter (`gmii_to_rgmii`)

RGMII carries the same byte stream on 4 data pins per direction instead of
8, at double data rate. Each direction has 4 data pins plus a control pin and
a clock pin, 12 pins in all.

On the transmit side:

* Each GMII byte goes out in one 125 MHz period: bits [3:0] while the clock
  is high, bits [7:4] while it is low.
* TX_CTL carries `tx_en` in the first half and `tx_en XOR tx_er` in the
  second.
* Data and control are launched from `clk_125`. The TXC pin is driven from
  `clk_125_90`, so the PHY sees the clock edges in the middle of each data
  half period.

On the receive side, RXD and RX_CTL are captured on both edges of the PHY's
RXC and put back together as GMII bytes in that clock domain.

`ddr_out` is a plain two-register model of an output DDR cell. For an FPGA
build, map it to the vendor's output-DDR primitive so that the pins come
straight from the I/O flip-flops.

## Registers (`mm_config_regs`)

The register file is an AXI4 slave on `clk_mm`, with 8-bit addresses and
single-beat accesses. Byte strobes are honoured. The write response is
always OKAY and unmapped addresses read 0.

| Address | Name | Bits | Reset | Meaning |
|---|---|---|---|---|
| 0x00 | phy_addr | [4:0] | 1 | MIIM address of the PHY |
| 0x04 | no_preamble | [0] | 0 | send MIIM frames without the 32-bit preamble |
| 0x08 | clk_div | [7:0] | 4 | MDC = clk_mm / clk_div |
| 0x0C | packet_size | [10:0] | 1024 | payload bytes per packet, clamped to 1500 |
| 0x10 | phy_data | [15:0] | 0 | data for the next PHY register write |
| 0x14 | phy_reg_addr | [4:0] | 0 | PHY register for the next write |
| 0x18 | phy_write | [0] | – | write 1: start one MIIM write; read: MIIM busy |
| 0x1C | enable | [0] | 0 | start streaming (TCP: open the connection) |
| 0x20 | status | [4:0] | – | [2:0] TCP state (0 closed, 1 SYN sent, 2 established, 3 draining, 4 FIN sent, 5 done), [3] transmit underrun, [4] receive overflow |

A typical start-up is:

1. write the PHY registers (phy_reg_addr, phy_data, then phy_write, and
   poll 0x18 until busy clears);
2. set packet_size;
3. set enable;
4. stream.

The TCP version closes the connection after the packet that ends with `tlast`.

## Where this design departs from, or adds to, its source description

The source describes the controller at the level of its blocks, registers
and protocol behaviour. Everything below that level is this design's own:

* the register addresses and widths;
* the descriptor FIFO and the checksum scheme;
* the frame buffer in the receive path;
* the state machines;
* the MAC core. The original takes it from an open-source tri-mode MAC; this
  one is written from scratch for 1000 Mb/s only.

Other points where the source is silent or inconsistent:

* **Header length.** The source quotes 1066-byte packets as "52 bytes of
  header and 1024 data bytes". 1066 − 1024 = 42 is the UDP header, and a TCP
  header without options makes 54. This design uses 42 and 54.
* **UDP checksum.** The source says every UDP header field except the
  identification is constant. The checksum is therefore sent as 0. The
  length fields and the IPv4 header checksum still follow each packet.
* **FIN flags.** The connection diagram labels the closing segment FIN. It
  goes out as FIN|ACK, because TCP requires ACK on every segment after the
  SYN.
* **Maximum packet size.** The source allows up to 1500 bytes per packet. A
  1500-byte payload makes IP packets of 1540 (TCP) or 1528 (UDP) bytes. A PC
  with the standard 1500-byte MTU accepts at most 1460 (TCP) or 1472 (UDP)
  data bytes.
* **No preamble.** The "no preamble" register is read as the MIIM preamble
  option (a PHY management feature), not the Ethernet preamble, which is
  always sent.

Not included: the clock generator (a PLL), the PHY chip, the MDIO pad buffer,
and the parts of the surrounding radar system (LVDS receiver, FFT, JTAG bus
master, PC software).

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_net_pkg` builds and
checks frames byte by byte from the protocol definitions, independently of
the RTL: CRC-32, Internet checksum, ARP, TCP and UDP. `rgmii_phy_model` plays
the PHY on the RGMII pins. It decodes transmitted frames, checks preamble
and FCS, and sends frames back on its own receive clock.

| Testbench | What it shows |
|---|---|
| `tb_gbmac_top` | TCP version at default parameters, end to end on the RGMII pins: MIIM write, ARP answered, corrupted ARP dropped, handshake, 5 × 1024-byte segments with SEQ/ACK/checksums, server data in and out of order, FIN and close, ≥ 110 MB/s, input back-pressure, no underrun |
| `tb_gbmac_top_max` | the same TCP run with 1500-byte segments, the largest packet size |
| `tb_gbmac_top_udp` | UDP version: 1066-byte frames, a short last packet ended by `tlast`, datagram to a wrong port dropped, throughput |
| `tb_axis_in_fifo`, `tb_async_fifo` | packetising, descriptors and sums; dual-clock FIFO with random rates |
| `tb_temac_tx`, `tb_temac_rx`, `tb_temac` | preamble/SFD/padding/FCS/gap timing, underrun; FCS check and keep on the last word; GMII loopback through both clock crossings |
| `tb_miim_master`, `tb_gmii_to_rgmii`, `tb_mm_config_regs` | MIIM frames and MDC period; RGMII loopback and TXC phase; register map, clamp, PHY-write pulse |
| `tb_pkt_create_tcp`, `tb_pkt_create_udp` | the protocol blocks alone at stream level, with random back-pressure |

To run one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gbmac_top \
    -y rtl -y tb +libext+.sv rtl/gbmac_pkg.sv tb/tb_net_pkg.sv tb/tb_gbmac_top.sv
./obj_dir/Vtb_gbmac_top
```

The full TCP run simulates 100 µs and takes well under a second.

// gbmac_pkg: types, constants and helper functions shared by the gigabit
// Ethernet MAC.
//
// Holds the frame-format constants (EtherType values, IPv4 protocol numbers,
// header lengths of the Ethernet/IPv4/UDP/TCP headers laid out as in the
// packet-structure figure of the design), the 32-bit stream word type used
// between the packet creation block and the MAC core, the register block that
// the configuration registers hand to the other blocks, and functions for the
// Ethernet CRC-32 and the Internet one's complement checksum.
//
// Byte order: a 32-bit stream word carries four frame bytes, the first byte on
// the wire in bits [31:24] (network order), the last in bits [7:0]. keep[3]
// marks the first byte valid, keep[0] the last; only the last word of a frame
// may have a partial keep, and its valid bytes are contiguous from the top.
// This ordering is a choice of this design; the document only says the user
// side is 32 bits wide and the GMII side 8 bits.
package gbmac_pkg;

  // ---------------------------------------------------------------- formats
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [15:0] ETHERTYPE_ARP  = 16'h0806;
  localparam logic [7:0]  IPPROTO_TCP    = 8'd6;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;

  localparam int unsigned ETH_HDR_BYTES  = 14;
  localparam int unsigned IP_HDR_BYTES   = 20;
  localparam int unsigned UDP_HDR_BYTES  = 8;
  localparam int unsigned TCP_HDR_BYTES  = 20;
  localparam int unsigned UDP_FRAME_HDR  = ETH_HDR_BYTES + IP_HDR_BYTES + UDP_HDR_BYTES; // 42
  localparam int unsigned TCP_FRAME_HDR  = ETH_HDR_BYTES + IP_HDR_BYTES + TCP_HDR_BYTES; // 54
  localparam int unsigned ARP_FRAME_BYTES = ETH_HDR_BYTES + 28;                          // 42

  // TCP flag bits inside the 6-bit flag field
  localparam logic [5:0] TCP_FIN = 6'b000001;
  localparam logic [5:0] TCP_SYN = 6'b000010;
  localparam logic [5:0] TCP_RST = 6'b000100;
  localparam logic [5:0] TCP_PSH = 6'b001000;
  localparam logic [5:0] TCP_ACK = 6'b010000;
  localparam logic [5:0] TCP_URG = 6'b100000;

  // Maximum payload bytes in one packet ("can be up to 1500")
  localparam int unsigned MAX_PKT_BYTES = 1500;
  localparam int unsigned LEN_W         = 11;

  typedef enum logic {PROTO_UDP = 1'b0, PROTO_TCP = 1'b1} proto_e;

  // One beat of the 32-bit frame stream
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  keep;
    logic        last;
  } axis_word_t;

  // Configuration the register block hands to the rest of the controller
  typedef struct packed {
    logic [4:0]       phy_addr;       // MIIM address of the PHY
    logic             no_preamble;    // MIIM frames sent without the 32-bit preamble
    logic [7:0]       clk_div;        // MDC = register clock / clk_div
    logic [LEN_W-1:0] packet_size;    // payload bytes per packet
    logic [15:0]      phy_data;       // MIIM write data
    logic [4:0]       phy_reg_addr;   // PHY register to write
  } cfg_t;

  // ---------------------------------------------------------------- CRC-32
  // Ethernet FCS, reflected polynomial 0xEDB88320, one byte per call.
  // Start from 32'hFFFF_FFFF; the FCS is the bit-inverted final value,
  // sent least significant byte first.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'd0, b};
    for (int i = 0; i < 8; i++) begin
      c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return c;
  endfunction

  // Value of the CRC register after a correct frame including its FCS
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB_20E3;

  // ---------------------------------------------------------------- checksum
  // One's complement add of 16-bit words with end-around carry
  function automatic logic [15:0] ones_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // Folds a wide sum of 16-bit words into a 16-bit one's complement sum
  function automatic logic [15:0] ones_fold(input logic [31:0] s);
    logic [31:0] t;
    t = {16'd0, s[31:16]} + {16'd0, s[15:0]};
    t = {16'd0, t[31:16]} + {16'd0, t[15:0]};
    return t[15:0];
  endfunction

  // IPv4 header checksum for a 20-byte header without options:
  // version/IHL 0x45, DSCP/ECN 0, flags "don't fragment", the given TTL.
  function automatic logic [15:0] ipv4_checksum(input logic [15:0] total_len,
                                                input logic [15:0] ident,
                                                input logic [7:0]  ttl,
                                                input logic [7:0]  proto,
                                                input logic [31:0] src,
                                                input logic [31:0] dst);
    logic [31:0] s;
    s = 32'h4500 + {16'd0, total_len} + {16'd0, ident} + 32'h4000 + {16'd0, ttl, proto}
      + {16'd0, src[31:16]} + {16'd0, src[15:0]} + {16'd0, dst[31:16]} + {16'd0, dst[15:0]};
    return ~ones_fold(s);
  endfunction

  // Fields of a received frame, as the receive parser extracts them
  typedef struct packed {
    logic [47:0]      eth_dst;
    logic [47:0]      eth_src;
    logic [15:0]      ethertype;
    logic             arp_fmt_ok;   // Ethernet/IPv4 ARP with 6/4-byte addresses
    logic [15:0]      arp_oper;
    logic [47:0]      arp_sha;
    logic [31:0]      arp_spa;
    logic [31:0]      arp_tpa;
    logic             ipv4_ok;      // IPv4, header of 20 bytes
    logic [7:0]       ip_proto;
    logic [31:0]      ip_src;
    logic [31:0]      ip_dst;
    logic [15:0]      src_port;
    logic [15:0]      dst_port;
    logic [31:0]      tcp_seq;
    logic [31:0]      tcp_ack;
    logic [5:0]       tcp_flags;
    logic [LEN_W-1:0] pl_len;       // payload bytes
  } rx_hdr_t;

  // ---------------------------------------------------------------- headers
  localparam logic [7:0] IP_TTL = 8'd64;

  // 20-byte IPv4 header without options, checksum filled in
  function automatic logic [159:0] ipv4_hdr(input logic [15:0] total_len,
                                           input logic [15:0] ident,
                                           input logic [7:0]  proto,
                                           input logic [31:0] src,
                                           input logic [31:0] dst);
    return {8'h45, 8'h00, total_len, ident, 16'h4000, IP_TTL, proto,
            ipv4_checksum(total_len, ident, IP_TTL, proto, src, dst), src, dst};
  endfunction

  // 42-byte ARP reply frame (Ethernet header included), left-aligned in 56 bytes
  function automatic logic [447:0] arp_reply_frame(input logic [47:0] my_mac,
                                                   input logic [31:0] my_ip,
                                                   input logic [47:0] to_mac,
                                                   input logic [31:0] to_ip);
    return {to_mac, my_mac, ETHERTYPE_ARP, 16'h0001, ETHERTYPE_IPV4, 8'd6, 8'd4, 16'h0002,
            my_mac, my_ip, to_mac, to_ip, 112'd0};
  endfunction

endpackage

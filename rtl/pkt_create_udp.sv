// pkt_create_udp: packet creation block of the UDP version of the controller.
//
// Transmit: whenever streaming is enabled and the input FIFO holds a complete
// packet, the block sends one Ethernet/IPv4/UDP frame: a 42-byte header and
// the packet's payload. Following the document, every header field except
// the IPv4 identification is fixed: addresses and ports are the hard-coded
// parameters below, and the UDP checksum is sent as 0 ("not computed", which
// IPv4 allows). The IPv4 header checksum, which changes with the
// identification, and the two length fields, which follow the packet length,
// are computed per packet. The identification counts up by one per UDP frame.
//
// Receive: every correct frame is decoded (rx_frame_parser). An ARP request
// that asks for this block's IP address queues one ARP reply, which is sent
// before the next data packet. A UDP datagram for this IP address and port
// has its payload streamed out on m_axis; all other frames are dropped.
//
// Interface: input FIFO read ports (payload, descriptor), frame stream to the
// MAC core (s_axis side of temac), frame stream from it, user payload out.
// Timing: a data frame of n payload words takes 10 + n + 1 clocks at the MAC
// input; the next frame may start the clock after.
module pkt_create_udp
  import gbmac_pkg::*;
#(
  parameter logic [47:0] LOCAL_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [47:0] REMOTE_MAC  = 48'h02_00_00_00_00_02,
  parameter logic [31:0] LOCAL_IP    = 32'hC0A8_010A,   // 192.168.1.10
  parameter logic [31:0] REMOTE_IP   = 32'hC0A8_0101,   // 192.168.1.1
  parameter logic [15:0] LOCAL_PORT  = 16'd50000,
  parameter logic [15:0] REMOTE_PORT = 16'd50001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  // input FIFO
  input  logic [31:0]      pl_data,
  output logic             pl_rd,
  input  logic             desc_valid,
  input  logic [LEN_W-1:0] desc_len,
  output logic             desc_pop,
  // frames to the MAC core
  output logic [31:0]      tx_tdata,
  output logic [3:0]       tx_tkeep,
  output logic             tx_tlast,
  output logic             tx_tvalid,
  input  logic             tx_tready,
  // frames from the MAC core
  input  logic [31:0]      rx_tdata,
  input  logic [3:0]       rx_tkeep,
  input  logic             rx_tlast,
  input  logic             rx_tuser,
  input  logic             rx_tvalid,
  output logic             rx_tready,
  // received payload to the user
  output logic [31:0]      m_axis_tdata,
  output logic [3:0]       m_axis_tkeep,
  output logic             m_axis_tlast,
  output logic             m_axis_tvalid,
  input  logic             m_axis_tready,
  // events (one-clock pulses)
  output logic             ev_data_sent,
  output logic             ev_arp_sent,
  output logic             ev_data_rcvd
);

  // ---------------------------------------------------------------- receive
  rx_hdr_t hdr;
  logic    hdr_valid, is_arp_req, is_udp_for_us;

  assign is_arp_req    = (hdr.ethertype == ETHERTYPE_ARP) && hdr.arp_fmt_ok &&
                         (hdr.arp_oper == 16'd1) && (hdr.arp_tpa == LOCAL_IP);
  assign is_udp_for_us = hdr.ipv4_ok && (hdr.ip_proto == IPPROTO_UDP) &&
                         (hdr.eth_dst == LOCAL_MAC) && (hdr.ip_dst == LOCAL_IP) &&
                         (hdr.dst_port == LOCAL_PORT);

  rx_frame_parser u_rx (
    .clk, .rst,
    .s_axis_tdata(rx_tdata), .s_axis_tkeep(rx_tkeep), .s_axis_tlast(rx_tlast),
    .s_axis_tuser(rx_tuser), .s_axis_tvalid(rx_tvalid), .s_axis_tready(rx_tready),
    .hdr, .hdr_valid,
    .decide(hdr_valid), .fwd(is_udp_for_us),
    .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready
  );

  assign ev_data_rcvd = hdr_valid && is_udp_for_us && (hdr.pl_len != '0);

  // ---------------------------------------------------------------- transmit
  logic        arp_pend;
  logic [47:0] arp_mac;
  logic [31:0] arp_ip;
  logic [15:0] ident;
  logic        ftx_busy, ftx_start;
  logic [447:0] ftx_hdr;
  logic [LEN_W-3:0] ftx_words;
  logic        send_arp, send_data;
  logic [15:0] ip_len, udp_len;

  assign send_arp  = !ftx_busy && arp_pend;
  assign send_data = !ftx_busy && !arp_pend && enable && desc_valid;
  assign ftx_start = send_arp || send_data;
  assign desc_pop  = send_data;

  assign udp_len = 16'(desc_len) + 16'(UDP_HDR_BYTES);
  assign ip_len  = udp_len + 16'(IP_HDR_BYTES);

  always_comb begin
    if (send_arp) begin
      ftx_hdr   = arp_reply_frame(LOCAL_MAC, LOCAL_IP, arp_mac, arp_ip);
      ftx_words = '0;
    end else begin
      ftx_hdr   = {REMOTE_MAC, LOCAL_MAC, ETHERTYPE_IPV4,
                   ipv4_hdr(ip_len, ident, IPPROTO_UDP, LOCAL_IP, REMOTE_IP),
                   LOCAL_PORT, REMOTE_PORT, udp_len, 16'h0000, 112'd0};
      ftx_words = desc_len[LEN_W-1:2];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      arp_pend     <= 1'b0;
      arp_mac      <= '0;
      arp_ip       <= '0;
      ident        <= '0;
      ev_data_sent <= 1'b0;
      ev_arp_sent  <= 1'b0;
    end else begin
      ev_data_sent <= send_data;
      ev_arp_sent  <= send_arp;
      if (send_arp) arp_pend <= 1'b0;
      if (hdr_valid && is_arp_req) begin
        arp_pend <= 1'b1;
        arp_mac  <= hdr.arp_sha;
        arp_ip   <= hdr.arp_spa;
      end
      if (send_data) ident <= ident + 16'd1;
    end
  end

  frame_tx u_ftx (
    .clk, .rst,
    .start(ftx_start), .hdr(ftx_hdr), .hdr_words(4'd10), .n_words(ftx_words),
    .busy(ftx_busy), .done(),
    .pl_data, .pl_rd,
    .m_axis_tdata(tx_tdata), .m_axis_tkeep(tx_tkeep), .m_axis_tlast(tx_tlast),
    .m_axis_tvalid(tx_tvalid), .m_axis_tready(tx_tready)
  );

endmodule

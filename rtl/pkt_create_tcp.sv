// pkt_create_tcp: packet creation block of the TCP version of the controller.
//
// The block is a TCP client with one connection to a hard-coded server
// (addresses and ports are the parameters below). Its life follows the
// connection diagram of the design:
//   CLOSED    --enable-->             SYN sent (SEQ = 0)
//   SYN_SENT  --SYN+ACK, ACK = 1-->   ACK sent, ESTABLISHED
//   ESTABLISHED: each complete packet in the input FIFO leaves as one data
//             segment (SEQ = 1 + k*N, flags ACK+PSH); acknowledgments from the
//             server only advance the "acknowledged up to" pointer, the client
//             does not wait for one per packet. A pending ACK (for the SYN+ACK
//             or for data from the server) is sent alone before the next data
//             segment, as in the diagram.
//   a packet closed by the user's tlast is the last one: DRAIN waits until
//             the server has acknowledged every byte, then FIN is sent
//             (SEQ = 1 + X*N) and FIN_WAIT waits for ACK = 2 + X*N: DONE.
//   DONE      --enable low-->         CLOSED (a new connection can be opened)
// Data the server sends is accepted in order: a segment whose SEQ equals the
// next expected number has its payload streamed out on m_axis, and every
// received data segment (or FIN) is answered with an ACK carrying the next
// expected number, sent alone or with the next data segment.
// ARP requests for this block's IP address are answered as in the UDP version.
//
// From the document: the frame layout (Ethernet, 20-byte IPv4, 20-byte TCP
// header without options), the fields computed per packet (sequence and
// acknowledgment numbers, checksum, flags), the SYN / SYN-ACK / ACK opening,
// the per-packet ACKs and the FIN / ACK closing with the numbers of the
// diagram (initial sequence number 0). This design's own choices: ACK is set
// on every segment after the SYN (the diagram prints only FIN on the closing
// segment), PSH on data segments, a fixed receive window, IPv4 identification
// counting per frame. Retransmission, timeouts, RST handling and the server's
// own FIN-close are not implemented; the document names better recovery from
// loss as future work.
//
// The TCP checksum covers the pseudo-header, the header and the payload; the
// payload's share comes from the input FIFO's descriptor, so the header can be
// sent before the payload is read.
// Timing: a data frame of n payload words takes 13 + n + 1 clocks at the MAC
// input.
module pkt_create_tcp
  import gbmac_pkg::*;
#(
  parameter logic [47:0] LOCAL_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [47:0] REMOTE_MAC  = 48'h02_00_00_00_00_02,
  parameter logic [31:0] LOCAL_IP    = 32'hC0A8_010A,   // 192.168.1.10
  parameter logic [31:0] REMOTE_IP   = 32'hC0A8_0101,   // 192.168.1.1
  parameter logic [15:0] LOCAL_PORT  = 16'd50000,
  parameter logic [15:0] REMOTE_PORT = 16'd50001,
  parameter logic [15:0] WINDOW      = 16'd2048        // receive window, bytes
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  // input FIFO
  input  logic [31:0]      pl_data,
  output logic             pl_rd,
  input  logic             desc_valid,
  input  logic [LEN_W-1:0] desc_len,
  input  logic [15:0]      desc_sum,
  input  logic             desc_eos,
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
  // state and events (one-clock pulses)
  output logic [2:0]       tcp_state,
  output logic             ev_syn_sent,
  output logic             ev_established,
  output logic             ev_data_sent,
  output logic             ev_ack_sent,
  output logic             ev_fin_sent,
  output logic             ev_closed,
  output logic             ev_arp_sent,
  output logic             ev_data_rcvd
);

  typedef enum logic [2:0] {
    T_CLOSED, T_SYN_SENT, T_EST, T_DRAIN, T_FIN_WAIT, T_DONE
  } tcp_state_e;

  localparam logic [31:0] ISS = 32'd0;

  tcp_state_e  state;
  logic [31:0] snd_una, snd_nxt, rcv_nxt;
  logic        pend_syn, pend_ack, pend_fin, arp_pend;
  logic [47:0] arp_mac;
  logic [31:0] arp_ip;
  logic [15:0] ident;

  assign tcp_state = state;

  // ---------------------------------------------------------------- receive
  rx_hdr_t hdr;
  logic    hdr_valid, is_arp_req, is_tcp_for_us, in_order, fwd;
  logic    has_ack, has_syn, has_fin;
  logic [31:0] ack_ofs, nxt_ofs;

  assign is_arp_req    = (hdr.ethertype == ETHERTYPE_ARP) && hdr.arp_fmt_ok &&
                         (hdr.arp_oper == 16'd1) && (hdr.arp_tpa == LOCAL_IP);
  assign is_tcp_for_us = hdr.ipv4_ok && (hdr.ip_proto == IPPROTO_TCP) &&
                         (hdr.eth_dst == LOCAL_MAC) && (hdr.ip_dst == LOCAL_IP) &&
                         (hdr.ip_src == REMOTE_IP) && (hdr.dst_port == LOCAL_PORT) &&
                         (hdr.src_port == REMOTE_PORT);
  assign has_ack  = (hdr.tcp_flags & TCP_ACK) != '0;
  assign has_syn  = (hdr.tcp_flags & TCP_SYN) != '0;
  assign has_fin  = (hdr.tcp_flags & TCP_FIN) != '0;
  assign in_order = (hdr.tcp_seq == rcv_nxt);
  assign fwd      = is_tcp_for_us && in_order && (hdr.pl_len != '0) &&
                    (state == T_EST || state == T_DRAIN || state == T_FIN_WAIT);
  // an acceptable ACK lies in (snd_una, snd_nxt]
  assign ack_ofs  = hdr.tcp_ack - snd_una;
  assign nxt_ofs  = snd_nxt - snd_una;

  rx_frame_parser u_rx (
    .clk, .rst,
    .s_axis_tdata(rx_tdata), .s_axis_tkeep(rx_tkeep), .s_axis_tlast(rx_tlast),
    .s_axis_tuser(rx_tuser), .s_axis_tvalid(rx_tvalid), .s_axis_tready(rx_tready),
    .hdr, .hdr_valid,
    .decide(hdr_valid), .fwd(fwd),
    .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready
  );

  // ---------------------------------------------------------------- transmit
  logic             ftx_busy, ftx_start;
  logic [447:0]     ftx_hdr;
  logic [LEN_W-3:0] ftx_words;
  logic             send_arp, send_syn, send_fin, send_data, send_ack;
  logic [31:0]      seg_seq, seg_ack;
  logic [5:0]       seg_flags;
  logic [15:0]      seg_len, seg_plsum, tcp_len, ip_len, tcp_csum;
  logic [31:0]      csum_acc;

  always_comb begin
    send_arp  = 1'b0;
    send_syn  = 1'b0;
    send_fin  = 1'b0;
    send_data = 1'b0;
    send_ack  = 1'b0;
    if (!ftx_busy) begin
      if (arp_pend)                            send_arp  = 1'b1;
      else if (pend_syn)                       send_syn  = 1'b1;
      else if (pend_fin)                       send_fin  = 1'b1;
      else if (pend_ack)                       send_ack  = 1'b1;
      else if (state == T_EST && desc_valid)   send_data = 1'b1;
    end
  end

  assign ftx_start = send_arp || send_syn || send_fin || send_data || send_ack;
  assign desc_pop  = send_data;

  always_comb begin
    seg_seq   = snd_nxt;
    seg_ack   = rcv_nxt;
    seg_len   = '0;
    seg_plsum = '0;
    seg_flags = TCP_ACK;
    if (send_syn) begin
      seg_seq   = ISS;
      seg_ack   = '0;
      seg_flags = TCP_SYN;
    end else if (send_fin) begin
      seg_flags = TCP_FIN | TCP_ACK;
    end else if (send_data) begin
      seg_len   = 16'(desc_len);
      seg_plsum = desc_sum;
      seg_flags = TCP_ACK | TCP_PSH;
    end
    tcp_len  = seg_len + 16'(TCP_HDR_BYTES);
    ip_len   = tcp_len + 16'(IP_HDR_BYTES);
    csum_acc = {16'd0, LOCAL_IP[31:16]} + {16'd0, LOCAL_IP[15:0]}
             + {16'd0, REMOTE_IP[31:16]} + {16'd0, REMOTE_IP[15:0]}
             + {24'd0, IPPROTO_TCP} + {16'd0, tcp_len}
             + {16'd0, LOCAL_PORT} + {16'd0, REMOTE_PORT}
             + {16'd0, seg_seq[31:16]} + {16'd0, seg_seq[15:0]}
             + {16'd0, seg_ack[31:16]} + {16'd0, seg_ack[15:0]}
             + {16'd0, 4'd5, 6'd0, seg_flags} + {16'd0, WINDOW}
             + {16'd0, seg_plsum};
    tcp_csum = ~ones_fold(csum_acc);
    if (send_arp) begin
      ftx_hdr   = arp_reply_frame(LOCAL_MAC, LOCAL_IP, arp_mac, arp_ip);
      ftx_words = '0;
    end else begin
      ftx_hdr   = {REMOTE_MAC, LOCAL_MAC, ETHERTYPE_IPV4,
                   ipv4_hdr(ip_len, ident, IPPROTO_TCP, LOCAL_IP, REMOTE_IP),
                   LOCAL_PORT, REMOTE_PORT, seg_seq, seg_ack, 4'd5, 6'd0, seg_flags,
                   WINDOW, tcp_csum, 16'h0000, 16'h0000};
      ftx_words = send_data ? desc_len[LEN_W-1:2] : '0;
    end
  end

  frame_tx u_ftx (
    .clk, .rst,
    .start(ftx_start), .hdr(ftx_hdr), .hdr_words(send_arp ? 4'd10 : 4'd13),
    .n_words(ftx_words),
    .busy(ftx_busy), .done(),
    .pl_data, .pl_rd,
    .m_axis_tdata(tx_tdata), .m_axis_tkeep(tx_tkeep), .m_axis_tlast(tx_tlast),
    .m_axis_tvalid(tx_tvalid), .m_axis_tready(tx_tready)
  );

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= T_CLOSED;
      snd_una  <= ISS;
      snd_nxt  <= ISS;
      rcv_nxt  <= '0;
      pend_syn <= 1'b0;
      pend_ack <= 1'b0;
      pend_fin <= 1'b0;
      arp_pend <= 1'b0;
      arp_mac  <= '0;
      arp_ip   <= '0;
      ident    <= '0;
      ev_syn_sent    <= 1'b0;
      ev_established <= 1'b0;
      ev_data_sent   <= 1'b0;
      ev_ack_sent    <= 1'b0;
      ev_fin_sent    <= 1'b0;
      ev_closed      <= 1'b0;
      ev_arp_sent    <= 1'b0;
      ev_data_rcvd   <= 1'b0;
    end else begin
      ev_syn_sent    <= send_syn;
      ev_data_sent   <= send_data;
      ev_ack_sent    <= send_ack;
      ev_fin_sent    <= send_fin;
      ev_arp_sent    <= send_arp;
      ev_established <= 1'b0;
      ev_closed      <= 1'b0;
      ev_data_rcvd   <= hdr_valid && fwd;

      // ---- what was sent this clock
      if (send_arp) arp_pend <= 1'b0;
      if (send_syn) begin
        pend_syn <= 1'b0;
        snd_nxt  <= ISS + 32'd1;
      end
      if (send_fin) begin
        pend_fin <= 1'b0;
        snd_nxt  <= snd_nxt + 32'd1;
      end
      if (send_data) begin
        snd_nxt  <= snd_nxt + 32'(desc_len);
        pend_ack <= 1'b0;
        if (desc_eos) state <= T_DRAIN;
      end
      if (send_ack || send_fin) pend_ack <= 1'b0;
      if (ftx_start && !send_arp) ident <= ident + 16'd1;

      // ---- connection state
      unique case (state)
        T_CLOSED: begin
          if (enable) begin
            state    <= T_SYN_SENT;
            pend_syn <= 1'b1;
            snd_una  <= ISS;
            snd_nxt  <= ISS;
          end
        end
        T_DRAIN: begin
          if (snd_una == snd_nxt && !send_data) begin
            pend_fin <= 1'b1;
            state    <= T_FIN_WAIT;
          end
        end
        T_FIN_WAIT: begin
          if (!pend_fin && !send_fin && snd_una == snd_nxt) begin
            state     <= T_DONE;
            ev_closed <= 1'b1;
          end
        end
        T_DONE: begin
          if (!enable) state <= T_CLOSED;
        end
        default: ;
      endcase

      // ---- received frames
      if (hdr_valid) begin
        if (is_arp_req) begin
          arp_pend <= 1'b1;
          arp_mac  <= hdr.arp_sha;
          arp_ip   <= hdr.arp_spa;
        end
        if (is_tcp_for_us) begin
          if (state == T_SYN_SENT) begin
            if (has_syn && has_ack && hdr.tcp_ack == snd_nxt && !pend_syn) begin
              rcv_nxt        <= hdr.tcp_seq + 32'd1;
              snd_una        <= hdr.tcp_ack;
              pend_ack       <= 1'b1;
              state          <= T_EST;
              ev_established <= 1'b1;
            end
          end else if (state == T_EST || state == T_DRAIN || state == T_FIN_WAIT) begin
            if (has_ack && ack_ofs != '0 && ack_ofs <= nxt_ofs) snd_una <= hdr.tcp_ack;
            if (hdr.pl_len != '0) begin
              pend_ack <= 1'b1;               // also a duplicate ACK for out-of-order data
              if (in_order) rcv_nxt <= rcv_nxt + 32'(hdr.pl_len) + 32'(has_fin);
            end else if (has_fin && in_order) begin
              rcv_nxt  <= rcv_nxt + 32'd1;
              pend_ack <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule

// rx_frame_parser: receive half of the packet creation block.
//
// Takes the frames the MAC core delivers (32-bit AXI Stream, tuser = frame
// error on the last word), stores each frame in a frame buffer while keeping
// its first 16 words in registers, and once the frame has ended without error
// presents the decoded header fields (Ethernet, ARP, IPv4, UDP or TCP) on hdr
// with hdr_valid high. The protocol logic (pkt_create_udp / pkt_create_tcp)
// then answers with decide and fwd in the same or a later clock: fwd = 1
// streams the frame's payload out on m_axis, realigned to start in bits
// [31:24] of the first word and cut to the length the IP/UDP/TCP header gives
// (Ethernet padding removed); fwd = 0 drops it.
//
// The document says the packet creation block "accepts data packages arrived
// from the network and checks if they are addressed to this module"; this
// buffer-then-decide structure is this design's way of doing that. Frames
// with IP options (IHL != 5) are reported with ipv4_ok = 0; a TCP header of
// any data offset is handled. While a frame is being decided or forwarded,
// s_axis_tready is low, so the MAC's receive FIFO holds the next frames.
//
// Timing: hdr_valid rises two clocks after the last word of a frame is taken;
// forwarding runs at one word per clock while m_axis_tready is high.
module rx_frame_parser
  import gbmac_pkg::*;
#(
  parameter int unsigned BUF_AW = 9          // 512 words, above the 1518-byte frame
) (
  input  logic        clk,
  input  logic        rst,
  // frames from the MAC core
  input  logic [31:0] s_axis_tdata,
  input  logic [3:0]  s_axis_tkeep,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // decoded header and decision
  output rx_hdr_t     hdr,
  output logic        hdr_valid,
  input  logic        decide,
  input  logic        fwd,
  // payload to the user
  output logic [31:0] m_axis_tdata,
  output logic [3:0]  m_axis_tkeep,
  output logic        m_axis_tlast,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready
);

  typedef enum logic [1:0] {S_RECV, S_PARSE, S_DECIDE, S_FWD} state_e;

  state_e            state;
  logic [31:0]       fbuf [2**BUF_AW];
  logic [31:0]       hw   [16];
  logic [BUF_AW:0]   widx;
  logic [11:0]       frame_bytes;
  logic              bad;

  logic [BUF_AW-1:0] rptr;
  logic [LEN_W-1:0]  rem;

  // byte n of the captured header
  function automatic logic [7:0] hb(input int unsigned n);
    return hw[n/4][8*(3-(n%4)) +: 8];
  endfunction

  function automatic logic [15:0] h16(input int unsigned n);
    return {hb(n), hb(n+1)};
  endfunction

  function automatic logic [31:0] h32(input int unsigned n);
    return {hb(n), hb(n+1), hb(n+2), hb(n+3)};
  endfunction

  function automatic logic [2:0] keep_bytes(input logic [3:0] k);
    return {2'b00, k[3]} + {2'b00, k[2]} + {2'b00, k[1]} + {2'b00, k[0]};
  endfunction

  assign s_axis_tready = (state == S_RECV);

  // ---------------------------------------------------------------- decode
  rx_hdr_t     h;
  logic [3:0]  doff;
  logic [5:0]  l4_words;      // L4 header length in words
  logic [15:0] ip_len, udp_len;
  logic [15:0] pl16;
  logic [BUF_AW-1:0] start_word;
  logic        len_ok;

  always_comb begin
    h.eth_dst    = {h32(0), h16(4)};
    h.eth_src    = {h16(6), h32(8)};
    h.ethertype  = h16(12);
    h.arp_fmt_ok = (h16(14) == 16'd1) && (h16(16) == ETHERTYPE_IPV4) &&
                   (hb(18) == 8'd6) && (hb(19) == 8'd4);
    h.arp_oper   = h16(20);
    h.arp_sha    = {h16(22), h32(24)};
    h.arp_spa    = h32(28);
    h.arp_tpa    = h32(38);
    h.ipv4_ok    = (h.ethertype == ETHERTYPE_IPV4) && (hb(14) == 8'h45);
    h.ip_proto   = hb(23);
    h.ip_src     = h32(26);
    h.ip_dst     = h32(30);
    h.src_port   = h16(34);
    h.dst_port   = h16(36);
    h.tcp_seq    = h32(38);
    h.tcp_ack    = h32(42);
    h.tcp_flags  = hb(47)[5:0];
    doff         = hb(46)[7:4];
    ip_len       = h16(16);
    udp_len      = h16(38);
    if (h.ip_proto == IPPROTO_TCP) begin
      l4_words = {2'b00, doff};
      pl16     = ip_len - 16'd20 - {10'd0, doff, 2'b00};
    end else begin
      l4_words = 6'd2;
      pl16     = udp_len - 16'd8;
    end
    h.pl_len   = pl16[LEN_W-1:0];
    // payload starts at byte 34 + 4*l4_words = 4*(8 + l4_words) + 2
    start_word = BUF_AW'(8) + BUF_AW'(l4_words);
    len_ok     = (pl16 <= 16'(MAX_PKT_BYTES)) &&
                 ({4'd0, start_word, 2'b10} + {1'b0, pl16} <= {5'd0, frame_bytes}) &&
                 ((h.ip_proto != IPPROTO_TCP) || (doff >= 4'd5)) &&
                 ((h.ip_proto != IPPROTO_UDP) || (udp_len >= 16'd8));
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (s_axis_tvalid && s_axis_tready && !widx[BUF_AW]) fbuf[widx[BUF_AW-1:0]] <= s_axis_tdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_RECV;
      widx        <= '0;
      frame_bytes <= '0;
      bad         <= 1'b0;
      hdr         <= '0;
      hdr_valid   <= 1'b0;
      rptr        <= '0;
      rem         <= '0;
      for (int i = 0; i < 16; i++) hw[i] <= '0;
    end else begin
      unique case (state)
        S_RECV: begin
          if (s_axis_tvalid) begin
            if (widx < 16) hw[widx[3:0]] <= s_axis_tdata;
            if (widx[BUF_AW]) bad <= 1'b1;          // longer than the buffer
            if (!widx[BUF_AW]) widx <= widx + 1'b1;
            frame_bytes <= frame_bytes + 12'(keep_bytes(s_axis_tkeep));
            if (s_axis_tlast) begin
              if (s_axis_tuser || bad || widx[BUF_AW]) begin
                widx        <= '0;
                frame_bytes <= '0;
                bad         <= 1'b0;
              end else begin
                state <= S_PARSE;
              end
            end
          end
        end
        S_PARSE: begin
          hdr <= h;
          if (!len_ok) hdr.ipv4_ok <= 1'b0;
          hdr_valid <= 1'b1;
          rptr      <= start_word;
          state     <= S_DECIDE;
        end
        S_DECIDE: begin
          if (decide) begin
            hdr_valid <= 1'b0;
            rem       <= hdr.pl_len;
            if (fwd && hdr.ipv4_ok && hdr.pl_len != '0) begin
              state <= S_FWD;
            end else begin
              state       <= S_RECV;
              widx        <= '0;
              frame_bytes <= '0;
              bad         <= 1'b0;
            end
          end
        end
        S_FWD: begin
          if (m_axis_tready) begin
            rptr <= rptr + 1'b1;
            rem  <= rem - LEN_W'(4);
            if (rem <= LEN_W'(4)) begin
              state       <= S_RECV;
              widx        <= '0;
              frame_bytes <= '0;
              bad         <= 1'b0;
            end
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

  // ---------------------------------------------------------------- payload out
  logic [31:0] w0, w1;
  assign w0 = fbuf[rptr];
  assign w1 = fbuf[rptr + 1'b1];

  assign m_axis_tdata  = {w0[15:0], w1[31:16]};
  assign m_axis_tvalid = (state == S_FWD);
  assign m_axis_tlast  = (rem <= LEN_W'(4));
  always_comb begin
    unique case (rem)
      LEN_W'(1): m_axis_tkeep = 4'h8;
      LEN_W'(2): m_axis_tkeep = 4'hC;
      LEN_W'(3): m_axis_tkeep = 4'hE;
      default:   m_axis_tkeep = 4'hF;
    endcase
  end

endmodule

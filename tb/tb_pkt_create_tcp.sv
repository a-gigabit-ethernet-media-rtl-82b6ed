// tb_pkt_create_tcp: TCP packet creation block test at stream level.
//
// The input FIFO is modelled by two queues (payload words, first word
// visible; descriptors with length, one's-complement payload sum and end of
// stream). Frames leave on tx_* into a sink with random tready; the server's
// frames are fed into rx_* as word streams. The test plays the server side of
// the connection:
//   - nothing is sent while enable is low; after enable one SYN with SEQ 0;
//   - SYN+ACK from the server gets the handshake ACK (SEQ 1, ACK 1001);
//   - four packets of random length (multiple of 4, 4..1024 bytes) leave as
//     ACK|PSH segments with consecutive sequence numbers, correct IPv4 and
//     TCP checksums, fixed addresses and ports, and the payload unchanged;
//   - server data in order reaches m_axis and is acknowledged, data with a
//     wrong sequence number is neither delivered nor acknowledged, a segment
//     for another port is ignored;
//   - an ARP request is answered in between;
//   - after the end-of-stream packet is acknowledged, FIN|ACK is sent and,
//     once the server acknowledges it, tcp_state reaches "done".
module tb_pkt_create_tcp;
  import gbmac_pkg::*;
  import tb_net_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  localparam logic [47:0] LMAC = 48'h02_00_00_00_00_01, RMAC = 48'h02_00_00_00_00_02;
  localparam logic [31:0] LIP = 32'hC0A8_010A, RIP = 32'hC0A8_0101;
  localparam int unsigned LPORT = 50000, RPORT = 50001, SRV_ISS = 1000;

  logic clk = 0, rst = 1, enable = 0;
  always #5ns clk = ~clk;

  // input FIFO model
  logic [31:0] pq[$];
  typedef struct { int len; int unsigned sum; bit eos; } desc_t;
  desc_t dq[$];
  logic [31:0]      pl_data;
  logic             pl_rd, desc_valid, desc_pop, desc_eos;
  logic [LEN_W-1:0] desc_len;
  logic [15:0]      desc_sum;
  // the read side is driven from the queues after every change
  function automatic void refresh();
    pl_data    = (pq.size() != 0) ? pq[0] : '0;
    desc_valid = (dq.size() != 0);
    desc_len   = (dq.size() != 0) ? LEN_W'(dq[0].len) : '0;
    desc_sum   = (dq.size() != 0) ? 16'(dq[0].sum) : '0;
    desc_eos   = (dq.size() != 0) ? dq[0].eos : 1'b0;
  endfunction
  initial refresh();
  // reads are sampled at the rising edge and take effect 1 ns later
  always @(posedge clk) begin
    bit rd, pop;
    rd  = pl_rd;
    pop = desc_pop;
    #1ns;
    if (rd) begin
      if (pq.size() == 0) begin failures++; $display("FAIL %0t: payload read from empty FIFO", $time); end
      else void'(pq.pop_front());
    end
    if (pop && dq.size() != 0) void'(dq.pop_front());
    refresh();
  end

  logic [31:0] tx_tdata, rx_tdata = 0, m_tdata;
  logic [3:0]  tx_tkeep, rx_tkeep = 0, m_tkeep;
  logic        tx_tlast, tx_tvalid, tx_tready = 0;
  logic        rx_tlast = 0, rx_tuser = 0, rx_tvalid = 0, rx_tready;
  logic        m_tlast, m_tvalid, m_tready = 1;
  logic [2:0]  tcp_state;
  logic        ev_syn, ev_est, ev_data, ev_ack, ev_fin, ev_closed, ev_arp, ev_rcvd;

  // default addresses and ports, repeated in the localparams above
  pkt_create_tcp dut (
    .clk, .rst, .enable,
    .pl_data, .pl_rd, .desc_valid, .desc_len, .desc_sum, .desc_eos, .desc_pop,
    .tx_tdata, .tx_tkeep, .tx_tlast, .tx_tvalid, .tx_tready,
    .rx_tdata, .rx_tkeep, .rx_tlast, .rx_tuser, .rx_tvalid, .rx_tready,
    .m_axis_tdata(m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tlast(m_tlast),
    .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .tcp_state, .ev_syn_sent(ev_syn), .ev_established(ev_est), .ev_data_sent(ev_data),
    .ev_ack_sent(ev_ack), .ev_fin_sent(ev_fin), .ev_closed(ev_closed),
    .ev_arp_sent(ev_arp), .ev_data_rcvd(ev_rcvd)
  );

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame sink with random tready (decided at the falling edge)
  bytes_t       frames[$];
  byte unsigned cur[$];
  always @(negedge clk) begin
    tx_tready = ($urandom_range(0, 7) != 0);
    if (tx_tvalid && tx_tready) begin
      for (int j = 0; j < 4; j++) if (tx_tkeep[3-j]) cur.push_back(tx_tdata[31-8*j -: 8]);
      if (tx_tlast) begin frames.push_back(cur); cur.delete(); end
    end
  end

  // user receive sink
  byte unsigned rx_user[$];
  int           rx_user_last = 0;
  always @(negedge clk) if (m_tvalid && m_tready) begin
    for (int j = 0; j < 4; j++) if (m_tkeep[3-j]) rx_user.push_back(m_tdata[31-8*j -: 8]);
    if (m_tlast) rx_user_last++;
  end

  // server frame into rx_* (padded to 60 bytes as on the wire)
  task automatic rx_send(input bytes_t d);
    while (d.size() < 60) d.push_back(8'h00);
    for (int i = 0; i < d.size(); i += 4) begin
      @(negedge clk);
      rx_tdata = '0; rx_tkeep = '0;
      for (int j = 0; j < 4; j++) if (i + j < d.size()) begin
        rx_tdata[31-8*j -: 8] = d[i+j];
        rx_tkeep[3-j] = 1'b1;
      end
      rx_tlast  = (i + 4 >= d.size());
      rx_tvalid = 1;
      while (!rx_tready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    rx_tvalid = 0; rx_tlast = 0;
  endtask

  task automatic srv(input int unsigned seq, input int unsigned ack, input int unsigned flags,
                     input bytes_t pl, input int unsigned dport = LPORT);
    rx_send(tcp_segment(RMAC, LMAC, RIP, LIP, RPORT, dport, seq, ack, flags, pl));
  endtask

  task automatic next_frame(output bytes_t f);
    int t = 0;
    while (frames.size() == 0) begin
      @(posedge clk);
      if (++t > 20000) begin
        failures++;
        $display("FAIL %0t: no frame", $time);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    f = frames.pop_front();
  endtask

  task automatic push_packet(input bytes_t d, input bit eos);
    desc_t ds;
    for (int i = 0; i < d.size(); i += 4) pq.push_back({d[i], d[i+1], d[i+2], d[i+3]});
    ds.len = d.size(); ds.sum = osum(d, 0, d.size()); ds.eos = eos;
    dq.push_back(ds);
    refresh();
  endtask

  initial begin
    bytes_t f, none, srv_pl, pkts[4];
    int unsigned nxt = 1, ident0 = 0, sent_bytes = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // payload queued before enable: nothing may leave
    for (int k = 0; k < 4; k++) begin
      int len;
      pkts[k].delete();
      len = 4 * $urandom_range(1, 256);
      for (int i = 0; i < len; i++) pkts[k].push_back(8'($urandom));
      push_packet(pkts[k], k == 3);
    end
    repeat (200) @(posedge clk);
    check(frames.size() == 0 && tcp_state == 0, "idle and closed while disabled");
    @(negedge clk);
    enable = 1;

    next_frame(f);
    check({get16(f, 0), get32(f, 2)} == 48'(RMAC) && {get16(f, 6), get32(f, 8)} == 48'(LMAC) &&
          get16(f, 12) == 16'h0800, "Ethernet header of the SYN");
    check(ipv4_ok(f) && f[23] == 6 && tcp_ok(f), "SYN checksums");
    check(f[47] == 8'h02 && get32(f, 38) == 0 && get16(f, 16) == 40, "SYN with SEQ 0, no data");
    check(get32(f, 26) == LIP && get32(f, 30) == RIP && get16(f, 34) == LPORT && get16(f, 36) == RPORT,
          "addresses and ports");
    check(tcp_state == 1, "state SYN sent");
    ident0 = get16(f, 18);
    srv(SRV_ISS, 1, 6'h12, none);
    next_frame(f);
    check(f[47] == 8'h10 && get32(f, 38) == 1 && get32(f, 42) == SRV_ISS + 1 && tcp_ok(f),
          "handshake ACK SEQ 1 ACK ISS+1");
    check(get16(f, 18) == ((ident0 + 1) & 16'hFFFF), "identification counts up");

    // data segments, server traffic in between; ARP reply and ACKs interleave
    begin
      int k = 0, n_arp = 0, n_ack37 = 0, n_fin = 0;
      while (n_fin == 0) begin
        next_frame(f);
        if (get16(f, 12) == 16'h0806) begin
          n_arp++;
          check(get16(f, 20) == 2 && get32(f, 28) == LIP && get32(f, 38) == RIP &&
                {get16(f, 22), get32(f, 24)} == 48'(LMAC), "ARP reply fields");
        end else if (f[47] & 8'h01) begin
          n_fin++;
          check(k == 4, $sformatf("FIN after all data (k=%0d, dq=%0d, seq=%0d nxt=%0d)", k, dq.size(), get32(f, 38), nxt));
          check(f[47] == 8'h11 && get32(f, 38) == nxt && tcp_ok(f), "FIN|ACK with the next SEQ");
          check(get32(f, 42) == SRV_ISS + 1 + 37, "out-of-order data not acknowledged");
        end else if (get16(f, 16) == 40) begin
          if (get32(f, 42) == SRV_ISS + 1 + 37) n_ack37++;
        end else begin
          bit ok;
          check(k < 4, "no extra data segment");
          check(f[47] == 8'h18, $sformatf("packet %0d flags ACK|PSH", k));
          check(ipv4_ok(f) && tcp_ok(f), $sformatf("packet %0d IPv4 and TCP checksums", k));
          check(get32(f, 38) == nxt, $sformatf("packet %0d SEQ %0d (%0d)", k, nxt, get32(f, 38)));
          check(get16(f, 16) == 40 + pkts[k].size(), $sformatf("packet %0d IPv4 length", k));
          ok = (f.size() >= 54 + pkts[k].size());
          if (ok) for (int i = 0; i < pkts[k].size(); i++) if (f[54+i] != pkts[k][i]) ok = 0;
          check(ok, $sformatf("packet %0d payload (%0d bytes)", k, pkts[k].size()));
          nxt += pkts[k].size();
          if (k == 0) begin
            srv_pl.delete();
            for (int i = 0; i < 37; i++) srv_pl.push_back(8'($urandom));
            srv(SRV_ISS + 1, nxt, 6'h18, srv_pl);                 // in order
            srv(SRV_ISS + 1, nxt, 6'h18, srv_pl, LPORT + 1);      // wrong port
            srv(SRV_ISS + 500, nxt, 6'h18, srv_pl);               // out of order
            rx_send(arp_request(RMAC, RIP, LIP));
          end else begin
            srv(SRV_ISS + 1 + 37, nxt, 6'h10, none);
          end
          k++;
        end
      end
      check(n_arp == 1, "one ARP reply");
      check(n_ack37 >= 1, $sformatf("server data acknowledged by a pure ACK (%0d)", n_ack37));
    end
    check(tcp_state == 4, "state FIN sent");
    srv(SRV_ISS + 1 + 37, nxt + 1, 6'h10, none);
    repeat (50) @(posedge clk);
    check(tcp_state == 5, $sformatf("state done (%0d)", tcp_state));
    check(rx_user.size() == 37 && rx_user_last == 1, $sformatf("in-order server data delivered once (%0d bytes)", rx_user.size()));
    begin
      bit ok;
      ok = (rx_user.size() == 37);
      foreach (rx_user[i]) if (i < 37 && rx_user[i] != srv_pl[i]) ok = 0;
      check(ok, "server payload bytes");
    end
    check(pq.size() == 0 && dq.size() == 0, "input FIFO drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

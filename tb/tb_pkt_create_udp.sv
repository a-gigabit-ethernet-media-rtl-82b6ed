// tb_pkt_create_udp: UDP packet creation block test at stream level.
//
// The input FIFO is modelled by two queues (payload words, first word
// visible; descriptors with the packet length). Frames leave on tx_* into a
// sink with random tready; the PC's frames are fed into rx_* as word streams.
// Checks:
//   - nothing is sent while enable is low;
//   - five packets of random length (multiple of 4, 4..1500 bytes) leave as
//     Ethernet/IPv4/UDP frames with the fixed addresses and ports, a correct
//     IPv4 checksum, IPv4 and UDP lengths that follow the packet, UDP
//     checksum 0, identification counting up and the payload unchanged;
//   - an ARP request for the local IP address is answered, one for another
//     address is not;
//   - a datagram for the local port reaches m_axis unchanged, one for another
//     port does not.
module tb_pkt_create_udp;
  import gbmac_pkg::*;
  import tb_net_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  localparam logic [47:0] LMAC = 48'h02_00_00_00_00_01, RMAC = 48'h02_00_00_00_00_02;
  localparam logic [31:0] LIP = 32'hC0A8_010A, RIP = 32'hC0A8_0101;
  localparam int unsigned LPORT = 50000, RPORT = 50001;

  logic clk = 0, rst = 1, enable = 0;
  always #5ns clk = ~clk;

  // input FIFO model
  logic [31:0] pq[$];
  typedef struct { int len; } desc_t;
  desc_t dq[$];
  logic [31:0]      pl_data;
  logic             pl_rd, desc_valid, desc_pop;
  logic [LEN_W-1:0] desc_len;
  // the read side is driven from the queues after every change
  function automatic void refresh();
    pl_data    = (pq.size() != 0) ? pq[0] : '0;
    desc_valid = (dq.size() != 0);
    desc_len   = (dq.size() != 0) ? LEN_W'(dq[0].len) : '0;
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
  logic        ev_data, ev_arp, ev_rcvd;

  // default addresses and ports, repeated in the localparams above
  pkt_create_udp dut (
    .clk, .rst, .enable,
    .pl_data, .pl_rd, .desc_valid, .desc_len, .desc_pop,
    .tx_tdata, .tx_tkeep, .tx_tlast, .tx_tvalid, .tx_tready,
    .rx_tdata, .rx_tkeep, .rx_tlast, .rx_tuser, .rx_tvalid, .rx_tready,
    .m_axis_tdata(m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tlast(m_tlast),
    .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .ev_data_sent(ev_data), .ev_arp_sent(ev_arp), .ev_data_rcvd(ev_rcvd)
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

  task automatic srv(input bytes_t pl, input int unsigned dport = LPORT);
    rx_send(udp_datagram(RMAC, LMAC, RIP, LIP, RPORT, dport, pl));
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

  task automatic push_packet(input bytes_t d);
    desc_t ds;
    for (int i = 0; i < d.size(); i += 4) pq.push_back({d[i], d[i+1], d[i+2], d[i+3]});
    ds.len = d.size();
    dq.push_back(ds);
    refresh();
  endtask

  initial begin
    bytes_t f, pkts[5], srv_pl;
    int unsigned ident0 = 0;
    int k = 0, n_arp = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 5; n++) begin
      int len;
      pkts[n].delete();
      len = 4 * $urandom_range(1, 375);
      if (n == 0) len = 1024;
      for (int i = 0; i < len; i++) pkts[n].push_back(8'($urandom));
      push_packet(pkts[n]);
    end
    repeat (200) @(posedge clk);
    check(frames.size() == 0, "nothing sent while disabled");
    @(negedge clk);
    enable = 1;
    srv_pl.delete();
    for (int i = 0; i < 23; i++) srv_pl.push_back(8'($urandom));
    while (k < 5 || n_arp == 0) begin
      next_frame(f);
      if (get16(f, 12) == 16'h0806) begin
        n_arp++;
        check(f.size() == 42 && get16(f, 20) == 2 && get32(f, 28) == LIP && get32(f, 38) == RIP &&
              {get16(f, 22), get32(f, 24)} == 48'(LMAC) && {get16(f, 0), get32(f, 2)} == 48'(RMAC),
              "ARP reply fields");
      end else begin
        bit ok;
        check({get16(f, 0), get32(f, 2)} == 48'(RMAC) && {get16(f, 6), get32(f, 8)} == 48'(LMAC) &&
              get16(f, 12) == 16'h0800, $sformatf("packet %0d Ethernet header", k));
        check(ipv4_ok(f) && f[23] == 17, $sformatf("packet %0d IPv4 checksum and protocol", k));
        check(get32(f, 26) == LIP && get32(f, 30) == RIP && get16(f, 34) == LPORT &&
              get16(f, 36) == RPORT, $sformatf("packet %0d addresses and ports", k));
        check(get16(f, 16) == 28 + pkts[k].size() && get16(f, 38) == 8 + pkts[k].size() &&
              get16(f, 40) == 0, $sformatf("packet %0d lengths and zero UDP checksum (%0d %0d %0d)", k, get16(f, 16), get16(f, 38), f.size()));
        if (k == 0) ident0 = get16(f, 18);
        else check(get16(f, 18) == ((ident0 + k) & 16'hFFFF), $sformatf("packet %0d identification", k));
        ok = (f.size() == 42 + pkts[k].size());
        if (ok) foreach (pkts[k][i]) if (f[42+i] != pkts[k][i]) ok = 0;
        check(ok, $sformatf("packet %0d payload (%0d bytes)", k, pkts[k].size()));
        if (k == 1) begin
          rx_send(arp_request(RMAC, RIP, LIP + 1));     // not for us
          srv(srv_pl, LPORT + 1);                       // wrong port
          srv(srv_pl);
          rx_send(arp_request(RMAC, RIP, LIP));
        end
        k++;
      end
    end
    repeat (300) @(posedge clk);
    check(n_arp == 1 && frames.size() == 0, "exactly one ARP reply, no extra frames");
    check(rx_user.size() == 23 && rx_user_last == 1, $sformatf("datagram delivered once (%0d bytes)", rx_user.size()));
    begin
      bit ok;
      ok = (rx_user.size() == 23);
      foreach (rx_user[i]) if (i < 23 && rx_user[i] != srv_pl[i]) ok = 0;
      check(ok, "datagram payload bytes");
    end
    check(pq.size() == 0 && dq.size() == 0, "input FIFO drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gbmac_top_max: end-to-end test of the TCP version at the largest packet
// size the packet_size register accepts, 1500 bytes.
//
// The controller is instantiated with its default parameters; only the
// testbench's own packet length changes. Everything else is as in
// tb_gbmac_top: a PHY model on the RGMII pins, the testbench as the PC-side
// TCP server, AXI4 configuration and one MIIM write, ARP and bad-FCS frames,
// then 5 packets of 1500 bytes through a full connection (handshake, data
// acknowledged one by one, server data in and out of order, FIN). Each frame's
// FCS, checksums, sequence and acknowledgment numbers and payload are checked.
// At 1500 bytes per segment the frames are 1554 bytes long, which exercises
// the 11-bit length fields and an input FIFO holding close to two packets.
// The spacing of back-to-back frames is checked against 110 MB/s as well.
module tb_gbmac_top_max;
  import tb_net_pkg::*;

  localparam longint unsigned LOCAL_MAC  = 48'h02_00_00_00_00_01;
  localparam longint unsigned REMOTE_MAC = 48'h02_00_00_00_00_02;
  localparam int unsigned     LOCAL_IP   = 32'hC0A8_010A;
  localparam int unsigned     REMOTE_IP  = 32'hC0A8_0101;
  localparam int unsigned     LOCAL_PORT = 50000;
  localparam int unsigned     REMOTE_PORT = 50001;
  localparam int unsigned     N          = 1500;   // payload bytes per packet
  localparam int unsigned     X          = 5;      // packets
  localparam int unsigned     RX_LEN     = 100;    // bytes the server sends

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- clocks
  logic rst = 1'b1;
  logic clk_user = 0, clk_125 = 0, clk_125_90 = 0, clk_mm = 0;
  always #5ns   clk_user = ~clk_user;                 // 100 MHz
  always #4ns   clk_125  = ~clk_125;                  // 125 MHz
  initial begin #2ns; forever #4ns clk_125_90 = ~clk_125_90; end
  always #50ns  clk_mm   = ~clk_mm;                   // 10 MHz

  // ---------------------------------------------------------------- DUT
  logic [31:0] s_axis_tdata = '0;
  logic        s_axis_tlast = 0, s_axis_tvalid = 0, s_axis_tready;
  logic [31:0] m_axis_tdata;
  logic [3:0]  m_axis_tkeep;
  logic        m_axis_tlast, m_axis_tvalid;
  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic [3:0]  rgmii_txd, rgmii_rxd;
  logic        rgmii_tx_ctl, rgmii_txc, rgmii_rxc, rgmii_rx_ctl;
  logic        mdc, mdio_o, mdio_oe;

  gbmac_top dut (
    .rst, .clk_user, .clk_125, .clk_125_90, .clk_mm,
    .s_axis_tdata, .s_axis_tlast, .s_axis_tvalid, .s_axis_tready,
    .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready(1'b1),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .rgmii_txd, .rgmii_tx_ctl, .rgmii_txc, .rgmii_rxc, .rgmii_rxd, .rgmii_rx_ctl,
    .mdc, .mdio_o, .mdio_oe
  );

  rgmii_phy_model phy (
    .rgmii_txd, .rgmii_tx_ctl, .rgmii_txc, .rgmii_rxc, .rgmii_rxd, .rgmii_rx_ctl
  );

  // ---------------------------------------------------------------- watchdog
  initial begin
    #3ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- AXI4
  task automatic axi_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk_mm);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk_mm); while (!(awready && wready));
    @(negedge clk_mm);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk_mm);
  endtask

  task automatic axi_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk_mm);
    araddr = a; arvalid = 1;
    do @(posedge clk_mm); while (!arready);
    @(negedge clk_mm);
    arvalid = 0;
    while (!rvalid) @(negedge clk_mm);
    d = rdata;
  endtask

  // ---------------------------------------------------------------- MIIM monitor
  bit mii_bits[$];
  always @(posedge mdc) if (mdio_oe) mii_bits.push_back(mdio_o);

  // ---------------------------------------------------------------- mechanism counters
  int n_underrun_cycles = 0, n_backpressure = 0, n_bad_rx = 0, n_dup_ack_trig = 0;
  always @(posedge clk_user) if (s_axis_tvalid && !s_axis_tready) n_backpressure++;
  always @(posedge rgmii_rxc) if (!dut.rst_rx && dut.u_temac.rx_frame_bad) n_bad_rx++;
  always @(posedge clk_125) if (!dut.rst_tx && dut.u_temac.gmii_tx_er) n_underrun_cycles++;

  // ---------------------------------------------------------------- user data
  function automatic byte unsigned pat(input int unsigned i);
    return 8'((i * 37) ^ (i >> 7));
  endfunction

  initial begin : source
    int unsigned w = 0;
    wait (!rst);
    repeat (20) @(posedge clk_user);
    while (w < X * N / 4) begin
      @(negedge clk_user);
      s_axis_tdata  = {pat(4*w), pat(4*w+1), pat(4*w+2), pat(4*w+3)};
      s_axis_tlast  = (w == X * N / 4 - 1);
      s_axis_tvalid = 1;
      forever begin
        bit taken;
        #4ns taken = s_axis_tready;     // sampled just before the rising edge
        @(posedge clk_user);
        if (taken) break;
        @(negedge clk_user);
      end
      w++;
    end
    @(negedge clk_user);
    s_axis_tvalid = 0;
    s_axis_tlast  = 0;
  end

  byte unsigned rx_user[$];
  int           rx_user_last = 0;
  always @(negedge clk_user) begin
    if (m_axis_tvalid) begin
      for (int i = 0; i < 4; i++) if (m_axis_tkeep[3-i]) rx_user.push_back(m_axis_tdata[31-8*i -: 8]);
      if (m_axis_tlast) rx_user_last++;
    end
  end

  // ---------------------------------------------------------------- frames
  task automatic next_frame(output eth_frame f);
    time t0 = $time;
    while (phy.frames.size() == 0) begin
      @(posedge clk_125);
      if ($time - t0 > 200us) begin
        failures++;
        $display("FAIL %0t: no frame from the controller", $time);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    f = phy.frames.pop_front();
    check(f.fcs_ok, "frame FCS");
  endtask

  task automatic server_send(input int unsigned seq, input int unsigned ack,
                             input int unsigned flags, input bytes_t pl);
    phy.send(tcp_segment(REMOTE_MAC, LOCAL_MAC, REMOTE_IP, LOCAL_IP, REMOTE_PORT, LOCAL_PORT,
                         seq, ack, flags, pl), 0);
  endtask

  // ---------------------------------------------------------------- main
  initial begin : main
    eth_frame    f;
    logic [31:0] r;
    bytes_t      none, srv_pl, bad_pl;
    int unsigned k = 0, n_syn = 0, n_data = 0, n_pure_ack = 0, n_fin = 0, max_ack = 0;
    int unsigned flags, seq, ack, plen, mii_pre;
    time         t_data[$];
    bit          sent_srv = 0, pl_ok;

    repeat (5) @(posedge clk_mm);
    rst = 0;
    repeat (5) @(posedge clk_mm);
    phy.frames.delete();          // pins are undefined until the first clocks of reset
    phy.bad_preamble = 0;
    phy.bad_fcs      = 0;

    // ---- configuration registers
    axi_write(8'h0C, N);
    axi_read(8'h0C, r);
    check(r == N, "packet_size register reads back");
    axi_write(8'h00, 5'd1);
    axi_write(8'h08, 8'd4);
    axi_write(8'h14, 5'd0);
    axi_write(8'h10, 16'h1140);
    axi_write(8'h18, 1);
    axi_read(8'h18, r);
    check(r[0] == 1'b1, "MIIM busy after a PHY write");
    do axi_read(8'h18, r); while (r[0]);
    // ---- MIIM frame: 32 ones, 01, 01, PHY 1, reg 0, 10, data 0x1140
    check(mii_bits.size() == 64, $sformatf("MIIM frame has 64 bits (%0d)", mii_bits.size()));
    mii_pre = 0;
    while (mii_pre < mii_bits.size() && mii_bits[mii_pre]) mii_pre++;
    check(mii_pre == 32, "MIIM preamble of 32 ones");
    if (mii_bits.size() == 64) begin
      logic [31:0] fr;
      for (int i = 0; i < 32; i++) fr[31-i] = mii_bits[32+i];
      check(fr == {2'b01, 2'b01, 5'd1, 5'd0, 2'b10, 16'h1140}, $sformatf("MIIM write frame %h", fr));
    end

    // ---- ARP: a corrupted request is ignored, a good one answered
    phy.send(arp_request(REMOTE_MAC, REMOTE_IP, LOCAL_IP), 1);
    phy.send(arp_request(REMOTE_MAC, REMOTE_IP, LOCAL_IP), 0);
    next_frame(f);
    check(f.b.size() == 60, "ARP reply padded to 60 bytes");
    check({get16(f.b, 0), get32(f.b, 2)} == 48'(REMOTE_MAC) && get16(f.b, 12) == 16'h0806 &&
          get16(f.b, 20) == 2 && get32(f.b, 28) == LOCAL_IP && get32(f.b, 38) == REMOTE_IP &&
          {get16(f.b, 22), get32(f.b, 24)} == 48'(LOCAL_MAC), "ARP reply fields");
    repeat (200) @(posedge clk_125);
    check(phy.frames.size() == 0, "no answer to the corrupted ARP request");
    check(n_bad_rx == 1, $sformatf("bad-FCS frame rejected by the MAC (%0d)", n_bad_rx));

    // ---- open the connection and stream
    axi_write(8'h1C, 1);
    for (int i = 0; i < RX_LEN; i++) srv_pl.push_back(8'(i * 5 + 1));
    for (int i = 0; i < 8; i++) bad_pl.push_back(8'hEE);
    forever begin
      next_frame(f);
      check(ipv4_ok(f.b), "IPv4 header checksum");
      check(f.b[23] == 6 && tcp_ok(f.b), "TCP checksum");
      check(get16(f.b, 34) == LOCAL_PORT && get16(f.b, 36) == REMOTE_PORT &&
            get32(f.b, 26) == LOCAL_IP && get32(f.b, 30) == REMOTE_IP, "addresses and ports");
      flags = f.b[47];
      seq   = get32(f.b, 38);
      ack   = get32(f.b, 42);
      plen  = get16(f.b, 16) - 40;
      if (flags & 6'h10) if (ack > max_ack) max_ack = ack;
      if (flags & 6'h02) begin
        n_syn++;
        check(seq == 0 && plen == 0, "SYN with SEQ=0");
        server_send(0, 1, 6'h12, none);                    // SYN+ACK, SEQ=0, ACK=1
      end else if (flags & 6'h01) begin
        n_fin++;
        check(seq == 1 + X * N, $sformatf("FIN SEQ=1+X*N (%0d)", seq));
        check(k == X, "all data sent before FIN");
        server_send(1 + RX_LEN, 2 + X * N, 6'h10, none);   // ACK=2+X*N
        break;
      end else if (plen > 0) begin
        n_data++;
        t_data.push_back(f.t_start);
        check(seq == 1 + k * N, $sformatf("data SEQ=1+%0d*N (got %0d)", k, seq));
        check(plen == N, "data segment of N bytes");
        pl_ok = 1;
        for (int i = 0; i < plen; i++) if (f.b[54+i] != pat(k * N + i)) pl_ok = 0;
        check(pl_ok, $sformatf("payload of packet %0d", k));
        k++;
        server_send(sent_srv ? 1 + RX_LEN : 1, 1 + k * N, 6'h10, none);  // ACK=1+k*N
        if (k == 2) begin
          server_send(1, 1 + k * N, 6'h18, srv_pl);          // in order
          server_send(5000, 1 + k * N, 6'h18, bad_pl);       // out of order
          sent_srv = 1;
        end
      end else begin
        n_pure_ack++;
        if (n_syn == 1 && n_pure_ack == 1) check(seq == 1 && ack == 1, "handshake ACK SEQ=1 ACK=1");
      end
    end

    repeat (2000) @(posedge clk_user);
    axi_read(8'h20, r);
    check(r[2:0] == 3'd5, $sformatf("connection closed (state %0d)", r[2:0]));
    check(r[4:3] == 2'b00, "no underrun, no receive overflow");
    check(max_ack == 1 + RX_LEN, $sformatf("server data acknowledged (ACK=%0d)", max_ack));
    check(rx_user.size() == RX_LEN && rx_user_last == 1,
          $sformatf("only the in-order payload delivered (%0d bytes, %0d ends)", rx_user.size(), rx_user_last));
    pl_ok = (rx_user.size() == RX_LEN);
    foreach (rx_user[i]) if (i < RX_LEN && rx_user[i] != srv_pl[i]) pl_ok = 0;
    check(pl_ok, "received payload bytes");

    // ---- throughput: back-to-back data frames (packets 2.. were queued)
    for (int i = 2; i < t_data.size(); i++) begin
      real dt_ns, mbps;
      dt_ns = real'(t_data[i] - t_data[i-1]) / 1ns;
      mbps  = real'(N) / dt_ns * 1000.0;
      check(mbps >= 110.0, $sformatf("throughput %0.1f MB/s between packets %0d and %0d",
                                     mbps, i - 1, i));
      if (i == t_data.size() - 1) $display("data throughput %0.1f MB/s", mbps);
    end

    // ---- every mechanism happened
    check(n_syn == 1, "SYN sent once");
    check(n_data == X, "X data segments");
    check(n_pure_ack >= 2, $sformatf("pure ACKs sent (%0d)", n_pure_ack));
    check(n_fin == 1, "FIN sent");
    check(n_backpressure > 0, "input FIFO back-pressure happened");
    check(n_underrun_cycles == 0, "no transmit underrun");
    check(phy.bad_preamble == 0 && phy.bad_fcs == 0, "preambles and FCS");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

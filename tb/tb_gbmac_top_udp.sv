// tb_gbmac_top_udp: end-to-end test of the controller, UDP version.
//
// A PHY model on the RGMII pins stands in for the network and the testbench
// plays the PC. It configures the controller over AXI4 (packet size 1024
// bytes), checks the ARP reply, then streams 5 packets: four of 1024 bytes
// (1066-byte frames: 42 header bytes and 1024 data bytes) and a last one
// of 984 bytes closed early by tlast. Each frame's FCS, IPv4 checksum,
// identification (counting up), UDP length, zero UDP checksum and payload
// are checked, and the spacing of back-to-back frames against 110 MB/s. It
// also sends one datagram to the controller's port, which must come out on
// m_axis, and one to another port, which must not.
module tb_gbmac_top_udp;
  import tb_net_pkg::*;

  localparam longint unsigned LOCAL_MAC  = 48'h02_00_00_00_00_01;
  localparam longint unsigned REMOTE_MAC = 48'h02_00_00_00_00_02;
  localparam int unsigned     LOCAL_IP   = 32'hC0A8_010A;
  localparam int unsigned     REMOTE_IP  = 32'hC0A8_0101;
  localparam int unsigned     LOCAL_PORT = 50000;
  localparam int unsigned     REMOTE_PORT = 50001;
  localparam int unsigned     N          = 1024;   // payload bytes per packet
  localparam int unsigned     X          = 5;      // packets
  localparam int unsigned     RX_LEN     = 100;    // bytes the PC sends
  localparam int unsigned     LAST_LEN   = N - 40; // last packet, cut by tlast

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

  gbmac_top #(.PROTOCOL(gbmac_pkg::PROTO_UDP)) dut (
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
    while (w < X * N / 4 - 10) begin
      @(negedge clk_user);
      s_axis_tdata  = {pat(4*w), pat(4*w+1), pat(4*w+2), pat(4*w+3)};
      s_axis_tlast  = (w == X * N / 4 - 11);
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


  // ---------------------------------------------------------------- main
  initial begin : main
    eth_frame    f;
    logic [31:0] r;
    bytes_t      srv_pl, other_pl;
    int unsigned k = 0, plen, base = 0;
    time         t_data[$];
    bit          pl_ok;

    repeat (5) @(posedge clk_mm);
    rst = 0;
    repeat (5) @(posedge clk_mm);
    phy.frames.delete();          // pins are undefined until the first clocks of reset
    phy.bad_preamble = 0;
    phy.bad_fcs      = 0;

    axi_write(8'h0C, N);
    axi_read(8'h0C, r);
    check(r == N, "packet_size register reads back");

    // ---- ARP
    phy.send(arp_request(REMOTE_MAC, REMOTE_IP, LOCAL_IP), 0);
    next_frame(f);
    check(f.b.size() == 60, "ARP reply padded to 60 bytes");
    check(get16(f.b, 12) == 16'h0806 && get16(f.b, 20) == 2 && get32(f.b, 28) == LOCAL_IP &&
          {get16(f.b, 22), get32(f.b, 24)} == 48'(LOCAL_MAC), "ARP reply fields");

    // ---- datagrams from the PC
    for (int i = 0; i < RX_LEN; i++) srv_pl.push_back(8'(i * 3 + 7));
    for (int i = 0; i < 12; i++) other_pl.push_back(8'h5A);
    phy.send(udp_datagram(REMOTE_MAC, LOCAL_MAC, REMOTE_IP, LOCAL_IP, REMOTE_PORT, LOCAL_PORT,
                          srv_pl), 0);
    phy.send(udp_datagram(REMOTE_MAC, LOCAL_MAC, REMOTE_IP, LOCAL_IP, REMOTE_PORT, 1234,
                          other_pl), 0);

    // ---- stream, once the input FIFO is full
    wait (n_backpressure > 0);
    axi_write(8'h1C, 1);
    while (k < X) begin
      next_frame(f);
      plen = (k == X - 1) ? LAST_LEN : N;
      check(f.b.size() == 42 + plen, $sformatf("frame %0d is %0d bytes (%0d)", k, 42 + plen, f.b.size()));
      check(ipv4_ok(f.b), "IPv4 header checksum");
      check(f.b[23] == 17 && get16(f.b, 16) == 28 + plen, "IPv4 protocol and length");
      check(get16(f.b, 18) == k, $sformatf("identification %0d", get16(f.b, 18)));
      check(get16(f.b, 34) == LOCAL_PORT && get16(f.b, 36) == REMOTE_PORT &&
            get16(f.b, 38) == 8 + plen && get16(f.b, 40) == 0, "UDP header");
      pl_ok = (f.b.size() == 42 + plen);
      for (int i = 0; i < plen && pl_ok; i++) if (f.b[42+i] != pat(base + i)) pl_ok = 0;
      check(pl_ok, $sformatf("payload of packet %0d", k));
      t_data.push_back(f.t_start);
      base += plen;
      k++;
    end

    repeat (2000) @(posedge clk_user);
    check(phy.frames.size() == 0, "nothing sent after the last packet");
    check(rx_user.size() == RX_LEN && rx_user_last == 1,
          $sformatf("only the datagram for this port delivered (%0d bytes)", rx_user.size()));
    pl_ok = (rx_user.size() == RX_LEN);
    foreach (rx_user[i]) if (i < RX_LEN && rx_user[i] != srv_pl[i]) pl_ok = 0;
    check(pl_ok, "received payload bytes");

    for (int i = 2; i < t_data.size() - 1; i++) begin
      real dt_ns, mbps;
      dt_ns = real'(t_data[i] - t_data[i-1]) / 1ns;
      mbps  = real'(N) / dt_ns * 1000.0;
      check(mbps >= 110.0, $sformatf("throughput %0.1f MB/s", mbps));
      if (i == 2) $display("data throughput %0.1f MB/s", mbps);
    end

    check(n_backpressure > 0, "input FIFO back-pressure happened");
    check(n_underrun_cycles == 0, "no transmit underrun");
    check(phy.bad_preamble == 0 && phy.bad_fcs == 0, "preambles and FCS");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

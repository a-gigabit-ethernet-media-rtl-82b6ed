// tb_temac: MAC core test with the GMII transmit bus looped back to the
// receive bus.
//
// Random-length frames (20 to 300 bytes, random bytes) are written word by
// word into the user-side transmit stream at 100 MHz; they cross to the
// 125 MHz GMII clock, are sent with preamble and FCS, come back on the receive
// side (a separate 125 MHz clock with a different phase), cross back and must
// leave the user-side receive stream unchanged (padded to 60 bytes when
// shorter), with tuser low. The receive stream is slowed down by random
// tready. A MIIM write through the core is checked for its MDC activity.
module tb_temac;
  import gbmac_pkg::*;
  import tb_net_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk_user = 0, clk_tx = 0, clk_rx = 0, clk_mm = 0, rst = 1;
  always #5ns   clk_user = ~clk_user;
  always #4ns   clk_tx   = ~clk_tx;
  initial begin #1.7ns; forever #4ns clk_rx = ~clk_rx; end
  always #50ns  clk_mm   = ~clk_mm;

  logic [31:0] s_tdata = 0, m_tdata;
  logic [3:0]  s_tkeep = 0, m_tkeep;
  logic        s_tlast = 0, s_tvalid = 0, s_tready, m_tlast, m_tuser, m_tvalid, m_tready = 0;
  logic [7:0]  txd, rxd = 0;
  logic        tx_en, tx_er, dv = 0, rer = 0;
  logic        underrun, ovf, fdone, fgood, fbad, phy_write = 0, busy, mdc, mdio_o, mdio_oe;
  cfg_t        cfg;

  // loopback through a register in the receive clock
  always @(posedge clk_rx) begin rxd <= txd; dv <= tx_en; rer <= tx_er; end

  temac dut (
    .clk_user, .rst_user(rst),
    .s_axis_tdata(s_tdata), .s_axis_tkeep(s_tkeep), .s_axis_tlast(s_tlast),
    .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tkeep(m_tkeep), .m_axis_tlast(m_tlast),
    .m_axis_tuser(m_tuser), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .gmii_tx_clk(clk_tx), .rst_tx(rst), .gmii_txd(txd), .gmii_tx_en(tx_en), .gmii_tx_er(tx_er),
    .tx_underrun(underrun), .tx_frame_done(fdone),
    .gmii_rx_clk(clk_rx), .rst_rx(rst), .gmii_rxd(rxd), .gmii_rx_dv(dv), .gmii_rx_er(rer),
    .rx_overflow(ovf), .rx_frame_good(fgood), .rx_frame_bad(fbad),
    .clk_mm, .rst_mm(rst), .cfg, .phy_write, .miim_busy(busy), .mdc, .mdio_o, .mdio_oe
  );

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NF = 20;
  bytes_t sent[$];
  bytes_t got[$];
  byte unsigned cur[$];
  int n_tuser = 0, n_good = 0, n_bad = 0, n_mdc = 0;

  always @(posedge clk_rx) if (!rst) begin
    if (fgood) n_good++;
    if (fbad) n_bad++;
  end
  always @(posedge mdc) n_mdc++;

  // receive sink, random tready: tready is chosen at the falling edge and the
  // word is taken if valid, i.e. the handshake of the next rising edge
  always @(negedge clk_user) begin
    m_tready = ($urandom_range(0, 3) != 0);
    if (m_tvalid && m_tready) begin
      for (int j = 0; j < 4; j++) if (m_tkeep[3-j]) cur.push_back(m_tdata[31-8*j -: 8]);
      if (m_tlast) begin
        got.push_back(cur);
        cur.delete();
        if (m_tuser) n_tuser++;
      end
    end
  end

  task automatic send(input bytes_t d);
    for (int i = 0; i < d.size(); i += 4) begin
      s_tdata = '0; s_tkeep = '0;
      for (int j = 0; j < 4; j++) if (i + j < d.size()) begin
        s_tdata[31-8*j -: 8] = d[i+j];
        s_tkeep[3-j] = 1'b1;
      end
      s_tlast  = (i + 4 >= d.size());
      s_tvalid = 1;
      @(negedge clk_user);
      while (!s_tready) @(negedge clk_user);
      @(posedge clk_user);
      #1ns;
    end
    s_tvalid = 0; s_tlast = 0;
  endtask

  initial begin
    cfg = '{phy_addr: 5'd1, no_preamble: 1'b0, clk_div: 8'd4, packet_size: 11'd1024,
            phy_data: 16'h1140, phy_reg_addr: 5'd0};
    repeat (10) @(posedge clk_mm);
    rst = 0;
    repeat (5) @(posedge clk_user);
    #1ns;
    for (int k = 0; k < NF; k++) begin
      bytes_t d;
      int len;
      d.delete();
      len = $urandom_range(20, 300);
      for (int i = 0; i < len; i++) d.push_back(8'($urandom));
      sent.push_back(d);
      send(d);
    end
    @(negedge clk_mm);
    phy_write = 1;
    @(negedge clk_mm);
    phy_write = 0;
    wait (got.size() == NF);
    wait (!busy);
    for (int k = 0; k < NF; k++) begin
      bytes_t e;
      e = sent[k];
      while (e.size() < 60) e.push_back(8'h00);
      check(got[k] == e, $sformatf("frame %0d (%0d bytes) looped back unchanged", k, sent[k].size()));
    end
    check(n_tuser == 0 && n_good == NF && n_bad == 0, "all frames received with a good FCS");
    check(!underrun && !ovf, "no underrun or overflow");
    check(n_mdc == 64, $sformatf("MIIM write: 64 MDC periods (%0d)", n_mdc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule


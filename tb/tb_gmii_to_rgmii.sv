// tb_gmii_to_rgmii: RGMII converter test in loopback.
//
// The RGMII transmit pins are wired back to the receive pins, with the
// transmitted TXC (the 90-degree clock) used as RXC, as a PHY in loopback
// would. Random bytes with random tx_en/tx_er are sent for 400 clocks; the
// received GMII stream must repeat them with a fixed latency. Also checks that
// TXC rises a quarter period after the 0-degree clock and that RX_CTL/TX_CTL
// code tx_er as en XOR er in the second half of the clock.
module tb_gmii_to_rgmii;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk = 0, clk90 = 0, rst = 1;
  always #4ns clk = ~clk;
  initial begin #2ns; forever #4ns clk90 = ~clk90; end

  logic [7:0] txd = 0, rxd;
  logic       en = 0, er = 0, dv, rer, rx_clk;
  logic [3:0] p_txd;
  logic       p_ctl, p_txc;

  gmii_to_rgmii dut (
    .clk_tx(clk), .clk_tx90(clk90), .rst_tx(rst),
    .gmii_txd(txd), .gmii_tx_en(en), .gmii_tx_er(er),
    .rgmii_txd(p_txd), .rgmii_tx_ctl(p_ctl), .rgmii_txc(p_txc),
    .rgmii_rxc(p_txc), .rst_rx(rst), .rgmii_rxd(p_txd), .rgmii_rx_ctl(p_ctl),
    .gmii_rx_clk(rx_clk), .gmii_rxd(rxd), .gmii_rx_dv(dv), .gmii_rx_er(rer)
  );

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] sent[$], rcvd[$];
  always @(negedge clk) if (!rst) sent.push_back({en, er, txd});
  always @(negedge rx_clk) if (!rst) rcvd.push_back({dv, rer, rxd});

  time t_clk, t_txc;
  int  phase_ok = 1;
  always @(posedge clk) t_clk = $time;
  always @(posedge p_txc) begin
    t_txc = $time;
    if (t_txc - t_clk != 2ns) phase_ok = 0;
  end

  initial begin
    int lat;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      txd = 8'($urandom);
      en  = ($urandom_range(0, 3) != 0);
      er  = ($urandom_range(0, 7) == 0);
      @(negedge clk);
    end
    en = 0; er = 0;
    repeat (10) @(negedge clk);
    // latency: the shift with the most matching samples; then every sample
    // is checked at that shift
    lat = 0;
    begin
      int best;
      best = -1;
      for (int k = 0; k < 6; k++) begin
        int m;
        m = 0;
        for (int i = 20; i < 400; i++) if (rcvd[i + k] == sent[i]) m++;
        if (m > best) begin best = m; lat = k; end
      end
    end
    for (int i = 20; i < 400; i++)
      check(rcvd[i + lat] == sent[i], $sformatf("GMII sample %0d received as sent (latency %0d)", i, lat));
    check(lat >= 1 && lat <= 4, $sformatf("latency of %0d clocks", lat));
    begin
      int nen, ner;
      nen = 0; ner = 0;
      for (int i = 20; i < 400; i++) begin nen += sent[i][9]; ner += sent[i][8]; end
      check(nen > 200 && ner > 20, "stimulus has tx_en and tx_er");
    end
    check(phase_ok == 1, "TXC rises a quarter period after the transmit clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

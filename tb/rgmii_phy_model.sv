// rgmii_phy_model: behavioural model of the RGMII side of a gigabit PHY
// (the role of the board's Ethernet transceiver), for testbenches only.
//
// Transmit direction (controller to network): samples RGMII TXD/TX_CTL on
// both edges of TXC, rebuilds the bytes, checks preamble, SFD and FCS and
// appends each frame (without preamble and FCS) to the queue `frames`.
// Receive direction (network to controller): the task send() puts a frame on
// RXD/RX_CTL with its own 125 MHz RXC, adding preamble, SFD and FCS; with
// corrupt = 1 the FCS is inverted. A 12-byte gap follows each frame.
module rgmii_phy_model
  import tb_net_pkg::*;
(
  input  logic [3:0] rgmii_txd,
  input  logic       rgmii_tx_ctl,
  input  logic       rgmii_txc,
  output logic       rgmii_rxc,
  output logic [3:0] rgmii_rxd,
  output logic       rgmii_rx_ctl
);

  eth_frame    frames[$];
  int unsigned bad_preamble = 0;
  int unsigned bad_fcs      = 0;
  int unsigned tx_er_seen   = 0;

  // ---------------------------------------------------------------- transmit
  logic [3:0] lo;
  logic       ctl_r;
  byte unsigned cur[$];
  bit         in_frame = 0;
  time        t_first;

  always @(posedge rgmii_txc) begin
    lo    = rgmii_txd;
    ctl_r = rgmii_tx_ctl;
  end

  always @(negedge rgmii_txc) begin
    if (ctl_r) begin
      if (!in_frame) begin
        in_frame = 1;
        cur.delete();
        t_first = $time;
      end
      cur.push_back({rgmii_txd, lo});
      if (ctl_r ^ rgmii_tx_ctl) tx_er_seen++;
    end else if (in_frame) begin
      eth_frame f;
      bytes_t   body;
      int       n;
      f = new();
      n = cur.size();
      body.delete();
      in_frame = 0;
      for (int i = 0; i < 7; i++) if (i >= n || cur[i] != 8'h55) bad_preamble++;
      if (n < 8 || cur[7] != 8'hD5) bad_preamble++;
      for (int i = 8; i < n - 4; i++) body.push_back(cur[i]);
      f.b       = body;
      f.t_start = t_first + 8 * 8ns;
      f.fcs_ok  = (n >= 12) &&
                  (crc32(body) == {cur[n-1], cur[n-2], cur[n-3], cur[n-4]});
      if (!f.fcs_ok) bad_fcs++;
      frames.push_back(f);
    end
  end

  // ---------------------------------------------------------------- receive
  initial begin
    rgmii_rxc = 1'b0;
    #1.3ns;
    forever #4ns rgmii_rxc = ~rgmii_rxc;
  end

  initial begin
    rgmii_rxd    = '0;
    rgmii_rx_ctl = 1'b0;
  end

  task automatic put_byte(input byte unsigned b, input bit dv);
    @(negedge rgmii_rxc);
    #1ns;
    rgmii_rxd    = b[3:0];
    rgmii_rx_ctl = dv;
    @(posedge rgmii_rxc);
    #1ns;
    rgmii_rxd    = b[7:4];
    rgmii_rx_ctl = dv;             // rx_er = 0
  endtask

  task automatic send(input bytes_t d, input bit corrupt);
    int unsigned c;
    bytes_t      f = d;
    while (f.size() < 60) f.push_back(8'h00);
    c = crc32(f);
    if (corrupt) c = ~c;
    for (int i = 0; i < 7; i++) put_byte(8'h55, 1);
    put_byte(8'hD5, 1);
    foreach (f[i]) put_byte(f[i], 1);
    for (int i = 0; i < 4; i++) put_byte(8'(c >> (8*i)), 1);
    for (int i = 0; i < 12; i++) put_byte(8'h00, 0);
  endtask

endmodule

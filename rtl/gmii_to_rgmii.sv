// gmii_to_rgmii: converts the 8-bit single-data-rate GMII of the MAC core into
// the 4-bit double-data-rate RGMII of the PHY, and back.
//
// Transmit: each 125 MHz GMII byte leaves on four pins in one clock, bits
// [3:0] while the clock is high and bits [7:4] while it is low; TX_CTL carries
// tx_en in the high phase and tx_en XOR tx_er in the low phase. The data and
// control pins are launched by clk_tx (0 degrees); the TXC pin is driven from
// clk_tx90, the copy shifted by 90 degrees, so that the PHY samples data in
// the middle of each half period. Receive: RXD and RX_CTL are sampled on both
// edges of the PHY's RXC and reassembled into GMII bytes in that clock.
//
// The document gives the function (12 pins instead of 24, DDR at 125 MHz,
// receive pins on the PHY's clock, transmit on two internal 125 MHz clocks 90
// degrees apart); the RGMII bit assignment is the RGMII standard's.
// Timing: a GMII byte registered at edge n is on the pins from edge n+1
// (high nibble half a period later); a received byte appears on the GMII side
// one RXC period after its falling-edge half was sampled.
module gmii_to_rgmii (
  // transmit, clk_tx domain
  input  logic       clk_tx,
  input  logic       clk_tx90,
  input  logic       rst_tx,
  input  logic [7:0] gmii_txd,
  input  logic       gmii_tx_en,
  input  logic       gmii_tx_er,
  output logic [3:0] rgmii_txd,
  output logic       rgmii_tx_ctl,
  output logic       rgmii_txc,
  // receive, PHY clock domain
  input  logic       rgmii_rxc,
  input  logic       rst_rx,
  input  logic [3:0] rgmii_rxd,
  input  logic       rgmii_rx_ctl,
  output logic       gmii_rx_clk,
  output logic [7:0] gmii_rxd,
  output logic       gmii_rx_dv,
  output logic       gmii_rx_er
);

  // ---------------------------------------------------------------- transmit
  for (genvar i = 0; i < 4; i++) begin : g_txd
    ddr_out u_txd (.clk(clk_tx), .rst(rst_tx), .d_rise(gmii_txd[i]), .d_fall(gmii_txd[i+4]),
                   .q(rgmii_txd[i]));
  end

  ddr_out u_txctl (.clk(clk_tx), .rst(rst_tx), .d_rise(gmii_tx_en),
                   .d_fall(gmii_tx_en ^ gmii_tx_er), .q(rgmii_tx_ctl));

  ddr_out u_txc (.clk(clk_tx90), .rst(1'b0), .d_rise(1'b1), .d_fall(1'b0), .q(rgmii_txc));

  // ---------------------------------------------------------------- receive
  logic [3:0] lo_nib, hi_nib;
  logic       ctl_rise, ctl_fall;

  always_ff @(posedge rgmii_rxc) begin
    if (rst_rx) begin
      lo_nib     <= '0;
      ctl_rise   <= 1'b0;
      gmii_rxd   <= '0;
      gmii_rx_dv <= 1'b0;
      gmii_rx_er <= 1'b0;
    end else begin
      // the byte whose halves were sampled at the previous rise and fall
      gmii_rxd   <= {hi_nib, lo_nib};
      gmii_rx_dv <= ctl_rise;
      gmii_rx_er <= ctl_rise ^ ctl_fall;
      lo_nib     <= rgmii_rxd;
      ctl_rise   <= rgmii_rx_ctl;
    end
  end

  always_ff @(negedge rgmii_rxc) begin
    if (rst_rx) begin
      hi_nib   <= '0;
      ctl_fall <= 1'b0;
    end else begin
      hi_nib   <= rgmii_rxd;
      ctl_fall <= rgmii_rx_ctl;
    end
  end

  assign gmii_rx_clk = rgmii_rxc;

endmodule

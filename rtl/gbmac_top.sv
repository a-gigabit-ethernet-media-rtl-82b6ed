// gbmac_top: gigabit Ethernet media access controller for TCP or UDP data
// streaming without a processor.
//
// The user pushes 32-bit data words into s_axis; the controller cuts them into
// packets of packet_size bytes, wraps each in Ethernet/IPv4/TCP (or UDP)
// headers and sends it to one hard-coded server through the RGMII pins of an
// external gigabit PHY. Data arriving from the server comes out on m_axis.
// ARP requests for the controller's IP address are answered. A processor-free
// bus master configures it through the AXI4 register port, including writes to
// the PHY's registers over MDC/MDIO.
//
// Blocks, as in the controller's block diagram: input FIFO (axis_in_fifo),
// packet creation (pkt_create_tcp or pkt_create_udp, chosen by PROTOCOL, the
// document's two versions), MAC core (temac: dual-clock FIFOs, GMII transmit
// and receive FSMs, MIIM master), GMII-to-RGMII converter, memory-mapped
// configuration registers.
//
// Clock domains (the clock generator is outside this module):
//   clk_user   user streams, input FIFO, packet creation (any frequency of at
//              least 31.25 MHz, so that 32-bit words keep up with 1 Gb/s)
//   clk_125    RGMII/GMII transmit, 125 MHz; clk_125_90 is the same clock
//              shifted by 90 degrees and drives only the TXC pin
//   rgmii_rxc  receive clock from the PHY, 125 MHz
//   clk_mm     AXI4 registers and MIIM (10 MHz in the document's build)
// rst is asynchronous, active high, and is synchronized into each domain.
// The configuration reaches clk_user through two-flip-flop synchronizers and
// should be changed only while enable is low.
//
// Register map: see mm_config_regs. Status register (0x20):
//   [2:0] TCP connection state (0 closed, 1 SYN sent, 2 established,
//         3 draining, 4 FIN sent, 5 done; 0 in the UDP version)
//   [3]   transmit underrun, [4] receive FIFO overflow (sticky)
module gbmac_top
  import gbmac_pkg::*;
#(
  parameter proto_e      PROTOCOL    = PROTO_TCP,
  parameter logic [47:0] LOCAL_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [47:0] REMOTE_MAC  = 48'h02_00_00_00_00_02,
  parameter logic [31:0] LOCAL_IP    = 32'hC0A8_010A,
  parameter logic [31:0] REMOTE_IP   = 32'hC0A8_0101,
  parameter logic [15:0] LOCAL_PORT  = 16'd50000,
  parameter logic [15:0] REMOTE_PORT = 16'd50001
) (
  input  logic        rst,
  input  logic        clk_user,
  input  logic        clk_125,
  input  logic        clk_125_90,
  input  logic        clk_mm,
  // user data to send
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  // received user data
  output logic [31:0] m_axis_tdata,
  output logic [3:0]  m_axis_tkeep,
  output logic        m_axis_tlast,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  // AXI4 register port
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // RGMII to the PHY
  output logic [3:0]  rgmii_txd,
  output logic        rgmii_tx_ctl,
  output logic        rgmii_txc,
  input  logic        rgmii_rxc,
  input  logic [3:0]  rgmii_rxd,
  input  logic        rgmii_rx_ctl,
  // MIIM to the PHY (MDIO pad buffer outside)
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe
);

  // ---------------------------------------------------------------- resets
  logic rst_user, rst_tx, rst_rx, rst_mm;
  logic gmii_rx_clk;

  sync_bits #(.W(1), .RST_VAL(1'b1)) u_rst_user (.clk(clk_user),    .rst(rst), .d(1'b0), .q(rst_user));
  sync_bits #(.W(1), .RST_VAL(1'b1)) u_rst_tx   (.clk(clk_125),     .rst(rst), .d(1'b0), .q(rst_tx));
  sync_bits #(.W(1), .RST_VAL(1'b1)) u_rst_rx   (.clk(gmii_rx_clk), .rst(rst), .d(1'b0), .q(rst_rx));
  sync_bits #(.W(1), .RST_VAL(1'b1)) u_rst_mm   (.clk(clk_mm),      .rst(rst), .d(1'b0), .q(rst_mm));

  // ---------------------------------------------------------------- registers
  cfg_t        cfg;
  logic        phy_write, enable_mm, miim_busy;
  logic [31:0] status_mm;

  mm_config_regs u_regs (
    .clk(clk_mm), .rst(rst_mm),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .cfg, .phy_write, .enable(enable_mm), .miim_busy, .status(status_mm)
  );

  logic [LEN_W-1:0] packet_size_u;
  logic             enable_u;

  sync_bits #(.W(LEN_W + 1), .RST_VAL('0)) u_cfg_sync (
    .clk(clk_user), .rst(rst_user),
    .d({cfg.packet_size, enable_mm}), .q({packet_size_u, enable_u})
  );

  // ---------------------------------------------------------------- input FIFO
  logic [31:0]      pl_data;
  logic             pl_rd, pl_empty;
  logic             desc_valid, desc_eos, desc_pop;
  logic [LEN_W-1:0] desc_len;
  logic [15:0]      desc_sum;

  axis_in_fifo u_in_fifo (
    .clk(clk_user), .rst(rst_user),
    .packet_size(packet_size_u),
    .s_axis_tdata, .s_axis_tlast, .s_axis_tvalid, .s_axis_tready,
    .rd_data(pl_data), .rd_empty(pl_empty), .rd_en(pl_rd),
    .desc_valid, .desc_len, .desc_sum, .desc_eos, .desc_pop
  );

  // ---------------------------------------------------------------- packet creation
  logic [31:0] tx_tdata, rx_tdata;
  logic [3:0]  tx_tkeep, rx_tkeep;
  logic        tx_tlast, tx_tvalid, tx_tready;
  logic        rx_tlast, rx_tuser, rx_tvalid, rx_tready;
  logic [2:0]  tcp_state;

  if (PROTOCOL == PROTO_TCP) begin : g_tcp
    pkt_create_tcp #(
      .LOCAL_MAC(LOCAL_MAC), .REMOTE_MAC(REMOTE_MAC), .LOCAL_IP(LOCAL_IP),
      .REMOTE_IP(REMOTE_IP), .LOCAL_PORT(LOCAL_PORT), .REMOTE_PORT(REMOTE_PORT)
    ) u_pkt (
      .clk(clk_user), .rst(rst_user), .enable(enable_u),
      .pl_data, .pl_rd, .desc_valid, .desc_len, .desc_sum, .desc_eos, .desc_pop,
      .tx_tdata, .tx_tkeep, .tx_tlast, .tx_tvalid, .tx_tready,
      .rx_tdata, .rx_tkeep, .rx_tlast, .rx_tuser, .rx_tvalid, .rx_tready,
      .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready,
      .tcp_state,
      .ev_syn_sent(), .ev_established(), .ev_data_sent(), .ev_ack_sent(),
      .ev_fin_sent(), .ev_closed(), .ev_arp_sent(), .ev_data_rcvd()
    );
  end else begin : g_udp
    pkt_create_udp #(
      .LOCAL_MAC(LOCAL_MAC), .REMOTE_MAC(REMOTE_MAC), .LOCAL_IP(LOCAL_IP),
      .REMOTE_IP(REMOTE_IP), .LOCAL_PORT(LOCAL_PORT), .REMOTE_PORT(REMOTE_PORT)
    ) u_pkt (
      .clk(clk_user), .rst(rst_user), .enable(enable_u),
      .pl_data, .pl_rd, .desc_valid, .desc_len, .desc_pop,
      .tx_tdata, .tx_tkeep, .tx_tlast, .tx_tvalid, .tx_tready,
      .rx_tdata, .rx_tkeep, .rx_tlast, .rx_tuser, .rx_tvalid, .rx_tready,
      .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tvalid, .m_axis_tready,
      .ev_data_sent(), .ev_arp_sent(), .ev_data_rcvd()
    );
    assign tcp_state = 3'd0;
  end

  // ---------------------------------------------------------------- MAC core
  logic [7:0] gmii_txd, gmii_rxd;
  logic       gmii_tx_en, gmii_tx_er, gmii_rx_dv, gmii_rx_er;
  logic       tx_underrun, rx_overflow;

  temac u_temac (
    .clk_user, .rst_user,
    .s_axis_tdata(tx_tdata), .s_axis_tkeep(tx_tkeep), .s_axis_tlast(tx_tlast),
    .s_axis_tvalid(tx_tvalid), .s_axis_tready(tx_tready),
    .m_axis_tdata(rx_tdata), .m_axis_tkeep(rx_tkeep), .m_axis_tlast(rx_tlast),
    .m_axis_tuser(rx_tuser), .m_axis_tvalid(rx_tvalid), .m_axis_tready(rx_tready),
    .gmii_tx_clk(clk_125), .rst_tx,
    .gmii_txd, .gmii_tx_en, .gmii_tx_er,
    .tx_underrun, .tx_frame_done(),
    .gmii_rx_clk, .rst_rx,
    .gmii_rxd, .gmii_rx_dv, .gmii_rx_er,
    .rx_overflow, .rx_frame_good(), .rx_frame_bad(),
    .clk_mm, .rst_mm, .cfg, .phy_write, .miim_busy,
    .mdc, .mdio_o, .mdio_oe
  );

  // ---------------------------------------------------------------- RGMII
  gmii_to_rgmii u_rgmii (
    .clk_tx(clk_125), .clk_tx90(clk_125_90), .rst_tx,
    .gmii_txd, .gmii_tx_en, .gmii_tx_er,
    .rgmii_txd, .rgmii_tx_ctl, .rgmii_txc,
    .rgmii_rxc, .rst_rx, .rgmii_rxd, .rgmii_rx_ctl,
    .gmii_rx_clk, .gmii_rxd, .gmii_rx_dv, .gmii_rx_er
  );

  // ---------------------------------------------------------------- status
  logic [4:0] status_src;
  logic [4:0] status_sync;
  assign status_src = {rx_overflow, tx_underrun, tcp_state};

  sync_bits #(.W(5), .RST_VAL('0)) u_status_sync (
    .clk(clk_mm), .rst(rst_mm), .d(status_src), .q(status_sync)
  );
  assign status_mm = {27'd0, status_sync};

  // pl_empty is not needed: a descriptor guarantees the payload is present
  always_ff @(posedge clk_user) begin
    if (!rst_user && pl_rd) assert (!pl_empty) else $error("payload read from empty input FIFO");
  end

endmodule

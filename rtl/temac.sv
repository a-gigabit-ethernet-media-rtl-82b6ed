// temac: the MAC core ("tri-mode Ethernet MAC" in the document, used here at
// 1000 Mb/s only) with its AXI Stream wrapper.
//
// Transmit: 32-bit AXI Stream frames in the user clock go into a dual-clock
// FIFO; temac_tx empties it in the GMII transmit clock and adds preamble, SFD,
// padding, FCS and inter-frame gap. Receive: temac_rx takes GMII bytes in the
// receive clock, checks and strips the FCS and writes 32-bit words into a second
// dual-clock FIFO, read out as AXI Stream in the user clock (tuser = 1 on the
// last word of a frame whose FCS or length was wrong). The management part
// sends MIIM write frames to the PHY in the register clock when the register
// block asks for one. This split (two dual-port RAM FIFOs, FSMs per direction,
// 32 bits user side, 8 bits GMII side, MIIM driven by register values) follows
// the document; what is inside each FSM is this design's own.
//
// Interface: AXI Stream handshakes (tvalid/tready) on both user-side streams;
// GMII signals registered in their own clock; a write pulse and the MIIM
// fields from the register block.
// Timing: s_axis_tready is low only while the transmit FIFO is full; a frame
// appears on GMII a few clocks after its first word is written.
module temac
  import gbmac_pkg::*;
#(
  parameter int unsigned FIFO_AW = 9       // 512 words of 32 bits per direction
) (
  // user clock domain
  input  logic        clk_user,
  input  logic        rst_user,
  input  logic [31:0] s_axis_tdata,
  input  logic [3:0]  s_axis_tkeep,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  output logic [31:0] m_axis_tdata,
  output logic [3:0]  m_axis_tkeep,
  output logic        m_axis_tlast,
  output logic        m_axis_tuser,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  // GMII transmit clock domain
  input  logic        gmii_tx_clk,
  input  logic        rst_tx,
  output logic [7:0]  gmii_txd,
  output logic        gmii_tx_en,
  output logic        gmii_tx_er,
  output logic        tx_underrun,
  output logic        tx_frame_done,
  // GMII receive clock domain
  input  logic        gmii_rx_clk,
  input  logic        rst_rx,
  input  logic [7:0]  gmii_rxd,
  input  logic        gmii_rx_dv,
  input  logic        gmii_rx_er,
  output logic        rx_overflow,
  output logic        rx_frame_good,
  output logic        rx_frame_bad,
  // register clock domain: MIIM
  input  logic        clk_mm,
  input  logic        rst_mm,
  input  cfg_t        cfg,
  input  logic        phy_write,
  output logic        miim_busy,
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe
);

  // ---------------------------------------------------------------- transmit
  axis_word_t tx_wr_word, tx_rd_word;
  logic       tx_full, tx_empty, tx_rd;

  assign tx_wr_word    = '{data: s_axis_tdata, keep: s_axis_tkeep, last: s_axis_tlast};
  assign s_axis_tready = !tx_full;

  async_fifo #(.WIDTH($bits(axis_word_t)), .AW(FIFO_AW)) u_tx_fifo (
    .wr_clk (clk_user),    .wr_rst (rst_user),
    .wr_en  (s_axis_tvalid && !tx_full),
    .wr_data(tx_wr_word),  .full   (tx_full),
    .rd_clk (gmii_tx_clk), .rd_rst (rst_tx),
    .rd_en  (tx_rd),       .rd_data(tx_rd_word),
    .empty  (tx_empty)
  );

  temac_tx u_tx (
    .clk       (gmii_tx_clk),
    .rst       (rst_tx),
    .fifo_data (tx_rd_word),
    .fifo_empty(tx_empty),
    .fifo_rd   (tx_rd),
    .gmii_txd  (gmii_txd),
    .gmii_tx_en(gmii_tx_en),
    .gmii_tx_er(gmii_tx_er),
    .underrun  (tx_underrun),
    .frame_done(tx_frame_done)
  );

  // ---------------------------------------------------------------- receive
  axis_word_t rx_wr_word, rx_rd_word_w;
  logic       rx_wr, rx_wr_err, rx_full, rx_empty;
  logic [$bits(axis_word_t):0] rx_rd_data;

  temac_rx u_rx (
    .clk       (gmii_rx_clk),
    .rst       (rst_rx),
    .gmii_rxd  (gmii_rxd),
    .gmii_rx_dv(gmii_rx_dv),
    .gmii_rx_er(gmii_rx_er),
    .fifo_wr   (rx_wr),
    .fifo_err  (rx_wr_err),
    .fifo_word (rx_wr_word),
    .fifo_full (rx_full),
    .overflow  (rx_overflow),
    .frame_good(rx_frame_good),
    .frame_bad (rx_frame_bad)
  );

  async_fifo #(.WIDTH($bits(axis_word_t) + 1), .AW(FIFO_AW)) u_rx_fifo (
    .wr_clk (gmii_rx_clk), .wr_rst (rst_rx),
    .wr_en  (rx_wr),       .wr_data({rx_wr_err, rx_wr_word}),
    .full   (rx_full),
    .rd_clk (clk_user),    .rd_rst (rst_user),
    .rd_en  (m_axis_tready), .rd_data(rx_rd_data),
    .empty  (rx_empty)
  );

  assign rx_rd_word_w  = rx_rd_data[$bits(axis_word_t)-1:0];
  assign m_axis_tdata  = rx_rd_word_w.data;
  assign m_axis_tkeep  = rx_rd_word_w.keep;
  assign m_axis_tlast  = rx_rd_word_w.last;
  assign m_axis_tuser  = rx_rd_data[$bits(axis_word_t)];
  assign m_axis_tvalid = !rx_empty;

  // ---------------------------------------------------------------- MIIM
  miim_master u_miim (
    .clk        (clk_mm),
    .rst        (rst_mm),
    .start      (phy_write),
    .no_preamble(cfg.no_preamble),
    .clk_div    (cfg.clk_div),
    .phy_addr   (cfg.phy_addr),
    .reg_addr   (cfg.phy_reg_addr),
    .data       (cfg.phy_data),
    .busy       (miim_busy),
    .mdc        (mdc),
    .mdio_o     (mdio_o),
    .mdio_oe    (mdio_oe)
  );

endmodule

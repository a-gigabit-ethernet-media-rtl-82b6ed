// mm_config_regs: memory-mapped configuration and status registers.
//
// An AXI4 slave in the register clock (10 MHz in the document's build) that
// holds the controller's settings and hands them to the other blocks as one
// cfg_t struct, and that asks the MIIM master for a PHY write. The registers
// the document names are all here; their addresses, widths and reset values
// are this design's choice:
//
//   0x00 phy_addr      [4:0]   MIIM address of the PHY            reset 1
//   0x04 no_preamble   [0]     MIIM frames without preamble       reset 0
//   0x08 clk_div       [7:0]   MDC = clk / clk_div                reset 4
//   0x0C packet_size   [10:0]  payload bytes per packet (<=1500)  reset 1024
//   0x10 phy_data      [15:0]  MIIM write data                    reset 0
//   0x14 phy_reg_addr  [4:0]   PHY register address               reset 0
//   0x18 phy_write     [0]     write 1: send one MIIM write; reads MIIM busy
//   0x1C control       [0]     enable: start streaming / open the connection
//   0x20 status        [31:0]  read only, from the controller
//
// Only single-beat transactions are served (AxLEN is not decoded: every beat
// is taken as a 32-bit access to AxADDR); this is an assumption, the document
// names the bus but not its use. Write response OKAY always, read data of
// unmapped addresses 0. A write needs AWVALID and WVALID together; BVALID
// follows one clock later, RVALID one clock after ARVALID.
module mm_config_regs
  import gbmac_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // AXI4 write address / data / response
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
  // AXI4 read address / data
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // to the controller
  output cfg_t        cfg,
  output logic        phy_write,
  output logic        enable,
  input  logic        miim_busy,
  input  logic [31:0] status
);

  logic do_write;
  assign do_write      = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = do_write;
  assign s_axi_wready  = do_write;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;

  // byte-lane merge of a register with the write data
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = strb[i] ? d[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  // current value of the addressed register, merged with the write data
  logic [31:0] wold, wv;

  always_comb begin
    unique case (s_axi_awaddr[7:2])
      6'h00:   wold = {27'd0, cfg.phy_addr};
      6'h01:   wold = {31'd0, cfg.no_preamble};
      6'h02:   wold = {24'd0, cfg.clk_div};
      6'h03:   wold = {21'd0, cfg.packet_size};
      6'h04:   wold = {16'd0, cfg.phy_data};
      6'h05:   wold = {27'd0, cfg.phy_reg_addr};
      default: wold = '0;
    endcase
    wv = merge(wold, s_axi_wdata, s_axi_wstrb);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.phy_addr     <= 5'd1;
      cfg.no_preamble  <= 1'b0;
      cfg.clk_div      <= 8'd4;
      cfg.packet_size  <= LEN_W'(1024);
      cfg.phy_data     <= '0;
      cfg.phy_reg_addr <= '0;
      enable           <= 1'b0;
      phy_write        <= 1'b0;
      s_axi_bvalid     <= 1'b0;
    end else begin
      phy_write <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (do_write) begin
        s_axi_bvalid <= 1'b1;
        unique case (s_axi_awaddr[7:2])
          6'h00: begin cfg.phy_addr <= wv[4:0]; end
          6'h01: begin cfg.no_preamble <= wv[0]; end
          6'h02: begin cfg.clk_div <= wv[7:0]; end
          6'h03: begin // clamp to the 1500-byte maximum
                       cfg.packet_size <= (wv[10:0] > 11'(MAX_PKT_BYTES)) ? 11'(MAX_PKT_BYTES)
                                                                          : wv[10:0]; end
          6'h04: begin cfg.phy_data <= wv[15:0]; end
          6'h05: begin cfg.phy_reg_addr <= wv[4:0]; end
          6'h06: begin phy_write <= s_axi_wstrb[0] && s_axi_wdata[0] && !miim_busy; end
          6'h07: begin if (s_axi_wstrb[0]) enable <= s_axi_wdata[0]; end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr[7:2])
          6'h00: s_axi_rdata <= {27'd0, cfg.phy_addr};
          6'h01: s_axi_rdata <= {31'd0, cfg.no_preamble};
          6'h02: s_axi_rdata <= {24'd0, cfg.clk_div};
          6'h03: s_axi_rdata <= {21'd0, cfg.packet_size};
          6'h04: s_axi_rdata <= {16'd0, cfg.phy_data};
          6'h05: s_axi_rdata <= {27'd0, cfg.phy_reg_addr};
          6'h06: s_axi_rdata <= {31'd0, miim_busy};
          6'h07: s_axi_rdata <= {31'd0, enable};
          6'h08: s_axi_rdata <= status;
          default: s_axi_rdata <= '0;
        endcase
      end
    end
  end

endmodule

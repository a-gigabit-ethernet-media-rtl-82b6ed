// miim_master: Serial Management Interface (MIIM, MDC/MDIO) write master.
//
// Configures the Ethernet PHY: on a start pulse it sends one IEEE 802.3
// clause-22 write frame, an optional 32-bit preamble of ones, start "01",
// write opcode "01", the 5-bit PHY address, the 5-bit register address,
// turnaround "10" and 16 data bits, most significant bit first.
//
// Following the document, MDC runs at the register clock divided by the
// clock-divider register (the MIIM clock "equals the value of the AXI4
// memory-mapped clock frequency divided by the register value", at most
// 2.5 MHz), and the no-preamble register drops the preamble. The document
// mentions only writes through this interface, so read frames are not
// implemented. MDC toggles only while a frame is sent; dividers below 2 are
// treated as 2, odd dividers give an MDC high phase one clock shorter.
//
// Timing: MDIO changes when MDC goes low (counter at 0) and is stable for the
// PHY's sampling rising edge half a period later. busy is high from the clock
// after start until the last MDC period has ended: (64 or 32) * clk_div + 1
// clocks.
// The MDIO pad is split into mdio_o / mdio_oe / (unused) input, the pad
// buffer itself being outside this block.
module miim_master (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        no_preamble,
  input  logic [7:0]  clk_div,
  input  logic [4:0]  phy_addr,
  input  logic [4:0]  reg_addr,
  input  logic [15:0] data,
  output logic        busy,
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe
);

  logic [7:0]  div, div_cnt;
  logic [63:0] shreg;
  logic [6:0]  bits_left;

  assign div = (clk_div < 8'd2) ? 8'd2 : clk_div;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      div_cnt   <= '0;
      shreg     <= '0;
      bits_left <= '0;
      mdc       <= 1'b0;
      mdio_o    <= 1'b1;
      mdio_oe   <= 1'b0;
    end else if (!busy) begin
      mdc     <= 1'b0;
      mdio_oe <= 1'b0;
      mdio_o  <= 1'b1;
      if (start) begin
        busy      <= 1'b1;
        div_cnt   <= '0;
        shreg     <= {32'hFFFF_FFFF, 2'b01, 2'b01, phy_addr, reg_addr, 2'b10, data};
        bits_left <= no_preamble ? 7'd32 : 7'd64;
        if (no_preamble)
          shreg <= {2'b01, 2'b01, phy_addr, reg_addr, 2'b10, data, 32'd0};
      end
    end else begin
      div_cnt <= (div_cnt == div - 8'd1) ? 8'd0 : div_cnt + 8'd1;
      if (div_cnt == 8'd0) begin
        if (bits_left == 7'd0) begin
          busy    <= 1'b0;
          mdc     <= 1'b0;
          mdio_oe <= 1'b0;
          mdio_o  <= 1'b1;
        end else begin
          mdc       <= 1'b0;
          mdio_oe   <= 1'b1;
          mdio_o    <= shreg[63];
          shreg     <= {shreg[62:0], 1'b0};
          bits_left <= bits_left - 7'd1;
        end
      end else if (div_cnt == (div >> 1)) begin
        mdc <= 1'b1;
      end
    end
  end

endmodule

// tb_mm_config_regs: AXI4 register block test.
//
// An AXI4 master task writes and reads single beats. Checks the reset values,
// that each register reads back what was written (random values, masked to
// the register width), byte strobes, the 1500-byte clamp of packet_size, the
// cfg outputs, the one-clock phy_write pulse (and that none is produced while
// the MIIM master is busy), the busy and status read-backs, and that unmapped
// addresses read 0.
module tb_mm_config_regs;
  import gbmac_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk = 0, rst = 1;
  always #50ns clk = ~clk;

  logic [7:0]  awaddr = 0, araddr = 0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = 0, rdata, status = 32'h0000_0013;
  logic [3:0]  wstrb = 4'hF;
  logic        awready, wready, bvalid, arready, rvalid, phy_write, enable;
  logic        miim_busy = 0;
  logic [1:0]  bresp, rresp;
  cfg_t        cfg;

  mm_config_regs dut (
    .clk, .rst,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .cfg, .phy_write, .enable, .miim_busy, .status
  );

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pw = 0;
  always @(posedge clk) if (phy_write) n_pw++;

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "write response OKAY");
    @(negedge clk);
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 2'b00, "read response OKAY");
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] v, r;
    logic [31:0] mask[6] = '{32'h1F, 32'h1, 32'hFF, 32'h7FF, 32'hFFFF, 32'h1F};
    repeat (3) @(posedge clk);
    rst = 0;
    rd(8'h00, r); check(r == 1, "phy_addr resets to 1");
    rd(8'h08, r); check(r == 4, "clk_div resets to 4");
    rd(8'h0C, r); check(r == 1024, "packet_size resets to 1024");
    rd(8'h1C, r); check(r == 0 && !enable, "disabled after reset");
    for (int k = 0; k < 30; k++) begin
      int a;
      a = $urandom_range(0, 5);
      v = $urandom;
      if (a == 3) v = $urandom_range(0, 1500);
      wr(8'(4 * a), v);
      rd(8'(4 * a), r);
      check(r == (v & mask[a]), $sformatf("register 0x%02h reads back %h (%h)", 4 * a, v & mask[a], r));
    end
    wr(8'h00, 32'h7); wr(8'h04, 32'h1); wr(8'h08, 32'h19); wr(8'h0C, 32'd1066);
    wr(8'h10, 32'hBEEF); wr(8'h14, 32'h9);
    check(cfg.phy_addr == 7 && cfg.no_preamble && cfg.clk_div == 25 && cfg.packet_size == 1066
          && cfg.phy_data == 16'hBEEF && cfg.phy_reg_addr == 9, "cfg outputs follow the registers");
    wr(8'h0C, 32'd1600); rd(8'h0C, r); check(r == 1500, "packet_size clamped to 1500");
    wr(8'h10, 32'h0000_1234, 4'b0001); rd(8'h10, r); check(r == 32'hBE34, "byte strobe writes one byte");
    n_pw = 0;
    wr(8'h18, 32'h1); check(n_pw == 1, "phy_write pulses once");
    miim_busy = 1;
    rd(8'h18, r); check(r == 1, "busy readable");
    wr(8'h18, 32'h1); check(n_pw == 1, "no phy_write while busy");
    miim_busy = 0;
    wr(8'h1C, 32'h1); check(enable == 1, "enable set");
    rd(8'h20, r); check(r == 32'h13, "status readable");
    rd(8'h40, r); check(r == 0, "unmapped address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

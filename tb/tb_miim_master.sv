// tb_miim_master: MDC/MDIO write master test.
//
// Issues random write requests with random PHY address, register address and
// data, with and without preamble and with dividers 2..9, and decodes MDIO on
// the rising edges of MDC as a PHY would. Checks the frame bits (32 ones when
// the preamble is on, then 01 01 PHYAD REGAD 10 DATA), the MDC period in
// register clocks, that the frame has 64 or 32 MDC periods, and that busy lasts
// that many MDC periods plus the one clock that ends the frame.
module tb_miim_master;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk = 0, rst = 1;
  always #50ns clk = ~clk;          // 10 MHz register clock

  logic        start = 0, no_pre = 0, busy, mdc, mdio_o, mdio_oe;
  logic [7:0]  div = 4;
  logic [4:0]  pa = 0, ra = 0;
  logic [15:0] dat = 0;

  miim_master dut (.clk, .rst, .start, .no_preamble(no_pre), .clk_div(div),
                   .phy_addr(pa), .reg_addr(ra), .data(dat),
                   .busy, .mdc, .mdio_o, .mdio_oe);

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  bits[$];
  int  rises[$];             // register-clock count at each MDC rising edge
  int  nclk = 0;
  always @(posedge clk) nclk++;
  always @(posedge mdc) begin
    rises.push_back(nclk);
    if (mdio_oe) bits.push_back(mdio_o);
  end

  int busy_clks = 0;
  always @(posedge clk) if (busy) busy_clks++;

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 12; n++) begin
      bit exp[$];
      int nb;
      int period_ok;
      @(negedge clk);
      pa     = 5'($urandom);
      ra     = 5'($urandom);
      dat    = 16'($urandom);
      no_pre = n[0];
      div    = 8'(2 + $urandom_range(0, 7));
      bits.delete(); rises.delete(); exp.delete(); busy_clks = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      check(busy, "busy right after start");
      wait (!busy);
      repeat (3 * div) @(posedge clk);
      if (!no_pre) for (int i = 0; i < 32; i++) exp.push_back(1'b1);
      exp.push_back(0); exp.push_back(1); exp.push_back(0); exp.push_back(1);
      for (int i = 4; i >= 0; i--) exp.push_back(pa[i]);
      for (int i = 4; i >= 0; i--) exp.push_back(ra[i]);
      exp.push_back(1); exp.push_back(0);
      for (int i = 15; i >= 0; i--) exp.push_back(dat[i]);
      nb = no_pre ? 32 : 64;
      check(bits == exp, $sformatf("frame %0d bits (div %0d, no_pre %0d)", n, div, no_pre));
      check(rises.size() == nb, $sformatf("frame %0d: %0d MDC periods (%0d)", n, nb, rises.size()));
      period_ok = 1;
      for (int i = 1; i < rises.size(); i++) if (rises[i] - rises[i-1] != div) period_ok = 0;
      check(period_ok == 1, $sformatf("frame %0d: MDC period %0d clocks", n, div));
      check(busy_clks == nb * div + 1, $sformatf("frame %0d: busy %0d clocks (%0d)", n, nb * div + 1, busy_clks));
      check(mdio_oe == 0 && mdc == 0, "MDIO released and MDC idle after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

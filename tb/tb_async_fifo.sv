// tb_async_fifo: dual-clock FIFO test.
//
// Writes 300 counting-plus-random words from a 100 MHz clock while reading at
// an unrelated 143 MHz clock, both sides pausing at random. Every word must
// come out once and in order; the FIFO (16 entries here) must report full
// while the reader pauses and empty at the end.
module tb_async_fifo;
  localparam int unsigned W = 16, AW = 4, NW = 300;
  int checks = 0, failures = 0;

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #5ns   wclk = ~wclk;
  always #3.5ns rclk = ~rclk;

  logic         wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;

  async_fifo #(.WIDTH(W), .AW(AW)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .full,
    .rd_clk(rclk), .rd_rst(rrst), .rd_en, .rd_data, .empty
  );

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] expq[$];
  int  nread = 0, nfull = 0;
  bit  wdone = 0;

  initial begin : writer
    int i = 0;
    repeat (4) @(posedge wclk);
    wrst = 0;
    repeat (4) @(posedge wclk);
    while (i < NW) begin
      @(negedge wclk);
      wr_en   = ($urandom % 4) != 0;
      wr_data = W'(i * 7 + 3);
      #4ns;
      if (wr_en && !full) begin expq.push_back(wr_data); i++; end
      if (full) nfull++;
      @(posedge wclk);
    end
    @(negedge wclk);
    wr_en = 0;
    wdone = 1;
  end

  initial begin : reader
    repeat (4) @(posedge rclk);
    rrst = 0;
    // hold off reading for a while so the FIFO fills
    repeat (60) @(posedge rclk);
    while (nread < NW) begin
      @(negedge rclk);
      rd_en = ($urandom % 3) != 0;
      #3ns;
      if (rd_en && !empty) begin
        checks++;
        if (expq.size() == 0 || rd_data != expq[0]) begin
          failures++;
          $display("FAIL word %0d: got %h", nread, rd_data);
        end
        if (expq.size() != 0) void'(expq.pop_front());
        nread++;
      end
      @(posedge rclk);
    end
    @(negedge rclk);
    rd_en = 0;
    repeat (10) @(posedge rclk);
    checks++; if (!empty) begin failures++; $display("FAIL: not empty at the end"); end
    checks++; if (nfull == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

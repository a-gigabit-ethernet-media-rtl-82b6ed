// tb_temac_rx: receive engine test.
//
// Sends frames of 60, 61, 62, 63 and 100 bytes with a correct FCS (computed
// here) on GMII and one with a wrong FCS. The words written to the FIFO must
// hold the frame bytes without the FCS, first byte in bits [31:24], with the
// right keep on the last word, last set only there and err clear; the frame
// with the bad FCS must end with err set.
module tb_temac_rx;
  import gbmac_pkg::*;
  import tb_net_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk = 0, rst = 1;
  always #4ns clk = ~clk;

  logic [7:0] rxd = '0;
  logic       dv = 0, er = 0;
  logic       fifo_wr, fifo_err, overflow, fgood, fbad;
  axis_word_t fifo_word;

  temac_rx dut (.clk, .rst, .gmii_rxd(rxd), .gmii_rx_dv(dv), .gmii_rx_er(er),
                .fifo_wr, .fifo_err, .fifo_word, .fifo_full(1'b0),
                .overflow, .frame_good(fgood), .frame_bad(fbad));

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned got[$];
  int  nlast = 0, nerr = 0, ngood = 0, nbad = 0, last_keep_ok = 1;
  always @(negedge clk) begin
    if (fgood) ngood++;
    if (fbad) nbad++;
    if (fifo_wr) begin
      for (int j = 0; j < 4; j++) if (fifo_word.keep[3-j]) got.push_back(fifo_word.data[31-8*j -: 8]);
      if (!fifo_word.last && fifo_word.keep != 4'hF) last_keep_ok = 0;
      if (fifo_word.last) nlast++;
      if (fifo_err) nerr++;
    end
  end

  task automatic send(input bytes_t d, input bit corrupt);
    int unsigned c = crc32(d);
    if (corrupt) c = ~c;
    @(negedge clk);
    dv = 1;
    for (int i = 0; i < 7; i++) begin rxd = 8'h55; @(negedge clk); end
    rxd = 8'hD5; @(negedge clk);
    foreach (d[i]) begin rxd = d[i]; @(negedge clk); end
    for (int i = 0; i < 4; i++) begin rxd = 8'(c >> (8*i)); @(negedge clk); end
    dv = 0; rxd = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    int lens[5] = '{60, 61, 62, 63, 100};
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (lens[k]) begin
      bytes_t d;
      for (int i = 0; i < lens[k]; i++) d.push_back(8'(i * 13 + k));
      got.delete();
      send(d, 0);
      check(got == d, $sformatf("%0d-byte frame delivered without FCS (%0d bytes)", lens[k], got.size()));
      check(nlast == k + 1 && nerr == 0, $sformatf("%0d-byte frame: one last, no error", lens[k]));
    end
    check(ngood == 5 && nbad == 0, "five good frames counted");
    check(last_keep_ok == 1, "only the last word is partial");
    begin
      bytes_t d;
      for (int i = 0; i < 64; i++) d.push_back(8'(i));
      send(d, 1);
    end
    check(nlast == 6 && nerr == 1 && nbad == 1, "bad FCS flagged on the last word");
    check(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_temac_tx: transmit engine test.
//
// Frames of 61, 100 and 20 bytes are offered as 32-bit words through a FIFO
// model. On GMII the test checks seven 0x55 preamble bytes and the 0xD5
// delimiter, the frame bytes, zero padding of the 20-byte frame to 60 bytes,
// the FCS (computed here), tx_en lasting exactly 8 + max(L, 60) + 4 clocks,
// and at least 12 idle clocks between frames. A fourth frame whose words stop
// arriving in the middle must be cut with tx_er and set the underrun flag.
module tb_temac_tx;
  import gbmac_pkg::*;
  import tb_net_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk = 0, rst = 1;
  always #4ns clk = ~clk;

  axis_word_t q[$];
  axis_word_t fifo_data;
  logic       fifo_empty, fifo_rd, tx_en, tx_er, underrun, frame_done;
  logic [7:0] txd;
  bit         hold = 0;    // pretend the FIFO is empty

  // the read side is driven from the queue after every change
  function automatic void refresh();
    fifo_empty = hold || (q.size() == 0);
    fifo_data  = (q.size() != 0) ? q[0] : '0;
  endfunction
  initial refresh();
  // reads are sampled at the rising edge and take effect 1 ns later
  always @(posedge clk) begin
    bit rd;
    rd = fifo_rd;
    #1ns;
    if (rd && q.size() != 0) void'(q.pop_front());
    refresh();
  end

  temac_tx dut (.clk, .rst, .fifo_data, .fifo_empty, .fifo_rd,
                .gmii_txd(txd), .gmii_tx_en(tx_en), .gmii_tx_er(tx_er),
                .underrun, .frame_done);

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bytes_t mk(input int len, input int seed);
    bytes_t d;
    for (int i = 0; i < len; i++) d.push_back(8'(i * seed + 11));
    return d;
  endfunction

  task automatic offer(input bytes_t d);
    for (int i = 0; i < d.size(); i += 4) begin
      axis_word_t w;
      w.data = '0; w.keep = '0;
      for (int j = 0; j < 4; j++) if (i + j < d.size()) begin
        w.data[31-8*j -: 8] = d[i+j];
        w.keep[3-j] = 1'b1;
      end
      w.last = (i + 4 >= d.size());
      q.push_back(w);
      refresh();
    end
  endtask

  // GMII capture
  byte unsigned cap[$];
  int  en_len = 0, gap = 100, min_gap = 100, nframes = 0, er_cnt = 0;
  bytes_t frames[$];
  int     lens[$];
  always @(negedge clk) begin
    if (!rst) begin
      if (tx_er) er_cnt++;
      if (tx_en) begin
        if (en_len == 0 && nframes > 0 && gap < min_gap) min_gap = gap;
        cap.push_back(txd);
        en_len++;
        gap = 0;
      end else begin
        if (en_len != 0) begin
          frames.push_back(cap);
          lens.push_back(en_len);
          nframes++;
          cap.delete();
          en_len = 0;
        end
        gap++;
      end
    end
  end

  initial begin
    bytes_t d[3];
    d[0] = mk(61, 3); d[1] = mk(100, 7); d[2] = mk(20, 5);
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (d[i]) offer(d[i]);
    wait (nframes == 3);
    for (int i = 0; i < 3; i++) begin
      bytes_t f, body, exp;
      int L;
      bit pre_ok;
      f = frames[i];
      L = d[i].size() < 60 ? 60 : d[i].size();
      pre_ok = 1;
      for (int j = 0; j < 7; j++) if (f[j] != 8'h55) pre_ok = 0;
      check(pre_ok && f[7] == 8'hD5, $sformatf("frame %0d preamble and SFD", i));
      check(lens[i] == 8 + L + 4, $sformatf("frame %0d tx_en for %0d clocks (%0d)", i, 8 + L + 4, lens[i]));
      exp = d[i];
      while (exp.size() < 60) exp.push_back(8'h00);
      body.delete();
      for (int j = 8; j < f.size() - 4; j++) body.push_back(f[j]);
      check(body == exp, $sformatf("frame %0d bytes and padding", i));
      check(crc32(body) == {f[f.size()-1], f[f.size()-2], f[f.size()-3], f[f.size()-4]},
            $sformatf("frame %0d FCS", i));
    end
    check(min_gap >= 12, $sformatf("inter-frame gap %0d", min_gap));
    check(!underrun && er_cnt == 0, "no underrun so far");
    // underrun: only the first 3 words of a 100-byte frame are there
    begin
      bytes_t u;
      u = mk(100, 9);
      offer(u);
      @(negedge clk);
      hold = 0;
      refresh();
      wait (q.size() <= 22);
      hold = 1;
      refresh();
      repeat (40) @(posedge clk);
      hold = 0;
      refresh();
      repeat (100) @(posedge clk);
    end
    check(underrun && er_cnt >= 1, "underrun flagged with tx_er");
    check(q.size() == 0, "rest of the cut frame discarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

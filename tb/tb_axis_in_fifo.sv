// tb_axis_in_fifo: input FIFO and packet descriptor test.
//
// With packet_size = 16 bytes (4 words) and an 8-word data FIFO, the test
// pushes 10 words, the last with tlast, before reading anything: the FIFO must
// stall the writer when full, and the descriptors must come out as
// (16 bytes, sum, not end), (16, sum, not end), (8, sum, end of stream), each
// sum being the one's complement sum of the packet's 16-bit halves computed
// here. The payload words must come out in order.
module tb_axis_in_fifo;
  import gbmac_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic clk = 0, rst = 1;
  always #5ns clk = ~clk;

  logic [31:0] tdata = '0, rd_data;
  logic        tlast = 0, tvalid = 0, tready, rd_empty, rd_en = 0;
  logic        desc_valid, desc_eos, desc_pop = 0;
  logic [LEN_W-1:0] desc_len;
  logic [15:0] desc_sum;

  axis_in_fifo #(.DATA_AW(3), .DESC_AW(2)) dut (
    .clk, .rst, .packet_size(LEN_W'(16)),
    .s_axis_tdata(tdata), .s_axis_tlast(tlast), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .rd_data, .rd_empty, .rd_en,
    .desc_valid, .desc_len, .desc_sum, .desc_eos, .desc_pop
  );

  initial begin
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] word(input int i);
    return 32'hF00D_0000 + i * 32'h0101_1357;
  endfunction

  function automatic logic [15:0] ref_sum(input int first, input int n);
    int unsigned s = 0;
    for (int i = first; i < first + n; i++) begin s += word(i) >> 16; s += word(i) & 16'hFFFF; end
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return 16'(s);
  endfunction

  int stalls = 0;

  initial begin : writer
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      tdata = word(i); tlast = (i == 9); tvalid = 1;
      forever begin
        bit taken;
        #4ns taken = tready;
        @(posedge clk);
        if (taken) break;
        stalls++;
        @(negedge clk);
      end
    end
    @(negedge clk);
    tvalid = 0;
  end

  initial begin : reader
    int w = 0;
    int exp_len[3] = '{16, 16, 8};
    repeat (30) @(posedge clk);
    check(stalls > 0, "writer stalled while the FIFO was full");
    for (int p = 0; p < 3; p++) begin
      while (!desc_valid) @(negedge clk);
      @(negedge clk);
      check(desc_len == exp_len[p], $sformatf("packet %0d length %0d", p, desc_len));
      check(desc_sum == ref_sum(w, exp_len[p] / 4), $sformatf("packet %0d sum %h", p, desc_sum));
      check(desc_eos == (p == 2), $sformatf("packet %0d end flag", p));
      desc_pop = 1;
      @(negedge clk);
      desc_pop = 0;
      for (int j = 0; j < exp_len[p] / 4; j++) begin
        check(!rd_empty && rd_data == word(w), $sformatf("payload word %0d", w));
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
        w++;
      end
    end
    repeat (5) @(negedge clk);
    check(!desc_valid && rd_empty, "FIFO empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

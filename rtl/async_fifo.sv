// async_fifo: dual-clock FIFO on a dual-port RAM.
//
// The MAC core uses two of these to cross between the user clock and the
// GMII clocks, one per direction, as the document describes ("two dual port
// block RAMs to serve as asynchronous FIFOs"). The pointer scheme is this
// design's own: binary pointers with one extra wrap bit, passed to the other
// clock domain in Gray code through two flip-flops.
//
// Interface: write side wr_en/wr_data/full in wr_clk, read side
// rd_en/rd_data/empty in rd_clk. The read side is first-word-fall-through:
// rd_data shows the head entry whenever empty is low, and rd_en pops it.
// Writes to a full FIFO and reads from an empty one are ignored.
// Timing: an entry written at a wr_clk edge becomes visible to the reader
// two to three rd_clk edges later; full and empty are conservative.
module async_fifo #(
  parameter int unsigned WIDTH = 37,
  parameter int unsigned AW    = 9      // log2 of the depth
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,

  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer seen in rd_clk
  logic [AW:0] rgray_s1, rgray_s2;   // read pointer seen in wr_clk

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------------------------------------------------------- write
  logic [AW:0] wbin_nxt;
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end

  // full when the write pointer is one lap ahead of the read pointer
  assign full = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});

  // ---------------------------------------------------------------- read
  logic [AW:0] rbin_nxt;
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

  assign empty   = (rgray == wgray_s2);
  assign rd_data = mem[rbin[AW-1:0]];

endmodule

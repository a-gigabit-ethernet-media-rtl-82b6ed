// sync_fifo: single-clock first-word-fall-through FIFO on a RAM array.
//
// rd_data shows the head entry whenever empty is low; rd_en pops it. A write
// to a full FIFO or a read from an empty one is ignored. count is the number
// of entries held. A write and a read in the same clock are both done.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 10    // log2 of the depth
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(2**AW));
  assign empty   = (count == '0);
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      wptr <= wptr + (AW+1)'(do_wr);
      rptr <= rptr + (AW+1)'(do_rd);
    end
  end

endmodule

// axis_in_fifo: the input FIFO between the user's AXI Stream and the packet
// creation block.
//
// Payload words from the user are stored in a data FIFO. On the write side
// the block also cuts the stream into packets of packet_size bytes (a tlast
// closes a packet early and marks the end of the stream) and, for each packet
// once it is completely stored, pushes a descriptor holding its length in
// bytes, the 16-bit one's complement sum of its payload and the end-of-stream
// flag. The packet creation block starts a packet only when a descriptor is
// available, so a frame never waits for payload in the middle, and the TCP
// checksum, which covers the payload but is sent before it, is known in time.
//
// The document shows only a FIFO at this place; the descriptor side is this
// design's own way of meeting those two needs. Payload is taken as whole
// 32-bit words (packet_size is used rounded down to a multiple of 4, at least
// 4; s_axis_tkeep is not supported).
// Interface: s_axis (tvalid/tready) in, data FIFO read port (first-word-fall-
// through) and descriptor read port out, all in one clock.
// Timing: a descriptor becomes visible the clock after the packet's last word
// is written; s_axis_tready is low while either FIFO is full.
module axis_in_fifo
  import gbmac_pkg::*;
#(
  parameter int unsigned DATA_AW = 10,   // 1024 words: two packets of 1500 bytes
  parameter int unsigned DESC_AW = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [LEN_W-1:0] packet_size,
  // user stream in
  input  logic [31:0]      s_axis_tdata,
  input  logic             s_axis_tlast,
  input  logic             s_axis_tvalid,
  output logic             s_axis_tready,
  // payload read port
  output logic [31:0]      rd_data,
  output logic             rd_empty,
  input  logic             rd_en,
  // descriptor read port
  output logic             desc_valid,
  output logic [LEN_W-1:0] desc_len,
  output logic [15:0]      desc_sum,
  output logic             desc_eos,
  input  logic             desc_pop
);

  localparam int unsigned DW = LEN_W + 16 + 1;

  logic             data_full, desc_full, desc_empty;
  logic             push;
  logic [LEN_W-3:0] words_per_pkt, wcnt;
  logic [31:0]      acc;
  logic             close;
  logic [LEN_W-1:0] close_len;
  logic [31:0]      acc_nxt;
  logic [DW-1:0]    desc_wr, desc_rd;
  logic             desc_push;

  assign words_per_pkt = (packet_size[LEN_W-1:2] == '0) ? (LEN_W-2)'(1) : packet_size[LEN_W-1:2];
  assign s_axis_tready = !data_full && !desc_full;
  assign push          = s_axis_tvalid && s_axis_tready;
  assign acc_nxt       = acc + {16'd0, s_axis_tdata[31:16]} + {16'd0, s_axis_tdata[15:0]};
  assign close         = push && (s_axis_tlast || (wcnt + 1'b1 >= words_per_pkt));
  assign close_len     = {wcnt + 1'b1, 2'b00};

  sync_fifo #(.WIDTH(32), .AW(DATA_AW)) u_data (
    .clk, .rst,
    .wr_en(push), .wr_data(s_axis_tdata), .full(data_full),
    .rd_en, .rd_data, .empty(rd_empty), .count()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt      <= '0;
      acc       <= '0;
      desc_push <= 1'b0;
      desc_wr   <= '0;
    end else begin
      desc_push <= 1'b0;
      if (push) begin
        if (close) begin
          wcnt      <= '0;
          acc       <= '0;
          desc_push <= 1'b1;
          desc_wr   <= {close_len, ones_fold(acc_nxt), s_axis_tlast};
        end else begin
          wcnt <= wcnt + 1'b1;
          acc  <= acc_nxt;
        end
      end
    end
  end

  sync_fifo #(.WIDTH(DW), .AW(DESC_AW)) u_desc (
    .clk, .rst,
    .wr_en(desc_push), .wr_data(desc_wr), .full(desc_full),
    .rd_en(desc_pop), .rd_data(desc_rd), .empty(desc_empty), .count()
  );

  assign desc_valid = !desc_empty;
  assign {desc_len, desc_sum, desc_eos} = desc_rd;

endmodule

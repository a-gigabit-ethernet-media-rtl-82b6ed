// frame_tx: transmit half of the packet creation block.
//
// Sends one frame as a 32-bit AXI Stream: a header given as a byte vector
// (byte 0 in the top bits of hdr), followed by n_words payload words read from
// the input FIFO. All headers this controller sends (ARP 42 bytes, UDP 42,
// TCP 54) are two bytes past a word boundary, so hdr_words full header words
// are sent, then words made of the last two header bytes or of the previous
// payload word's low half together with the next payload word's high half,
// and the frame ends with the last payload half-word, keep = 4'b1100,
// tlast = 1. With n_words = 0 the frame is the header alone.
//
// The header is sampled on start (when busy is low) and held for the whole
// frame. The payload words must already be in the FIFO (the input FIFO's
// descriptor guarantees it), so a frame leaves without gaps whenever
// m_axis_tready stays high: hdr_words + n_words + 1 clocks.
// The document describes the function (wrap the streaming data with the
// header, mark the end with the AXI Stream last signal); the realignment
// scheme is this design's own.
module frame_tx
  import gbmac_pkg::*;
#(
  parameter int unsigned HDR_BYTES = 56       // room for the longest header, 54 bytes
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [8*HDR_BYTES-1:0] hdr,
  input  logic [3:0]             hdr_words,  // full header words (10 or 13)
  input  logic [LEN_W-3:0]       n_words,    // payload words
  output logic                   busy,
  output logic                   done,       // one-clock pulse after the last word
  // payload from the input FIFO (first-word-fall-through)
  input  logic [31:0]            pl_data,
  output logic                   pl_rd,
  // frame out
  output logic [31:0]            m_axis_tdata,
  output logic [3:0]             m_axis_tkeep,
  output logic                   m_axis_tlast,
  output logic                   m_axis_tvalid,
  input  logic                   m_axis_tready
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_MIX, S_TAIL} state_e;

  state_e                 state;
  logic [8*HDR_BYTES-1:0] h;
  logic [3:0]             hw, hidx;
  logic [LEN_W-3:0]       nw, pidx;
  logic [15:0]            carry;     // two bytes waiting for the next word

  assign busy = (state != S_IDLE);

  always_comb begin
    m_axis_tvalid = 1'b0;
    m_axis_tdata  = '0;
    m_axis_tkeep  = 4'hF;
    m_axis_tlast  = 1'b0;
    pl_rd         = 1'b0;
    unique case (state)
      S_HDR: begin
        m_axis_tvalid = 1'b1;
        m_axis_tdata  = h[8*HDR_BYTES-1-32*hidx -: 32];
      end
      S_MIX: begin
        m_axis_tvalid = 1'b1;
        m_axis_tdata  = {carry, pl_data[31:16]};
        pl_rd         = m_axis_tready;
      end
      S_TAIL: begin
        m_axis_tvalid = 1'b1;
        m_axis_tdata  = {carry, 16'h0000};
        m_axis_tkeep  = 4'hC;
        m_axis_tlast  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      h     <= '0;
      hw    <= '0;
      hidx  <= '0;
      nw    <= '0;
      pidx  <= '0;
      carry <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            h     <= hdr;
            hw    <= hdr_words;
            nw    <= n_words;
            hidx  <= '0;
            pidx  <= '0;
            state <= S_HDR;
          end
        end
        S_HDR: begin
          if (m_axis_tready) begin
            hidx <= hidx + 4'd1;
            if (hidx + 4'd1 == hw) begin
              carry <= h[8*HDR_BYTES-1-32*(hidx+4'd1) -: 16];
              state <= (nw == '0) ? S_TAIL : S_MIX;
            end
          end
        end
        S_MIX: begin
          if (m_axis_tready) begin
            carry <= pl_data[15:0];
            pidx  <= pidx + 1'b1;
            if (pidx + 1'b1 == nw) state <= S_TAIL;
          end
        end
        S_TAIL: begin
          if (m_axis_tready) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

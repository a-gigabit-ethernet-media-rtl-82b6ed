// temac_rx: receive engine of the MAC core, in the GMII receive clock.
//
// Watches the 8-bit GMII receive bus, skips the preamble up to the 0xD5
// start-of-frame delimiter, runs the CRC-32 over every following byte and
// packs the frame bytes, without the four FCS bytes, into 32-bit words (first
// byte in bits [31:24]) that it writes into the receive FIFO. The last word of
// a frame carries last = 1, its keep mask, and err = 1 if the FCS was wrong,
// gmii_rx_er was seen, or the frame was shorter than its FCS. The packet
// creation block drops frames flagged err.
//
// As for the transmit side, the document gives only the function; the
// implementation (a four-byte delay line that holds back the FCS, and a
// one-word holding register so that the last word can be tagged) is this
// design's own. The FIFO must accept one word every four clocks while a frame
// arrives; a word that meets a full FIFO is lost and sets the sticky overflow
// flag (frames_bad is not affected).
//
// Timing: the last word of a frame is written two clocks after gmii_rx_dv
// falls.
module temac_rx
  import gbmac_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // GMII receive
  input  logic [7:0]  gmii_rxd,
  input  logic        gmii_rx_dv,
  input  logic        gmii_rx_er,
  // receive FIFO write port: {err, word}
  output logic        fifo_wr,
  output logic        fifo_err,
  output axis_word_t  fifo_word,
  input  logic        fifo_full,
  // status
  output logic        overflow,
  output logic        frame_good,   // one-clock pulse per good frame
  output logic        frame_bad     // one-clock pulse per rejected frame
);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_END1, S_END2, S_WAIT} state_e;

  state_e      state;
  logic [31:0] crc;
  logic [7:0]  dly [4];       // last four bytes, dly[3] oldest
  logic [2:0]  fill;          // bytes in the delay line (saturates at 4)
  logic        er_seen;

  logic [31:0] part;          // word being assembled
  logic [1:0]  pidx;          // bytes already in part
  logic        hold_v;        // a complete word waits in hold
  logic [31:0] hold;

  logic        bad;
  assign bad = er_seen || (crc != CRC32_RESIDUE) || (fill != 3'd4);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      crc        <= '1;
      fill       <= '0;
      er_seen    <= 1'b0;
      part       <= '0;
      pidx       <= '0;
      hold_v     <= 1'b0;
      hold       <= '0;
      fifo_wr    <= 1'b0;
      fifo_err   <= 1'b0;
      fifo_word  <= '0;
      overflow   <= 1'b0;
      frame_good <= 1'b0;
      frame_bad  <= 1'b0;
      for (int i = 0; i < 4; i++) dly[i] <= '0;
    end else begin
      fifo_wr    <= 1'b0;
      fifo_err   <= 1'b0;
      frame_good <= 1'b0;
      frame_bad  <= 1'b0;
      if (fifo_wr && fifo_full) overflow <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (gmii_rx_dv) begin
            if (gmii_rxd == 8'hD5) state <= S_DATA;
            else if (gmii_rxd == 8'h55) state <= S_PRE;
            else state <= S_WAIT;
          end
          crc     <= '1;
          fill    <= '0;
          er_seen <= 1'b0;
          pidx    <= '0;
          hold_v  <= 1'b0;
        end
        S_PRE: begin
          if (!gmii_rx_dv) state <= S_IDLE;
          else if (gmii_rxd == 8'hD5) state <= S_DATA;
          else if (gmii_rxd != 8'h55) state <= S_WAIT;
        end
        S_DATA: begin
          if (gmii_rx_dv) begin
            crc    <= crc32_byte(crc, gmii_rxd);
            dly[0] <= gmii_rxd;
            for (int i = 1; i < 4; i++) dly[i] <= dly[i-1];
            if (gmii_rx_er) er_seen <= 1'b1;
            if (fill != 3'd4) begin
              fill <= fill + 3'd1;
            end else begin
              // dly[3] leaves the delay line: it is a frame byte, not FCS
              part[8*(3-pidx) +: 8] <= dly[3];
              pidx <= pidx + 2'd1;
              if (pidx == 2'd3) begin
                hold   <= {part[31:8], dly[3]};
                hold_v <= 1'b1;
              end
              if (pidx == 2'd0 && hold_v) begin
                // a new word starts: the held word was not the last one
                fifo_wr   <= 1'b1;
                fifo_word <= '{data: hold, keep: 4'hF, last: 1'b0};
                hold_v    <= 1'b0;
              end
            end
          end else begin
            state <= S_END1;
          end
        end
        S_END1: begin
          // flush the held word; it is the last one if no partial word follows
          if (hold_v) begin
            fifo_wr   <= 1'b1;
            fifo_word <= '{data: hold, keep: 4'hF, last: (pidx == 2'd0)};
            fifo_err  <= (pidx == 2'd0) && bad;
          end else if (pidx == 2'd0) begin
            // nothing to deliver (runt frame): tag an empty last word
            fifo_wr   <= 1'b1;
            fifo_word <= '{data: '0, keep: 4'h0, last: 1'b1};
            fifo_err  <= 1'b1;
          end
          if (pidx == 2'd0) begin
            frame_good <= !bad && hold_v;
            frame_bad  <= bad || !hold_v;
            state      <= S_IDLE;
          end else begin
            state <= S_END2;
          end
        end
        S_END2: begin
          fifo_wr   <= 1'b1;
          fifo_word <= '{data: part, keep: (pidx == 2'd1) ? 4'h8 : (pidx == 2'd2) ? 4'hC : 4'hE,
                         last: 1'b1};
          fifo_err  <= bad;
          frame_good <= !bad;
          frame_bad  <= bad;
          state      <= S_IDLE;
        end
        S_WAIT: begin
          if (!gmii_rx_dv) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

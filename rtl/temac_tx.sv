// temac_tx: transmit engine of the MAC core, in the GMII transmit clock.
//
// Reads frames as 32-bit words from the transmit FIFO (first-word-fall-
// through, see async_fifo) and puts them on the 8-bit GMII transmit bus, one
// byte per 125 MHz cycle: seven preamble bytes 0x55, the start-of-frame
// delimiter 0xD5, the frame bytes (word bits [31:24] first), zero padding up
// to the 60-byte Ethernet minimum, the four-byte CRC-32 frame check sequence
// (least significant byte first) and a 12-byte inter-frame gap.
//
// The document gives the function (stream words in, GMII bytes out, FSM
// controlled, through a dual-port RAM FIFO) and takes the core itself from an
// open-source tri-mode MAC; the state machine below is this design's own
// minimal one for 1000 Mb/s only. A frame starts as soon as its first word is
// in the FIFO, so the writer must deliver each frame without gaps (the packet
// creation block does, see its header). If the FIFO runs dry inside a frame the
// byte is sent with gmii_tx_er high, the frame is cut off, the rest of its
// words are discarded and the sticky underrun flag is set.
//
// Timing: the first preamble byte leaves one clock after the first word is
// visible; a frame of L bytes (L >= 60) occupies 8 + L + 4 clocks of tx_en
// plus 12 idle clocks, i.e. 1 Gb/s line rate.
module temac_tx
  import gbmac_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // transmit FIFO read port
  input  axis_word_t  fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // GMII transmit
  output logic [7:0]  gmii_txd,
  output logic        gmii_tx_en,
  output logic        gmii_tx_er,
  // status
  output logic        underrun,
  output logic        frame_done
);

  localparam int unsigned MIN_FRAME = 60;   // without FCS
  localparam int unsigned IFG_BYTES = 12;

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IFG, S_DROP} state_e;

  state_e      state;
  logic [3:0]  cnt;        // byte counter inside preamble / FCS / gap
  logic [1:0]  bidx;       // byte index inside the current word
  logic [10:0] nbytes;     // frame bytes sent so far
  logic [31:0] crc;

  logic [7:0]  cur_byte;
  logic        word_end;   // this is the last valid byte of the word

  always_comb begin
    cur_byte = fifo_data.data[8*(3-bidx) +: 8];
    unique case (bidx)
      2'd0: word_end = !fifo_data.keep[2];
      2'd1: word_end = !fifo_data.keep[1];
      2'd2: word_end = !fifo_data.keep[0];
      default: word_end = 1'b1;
    endcase
  end

  always_comb begin
    fifo_rd = 1'b0;
    if (state == S_DATA && !fifo_empty && word_end) fifo_rd = 1'b1;
    if (state == S_DROP && !fifo_empty)             fifo_rd = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      bidx       <= '0;
      nbytes     <= '0;
      crc        <= '1;
      gmii_txd   <= '0;
      gmii_tx_en <= 1'b0;
      gmii_tx_er <= 1'b0;
      underrun   <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      gmii_tx_er <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          gmii_tx_en <= 1'b0;
          gmii_txd   <= '0;
          if (!fifo_empty) begin
            state      <= S_PRE;
            cnt        <= '0;
            gmii_tx_en <= 1'b1;
            gmii_txd   <= 8'h55;
          end
        end
        S_PRE: begin
          gmii_tx_en <= 1'b1;
          cnt        <= cnt + 4'd1;
          if (cnt == 4'd5) gmii_txd <= 8'h55;      // seventh 0x55
          if (cnt == 4'd6) begin
            gmii_txd <= 8'hD5;                    // SFD
            state    <= S_DATA;
            bidx     <= '0;
            nbytes   <= '0;
            crc      <= '1;
          end else begin
            gmii_txd <= 8'h55;
          end
        end
        S_DATA: begin
          if (fifo_empty) begin
            gmii_txd   <= 8'h00;
            gmii_tx_er <= 1'b1;
            underrun   <= 1'b1;
            state      <= S_DROP;
          end else begin
            gmii_txd <= cur_byte;
            crc      <= crc32_byte(crc, cur_byte);
            nbytes   <= nbytes + 11'd1;
            bidx     <= word_end ? 2'd0 : bidx + 2'd1;
            if (word_end && fifo_data.last) begin
              cnt   <= '0;
              state <= (nbytes + 11'd1 < 11'(MIN_FRAME)) ? S_PAD : S_FCS;
            end
          end
        end
        S_PAD: begin
          gmii_txd <= 8'h00;
          crc      <= crc32_byte(crc, 8'h00);
          nbytes   <= nbytes + 11'd1;
          if (nbytes + 11'd1 == 11'(MIN_FRAME)) state <= S_FCS;
        end
        S_FCS: begin
          gmii_txd <= ~crc[8*cnt[1:0] +: 8];
          cnt      <= cnt + 4'd1;
          if (cnt == 4'd3) begin
            state <= S_IFG;
            cnt   <= '0;
          end
        end
        S_IFG: begin
          gmii_tx_en <= 1'b0;
          gmii_txd   <= '0;
          if (cnt == 4'd0 && gmii_tx_en) frame_done <= 1'b1;
          cnt <= cnt + 4'd1;
          if (cnt == 4'(IFG_BYTES - 1)) state <= S_IDLE;
        end
        S_DROP: begin
          gmii_tx_en <= 1'b0;
          gmii_txd   <= '0;
          if (!fifo_empty && fifo_data.last) begin
            state <= S_IFG;
            cnt   <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// vfat_deserializer: extracts VFAT data packets from the serial data line.
//
// A VFAT answers each LV1A with a 192-bit packet, sent most significant bit
// first at one bit per 40 MHz clock: three 16-bit header words (nibble 1010 +
// BC<11:0>, nibble 1100 + EC<7:0> + Flags<3:0>, nibble 1110 + ChipID<11:0>),
// 128 bits of channel data and a 16-bit CRC. The deserializer cuts the packet
// into its twelve 16-bit words and writes them, in order, into the channel's
// packet FIFO. Packet size, bit order and header nibbles follow the VFAT
// packet format; the rest is this design's own: the line is taken to idle at
// '0', so the first '1' after idle is the first bit of a packet; the three
// header nibbles are checked and a mismatch is counted (the packet is still
// stored, the CRC is not checked); a packet that finds fewer than 12 free
// FIFO words is dropped whole and counted, so the FIFO only ever holds whole
// packets.
//
// Timing: word k of a packet is written one clock after its last bit was
// sampled; `pkt_done` pulses with the last word.
module vfat_deserializer
  import ttp_pkg::*;
#(
  parameter int FREE_W = 11      // width of the free-space input
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              din,          // serial data, one bit per clock
  input  logic [FREE_W-1:0] fifo_free,    // free words in the packet FIFO
  output logic              wr_en,
  output logic [15:0]       wr_data,
  output logic              pkt_done,     // a stored packet is complete
  output logic              busy,
  output logic [7:0]        pkt_cnt,      // packets stored (wraps)
  output logic [7:0]        drop_cnt,     // packets dropped, FIFO full (wraps)
  output logic [7:0]        hdr_err_cnt   // packets with a bad header (wraps)
);

  logic [14:0] sh;            // bits of the current word received so far
  logic [3:0]  bit_in_word;   // bits already in sh
  logic [3:0]  word_idx;      // 0..11
  logic        dropping;
  logic        hdr_bad;

  logic [15:0] sh_next;
  assign sh_next = {sh, din};

  logic [3:0] expect_hdr;
  always_comb begin
    unique case (word_idx)
      4'd0:    expect_hdr = HDR_BC;
      4'd1:    expect_hdr = HDR_EC;
      default: expect_hdr = HDR_CHIP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh          <= '0;
      bit_in_word <= '0;
      word_idx    <= '0;
      busy        <= 1'b0;
      dropping    <= 1'b0;
      hdr_bad     <= 1'b0;
      wr_en       <= 1'b0;
      wr_data     <= '0;
      pkt_done    <= 1'b0;
      pkt_cnt     <= '0;
      drop_cnt    <= '0;
      hdr_err_cnt <= '0;
    end else begin
      wr_en    <= 1'b0;
      pkt_done <= 1'b0;
      if (!busy) begin
        if (din) begin                      // first bit of a packet
          busy        <= 1'b1;
          sh          <= 15'h0001;
          bit_in_word <= 4'd1;
          word_idx    <= '0;
          hdr_bad     <= 1'b0;
          dropping    <= (fifo_free < FREE_W'(PKT_WORDS));
        end
      end else begin
        sh          <= sh_next[14:0];
        bit_in_word <= bit_in_word + 1'b1;  // wraps 15 -> 0
        if (bit_in_word == 4'd15) begin     // word complete
          wr_en   <= !dropping;
          wr_data <= sh_next;
          if (word_idx < 4'd3 && sh_next[15:12] != expect_hdr) hdr_bad <= 1'b1;
          if (word_idx == 4'(PKT_WORDS - 1)) begin
            busy <= 1'b0;
            if (dropping) begin
              drop_cnt <= drop_cnt + 1'b1;
            end else begin
              pkt_done <= 1'b1;
              pkt_cnt  <= pkt_cnt + 1'b1;
            end
            // header nibbles sit in words 0..2, all seen by now
            if (hdr_bad) hdr_err_cnt <= hdr_err_cnt + 1'b1;
          end else begin
            word_idx <= word_idx + 1'b1;
          end
        end
      end
    end
  end

endmodule

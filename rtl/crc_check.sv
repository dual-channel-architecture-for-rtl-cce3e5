// crc_check: per-channel CRC checker placed right after the Aurora receiver.
//
// Runs the Ethernet CRC-32 over each received frame one 32-bit word per
// cycle, compares it with the frame's last word and strips that word, so the
// stream leaving it is the packet number word followed by the user words. The
// last word that leaves carries eof together with the verdict.
//
// To know which word is the CRC it holds one word back: a word is released
// when the next word of the same frame arrives. It also tidies the framing:
//   * a new sof inside an open frame ends the open frame at its held word,
//     flagged frame_err (the end-of-frame was lost);
//   * a word outside any frame, or a one-word frame, is dropped and reported
//     as a stray word (a false end-of-frame split a packet);
//   * when the channel goes down the open frame is forgotten.
// Link errors reported by the receiver are delayed by the same register so
// they stay in step with the data.
//
// Interface: the receive stream has no back-pressure (as the Aurora receive
// port); out_* is registered. Latency: one word of the same frame plus one
// cycle. From the source design: 32-bit-per-cycle CRC check and stripping.
// Own choices: the hold-one-word scheme and the framing clean-up.
module crc_check
  import raps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  chan_up,
  input  logic  in_valid,
  input  beat_t in_beat,
  input  logic  in_link_err,   // soft/frame error reported by the receiver
  output logic  out_valid,
  output beat_t out_beat,
  output logic  out_crc_err,   // with out_beat.eof: CRC mismatch
  output logic  out_frame_err, // with out_beat.eof: frame had no end
  output logic  out_link_err,  // in_link_err, delayed one cycle
  output logic  stray          // pulse: a word outside any frame was dropped
);

  logic  in_frame, hold_valid, hold_sof;
  word_t hold, crc, crc_next;

  assign crc_next = crc32_word(crc, hold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame      <= 1'b0;
      hold_valid    <= 1'b0;
      hold_sof      <= 1'b0;
      hold          <= '0;
      crc           <= CRC_INIT;
      out_valid     <= 1'b0;
      out_beat      <= '0;
      out_crc_err   <= 1'b0;
      out_frame_err <= 1'b0;
      out_link_err  <= 1'b0;
      stray         <= 1'b0;
    end else begin
      out_valid     <= 1'b0;
      out_crc_err   <= 1'b0;
      out_frame_err <= 1'b0;
      stray         <= 1'b0;
      out_link_err  <= in_link_err;
      if (!chan_up) begin
        in_frame   <= 1'b0;
        hold_valid <= 1'b0;
      end else if (in_valid) begin
        if (in_beat.sof) begin
          if (in_frame && hold_valid) begin
            // previous frame never ended: close it as broken
            out_valid     <= 1'b1;
            out_beat      <= '{sof: hold_sof, eof: 1'b1, data: hold};
            out_frame_err <= 1'b1;
          end
          if (in_beat.eof) begin
            in_frame   <= 1'b0;
            hold_valid <= 1'b0;
            stray      <= 1'b1;
          end else begin
            in_frame   <= 1'b1;
            hold_valid <= 1'b1;
            hold_sof   <= 1'b1;
            hold       <= in_beat.data;
            crc        <= CRC_INIT;
          end
        end else if (in_frame) begin
          out_valid <= 1'b1;
          if (in_beat.eof) begin
            // this word is the CRC: release the held word as the last one
            out_beat    <= '{sof: hold_sof, eof: 1'b1, data: hold};
            out_crc_err <= (~crc_next != in_beat.data);
            in_frame    <= 1'b0;
            hold_valid  <= 1'b0;
          end else begin
            out_beat <= '{sof: hold_sof, eof: 1'b0, data: hold};
            crc      <= crc_next;
            hold     <= in_beat.data;
            hold_sof <= 1'b0;
          end
        end else begin
          stray <= 1'b1;
        end
      end
    end
  end

endmodule

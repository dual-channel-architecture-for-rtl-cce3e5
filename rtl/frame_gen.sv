// frame_gen: the "CRC, Frame Generator" of the transmit side.
//
// Takes user packets as a framed word stream and turns each one into a RAPS
// packet: a header word carrying a sequential packet number, the user words
// unchanged, then a trailer word holding the Ethernet CRC-32 of the header and
// the user words. The same stream is later copied onto both channels.
//
// Interface: valid/ready on both sides. The user stream marks the first word of
// a packet with sof and the last with eof. A word arriving with no packet open
// and without sof is dropped. The output is registered.
//
// Timing: a packet of N user words leaves in N+2 cycles when the output is
// never stalled; in_ready is low in the header and CRC cycles. The first word
// leaves one cycle after it is accepted.
//
// From the source design: packet number prepended, 32-bit Ethernet CRC
// appended, packet number increments by one per packet. Own choices: the CRC
// also covers the header word (so a corrupted packet number is caught), the
// number starts at 0 after reset and wraps, and no length limit is enforced
// here (the receiver marks over-long packets as errored).
module frame_gen
  import raps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // user side
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  // channel side
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat,
  output pnum_t pnum          // number the next packet will carry
);

  typedef enum logic [1:0] {S_HDR, S_DATA, S_CRC} state_e;
  state_e state;
  word_t  crc;
  logic   load;

  assign load = !out_valid || out_ready;

  always_comb begin
    unique case (state)
      S_HDR:   in_ready = in_valid && !in_beat.sof;  // drop stray words
      S_DATA:  in_ready = load;
      default: in_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HDR;
      crc       <= CRC_INIT;
      pnum      <= '0;
      out_valid <= 1'b0;
      out_beat  <= '0;
    end else begin
      if (load) out_valid <= 1'b0;
      unique case (state)
        S_HDR: if (load && in_valid && in_beat.sof) begin
          out_valid     <= 1'b1;
          out_beat.sof  <= 1'b1;
          out_beat.eof  <= 1'b0;
          out_beat.data <= word_t'(pnum);
          crc           <= crc32_word(CRC_INIT, word_t'(pnum));
          state         <= S_DATA;
        end
        S_DATA: if (load && in_valid) begin
          out_valid     <= 1'b1;
          out_beat.sof  <= 1'b0;
          out_beat.eof  <= 1'b0;
          out_beat.data <= in_beat.data;
          crc           <= crc32_word(crc, in_beat.data);
          if (in_beat.eof) state <= S_CRC;
        end
        S_CRC: if (load) begin
          out_valid     <= 1'b1;
          out_beat.sof  <= 1'b0;
          out_beat.eof  <= 1'b1;
          out_beat.data <= ~crc;
          pnum          <= pnum + 1'b1;
          state         <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule

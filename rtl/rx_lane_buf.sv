// rx_lane_buf: receive buffering of one lane in front of the align & vote
// controller.
//
// Two queues per lane. The data FIFO holds the user words of received packets;
// by default it holds four maximum-size packets: two for the skew between the
// channels and two more for a channel that returns in mid-packet, while the
// controller waits for that lane's first whole packet. The information FIFO holds
// one record per packet: packet number (from the header word, which is not
// stored as data), number of user words, and an error flag that gathers the CRC
// verdict, link errors reported during the packet and framing faults (frame
// without end, no user words, more than MAX_PAYLOAD user words). A packet
// becomes visible to the controller only when its last word has arrived, so
// the controller always sees whole packets.
//
// A packet that finds no free information slot when it starts is dropped
// whole; a word that finds the data FIFO full is not stored and its packet is
// marked as errored (both count as overflow). Words of a packet are written at
// a working pointer and committed at its end; if the channel goes down
// mid-packet the partial packet is rolled back.
//
// Read side, driven by the controller:
//   pop          - remove the head record;
//   skip         - with pop: also drop the head packet's words in one cycle;
//   rd_en        - read one word; rd_data is valid the next cycle.
//
// From the source design: a data FIFO holding at least two packets and a
// separate FIFO with packet number, length and errors. Own choices: the
// overflow handling, commit and roll-back scheme, one-cycle discard, INFO_DEPTH,
// and the depth of four packets rather than two.
module rx_lane_buf
  import raps_pkg::*;
#(
  parameter int unsigned DEPTH      = 4 * MAX_PAYLOAD,  // data words, power of two
  parameter int unsigned INFO_DEPTH = 8                 // packet records, power of two
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      chan_up,
  // from crc_check
  input  logic      in_valid,
  input  beat_t     in_beat,
  input  logic      in_crc_err,
  input  logic      in_frame_err,
  input  logic      in_link_err,
  // to align & vote
  output logic      info_valid,
  output pkt_info_t info,
  input  logic      pop,
  input  logic      skip,
  input  logic      rd_en,
  output word_t     rd_data,
  // events (one-cycle pulses)
  output logic      ev_crc_err,
  output logic      ev_frame_err,
  output logic      ev_link_err,
  output logic      ev_overflow,
  output logic      ev_abort
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t       mem [DEPTH];
  logic [AW:0] wr_work, wr_commit, rd_ptr;
  logic [AW:0] used_work;
  logic        in_pkt, cur_err, cur_long, cur_full;
  pnum_t       cur_pnum;
  len_t        cur_len;

  logic        info_wr, info_empty, info_full;
  pkt_info_t   info_in;
  logic        wr_word;
  logic        room, space;
  logic        too_long, no_space;

  assign used_work = wr_work - rd_ptr;
  assign room      = !info_full;
  assign space     = (used_work < (AW+1)'(DEPTH));

  // a user word is stored when a packet is open, below the length limit and
  // the data FIFO has space
  assign wr_word = chan_up && in_valid && !in_beat.sof && in_pkt &&
                   (cur_len < len_t'(MAX_PAYLOAD)) && space;

  always_ff @(posedge clk) begin
    if (wr_word) mem[wr_work[AW-1:0]] <= in_beat.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_data <= '0;
    else if (rd_en) rd_data <= mem[rd_ptr[AW-1:0]];
  end

  // a word of an open packet that could not be stored
  assign too_long = chan_up && in_valid && !in_beat.sof && in_pkt && (cur_len >= len_t'(MAX_PAYLOAD));
  assign no_space = chan_up && in_valid && !in_beat.sof && in_pkt && !too_long && !space;

  // record of the packet that ends in this cycle
  always_comb begin
    info_wr      = 1'b0;
    info_in      = '0;
    ev_crc_err   = 1'b0;
    ev_frame_err = 1'b0;
    if (chan_up && in_valid && in_beat.eof) begin
      if (in_beat.sof && room) begin
        // header only: a packet without user words
        info_wr      = 1'b1;
        info_in      = '{pnum: pnum_t'(in_beat.data), len: '0, err: 1'b1};
        ev_crc_err   = in_crc_err;
        ev_frame_err = 1'b1;
      end else if (!in_beat.sof && in_pkt) begin
        info_wr      = 1'b1;
        info_in.pnum = cur_pnum;
        info_in.len  = cur_len + len_t'(wr_word);
        info_in.err  = cur_err || cur_long || cur_full || !wr_word ||
                       in_crc_err || in_frame_err || in_link_err;
        ev_crc_err   = in_crc_err;
        ev_frame_err = in_frame_err || cur_long || too_long;
      end
    end
  end

  sync_fifo #(.WIDTH($bits(pkt_info_t)), .DEPTH(INFO_DEPTH)) u_info (
    .clk, .rst_n,
    .wr_en(info_wr), .wr_data(info_in),
    .rd_en(pop), .rd_data(info),
    .empty(info_empty), .full(info_full), .count()
  );
  assign info_valid = !info_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_work     <= '0;
      wr_commit   <= '0;
      rd_ptr      <= '0;
      in_pkt      <= 1'b0;
      cur_err     <= 1'b0;
      cur_long    <= 1'b0;
      cur_full    <= 1'b0;
      cur_pnum    <= '0;
      cur_len     <= '0;
      ev_overflow <= 1'b0;
      ev_abort    <= 1'b0;
      ev_link_err <= 1'b0;
    end else begin
      ev_overflow <= 1'b0;
      ev_abort    <= 1'b0;
      ev_link_err <= 1'b0;
      // read side
      if (pop && skip)     rd_ptr <= rd_ptr + (AW+1)'(info.len);
      else if (rd_en)      rd_ptr <= rd_ptr + 1'b1;
      // write side
      if (!chan_up) begin
        if (in_pkt) ev_abort <= 1'b1;
        in_pkt   <= 1'b0;
        wr_work  <= wr_commit;
      end else begin
        if (wr_word) begin
          wr_work <= wr_work + 1'b1;
          cur_len <= cur_len + 1'b1;
        end
        if (too_long) cur_long <= 1'b1;
        if (no_space) cur_full <= 1'b1;
        if (no_space && !cur_full) ev_overflow <= 1'b1;
        if (in_pkt && in_link_err) begin
          cur_err     <= 1'b1;
          ev_link_err <= !cur_err;
        end
        if (in_valid && in_beat.sof) begin
          if (room) begin
            in_pkt   <= !in_beat.eof;
            cur_pnum <= pnum_t'(in_beat.data);
            cur_len  <= '0;
            cur_err  <= in_link_err;
            cur_long <= 1'b0;
            cur_full <= 1'b0;
            wr_work  <= wr_commit;
          end else begin
            in_pkt      <= 1'b0;
            ev_overflow <= 1'b1;
          end
        end else if (in_valid && in_beat.eof) begin
          if (in_pkt) wr_commit <= wr_work + (AW+1)'(wr_word);
          in_pkt   <= 1'b0;
        end
      end
    end
  end

  a_no_overrun:  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_word |-> used_work < (AW+1)'(DEPTH));
  a_rd_has_data: assert property (@(posedge clk) disable iff (!rst_n)
                   rd_en |-> wr_commit != rd_ptr);
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                   pop |-> info_valid);

endmodule

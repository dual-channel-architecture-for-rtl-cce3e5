// raps_top: one node of the dual-channel reliable serial link.
//
// Transmit path: user packets (or the built-in test traffic source) go through
// the frame generator, which adds a packet number and a CRC-32, then through
// the fault injector, which can damage the copy of one channel, and out to the
// transmit ports of two independent link cores.
// Receive path: each channel's receive stream is CRC-checked and buffered
// per lane; the align & vote controller lines the lanes up by packet number,
// chooses a good copy of each packet, and the output multiplexer hands the user
// one stream of user words. Status pulses tell an external repair mechanism
// what happened on each channel.
//
// The link cores themselves (framing, 8B/10B, transceivers) are not part of
// this module: their transmit and receive ports are brought out. A channel
// that is down is ignored by the transmitter, so the other channel keeps the
// link running at full rate while the failed one is reset.
//
// Everything runs in one clock domain. The source design runs both link cores
// from the same frequency, and this module assumes their user clocks have been
// brought to one clock; that is a choice of this implementation.
module raps_top
  import raps_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 4 * MAX_PAYLOAD,  // data words per lane
  parameter int unsigned INFO_DEPTH = 8,                // packet records per lane
  parameter int unsigned GEN_MAX_GAP = 15               // test source idle gap limit
)(
  input  logic       clk,
  input  logic       rst_n,
  // user transmit stream
  input  logic       tx_valid,
  output logic       tx_ready,
  input  beat_t      tx_beat,
  // test traffic source
  input  logic       use_gen,      // 1: the test source replaces the user stream
  input  logic       gen_enable,
  output logic [31:0] gen_pkts,
  output pnum_t      tx_pnum,
  // fault injection at the transmitter
  input  logic       inj_data,
  input  logic       inj_frame,
  input  logic       inj_chan,
  output logic [1:0] inj_done,
  // link core transmit ports
  output logic [1:0] lk_tx_valid,
  input  logic [1:0] lk_tx_ready,
  output beat_t      lk_tx_beat [2],
  // link core receive ports and status
  input  logic [1:0] lk_chan_up,
  input  logic [1:0] lk_rx_valid,
  input  beat_t      lk_rx_beat [2],
  input  logic [1:0] lk_rx_err,
  // user receive stream
  output logic       rx_valid,
  output beat_t      rx_beat,
  output pnum_t      rx_expected,
  output decision_e  rx_decision,
  output status_t    status
);

  // ---------------------------------------------------------------- transmit
  logic  gen_valid, gen_ready;
  beat_t gen_beat;
  logic  fg_in_valid, fg_in_ready;
  beat_t fg_in_beat;
  logic  fg_valid, fg_ready;
  beat_t fg_beat;
  logic  dc_valid;
  logic [1:0] dc_ready;

  data_gen #(.MAX_GAP(GEN_MAX_GAP)) u_gen (
    .clk, .rst_n, .enable(gen_enable && use_gen),
    .out_valid(gen_valid), .out_ready(gen_ready), .out_beat(gen_beat),
    .pkts_sent(gen_pkts)
  );

  assign fg_in_valid = use_gen ? gen_valid : tx_valid;
  assign fg_in_beat  = use_gen ? gen_beat  : tx_beat;
  assign gen_ready   = use_gen && fg_in_ready;
  assign tx_ready    = !use_gen && fg_in_ready;

  frame_gen u_fg (
    .clk, .rst_n,
    .in_valid(fg_in_valid), .in_ready(fg_in_ready), .in_beat(fg_in_beat),
    .out_valid(fg_valid), .out_ready(fg_ready), .out_beat(fg_beat),
    .pnum(tx_pnum)
  );

  data_corrupt u_dc (
    .clk, .rst_n,
    .inj_data, .inj_frame, .inj_chan, .inj_done,
    .in_valid(fg_valid), .in_ready(fg_ready), .in_beat(fg_beat),
    .out_valid(dc_valid), .out_ready(dc_ready), .out_beat(lk_tx_beat)
  );

  // a channel that is down does not hold up the other one
  assign dc_ready    = lk_tx_ready | ~lk_chan_up;
  assign lk_tx_valid = {2{dc_valid}} & lk_chan_up;

  // ----------------------------------------------------------------- receive
  logic      cc_valid [2];
  beat_t     cc_beat [2];
  logic      cc_crc_err [2], cc_frame_err [2], cc_link_err [2], cc_stray [2];
  logic [1:0] info_valid, pop, skip, rd_en;
  pkt_info_t info [2];
  word_t     rd_data [2];
  logic [1:0] ev_crc, ev_frame, ev_link, ev_ovf, ev_abort;

  for (genvar c = 0; c < 2; c++) begin : g_lane
    crc_check u_cc (
      .clk, .rst_n, .chan_up(lk_chan_up[c]),
      .in_valid(lk_rx_valid[c]), .in_beat(lk_rx_beat[c]), .in_link_err(lk_rx_err[c]),
      .out_valid(cc_valid[c]), .out_beat(cc_beat[c]),
      .out_crc_err(cc_crc_err[c]), .out_frame_err(cc_frame_err[c]),
      .out_link_err(cc_link_err[c]), .stray(cc_stray[c])
    );

    rx_lane_buf #(.DEPTH(BUF_DEPTH), .INFO_DEPTH(INFO_DEPTH)) u_buf (
      .clk, .rst_n, .chan_up(lk_chan_up[c]),
      .in_valid(cc_valid[c]), .in_beat(cc_beat[c]),
      .in_crc_err(cc_crc_err[c]), .in_frame_err(cc_frame_err[c]),
      .in_link_err(cc_link_err[c]),
      .info_valid(info_valid[c]), .info(info[c]),
      .pop(pop[c]), .skip(skip[c]), .rd_en(rd_en[c]), .rd_data(rd_data[c]),
      .ev_crc_err(ev_crc[c]), .ev_frame_err(ev_frame[c]), .ev_link_err(ev_link[c]),
      .ev_overflow(ev_ovf[c]), .ev_abort(ev_abort[c])
    );
  end

  logic av_sel, av_valid, av_sof, av_eof;

  align_vote u_av (
    .clk, .rst_n, .chan_up(lk_chan_up),
    .info_valid, .info, .pop, .skip, .rd_en,
    .sel(av_sel), .out_valid(av_valid), .out_sof(av_sof), .out_eof(av_eof),
    .decision(rx_decision), .expected(rx_expected),
    .ev_discard(status.discard), .ev_retain(status.retain),
    .ev_accept(status.accept), .ev_single(status.single),
    .ev_lost(status.data_lost), .ev_renumber(status.renumber)
  );

  out_mux u_mux (
    .clk, .rst_n, .sel(av_sel),
    .in_valid(av_valid), .in_sof(av_sof), .in_eof(av_eof),
    .lane_data(rd_data),
    .out_valid(rx_valid), .out_beat(rx_beat)
  );

  assign status.chan_up   = lk_chan_up;
  assign status.crc_err   = ev_crc;
  assign status.frame_err = ev_frame | {cc_stray[1], cc_stray[0]};
  assign status.link_err  = ev_link;
  assign status.overflow  = ev_ovf;
  assign status.aborted   = ev_abort;

endmodule

// tb_raps_campaign: fault campaign on a two-node system. Node A's transmitter
// feeds node B's receiver and node B's transmitter feeds node A's receiver
// over two full-duplex channels; each direction of a channel is a behavioural
// link model, and both directions of a channel fail together. Node A's test
// source sends random packets to node B, which checks that every word arrives
// exactly once and in order.
//
// 20000 faults are injected at random: payload bit errors, false or missing
// ends of frame, and losses of link, always on one channel at a time. Before
// the other channel is hit, the packets carrying the previous fault are let
// through, and a channel that lost its link is given time to come back and to
// carry traffic. The campaign must lose no word and overflow no lane buffer;
// every fault
// type must have been applied, and node B must have worked in both single- and
// dual-channel mode. Node B's own transmitter is idle; node A's receiver must
// see nothing.
module tb_raps_campaign;
  import raps_pkg::*;

  localparam int NFAULTS = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  // node A (sender) and node B (receiver)
  logic       a_tx_ready, b_tx_ready;
  logic [31:0] a_gen_pkts, b_gen_pkts;
  pnum_t      a_tx_pnum, b_tx_pnum, a_rx_exp, b_rx_exp;
  logic [1:0] a_inj_done, b_inj_done;
  logic [1:0] a_lk_tx_valid, b_lk_tx_valid, a_lk_tx_ready, b_lk_tx_ready;
  beat_t      a_lk_tx_beat [2], b_lk_tx_beat [2];
  logic [1:0] a_up, b_up, a_lk_rx_valid, b_lk_rx_valid, a_lk_rx_err, b_lk_rx_err;
  beat_t      a_lk_rx_beat [2], b_lk_rx_beat [2];
  logic       a_rx_valid, b_rx_valid;
  beat_t      a_rx_beat, b_rx_beat;
  decision_e  a_dec, b_dec;
  status_t    a_status, b_status;
  logic       inj_data, inj_frame, inj_chan;
  logic       gen_enable;
  logic [1:0] brk;

  raps_top node_a (
    .clk, .rst_n, .tx_valid(1'b0), .tx_ready(a_tx_ready), .tx_beat('0),
    .use_gen(1'b1), .gen_enable, .gen_pkts(a_gen_pkts), .tx_pnum(a_tx_pnum),
    .inj_data, .inj_frame, .inj_chan, .inj_done(a_inj_done),
    .lk_tx_valid(a_lk_tx_valid), .lk_tx_ready(a_lk_tx_ready), .lk_tx_beat(a_lk_tx_beat),
    .lk_chan_up(a_up), .lk_rx_valid(a_lk_rx_valid), .lk_rx_beat(a_lk_rx_beat), .lk_rx_err(a_lk_rx_err),
    .rx_valid(a_rx_valid), .rx_beat(a_rx_beat), .rx_expected(a_rx_exp), .rx_decision(a_dec),
    .status(a_status));

  raps_top node_b (
    .clk, .rst_n, .tx_valid(1'b0), .tx_ready(b_tx_ready), .tx_beat('0),
    .use_gen(1'b0), .gen_enable(1'b0), .gen_pkts(b_gen_pkts), .tx_pnum(b_tx_pnum),
    .inj_data(1'b0), .inj_frame(1'b0), .inj_chan(1'b0), .inj_done(b_inj_done),
    .lk_tx_valid(b_lk_tx_valid), .lk_tx_ready(b_lk_tx_ready), .lk_tx_beat(b_lk_tx_beat),
    .lk_chan_up(b_up), .lk_rx_valid(b_lk_rx_valid), .lk_rx_beat(b_lk_rx_beat), .lk_rx_err(b_lk_rx_err),
    .rx_valid(b_rx_valid), .rx_beat(b_rx_beat), .rx_expected(b_rx_exp), .rx_decision(b_dec),
    .status(b_status));

  for (genvar c = 0; c < 2; c++) begin : g_ch
    // A -> B and B -> A directions of channel c; latencies differ per channel
    aurora_link_model #(.LATENCY(6 + 5 * c)) u_ab (.clk, .rst_n, .break_link(brk[c]), .soft_err(1'b0),
      .tx_valid(a_lk_tx_valid[c]), .tx_ready(a_lk_tx_ready[c]), .tx_beat(a_lk_tx_beat[c]),
      .chan_up(b_up[c]), .rx_valid(b_lk_rx_valid[c]), .rx_beat(b_lk_rx_beat[c]), .rx_err(b_lk_rx_err[c]));
    aurora_link_model #(.LATENCY(6 + 5 * c)) u_ba (.clk, .rst_n, .break_link(brk[c]), .soft_err(1'b0),
      .tx_valid(b_lk_tx_valid[c]), .tx_ready(b_lk_tx_ready[c]), .tx_beat(b_lk_tx_beat[c]),
      .chan_up(a_up[c]), .rx_valid(a_lk_rx_valid[c]), .rx_beat(a_lk_rx_beat[c]), .rx_err(a_lk_rx_err[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // node B must see the words of node A's source in order, framed the same way
  logic [31:0] next_word = 0;
  int          rx_words = 0;
  logic        in_pkt = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (b_rx_valid) begin
      check(b_rx_beat.data == next_word,
            $sformatf("word %08x expected %08x", b_rx_beat.data, next_word));
      check(b_rx_beat.sof == !in_pkt, "framing");
      in_pkt    = !b_rx_beat.eof;
      next_word = b_rx_beat.data + 1;
      rx_words++;
    end
    if (a_rx_valid) check(1'b0, "node A received data nobody sent");
  end

  int n_dec [16];
  always @(posedge clk) if (rst_n) n_dec[int'(b_dec)]++;

  int n_fault [3];
  int n_ovf = 0;              // lane buffer overflows at node B
  always @(posedge clk) if (rst_n && b_status.overflow != 2'b00) n_ovf++;
  int n_done [2] = '{0, 0};   // faults the injector reports as applied
  always @(posedge clk) if (rst_n) begin
    if (a_inj_done[0]) n_done[0]++;
    if (a_inj_done[1]) n_done[1]++;
  end
  initial begin
    gen_enable = 0; inj_data = 0; inj_frame = 0; inj_chan = 0; brk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (b_up != 2'b11) @(negedge clk);
    gen_enable = 1;
    repeat (200) @(negedge clk);
    for (int f = 0; f < NFAULTS; f++) begin
      int kind;
      logic ch;
      static logic prev_ch = 1'b0;
      kind = $urandom % 20;
      kind = (kind < 9) ? 0 : (kind < 18) ? 1 : 2;
      ch   = $urandom;
      // a fault on the other channel must not hit a packet still in flight
      // with the previous fault: wait two maximum packets plus the latency
      if (f > 0 && ch != prev_ch) repeat (2 * (MAX_PAYLOAD + 2) + 20) @(negedge clk);
      prev_ch  = ch;
      inj_chan = ch;
      unique case (kind)
        0: begin inj_data = 1;  @(negedge clk); inj_data = 0;
                 while (n_done[0] == n_fault[0]) @(negedge clk); end
        1: begin inj_frame = 1; @(negedge clk); inj_frame = 0;
                 while (n_done[1] == n_fault[1]) @(negedge clk); end
        default: begin
                 brk[ch] = 1; @(negedge clk); brk = '0;
                 // let the channel recover and carry traffic before the next fault
                 while (b_up != 2'b11) @(negedge clk);
                 repeat (300) @(negedge clk);
               end
      endcase
      n_fault[kind]++;
      repeat (40 + $urandom % 200) @(negedge clk);
    end
    gen_enable = 0;
    repeat (600) @(negedge clk);
    check(rx_words > 0 && next_word == node_a.u_gen.count,
          $sformatf("received up to %08x, sent %08x", next_word, node_a.u_gen.count));
    check(n_fault[0] > 0 && n_fault[1] > 0 && n_fault[2] > 0, "every fault type applied");
    check(n_dec[int'(D_ACCEPT_BOTH)] > 0 && n_dec[int'(D_ACCEPT_SOLO)] > 0,
          "dual- and single-channel operation");
    check(n_dec[int'(D_LOST)] == 0, "no data reported lost");
    check(n_ovf == 0, $sformatf("%0d lane buffer overflows", n_ovf));
    $display("faults: data=%0d frame=%0d link=%0d; words=%0d; both=%0d one=%0d keep=%0d lag=%0d solo=%0d renum=%0d",
             n_fault[0], n_fault[1], n_fault[2], rx_words, n_dec[1], n_dec[2], n_dec[3], n_dec[4],
             n_dec[7], n_dec[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFAULTS * 1000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d data, %0d frame, %0d link faults, %0d words", n_fault[0], n_fault[1], n_fault[2], rx_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

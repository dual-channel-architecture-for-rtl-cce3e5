// tb_raps_top: end-to-end test of one dual-channel link node at its default
// sizes. The node's two transmit ports are looped back to its own receive
// ports through two behavioural link channels of different latency (8 and 11
// cycles), so the two lanes are skewed as two real cables would be.
//
// The built-in test source sends packets of random length with random gaps;
// every user word is the running count of words sent, so the receive side
// can tell a lost, repeated or reordered word. Phases:
//   1 clean traffic                  every word arrives, both lanes agree
//   2 data errors, one lane at a time  CRC errors, other lane's copy used
//   3 framing errors, one lane at a time
//   4 loss of link on one lane        single-channel operation, recovery,
//                                     lagging packets discarded, leading kept
//   5 errors on both lanes at once    data lost reported, numbering resynced
//   6 back-to-back maximum packets    throughput 64 of every 66 cycles
// Phases 1-4 and 6 must lose nothing. Each mechanism must be seen at least once.
module tb_raps_top;
  import raps_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  // node ports
  logic       tx_valid, tx_ready;
  beat_t      tx_beat;
  logic       use_gen, gen_enable;
  logic [31:0] gen_pkts;
  pnum_t      tx_pnum, rx_expected;
  logic       inj_data, inj_frame, inj_chan;
  logic [1:0] inj_done;
  logic [1:0] lk_tx_valid, lk_tx_ready, lk_chan_up, lk_rx_valid, lk_rx_err;
  beat_t      lk_tx_beat [2];
  beat_t      lk_rx_beat [2];
  logic       rx_valid;
  beat_t      rx_beat;
  decision_e  rx_decision;
  status_t    status;
  logic [1:0] brk, serr;

  raps_top dut (.*);

  aurora_link_model #(.LATENCY(8))  u_l0 (.clk, .rst_n, .break_link(brk[0]), .soft_err(serr[0]),
    .tx_valid(lk_tx_valid[0]), .tx_ready(lk_tx_ready[0]), .tx_beat(lk_tx_beat[0]),
    .chan_up(lk_chan_up[0]), .rx_valid(lk_rx_valid[0]), .rx_beat(lk_rx_beat[0]), .rx_err(lk_rx_err[0]));
  aurora_link_model #(.LATENCY(11)) u_l1 (.clk, .rst_n, .break_link(brk[1]), .soft_err(serr[1]),
    .tx_valid(lk_tx_valid[1]), .tx_ready(lk_tx_ready[1]), .tx_beat(lk_tx_beat[1]),
    .chan_up(lk_chan_up[1]), .rx_valid(lk_rx_valid[1]), .rx_beat(lk_rx_beat[1]), .rx_err(lk_rx_err[1]));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ scoreboard
  // what the transmitter was given: word value -> frame flags
  logic [1:0] sent_flags [logic [31:0]];
  logic [31:0] sent_last;
  logic        sent_any = 1'b0;
  always @(posedge clk) if (rst_n && dut.fg_in_valid && dut.fg_in_ready) begin
    sent_flags[dut.fg_in_beat.data] = {dut.fg_in_beat.sof, dut.fg_in_beat.eof};
    sent_last = dut.fg_in_beat.data;
    sent_any  = 1'b1;
  end

  logic [31:0] next_word;
  logic        have_next = 1'b0;
  logic        allow_gap = 1'b0;
  logic        in_pkt = 1'b0;
  int          gaps = 0, rx_words = 0, rx_pkts = 0;
  logic [31:0] rx_last;
  always @(posedge clk) if (rst_n && rx_valid) begin
    rx_words++;
    if (have_next && rx_beat.data != next_word) begin
      if (allow_gap && rx_beat.sof && (rx_beat.data - next_word) < 32'h1000_0000) gaps++;
      else check(1'b0, $sformatf("word %08x expected %08x", rx_beat.data, next_word));
    end
    check(sent_flags.exists(rx_beat.data) &&
          sent_flags[rx_beat.data] == {rx_beat.sof, rx_beat.eof},
          $sformatf("framing of word %08x", rx_beat.data));
    check(rx_beat.sof == !in_pkt, "sof only at packet start");
    in_pkt    = !rx_beat.eof;
    if (rx_beat.eof) rx_pkts++;
    next_word = rx_beat.data + 1;
    have_next = 1'b1;
    rx_last   = rx_beat.data;
  end

  // ------------------------------------------------------ mechanism counters
  int n_dec [16];
  int n_crc = 0, n_frame = 0, n_link = 0, n_abort = 0, n_single = 0;
  always @(posedge clk) if (rst_n) begin
    n_dec[int'(rx_decision)]++;
    n_crc    += int'(status.crc_err[0]) + int'(status.crc_err[1]);
    n_frame  += int'(status.frame_err[0]) + int'(status.frame_err[1]);
    n_link   += int'(status.link_err[0]) + int'(status.link_err[1]);
    n_abort  += int'(status.aborted[0]) + int'(status.aborted[1]);
    n_single += int'(status.single);
  end

  task automatic drain();
    // stop the source, wait until the receiver has passed out the last word
    gen_enable = 1'b0;
    repeat (400) @(posedge clk);
    check(sent_any && rx_last == sent_last,
          $sformatf("drain: last received %08x, last sent %08x", rx_last, sent_last));
  endtask

  task automatic run(input int cycles);
    gen_enable = 1'b1;
    repeat (cycles) @(posedge clk);
  endtask

  // ------------------------------------------------------------ throughput
  int tp_first, tp_last, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    tx_valid = 0; tx_beat = '0; use_gen = 1; gen_enable = 0;
    inj_data = 0; inj_frame = 0; inj_chan = 0; brk = '0; serr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&lk_chan_up);
    @(negedge clk);

    $display("phase 1 at %0t", $time);
    // 1: clean traffic
    run(4000);
    drain();
    check(n_dec[int'(D_ACCEPT_BOTH)] > 50, "phase 1: packets accepted from both lanes");
    check(n_crc == 0 && n_frame == 0, "phase 1: no errors reported");

    $display("phase 2 at %0t", $time);
    // 2: data errors, one lane at a time
    gen_enable = 1'b1;
    for (int i = 0; i < 40; i++) begin
      repeat (60 + ($urandom % 60)) @(negedge clk);
      inj_chan = i[0]; inj_data = 1'b1;
      @(negedge clk); inj_data = 1'b0;
      do @(posedge clk); while (!inj_done[0]); @(negedge clk);
    end
    drain();
    check(n_crc >= 40, $sformatf("phase 2: %0d CRC errors seen", n_crc));
    check(n_dec[int'(D_ACCEPT_ONE)] >= 40, "phase 2: valid copy accepted");

    $display("phase 3 at %0t", $time);
    // 3: framing errors, one lane at a time
    gen_enable = 1'b1;
    for (int i = 0; i < 60; i++) begin
      repeat (80 + ($urandom % 80)) @(negedge clk);
      inj_chan = i[0]; inj_frame = 1'b1;
      @(negedge clk); inj_frame = 1'b0;
      do @(posedge clk); while (!inj_done[1]); @(negedge clk);
    end
    drain();
    check(n_frame > 0, "phase 3: framing errors seen");

    $display("phase 4 at %0t", $time);
    // 4: loss of link on one lane at a time, several times
    gen_enable = 1'b1;
    for (int i = 0; i < 6; i++) begin
      repeat (300 + ($urandom % 97)) @(negedge clk);
      brk[i % 2] = 1'b1; @(negedge clk); brk = '0;
      repeat (450) @(negedge clk);
      check(lk_chan_up == 2'b11, "phase 4: channel recovered");
      // mixed: data errors on the same lane right after recovery
      inj_chan = i[0]; inj_data = 1'b1; @(negedge clk); inj_data = 1'b0;
      repeat (200) @(negedge clk);
      inj_chan = i[0]; inj_frame = 1'b1; @(negedge clk); inj_frame = 1'b0;
    end
    repeat (500) @(negedge clk);
    drain();
    check(n_single > 0, "phase 4: single-channel operation");
    check(n_abort > 0, "phase 4: partial packet dropped at loss of link");

    $display("phase 5 at %0t", $time);
    // 5: errors on both lanes at once: loss is allowed and must be reported
    allow_gap = 1'b1;
    gen_enable = 1'b1;
    for (int i = 0; i < 5; i++) begin
      repeat (150) @(negedge clk);
      do @(negedge clk); while (!(lk_rx_valid == 2'b11 && !lk_rx_beat[0].sof && !lk_rx_beat[1].sof));
      serr = 2'b11; @(negedge clk); serr = '0;
    end
    repeat (300) @(negedge clk);
    brk = 2'b11; @(negedge clk); brk = '0;
    repeat (1200) @(negedge clk);
    drain();
    check(n_dec[int'(D_LOST)] > 0, "phase 5: data loss reported");
    check(n_dec[int'(D_RENUMBER)] > 0, "phase 5: expected number updated");
    check(n_link > 0, "phase 5: link errors reported");
    check(gaps > 0, "phase 5: gap seen in the user data");
    allow_gap = 1'b0;

    $display("phase 6 at %0t", $time);
    // 6: back-to-back maximum-size packets from the user port
    use_gen = 1'b0;
    begin
      int np;
      logic [31:0] w;
      np = 30;
      w  = sent_last + 1;
      tp_first = -1;
      fork
        for (int p = 0; p < np; p++)
          for (int k = 0; k < MAX_PAYLOAD; k++) begin
            tx_valid = 1'b1;
            tx_beat  = '{sof: (k == 0), eof: (k == MAX_PAYLOAD-1), data: w};
            while (!tx_ready) @(negedge clk);
            @(negedge clk);
            w++;
          end
        begin
          int got;
          got = 0;
          while (got < np * MAX_PAYLOAD) begin
            @(posedge clk);
            if (rx_valid) begin
              if (got == 0) tp_first = cyc;
              got++;
              tp_last = cyc;
            end
          end
        end
      join
      tx_valid = 1'b0;
      // 30 packets of 64 words leave in 30*66 cycles, minus the last packet's overhead
      check((tp_last - tp_first) <= np * (MAX_PAYLOAD + 2),
            $sformatf("phase 6: %0d cycles for %0d words", tp_last - tp_first + 1, np * MAX_PAYLOAD));
      check((tp_last - tp_first) >= np * (MAX_PAYLOAD + 2) - 4, "phase 6: rate not above the link rate");
    end
    repeat (50) @(negedge clk);
    check(rx_last == sent_last, "phase 6: every word delivered");

    // every named mechanism happened
    check(n_dec[int'(D_ACCEPT_BOTH)] > 0, "mechanism: accept twin packets");
    check(n_dec[int'(D_ACCEPT_ONE)]  > 0, "mechanism: accept valid, discard invalid");
    check(n_dec[int'(D_ACCEPT_KEEP)] > 0, "mechanism: accept valid, retain leading");
    check(n_dec[int'(D_DISCARD_LAG)] > 0, "mechanism: discard lagging, retain valid");
    check(n_dec[int'(D_ACCEPT_SOLO)] > 0, "mechanism: single-channel accept");
    check(n_dec[int'(D_LOST)]        > 0, "mechanism: data lost, continue");
    check(n_dec[int'(D_RENUMBER)]    > 0, "mechanism: update expected number");
    $display("mechanisms: both=%0d one=%0d keep=%0d lag=%0d solo=%0d lost=%0d renum=%0d crc=%0d frame=%0d link=%0d abort=%0d gaps=%0d pkts=%0d",
             n_dec[1], n_dec[2], n_dec[3], n_dec[4], n_dec[7], n_dec[5], n_dec[6],
             n_crc, n_frame, n_link, n_abort, gaps, rx_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rx_lane_buf: checks one lane buffer against a queue model.
// Phase A: random packets (good, CRC error, frame error, link error in the
// middle, header only, over-long) while a reader pops each record and either
// reads the words out (compared with what was written) or skips them.
// A loss of channel in mid-packet must leave no record. Phase B: nothing is
// read; packets of 20 words overflow first the data FIFO (packets marked
// errored and truncated) and then the record FIFO (packets dropped whole).
// Read timing: a word is on rd_data the cycle after rd_en.
module tb_rx_lane_buf;
  import raps_pkg::*;

  localparam int unsigned DEPTH = 128, INFO_DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic chan_up, in_valid, in_crc_err, in_frame_err, in_link_err;
  beat_t in_beat;
  logic info_valid, pop, skip, rd_en;
  pkt_info_t info;
  word_t rd_data;
  logic ev_crc_err, ev_frame_err, ev_link_err, ev_overflow, ev_abort;
  rx_lane_buf #(.DEPTH(DEPTH), .INFO_DEPTH(INFO_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  typedef struct { pnum_t pnum; int len; logic err; word_t w [$]; } rec_t;
  rec_t exp_q [$];
  int n_ovf = 0, n_abort = 0, n_crc = 0, n_link = 0;
  always @(posedge clk) if (rst_n) begin
    n_ovf   += int'(ev_overflow);
    n_abort += int'(ev_abort);
    n_crc   += int'(ev_crc_err);
    n_link  += int'(ev_link_err);
  end

  task automatic put(input logic sof, input logic eof, input word_t d,
                     input logic ce, input logic fe, input logic le);
    in_valid = 1'b1; in_beat = '{sof: sof, eof: eof, data: d};
    in_crc_err = ce; in_frame_err = fe; in_link_err = le;
    @(negedge clk);
    in_valid = 1'b0; in_crc_err = 0; in_frame_err = 0; in_link_err = 0;
    if ($urandom % 4 == 0) @(negedge clk);
  endtask

  // kind: 0 good, 1 crc, 2 frame, 3 link error inside, 4 header only, 5 too long
  task automatic packet(input pnum_t pn, input int n, input int kind, input int used);
    rec_t r;
    int   le_at;
    r.pnum = pn; r.err = (kind != 0); r.len = 0;
    if (kind == 4) n = 0;
    if (kind == 5) n = MAX_PAYLOAD + 1 + $urandom % 5;
    le_at = (kind == 3) ? $urandom % n : -1;
    begin
      word_t d [$];
      for (int i = 0; i < n; i++) begin
        d.push_back($urandom);
        if (i < MAX_PAYLOAD && used + r.len < DEPTH) begin
          r.w.push_back(d[i]); r.len++;
        end else r.err = 1'b1;
      end
      // the record is visible as soon as the last word is in
      if (n == 0) exp_q.push_back(r);
      put(1'b1, n == 0, word_t'(pn), 1'b0, 1'b0, 1'b0);
      for (int i = 0; i < n; i++) begin
        if (i == n-1) exp_q.push_back(r);
        put(1'b0, i == n-1, d[i], (kind == 1) && i == n-1, (kind == 2) && i == n-1, i == le_at);
      end
    end
  endtask

  // reader
  logic reader_on = 1'b1;
  int   n_read = 0;
  initial begin
    pop = 0; skip = 0; rd_en = 0;
    forever begin
      @(negedge clk);
      if (reader_on && info_valid) begin
        rec_t r;
        logic do_skip;
        check(exp_q.size() > 0, "record without packet");
        r = exp_q.pop_front();
        check(info.pnum == r.pnum && int'(info.len) == r.len && info.err == r.err,
              $sformatf("record %0d/%0d/%b expected %0d/%0d/%b",
                        info.pnum, info.len, info.err, r.pnum, r.len, r.err));
        do_skip = r.err || ($urandom % 3 == 0);
        pop = 1; skip = do_skip;
        @(negedge clk);
        pop = 0; skip = 0;
        if (!do_skip) for (int k = 0; k < r.len; k++) begin
          rd_en = 1;
          @(negedge clk);
          rd_en = 0;
          check(rd_data == r.w[k], $sformatf("word %0d of packet %0d", k, r.pnum));
        end
        n_read++;
      end
    end
  end

  initial begin
    chan_up = 1; in_valid = 0; in_beat = '0; in_crc_err = 0; in_frame_err = 0; in_link_err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // phase A
    for (int p = 0; p < 300; p++) begin
      int k;
      k = $urandom % 12;
      if (k > 5) k = 0;
      packet(pnum_t'(p), 1 + $urandom % MAX_PAYLOAD, k, 0);
      if (p % 50 == 25) begin
        // loss of channel in mid-packet: no record
        put(1'b1, 1'b0, 32'h99, 0, 0, 0);
        put(1'b0, 1'b0, 32'h1, 0, 0, 0);
        chan_up = 0; @(negedge clk); chan_up = 1; @(negedge clk);
      end
      while (exp_q.size() > 1) @(negedge clk);
    end
    while (exp_q.size() > 0) @(negedge clk);
    repeat (80) @(negedge clk);
    check(n_read == 300, $sformatf("%0d records read", n_read));
    check(n_abort == 6, $sformatf("%0d aborts", n_abort));
    check(n_crc > 0 && n_link > 0, "error events");
    // phase B: no reader; 20-word packets
    reader_on = 1'b0;
    repeat (3) @(negedge clk);
    for (int p = 0; p < 10; p++) begin
      if (p < INFO_DEPTH) packet(pnum_t'(1000 + p), 20, 0, p * 20 > DEPTH ? DEPTH : p * 20);
      else begin
        put(1'b1, 1'b0, 32'(1000 + p), 0, 0, 0);
        for (int i = 0; i < 20; i++) put(1'b0, i == 19, $urandom, 0, 0, 0);
      end
    end
    check(n_ovf >= 3, $sformatf("%0d overflow events", n_ovf));
    check(exp_q.size() == INFO_DEPTH, "records kept");
    reader_on = 1'b1;
    while (exp_q.size() > 0) @(negedge clk);
    repeat (30) @(negedge clk);
    check(!info_valid, "no extra records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

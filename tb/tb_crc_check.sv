// tb_crc_check: drives the CRC checker with frames built by the reference
// CRC and compares its output with a queue of expected words.
// Cases: good frames of 0..20 user words, frames with a flipped bit (CRC
// error), frames whose end was lost (closed by the next sof with frame_err),
// stray words outside frames and one-word frames (dropped, stray pulse),
// a loss of channel in mid-frame (frame forgotten), random idle cycles and
// link-error pulses (delayed by one cycle). Latency: the last user word of
// a frame must appear exactly one cycle after its CRC word went in.
module tb_crc_check;
  import raps_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic  chan_up, in_valid, in_link_err, out_valid, out_crc_err, out_frame_err, out_link_err, stray;
  beat_t in_beat, out_beat;
  crc_check dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  typedef struct packed { beat_t b; logic ce; logic fe; } exp_t;
  exp_t exp_q [$];
  int   strays_exp = 0, strays_seen = 0;
  logic link_prev = 1'b0;
  int   last_in_eof_cyc = -10, cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    check(out_link_err == link_prev, "link error delayed one cycle");
    link_prev <= in_link_err;
    if (stray) strays_seen++;
    if (out_valid) begin
      check(exp_q.size() > 0, "unexpected output word");
      if (exp_q.size() > 0) begin
        exp_t e;
        e = exp_q.pop_front();
        check(out_beat == e.b, $sformatf("word %08x sof %b eof %b, expected %08x %b %b",
              out_beat.data, out_beat.sof, out_beat.eof, e.b.data, e.b.sof, e.b.eof));
        if (out_beat.eof) check(out_crc_err == e.ce && out_frame_err == e.fe,
                                $sformatf("verdict crc %b frame %b", out_crc_err, out_frame_err));
      end
    end
  end

  task automatic put(input logic sof, input logic eof, input logic [31:0] d);
    in_valid = 1'b1; in_beat = '{sof: sof, eof: eof, data: d};
    in_link_err = ($urandom % 50 == 0);
    @(negedge clk);
    in_valid = 1'b0; in_link_err = 1'b0;
    while ($urandom % 3 == 0) @(negedge clk);
  endtask

  // a frame of n user words; kind 0 good, 1 bad CRC, 2 end lost
  task automatic frame(input int n, input int kind);
    logic [31:0] w [$];
    logic [31:0] c;
    w.push_back($urandom % 65536);
    for (int i = 0; i < n; i++) w.push_back($urandom);
    c = crc_words(w);
    if (kind == 1) c ^= 32'(1) << ($urandom % 32);
    for (int i = 0; i <= n; i++)
      exp_q.push_back('{b: '{sof: (i == 0), eof: (i == n && kind != 2), data: w[i]},
                        ce: (kind == 1), fe: 1'b0});
    if (kind == 2) exp_q.push_back('{b: '{sof: 1'b0, eof: 1'b1, data: c}, ce: 1'b0, fe: 1'b1});
    for (int i = 0; i <= n; i++) put(i == 0, 1'b0, w[i]);
    put(1'b0, kind != 2, c);
  endtask

  initial begin
    chan_up = 1'b1; in_valid = 0; in_beat = '0; in_link_err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 300; p++) begin
      int r;
      r = $urandom % 10;
      if (r < 6) frame($urandom % 21, 0);
      else if (r < 8) frame($urandom % 21, 1);
      else if (r == 8) begin
        frame($urandom % 21, 2);     // must be followed by a frame
        frame($urandom % 21, 0);
      end else begin
        // stray words, then a one-word frame
        put(1'b0, 1'b0, $urandom); strays_exp++;
        put(1'b0, 1'b1, $urandom); strays_exp++;
        put(1'b1, 1'b1, $urandom); strays_exp++;
      end
    end
    // latency: the last user word leaves one cycle after the CRC word
    begin
      logic [31:0] w [$];
      int t_in;
      w = '{32'h5, 32'h1234_5678};
      exp_q.push_back('{b: '{sof: 1, eof: 0, data: w[0]}, ce: 0, fe: 0});
      exp_q.push_back('{b: '{sof: 0, eof: 1, data: w[1]}, ce: 0, fe: 0});
      in_valid = 1; in_beat = '{sof: 1, eof: 0, data: w[0]}; @(negedge clk);
      in_beat = '{sof: 0, eof: 0, data: w[1]}; @(negedge clk);
      in_beat = '{sof: 0, eof: 1, data: crc_words(w)}; @(negedge clk);
      t_in = cyc;
      in_valid = 0;
      check(out_valid && out_beat.eof, "last word one cycle after the CRC word");
    end
    // channel lost mid-frame: the open frame is forgotten
    put(1'b1, 1'b0, 32'h7);
    exp_q.push_back('{b: '{sof: 1, eof: 0, data: 32'h7}, ce: 0, fe: 0}); // released by next word
    put(1'b0, 1'b0, 32'h8);
    chan_up = 1'b0; @(negedge clk); chan_up = 1'b1;
    put(1'b0, 1'b1, 32'h9); strays_exp++;   // outside any frame now
    frame(3, 0);
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d expected words never came", exp_q.size()));
    check(strays_seen == strays_exp, $sformatf("strays %0d expected %0d", strays_seen, strays_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

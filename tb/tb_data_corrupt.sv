// tb_data_corrupt: checks the fault injector. A framed stream passes with
// random back-pressure on each channel. Without requests both copies must
// equal the input. After a data-error request for channel c, exactly the next
// payload word taken (not a header or CRC word) must differ on channel c in
// at least one bit and nowhere else; after a frame-error request, the next word
// taken must have its eof inverted on channel c only. The other channel must
// never change, and the input is taken only when both channels are ready.
module tb_data_corrupt;
  import raps_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic inj_data, inj_frame, inj_chan, in_valid, in_ready, out_valid;
  logic [1:0] inj_done, out_ready;
  beat_t in_beat;
  beat_t out_beat [2];
  data_corrupt dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  // requests pending in the reference model
  logic pd = 0, pf = 0, pc = 0;
  int   n_data = 0, n_frame = 0;

  always @(posedge clk) if (rst_n) begin
    logic want_d, want_f;
    check(in_ready == (&out_ready), "ready is the AND of both channels");
    check(out_valid == in_valid, "valid passes");
    want_d = 0; want_f = 0;
    if (in_valid && in_ready) begin
      want_d = pd && !in_beat.sof && !in_beat.eof;
      want_f = pf;
      for (int c = 0; c < 2; c++) begin
        if (want_d && pc == 1'(c))
          check(out_beat[c].data != in_beat.data, "payload word corrupted");
        else
          check(out_beat[c].data == in_beat.data, $sformatf("data of channel %0d unchanged", c));
        check(out_beat[c].sof == in_beat.sof, "sof unchanged");
        check(out_beat[c].eof == (in_beat.eof ^ (want_f && pc == 1'(c))), "eof");
      end
      if (want_d) begin pd = 0; n_data++; end
      if (want_f) begin pf = 0; n_frame++; end
    end
    check(inj_done == {want_f, want_d}, "done pulses");
    if (inj_data || inj_frame) pc = inj_chan;
    if (inj_data)  pd = 1;
    if (inj_frame) pf = 1;
  end

  int pos = 0, plen = 5;
  always @(negedge clk) if (rst_n) begin
    out_ready = 2'($urandom) | (($urandom % 2) ? 2'b11 : 2'b00);
    inj_data = 0; inj_frame = 0;
    if (!pd && !pf && $urandom % 10 == 0) begin
      inj_chan = $urandom;
      if ($urandom % 2) inj_data = 1; else inj_frame = 1;
    end
  end

  // source: packets of 2..8 words (header, payload, CRC word)
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    pos <= (pos == plen - 1) ? 0 : pos + 1;
    if (pos == plen - 1) plen <= 2 + $urandom % 7;
  end
  always_comb begin
    in_beat.sof  = (pos == 0);
    in_beat.eof  = (pos == plen - 1);
    in_beat.data = 32'hA500_0000 + 32'(pos);
  end

  initial begin
    in_valid = 0; inj_data = 0; inj_frame = 0; inj_chan = 0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    in_valid = 1;
    repeat (20000) @(negedge clk);
    check(n_data > 100 && n_frame > 100, $sformatf("%0d data, %0d frame faults", n_data, n_frame));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

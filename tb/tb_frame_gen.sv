// tb_frame_gen: checks the frame generator against a reference model.
// Random packets (1..64 words) are sent with random source gaps and random
// output stalls. Every output packet must be: header with the next packet
// number and sof, the user words unchanged, then the reference CRC-32 of
// header and user words with eof. A stray word without sof must be dropped.
// Rate: with no stalls a packet of N words must take exactly N+2 cycles.
module tb_frame_gen;
  import raps_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  beat_t in_beat, out_beat;
  pnum_t pnum;
  frame_gen dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  logic [31:0] sent [$][$];       // user words of each packet, in order
  logic        stall_en = 1'b1;

  // output monitor: rebuild packets
  logic [31:0] cur [$];
  int          npkt = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    cur.push_back(out_beat.data);
    check(out_beat.sof == (cur.size() == 1), "sof on the header only");
    if (out_beat.eof) begin
      logic [31:0] body [$];
      logic [31:0] exp [$];
      body = cur[0:cur.size()-2];
      check(sent.size() > 0, "packet was sent");
      if (sent.size() > 0) begin
        exp = sent.pop_front();
        check(cur[0] == 32'(npkt % (1 << PNUM_W)), $sformatf("header %0d expected %0d", cur[0], npkt));
        check(body.size() == exp.size() + 1, $sformatf("length %0d expected %0d", body.size(), exp.size() + 1));
        for (int i = 0; i < exp.size() && i + 1 < body.size(); i++)
          check(body[i+1] == exp[i], "user word");
        check(cur[cur.size()-1] == crc_words(body), $sformatf("crc %08x expected %08x",
              cur[cur.size()-1], crc_words(body)));
      end
      npkt++;
      cur.delete();
    end
  end

  always @(posedge clk) out_ready <= stall_en ? ($urandom % 4 != 0) : 1'b1;

  task automatic send(input int n, input int gap);
    logic [31:0] w [$];
    for (int k = 0; k < n; k++) w.push_back($urandom);
    sent.push_back(w);
    for (int k = 0; k < n; k++) begin
      in_valid = 1'b1;
      in_beat  = '{sof: (k == 0), eof: (k == n-1), data: w[k]};
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      if ($urandom % 5 == 0 && gap > 0) begin
        in_valid = 1'b0; repeat ($urandom % gap) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    logic [31:0] t0, t1;
    byte unsigned s [$];
    in_valid = 0; in_beat = '0;
    // the reference itself: CRC-32("123456789") = CBF43926
    s = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(crc_bytes(s) == 32'hCBF4_3926, "reference CRC check value");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // a stray word before any sof is dropped
    in_valid = 1'b1; in_beat = '{sof: 0, eof: 0, data: 32'hDEAD_BEEF};
    @(negedge clk);
    check(in_ready == 1'b1, "stray word taken");
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    for (int p = 0; p < 200; p++) send(1 + $urandom % MAX_PAYLOAD, 4);
    repeat (300) @(negedge clk);
    check(sent.size() == 0, "all packets came out");
    check(npkt == 200, $sformatf("%0d packets out", npkt));
    // rate: no stalls, back-to-back
    stall_en = 1'b0;
    @(negedge clk);
    begin
      int c0, c1;
      c0 = $time / 10;
      send(64, 0);
      send(64, 0);
      c1 = $time / 10;
      // header, 64 words, CRC, header, 64 words: the last CRC follows later
      check(c1 - c0 == 2 * 66 - 1, $sformatf("two 64-word packets took %0d cycles", c1 - c0));
    end
    repeat (20) @(negedge clk);
    check(npkt == 202, "rate packets out");
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

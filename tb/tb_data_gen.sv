// tb_data_gen: checks the test traffic source. With random back-pressure the
// words must count up by one from 0, a held word must not change, every
// packet must be framed by sof/eof and be 1..MAX_LEN words long, idle gaps
// between packets (without back-pressure) must not exceed MAX_GAP cycles,
// pkts_sent must count the packets, and after enable falls the packet in
// progress must finish and no new one start. Both short and long packets
// must occur.
module tb_data_gen;
  import raps_pkg::*;

  localparam int unsigned MAX_LEN = 64, MAX_GAP = 15;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic enable, out_valid, out_ready;
  beat_t out_beat;
  logic [31:0] pkts_sent;
  data_gen #(.MAX_LEN(MAX_LEN), .MAX_GAP(MAX_GAP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  logic [31:0] next = 0;
  int   len = 0, npk = 0, idle = 0, min_len = 1000, max_len = 0, max_idle = 0;
  logic held = 0, stall_en = 1;
  beat_t held_beat;

  always @(posedge clk) if (rst_n) begin
    if (held) check(out_valid && out_beat == held_beat, "held word stable");
    held = out_valid && !out_ready;
    held_beat = out_beat;
    if (out_valid) begin
      idle = 0;
      if (out_ready) begin
        check(out_beat.data == next, "running count");
        check(out_beat.sof == (len == 0), "sof at start");
        next++;
        len++;
        if (out_beat.eof) begin
          check(len >= 1 && len <= MAX_LEN, $sformatf("length %0d", len));
          min_len = (len < min_len) ? len : min_len;
          max_len = (len > max_len) ? len : max_len;
          npk++;
          len = 0;
        end
      end
    end else if (len == 0 && enable && !stall_en) begin
      idle++;
      max_idle = (idle > max_idle) ? idle : max_idle;
    end
  end

  always @(negedge clk) out_ready = stall_en ? ($urandom % 3 != 0) : 1'b1;

  initial begin
    enable = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(!out_valid, "idle while disabled");
    enable = 1;
    repeat (20000) @(negedge clk);
    stall_en = 0;
    repeat (20000) @(negedge clk);
    enable = 0;
    repeat (MAX_LEN * 3) @(negedge clk);
    check(!out_valid && len == 0, "stops at a packet boundary");
    check(pkts_sent == 32'(npk), $sformatf("pkts_sent %0d, counted %0d", pkts_sent, npk));
    check(min_len <= 4 && max_len >= MAX_LEN - 4, $sformatf("lengths %0d..%0d", min_len, max_len));
    check(max_idle <= MAX_GAP + 1 && max_idle >= 1, $sformatf("longest gap %0d", max_idle));
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

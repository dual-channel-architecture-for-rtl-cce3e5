// tb_out_mux: checks the output multiplexer. Random lane words, selects and
// frame flags are applied; one cycle later the user side must show the word
// of the selected lane with the same flags, and out_valid must follow
// in_valid with the same one-cycle delay.
module tb_out_mux;
  import raps_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic  sel, in_valid, in_sof, in_eof, out_valid;
  word_t lane_data [2];
  beat_t out_beat;
  out_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    logic  pv;
    beat_t pb;
    int    s0 = 0, s1 = 0;
    sel = 0; in_valid = 0; in_sof = 0; in_eof = 0; lane_data = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      sel = $urandom; in_valid = $urandom; in_sof = $urandom; in_eof = $urandom;
      lane_data[0] = $urandom; lane_data[1] = $urandom;
      pv = in_valid;
      pb = '{sof: in_sof, eof: in_eof, data: lane_data[sel]};
      if (in_valid) begin if (sel) s1++; else s0++; end
      @(negedge clk);
      check(out_valid == pv, "valid one cycle later");
      if (pv) check(out_beat == pb, "selected lane word and flags");
    end
    check(s0 > 100 && s1 > 100, "both lanes selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

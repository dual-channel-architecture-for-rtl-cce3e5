// tb_align_vote: checks the align & vote controller cycle by cycle against a
// reference model of the decision tree. The testbench plays both lane
// buffers: two queues of packet records whose heads drive info/info_valid and
// which lose their head on pop. Records get random numbers close to the
// expected one, random error flags and random lengths; the channels go up
// and down at random. For every decision the model's choice, the records
// popped and skipped, and the new expected number must match. After an
// accept, rd_en of the chosen lane must be high for exactly the packet length
// and out_valid/sof/eof/sel must follow one cycle later.
module tb_align_vote;
  import raps_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic [1:0] chan_up, info_valid, pop, skip, rd_en, ev_discard, ev_retain;
  pkt_info_t  info [2];
  logic sel, out_valid, out_sof, out_eof, ev_accept, ev_single, ev_lost, ev_renumber;
  decision_e decision;
  pnum_t expected;
  align_vote dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  pkt_info_t q [2][$];
  always_comb for (int l = 0; l < 2; l++) begin
    info_valid[l] = (q[l].size() > 0);
    info[l]       = (q[l].size() > 0) ? q[l][0] : '0;
  end

  // reference model state
  pnum_t m_exp = '0;
  int    m_left = 0;      // words still to read
  logic  m_lane = 1'b0;
  int    m_out [$];       // expected out beats: {lane, sof, eof}
  int    seen [16];

  function automatic logic later(pnum_t a, pnum_t b);  // a ahead of b
    return (a != b) && (pnum_t'(a - b) < pnum_t'(1 << (PNUM_W - 1)));
  endfunction

  always @(posedge clk) if (rst_n) begin
    decision_e d;
    logic [1:0] p, s;
    logic       acc, al;
    pnum_t      ne;
    // outputs of the previous read cycle
    if (m_out.size() > 0) begin
      int o;
      o = m_out.pop_front();
      check(out_valid && sel == o[2] && out_sof == o[1] && out_eof == o[0], "output flags");
    end else check(!out_valid, "no output");
    if (m_left > 0) begin
      check(rd_en == (2'b01 << m_lane) && pop == 0, "reading");
      m_out.push_back(int'({m_lane, seen[15] == 1, m_left == 1}));
      seen[15] = 0;
      m_left--;
    end else begin
      // decision tree, written from the flow chart
      d = D_WAIT; p = 0; s = 0; acc = 0; al = 0; ne = m_exp;
      if (chan_up == 2'b01 || chan_up == 2'b10) begin
        logic u;
        u = chan_up[1];
        if (info_valid[u]) begin
          if (info[u].err)                  begin d = D_LOST; p[u] = 1; s[u] = 1; ne = m_exp + 1; end
          else if (info[u].pnum == m_exp)   begin d = D_ACCEPT_SOLO; p[u] = 1; acc = 1; al = u; end
          else                              begin d = D_RENUMBER; ne = info[u].pnum; end
        end
      end else if (chan_up == 2'b11 && info_valid == 2'b11) begin
        logic e0, e1;
        e0 = info[0].err; e1 = info[1].err;
        if (e0 && e1) begin d = D_LOST; p = 3; s = 3; ne = m_exp + 1; end
        else if (e0 != e1) begin
          logic v;
          v = e0 ? 1'b1 : 1'b0;
          if (info[v].pnum == m_exp) begin d = D_ACCEPT_ONE; p = 3; s[!v] = 1; acc = 1; al = v; end
          else begin d = D_RENUMBER; ne = info[v].pnum; end
        end else if (info[0].pnum == info[1].pnum) begin
          if (info[0].pnum == m_exp) begin d = D_ACCEPT_BOTH; p = 3; s = 2'b10; acc = 1; al = 0; end
          else begin d = D_RENUMBER; ne = info[0].pnum; end
        end else if (info[0].pnum == m_exp || info[1].pnum == m_exp) begin
          logic v;
          v = (info[1].pnum == m_exp);
          if (later(info[!v].pnum, m_exp)) begin d = D_ACCEPT_KEEP; p[v] = 1; acc = 1; al = v; end
          else begin d = D_DISCARD_LAG; p[!v] = 1; s[!v] = 1; end
        end else begin
          d = D_RENUMBER;
          ne = later(info[0].pnum, info[1].pnum) ? info[1].pnum : info[0].pnum;
        end
      end
      check(decision == d, $sformatf("decision %s expected %s", decision.name(), d.name()));
      check(pop == p && ((skip & pop) == s), $sformatf("pop %b skip %b expected %b %b", pop, skip, p, s));
      check(rd_en == 0, "no read while deciding");
      check(expected == m_exp, "expected number");
      seen[int'(d)]++;
      if (acc) begin
        m_left = int'(info[al].len);
        m_lane = al;
        seen[15] = 1;          // next read is the first word
        ne = m_exp + 1;
      end
      m_exp = ne;
      for (int l = 0; l < 2; l++) if (p[l]) void'(q[l].pop_front());
    end
  end

  function automatic pkt_info_t rnd(input pnum_t base);
    pkt_info_t r;
    r.pnum = base + pnum_t'($urandom % 4) - pnum_t'(1);
    r.len  = len_t'(1 + $urandom % 6);
    r.err  = ($urandom % 5 == 0);
    return r;
  endfunction

  initial begin
    chan_up = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ($urandom % 50 == 0) chan_up = 2'($urandom);
      if ($urandom % 20 == 0) chan_up = 2'b11;
      for (int l = 0; l < 2; l++)
        if (q[l].size() < 3 && $urandom % 4 == 0) begin
          pkt_info_t r;
          r = rnd(m_exp + pnum_t'(q[l].size()));
          // twin packets most of the time
          if (l == 1 && q[0].size() > q[1].size() && $urandom % 3 != 0) begin
            r = q[0][q[1].size()];
            if ($urandom % 6 == 0) r.err = 1'b1;
          end
          q[l].push_back(r);
        end
    end
    for (int k = 1; k < 8; k++)
      check(seen[k] > 0, $sformatf("decision %0d never taken", k));
    $display("decisions: both=%0d one=%0d keep=%0d lag=%0d lost=%0d renum=%0d solo=%0d",
             seen[1], seen[2], seen[3], seen[4], seen[5], seen[6], seen[7]);
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

// align_vote: the receive controller that aligns the packets of the two lanes
// by packet number and votes between them.
//
// Each decision looks at the head packet record of each lane (number, length,
// error flag) and at which channels are up, and walks this tree:
//   no channel up                      -> wait
//   one channel up, its packet present:
//       errored                        -> data lost, discard it, go on
//       number expected                -> accept it
//       otherwise                      -> update the expected number
//   both channels up, both packets present (otherwise wait):
//       both errored                   -> data lost, discard both, go on
//       one errored: valid one expected-> accept valid, discard the other
//                    otherwise         -> update the expected number
//       none errored, same numbers: expected -> accept one, discard the twin
//                                   otherwise-> update the expected number
//       none errored, numbers differ:
//           one expected, other higher -> accept expected, retain the other
//           one expected, other lower  -> discard the lagging one, retain
//           neither expected           -> expected := lower of the two
// "Update the expected number" changes only the counter; the packets stay and
// are decided again on the next cycle. The expected number advances by one on
// every accept and on every loss. Numbers are compared modulo 2^PNUM_W:
// "higher" means ahead by less than half the number space.
//
// Accepting a packet pops its record and reads its words out of the lane's
// data FIFO, one per cycle; sel, out_valid, out_sof and out_eof are registered
// so that they line up with the lane buffer's registered read data. A packet of
// L words thus takes one decision cycle plus L transfer cycles, less than the
// L+2 cycles it occupies on the link, so the controller keeps up with a fully
// loaded link.
//
// From the source design: the decision tree, waiting for both packets or a
// loss of link, the expected-number update, the data-lost acknowledgement.
// Own choices: one decision per cycle, lane 0 preferred when both are good,
// the expected number advancing on loss, serial-number comparison, start at 0.
module align_vote
  import raps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] chan_up,
  // lane buffers
  input  logic [1:0] info_valid,
  input  pkt_info_t  info [2],
  output logic [1:0] pop,
  output logic [1:0] skip,
  output logic [1:0] rd_en,
  // output multiplexer control, aligned with the lane read data
  output logic       sel,
  output logic       out_valid,
  output logic       out_sof,
  output logic       out_eof,
  // status
  output decision_e  decision,
  output pnum_t      expected,
  output logic [1:0] ev_discard,
  output logic [1:0] ev_retain,
  output logic       ev_accept,
  output logic       ev_single,
  output logic       ev_lost,
  output logic       ev_renumber
);

  typedef enum logic {S_DECIDE, S_STREAM} state_e;
  state_e state;
  logic   lane;       // lane being read out
  len_t   left;       // words still to read
  logic   first;

  // signed distance a - b in packet-number space
  function automatic logic ahead(input pnum_t a, input pnum_t b);
    pnum_t d;
    d = a - b;
    return (d != '0) && !d[PNUM_W-1];
  endfunction

  // decision of this cycle and what it does
  logic  acc, acc_lane;
  pnum_t new_exp;
  logic  set_exp;
  logic  u;        // the lane that is up, when only one is
  logic  v_err;    // lane without error, when exactly one has an error
  logic  v_exp;    // lane holding the expected number, when only one does

  assign u     = chan_up[1];
  assign v_err = info[0].err;
  assign v_exp = (info[1].pnum == expected);

  always_comb begin
    decision   = D_WAIT;
    pop        = '0;
    skip       = '0;
    ev_discard = '0;
    ev_retain  = '0;
    acc        = 1'b0;
    acc_lane   = 1'b0;
    set_exp    = 1'b0;
    new_exp    = expected;
    if (state == S_DECIDE) begin
      unique case (chan_up)
        2'b00: decision = D_WAIT;
        2'b01, 2'b10: begin
          if (info_valid[u]) begin
            if (info[u].err) begin
              decision       = D_LOST;
              pop[u]         = 1'b1;
              skip[u]        = 1'b1;
              ev_discard[u]  = 1'b1;
              set_exp        = 1'b1;
              new_exp        = expected + 1'b1;
            end else if (info[u].pnum == expected) begin
              decision = D_ACCEPT_SOLO;
              pop[u]   = 1'b1;
              acc      = 1'b1;
              acc_lane = u;
            end else begin
              decision = D_RENUMBER;
              set_exp  = 1'b1;
              new_exp  = info[u].pnum;
            end
          end
        end
        default: if (&info_valid) begin
          if (info[0].err && info[1].err) begin
            decision   = D_LOST;
            pop        = 2'b11;
            skip       = 2'b11;
            ev_discard = 2'b11;
            set_exp    = 1'b1;
            new_exp    = expected + 1'b1;
          end else if (info[0].err || info[1].err) begin
            if (info[v_err].pnum == expected) begin
              decision           = D_ACCEPT_ONE;
              pop                = 2'b11;
              skip[!v_err]       = 1'b1;
              ev_discard[!v_err] = 1'b1;
              acc                = 1'b1;
              acc_lane           = v_err;
            end else begin
              decision = D_RENUMBER;
              set_exp  = 1'b1;
              new_exp  = info[v_err].pnum;
            end
          end else if (info[0].pnum == info[1].pnum) begin
            if (info[0].pnum == expected) begin
              decision      = D_ACCEPT_BOTH;
              pop           = 2'b11;
              skip[1]       = 1'b1;
              ev_discard[1] = 1'b1;
              acc           = 1'b1;
              acc_lane      = 1'b0;
            end else begin
              decision = D_RENUMBER;
              set_exp  = 1'b1;
              new_exp  = info[0].pnum;
            end
          end else if (info[0].pnum == expected || info[1].pnum == expected) begin
            if (ahead(info[!v_exp].pnum, info[v_exp].pnum)) begin
              decision           = D_ACCEPT_KEEP;
              pop[v_exp]         = 1'b1;
              ev_retain[!v_exp]  = 1'b1;
              acc                = 1'b1;
              acc_lane           = v_exp;
            end else begin
              decision           = D_DISCARD_LAG;
              pop[!v_exp]        = 1'b1;
              skip[!v_exp]       = 1'b1;
              ev_discard[!v_exp] = 1'b1;
              ev_retain[v_exp]   = 1'b1;
            end
          end else begin
            decision = D_RENUMBER;
            set_exp  = 1'b1;
            new_exp  = ahead(info[0].pnum, info[1].pnum) ? info[1].pnum : info[0].pnum;
          end
        end
      endcase
    end
  end

  assign ev_accept   = acc;
  assign ev_single   = (decision == D_ACCEPT_SOLO);
  assign ev_lost     = (decision == D_LOST);
  assign ev_renumber = (decision == D_RENUMBER);

  always_comb begin
    rd_en = '0;
    if (state == S_STREAM) rd_en[lane] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_DECIDE;
      lane      <= 1'b0;
      left      <= '0;
      first     <= 1'b0;
      expected  <= '0;
      sel       <= 1'b0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      if (set_exp) expected <= new_exp;
      if (state == S_DECIDE) begin
        if (acc) begin
          state    <= S_STREAM;
          lane     <= acc_lane;
          left     <= info[acc_lane].len;
          first    <= 1'b1;
          expected <= expected + 1'b1;
        end
      end else begin
        sel       <= lane;
        out_valid <= 1'b1;
        out_sof   <= first;
        out_eof   <= (left == len_t'(1));
        first     <= 1'b0;
        left      <= left - 1'b1;
        if (left == len_t'(1)) state <= S_DECIDE;
      end
    end
  end

  a_accept_not_empty: assert property (@(posedge clk) disable iff (!rst_n)
                        acc |-> info[acc_lane].len != '0);
  a_pop_valid:        assert property (@(posedge clk) disable iff (!rst_n)
                        (pop & ~info_valid) == '0);

endmodule

// data_corrupt: fault injector placed between the frame generator and the two
// Aurora transmitters (point "A" of the block diagram).
//
// It copies one framed stream onto two channel streams. On request it damages
// the copy of one channel only:
//   * data error  - flips a pseudo-random bit, or a pseudo-random set of bits,
//                   in the next payload word (a word with neither sof nor eof,
//                   so never the packet number or the CRC word);
//   * frame error - inverts the end-of-frame flag of the next word, which
//                   removes the end of a packet when that word is the last one
//                   and inserts a false end otherwise.
// A request stays pending until a suitable word passes; inj_done pulses then.
//
// Interface: valid/ready in; out_valid is shared by both channel copies and
// the input is taken only when both channels are ready. Purely combinational
// on the data path, so it adds no latency.
//
// From the source design: the two fault kinds and their effect, one channel at
// a time. Own choices: the pending-request handshake, the 32-bit LFSR
// (polynomial x^32+x^22+x^2+x+1) that picks the bits, the single-bit/burst mix.
module data_corrupt
  import raps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // fault requests
  input  logic       inj_data,     // pulse: corrupt the next payload word
  input  logic       inj_frame,    // pulse: invert eof of the next word
  input  logic       inj_chan,     // channel to damage (0 or 1)
  output logic [1:0] inj_done,     // [0] data error applied, [1] frame error applied
  // from the frame generator
  input  logic       in_valid,
  output logic       in_ready,
  input  beat_t      in_beat,
  // to the two transmitters
  output logic       out_valid,
  input  logic [1:0] out_ready,
  output beat_t      out_beat [2]
);

  logic  pend_data, pend_frame, chan;
  word_t lfsr, flip;
  logic  xfer, payload, do_data, do_frame;

  assign in_ready  = &out_ready;
  assign out_valid = in_valid;
  assign xfer      = in_valid && in_ready;
  assign payload   = !in_beat.sof && !in_beat.eof;
  assign do_data   = xfer && pend_data && payload;
  assign do_frame  = xfer && pend_frame;

  // a single bit when lfsr[5] is clear, otherwise the set of bits in the LFSR
  assign flip = lfsr[5] ? lfsr : (word_t'(1) << lfsr[4:0]);

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      out_beat[c] = in_beat;
      if (chan == 1'(c)) begin
        if (do_data)  out_beat[c].data = in_beat.data ^ flip;
        if (do_frame) out_beat[c].eof  = !in_beat.eof;
      end
    end
  end

  assign inj_done = {do_frame, do_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_data  <= 1'b0;
      pend_frame <= 1'b0;
      chan       <= 1'b0;
      lfsr       <= 32'h1D87_2B41;
    end else begin
      lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      if (do_data)  pend_data  <= 1'b0;
      if (do_frame) pend_frame <= 1'b0;
      if (inj_data || inj_frame) chan <= inj_chan;
      if (inj_data)  pend_data  <= 1'b1;
      if (inj_frame) pend_frame <= 1'b1;
    end
  end

endmodule

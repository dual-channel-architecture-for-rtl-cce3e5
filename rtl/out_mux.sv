// out_mux: the output multiplexer of the receive side.
//
// Passes the word read from the lane chosen by the align & vote controller to
// the user, together with the controller's frame flags, through one register
// stage. The user side is a framed stream without back-pressure, like the
// receive port of the underlying link core, so the receiver can replace that
// core's port without changes to the user logic.
//
// Timing: the user sees a word one cycle after the controller's sel and
// out_valid. The block itself and its place after the controller follow the
// source design's block diagram; the register stage is a choice of this
// implementation.
module out_mux
  import raps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sel,
  input  logic  in_valid,
  input  logic  in_sof,
  input  logic  in_eof,
  input  word_t lane_data [2],
  output logic  out_valid,
  output beat_t out_beat
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_beat  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_beat.sof  <= in_sof;
        out_beat.eof  <= in_eof;
        out_beat.data <= lane_data[sel];
      end
    end
  end

endmodule

// aurora_link_model: behavioural model of one link channel (transmitter core,
// serial cable and receiver core) for simulation only. It is not
// synthesizable logic and stands in for the vendor link core.
//
// Words accepted on the transmit port appear on the receive port LATENCY
// cycles later, framing flags included. The channel comes up INIT cycles after
// reset. A pulse on break_link models a catastrophic failure (transceiver
// reset or pulled cable): the channel goes down at once, words in flight and
// words sent while down are lost, and it comes back up RECOVER cycles later.
// A pulse on soft_err makes the receiver report an error in that cycle, as the
// core does for a disparity or framing fault. The transmit port is always
// ready.
module aurora_link_model
  import raps_pkg::*;
#(
  parameter int unsigned LATENCY = 8,
  parameter int unsigned INIT    = 20,
  parameter int unsigned RECOVER = 400
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  break_link,
  input  logic  soft_err,
  input  logic  tx_valid,
  output logic  tx_ready,
  input  beat_t tx_beat,
  output logic  chan_up,
  output logic  rx_valid,
  output beat_t rx_beat,
  output logic  rx_err
);

  logic  pipe_v [LATENCY];
  beat_t pipe_b [LATENCY];
  int unsigned down_cnt;

  assign tx_ready = 1'b1;
  assign rx_valid = chan_up && pipe_v[LATENCY-1];
  assign rx_beat  = pipe_b[LATENCY-1];
  assign rx_err   = chan_up && soft_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chan_up  <= 1'b0;
      down_cnt <= INIT;
      for (int i = 0; i < LATENCY; i++) begin
        pipe_v[i] <= 1'b0;
        pipe_b[i] <= '0;
      end
    end else begin
      if (break_link) begin
        chan_up  <= 1'b0;
        down_cnt <= RECOVER;
      end else if (down_cnt != 0) begin
        down_cnt <= down_cnt - 1;
        if (down_cnt == 1) chan_up <= 1'b1;
      end
      pipe_v[0] <= tx_valid && chan_up && !break_link;
      pipe_b[0] <= tx_beat;
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1] && chan_up && !break_link;
        pipe_b[i] <= pipe_b[i-1];
      end
    end
  end

endmodule

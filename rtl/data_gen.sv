// data_gen: test traffic source that feeds the transmit side.
//
// Emits packets of pseudo-random length (1..MAX_LEN user words) separated by
// pseudo-random idle gaps (0..MAX_GAP cycles) while enable is high. The words
// of all packets form one running count, so a receiver can check that no word
// was lost, duplicated or reordered: the k-th word ever sent is k.
//
// Interface: framed valid/ready stream (sof on the first word, eof on the
// last); the source holds a word until it is taken. A packet in progress is
// finished even if enable falls.
//
// Timing: with no back-pressure a packet of L words takes L cycles, then the
// gap is drawn. From the source design: random sizes and random waits. Own
// choices: the LFSR (x^32+x^22+x^2+x+1), the counting payload, the limits.
module data_gen
  import raps_pkg::*;
#(
  parameter int unsigned MAX_LEN = MAX_PAYLOAD,  // power of two
  parameter int unsigned MAX_GAP = 15,           // power of two minus one
  parameter logic [31:0] SEED    = 32'hACE1_2345
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat,
  output logic [31:0] pkts_sent
);

  localparam int unsigned LW = (MAX_LEN > 1) ? $clog2(MAX_LEN) : 1;
  localparam int unsigned GW = (MAX_GAP > 0) ? $clog2(MAX_GAP + 1) : 1;

  logic [31:0] lfsr, count;
  logic [LW:0] left;        // words still to send in this packet
  logic [GW:0] gap;         // idle cycles still to wait
  logic        first;

  assign out_valid     = (left != 0);
  assign out_beat.data = count;
  assign out_beat.sof  = first;
  assign out_beat.eof  = (left == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      count     <= '0;
      left      <= '0;
      gap       <= '0;
      first     <= 1'b0;
      pkts_sent <= '0;
    end else begin
      lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      if (left != 0) begin
        if (out_ready) begin
          count <= count + 1;
          first <= 1'b0;
          left  <= left - 1'b1;
          if (left == 1) begin
            pkts_sent <= pkts_sent + 1;
            gap       <= (MAX_GAP > 0) ? (GW+1)'(lfsr[GW+7:8] & (GW+1)'(MAX_GAP)) : '0;
          end
        end
      end else if (gap != 0) begin
        gap <= gap - 1'b1;
      end else if (enable) begin
        left  <= (LW+1)'(lfsr[LW-1:0]) + 1'b1;
        first <= 1'b1;
      end
    end
  end

  initial assert (MAX_LEN >= 1 && (MAX_LEN & (MAX_LEN - 1)) == 0)
    else $error("MAX_LEN must be a power of two");

endmodule

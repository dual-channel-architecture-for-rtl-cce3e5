// raps_pkg: types, constants and the CRC function shared by the dual-channel
// reliable serial link (RAPS) modules.
//
// The link moves 32-bit words framed like a LocalLink stream: every beat carries
// a start-of-frame and an end-of-frame flag. A RAPS packet on the wire is
//   word 0      : packet number (low PNUM_W bits, upper bits zero)
//   words 1..N  : user data
//   word N+1    : Ethernet CRC-32 of words 0..N
// The packet layout (number, data, CRC) and the Ethernet CRC-32 follow the
// source design; the 32-bit word width, the width of the packet number and the
// CRC also covering the packet number word are choices of this implementation.
package raps_pkg;

  localparam int unsigned DATA_W = 32;         // word width of every stream
  localparam int unsigned PNUM_W = 16;         // packet number width
  localparam int unsigned MAX_PAYLOAD = 64;    // user words per packet (256 bytes)
  localparam int unsigned LEN_W = 16;          // width of a stored packet length

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [PNUM_W-1:0] pnum_t;
  typedef logic [LEN_W-1:0]  len_t;

  // One beat of a framed stream (valid and ready travel separately).
  typedef struct packed {
    logic  sof;
    logic  eof;
    word_t data;
  } beat_t;

  // What the lane buffer records for every packet it has received.
  typedef struct packed {
    pnum_t pnum;   // packet number from the header word
    len_t  len;    // user words stored in the data FIFO
    logic  err;    // CRC failure, link error or malformed frame
  } pkt_info_t;

  // Decisions of the align & vote controller (leaves of its decision tree).
  typedef enum logic [3:0] {
    D_WAIT        = 4'd0,  // wait for packets, a loss of link or a channel up
    D_ACCEPT_BOTH = 4'd1,  // same, expected number on both lanes: pass one
    D_ACCEPT_ONE  = 4'd2,  // pass the valid lane, discard the other lane's head
    D_ACCEPT_KEEP = 4'd3,  // pass the valid lane, retain the other (it is ahead)
    D_DISCARD_LAG = 4'd4,  // discard the lagging lane's head, retain the other
    D_LOST        = 4'd5,  // data lost: discard the heads, go on
    D_RENUMBER    = 4'd6,  // update the expected packet number
    D_ACCEPT_SOLO = 4'd7   // single-channel operation: pass the packet
  } decision_e;

  // Event pulses and status brought out for an external repair mechanism.
  typedef struct packed {
    logic [1:0] chan_up;       // channel up, per lane
    logic [1:0] crc_err;       // packet failed its CRC, per lane
    logic [1:0] frame_err;     // malformed frame (missing SOF/EOF, too long), per lane
    logic [1:0] link_err;      // packet hit a link error report, per lane
    logic [1:0] overflow;      // packet dropped, buffer full, per lane
    logic [1:0] aborted;       // partial packet dropped at loss of link, per lane
    logic [1:0] discard;       // packet of this lane discarded by the voter
    logic [1:0] retain;        // packet of this lane kept back for alignment
    logic       accept;        // a packet was passed to the user
    logic       single;        // ... while only one channel was up
    logic       data_lost;     // a packet could not be recovered
    logic       renumber;      // expected packet number was updated
  } status_t;

  // Ethernet CRC-32 (polynomial 0x04C11DB7, reflected form 0xEDB88320),
  // advanced over one 32-bit word. Bytes are taken least significant first and
  // bits of each byte least significant first, as on an Ethernet wire. The
  // register starts at all ones; the transmitted CRC is its complement.
  function automatic word_t crc32_word(input word_t crc, input word_t d);
    word_t c;
    c = crc;
    for (int i = 0; i < 32; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  localparam word_t CRC_INIT = 32'hFFFF_FFFF;

endpackage

# RAPS: a dual-channel reliable serial link

A multi-gigabit serial transceiver hit by a single-event upset can lose its
link for microseconds before a reset brings it back. At a few gigabits per
second that is kilobytes of data. This design keeps the data flowing anyway.
Every packet is sent twice, over two independent transceiver channels placed
in different transceiver tiles. The receiver checks both copies, lines them up
by a packet number, and passes one good copy to the user. While one channel is
broken and being reset, the other carries the full rate alone.

The architecture is RAPS (Reliable Architecture for Point-to-Point Serial
I/O), published by Ellsworth, Haroldsen, Nelson and Wirthlin in "Dual Channel
Architecture for Reliable FPGA High Speed Serial Links". Their version sits on
top of the Xilinx Aurora link core. The RTL here is an independent
implementation of that architecture. The link cores are not included: the
top module brings out a transmit port and a receive port for each of the two
channels, and any framing core with start/end-of-frame signalling can sit
there.

```
                 transmit side                                 receive side
 user / test  +-----------+   +-------------+  ch0  +-----------+  +-------------+
 source ----->| frame_gen |-->| data_corrupt|------>| crc_check |->| rx_lane_buf |--+
              | +number   |   |   (point A) |  ch1  +-----------+  +-------------+  |  +------------+   +---------+
              | +CRC-32   |   |             |------>| crc_check |->| rx_lane_buf |--+->| align_vote |-->| out_mux |--> user
              +-----------+   +-------------+       +-----------+  +-------------+     +------------+   +---------+
                                                                                            |
                                                                                            +--> status (to a repair mechanism)
```

## Packet format

All streams carry 32-bit words. Each word has a `sof` (first word) and an
`eof` (last word) flag. The type is `beat_t` in `raps_pkg`. A RAPS packet is:

| word | contents |
|---|---|
| 0 | packet number (bits 15:0; bits 31:16 are zero) |
| 1 .. N | user data, N = 1 .. 64 (up to 256 bytes) |
| N+1 | Ethernet CRC-32 of words 0 .. N |

The CRC is the standard Ethernet one: reflected polynomial `0xEDB88320`,
start value all ones, result complemented. Bytes of a word go least
significant first. `raps_pkg::crc32_word` advances it by one word per cycle.

The source paper computes its CRC over the user data only. Here it also covers
the packet-number word. Without that, a bit flip in the number would go
unnoticed and send the receiver's alignment the wrong way.

Each packet carries 8 bytes of overhead. With 256-byte packets the user
therefore gets 64/66 = 97.0 % of the link's word rate. The paper quotes 98 %
from a 4-byte overhead. Its overhead count does not include both the number
and the CRC.

## Transmit side

* **`frame_gen`** inserts the header word, passes the user words, and appends
  the CRC word. A packet of N words leaves in N+2 cycles; `in_ready` is low
  during the header and CRC cycles. The packet number starts at 0 after reset,
  goes up by one per packet and wraps at 2^16.
* **`data_corrupt`** is the fault injector at point "A" of the architecture.
  It copies the stream onto both channels. On request it damages only one
  channel's copy:
  * `inj_data` flips one pseudo-random bit or a pseudo-random set of bits in
    the next payload word;
  * `inj_frame` inverts the `eof` flag of the next word. That removes a
    packet end or inserts a false one.

  The data path is combinational. The input moves only when both channels are
  ready. In `raps_top` a channel that is down counts as ready, so a dead
  channel never stalls the live one.
* **`data_gen`** is the test source. It sends packets of random length with
  random gaps between them. Its words are a running count, so a receiver can
  spot any lost, repeated or reordered word. `use_gen` selects it in place of
  the user port.

## Receive side

### CRC check (`crc_check`, one per channel)

The checker keeps one word back. A word is released only when the next word of
the same frame arrives. So when a word with `eof` comes in, the checker knows
it is the CRC: it compares it, drops it, and releases the held word as the
packet's last word, together with the verdict (`out_crc_err`).

The checker also cleans up broken framing, so the lane buffer always sees
whole, closed packets:

| what arrives | what the checker does |
|---|---|
| `sof` while a frame is open (its end was lost) | closes the open frame at its held word with `out_frame_err` |
| words outside any frame (after a false end) | drops them and pulses `stray` |
| a one-word frame | drops it and pulses `stray` |
| the channel goes down | forgets the open frame |

Error reports from the link core (`in_link_err`) are delayed one cycle so they
stay in step with the data.

### Lane buffer (`rx_lane_buf`, one per channel)

The lane buffer has two queues:

* The **data FIFO** holds user words. It is 256 words deep: four packets of
  the maximum size. Two packets cover the skew between the channels. The
  rest covers a channel that comes back up in the middle of a long packet.
  The controller then waits, with both channels up, until the returning lane
  has a whole packet. That can take the rest of the current packet plus the
  next one, and meanwhile the other lane keeps filling. With 128 words the
  other lane overflowed about once in 270 recoveries and a packet was lost.
* The **record FIFO** holds one record per packet (`pkt_info_t`):
  * the packet number;
  * the number of user words stored;
  * one error flag. The flag collects CRC failure, link errors seen during the
    packet, a lost end, no user words, more than 64 user words, and data-FIFO
    overflow.

A record is written when the packet's last word arrives. So the controller
only ever sees complete packets. Words are written at a working pointer and
committed at the end of the packet. If the channel drops in mid-packet, the
partial packet is rolled back and leaves no record (`ev_abort`).

The controller drives the read side:

* `pop` removes the head record;
* `pop` together with `skip` also drops that packet's words, in one cycle;
* `rd_en` reads one word, which appears on `rd_data` in the next cycle.

### Align & vote (`align_vote`)

This is the core of the design. Each cycle in which no packet is being read
out, the controller looks at three things: which channels are up, whether each
lane has a complete packet, and the head records (number, error flag). It
takes exactly one of these decisions (`decision_e`):

```
channels up?
 none ............................................ WAIT (for a channel to come up)
 one:  packet present?  no ....................... WAIT
       errored ................................... LOST        drop it, expected+1
       number == expected ........................ ACCEPT_SOLO pass it
       otherwise ................................. RENUMBER    expected := its number
 both: both packets present? no .................. WAIT (until both, or a channel drops)
       both errored .............................. LOST        drop both, expected+1
       one errored:  good one == expected ........ ACCEPT_ONE  pass good, drop bad
                     otherwise ................... RENUMBER    expected := good one's number
       none errored, numbers equal:
                     == expected ................. ACCEPT_BOTH pass lane 0, drop lane 1
                     otherwise ................... RENUMBER    expected := that number
       none errored, numbers differ:
          one == expected, other ahead ........... ACCEPT_KEEP pass expected, keep the other
          one == expected, other behind .......... DISCARD_LAG drop the lagging one, keep the other
          neither expected ....................... RENUMBER    expected := the lower number
```

How the tree handles each kind of fault:

* **Bit errors.** A bit error on one lane makes that copy fail its CRC.
  `ACCEPT_ONE` then takes the other lane's copy.
* **Lost packet end.** When a packet's end is lost on one lane, that lane's
  copy is errored and the next packet still arrives normally.
* **False packet end.** A false end cuts a packet in two. The first half fails
  its CRC. The rest is dropped as stray words.
* **Whole packet missing on one lane.** Both lanes then show good packets
  with different numbers. The lane that is ahead is kept (`ACCEPT_KEEP`)
  until the other lane catches up.
* **Loss of link.** The controller switches to single-channel operation
  (`ACCEPT_SOLO`) at once. The other lane is ignored until it is up again.
* **Stale packets after recovery.** A lane that comes back may still hold
  packets from before the outage. They are behind the expected number and are
  dropped (`DISCARD_LAG`).
* **Transmitter reset.** This breaks the numbering. `RENUMBER` updates only
  the expected number. The same packets are decided again in the next cycle.

"Ahead" and "behind" are compared modulo 2^16: ahead means ahead by less than
half the number space. `LOST` tells the user that data was lost, and the
receiver goes on.

If both channels are up, the controller waits until both lanes hold a
packet. A lost packet is therefore noticed only when the next packet arrives,
so the link needs steady traffic. If one channel stays up but goes silent, the
receiver waits. The test source keeps traffic flowing.

**Timing.** Accepting a packet of L words takes one decision cycle, then
L read cycles, one word per cycle. On the link that packet took L+2 cycles
(header and CRC), so the receiver keeps up with a fully loaded link. The user
sees the first word three cycles after the decision:

1. the lane buffer's read register;
2. the controller's registered `sel`, `out_valid`, `out_sof` and `out_eof`;
3. the `out_mux` register.

### Output multiplexer (`out_mux`)

Picks the word of the lane being read and registers it with the frame flags.
The user port has no back-pressure, like the receive port of the link core it
replaces.

## Status for a repair mechanism

`raps_top.status` (`status_t`) brings out the following signals. All except
`chan_up` are one-cycle pulses.

| signal | meaning |
|---|---|
| `chan_up[1:0]` | channel up (a copy of the link inputs) |
| `crc_err[1:0]` | CRC failure, per lane |
| `frame_err[1:0]` | malformed frame, per lane. Also pulses once per stray word dropped, so after a false packet end it pulses many times |
| `link_err[1:0]` | link error report during a packet, per lane |
| `overflow[1:0]` | buffer overflow, per lane |
| `aborted[1:0]` | partial packet dropped at loss of link, per lane |
| `discard[1:0]`, `retain[1:0]` | voter discarded or kept back a packet of this lane |
| `accept`, `single` | packet passed to the user; `single` when only one channel was up |
| `data_lost`, `renumber` | unrecoverable packet; expected number updated |

`rx_decision` and `rx_expected` show the controller's state. The repair
mechanism itself (which channel to reset, and how) is not part of the design.

## Parameters

| where | name | default | meaning |
|---|---|---|---|
| `raps_pkg` | `DATA_W` | 32 | word width (fixed: the CRC works one 32-bit word per cycle) |
| `raps_pkg` | `PNUM_W` | 16 | packet number width |
| `raps_pkg` | `MAX_PAYLOAD` | 64 | user words per packet (256 bytes) |
| `raps_top` | `BUF_DEPTH` | 256 | data FIFO words per lane (power of two; 4 x `MAX_PAYLOAD` covers a recovery in mid-packet) |
| `raps_top` | `INFO_DEPTH` | 8 | packet records per lane (power of two) |
| `raps_top` | `GEN_MAX_GAP` | 15 | longest idle gap of the test source (power of two minus one) |

At the defaults, synthesis gives about 1,240 word-level cells, 660 flip-flop
bits and 16.9 kbit of memory, most of it the two 256 x 32 data FIFOs.

## Choices this implementation makes

These follow the architecture in structure but are decided here:

* **Clocking.** One clock domain. On real hardware each channel's receiver
  has its own recovered user clock. Those clocks must be brought into one
  domain in front of `raps_top`. The original system shared one reference
  frequency between the channels.
* **Reset.** Asynchronous, active low.
* **Voting.** Lane 0 is preferred when both copies are good. The expected
  number advances on `LOST`, so the next packet is accepted without a renumber.
* **Lane buffer.** Its overflow behaviour, the one-cycle discard, and the
  record FIFO depth.
* **Fault injector.** The bit-selection LFSR and the pending-request
  handshake.
* **Frame generator.** The original design used block RAM in its frame
  generator for reasons it does not describe; this one has no buffer.
* **CRC check.** The original used an FPGA CRC hard block for checking; this
  one uses plain logic.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_frame_gen` | packets against a byte-wise reference CRC (checked against the standard value `CBF43926` for "123456789"), numbering, stall handling, rate of N+2 cycles per packet |
| `tb_data_corrupt` | copies equal the input except exactly the requested word on the requested channel |
| `tb_data_gen` | running count, framing, length and gap limits, hold under back-pressure, clean stop |
| `tb_crc_check` | good and bad CRCs, lost ends, stray and one-word frames, channel loss, one-cycle latency after the CRC word |
| `tb_rx_lane_buf` | records and data against a queue model, skip, roll-back, both kinds of overflow |
| `tb_align_vote` | every decision, pop, skip and expected-number update, cycle by cycle, against an independent model of the decision tree; read-out timing |
| `tb_out_mux` | selection and one-cycle delay |
| `tb_raps_top` | the whole node at default sizes (see below) |
| `tb_raps_campaign` | a long random fault campaign between two nodes (see below) |

`tb_raps_top` loops the node's two transmit ports back to its own receive
ports through `tb/aurora_link_model.sv`. That is a behavioural channel with 8
and 11 cycles of latency, loss of link with a 400-cycle recovery, and
injectable receive errors. The test runs six phases:

1. clean traffic;
2. 46 data errors, one channel at a time;
3. 66 framing errors, one channel at a time;
4. six losses of link on alternate channels, each followed by errors on the
   recovering channel;
5. errors and loss of link on both channels at once;
6. 30 back-to-back 256-byte packets.

In every phase except the fifth, every word must arrive exactly once and in
order. Phase 6 must run at one packet per 66 cycles. The test also requires
that every decision of the tree was taken at least once.

`tb_raps_campaign` connects two nodes at default sizes through four link
models, one per channel and direction. A break takes down both directions of
a channel, like a pulled cable. Node A's test source sends at random lengths
and gaps. A random sequence of 20,000 faults is applied on random channels,
one channel at a time:

* 45% corrupted payload words;
* 45% inverted end-of-frame flags;
* 10% losses of link, each waited out before the next fault.

Node B must deliver every word exactly once and in order. It must never
report data lost and never overflow a lane buffer. Node A must receive
nothing. The run moves about 4.5 million words and takes about ten seconds.
The channel latencies are 6 and 11 cycles. Swapped so that lane 1 leads, the
run also passes. With 64 cycles of skew (about one packet) no word was lost
either, but a lane buffer overflowed 4 times. Each time the other lane's copy
covered the packet. So the default buffer leaves little margin beyond a
packet of skew.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/raps_pkg.sv rtl/*.sv tb/crc_ref_pkg.sv tb/aurora_link_model.sv \
  tb/tb_raps_top.sv --top-module tb_raps_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

Change `tb_raps_top` to any other testbench name. The two extra `tb/` files
are needed only by the testbenches that use them. The end-to-end run takes
well under a second.

## Limits

* The link cores, transceivers, the logging processor of the original test
  system and the repair mechanism are not included.
* The fault campaigns of the original hardware test ran hundreds of millions
  of injections. The longest testbench runs 20,000.
* Timing on a real FPGA has not been checked. The 3.125 Gb/s line rate with
  8B/10B coding needs one 32-bit word per cycle at 78.125 MHz.
* Only the transceivers are protected. Upsets in this logic and its memories
  are not mitigated.

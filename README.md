# SDH-framed 2.488 Gbit/s optical readout link, in SystemVerilog

Detector front ends in high-energy physics produce many slow serial bit
streams that have to leave the detector over as few fibres as possible. This
link packs twelve 150.336 Mbit/s channels into one 2.488 Gbit/s serial line,
the STM-16 rate of the Synchronous Digital Hierarchy (SDH). It borrows the
SDH frame: every channel is cut into STM-1 frames with a small section
overhead (SOH) for framing and parity. Instead of the SDH scrambler it uses a
parallel **3b/4b block code**. The code turns the 12 channel bits of each
155.52 MHz clock cycle into 16 line bits. It bounds runs of equal bits to
four, keeps the line DC-balanced and lets the receiver spot corrupted symbols.
Twelve 4:1 multiplexers in front of the transmitter merge 48 front-end
modules into the twelve channels. With 640 detector channels per module,
30,720 analog channels share one fibre.

The RTL covers the digital part of both ends: the adaptation multiplexers,
frame building, coding, the serializer stages, frame synchronization,
decoding, SOH evaluation with a transmission protocol, and the output FIFO.
Lasers, photodiodes, the transmitter PLL and the receiver's clock-and-data
recovery are analog. They stay outside: their signals are ports of the top.

## Signal path

```
 48 x A/D word ─► adc_serializer ─► stm1_adapt_mux ─► sdh_tx ──────────────► ser_mux 16:4 ─► ser_mux 4:1 ─► tx_serial
 (12 bit)         (48, MSB first)   (12 x 4:1)        │ tx_controller       (155→622 MHz)  (622 MHz→2.488 GHz)
                                                      │ 12 x tx_input_fifo (SR1/SR2)
                                                      │ 12 x soh_generator_1 (SOH-R/SR3/SR4)
                                                      │ scrambler_3b4b (12 → 16)
                                                      └ soh_generator_2 (framing ROM, Sel, SR5)

 rx_serial ─► des_demux 1:4 ─► des_demux 4:16 ─► sdh_rx ─────────────────────────► rx_demux_1to4 ─► 48 streams
                                                 │ frame_sync (find A1/A2, rotate lanes)   (12 x 1:4)
                                                 │ rx_controller (frame position)
                                                 │ descrambler_4b3b (16 → 12, violations)
                                                 │ soh_evaluation (parities, status, protocol)
                                                 └ output_fifo
```

`sdh_link_top` holds both ends side by side. The fibre is whatever connects
`tx_serial` to `rx_serial`. The receive-side clocks `rx_clk_*` are those a
CDR would recover.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_core`, `clk_622`, `clk_bit` | in | 1 | transmit clocks, 155.52 / 622.08 / 2488.32 MHz |
| `rst_n` | in | 1 | transmit reset, asynchronous, active low |
| `enable` | in | 1 | front end has data; otherwise idle frames are sent |
| `slot_div` | in | 4 | write front-end data in every n-th interface slot |
| `chan_en` | in | 12 | per-channel data enable |
| `adc_data` | in | 48 × `N_AD` | A/D words, one per front-end module |
| `adc_sample` | out | 1 | the words were taken; the next conversion may start |
| `fe_ce` | out | 1 | every front-end stream moves to its next bit |
| `fill_data` | out | 1 | the frame now being filled carries data |
| `tx_serial` | out | 1 | 2.488 Gbit/s line, to the laser driver |
| `rx_clk_core`, `rx_clk_622`, `rx_clk_bit` | in | 1 | receive clocks from the CDR |
| `rx_rst_n` | in | 1 | receive reset |
| `rx_serial` | in | 1 | line from the CDR |
| `rx_slot_div` | in | 4 | same n as `slot_div` |
| `out_bits` | out | 48 | one bit of each front-end stream |
| `out_valid`, `out_sof` | out | 1 | a new set; it is the first of a frame |
| `out_ready` | in | 1 | back end accepts data |
| `protocol` | out | struct | transmission protocol (below) |
| `rx_rot` | out | 4 | lane rotation the synchronizer found |

## The channel frame

All twelve channels are framed in lock step. A channel frame lasts 125 µs: 9
rows of 2160 bits at 155.52 Mbit/s. Each row is 72 SOH bits (9 bytes)
followed by 2088 payload bits. The numbers are chosen so that

* 2088 / 2160 = 150.336 / 155.52: the payload carries exactly the interface
  rate;
* 72 / 2160 = 1/30 of the line is overhead.

SOH byte use (row and byte counted from 1):

| row | byte | content |
|-----|------|---------|
| 1   | 1–9  | replaced on the line by the framing pattern (below) |
| 2   | 1    | B1: parity of the previous frame, after coding (SR5) |
| 5   | 1    | B2: parity of this channel's previous frame, before coding (SR4) |
| 9   | 9    | status of the **next** frame: `FF` data, `00` idle cells |
| others | | zero |

The 3b/4b code runs over the SOH too, so every SOH byte outside row 1
reaches the line coded.

## Transmitter: fitting 150.336 Mbit/s into 155.52 Mbit/s

Each channel has a double-buffered input FIFO made of two 2088-bit shift
registers. SR1 takes one input bit per interface slot. At the end of every
row, SR1 is copied in parallel into SR2. At the same moment the nine SOH bytes
of that row are copied from SOH-R into the 72-bit SR3. During the next row,
SR3 and then SR2 are shifted out at the full 155.52 MHz. The row being
written is therefore always one row ahead of the row being read, so payload
spends about one row (13.9 µs) in the transmitter.

The whole transmitter core runs on the 155.52 MHz clock. The 150.336 MHz
interface clock is a clock enable, `if_ce`, that leaves out every 30th cycle:
72 cycles per row, the last of them on the SR1→SR2 copy. The front end sees this slot
strobe instead of a separate clock.

**Lower data rates.** The input `slot_div` = n makes the adaptation
multiplexers write front-end data only in every n-th interface slot. The
slots in between carry zeros and do not advance the multiplexer phase, so each
front-end stream runs n times slower. The slot count restarts at every frame,
and a new n takes effect only at a frame start. The receiver has no way to
see n in the data stream. It is told the same value through `rx_slot_div`,
and drops the unused words after the output FIFO. The FIFO still carries
them, so its depth in time does not change with n. Values 0 and 1 both mean
every slot.

**Idle cells.** `enable` is sampled once per frame, when the fill of the
next frame starts. If it is low, the payload of that frame is all zeros. The
decision goes into the status byte of the row loaded at that moment (row 9 of
the current frame). The receiver therefore knows, before a frame starts,
whether it carries data. `chan_en` zeroes single channels the same way.

## The 3b/4b code

| in  | out  | in  | out  |
|-----|------|-----|------|
| 000 | 0101 | 100 | 1001 |
| 001 | 0110 | 101 | 0010 |
| 010 | 0011 | 110 | 1101 |
| 011 | 1100 | 111 | 1010 |

Four coders work in parallel. Coder k takes channels 3k+2..3k and drives
lanes 4k+3..4k, with the left bit on the higher lane. Lane 15 goes first on
the line.

Properties of the code:

* Over all 4096 inputs, ones and zeros are equal.
* No run of equal bits is longer than 4, so the transition density is at
  least 0.25.
* About 88% of runs are one or two bits long.
* Each code word is balanced except those for 101 and 110, which carry
  two more zeros or ones. The running disparity on random data is therefore
  a random walk. Over 10,000 words of PRBS-23 it stays within ±240.
* Eight of the sixteen 4-bit words never occur. If one arrives, a line error
  happened.

## Framing pattern and frame synchronization

The first 72 words of a frame are sent uncoded, so that the receiver can
find them: 24 words `{A1,A1}`, 24 words `{A2,A2}`, 24 words `{C1,C1}`
(A1 = F6h, A2 = 28h, C1 = 01h). On the serial line this gives 48 bytes of
each, the STM-16 framing sequence. A small ROM and a selector in
`soh_generator_2` put them in place of the coded words.

The receiver's 4:16 demultiplexer cuts the serial stream into 16-bit words at
an arbitrary bit boundary. A received word is therefore the end of one sent
word plus the start of the next: the 16 lanes are rotated. `frame_sync` keeps
the last three words (48 bits). For each of the 16 possible rotations it
compares 32 bits against `{A1,A1,A2,A2}`, the point where A1 turns into A2.
The state machine works as follows:

* **HUNT**: all rotations are searched. The first hit fixes the rotation,
  emits `sof` with the first `{A2,A2}` word, and loads the frame position in
  `rx_controller` (word 24 of row 1).
* **PRESYNC**: one frame later the pattern must appear again at the same
  place, or hunting restarts.
* **SYNC**: checked once per frame. Four misses in a row are a loss of frame
  (LOF), and the state returns to HUNT.

From the first hit on, every word leaves `frame_sync` rotated by the kept
amount, so the lanes are back in the transmitter's order.

After the first hit, `rx_controller` counts word positions through the
frame. It raises `exp_a2` one cycle before the first `{A2,A2}` word of the
next frame is due. Only then does `frame_sync` look, and only at the kept
rotation. Coded data cannot produce the pattern: `{A2,A2}` contains a run of
five zeros (`…1000 0010…`), and the code never sends more than four equal
bits in a row. So a hit needs the framing section itself. PRESYNC still
insists on a second hit 19440 words later, at the same place. That guards
against a hit made up by line errors. A
bit slip on the line moves the boundary. The synchronizer then misses four
frames in a row, declares LOF, and hunts again for the new rotation.

Only frames received in SYNC are evaluated and passed on. The payload of the
frame that produced the first hit is lost. The confirming frame reaches SYNC
at its `{A2,A2}` word, before its payload, and is delivered.

## SOH evaluation and the transmission protocol

`soh_evaluation` sees the decoded channel bits, the aligned coded word and
the frame position in the same cycle. It does four things:

* **Code violations:** it counts invalid 4-bit words outside the framing
  section.
* **B1:** it recomputes B1 over the received words and compares it with the
  value carried by the next frame (the copy in channel 0).
* **B2:** it recomputes B2 per channel and compares it with that channel's
  byte.
* **Status:** it takes the status byte from a majority of the bits of
  channel 0.

Payload of data frames received in SYNC goes into the output FIFO as 13-bit
entries: 12 data bits plus a start-of-frame flag. The back end reads with
`out_valid`/`out_ready`; a write into a full FIFO is lost and counted.
`rx_demux_1to4` splits each group of `M_MUX` words back into one bit of
each of the 48 streams. It uses the start-of-frame flag to find the phase.
With `rx_slot_div` = n, it first drops all but every n-th word of the
frame.

The protocol (`rx_protocol_t` in `sdh_pkg`) holds these fields. All counters
are 16 bits and saturate.

| field | meaning |
|-------|---------|
| `state` | synchronizer state |
| `frames` | frames received in SYNC |
| `data_frames` | of these, frames that carried data |
| `code_viol` | invalid 4-bit words |
| `b1_err` | frames that failed B1 |
| `b2_err` | channels that failed B2, summed over frames |
| `lof` | losses of frame |
| `overflow` | payload words lost at a full FIFO |

## Clocks and resets

| domain | rate | modules |
|--------|------|---------|
| `clk_core` | 155.52 MHz | transmitter core, adaptation multiplexers, A/D serializers |
| `clk_622` | 622.08 MHz | 16:4 / 4:1 boundary |
| `clk_bit` | 2.488 GHz | 4:1 stage, serial output |
| `rx_clk_*` | same three rates | receiver, recovered from the line |

Clocks that come from one source are assumed edge-aligned. `ser_mux` hands a
word to the faster clock with a toggle flag; `des_demux` copies a holding
register once per slow cycle. Control registers have an asynchronous active-low
reset (`rst_n` on the transmit side, `rx_rst_n` on the receive side). The output FIFO's
storage array is not reset.

## Parameters

| where | parameter or constant | default | meaning |
|-------|-----------|---------|---------|
| `sdh_pkg` | `PAY_BITS`, `SOH_BITS`, `ROWS` | 2088, 72, 9 | frame geometry |
| `sdh_pkg` | `A1`, `A2`, `C1` | F6h, 28h, 01h | framing bytes |
| `sdh_link_top` | `M_MUX` | 4 | front-end streams per channel (8 and 1 are also simulated) |
| `sdh_link_top` | `N_AD` | 12 | A/D resolution |
| `frame_sync` | `LOF_MISSES` | 4 | misses before loss of frame |
| `sdh_rx` | `FIFO_DEPTH` | 512 | output FIFO entries |

The frame geometry is fixed by the rates. The row length, the 1-in-30 slot
gap and the 72-word framing section depend on each other, and assertions
check that they agree.

Readout time per module is 640 samples × `N_AD` bits × `M_MUX` / 150.336 MHz,
which is 204 µs at the defaults.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sdh_pkg.sv tb/tb_sdh_link_top.sv \
          --top-module tb_sdh_link_top -o sim && ./obj_dir/sim
```

Other testbenches build the same way, with their own name in both places.
`-Itb` is needed by `tb_link_configs`, whose harness module sits in `tb/`.
`--assert` turns on the design's assertions. The opening comment of each
testbench describes its scenario.

`tb_sdh_link_top` runs the complete link at its default sizes for 14 frames,
in a few seconds. The scenario is:

* data and idle frames;
* a disabled channel;
* a 21-bit line delay, which forces a lane rotation;
* 8 forced line bits, which cause a code violation and parity errors;
* a dead line for four frames: loss of frame, then resynchronization;
* a switch of both ends to every third interface slot, while the line is
  dead, after which a frame delivers a third of the sets;
* a back-end stall absorbed by the FIFO;
* a final FIFO overflow.

It compares every 48-bit output set with the bits the A/D serializers handed
over, and counts each of the mechanisms above.

Other useful ones:

* `tb_sdh_tx` decodes five transmitted frames independently and checks
  payload, SOH bytes and both parities.
* `tb_sdh_rx` runs the transmitter and receiver back to back and checks the
  exact error counts for one injected symbol error.
* `tb_frame_sync` covers hunting, confirmation, loss of frame and a bit slip.
* `tb_link_configs` runs the whole link with 8:1 multiplexers (96 streams)
  and without multiplexers at 8-bit resolution (12 streams). For each, it
  compares the data and checks the stream rate of 18792 / `M_MUX` bits per
  frame.
* `tb_coding_stats` measures the run-length statistics of the code over all
  2^12 inputs, and the running disparity over pseudo-random data.

## What is this design's own, and what is left out

The architecture follows a published concept:

* twelve channels and STM-1 framing;
* shift registers SR1–SR5 and SOH-R;
* a framing ROM with selector;
* the 3b/4b table;
* two-stage multiplexing;
* frame synchronization by rotating 16 lanes on the A1/A2 transition;
* idle cells and an output FIFO with a transmission protocol.

The concept does not fix the following; the choices here are:

* the SOH byte positions of the parities and the status, and C1's value;
* the parities as BIP-8s, and what each one covers;
* how idle frames are signalled (the status byte one frame ahead);
* the interface clock as a 1-in-30 clock enable on the core clock;
* the HUNT/PRESYNC/SYNC rules and `LOF_MISSES`;
* the lane and bit order of the coders, and MSB-first serialization;
* bit interleaving in the 4:1 multiplexers, with the phase restarting at each
  frame;
* the FIFO width, depth and handshake, and the protocol fields;
* for the every-n-th-slot rate reduction: zero filler, the slot count
  restarting at each frame, and n set at both ends rather than signalled.

Where this RTL differs from what the concept suggests:

* The concept allows some of the eight unused 4-bit words to serve as idle
  or synchronization cells. Here all eight stay reserved as error
  indicators. Idle frames carry coded zeros, and the status byte marks them.
* The concept estimates about 28 µs of run time through the system. In
  this RTL, a bit needs 14.0–14.4 µs from hand-over at the front end to the
  receiver output, measured by `tb_link_configs` with a free back end. Most
  of that is the one row (13.9 µs) it waits in the transmitter. Time in the
  output FIFO adds to it when the back end stalls. Frames that arrive before
  the synchronizer is confirmed (PRESYNC) are not delivered at all.
* The concept shows an optional second transmitter/receiver pair for full
  duplex. It would be a second instance of the same top with its direction
  reversed, and is not included.

Not built:

* The PCI adaptation behind the receiver.
* All analog and optical parts: PLL, laser driver and laser, PIN diode and
  preamplifier, CDR, A/D converters.

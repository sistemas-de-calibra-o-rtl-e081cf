# 10 Gbit/s bit-error-rate tester for NG-PON2 transceivers

This is FPGA logic that measures the bit error rate of a 10 Gbit/s optical
link. It sends a known pseudo-random pattern through a transceiver and
receives it back. It then finds where the pattern starts in the received
bits and counts every bit that differs. Totals go to a PC over a serial
line, once per measurement window. The PC divides errors by bits to get the
BER. Over the same line, the PC sets the transmitter's pre- and post-cursor
emphasis.

There are two testers, placed side by side in `ngpon2_bert_top`:

* **Continuous mode.** This is the NG-PON2 downstream case: an unbroken
  stream of frames. Each frame is a 16-bit *pilot* followed by PRBS-14 data.
  The receiver locks on the first pilot it sees and then compares every
  word.
* **Burst mode.** This is the upstream case: the transmitter is on for only
  part of each 125 µs frame. A burst holds a preamble, a 32-bit *delimiter*
  and a PRBS-14 payload; the rest of the frame is silent (zeros). The PC
  sets the burst length as a share of the frame, from 0 to 100 %. The
  receiver finds each burst's delimiter anew and compares that burst's
  payload only. Its count stands still between bursts.

The logic works on 32-bit words at 312.5 MHz: 32 × 312.5 MHz = 10 Gbit/s.
These are the transceiver's parallel data ports and user clocks
(TXUSRCLK2 / RXUSRCLK2 on a Xilinx 7-series GTX). The serializer, the clock
recovery and the optics are outside this logic.

## The test pattern

`prbs14_gen` is a 14-stage Fibonacci LFSR with polynomial
x^14 + x^5 + x^3 + x + 1. Its period is 16383 bits. It produces 32 bits per
clock, MSB first (bit 31 goes on the line first). A restart reloads the seed
`14'h3FFF`, so the same pattern follows every restart.

`pattern_gen` puts a marker in front of that pattern. On a restart, the next
word carries the marker in its top bits and the first PRBS bits below it;
after that the words are pure PRBS.

* In continuous mode the marker is the 16-bit pilot `0xF628`. The
  generator restarts itself every `FRAME_WORDS` (512) words, so a frame is
  the pilot plus 16368 PRBS bits.
* In burst mode the marker is the delimiter `0xB2C50FA1`, and the restart
  comes from the burst framing.

Both values were chosen by a search over the actual bit stream, at every
bit offset:

* the pilot appears nowhere in the continuous stream except at its own
  place;
* the delimiter appears nowhere in preamble + delimiter + payload + zero
  fill except at its own place.

That is what makes a false lock impossible on an error-free link.

Transmitter and receiver each have an identical `pattern_gen`. The one at
the receiver is the *reference*: it is restarted when the marker is found,
and from then on it runs in step with the received stream.

## Finding the bit offset

This is the hard part. The transceiver delivers 32-bit words, but the
word boundary at the receiver is arbitrary. The pilot can start at any of
32 bit positions, and can straddle two words. The receiver therefore works
with a 64-bit window made of the previous and current received words:
`{rx_q[1], rx_q[0]}`, oldest bit at the top.

**`sync_block`** compares the marker with the window at all 32 offsets
`p = 0..31` in one clock. `p` counts from the top of the window, so `p = 0`
means the marker is the first thing in the older word. On a hit it
registers `found` for one clock and

    index = PAT_W + p        (16..47 for the pilot, 32..63 for the delimiter)

If the marker matches at more than one offset, the largest `p` wins. That
is the copy that arrived first. `index` is the number of bits between the
oldest bit of the window and the first payload bit after the marker.

**`ref_buffer`** holds the last three reference words, 96 bits. It outputs
the 32-bit slice starting `index` bits below the top:
`(buf_q << index)[95:64]`. The reference generator restarts on `found`, so
its first word starts with the marker. The slice that skips `index` bits
is therefore the PRBS that follows the marker, shifted to the same bit
position as in the received words.

**Alignment in time.** Let the marker be in the window at cycle *t*:

| cycle | what happens |
|---|---|
| t | `sync_block` sees the marker; the word after it is in `rx_data` |
| t+1 | `found`, `index` registered; the reference generator restarts |
| t+2 | first reference word (marker + PRBS) leaves the generator |
| t+2..t+4 | three reference words enter the 96-bit buffer |
| t+5 | first compare: the slice against `rx_q[4]`, the received word that followed the window |

This is why the receive buffer is five words deep. The search uses
`rx_q[1:0]` and the compare uses `rx_q[4]`. From then on, one received word
and one slice are compared per clock.

In continuous mode the search runs once; `locked` then stays high until
reset. No frame after the first is searched. Every later pilot is simply
compared as data, because the reference generator wraps at the same frame
length as the transmitter. The design does not detect loss of lock.

## Counting errors

**`error_counter`** XORs the received word with the slice and counts the
ones. The count goes through a two-stage popcount, then into a 32-bit
total that saturates at 2^32−1. Beside it, a *resolution counter* counts
compared words. When it reaches `RES_WORDS` (2^26 by default), the window
closes:

* `res_valid` pulses with `res = {errors, words}`;
* both counters restart with the next word.

`res_valid` comes two clocks after the last word of the window.

A default window is 2^26 words, which is 2.15 × 10^9 bits or 0.215 s of
line time. The lowest non-zero BER one window can show is 4.7 × 10^-10. A
BER of 10^-3, the NG-PON2 sensitivity point, gives about 2.1 × 10^6 errors
per window, well inside 32 bits.

**`nburst_counter`** (*Counter Nburst*) is the burst-mode addition. On
`start` it holds `active` high for exactly `n_words` clocks, then pulses
`done`. `active` enables the error counter, so the count is frozen between
bursts. The resolution window spans as many bursts as it takes to reach
`RES_WORDS` compared words.

## Burst framing

`burst_data_gen` runs a free frame counter of `FRAME_CYCLES` words, 39062
by default. A frame is 125 µs, which is 39062.5 words at 312.5 MHz,
rounded down. The frame's burst share is latched at the start of each
frame. The burst then occupies the first `bw` words of the frame:

| words | contents |
|---|---|
| 0 .. PRE_WORDS−1 | preamble `0xAAAAAAAA` (5 words = 160 bits) |
| PRE_WORDS | delimiter in the top 32 bits of the pattern |
| PRE_WORDS+1 .. bw−1 | PRBS-14 payload |
| bw .. FRAME_CYCLES−1 | zeros, `burst_on` low |

Here `bw = burst_words(pct) = floor(FRAME_CYCLES × pct / 100)`. It is 0 for
0 % and at least `PRE_WORDS + 2` otherwise, so that the smallest burst still
has one payload word. Some defaults:

| share | burst words | words compared per burst |
|---|---|---|
| 40 % | 15624 | 15617 |
| 80 % | 31249 | 31242 |
| 95 % | 37108 | 37101 |
| 100 % | 39062 | 39055 |

The receiver compares `bw − PRE_WORDS − 2` words per burst. That is one
fewer than the payload. At a non-zero bit offset, the last received word of
the payload already carries zero-fill bits, which would count as errors.
Dropping that word keeps every compared bit inside the payload. At
100 % there are no silent words, and the next preamble follows straight
after the payload.

`burst_on` is high for the preamble, delimiter and payload. It can drive a
laser enable.

## The PC link

Each tester has its own serial line. The line is 8N1, LSB first, 19200 baud
by default. `uart_baud_gen` makes a 16× oversampling tick, with
DIV = round(CLK_FREQ / (16 × BAUD)), which is 651 at 200 MHz.

* `uart_rx` waits for a falling edge and checks the start bit at
  mid-bit. It samples each data bit at mid-bit. A frame with a bad stop bit
  is dropped.
* `uart_tx` sends one byte per `start` and pulses `tx_done` at the end of
  the stop bit.

**Commands** (PC to FPGA) are two bytes each, a code and then a value:

| code | value | effect |
|---|---|---|
| `0x01` | 0..31 | TX pre-cursor (`txprecursor[4:0]`) |
| `0x02` | 0..31 | TX post-cursor (`txpostcursor[4:0]`) |
| `0x03` | 0..100 | burst share in %; larger values count as 100. Burst tester only. |

`cmd_rx_fsm` ignores an unknown code byte and waits for the next one. After
reset the cursors are 0 and the share is 100 %.

**Reports** (FPGA to PC) are 9 bytes, sent once per window:

    0xA5, errors[31:24], errors[23:16], errors[15:8], errors[7:0],
          words[31:24],  words[23:16],  words[15:8],  words[7:0]

`report_tx_fsm` sends them. A report that arrives while the previous one
is still being sent is dropped and counted. At the default sizes that
cannot happen: 9 bytes take 4.7 ms, and a window takes 215 ms. The PC
derives both the current BER (one report) and the accumulated BER (the sum
of all reports).

## Clocks and resets

There are three clock domains:

* `clk_tx`: the transmit word clock;
* `clk_rx`: the receive word clock, recovered from the line;
* `clk_sys`: the clock for the UART and the command logic, 200 MHz by
  default.

All resets are asynchronous and active low. There is one reset per domain.

`cdc_handshake` moves a word between domains. It registers the word in the
source domain, toggles a request bit, and passes the request through two
flip-flops into the destination domain. The word is then taken as a whole.
The acknowledge comes back the same way. Two kinds of data cross:

* window results, from `clk_rx` to `clk_sys`;
* the burst share, from `clk_sys` to `clk_tx` and to `clk_rx`. It is
  re-sent until both copies agree with the latest command.

The transmitter takes a new share at its next frame. The receiver takes it
at its next delimiter. After a change, one burst can therefore be measured
with the old length. Treat the first report after a change as
transitional.

The cursor outputs leave from `clk_sys` registers without
resynchronisation. They are static settings for the transceiver.

## Top level

`ngpon2_bert_top` has one port group per tester, prefixed `c_`
(continuous) and `b_` (burst):

| port | dir | width | meaning |
|---|---|---|---|
| `clk_sys`, `rst_sys_n` | in | 1 | control clock and reset |
| `clk_tx`, `rst_tx_n` | in | 1 | transmit word clock and reset |
| `clk_rx`, `rst_rx_n` | in | 1 | receive word clock and reset |
| `c_tx_data`, `b_tx_data` | out | 32 | to the transceiver's TX data port, bit 31 first on the line |
| `c_rx_data`, `b_rx_data` | in | 32 | from the transceiver's RX data port |
| `*_txprecursor`, `*_txpostcursor` | out | 5 | transceiver emphasis settings |
| `*_uart_rxd`, `*_uart_txd` | in/out | 1 | serial lines to the PC |
| `c_locked` | out | 1 | pilot found |
| `c_comparing`, `b_comparing` | out | 1 | a word is being compared this clock |
| `b_tx_burst_on` | out | 1 | burst being sent (laser enable) |
| `b_busy` | out | 1 | delimiter found; the burst is being measured |
| `b_burst_done` | out | 1 | pulse at the end of each measured burst |

Both testers share the three clocks. In a board built around one
transceiver, keep the tester you need and tie off the other.

## Parameters

| parameter | default | origin |
|---|---|---|
| data width | 32 | 32 bits at 312.5 MHz for 10 Gbit/s, as in the source design |
| PRBS length | 2^14−1 | source design; the polynomial and seed are this design's |
| pilot / delimiter length | 16 / 32 bits | source design; the values are this design's |
| `FRAME_CYCLES` | 39062 | 125 µs frame, source design |
| `PRE_WORDS` | 5 | 160-bit preamble, source design |
| `BAUD` | 19200 | source design's PC application |
| `CLK_FREQ` | 200 MHz | this design's; the control clock is not given |
| `FRAME_WORDS` | 512 | this design's; the continuous frame length is not given |
| `RES_WORDS` | 2^26 | this design's; the resolution is not given |

`PRE_WORDS = 250` gives the 8000-bit preamble that was also tried for burst
mode. The logic places no limit below one frame.

A burst whose delimiter is hit by a bit error is not found. The receiver
skips it and keeps searching, so its words are neither compared nor
counted. The BER stays correct, because each report counts only compared
words, but at high error rates a window takes longer to fill.

## Where this departs from the source design

* **Pattern storage.** The original holds the pattern in two identical
  ROMs, one per side. Here an identical PRBS generator runs on each side
  and restarts on every frame, so the pattern is computed, not stored. The
  result is the same bit stream without a memory.
* **Invented details.** The pilot and delimiter values, the continuous
  frame length, the resolution window, the command and report formats and
  the clock-domain crossings are not given by the source design. They are
  this design's choices.
* **Zero-fill experiment.** One trial replaced the zero fill after the
  payload with preamble. That option is not built.
* **Lock.** Continuous mode locks once and never re-searches.
* **Burst compare length.** Burst mode compares one word less than the
  payload (see above).

With the standard 160-bit preamble, the original burst-mode hardware did
not give valid results below 100 %; at 95 % the BER was already invalid.
Its receiver's clock recovery needed far longer than 160 bits to lock
after each silent gap. Shares of 40 % and 80 % only worked once the
preamble was made much longer than the standard allows. That is an analog limitation of the
transceiver, not of this logic. In simulation with an ideal channel, every
burst share works.

Not built: the transceiver itself (serializer, PLL, clock recovery,
equalisers, emphasis driver), the XFP optical module, and the PC
application. The data and cursor pins that would go to the transceiver are
top-level ports.

## Files

`rtl/`:

| file | contents |
|---|---|
| `bert_pkg.sv` | constants (pilot, delimiter, preamble, command codes), `prbs_step`, `burst_words`, result type |
| `prbs14_gen.sv` | 32-bit-per-clock PRBS-14 |
| `pattern_gen.sv` | marker plus PRBS, with optional self-restart every frame |
| `burst_data_gen.sv` | 125 µs burst framing |
| `sync_block.sv` | marker search over 32 offsets |
| `ref_buffer.sv` | 96-bit reference buffer and slice |
| `error_counter.sv` | popcount, error total, resolution counter |
| `nburst_counter.sv` | per-burst compare length |
| `bert_cont.sv`, `bert_burst.sv` | the two tester cores |
| `uart_baud_gen.sv`, `uart_rx.sv`, `uart_tx.sv` | serial line |
| `cmd_rx_fsm.sv`, `report_tx_fsm.sv` | command decoder, report sender |
| `cdc_handshake.sv` | clock-domain crossing for a word |
| `bert_system_cont.sv`, `bert_system_burst.sv` | core plus PC link |
| `ngpon2_bert_top.sv` | both systems side by side |

`tb/` has a self-checking testbench `tb_<module>.sv` for every module, plus
shared helpers:

* `tb_ref_pkg.sv`: a bit-level PRBS model built from the recurrence, not
  from the RTL;
* `tb_channel.sv`: a channel with a fixed bit slip and error injection;
* `tb_uart_host.sv`: a PC model.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ngpon2_bert_top` runs both testers end to end at reduced sizes, in
  under a second. It uses 64-word frames, 400-word burst frames,
  20000-word windows and a 1 Mbaud link. It sets the emphasis, changes the
  burst share 100 → 40 → 80 %, and injects errors. It checks every report
  against a model of which injected errors fall inside compared words. It
  also counts how often each mechanism occurred: lock, per-burst
  synchronisation, emphasis commands, share changes, reports, windows with
  and without errors, and errors in the silent period that must not be
  counted.
* `tb_burst_workloads` runs two burst cores at the real 39062-word frame,
  one with the 160-bit preamble and one with the 8000-bit preamble. It
  steps the share through 40, 80, 95 and 100 % with errors injected
  throughout. For every settled frame it checks the burst length and the
  words compared. Every window report is checked against the error
  model. An error that hits a delimiter makes the receiver skip that
  burst, and the run shows this as well.
* `tb_ngpon2_bert_full` runs the top with all defaults: 200 MHz,
  19200 baud, 39062-word frames and 2^26-word windows. It runs until the
  first report from each tester and checks their error counts exactly. It
  takes about two minutes with Verilator.

To simulate one testbench with Verilator:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bert_pkg.sv tb/tb_ref_pkg.sv tb/tb_ngpon2_bert_top.sv \
        --top-module tb_ngpon2_bert_top -o sim
    ./obj_dir/sim

The simulator is two-state, so every register that is read has a reset.

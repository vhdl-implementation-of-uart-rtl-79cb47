# UART with in-frame single-error correction (Hamming (11,4))

A plain UART detects a corrupted character at best, with a parity bit, and
the sender must retransmit it. This UART instead puts a Hamming code on the
line. The receiver computes the position of a wrong bit and inverts it, so a
single bit flipped by noise costs no retransmission.

Each 8-bit character is split in two parts:

* the 7 low bits are encoded into an 11-bit Hamming code word, with 4 check
  bits;
* the MSB is carried as a 12th bit, separately and **without protection**.

The 12 bits form the payload of one asynchronous serial frame. At the other
end the receiver takes the 12 bits apart again, corrects the code word and
puts the MSB back:

```
 tx_data[7:0] ─┬─ bit 7 ───────────────────────┐
               └─ bits 6..0 ─► hamming_encoder ─┴─► {msb, code[11:1]} ─► uart_tx ─► tx_out
                                                                                       │ (line)
 rx_data[7:0] ◄─ {msb, data[6:0]} ◄─ hamming_decoder ◄─ {msb, code[11:1]} ◄─ uart_rx ◄─ rx_in
                                     └─► rx_err_pos, rx_err_detected, rx_code
            control_word_register ──► baud factor, parity, stop bits, char length (both sides)
```

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It uses one clock
and an asynchronous active-low reset.

## The code word

Bit positions of the code word are numbered 1 to 11. The check bits sit at
the positions that are powers of two. The data bits fill the rest in order:

| position | 11 | 10 | 9  | 8  | 7  | 6  | 5  | 4  | 3  | 2  | 1  |
|----------|----|----|----|----|----|----|----|----|----|----|----|
| content  | d6 | d5 | d4 | r8 | d3 | d2 | d1 | r4 | d0 | r2 | r1 |

Each check bit makes even the parity of the positions whose number contains
its power of two:

| check | covers positions      |
|-------|-----------------------|
| r1    | 1, 3, 5, 7, 9, 11     |
| r2    | 2, 3, 6, 7, 10, 11    |
| r4    | 4, 5, 6, 7            |
| r8    | 8, 9, 10, 11          |

The receiver repeats the four parity checks on what arrived. The results
C8 C4 C2 C1 form the **syndrome**. Read as a binary number, it is the
position of the wrong bit, or 0 if all four groups are even. This works
because every position is covered by exactly the checks that make up its
binary number.

Worked example:

* Data 1010101 (d6..d0) encodes to `10100101111` (positions 11..1).
* Noise flips position 9, so `10000101111` arrives.
* Check r1 fails, r2 and r4 pass, and r8 fails. The syndrome is 1001, which
  is position 9.
* Inverting position 9 gives back `10100101111`.

Both test benches for the decoder and for the whole UART use this vector.

What the code does **not** do. The engineer integrating this UART needs to
know these limits:

* **The MSB is unprotected.** A flip of payload bit 11 (the MSB) goes
  through and is not reported. Only bits 6..0 of the character are covered.
* **Two errors are detected but may be miscorrected.** The code has distance
  3, so it corrects one error. Two flips always give a non-zero syndrome, so
  `rx_err_detected` is raised. However, the syndrome usually names a third,
  correct bit, and the decoder inverts that bit. There is no overall parity
  bit, so this is not a SEC-DED code.
* **Syndromes 12 to 15** cannot come from a single error, because positions
  stop at 11. In that case the decoder leaves the word unchanged and raises
  `rx_uncorrectable`.
* An error in the optional UART parity bit, or in a stop bit, does not touch
  the data. It is reported through `rx_parity_err` or `rx_framing_err`.

## Frame on the line

The line idles high. A frame is sent in this order:

```
 start | p0  p1  p2 ... p10 | p11 | [parity] | stop (1, 1.5 or 2 bits)
  '0'  | code positions 1..11 | MSB |          | '1'
```

* The payload is sent LSB first: code position 1 (r1) goes first, then
  positions 2 to 11, and the separated MSB goes last.
* The parity bit is sent only when the control word enables it. It covers
  the 12 payload bits.
* The default format has no parity and 2 stop bits. A frame is then
  1 + 12 + 2 = 15 bit times long.
* Each bit lasts 1, 16 or 64 clock cycles, as set by the baud rate factor.
  The bit rate is the clock divided by that factor; there is no separate
  baud rate generator.

## Control word register

This is an 8-bit register written through `cw_wr`/`cw_data`. Its layout is
that of the mode word of a classic programmable UART:

| bits   | field            | 00                    | 01      | 10       | 11          |
|--------|------------------|-----------------------|---------|----------|-------------|
| D1..D0 | baud rate factor | sync (run as 1x)      | 1x      | 16x      | 64x         |
| D3..D2 | character length | 5 bits                | 6 bits  | 7 bits   | 8 bits      |
| D5..D4 | EP, PEN          | no parity             | odd     | no parity | even       |
| D7..D6 | stop bits        | inhibit               | 1       | 1.5      | 2           |

The reset value is `0xCD`: 2 stop bits, no parity, 8-bit characters, 1x.

Some codes have no definition in the classic layout, or do not fit a
Hamming-protected frame. This design handles them as follows:

* **Sync (baud code 00).** Synchronous operation is not defined here, so
  the UART runs the normal asynchronous frame with 1x timing.
* **Inhibit (stop code 00).** The transmitter keeps the character it holds
  and leaves the line idle until the code is changed. The receiver does not
  look at this code.
* **1.5 stop bits.** The stop period is rounded up to whole clocks:
  2 cycles at 1x, 24 at 16x and 96 at 64x.
* **Character length.** The payload is always 12 bits. A shorter character
  length only clears the unused upper bits of the character, both before
  encoding and after decoding. In 5, 6 and 7-bit modes the MSB position
  carries 0.

## Transmitter (`uart_tx`)

The transmitter has two registers: the Transmitter Hold Register (THR) and
the Transmitter Shift Register (TSR).

* **Writing.** A write is accepted while `thr_empty` is high (`tx_ready` at
  the top).
* **Loading.** If the transmitter is idle, the word moves to the TSR on the
  next clock and the start bit appears on the clock after that.
* **Back-to-back frames.** The THR frees up as soon as its word has moved to
  the TSR, so a second character can wait there. That character starts
  exactly when the previous stop period ends, with no idle gap between the
  frames.
* **Settings.** The transmitter takes a copy of the control word settings
  at the start of each frame. Rewriting the control word during a frame
  therefore does not corrupt that frame.

## Receiver (`uart_rx`)

The receiver has two registers: the Receiver Shift Register (RSR) and the
Receiver Buffer Register (RBR).

* **Input.** `rx_in` first passes through a two-flop synchronizer.
* **Start bit.** When the receiver sees a low level, it waits half a bit
  and checks that the line is still low. A shorter low pulse is dropped as a
  glitch.
* **Sampling.** From then on it takes one sample per bit time, at the
  middle of each bit: the 12 payload bits, the parity bit if enabled, and the
  first stop bit.
* **At the stop bit.** The RSR is copied into the RBR and `rx_valid` pulses
  for one cycle. The flags are updated at the same time:
  * `rx_parity_err`: the parity bit did not match;
  * `rx_framing_err`: the stop bit was read low.
* **Next frame.** The receiver then waits for the next start bit, so it
  accepts any stop length.

At 1x there is no oversampling. Each clock samples one bit, so the far end
must run from the same clock, as in a loop-back. At 16x and 64x the
mid-bit sampling tolerates an unrelated clock of about the same rate.

There is no overrun detection and no read handshake. A new frame simply
replaces the RBR contents.

The Hamming decoder is combinational and sits behind the RBR. `rx_data`,
`rx_err_pos`, `rx_code` and the flags therefore stay stable from one
`rx_valid` pulse to the next.

## Top-level interface (`uart_hamming_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `cw_wr`, `cw_data` | in | 1, 8 | write the control word |
| `cw_q` | out | 8 | control word read-back |
| `tx_wr`, `tx_data` | in | 1, 8 | queue a character (when `tx_ready`) |
| `tx_ready` | out | 1 | hold register empty |
| `tx_busy` | out | 1 | a frame is on the line |
| `tx_out` | out | 1 | serial output |
| `rx_in` | in | 1 | serial input |
| `rx_valid` | out | 1 | one-cycle pulse: a character has been received |
| `rx_data` | out | 8 | corrected character |
| `rx_err_detected` | out | 1 | syndrome non-zero |
| `rx_err_pos` | out | 4 | syndrome: position 1..11 of the corrected bit, 0 = none |
| `rx_code` | out | 11 | corrected code word |
| `rx_uncorrectable` | out | 1 | syndrome 12..15 (several errors) |
| `rx_parity_err`, `rx_framing_err` | out | 1 | UART parity and stop-bit errors |

The top has one parameter, `CTRL_RESET`, the reset value of the control word
(default `8'hCD`).

**Latency.** Take a loop-back at 1x with no parity. If `tx_wr` is
sampled at clock edge *k*, `rx_valid` is high after edge *k* + 18:

* 1 cycle into the TSR;
* 1 cycle until the start bit;
* 3 cycles of synchronizer and start detection;
* 13 bit times until the middle of the first stop bit.

In general the latency is 2 + 3 + F/2 + (13 + parity) × F cycles, where F is
the baud factor and F/2 is 0 at 1x.

## How far this follows the original design, and where it departs

These parts follow the original design:

* the overall structure: an 8-bit character, the MSB separated, a 7-to-11
  Hamming encoder, a 12-bit serial payload, and the decoder plus the MSB on
  receive;
* the check-bit positions and coverage, and the worked example;
* a start bit of '0', two stop bits of '1' in the main format;
* the THR/TSR and RSR/RBR register names;
* the 8-bit control word and its field encodings.

These are this design's own choices, because the original does not specify
them:

* bit order on the line (LSB first, MSB last);
* where the parity bit goes in the frame;
* the sampling scheme and the glitch filter;
* the handshakes (`tx_ready`, `rx_valid`);
* the error flags and the handling of syndromes 12 to 15;
* the reset value of the control word;
* everything in the list of control word choices above.

The original presents its code as correcting one error and detecting two.
The frame it defines, an 11-bit code plus an unprotected MSB, has no bit
with which to do the second part. This RTL implements the frame as defined,
which means single-error correction only.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `hamming_encoder_tb` | all 128 data words against an independent reference encoder (`tb/hamming_ref_pkg.sv`), plus the worked example |
| `hamming_decoder_tb` | every data word: clean, all 11 single errors (position, data, corrected word), all 55 double errors (flagged, syndrome, 12..15 case), plus the worked example |
| `control_word_register_tb` | reset value, load and hold, decoding of all 256 control words |
| `uart_tx_tb` | cycle-by-cycle line waveform for 1x/16x/64x × no/odd/even parity × 1/1.5/2 stop bits, three back-to-back frames each; inhibit |
| `uart_rx_tb` | a line model sends frames in every format with random gaps; checks the data, the parity and framing flags, the latency to `rx_valid` in cycles, and glitch rejection |
| `uart_hamming_top_tb` | the whole UART at default parameters, looped back through an error injector. It covers every format, a single error at each position (corrected), an MSB error (passed through), double errors, parity and stop-bit errors, all character lengths, the sync code, random traffic, inhibit, and the end-to-end latency. It counts how often each mechanism occurred and fails if one never did. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module uart_hamming_top_tb \
    rtl/uart_pkg.sv tb/hamming_ref_pkg.sv tb/uart_hamming_top_tb.sv
./obj_dir/Vuart_hamming_top_tb
```

Replace the top module and testbench file for the other benches. The
packages must come first on the command line. Each bench runs in well under
a second.

## Files

| file | contents |
|------|----------|
| `rtl/uart_pkg.sv` | widths, control word struct and enums, decoded settings struct |
| `rtl/control_word_register.sv` | mode register and field decoding |
| `rtl/hamming_encoder.sv` | 7 → 11 bit encoder |
| `rtl/hamming_decoder.sv` | syndrome, correction, data extraction |
| `rtl/uart_tx.sv` | THR, TSR, frame sequencer |
| `rtl/uart_rx.sv` | synchronizer, RSR, RBR, sampling, error flags |
| `rtl/uart_hamming_top.sv` | the complete UART |
| `tb/hamming_ref_pkg.sv` | reference model of the code, used by the testbenches |
| `tb/*_tb.sv` | testbenches |

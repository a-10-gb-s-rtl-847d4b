# Bi-CDR: a bit-interleaving clock and data recovery decimator for 10G PON

In an ordinary TDM passive optical network every subscriber unit (ONU) must process the whole
10 Gb/s downstream frame, although almost all of it belongs to other subscribers. In a
**bit-interleaved PON (Bi-PON)** the OLT interleaves the subscribers bit by bit: the bits of one
ONU are spread evenly through the frame, so the ONU can throw away the rest right behind the clock
recovery and run everything after it at its own user rate. This repository holds synthesizable
SystemVerilog for the digital part of such a receiver, the *Bi-CDR decimator*, as published in
"A 10 Gb/s bit interleaving CDR for low-power PON": the header path that finds the ONU's channel,
the bandwidth-map decoder, the payload decimator, the two descramblers at decimated rate and the
payload parser. The analog front end (pre-amplifier, PLL) and the LVDS output drivers are not part
of the RTL; the top module takes the PLL's recovered clock and data as inputs.

## The frame as this RTL expects it

A frame lasts 125 us, which at the 9.95328 Gb/s line rate is **1,244,160 bits**. Line bit `n` of
the frame belongs to channel `n mod 256`. Reading one channel (one bit every 256 line bits) gives
that channel's header, one bit per 256-bit "word":

| words  | field        | bits | scrambled |
|--------|--------------|------|-----------|
| 0-15   | sync pattern `16'hF35A` | 16 | no |
| 16-23  | channel ID (0..255)     | 8  | no |
| 24-31  | reserved (OLT-to-ONU instructions, e.g. sleep) | 8 | no |
| 32-47  | bandwidth (BW) map      | 16 | yes |

The payload begins at line bit `PAYLOAD_START = 48*256 = 12288`. The BW map gives the ONU its
decimation `D = 2^(k+3)` (8, 16, ..., 1024; `k = bw[15:13]`) and its offset
`off = bw[9:0] mod D`; the ONU owns payload bits `n = 12288 + off + D*m`, i.e.
`(1,244,160 - 12,288)/D` user bits per frame (1203 at D = 1024, 153,984 at D = 8). All fields
are sent most significant bit first. The source fixes the field order, the 256 channels, the
eight-bit ID range, the decimation range and the scrambling polynomial; the field widths, the
sync value, the BW map layout and the line rate are this implementation's choices, collected in
`rtl/bipon_pkg.sv`.

## Data flow

```
data_in, clk (recovered 10 Gb/s)
   |                clock_gen: /8 -> 8 phases of 1.25 GHz + frame octet counter
   +-> phase_sampler (header phase)  --/8-->  header_decimator (/32)  --> 1 of 256 channels
   |        sync_detector -> bw_descrambler -> bw_parser --(rate, offset)--+
   |             ^  | correct(delta)  | align                              |
   |             |  +--> header_decimator                                  v
   +-> phase_sampler (16-bit delay, payload phase) --/8--> payload_decimator (/2^(0..7))
            |                                  payload_descrambler -> payload_parser
            +------------------- frame_done -----------------------------+--> user_data,
                                                                             user_valid, ddr_clk
```

Everything is modelled in the single recovered line-clock domain, one data bit per cycle. The
1.25 GHz phases are decoded waveforms and "sampling on phase i" is a one-cycle strobe; in silicon
those are real clock phases in current-mode logic, and everything behind the two phase
multiplexers runs at the (much lower) decimated rate.

## Finding and locking to the ONU's channel

After reset the header path reads an arbitrary channel. `sync_detector` shifts each header bit
into a 16-bit window; on a sync match it reads the next 8 bits as the channel ID. If the ID is not
the ONU's, it pulses `correct` with `delta = onu_id - id (mod 256)`; `header_decimator` adds
`delta` to its 8-bit select `{hq, hp}`, where `hp` picks the clock phase and `hq` one octet in 32.
That moves the sampling point by exactly `delta` line bits, onto the ONU's channel. The window is
cleared and the next frame's sync and ID confirm the choice; only then is `locked` set. A false
sync inside payload data only costs another correction, as the confirmation catches it. A later
mismatch drops `locked` and corrects again.

Once locked, the detector forwards words 24..47 to the BW path and then waits for the payload
parser's `frame_done` before hunting again; the window keeps shifting while it waits, so a sync
that begins right after the last payload bit is not missed.

## Aligning the payload path

The payload decimator must hit line bit `12288 + off` of the frame, but all counters are
free-running. Each sampled bit carries the octet number at which it was taken, so every header bit
has a known free-running position `8*octet + phase`. When the ID of the ONU's own channel
(line bit `5888 + onu_id`) is confirmed, `payload_parser` stores the free-running position of frame
bit 0, `base = align_pos - 5888 - onu_id (mod frame)`. When the BW map arrives it starts the payload
decimator at `base + 12288 + off + PL_DELAY`: the low three bits choose the payload phase, the rest
the octet. From there the decimator keeps every `D/8`-th sampled bit (the `/2^(0..7)` stage), and
the parser counts `PAYLOAD_BITS/D` bits, closes the window and pulses `frame_done`.

`PL_DELAY` (16 line flip-flops in front of the payload phase multiplexer) exists because with this
header layout the BW map of channel 255 ends one line bit before the payload starts; the delay
gives the BW decoder enough cycles to set the payload phase before the ONU's first payload bit
arrives. The payload sampler discards anything taken with the previous phase after a phase change.

## Descrambling at the decimated rate

The BW map and the payload are scrambled with the frame-synchronous additive sequence
`s[n] = s[n-18] ^ s[n-23]` (polynomial 1 + x^-18 + x^-23), restarted each frame with
`s[0..22] = 1`. The ONU never sees the full-rate sequence, so it cannot simply run the scrambler.
Write the 23-bit scrambler state as `S_n = {s[n+22] .. s[n]}` and the one-step update as a
23x23 matrix over GF(2), `S_{n+1} = A S_n`. Then:

* one decimated step is a jump by `A^D`; for `D = 2^j` that matrix is `A^(2^j)`, obtained by
  squaring `A` j times;
* the start state at line bit `o` is `A^o S_0`, built from the binary digits of `o` by applying
  `A^(2^j)` for every set bit.

`bipon_pkg` computes the table `A^(2^j)`, j = 0..13, with constant functions at elaboration, so the
hardware holds constants only. `bw_descrambler` starts at `A^(8192 + onu_id) S_0` (first BW map
bit of the channel) and steps by `A^256`; `payload_descrambler` starts at
`A^off (A^12288 S_0)` and steps by `A^D`. Each step is 23 parity trees of up to 23 inputs.

## Modules

| file | role |
|------|------|
| `bipon_pkg.sv` | frame layout, sync pattern, scrambler matrices and jump functions, FSM type |
| `clock_gen.sv` | divide by 8, eight phase waveforms, octet counter modulo the frame |
| `phase_sampler.sv` | phase multiplexer + resampling flip-flops (first /8), optional line delay |
| `header_decimator.sv` | /32 channel selection, header offset correction |
| `sync_detector.sv` | sync hunt, ID check, correction, lock, header field forwarding |
| `bw_descrambler.sv` | BW map descrambling at 1/256 rate |
| `bw_parser.sv` | reserved field, decimation rate, payload offset |
| `payload_decimator.sv` | /2^(0..7) payload selection from the start octet |
| `payload_descrambler.sv` | decimated, offset payload descrambling |
| `payload_parser.sv` | frame alignment, payload configuration, frame length, user output, DDR clock |
| `bi_cdr.sv` | top level |

Top-level ports: `clk`, `rst_n` (asynchronous, active low), `data_in`, `onu_id[7:0]` in;
`user_data`/`user_valid` (one pulse per user bit, every D cycles), `ddr_clk` (toggles with each
user bit, so both edges mark data), `locked`, the frame's `reserved`, `rate_log2`, `offset` with
`cfg_valid`, and status outputs `frame_done`, `sync_found`, `correct`, `chan_sel`, `sync_state`.

## Simulation

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
With plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/bipon_pkg.sv tb/tb_bi_cdr.sv --top-module tb_bi_cdr -o sim
./obj_dir/sim
```

`tb_bi_cdr` runs the whole design at full size: it builds eleven complete frames (plus a partial
one to start mid-frame) with all 256 channels, random reserved fields and BW maps, random payload,
and the ONU's rate walking through all eight decimations with random offsets, scrambled by an
independent line-rate reference scrambler. It checks every user bit, the bit count per frame, the
spacing of D line cycles between user bits, and the decoded fields, and counts that channel
correction, locking, re-synchronisation while locked, end of frame and every decimation rate all
occurred. It takes about 14 million cycles, under ten seconds of Verilator time. The block
testbenches check the descramblers against a full-rate reference sequence for every rate with
offsets 0, D-1 and random ones, the decimators against independently counted positions, and the
sync detector through a scripted sequence of foreign channel, lock, early sync, re-lock and lock
loss.

## Departures and limits

* The chip resamples with real 1.25 GHz clock phases and a CML front end; here all is one
  synchronous line-clock domain with clock enables. Behaviour per bit is the same; the CML/CMOS
  split and the power saving are not modelled.
* Field widths, sync value, BW map layout, scrambler seed, the MSB-first order and the
  9.95328 Gb/s line rate are choices of this design, not given by the source.
* The source lists the rates "8, 16, 32, 64, 128, 512 or 1024" in one place and includes 256
  elsewhere; all eight powers of two from 8 to 1024 are supported.
* The 16-bit payload retiming delay, the frame-alignment arithmetic and the octet-matching form of
  the `/2^k` stage are this design's own.
* The reserved field is decoded and brought out but not acted on: the sleep-mode instructions it
  may carry are not defined.
* There is no loss-of-sync timer: a locked receiver that never sees its sync again simply keeps
  hunting.

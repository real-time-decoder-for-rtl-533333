# Real-time decoder for noisy smart-card responses

A vicinity smart card (ISO/IEC 15693) answers the reader by load modulation: bursts of a
423.75 kHz sub-carrier. The analog front end of the reader demodulates these bursts into a
stream of digital pulses. When the card is close to the antenna, every pulse arrives and a
decoder can look at them one by one. Farther away, the demodulated signal sinks into the
noise. Pulses go missing inside bursts, and stray pulses appear where the carrier was
unmodulated. A decoder that trusts single pulses then fails, and it fails at a short range.

This design decodes the pulse stream in real time with very little logic. It does not trust
single pulses. It counts how many pulses arrived in a window that slides over the last eight
sub-carrier periods. A comparator with hysteresis turns that moving average into a clean
"modulated / unmodulated" level. Bits, start of frame and end of frame are then read from that
level. A few missing or spurious pulses per half-bit do not change the result. The reader can
therefore decode cards at a greater distance.

The circuit follows the recognition circuit of the article "Real Time Decoder for Coded Signals
Mixed with Noise" (five blocks: shift register, decoder, comparator with hysteresis, data form,
SOF & timing). That article fixes the window, the thresholds and the block structure. It does
not give the SOF recogniser, the sampling points, the bit clock phase or the clock rate. Those
are this design's own choices; they are listed under "Departures and own choices" below.

## The signal being decoded

Time is counted in sub-carrier periods. One period is one possible pulse. At the high data rate
(26.48 kb/s), which is the configuration built here:

| symbol        | first part                       | second part                       | length      |
|---------------|----------------------------------|-----------------------------------|-------------|
| logic "0"     | 8 pulses                         | 8 quiet periods                   | 16 periods  |
| logic "1"     | 8 quiet periods                  | 8 pulses                          | 16 periods  |
| start of frame| 24 quiet periods, 24 pulses      | then a logic "1"                  | 64 periods  |
| end of frame  | a logic "0"                      | 24 pulses, 24 quiet periods       | 64 periods  |

A bit slot is two half-bits of 8 periods. Data always has exactly one modulated half per slot.
The SOF and EOF contain a 24-pulse burst, which no data sequence can produce (a "1" followed by
a "0" gives at most 16 pulses in a row).

The clock is taken to be the 13.56 MHz carrier, so one period is `CLK_PER_PULSE` = 32 clock
cycles and one bit slot is 512 cycles (37.76 us, 26.48 kb/s).

## The moving-window filter

Three blocks form the filter.

* `rec_shift_register` synchronizes `data_in` with two flip-flops and watches for rising edges.
  At the end of each period (`tick`), it shifts in one flag: 1 if at least one edge came during
  the period, else 0. Its eight stages are the window.
* `rec_decoder` counts the ones in the window. This count (`comp_in`, 0 to 8) is a running
  average of the pulses received.
* `rec_comparator` sets `comp_out` when the count reaches 5. It clears it when the count drops
  to 3. At 4 it keeps its value.

The window moves one period at a time, so the count changes by at most one per period. Clean
half-bits give the ramp 1, 2, ... 8, 7, ... 0. Noisy ones give a flatter ramp with plateaus. The
hysteresis band at 4 keeps `comp_out` from chattering on those plateaus.

The noise margin follows from where the data form samples (next section). At those points, the
window covers exactly one half-bit. A modulated half with up to 3 missing pulses still counts at
least 5, so the level is high. A quiet half with up to 3 spurious pulses counts at most 3, so the
level is low. Each period by which the slot grid is misplaced costs one pulse of margin.

## Finding the frame: SOF & timing

`rec_sof_timing` has two jobs.

**Period timing.** A free-running divider makes `tick`, one clock cycle in every 32. It is not
locked to the card's phase. This is harmless: the card's sub-carrier is derived from the
reader's own carrier, so the frequency matches, and only one edge per period is counted.

**SOF recognition.** The recogniser works on the per-period pulse flags and has three states:

1. `SOF_QUIET`: it counts quiet periods. A pulse after at least `QUIET_MIN` (12) quiet periods
   opens a burst. A pulse after a shorter quiet time restarts the count.
2. `SOF_BURST`: it counts the periods and the pulses of the burst. A run of `GAP_END` (4) empty
   periods ends the burst, so up to 3 missing pulses in a row are bridged. The burst is accepted
   if its length, from first to last pulse, is 24 ± `SOF_TOL` (20 to 28 periods) and it held at
   least `PCNT_MIN` (16) pulses. A burst longer than 28 periods is dropped at once.
3. `SOF_RUN`: the frame is being decoded.

The last pulse of an accepted burst fixes the bit grid. The next period is phase 0 of the slot
that carries the SOF's closing logic "1". The burst is only recognised 4 periods later, so the
block loads `phase` with 4 and gives a one-cycle `start` strobe. From then on `phase` counts 0 to
15 at every tick. `phase` is the slot position of the period that the next tick will shift in.
A `stop` pulse from the data form (EOF, error, or a bad SOF) returns the block to `SOF_QUIET`.

If the last pulse of the SOF burst is itself missing, the grid lands one period early. That uses
one of the three pulses of margin described above.

## Forming the output: data form

`rec_data_form` samples `comp_out` twice per slot:

* at the tick with `phase` = 8, when the window holds the first half-bit (sample `s0`);
* at the tick with `phase` = 0, when it holds the second half-bit (sample `s1`).

The comparator is registered, so at each tick it shows the window as it was up to the previous
period. That is why these two phases see whole half-bits. The pair classifies the slot:

| `s0 s1` | meaning                                                          |
|---------|------------------------------------------------------------------|
| 1 0     | logic "0"                                                        |
| 0 1     | logic "1"                                                        |
| 1 1     | burst: end of frame if the previous slot was a "0", else error   |
| 0 0     | no pulses: error                                                 |

Three rules sit on top of this table:

* **SOF check.** The first slot after `start` must be the SOF's closing "1". If it is not, the
  frame is dropped without raising `error`, and the recogniser waits for another SOF.
* **One-slot hold-back.** An EOF begins with a logic "0" that is not data. A bit is therefore
  held for one slot and put out only when the next slot turns out to be a data bit too. When the
  next slot is the EOF burst, the held "0" is discarded.
* **End of frame and errors.** An EOF makes `eof` high for one clock cycle and stops the frame.
  An error sets `error` and stops the frame. `error` stays high until the next accepted SOF.

Output timing, in periods from the tick at which a slot's decision is made:

```
tick phase      0   1   2   3   4   5   6   7   8   9  10  11  12  13  14  15   0
data_out      ==X=============== bit n ===========================================X== bit n+1
bit_clk       __________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________________
```

`bit_clk` rises 4 periods after `data_out` changes and falls 8 periods later. There is one pulse
per bit, so the bit can be taken on the rising edge, in the middle of its stable time. Bit n is
put out one slot plus one period (plus 3 cycles of synchronizer) after the end of its own slot.
`eof` comes at the end of the EOF's second slot, 16 periods into its 24-pulse burst.

## Files and interfaces

| file                         | contents                                                        |
|------------------------------|-----------------------------------------------------------------|
| `rtl/rec_pkg.sv`             | shared constants (periods, window, thresholds) and state enums  |
| `rtl/rec_shift_register.sv`  | synchronizer, per-period pulse flag, 8-stage window             |
| `rtl/rec_decoder.sv`         | population count of the window                                  |
| `rtl/rec_comparator.sv`      | comparator with hysteresis (5 / 3)                              |
| `rtl/rec_sof_timing.sv`      | period divider, SOF recogniser, slot phase                      |
| `rtl/rec_data_form.sv`       | slot sampling, data hold-back, bit clock, EOF, error            |
| `rtl/recognition_circuit.sv` | top level                                                       |

Top-level ports of `recognition_circuit`:

| port       | dir | width | meaning                                                        |
|------------|-----|-------|----------------------------------------------------------------|
| `clk`      | in  | 1     | clock, 32 cycles per sub-carrier period (13.56 MHz)            |
| `rst_n`    | in  | 1     | synchronous reset, active low                                  |
| `data_in`  | in  | 1     | demodulated sub-carrier pulses, asynchronous                   |
| `data_out` | out | 1     | decoded data, valid at the rising edge of `bit_clk`            |
| `bit_clk`  | out | 1     | one pulse per decoded bit                                      |
| `eof`      | out | 1     | one-cycle strobe: end of frame decoded                         |
| `error`    | out | 1     | frame could not be decoded; held until the next SOF            |
| `comp_in`  | out | 4     | pulse count in the window (for observation)                    |
| `comp_out` | out | 1     | comparator output (for observation)                            |

Parameters of the top are `CLK_PER_PULSE` (32), `HALF` (8 pulses per half-bit) and `WIN`
(8-stage window). The top derives the SOF tolerances from `HALF` (quiet time 1.5·HALF, gap and
length tolerance HALF/2, minimum pulses 2·HALF). It derives the thresholds from `WIN`
(WIN/2+1 and WIN/2−1). Only the default values are verified.

The synthesized circuit is small: about 60 flip-flops and some 200 word-level cells.

## Departures and own choices

What comes from the article: the 8-stage window counting one pulse per period, the count-of-ones
decoder, the thresholds 5 and 3, the five-block structure, the 24-pulse SOF and EOF bursts, the
outputs `data_out`, `bit_clk`, `eof` and `error`, and the rule that an EOF stops the circuit
until the next SOF.

What this design adds or changes:

* **Clock rate.** 32 clock cycles per period assumes the 13.56 MHz carrier as the clock.
* **Pulse sampling.** Pulses are detected by their rising edges after a two-flop synchronizer.
  Several edges in one period count once.
* **SOF recogniser.** The whole method is this design's: quiet time, gap bridging, length and
  pulse-count tolerances.
* **Input to SOF & timing.** In the article's block diagram, SOF & timing reads `data_in`
  directly. Here it reads the pulse flag formed by the shift register's input stage, so that
  `data_in` passes through only one synchronizer.
* **Stop line.** The article's diagram feeds only `eof` back to SOF & timing. Here a `stop`
  line also carries errors and dropped frames, so that the circuit always returns to waiting for
  an SOF.
* **Decoder timing input.** The decoder is combinational and has no timing input.
* **Output details.** The sampling points, the one-slot hold-back, the bit clock phase (rise 4
  periods after the data), the one-cycle `eof`, the held `error`, and the silent drop of a bad SOF
  are this design's choices.
* **Low data rate not built.** The four-times-slower rate (32 pulses per half-bit) is not
  built. The parameters would let one try it, but the article gives no window length or
  thresholds for it, so it is not verified.

## Simulation

Each block has a self-checking testbench in `tb/`, ending with a line
`TB_RESULT checks=N failures=M`:

| testbench                  | what it checks                                                                     |
|----------------------------|------------------------------------------------------------------------------------|
| `tb_rec_decoder`           | all 256 window patterns                                                            |
| `tb_rec_comparator`        | ramps, dwells at 4, a random walk and random counts against a reference            |
| `tb_rec_shift_register`    | pulses, glitches, held-high input; window against a reference                      |
| `tb_rec_sof_timing`        | tick period, start position and phase, length limits 20/28, gap 3/4, quiet 11/12, pulse minimum |
| `tb_rec_data_form`         | bits, hold-back, EOF, both error cases, bad SOF drop, bit clock phases              |
| `tb_recognition_circuit`   | end to end at default parameters (below)                                           |

`tb_recognition_circuit` generates frames period by period. It sends clean frames and noisy
ones (up to 2 missing pulses per modulated half-bit and 2 spurious pulses per quiet half-bit,
1 to 64 bits). It also sends bursts too short or too long for an SOF, an SOF without its closing
"1", a frame with an empty slot, and 20 bit times of 50 % random pulses after a valid SOF. It
checks every decoded bit and its `bit_clk` time, the bit clock period (512 cycles), the EOF
time and the error flag. It also counts each mechanism: SOF accepted, false SOF rejected, frame
dropped, missing and spurious pulses absorbed, hysteresis hold at 4 (both directions), EOF,
error. It fails if any mechanism never happened. It runs in well under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rec_pkg.sv tb/tb_recognition_circuit.sv \
    rtl/recognition_circuit.sv rtl/rec_shift_register.sv rtl/rec_decoder.sv \
    rtl/rec_comparator.sv rtl/rec_sof_timing.sv rtl/rec_data_form.sv \
    --top-module tb_recognition_circuit
./obj_dir/Vtb_recognition_circuit
```

For a block testbench, list `rtl/rec_pkg.sv`, the testbench and the block's file, and name the
testbench as the top module.

The RTL also carries a few concurrent assertions, which are checked when simulating with
`--assert`. `start` comes only after a period strobe, `phase` stays below 16, `eof` and a new
`error` always come with `stop`, and `bit_clk` pulses only while data is decoded.

## How far to trust it

All testbenches pass at the default parameters. Each was also run against a deliberately
broken copy of its block, and each caught the fault. The noise tolerance is verified only for the
noise patterns above. There is no analog model, and timing jitter of the pulses is not
simulated. Pulse edges near a period boundary could be counted in the neighbouring period. The
window tolerates this like a missing pulse followed by a spurious one, but it was not tested
separately. The design has not been synthesized to gates for a particular process or checked
against a real card.

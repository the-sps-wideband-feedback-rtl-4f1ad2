# Wideband intra-bunch feedback processor (SystemVerilog)

A proton bunch in the CERN SPS is about 1.7 ns long. Instabilities such as
TMCI or electron-cloud motion make the head and the tail of the bunch move
differently, so a conventional damper that sees each bunch as one point cannot
correct them. This processor samples the beam position signal at 4 GSa/s, so
every bunch is cut into 16 slices. It treats each slice of each bunch as its
own signal, sampled once per machine turn. Each such signal is filtered with a
16-tap FIR filter across turns, and the result is sent back to a kicker
through a 4 GSa/s DAC. The same gateware can also play an arbitrary waveform
into one bunch to drive it, add that waveform to the feedback, and record the
raw samples of one bunch over up to 65536 turns.

This RTL implements the FPGA part of such a system. It covers the ADC data
formatting, the feedback filter bank, excitation, snapshot, sequencing,
diagnostics, control registers and DAC formatting. The converters, clock
synthesis, analog front and back ends and the USB device are outside it.

## Data flow

```
ADC1 (4 streams) ┐
                 ├─ adc_logic ─ sync_fifo ─┬─ slice_gather ─┬─ fir_bank ─ slice_gain ─ shift_sat ─┐
ADC2 (4 streams) ┘   (8-sample words)      │                └─ snapshot_mem                       │
                                           └─ adc_dsp_ctrl (fires bunch windows)                  │
                                                         exc_mem ── out_mixer ◄───────────────────┘
                                                                        │
                             dac_logic ◄─ async_fifo ◄─ dac_formatter ◄─┘
                          (4 DAC streams)  (clk → dac_clk)
control:  trigger_timing → master_fsm → adc_dsp_ctrl / dac_ctrl;  timing_diag;  ctrl_regs (host bus)
```

`wbfb_top` wires all of this together. Every module file starts with a
comment giving its interface, timing and the choices made in it.

## How the sample stream is organised

* **Words.** Each ADC delivers four 8-bit samples per processing clock. The
  second ADC samples half a sample period after the first. `adc_logic` merges
  them into one word of eight samples in time order (ADC1, ADC2, ADC1, ...).
  It also turns offset-binary codes into two's complement. At 4 GSa/s this
  gives a 500 MHz word clock.
* **Turns.** The bunch-1 marker (ring fiducial) is made into a one-clock pulse
  by `trigger_timing`. It is stored as a flag on the ADC word it arrives
  with, so it passes through the input FIFO together with the data. Lane 0 of
  the flagged word is sample 0 of the turn.
* **Bunch windows.** Bunch *b*'s window is the 16 samples starting at
  `first_offset + b*spacing` samples after the fiducial. `adc_dsp_ctrl` raises
  `fire` in the clock whose word holds a window's last sample, and passes the
  lane of that sample (`lend`). `slice_gather` keeps the two previous words,
  so it can cut out any 16 consecutive samples ending in the current word.
  Windows do not need to be aligned to words.
* **Doublets.** In doublet mode a window is 32 samples long and goes on as two
  16-slice vectors on filter channels 2*d* and 2*d*+1. The same 64 filter
  channels therefore hold either 64 bunches or 32 doublets.

Every vector carries a small sideband record (`sideband_t`) down the pipeline:
channel, bunch, `lend`, and first/last half. Every pipeline stage has a fixed
latency, so no stage ever needs a handshake.

## The filter bank (`fir_bank`)

For each slice *s* of channel *c*:

    y_c,s(n) = Σ_{k=0..15} h(k) · x_c,s(n−k),   n = turn number

All 16 lanes (slices) use the same coefficients. Data and coefficients are
8-bit two's complement. A sum of 16 products fits exactly in the 20-bit
result: the magnitude is at most 16·128·128 = 2^18.

Storage is one memory with an entry per channel. Each entry holds the previous
15 samples of all 16 lanes (16 × 120 bits). A vector is processed in two
clocks:

1. Read the channel's entry.
2. Form all 256 products and add them per lane. At the same time, write back
   the entry shifted by one sample with the new sample in front.

A per-channel valid bit, cleared by reset, makes a channel that was never
written read as zeros. The memory therefore needs no clearing pass. In use a
channel comes back only once per turn, so a read never meets a write to the
same entry in flight. The one restriction is that the same channel may not be
presented in two consecutive clocks.

The filter holds two coefficient sets (A and B). `master_fsm` chooses set B
for `swap_len` turns, starting `swap_start` turns into the run. The choice is
made by counting fiducials. This gives grow/damp experiments: for example, set
B = −A drives the beam unstable, then set A damps it again.

## From filter output to DAC samples

* `slice_gain` (optional) applies a gain per slice: 9-bit signed, 128 = +1.0,
  range −1..+1. The formula is `(y·g) >>> 7`.
* `shift_sat` shifts each result right by 0..15 bits. It then saturates to
  −128..+127 in the direction of the overflow.
* `out_mixer` selects the output:
  * `OFF`: nothing
  * `FEEDBACK`: feedback only, for bunches enabled in `bunch_en`
  * `EXCITATION`: the excitation vector, only on the excited channel while
    playback runs
  * `FEC`: the saturated sum of feedback and excitation

  Outside the run state the output is zero.
* `dac_formatter` writes each vector into a 56-sample look-ahead buffer. The
  buffer moves out one word per clock. Because of the buffer, a correction
  leaves at the same position within the turn as its window entered. The
  output word stream lags the input word stream by exactly 5 words. The cable
  and analog delays of the system then align the kick with the bunch.
* **Amplifier tail compensation (ambles).** The formatter can add samples
  before the window (pre-amble), after it (post-amble), or 8 before and 8
  after (split). Each amble sample is `sat((mean · pattern[i]) >>> 7)`, where
  `mean` is the mean of the vector's 16 output samples and `pattern` is a
  programmable 16-entry carrier. An alternating ± pattern moves the bunch's
  low-frequency (mean) content up to a carrier near half the sample rate. In
  doublet mode the pre-amble goes before the first half and the post-amble
  after the second half.
* `async_fifo` (Gray-coded pointers) carries the words into the DAC clock
  domain.
* `dac_logic` waits until 8 words are buffered and then streams one word per
  clock. It splits each word over the DAC's four input streams as two samples
  per stream per clock: stream *s* gets samples *s* and *s*+4. If the FIFO
  runs dry it sets a sticky underflow flag and primes again.

## Sequencing

`master_fsm` is at the top of three state machines:

| state | left on | to |
|---|---|---|
| IDLE | `arm` command | ARMED |
| ARMED | injection trigger (turn counter cleared) | DELAY, or RUN if `start_turn` = 0 |
| DELAY | fiducial making `turn == start_turn` | RUN |
| RUN | fiducial making `turn == start_turn + run_turns` (`run_turns` = 0: never) | DONE |
| DONE | `arm` | ARMED |

Any state goes to IDLE on `abort`. Bunch windows are processed (and the filter
histories updated) in ARMED, DELAY and RUN. Corrections reach the DAC only in
RUN.

* `adc_dsp_ctrl` follows the word stream and fires the windows (states IDLE,
  WAIT_FID, SCAN).
* `dac_ctrl` plays the excitation memory. It starts at the first turn with
  `turn >= exc_start` and steps one entry (16 samples) per turn for `exc_len`
  turns.
* `snapshot_mem` is armed by the same `arm` command. It records the raw window
  of `snap_chan` once per turn from `snap_start`, for `snap_len` turns.
* `timing_diag` measures the turn length in clocks. It sets a sticky flag when
  no fiducial arrives within `fid_timeout` clocks.

## Clocks and reset

There are two clock domains:

* `clk` is the processing clock, which is the ADC word clock. It runs the ADC
  logic, the input FIFO, the filter pipeline, the formatter, the memories,
  the control state machines and the register bus.
* `dac_clk` runs only the read side of the output FIFO and `dac_logic`.

Both clocks come from the same 2 GHz sample clock outside this RTL, so their
rates match on average. The output FIFO absorbs the phase difference between
them. The DAC underflow flag crosses back into `clk` through a two-flop
synchroniser before it reaches the status register. Each domain has its own
synchronous, active-high reset.

## Register map (`ctrl_regs`)

The host bus is synchronous with the processing clock. It has a write strobe,
an 8-bit word address and 32-bit data. Read data appears one clock after the
address.

| addr | access | contents |
|---|---|---|
| 0x00 | W | pulses: [0] arm, [1] abort, [2] clear diagnostics |
| 0x01 | RW | [0] doublet, [2:1] out_mode (0 off, 1 feedback, 2 excitation, 3 FEC), [4:3] amble (0 none, 1 pre, 2 post, 3 split), [5] gain_en, [6] swap_en |
| 0x02–0x05 | RW | n_bunch, first_offset (samples), spacing (samples, reset 100), shift |
| 0x06–0x09 | RW | start_turn, run_turns, swap_start, swap_len |
| 0x0A–0x0C | RW | exc_chan, exc_start, exc_len |
| 0x0D–0x10 | RW | snap_chan, snap_start, snap_len, fid_timeout (reset 12000) |
| 0x11, 0x12 | RW | bunch_en[31:0], bunch_en[63:32] (reset all ones) |
| 0x20–0x3F | W | coefficient: set = addr[4], tap = addr[3:0] |
| 0x40–0x4F | RW | per-slice gain (reset 128) |
| 0x50–0x5F | RW | amble carrier pattern |
| 0x60 | RW | excitation write address (increments after each commit) |
| 0x61–0x64 | RW | excitation data, four slices per register, lowest slice in bits 7:0 |
| 0x65 | W | commit the excitation entry |
| 0x68 | RW | snapshot read address |
| 0x69–0x6C | R | snapshot data, same packing |
| 0x70 | R | [2:0] master state, [3] run, [4] recording, [5] snapshot done, [6] missing fiducial, [7] input FIFO error, [8] output FIFO overflow, [9] DAC underflow |
| 0x71–0x75 | R | turn, snapshot count, missed fiducials, turn length, fiducial count |

## Sizes and limits

| item | value |
|---|---|
| filter channels × slices × taps | 64 × 16 × 16 |
| sample / coefficient / result width | 8 / 8 / 20 bits |
| snapshot memory | 65536 turns × 16 samples |
| excitation memory | 65536 turns × 16 samples |
| in-turn position range | 2^17 words (an SPS turn is about 11,500 words) |

* At most 64 bunches (or 32 doublets) per turn can be processed. A whole
  multi-batch LHC-type fill is larger than that. `first_offset` can place the
  64-bunch group anywhere in the turn.
* `spacing` must be at least 32 samples, and all windows must end before the
  next fiducial.
* The ADC stream must be continuous (one valid word per clock). The output
  timing relies on fixed latencies.

## What follows the described system and what is this design's own

These parts follow the system this RTL implements:

* the block structure;
* 16 slices per bunch, 64 bunches or 32 doublets, 16-tap FIR filters with
  shared coefficients;
* 8-bit data and coefficients with a 20-bit result;
* shift and saturation to 8 bits;
* two coefficient sets swapped by counting fiducials;
* per-slice gain from −1 to +1;
* feedback/excitation/FEC modes, and pre-, post- and split ambles;
* a 65536-turn single-bunch snapshot;
* a three-level state-machine hierarchy;
* input and output FIFOs, with the clock crossing in the output FIFO;
* memory-mapped registers.

These are this design's own choices:

* the 8-sample word and the lane order;
* offset-binary ADC codes;
* window placement by offset and spacing;
* the doublet-to-channel mapping;
* the gain number format and the 0..15 shift range;
* the way the amble is computed from the vector mean and a carrier pattern;
* the excitation memory depth and its one-entry-per-turn playback;
* snapshot and excitation start/length controls;
* the state encodings, register map and bus, FIFO depths, DAC lane order and
  priming.

The 5 ns window is taken as 16 consecutive samples. At 4 GSa/s, 5 ns would
be 20 samples.

## Not included

* The USB 2.0 device interface: the register bus is a port of `wbfb_top`.
* The ADC and DAC clock managers.
* The trigger comparator threshold DACs and general-purpose I/O.
* The converter chips, PLL and frequency multiplier, analog front and back
  ends, power amplifiers and kicker.
* The DDR3 deep snapshot and Ethernet upgrades.
* The 8 GSa/s next-generation system.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. The testbench
for the input FIFO is `tb_sync_fifo` and for the output FIFO `tb_async_fifo`.
Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_fir_bank \
          -Irtl -Itb -y rtl -y tb rtl/wbfb_pkg.sv tb/tb_fir_bank.sv -o sim
./obj_dir/sim
```

The testbenches use loose integer widths. Verilator warns about them, and
`-Wno-fatal` keeps those warnings from stopping the build. The RTL itself
builds without that option.

`tb/tb_wbfb_top.sv` runs the whole design at its default sizes. It drives a
synthetic beam (128-word turns, random slices), programs the registers over the
bus and runs two sequences:

1. Four bunches in FEC mode, with per-slice gains, a two-turn coefficient
   swap, pre-ambles, one masked bunch and a snapshot.
2. Three doublets with split ambles, followed by a dropped fiducial.

A model in the testbench predicts every DAC sample from the ADC samples,
and the testbench compares the whole DAC stream against it. It also reads
back the snapshot and status registers. It counts each mechanism (window
firing, feedback, excitation, swap, amble, saturation, doublets) and fails if
any of them never happened. It runs in a few seconds.

`tb/tb_wbfb_fill.sv` fills the design to capacity, also at default sizes. It
runs three phases:

1. 64 bunches per turn with all 16 taps in use, 20 turns.
2. 32 doublets on all 64 channels, with post-ambles.
3. A snapshot over the full 65536 turns, in short turns.

A model checks every DAC sample of the first two phases. The third phase
checks that the DAC stays silent with the output off, and reads back part of
the snapshot: every 64th entry and the last four. The run takes about
1.1 million clocks, under half a minute.

The testbenches assume a two-state simulator and initialise everything they
read.

# Picosecond readout for a cross-delay-line imager

A cross delay line (CDL) detector turns *where* a particle landed into *when*
pulses arrive. Behind a stack of microchannel plates lie two orthogonal
meander transmission lines. The charge cloud of one particle launches a pulse
towards both ends of each line. The difference of the two arrival times at
the ends of a line is proportional to the position along it. The arrival time
itself gives the third coordinate, so each particle becomes one
(X, Y, t) point:

    X ∝ tA,X − tB,X        Y ∝ tA,Y − tB,Y        t ∝ arrival time

A pulse crosses a 50 mm detector in about 20 ns (≈ 2.5 µm/ps), so the
position resolution is set by how precisely the four arrival times are
measured. This RTL provides the digital data path of such an imager, from
the discriminator pulses to (X, Y, t) events:

* a **time-to-digital converter (TDC)** with five channels (START plus
  STOP1..STOP4) that timestamps every pulse with a 2.17 ps bin, built in
  FPGA logic as a tapped delay line interpolated against a 2.4 ns clock,
  with an on-chip calibration of each channel's delay line;
* a **FIFO link** to a second FPGA;
* a **processing data path** that extends the timestamps to a 19 s range,
  optionally references them to the experiment trigger, rescales them, and
  combines the four end-of-line times into (X, Y, t) events, with an
  optional time gate.

The system it follows is a published two-FPGA instrument (an Artix-7 for the
TDC, a Cyclone V for processing and a 1 Gbit/s UDP link to a PC). The
structure of the TDC and its key numbers come from that instrument. These
parts were never specified there and are this design's own choices: the
readout word format, the rollover scheme, the calibration method, the
event-grouping rule, the time gate and the settings interface. They are marked as such below and in each file's header.

## Units and number formats

Everything in the TDC is counted in **bins of 2.17 ps**.

| Quantity | Value | Why |
|---|---|---|
| Reference clock | 2.4 ns | stop clock of the delay lines and clock of all logic |
| Bins per clock period | `CLK_BINS` = 1106 | 2400 / 2.17, rounded |
| Channel timestamp | 26 bits | 2^26 × 2.17 ps = 0.1456 ms, the TDC full-scale range |
| Extended timestamp | 17 epoch bits + 26 = 43 bits | 2^43 bins ≈ 19 s, above the required 10 s |
| Output time | 48 bits | extended time × `bin_mul` / 256 |
| X, Y | 24-bit signed | ±20 ns of line is only ±9217 bins |

`imager_pkg.sv` holds these constants, the channel codes and the word types:

* `ts_word_t` (29 bits) is `{ch[2:0], ts[25:0]}`, the word sent from the TDC to
  the processing FPGA. `ch` 0 is START, 1..4 are STOP1..STOP4. Code 6
  (`MARK_HALF`) and code 7 (`MARK_WRAP`) are rollover markers.
* `ext_hit_t` is `{ch, t_abs, t}`. `t_abs` is always absolute time. `t` is
  absolute or START-relative, depending on the settings.
* `event_t` is `{ch, x, y, t}`.
* `scdp_cfg_t` holds the settings: `mode`, `rel_start`, `bin_mul`, `window`
  and the time gate `gate_en`, `gate_lo`, `gate_hi`.

## How one channel measures time (`tdc_channel`)

This is the heart of the design. It uses Nutt interpolation. A fast coarse
counter and a short, fine delay line together cover a long range at
picosecond resolution.

```
 pulse_in ──► tdl_delay_line (NTAPS taps) ──q──► edge detect ─► therm_decoder ─► fine_calib ─┐
                  ▲ stop                                                                         ▼
 clk ─────────────┴──────────► coarse_counter ───────────────────────────────────────► ts = T_COARSE − T_FINE
```

* **Delay line** (`tdl_delay_line`). The input edge runs down a chain of
  buffers. Every rising clock edge captures all buffer outputs at once. Tap k
  then shows the input as it was (k+1) tap delays before the clock edge. A
  rising edge therefore appears as a run of ones at the input end of the
  captured word. The length of that run is T_FINE, the time from the edge to
  the clock, in taps.
* **Coarse counter** (`coarse_counter`). It adds 1106 bins on every clock, so
  its value after clock edge k is k × 1106 (mod 2^26). This is T_COARSE, the
  time of the clock edge.
* **Timestamp**. The event happened T_FINE before the clock edge that caught
  it, so `ts = T_COARSE − T_FINE`. The counter counts in bins rather than in
  periods so that this is a single subtraction, and so that it wraps cleanly
  at 2^26.

The channel is a four-stage pipeline. Stages are counted from the clock edge
*e* that captured the line:

| Edge | Stage |
|---|---|
| e+1 | register the captured word; hit = first tap is 1 now and was 0 at the previous capture |
| e+2 | thermometer decode: count the ones (`therm_decoder`) |
| e+3 | calibration table look-up (`fine_calib`, registered read) |
| e+4 | `hit_ts = T_COARSE − T_FINE`, and `hit_valid` pulses for one cycle |

The pipeline takes a new hit in every cycle. The input pulse sets the dead
time:

* The pulse must stay **high for longer than the line**. With NTAPS = 1152 taps
  of 2.17 ps that is 2.5 ns. Otherwise its falling edge is inside the
  captured word and the ones count is wrong.
* The pulse must stay **low for longer than one clock**, so that one capture
  sees the line at rest.

A pulse that is 3.5 ns high and 3.5 ns low meets both rules, so two pulses
7 ns apart on the same input are both measured. This matches the 7 ns dead
time of the original TDC. The testbenches check this pulse pair. The edge
detector is this design's choice; the original design of this stage is not
known.

**Why count ones.** In a real carry chain the tap delays are unequal, and the
captured word can have "bubbles": a stray 0 inside the run or a stray 1 past
it. A ones counter turns each bubble into an error of one bin instead of a
wrong answer.

**Calibration.** Unequal taps also make the raw count nonlinear in time.
`fine_calib` is a table with NTAPS+1 entries that maps the raw count to a
calibrated fine time. At power-up it holds the identity map, which is correct
for the uniform line modelled here. There are two ways to fill it:

* Software writes it directly through `cal_wr_*`.
* `cal_engine` builds it on chip. A pulse on `cal_run` calibrates the channel
  named on `cal_wr_ch`. The method is a code-density test. Hits that arrive
  at random phase to the clock land on each raw code in proportion to that
  code's width in time. The engine clears its histogram (1153 cycles), then
  counts 2^`CAL_LOG2` hits of that channel (2^20 by default). Then it writes
  the table, one entry per cycle (1153 cycles). With C(k) hits below code k
  and h(k) hits in it, entry k is the middle of the code:

      fine(k) = (2·C(k) + h(k)) · 1106 / 2^(CAL_LOG2+1)

  At 2^20 hits the statistical error of an entry is at most about 0.5 bins
  rms. While `cal_busy` is high the engine owns the table port. The other
  channels keep measuring, and the channel under calibration keeps sending
  hits, whose fine times are not trustworthy until the engine is done.

The original design needs a calibration to restore linearity. The table,
the code-density method and the hit count are this design's choices.

**The delay line is a behavioural model.** `tdl_delay_line` models the chain
and its capture flip-flops in simulation time. It keeps the last eight input
transitions and evaluates every tap at each clock edge. It cannot be
synthesized. In an FPGA it must be replaced by a placed carry chain whose
outputs feed flip-flops clocked by `clk`, with the same `q` port. Each model
tap is the *effective* 2.17 ps bin. The original design reaches this bin by
"sub-interpolating" native taps that are tens of picoseconds long. That
technique is not described, so it is not built. `MISMATCH_PCT` adds
pseudo-random tap-delay spread, for trying out calibration.

## TDC FPGA (`tdc_fpga`, `tdc_readout`)

Five `tdc_channel`s share the clock. Channel 0 takes START, the reference
trigger of the experiment. Channels 1..4 take STOP1..STOP4. Their coarse
counters reset together and run in lock-step, so channel 0's rollover flags
stand for all of them. One `cal_engine` serves all five channels' tables.

`tdc_readout` merges the five hit streams:

* Each channel has an 8-deep FIFO, so simultaneous hits are all kept.
* A round-robin arbiter sends one word per clock (416.7 M words/s). The
  maximum load is 5 channels × 10 Mcps = 50 M words/s.
* When the counters cross half range (2^25) or wrap, a `MARK_HALF` or
  `MARK_WRAP` word is sent ahead of pending hits.
* A hit that finds its channel FIFO full is dropped. `overflow` counts the
  cycles in which this happened. This can only happen when the downstream
  link back-pressures.

From the capturing clock edge to `out_valid`, the latency is 6 cycles when
the readout is idle.

## Link and processing FPGA (`sync_fifo`, `fpga_scdp`)

The words cross to the processing side through a 1024-deep FIFO. Both sides
run on the one clock here. The original system uses two boards, whose clocking
is not described. A dual-clock FIFO would drop in at this point.

### Timestamp extension (`ts_extender`)

* **Epochs.** Each `MARK_WRAP` increments a 17-bit epoch counter. The epoch
  goes above the 26-bit timestamp.
* **Late hits.** A hit measured just before a wrap can leave its channel FIFO
  after the wrap marker. The half markers resolve this. If a hit has its top
  bit set, and the last marker seen was a wrap, the hit belongs to the
  previous epoch.
* **Reference.** With `rel_start` set, every STOP time becomes relative to the
  most recent START hit. START hits keep their absolute time. Absolute time
  counts from the last reset, so reset marks the start of acquisition.
* **Bin width.** `t_out = (t × bin_mul) >> 8`, so the output bin is
  2.17 ps × 256 / `bin_mul`. A value of 256 keeps 2.17 ps and 512 gives
  1.085 ps. The original system offers a "selectable bin width"; this
  formula is this design's.
* **Absolute time is kept.** The absolute time is always carried along as
  `t_abs`.

The extender has one output register, takes one word per cycle, and consumes
the markers.

### Event reconstruction (`event_builder`)

Hits are grouped by **absolute** time. Grouping by START-relative time would
merge the hits of different triggers.

* The first STOP hit opens an event.
* Further hits within ±`window` (in output bins) of it are collected, one per
  channel.
* A second hit on a channel that is already collected is dropped and counted
  in `dup_hits`.
* As soon as all needed channels are present, the event is output:

      x = tA,X − tB,X        y = tA,Y − tB,Y        t = (tA,X + tB,X) / 2

  The mean of the two X times does not depend on where the particle landed.
  It is therefore the particle time plus a constant half transit.
* A hit outside the window closes the open event. If that event was
  incomplete, it is counted in `rejected`. The hit then opens a new event.

For a 50 mm detector (20 ns transit) a window of about 12000 bins (26 ns) is
right. Scale it together with `bin_mul`.

| `mode` | Channels needed | Output |
|---|---|---|
| `MODE_CDL2D` | STOP1..4 | x, y, t |
| `MODE_DL1D` (single delay line) | STOP1, STOP2 | x, t (y = 0) |
| `MODE_RAW` (multichannel anode) | – | every hit, START included, as `{ch, 0, 0, t}` |

The original system names these three detector types but does not say how
each is processed. The grouping rule and the choice of t are this design's.
All streams use valid/ready handshakes.

**Time gate.** With `gate_en` set, only events (or raw hits) whose `t` lies
in `gate_lo` ≤ t ≤ `gate_hi` are output. The rest are dropped and counted in
`gated`. The bounds are 32-bit, in output bins. With START-relative time, this
keeps a slice of time after each trigger, for example 30 ns to 1 µs. The
original system lists external gating among its settings without describing
it; gating on the event time is this design's reading.

## Top level (`imager_top`)

| Port | Meaning |
|---|---|
| `clk`, `rst` | 2.4 ns clock; synchronous reset, which also marks the start of acquisition |
| `start_in`, `stop_in[3:0]` | digital pulses from the constant-fraction discriminators: START and STOP1..STOP4 (X end A, X end B, Y end A, Y end B) |
| `cfg` | processing settings (`scdp_cfg_t`) |
| `cal_wr_en/ch/addr/data` | calibration table write port, with channel select |
| `cal_run`, `cal_busy` | start the code-density calibration of channel `cal_wr_ch`; busy until its table is written |
| `ev_valid`, `ev_ready`, `ev` | event stream towards the PC link |
| `tdc_overflow`, `rejected`, `dup_hits`, `gated` | health counters |

These parts of the instrument are analog, external or unspecified, and are
not in the RTL:

* microchannel plates, delay lines, RF amplifiers and constant-fraction
  discriminators (their pulses are the top's inputs);
* the clock oscillator;
* the UDP/Ethernet link and the PC software;
* the register interface through which the PC writes the settings (these
  are plain input ports here).

## Simulating

All files use `` `timescale 1ps/1fs ``. They need Verilator 5 with `--timing`.
For example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/imager_pkg.sv tb/tb_imager_top.sv --top-module tb_imager_top
    ./obj_dir/Vtb_imager_top

Every testbench is self-checking. It ends with
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_imager_top` | Runs at the default parameters. A stand-in detector turns impacts at (px, py) into four 3.5 ns pulses. The test walks through: 2-D events; START-relative time; lost pulses (rejected events); 7 ns pulse pairs (duplicates); a calibration rewrite; a finer output bin; the time gate; 1-D mode; raw mode; running past the 0.1456 ms rollover with absolute times above 2^26; TDC overflow under output back-pressure; finally a code-density calibration of STOP2 from 2^20 random-phase pulses, followed by checked impacts. It counts each mechanism and fails if one never happened. It simulates 8.8 ms in about 80 s, almost all of it the calibration. |
| `tb_delay_scan` | The two bench measurements of the TDC at default parameters. A fine scan of 0–10 ns in 10 ps steps between two channels, at random clock phase: error ≤ 1.5 bins, measured max 0.99 and rms 0.42. A wide scan of 0–1 µs in 20 ns steps, also within 1.5 bins. The largest error up to 500 ns is 1.45 ps. |
| `tb_tdc_fpga`, `tb_tdc_channel` | Timestamps against the true pulse time, within 1 bin. Also the 6-cycle latency, pulse pairs, calibration entries, and the engine's hand-over of the table port. |
| `tb_cal_engine` | A model line with ±60 % tap spread. Each written table entry must be within 1.5 bins of the true code middle. Also checks that hits on other channels and a second start request are ignored, and the write order and busy time. |
| `tb_tdl_delay_line`, `tb_therm_decoder`, `tb_coarse_counter`, `tb_fine_calib` | The primitives, against independent reference computations. |
| `tb_tdc_readout`, `tb_sync_fifo` | Ordering, markers, overflow and full/empty, against queue models. |
| `tb_ts_extender`, `tb_event_builder`, `tb_fpga_scdp` | Epoch extension including late hits, all settings, and event arithmetic, against models built from known absolute times. |

**What one bin really is.** The coarse counter defines the bin: one clock
period is 1106 bins, so a bin is 2400/1106 = 2.169982 ps. A tap of the modelled
line is 2.17 ps, which differs by only 8 ppm. That difference changes a fine
time by at most 0.02 ps. But if timestamps are read as exactly 2.17 ps per
bin, long intervals pick up an 8 ppm scale error, about 4 bins at 1 µs.
`tb_delay_scan` uses the true bin and stays within 1.5 bins over 1 µs. Some
block testbenches pass `TAP_PS = 2400/1106`, so that tap and bin agree
exactly.

## Limits and departures

* **Not synthesizable as delivered.** The delay line is a simulation model
  (see above). Everything else is synthesizable RTL.
* **No metastability handling.** There are no synchronisers on the captured
  taps, and no handling of a wrongly placed edge near the end of the capture
  window. Both matter on silicon.
* **No sub-interpolation.** The native-tap sub-interpolation is not built.
  Calibration uses this design's own code-density engine.
* **One clock for both FPGAs.** Both sides share one clock, and the link FIFO
  is single-clock.
* **Pulse shape is a requirement.** Each pulse must stay high for longer than
  2.5 ns and low for longer than 2.4 ns. The width of the discriminator output
  was not given.
* **Fixed STOP mapping.** STOP1..4 are mapped to X A, X B, Y A, Y B. Channel
  codes leave room for at most six hit channels. An 8-channel TDC, mentioned
  for a later version of the original system, would need a wider `ch`
  field.

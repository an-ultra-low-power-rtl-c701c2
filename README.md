# Zero-crossing voice activity detector for a low-power speech sensor node

A sensor node that listens for speech has a microphone array, an ADC, a
microprocessor and a radio. Together they draw far more current than a button
cell can supply for a whole day. Most of the time nobody is speaking, so most of
that current is wasted. This design is the small circuit that stays on. It
watches a coarse copy of the microphone signal and decides, every 128 ms,
whether the signal holds speech. Only while it does are the main ADC, the
memory, the signal-processing module and the main application module
connected to the supply, and only then does the ADC run at the full rate.

The detector is built to use as little logic as possible. It works in the
time domain on 10-bit samples taken at 2 kHz, uses integer adders,
comparators and one fixed shift, and stores no samples. Its one measure is
how often the signal crosses its own DC level after a large enough swing:
speech does this many times per frame, and quiet background noise hardly
ever does.

This RTL follows the architecture of the published design *An Ultra-Low-Power
VAD Hardware Implementation for Intelligent Ubiquitous Sensor Networks*: an
eight-step algorithm and its block diagram. Where that description gives no
value (trigger levels, decision threshold, reset values, handshakes), the
choices made here are stated below and in each file's header.

## What counts as a zero crossing

This is the part that matters most for the detector's behaviour.

Around the DC offset there are two trigger lines: a high trigger at
`offset + trig_hi` and a low trigger at `offset - trig_lo`. A **zero
crossing** is the first sample that meets or passes the offset line *after*
the signal has gone beyond one of the trigger lines. Wiggles that stay
between the triggers are never counted, however often they cross the
offset. This is what separates low-level noise from speech.

`zero_cross` implements this as a three-state arming machine. It works on
`d = sample - offset`, a signed value one bit wider than the sample, so the
subtraction cannot overflow:

| state | condition on the new sample | result |
|-------|-----------------------------|--------|
| NONE  | `d > trig_hi`               | go to HIGH |
| NONE  | `d < -trig_lo`              | go to LOW |
| HIGH  | `d <= 0`                    | **crossing** (falling); go to LOW if `d < -trig_lo`, else NONE |
| LOW   | `d >= 0`                    | **crossing** (rising); go to HIGH if `d > trig_hi`, else NONE |

A single large swing from above the high trigger to below the low trigger
is therefore one crossing, and it also arms the next one. The arming state
is kept across frame boundaries. The comparisons are this design's reading
of the definition: strictly beyond a trigger, and at-or-past the offset line.

At most one crossing can happen per sample, so a 256-sample frame holds at
most 256 crossings. A 9-bit counter covers that.

## Per-sample and per-frame work

All logic runs on one system clock (100 kHz by default) with a 2 kHz sample
strobe. Each sample is handled completely in the clock cycle after its
strobe. That leaves 49 of every 50 clocks idle at the default rates.

For every sample:

1. `input_reg` keeps the 10 most significant bits of the 16-bit ADC word.
2. `zero_cross` subtracts the current DC offset and detects a crossing.
3. `zc_counter` adds the crossing to the frame's count.
4. `offset_controller` adds the sample to the frame's sum.
5. `frame_counter` counts the sample and flags the frame's 256th.

On the last sample of a frame, which is included in both the sum and the
count:

6. The sum is shifted right by log2(256) = 8 to give the frame mean.
7. The mean becomes the new DC offset, and the sum is cleared.
8. `judge` sets `speech` when the frame's crossing count is at least
   `zc_thr`, and the count is cleared.

Cycle timing, where `t` is the clock edge at which `sample_tick` is high for
the frame's last sample:

```
edge t     input_reg captures adc_data[15:6]
cycle t+1  valid = 1, zc_pulse and frame_end combinational
edge t+2   speech, frame_zc_count, dc_offset renewed; decided = 1 for one cycle
edge t+3   pwr_en, high_rate follow speech; wake or sleep = 1 for one cycle
```

Decisions come exactly 256 x 50 = 12,800 clocks apart (128 ms).

## DC offset tracking

The ADC output has a DC level that drifts with temperature, supply and
noise. Normalising the samples would need division or floating point.
Instead, the detector learns the offset line from the signal itself. The
frame length is a power of two, so the mean is a plain shift of the sum. The
new offset is used from the first sample of the next frame. The sum
register is 18 bits wide, so a frame of full-scale samples cannot overflow
it.

The offset is reset to mid-scale (512). After a step in the DC level, the
first frame at the new level is usually judged non-speech, because the
signal sits entirely beyond one trigger line and never returns to the old
offset. The next frame uses the corrected offset.

Here the new offset is simply the frame mean. The published block diagram
calls this block "offset learning" but does not say how it filters. A
smoothed update would be a small change in `offset_controller`.

## Power management and sampling rates

`power_manager` registers the speech decision into one power state and
drives four supply enables from it (`pwr_en_t`: `main_adc`, `memory`,
`sig_proc`, `main_app`). It also drives `high_rate` and gives one-clock
`wake` and `sleep` pulses at the edges. There is no sequencing, isolation or
retention control. Those depend on the power-switch cells of the target
process.

`sample_rate_gen` makes both strobes from the system clock. A phase
accumulator adds 16,000 each clock and ticks each time it passes 100,000.
This gives exactly 16,000 ticks per second from 100 kHz, spaced 6 or 7
clocks apart. Every eighth tick is the VAD strobe, which is therefore
exactly 50 clocks apart. The ADC conversion strobe `adc_start` runs at
16 kHz while `high_rate` is set and at 2 kHz otherwise. So an idle node
converts only the samples the detector needs.

## Module map

```
vad_top
├── sample_rate_gen      2 kHz VAD strobe, 2/16 kHz ADC strobe
├── vad_core             the detector
│   ├── input_reg        16-bit ADC word -> 10-bit sample
│   ├── zero_cross       offset removal, trigger-armed crossing detection
│   ├── frame_counter    256-sample framing
│   ├── zc_counter       crossings per frame
│   ├── offset_controller  frame sum, mean by shift, offset register
│   └── judge            speech state from the count
└── power_manager        supply enables, rate select, wake/sleep
vad_pkg                  widths, rates, defaults, vad_cfg_t, pwr_en_t, arm_e
```

### `vad_top` interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | system clock (100 kHz default), asynchronous active-low reset |
| `adc_data` | in | 16 | ADC output word, offset binary; taken at the edge where `sample_tick` is high |
| `cfg` | in | `vad_cfg_t` | `trig_hi`, `trig_lo` (10 bits each), `zc_thr` (9 bits) |
| `adc_start` | out | 1 | one-clock conversion request to the ADC |
| `sample_tick` | out | 1 | the VAD takes `adc_data` at this clock edge |
| `speech` | out | 1 | detector result, renewed once per frame |
| `pwr_en` | out | `pwr_en_t` | supply enables of the four controlled domains |
| `high_rate` | out | 1 | ADC at 16 kHz |
| `wake`, `sleep` | out | 1 | power-up / power-down edge pulses |
| `decided` | out | 1 | a frame has just been judged |
| `frame_zc_count` | out | 9 | crossings of the last judged frame |
| `dc_offset` | out | 10 | current DC offset estimate |
| `zc_pulse`, `zc_fall` | out | 1 | a crossing on this sample, and whether it came from above |

The last four outputs exist for observation and tuning. Nothing inside the
node needs them.

## Parameters and defaults

From the published design: a 16-bit ADC bus, 10-bit VAD samples, a 2 kHz VAD
rate, a 16 kHz main rate, a 256-sample frame, and the 100 kHz clock of the
standard-cell version. These are the defaults in `vad_pkg` and in the module
parameters.

Chosen here, because the source gives no numbers:

| item | default | where |
|------|---------|-------|
| high / low trigger | 16 codes each | `vad_pkg::TRIG_HI_DEFAULT`, `TRIG_LO_DEFAULT`, runtime via `cfg` |
| decision threshold | 8 crossings per frame, `count >= thr` | `vad_pkg::ZC_THR_DEFAULT`, runtime via `cfg` |
| offset after reset | 512 (mid-scale) | `offset_controller.OFFSET_INIT` |
| sample bits kept | `adc_data[15:6]` | `input_reg` |
| reset state | non-speech, all domains off | all blocks |

`FRAME_LEN` must be a power of two, and an elaboration-time assertion checks
this. `MAIN_FS` must be a multiple of `VAD_FS`, and `CLK_HZ` at least
`MAIN_FS`.

The triggers and threshold set the trade-off between missed speech and false
alarms, and they depend on the microphone gain and the noise floor. They are
run-time inputs so that firmware, or a later adaptive scheme, can set them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog.
`tb/vad_ref_pkg.sv` holds an integer reference model of the whole algorithm
and a test-signal generator: a wandering tone over a DC level, plus noise.

| testbench | what it shows |
|-----------|---------------|
| `tb_input_reg` | bit selection, one-cycle valid, hold between strobes |
| `tb_zero_cross` | a hand-worked sequence; wiggles inside the triggers never count; random waveforms, offsets and triggers against the model |
| `tb_frame_counter`, `tb_zc_counter` | frame end on every 256th sample; count includes the last sample and restarts; a crossing on every sample |
| `tb_offset_controller` | offset = truncated frame mean, drifting DC levels, full-scale frames |
| `tb_judge` | decision at, above and below the threshold |
| `tb_sample_rate_gen` | one simulated second per mode: 2,000 VAD strobes 50 clocks apart, 16,000 main strobes, ADC strobe count per mode |
| `tb_power_manager` | enables follow speech one clock later, one wake or sleep pulse per edge |
| `tb_vad_core` | 12 frames with a DC jump: every decision, count and offset against the model; two-clock decision latency |
| `tb_vad_top` | whole node at default parameters, 14 frames: decisions, frame period of 12,800 clocks, power state, 2,048 or 256 ADC strobes per frame; checks that crossings in both directions, offset renewal, speech onset and end, wake, sleep, both ADC rates and a loud-noise frame rejected by the triggers each happen |
| `tb_vad_snr` | 15 minutes of signal (7,031 frames) at S/N of 20, 10, 0, -10 and -20 dB: every frame against the model; prints the rates of correct decisions, false acceptances and false rejections against the frame labels |

The S/N run uses fixed triggers of 16 codes and a tone of 40 codes. It is
error-free at 20 dB. From 10 dB down, the noise alone passes the triggers
often enough that nearly every pause is reported as speech. This is the
known weakness of fixed thresholds. The rates are printed, not checked,
because they depend on the chosen settings and on the synthetic signal.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vad_pkg.sv tb/vad_ref_pkg.sv tb/tb_vad_top.sv \
    --top-module tb_vad_top -Mdir obj_tb_vad_top -o sim
./obj_tb_vad_top/sim
```

Replace `tb_vad_top` with any other testbench name. The other RTL files are
found through `-Irtl`. To lint one module, use
`verilator --lint-only -Wall -Irtl rtl/vad_pkg.sv rtl/vad_top.sv`. All
testbenches together run in well under a minute.

## Size

After coarse synthesis, the whole of `vad_top` is about 100 word-level cells
and 93 flip-flop bits. Of those, 70 bits are the detector: 10 input, 18 sum,
10 offset, 9 count, 8 frame index, 2 arming state, and the judge's outputs.
The published FPGA prototype reported 1,015 slice flip-flops and 3,831 4-input
LUTs. That figure includes logic on the FPGA that is not described and is not
part of this RTL.

## Departures and limits

- **Offset update.** The new offset is the plain frame mean. The published
  "offset learning" block may filter it, but how is not specified.
- **ADC width.** The published text gives a 10-bit ADC, while its block
  diagram shows a 16-bit ADC bus that is reduced to 10 bits. This RTL takes
  a 16-bit word and keeps the top 10 bits. For a 10-bit ADC, set `IN_W = 10`
  on `input_reg`/`vad_core`, or wire the ADC to `adc_data[15:6]`.
- **Input register clocking.** The published prototype registers the input
  asynchronously to the system clock. Here everything is in one clock domain
  with a 2 kHz enable. An ADC on another clock needs a synchroniser in front
  of `adc_data`.
- **One ADC.** The node diagram shows a separate small ADC for the detector
  and a main ADC for the signal path. This RTL drives one ADC port and
  changes its rate. With two ADCs, use `sample_tick` for the small one, and
  `pwr_en.main_adc` with the 16 kHz strobe for the main one.
- **No hangover.** The decision is renewed every frame with no smoothing.
  Isolated noisy frames toggle the power state.
- **Adaptive triggers are not included.** A proposed extension adapts the
  triggers from the standard deviation of the signal in pauses, with
  `SD_n' = (SD_{n-1} + a*SD_n) / (1 + a)`. It is not part of this design.
  The triggers are run-time inputs, so such a scheme can be added outside
  `vad_core`.
- **Outside this RTL:** the microphones, the ADC, the microprocessor and its
  memory, the signal-processing and application modules, and the radio.
  Only their supply enables and the ADC strobe leave `vad_top`.

# Sleep stage classifier on one time-shared filter

This RTL classifies sleep into AWAKE, NREM and REM in real time from three
bio-signals: cortex EEG, hippocampus EEG and neck EMG. It also flags the peaks
of the hippocampal theta rhythm (5-10 Hz), which a closed-loop stimulator can
use for timing.

The method is filtering and then thresholding. Each channel is band-passed to
its band of interest:

| channel | signal          | band       | sample rate |
|---------|-----------------|------------|-------------|
| EEG1    | cortex EEG      | 0-4 Hz     | 200 S/s     |
| EEG2    | hippocampus EEG | 5-10 Hz    | 200 S/s     |
| EMG     | neck EMG        | 100-200 Hz | 800 S/s     |

Each band-passed signal is then rectified and averaged over a window of about
10 s. The classification rule is:

- If the averaged EMG is above threshold `vth_emg`, the stage is **AWAKE**.
- Otherwise, if the ratio of the theta average to the delta average
  (hippocampus / cortex) is above `vth_ratio`, the stage is **REM**.
- Otherwise the stage is **NREM**.

The main idea of the architecture is area. Three FIR filters and three
averaging filters would be far too large for a small low-power FPGA (about
1500 logic cells). So the design has **one** filter, shared in time by all
channels and both filter types. The samples arrive slowly (at most 800 S/s)
while the logic runs at 1.7 MHz, so a single multiply-accumulate unit can do
all the work one product per clock. A 64-tap FIR and a 512-sample window
average are the same computation, `D = sum C_i * D_i`: for the average, `C_i`
is always 1 and `k` is 512 instead of 64. The rest of the design keeps that
one unit busy in the right order.

## Block diagram

```
 ser_in[0] EEG1 ─┐
 ser_in[1] EEG2 ─┼─ channel mux ─ deserializer ─┐          ┌─> sleep_stage_detect ─> sleep_stage
 ser_in[2] EMG  ─┘   (signal_acquisition)       ├─ filter ─┤     (thresholds, divider on clk_div)
                                                │  input   │
                            ┌───────────────────┤  mux     ├─> peak_detect (EEG2 FIR output) ─> peak
                            │                   └────┬─────┘
                            │     fir_avg_filter ────┘ (output fed back for averaging)
                            │
              control_fsm: channel select, timing control, mode selection, output enable
```

| module               | role |
|----------------------|------|
| `sleep_classifier_top` | wiring, filter input mux, output register |
| `control_fsm`        | schedule of all work, synchronizes the 800 Hz sampling clock |
| `signal_acquisition` | 3:1 channel mux and 8-bit serial-to-parallel converter |
| `fir_avg_filter`     | the shared filter: RAMs, coefficient ROM, muxes, MAC, scaling |
| `filter_ram`         | 512 x 8 synchronous RAM (four instances) |
| `coeff_flashrom`     | 96 x 8 coefficient ROM (initialised from `rtl/fir_coeffs.hex`) |
| `ram_offset_calc`    | adds the channel base address in the shared FIR RAM |
| `mac_unit`           | 8x8 signed multiply, 15-bit product, 16-bit accumulate |
| `sleep_stage_detect` | holds the averages, divides, thresholds; clock crossing to `clk_div` |
| `serial_divider`     | 8-bit division by repeated subtraction |
| `peak_detect`        | local-maximum detector on the theta-band signal |
| `sleep_pkg`          | channel and stage enums, widths and sizes |

## The shared filter (`fir_avg_filter`)

This block is the heart of the design and the hardest part to follow.

### Memories

There are four 512 x 8 RAMs, all with one-cycle synchronous reads.

- **FIR RAM.** It holds the 64-sample delay lines of all three channels, side
  by side. The filter always produces local addresses 0-63, and
  `ram_offset_calc` adds the channel base: 0 for EEG1, 64 for EEG2, 128 for
  EMG. Each delay line is a circular buffer. The write pointer `wp[ch]` moves
  on by one for each new sample, and tap *i* reads address `(wp - i) mod 64`.
  Words 192-511 are unused.
- **Three window RAMs.** There is one per channel, and each holds that
  channel's last 512 rectified values as a ring with pointer `ap[ch]`.

A "RAM selection" mux sends the address to the right RAM. A "data in/out" mux
picks the RAM output that goes to the multiplier.

### Coefficients

Each FIR filter is symmetric: `h[i] = h[63-i]`. So only 32 coefficients per
channel are stored, 96 words in all:

- EEG1: addresses 0-31
- EEG2: addresses 32-63
- EMG: addresses 64-95

Tap *i* reads coefficient `min(i, 63-i)` plus the channel offset. A
coefficient mux replaces the ROM word by the constant 1 in averaging mode. The
coefficients are Hamming-windowed sinc band-pass designs in signed Q1.7
format:

```
h[n] = w[n] * ( 2 f2/fs * sinc(2 f2/fs * m) - 2 f1/fs * sinc(2 f1/fs * m) ),  m = n - 31.5
w[n] = 0.54 - 0.46 cos(2 pi n / 63)
coefficient = clip(round(128 h[n]), -127, 127)
```

The parameters (f1, f2, fs) are (0, 4, 200) for EEG1, (5, 10, 200) for EEG2
and (100, 200, 800) for EMG. `rtl/fir_coeffs.hex` holds these values, and the
testbenches compute them again from this formula. For your own filters,
replace the 96 words in that file.

With only 8 bits, the narrow EEG bands get coarse coefficients (largest value
5 or 6). That is enough to separate the bands in simulation, but it is the
first thing to revisit with real data.

### The two modes

A run is started with a one-cycle `start` pulse. `done` pulses when it ends.

| mode | `avg_mode` | what happens | cycles, `start` to `done` |
|------|-----------|--------------|---------------------------|
| FIR  | 0 | write `din` into the delay line, then 64 products | 68 |
| AVG  | 1 | if `wr_win` is set, write `min(|din|, 127)` over the oldest window entry; then sum all 512 entries | 516 (515 without the write) |

The reference design numbers four filter modes. They map onto `avg_mode`
and the channel select as follows:

- Mode 1 (FIR 0-4 Hz) is `avg_mode` = 0 with EEG1.
- Mode 2 (FIR 5-10 Hz) is `avg_mode` = 0 with EEG2.
- Mode 3 (FIR 100-200 Hz) is `avg_mode` = 0 with EMG.
- Mode 4 (window averaging) is `avg_mode` = 1, with the channel choosing the
  window RAM.

The pipeline runs in this order:

1. Issue an address to the RAM and the ROM.
2. The data and coefficient arrive one cycle later.
3. The MAC adds the product at the next clock edge.

The number of products is simply the number of cycles the address counter
runs.

The 16-bit sum becomes an 8-bit result as follows:

- **FIR:** the sum shifted right by 7 (arithmetic) and saturated to -128..127.
- **AVG:** the sum divided by 512 (range 0..127). As an unsigned number the
  16-bit sum cannot overflow, because 512 x 127 < 65536.

After reset, the block writes zeros to all four RAMs for 512 cycles, with
`busy` high. This way the delay lines and windows start empty.

### Feedback for averaging

In the top level, a filter input mux gives the filter either the new sample
from the deserializer (FIR mode) or the filter's own output (AVG mode). The
FSM always runs the average right after that channel's FIR run, so in AVG mode
`din` is the FIR result just computed.

### Window length: 512 entries covering 10.24 s

Averaging runs once per 200 S/s frame. If a new value entered the window at
every frame, 512 entries would cover only 2.56 s. The intended window is about
10 s: 10.24 s was the best-scoring length in the accuracy-versus-window study
behind the design. So the FSM writes the window only on every
`AVG_STRIDE` = 4th frame: 512 x 4 / 200 S/s = 10.24 s. The average is still
recomputed every frame, so a stage decision is made every 5 ms.

## Schedule and timing (`control_fsm`)

`sample_clk` is the 800 Hz sampling clock. It is synchronized with two flops,
and each rising edge starts a pass.

- **Passes 1-3 of 4:** the EMG sample is acquired (10 cycles) and FIR-filtered
  (68 cycles). Then the FSM waits for the next edge.
- **Pass 4 of 4 (a frame):** the EMG pass continues at once with these steps:

```
EMG  average                              516
EEG1 acquire, FIR, average          10 + 68 + 516
EEG2 acquire, FIR (-> peak_detect), average
detection (divide + threshold)      ~ 10, depends on the ratio
output enable -> stage_valid
```

Measured at the top, `stage_valid` comes **1797-1800 clk cycles** after the
sampling edge that completes a frame. That is 1.06 ms at 1.7 MHz. It fits in
the 2125 cycles between two 800 Hz edges, so no sample is lost. But it is
longer than the 1670 cycles (0.98 ms) reported for the original
implementation. The three 512-cycle window sums alone take 1536 cycles. Going
under 1 ms needs a clock of at least 1.8 MHz, or a cheaper averaging step.

If a sampling edge arrives while a pass is still running, it is remembered
(one deep). If a second one arrives too, the sticky `overrun` output is set.

## Division and the second clock (`sleep_stage_detect`, `serial_divider`)

The theta/delta ratio needs an 8-bit division. A combinational divider would
cost more logic than the whole filter, so `serial_divider` instead counts how
many times the denominator can be subtracted, one subtraction per clock. On
its own 40 MHz clock (`clk_div`), even the worst case of 255 subtractions
takes only about 11 filter-clock cycles. Division by zero returns 255.

The two clocks may be unrelated. The crossing works like this:

1. The operands are held in registers on the `clk` side.
2. A request toggle crosses to the `clk_div` side through two flops.
3. When the divider finishes, an acknowledge toggle crosses back through two
   flops.
4. The quotient is read on the `clk` side only after the acknowledge arrives,
   and it no longer changes then.

The reset of the `clk_div` side is asserted asynchronously and released
through a two-flop synchronizer.

## Theta peak detection (`peak_detect`)

Every EEG2 FIR output (5-10 Hz band) is examined. A sample is reported as a
peak when all three of these hold:

- It is higher than the sample before it.
- It is not lower than the sample after it.
- It is above `PEAK_MIN` (default 0).

`peak` is a one-cycle pulse issued as the following sample is processed. That
is one sample period (5 ms) after the actual crest, which is short next to a
100-200 ms theta period.

## Interface of `sleep_classifier_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | filter clock, 1.7 MHz nominal |
| `clk_div` | in | 1 | divider clock, 40 MHz nominal, may be asynchronous |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `sample_clk` | in | 1 | 800 Hz sampling clock, asynchronous |
| `ser_in` | in | 3 | serial lines `{EMG, EEG2, EEG1}` |
| `vth_emg`, `vth_ratio` | in | 8 | thresholds on the EMG average and on the ratio |
| `ser_chan` | out | 2 | channel being read: 0 EEG1, 1 EEG2, 2 EMG |
| `ser_load` | out | 1 | front end must put a new sample of `ser_chan` on its line, MSB first |
| `ser_shift` | out | 1 | one bit is taken per `clk` edge while high (8 cycles) |
| `sleep_stage` | out | 2 | 0 AWAKE, 1 NREM, 2 REM; changes only with `stage_valid` |
| `stage_valid` | out | 1 | one-cycle pulse per 200 S/s frame |
| `peak` | out | 1 | one-cycle pulse per theta peak |
| `eeg_ratio`, `emg_avg` | out | 8 | the two quantities compared with the thresholds |
| `overrun` | out | 1 | sticky: sampling edges came faster than they could be served |

Samples are 8-bit two's complement. The threshold values depend on the
recording set-up and are left to the user.

Parameters:

- `AVG_STRIDE` on the top (default 4) sets the window length.
- `fir_avg_filter` has `TAPS` (64), `WIN_LEN` (512) and `COEF_FRAC` (7).

## Where this RTL fills in or departs from the reference design

The following come from the reference design: the block structure, the data
widths (8-bit data and coefficients, 15-bit products, 16-bit sums, 9-bit RAM
and 7-bit ROM addresses), the 64 taps and 512-entry windows, the 0/32/64
coefficient offsets, the EMG-every-edge / EEG-every-fourth schedule, the
classification rule, and the subtracting divider on a faster clock.

The following are this design's own choices:

- **Coefficient values.** See the formula above.
- **Serial front-end protocol.** One load cycle, then 8 bits MSB first.
- **Channel and stage encodings.**
- **Rectification before averaging and the output scaling.**
- **Window stride of 4.** See above; without it, 512 entries do not span 10 s.
- **Frame order:** EMG, EEG1, EEG2.
- **Comparisons are strict (`>`).**
- **Divide-by-zero result of 255.**
- **The peak rule.**
- **Reset-time RAM clear.**
- **Clock-crossing handshake.**
- **The `overrun` flag.**

Known differences:

- **Latency.** It is about 1800 cycles here against 1670 in the reference (see
  above).
- **16-bit FIR sum.** The sum is kept on 16 bits as in the reference and
  wraps. With the supplied coefficients the largest possible sum,
  128 x (sum of |coefficients|) = 28672 for the EMG filter, stays inside
  +-32767. Other coefficient sets must keep to that bound.
- **Ratio resolution.** The theta/delta ratio is an 8-bit by 8-bit integer
  division, as in the reference. Both averages lie in 0..127, so the quotient
  is a small integer (typically 0-3), and `vth_ratio` can only choose among
  these few steps. Scaling the numerator (for example, shifting it left by a
  few bits into a wider divider) would give a finer ratio, at the cost of a
  wider divider and proportionally more subtraction cycles.
- **Memories.** The FlashROM and block RAMs of the target FPGA are written as
  plain arrays. A synthesis tool maps them to its own memories.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends. `tb/frontend_model.sv` stands in for
the recording front end. `tb/tb_coef_pkg.sv` computes the reference
coefficients from the formula above. `tb/tb_model_pkg.sv` holds an integer
model of the whole algorithm, used by the two end-to-end tests.

Run from the repository root, because the ROM image is read as
`rtl/fir_coeffs.hex`. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/sleep_pkg.sv tb/tb_coef_pkg.sv tb/tb_model_pkg.sv tb/tb_sleep_classifier_top.sv \
  --top-module tb_sleep_classifier_top -Mdir obj_top
./obj_top/Vtb_sleep_classifier_top
```

Replace the testbench name to run the others (`tb_fir_avg_filter`,
`tb_control_fsm`, `tb_sleep_stage_detect`, and so on).

`tb_sleep_classifier_top` runs the top at its default parameters with the
reference clock rates, for 160 frames (0.8 s of signal, about 15 s of
simulation). The front-end model serves synthetic signals:

- a 2 Hz cortex wave
- a 7 Hz hippocampus wave
- a 150 Hz EMG wave

Their amplitudes change every 40 frames.

An integer model of the whole algorithm predicts every frame: stage, ratio,
EMG average, and the running count of theta peaks. The thresholds rotate so
that all three stages occur. The test also checks four more things:

- The latency is at most 1900 cycles.
- A division by zero occurs.
- Window writes and skipped writes both occur.
- Sampling edges sent too fast set `overrun`.

The unit tests check each block against its own model:

- filter results against a convolution model
- exact cycle counts of acquisition, filter runs and divisions
- the FSM's strobe sequence against the expected schedule
- the divider and classifier across asynchronous clocks

`tb_sleep_session` is a longer, recording-style run: 2200 frames (11 s of
signal, about 40 s of simulation). That is long enough for every 10.24-s
window to fill and wrap. The signals go through REM-like, NREM-like and
AWAKE-like segments of 550 frames each, and the thresholds stay fixed
(`vth_emg` = 20, `vth_ratio` = 1). The stage then follows the signals with
the lag of the averaging window. The test checks every frame against the
model and requires all three stages. To keep the run short, its divider
clock is 8 MHz rather than 40 MHz.

# Signal-derived timing DSP: a clockless digital IIR filter system and a variable-rate FIR

A conventional DSP samples its input on a fixed clock. It works and burns power at that rate
whether or not the input is doing anything. This design takes its timing from the signal instead.

* **CT digital IIR filter system (`ctdsp_system`).** The input is a *continuous-time (CT) digital
  signal*: a 7-bit value plus an event strobe that fires only when the value changes. Examples are
  a level-crossing ADC, or a DT ADC whose output is held and only reported when it changes. The
  filter has no sampling clock. Its delays are real delay lines of small delay cells, and an event
  running down a line *is* the delayed signal. The data word waits in a FIFO, and the event
  fetches it when it comes out of the line. Arithmetic happens only when events arrive. A
  redundant-event detector stops the recursive loop once its state stops changing, so a silent
  input means a silent filter.
* **Variable-rate FIR DSP (`vr_dsp`).** A clocked FIR fed by an ADC that samples slowly while
  the input is quiet and M times faster while it is busy. The DSP clock follows the sampling
  clock, but the tap *delay* stays T0 at both rates, so the frequency response does not move when
  the rate changes.

The two are independent and sit side by side in `dsp_top`.

---

## 1. How time is represented

A clockless circuit cannot be written as synthesizable synchronous RTL directly. This RTL
emulates it on a fine **time-base clock** `clk`:

* One tick stands for 1 ns.
* A *delay cell* is a counter. An event taken at tick *t* is offered at *t + tune*.
* The analog bias voltages that set the cell delays become three tune inputs:

  | input        | sets                                                                          | default (ticks)  |
  |--------------|-------------------------------------------------------------------------------|------------------|
  | `tune_b1`    | tg of the grouper window, tap 1, pipeline, event detector and interpolator    | 25 (tg = 25 ns)  |
  | `tune_b2`    | tg of the tap-2 cells                                                         | 25               |
  | `tune_bhalf` | every half-delay cell                                                         | 12 (≈ 12.5 ns)   |

* Four-phase request/acknowledge handshakes become one-tick transfers. `req` is a level
  ("I hold an event"), `ack` is a level ("I can take it"), and the event moves in the tick where
  both are high.

Everything else is ordinary RTL: registers, FIFOs and adders. The emulation keeps the
*structure* of the clockless design (who triggers whom, and how long each path takes). It does
not keep its analog behaviour: delay mismatch, jitter and energy per event are not modelled.

---

## 2. The sixth-order CT IIR filter (`iir_filter`)

### 2.1 One timing path for three biquads

The filter is three direct-form-II biquads in cascade. Each biquad needs w(t − TD) and
w(t − 2TD). All three sections use the same TD, so all their delayed nodes change at the same
instants. One timing path with just **two tap delays** can therefore drive the whole filter: it
says when each register loads and when each FIFO is written or read. The 16-bit words live in
three FIFOs, one per section (`async_fifo`, 128 × 16 bits, one write port and two read ports).
Port 1 reads a word when its event leaves tap 1 (age TD). Port 2 reads it when the event leaves
tap 2 (age 2TD).

```
 input ──► grouper ──► P1 ─ P2 ─ P3 ─ P4 ─ P5 ──┬─► output event (out_req/out_data)
            ▲  ▲                                 │
            │  │                                 ▼
            │  │                         event detector ── drop redundant events
            │  │                                 │  (write FIFO1..3 when an event passes)
            │  │                                 ▼
            │  └──── R1 ◄── rest of tap 1 (33 cells) ◄┘
            │                  │
            └─────── R2 ◄── half cell + tap 2 (40 cells)
```

`iir_timing_block` holds the loop, `event_detector` the detector, and `iir_datapath` the FIFOs,
registers and adders.

### 2.2 Grouping (`iir_grouper`)

Three kinds of event reach the grouper:

* an input event;
* R1, an event at the end of tap 1 (its word is TD old);
* R2, an event at the end of tap 2 (its word is 2TD old).

The first event opens a window of length tg. What arrived in the window leaves as one group,
tagged with the one-hot `req_grp` code. That tag tells the data path which FIFO reads to make.

| state | meaning                 | next                                                                              |
|-------|-------------------------|-----------------------------------------------------------------------------------|
| S0    | idle                    | input → S1, R1 → S2                                                               |
| S1    | holds an input          | R1 → S2 (window restarts: *window extension*); another input replaces the held value (*collision*) |
| S2    | holds R1                | R2 → S3                                                                           |
| S3    | holds R1 and R2         | waits for the window to close                                                     |

When the window closes the group leaves with tag `IN`, `R1` or `R1R2`.

An R2 that finds no R1 is *lone*. This happens when the detector dropped that R1's event. A lone
R2 is passed on with tag `R2`. It advances the FIFO read pointers of ports 2 without loading any
register, and it is discarded after P1.

Why R2 always falls inside the window of its R1:

* The loop from an R1 take back to the next R1 arrival is exactly 40 tg = TD (1000 ticks). That
  is 1 tg of window, 5 tg of pipeline, 1 tg of detector and 33 tg for the rest of tap 1.
* Tap 2 starts where tap 1 ends and takes 40 tg + tg/2. So the R2 of pass *n* arrives tg/2 after
  the R1 of pass *n + 1*, in the middle of its window.

### 2.3 Pipeline and arithmetic (`iir_datapath`, `iir_mac`)

The group leaves the grouper and passes the pipeline cells P1..P5, which trigger the register
stages:

| strobe | loads                                   | computes                                                        |
|--------|-----------------------------------------|-----------------------------------------------------------------|
| group  | DFF4 ← x, w1(t−TD), w1(t−2TD); FIFO2 read | ADD1: w1 = g·x + a11·w1(t−TD) + a12·w1(t−2TD)                  |
| P1     | DFF5; FIFO3 read                        | ADD2: w2 = section-1 feed-forward + section-2 feedback          |
| P2     | DFF6                                    | ADD3: w3 = section-2 feed-forward + section-3 feedback          |
| P3     | DFF7                                    | ADD4: y = section-3 feed-forward                                |
| P4     | DFF8 (w1, w2, w3, y)                    |                                                                 |
| P5     | output event and event detector         |                                                                 |

Each feed-forward sum is folded into the next section's adder, so four adders in four stages do
the whole sixth-order filter. Arithmetic is as follows:

* 16-bit two's complement words.
* 10-bit coefficients with 8 fractional bits (range −2 … +2).
* The input x is the 7-bit input placed in the top bits: x·256.
* Each sum is truncated toward −∞, then saturated to 16 bits.

An output event leaves 6 tg after its group's window opened. In steady operation one leaves every
TD.

### 2.4 Event detector (`event_detector`)

Once its input stops changing, a recursive loop would circulate forever. The detector compares
the three state words w1, w2, w3 of each event with those of the last event that passed it,
during the tg its own cell takes. The comparison covers the top 9 … 16 bits (`ed_res` = 0 … 7).
If all three match, the event is dropped: no FIFO write and no further loop pass. What follows:

* the previous pass's R2 arrives alone;
* the loop falls silent;
* the output holds its last value.

With `ed_en` = 0 nothing is dropped.

### 2.5 Equivalence with a DT filter

From a quiet start, one input event makes the filter behave exactly like a DT filter with period
TD: output *n* leaves at t_in + 6 tg + n·TD with value y[n] of the DT recursion. `tb_iir_filter`
checks this value by value and tick by tick against an independent model.

After a later input event at an arbitrary time, the filter is no longer exactly a DT filter. Two
differences remain:

* the held states restart from the detector's last comparison;
* the lone R2 word is discarded.

The output then settles within a few LSB of the DT value.

For a continuously moving input the response is that of the DT twin evaluated at
z = e^{j2πf·TD}, so it repeats every 1/TD = 1 MHz. `tb_iir_tone` feeds sine tones, sending an
event each time the 7-bit quantised value changes. The output amplitudes match A·256·|H| within
about 1 % at 10 and 40 kHz. A 200 kHz tone leaves less than 60 LSB of 16 bits.

### 2.6 Default configuration

The scan chain resets to a sixth-order Butterworth low-pass at 50 kHz for TD = 1 µs. The
coefficients are this design's own, not the original chip's:

| section   | a1 (fb1) | a2 (fb2) | b0 | b1  | b2 |
|-----------|----------|----------|----|-----|----|
| 1         | 375      | −138     | 5  | 10  | 5  |
| 2         | 400      | −164     | 6  | 12  | 6  |
| 3         | 451      | −218     | 64 | 128 | 64 |

The input gain is g = 19. Values are in units of 1/256. DC gain is ≈ 1.04, with no saturation
for any input step.

---

## 3. Interpolation filter (`interp_filter`, `fir_section`, `fir_grouper`)

The CT filter has the same repeated passbands at multiples of 1/TD as a DT filter with period TD.
Four first-order CT FIR sections, y(t) = c0·x(t) + c1·x(t − τ), remove them. The defaults are
τ = TD/2, TD/4, TD/8 and TD/16 (20, 10 and 5 cells, then 2 cells plus a half cell), with
c0 = c1 = ½. Their notches fall on every k/TD that is not a multiple of 16/TD.

Each section is built like the IIR filter:

* the event goes down a delay line while its value waits in a FIFO (32 words);
* a two-input grouper joins the direct event and the delayed event when they fall in one tg
  window;
* the output is formed when that window closes.

`n_fir` (0 … 4) selects how many sections are used. The rest pass events straight through.

## 4. CT-to-DT converter (`ct2dt_converter`)

The held CT output is sampled by a 1 MHz clock (`clk_dt`):

1. The 8 MSBs (offset binary) become a 255-bit thermometer code.
2. The code and the 8 LSBs pass two flip-flop stages.
3. A population count decodes the MSBs again.

A value that changes close to a sampling edge can disturb only one thermometer bit, so the
decoded word is never far off. The output is valid three `clk_dt` edges after the CT value. With
`therm_en` = 0 the MSBs bypass the thermometer code.

## 5. Configuration (`scan_chain`)

All configuration is one word of type `cfg_t`, shifted in MSB first with `scan_en` and applied
with `scan_update`. The old word comes out on `scan_out` as the new one goes in. Fields, from the
MSB:

| field         | bits   | meaning                                                |
|---------------|--------|--------------------------------------------------------|
| `g_in`        | 10     | input gain                                             |
| `sec[2:0]`    | 3 × 50 | biquads: fb1, fb2, ff0, ff1, ff2 (10 bits each)        |
| `tap1_cells`  | 7      | tap-1 length in cells (39)                             |
| `tap2_cells`  | 7      | tap-2 length in cells (40)                             |
| `ed_en`       | 1      | event detector on                                      |
| `ed_res`      | 3      | detector resolution: 9 + `ed_res` bits                 |
| `n_fir`       | 3      | interpolation sections used (0 … 4)                    |
| `fir[3:0]`    | 4 × 28 | per section: cells (7), half cell (1), c0 (10), c1 (10)|
| `therm_en`    | 1      | thermometer path of the converter                      |

The system outputs are:

* `ct_req`/`ct_data`: CT output events and the held value;
* `dt_data`: the converter output;
* `sys_out`: selected by `sel`;
* `probe1..3`: toggle at every input event, every tap-1 end and every tap-2 end (for
  calibrating TD);
* `err`: a FIFO overflow or underflow.

---

## 6. Variable-rate FIR DSP (`vr_dsp`)

A K-th-order FIR (default K = 10) with tap delay T0. The sampling rate is 1/T0 (slow) or M/T0
(fast, default M = 4). `clk` is the base clock at M/T0, and `fast` tells which rate the ADC uses.

* The delay line has K·M + 1 places.
* At the fast rate the taps are M places apart. At the slow rate they are the first K + 1 places.
* In both cases tap k holds the input as it was k·T0 ago.

| mode      | DSP clocks                       | what happens                                                                 |
|-----------|----------------------------------|------------------------------------------------------------------------------|
| SLOW      | one per slow sample              | shift places 0..K                                                            |
| → FAST    | (at the first fast sample)       | slow samples are spread over the fast places, each place getting the sample held at the instant it stands for; this takes into account when, within the slow period, the first fast sample came |
| FAST      | one per fast sample              | shift all places                                                             |
| F2S       | every base cycle                 | after the last fast sample the line keeps moving, shifting in copies of the last sample between slow samples, until no fast sample is left on a tap (K·M cycles) |
| → SLOW    | (at the next slow sample)        | the line is compacted to one place per tap                                   |

The output y = Σ h[k]·tap_k is produced for every DSP clock at full precision (24 bits), and
registered. The work done follows the input activity. For an 80 ms test profile (20 ms slow,
20 ms fast, 40 ms slow, T0 = 20 µs) the DSP clocks 7031 times, against 16000 for a DSP clocked
at 200 kHz throughout: about 2.3 times less.

Reconstructing a CT signal from the variable-rate samples (a sinc interpolation with a
rate-dependent cutoff) is post-processing with no hardware behind it, so it is not included.

---

## 7. Files

| file                        | contents                                                 |
|-----------------------------|----------------------------------------------------------|
| `rtl/ctdsp_pkg.sv`          | widths, `grp_t`, `cfg_t`, default configuration, saturation |
| `rtl/dsp_top.sv`            | both DSPs side by side                                   |
| `rtl/ctdsp_system.sv`       | scan chain + IIR filter + interpolator + converter + probes |
| `rtl/scan_chain.sv`         | configuration shift register                             |
| `rtl/iir_filter.sv`         | timing block + event detector + data path                |
| `rtl/iir_timing_block.sv`   | grouper, pipeline cells, tap 1, tap 2                    |
| `rtl/iir_grouper.sv`        | four-state grouping block with lone-R2 holder            |
| `rtl/delay_cell.sv`         | one tg (or half) delay cell                              |
| `rtl/delay_line.sv`         | programmable chain of cells, optional half cell at the head |
| `rtl/async_fifo.sv`         | 1-write, 2-read event FIFO                               |
| `rtl/event_detector.sv`     | redundant-event detector                                 |
| `rtl/iir_mac.sv`            | multiply-accumulate, truncate, saturate                  |
| `rtl/iir_datapath.sv`       | FIFO1..3, DFF1..DFF8, ADD1..ADD4                         |
| `rtl/interp_filter.sv`      | four FIR sections in cascade                             |
| `rtl/fir_section.sv`        | one first-order CT FIR section                           |
| `rtl/fir_grouper.sv`        | two-input grouping block                                 |
| `rtl/ct2dt_converter.sv`    | thermometer-coded synchroniser                           |
| `rtl/vr_dsp.sv`             | variable-rate FIR                                        |

Each file opens with a comment on its function, timing, and which choices are this design's
own.

## 8. Simulation

Each testbench in `tb/` is self-checking. It prints `TB_RESULT checks=N failures=M` and ends
with `$finish`. Example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal --top-module tb_iir_filter \
    rtl/ctdsp_pkg.sv rtl/*.sv tb/tb_iir_filter.sv
./obj_dir/Vtb_iir_filter
```

| testbench                 | checks                                                                        |
|---------------------------|-------------------------------------------------------------------------------|
| `tb_delay_cell`           | exact delay, order, stalls, take in the same tick as a give                   |
| `tb_half_delay_cell`      | tap 2 = 40·tg + half, independent half-cell bias                              |
| `tb_delay_line`           | n·tg delay, `pre_last` one cell early, no loss under stalls                   |
| `tb_iir_grouper`          | every grouping case with tag and tick, collisions, lone R2, stalls            |
| `tb_async_fifo`           | two read ports against a model, full/empty errors                             |
| `tb_event_detector`       | drop/pass at all 8 resolutions, timing                                        |
| `tb_iir_mac`              | random and corner values, floor rounding, saturation                          |
| `tb_iir_datapath`         | register pipeline against a DT biquad cascade                                 |
| `tb_iir_timing_block`     | loop period TD, tap-2 delay, output times, strobes, for three tunings         |
| `tb_iir_filter`           | values and times of every output against a DT model; settling; detector off  |
| `tb_iir_tone`             | frequency response: sine tones (10, 40, 200 kHz) quantised in continuous time; output amplitude against A·\|H(e^{jωTD})\| |
| `tb_fir_grouper`, `tb_fir_section`, `tb_interp_filter` | grouping, y = c0·x + c1·x(t−τ) with exact times, cascade step response |
| `tb_ct2dt_converter`      | three-edge latency with random CT changes near the edges                      |
| `tb_scan_chain`           | reset value, shift/update, read-back                                          |
| `tb_ctdsp_system`         | scan load, probe periods 1000/1012 ticks, loop stops, CT and DT outputs       |
| `tb_vr_dsp`               | every output against Σ h[k]·x(t − kT0) on the held input, mode sequence, 80 ms profile |
| `tb_dsp_top`              | full size: random CT input with bursts, VR rate profiles; counts every mechanism and fails if one never occurs |

`tb_dsp_top` runs for about a minute.

## 9. Where this RTL departs from the original design

* **Timing emulated on a 1 ns tick clock.** Delays are integer ticks: the half cell is 12 ticks,
  not 12.5. There is no analog behaviour: mismatch, jitter, the cells' speed-up for events that
  follow closely, and power.
* **Test mode not built.** The original chip can route any chosen delay element to a pin for
  measurement.
* **No ADCs.** The level-crossing and DT ADCs that feed the chips are off-chip test equipment,
  and the variable-rate ADC is outside the DSP.
* **Own choices where the original is silent:**
  * coefficient format and values;
  * input format (two's complement, placed in the top bits);
  * scan-chain order;
  * FIFO depth of the interpolator sections (32);
  * a lone R2 is held for one tick before it is offered;
  * how a delay-line length is selected (the event enters cell MAX − n);
  * the VR-DSP's handling of the slow-sampling phase at a slow-to-fast switch.
* **Line sizes.** Delay lines are built for up to 64 cells in the IIR filter and 32 in the
  interpolator. The defaults use 39/40 and 20/10/5/2.
* **FIFO reads take one tick** instead of half a cell delay.

# Two-microphone sound localizer with a Jeffress coincidence circuit

This design finds the direction of a sound source from the difference in
arrival time at two microphones. It does not cross-correlate the two signals.
It uses the mechanism the auditory brainstem is thought to use: a Jeffress
circuit. Each channel is split into narrow frequency bands, and each band is
turned into a train of spikes, one per downward zero crossing. The spikes of
the two ears race towards each other along two delay lines. The position
where they meet measures the delay. A leaky counter per meeting point turns
the meetings into firing rates. The busiest point, if it is busy enough, gives
the angle of arrival, which is drawn on a 1024x768 VGA screen.

Everything is written in synthesizable SystemVerilog. No RAM and no fast
clock are needed: the audio path uses a 100 MHz clock, the display a
65 MHz pixel clock.

## From delay to angle

With microphone spacing L, speed of sound c = 343 m/s and sample rate
fs = 62.5 kHz, a far source at angle theta from the microphone axis reaches
one microphone later by k samples, where

    cos(theta) = k * c / (fs * L)

So the delay in samples is a linear measure of cos(theta). On the screen,
the delay axis is the horizontal axis and a semicircle is drawn over it. The
source lies on the arc directly above the winning delay. Resolution improves
with a larger spacing or a higher sample rate. The 62.5 kHz rate is the
fastest the microphones allow.

## Signal chain

```
              clk_sys (100 MHz)                                              | clk_pix (65 MHz)
 mics ─I2S─> i2s_receiver ─L─> iir_filter_bank (16 bands) ─> 16 x spike_generator ─┐
                          └R─> iir_filter_bank (16 bands) ─> 16 x spike_generator ─┤
                                                                                  subband_mux (band_sel)
                                                                                   │
                                                                 jeffress_circuit (16 detectors)
                                                                                   │
                                                          rate_estimator (rates, max, threshold)
                                                                                   │
                                                               cdc_snapshot ───────┼──> display
                                                                                          ├ vga_timing
                                                                                          ├ rate_histogram
                                                                                          └ semicircle_display
```

`sound_localizer_top` wires all of this. `sl_pkg` holds the shared widths,
types and the coefficient formula.

## The Jeffress circuit: how meeting position encodes delay

`jeffress_circuit` holds two N-stage shift registers (N = 16). A valid pulse
on a channel moves that channel's line one stage, and its new spike (or
no-spike) goes in at stage 0. Detector i is the AND of left stage i and right
stage N-1-i. Reading the right line backwards makes the two lines
anti-parallel: a left spike walks up the detector row while a right spike
walks down it. A detector fires when both are at its position.

The lines advance only when a sample arrives, not on every clock. So wire
delays and clock speed play no part, and a detector can be a plain AND gate
evaluated once after each shift.

The I2S bus delivers the two microphones alternately, with the right sample
half a sample period after the left one. This half-period offset matters.
Left and right shifts alternate, so the gap between two approaching spikes
closes by exactly one position per shift. The pair therefore meets at
exactly one detector, exactly once. Suppose a left spike belongs to left
sample n and a right spike to right sample m, and D = m - n. Then they meet at

    i = floor((D + N) / 2),      for -N <= D < N

Each detector covers two adjacent sample offsets. In physical time, detector
i covers a right-minus-left delay of about 2i - N + 1 samples (±1), always
an odd number. With N even, no detector sits at zero delay. The delay bar on
screen has no centre block, and a source straight ahead splits its hits
between the two middle detectors.

The circuit sees one subband at a time. A narrow band looks almost
sinusoidal, so its zero crossings are clean and periodic. A tone with period
P samples also makes spikes meet at D ± P. When P > 2N = 32 samples (tones
below about 1.95 kHz), no alias fits in the detector range. For higher tones
(down to P ≈ 21 samples at 3 kHz), an alias that lands inside the range fires
as often as the true delay. This is the usual spatial-aliasing limit of a
microphone pair. The rate estimator then reports the lower-indexed of the
tied detectors. Keeping the microphone spacing below half a wavelength at the
top band frequency avoids it.

## Filter bank

`iir_filter_bank` splits one channel into 16 equal-width bands between
100 Hz and 3 kHz (about 181 Hz each). Each band is a second-order Butterworth
band-pass section, the same as `scipy.signal.butter(1, [f_lo, f_hi],
'bandpass', fs=62500)`:

    w_lo = tan(pi f_lo / fs),  w_hi = tan(pi f_hi / fs)
    BW = w_hi - w_lo,  W2 = w_lo * w_hi,  a0 = 1 + BW + W2
    b = [BW, 0, -BW] / a0,   a = [1, 2 (W2 - 1) / a0, (1 - BW + W2) / a0]
    y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]

`sl_pkg::band_coef` evaluates this at elaboration time, with its own
series for tan. The result is rounded to signed 38-bit values with
35 fraction bits. `iir_band_coeffs` holds the five constants of one band and
hands them out by (b/a, index). So NUM_BANDS, F_MIN and F_MAX can be changed
freely.

Word widths: 18-bit input and output, 38-bit coefficients, 59-bit
accumulator (an 18 x 38 product is 56 bits, and five terms need 3 more bits).
The y history is kept at the 18-bit output width. Results are rounded half
up and saturated.

Arithmetic is bit-serial. Each band has one `fused_multiply_add`, which
builds each product from 38 shifted additions through a single 59-bit adder.
The coefficient's top bit has negative weight, so it is subtracted. A shared
controller steps all bands together through the five terms. One sample takes
5 x 40 + 2 = 202 clocks. A new sample arrives every 1600 clocks, so the bank
idles 87 % of the time. The band count does not change the latency, because
the bands run side by side.

The spike generators need only the sign bit of each band output, but the full
value is kept for the feedback.

## Spikes, band selection and rates

`spike_generator` stores each band's previous sign bit. A 0 -> 1 change
(positive to negative) is a downward zero crossing and gives a spike. A small
two-state FSM starts on the rising edge of the filter's valid pulse. There is
one generator per band and channel (32 in all).

`subband_mux` picks one band, set by the `band_sel_i` input, for the single
Jeffress circuit.

`rate_estimator` keeps a 12-bit counter per detector. A fire adds
`increment`. Every 1000 coincidence updates (two per audio sample, so
every 8 ms), all counters are multiplied by alpha = `decay_num`/128. That is a
leaky integrator that always holds a current rate estimate, with no
reset-and-count windows. A comparator chain finds the largest counter (the
lowest index wins a tie), and `detected` is set when it exceeds `threshold`.
These three settings come in through `rate_cfg_i` at run time (from switches).
Increment 3 with alpha 63/128 is a good starting point. The threshold then
depends on the tone. With a 1.1 kHz tone the winning counter swings between
about 20 and 50 over each decay period.

## Display

`display` runs `vga_timing` (VESA 1024x768 at 60 Hz: 1344 x 806 total,
negative syncs) and draws three regions:

| rows      | content                                                                                     | module               |
|-----------|---------------------------------------------------------------------------------------------|----------------------|
| 0-511     | semicircle of radius 512 centred at (512, 511); the slice above the winning block is filled | `semicircle_display` |
| 512-735   | one bar per detector, height = rate in pixels, and a horizontal threshold line             | `rate_histogram`     |
| 736-767   | delay bar: the winning detector's block lights up when detected                             | `rate_histogram`     |

Columns are 1024/16 = 64 pixels wide, with a 2-pixel gap.

**Slice test without division or square roots.** Take a pixel (x, y)
relative to the circle centre, with y up. It is in the slice when it lies
inside the circle and its direction lies between the rays to the arc points
above the block edges, (x_L, y_L) and (x_R, y_R). A pixel is right of edge E
when x*y_E > y*x_E. With y_E^2 = R^2 - x_E^2, both sides are squared:
x^2 (R^2 - x_E^2) against y^2 x_E^2. Squaring drops the signs, but y and y_E
are never negative. So the signs of x and x_E settle the comparison alone
when they differ, and say which way the squared comparison points when they
agree. The slice is (right of L) XOR (right of R). The squares take one
pipeline stage and the products and comparisons a second, so this source is
2 cycles late. The histogram pixel and the syncs are delayed to match.

**XOR merge.** Both sources paint the same background colour BG and never
paint the same pixel. So the output colour is `hist ^ semi ^ BG`: where one
source equals BG, the XOR cancels it and leaves the other. This works for any
background colour, with no priority multiplexer.

## Clocks and reset

Two clock domains: `clk_sys` (100 MHz: I2S, filters, Jeffress, rates) and
`clk_pix` (65 MHz: display). `cdc_snapshot` carries the 16 rates, the winner,
the detect flag and the threshold across as one 209-bit word. It uses a
toggle request/acknowledge handshake, so the display always sees a coherent
set. Every register has a synchronous, active-high reset in its own domain
(`rst_sys`, `rst_pix`).

## Top-level ports (`sound_localizer_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_sys`, `rst_sys` | in | 1 | 100 MHz clock, reset |
| `clk_pix`, `rst_pix` | in | 1 | 65 MHz pixel clock, reset |
| `i2s_sclk_o`, `i2s_ws_o` | out | 1 | 4 MHz bit clock; word select (low = left), flips every 32 bit clocks |
| `i2s_data_i` | in | 1 | data line shared by both microphones |
| `mic_sel_left_o`, `mic_sel_right_o` | out | 1 | microphone SEL pins, tied 0 and 1 |
| `band_sel_i` | in | 4 | subband fed to the Jeffress circuit |
| `rate_cfg_i` | in | 23 | `{increment[3:0], decay_num[6:0], threshold[11:0]}` |
| `delay_idx_o`, `detected_o` | out | 4, 1 | winning detector; rate above threshold |
| `vga_rgb_o`, `vga_hs_o`, `vga_vs_o` | out | 12, 1, 1 | VGA colour (4:4:4) and active-low syncs |

Parameters: `NUM_BANDS` = 16, `NUM_DET` = 16, `DECAY_PERIOD` = 1000.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/sl_pkg.sv tb/tb_sound_localizer_top.sv --top tb_sound_localizer_top -Mdir obj
obj/Vtb_sound_localizer_top
```

`tb/i2s_mic_model.sv` is a behavioural I2S microphone used by the receiver
and top-level tests.

What the tests establish:

- **Filter bank.** All 16 bands match a double-precision model of the same
  Butterworth sections to within 8 LSB, sample by sample. A tone at a band
  centre passes at about unit gain, and the outer bands reject it. The latency
  is 202 cycles.
- **Jeffress circuit.** Every offset from -16 to 15 fires exactly one
  detector, once, at floor((D+16)/2).
- **Rate estimator, multiply-adder, I2S receiver.** Compared cycle by cycle
  with reference models, including saturation, extreme operands, and clock
  and frame periods.
- **Display.** A whole frame is checked pixel by pixel by category. The slice
  test is checked against floating-point geometry.
- **End to end (`tb_sound_localizer_top`).** Runs at the default sizes, about
  78 ms of audio and 4 video frames (about 15 s of simulation). Two
  microphones hear a 1.1 kHz tone arriving 5 samples later on the right and a
  2.7 kHz tone arriving 3 samples earlier. With subband 5 selected, the
  design detects detector 10; after switching to subband 14, it detects
  detector 6. Both are the delay-centred detectors. The highlight and the
  slice appear on screen in the right column, and raising the threshold drops
  the detection. The test also requires that samples, filter outputs, spikes,
  coincidences, decays, detections rising and falling, and the band switch
  each happen.
- **32 subbands (`tb_localizer_32_bands`).** Runs the same scene with
  `NUM_BANDS = 32`, about 90 Hz per band. The tones are moved to subbands 11
  and 28. Detection and the switch behave the same.

## Design choices and limits

These points are this design's own, not taken from the system it implements:

- **Filter order and format.** The filter order (second-order Butterworth
  band-pass per band), the direct-form-I structure and the Q3.35 coefficient
  format are choices. The band edges, band count, word widths and
  shift-and-add multiplier are not.
- **Detectors and spacing.** The number of detectors (16) and the microphone
  spacing it implies are chosen. For the detector range ±16 samples to span
  the full half circle, L = 16 c / fs ≈ 8.8 cm. With another spacing, only
  part of the bar is reachable, and the drawn angle is exact only when
  L = N c / fs.
- **Decay period.** The 1000-step decay period counts coincidence updates
  (two per sample), not system clocks. 1000 system clocks would be shorter
  than one audio sample.
- **Threshold and settings.** The threshold value is not fixed; it and the
  other rate settings are inputs.
- **Display details.** Screen layout, colours (background 12'h124), bar scale
  (1 pixel per count) and the 2-pixel column gaps are choices.
- **I2S details.** The standard one-bit I2S data delay, word select low =
  left, and the input synchronizer are assumed.
- **Clock crossing.** The snapshot crossing between the two clocks is this
  design's own.
- **One band at a time.** Only one subband drives the localizer at a time.
  Combining the delay estimates of several bands (one Jeffress circuit and
  rate estimator per band, averaging the bands that pass threshold) is not
  built.
- **Not included.** The microphones, the test tone source and any on-chip
  debug logic analyser are not part of the RTL.

// Shared constants, types and constant functions of the two-microphone sound
// localizer.
//
// The audio path runs on a 100 MHz system clock: the I2S bit clock is that clock
// divided by 25 (4 MHz) and each microphone delivers one 18-bit sample per 64 bit
// clocks (62.5 kHz). The display path runs on a 65 MHz pixel clock (1024x768).
//
// The package also computes the band-pass IIR coefficients at elaboration time.
// Each subband is a second-order Butterworth band-pass section, the same as
// scipy.signal.butter(1, [f_lo, f_hi], 'bandpass', fs=62500). The bands split
// 100 Hz .. 3 kHz into equal-width slices. Let w_lo = tan(pi*f_lo/fs),
// w_hi = tan(pi*f_hi/fs), BW = w_hi - w_lo and W2 = w_lo*w_hi. Then
//   a0 = 1 + BW + W2,  b0 = BW/a0,  b1 = 0,  b2 = -BW/a0,
//   a1 = 2*(W2 - 1)/a0,  a2 = (1 - BW + W2)/a0.
// Coefficients are signed 38-bit fixed point with 35 fraction bits.
// The band edges, the 18/38/59/18-bit word widths and the sample rate follow
// the report. The filter order and the coefficient format are this design's
// own choice.
package sl_pkg;

  // ---------------- audio front end ----------------
  localparam int unsigned SYS_CLK_HZ   = 100_000_000;
  localparam int unsigned SCLK_DIV     = 25;      // 100 MHz / 25 = 4 MHz bit clock
  localparam int unsigned BITS_PER_WS  = 32;      // bit clocks per word-select half period
  localparam int unsigned SAMPLE_W     = 18;      // useful bits per microphone word
  localparam int unsigned FS_HZ        = SYS_CLK_HZ / SCLK_DIV / (2 * BITS_PER_WS); // 62500

  // ---------------- filter bank ----------------
  localparam int unsigned NUM_SUBBANDS = 16;
  localparam int unsigned F_MIN_HZ     = 100;
  localparam int unsigned F_MAX_HZ     = 3000;
  localparam int unsigned COEF_W       = 38;
  localparam int unsigned COEF_FRAC    = 35;
  localparam int unsigned ACC_W        = 59;
  localparam int unsigned NUM_TAPS     = 5;       // b0 b1 b2 a1 a2

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [ACC_W-1:0]    acc_t;

  // ---------------- Jeffress / rate estimation ----------------
  localparam int unsigned NUM_DETECTORS = 16;
  localparam int unsigned RATE_W        = 12;

  typedef struct packed {
    logic [3:0] increment;     // added to a counter when its detector fires
    logic [6:0] decay_num;     // decay factor alpha = decay_num / 128
    logic [RATE_W-1:0] threshold;  // minimum rate accepted as a detection
  } rate_cfg_t;

  // ---------------- display ----------------
  typedef logic [11:0] rgb_t;     // 4:4:4 RGB
  localparam int unsigned H_ACTIVE = 1024;
  localparam int unsigned V_ACTIVE = 768;

  // ---------------- coefficient arithmetic (elaboration only) ----------------
  localparam real PI = 3.14159265358979323846;

  function automatic real sl_tan(real x);
    real s, c, t;
    s = 0.0; c = 0.0; t = 1.0;
    for (int k = 0; k < 40; k++) begin
      if (k > 0) t = t * x / k;
      case (k % 4)
        0: c = c + t;
        1: s = s + t;
        2: c = c - t;
        default: s = s - t;
      endcase
    end
    return s / c;
  endfunction

  function automatic coef_t to_coef(real x);
    real scaled;
    scaled = x * (2.0 ** COEF_FRAC);
    return coef_t'(longint'(scaled));
  endfunction

  // Coefficient tap of subband `band` out of `nbands` spanning f_min..f_max.
  // tap 0..2 = b0..b2, tap 3..4 = a1..a2 (the filter subtracts the a terms).
  function automatic coef_t band_coef(int band, int nbands, int f_min, int f_max,
                                      int fs, int tap);
    real f_lo, f_hi, w_lo, w_hi, bw, w2, a0, v;
    f_lo = real'(f_min) + real'(f_max - f_min) * real'(band) / real'(nbands);
    f_hi = real'(f_min) + real'(f_max - f_min) * real'(band + 1) / real'(nbands);
    w_lo = sl_tan(PI * f_lo / real'(fs));
    w_hi = sl_tan(PI * f_hi / real'(fs));
    bw   = w_hi - w_lo;
    w2   = w_lo * w_hi;
    a0   = 1.0 + bw + w2;
    case (tap)
      0:       v = bw / a0;
      1:       v = 0.0;
      2:       v = -bw / a0;
      3:       v = 2.0 * (w2 - 1.0) / a0;
      default: v = (1.0 - bw + w2) / a0;
    endcase
    return to_coef(v);
  endfunction

endpackage

// End-to-end testbench for sound_localizer_top at its default parameters
// (16 subbands, 16 detectors, decay every 1000 updates).
//
// Two I2S microphone models share the data line. The scene has two tones:
//   tone A, 1100 Hz (subband 5), reaching the right microphone 5 samples
//     after the left one;
//   tone B, 2700 Hz (subband 14), reaching the right microphone 3 samples
//     before the left one.
// Detector i stands for a delay of 2i - 16 + 1 samples, so the detectors
// expected are 10 and 6. The delays sit at detector centres, so the small
// phase error from the other tone leaking through the filter does not
// split the hits between two detectors.
// Phase 1 selects subband 5 and expects a detection at detector 10. Phase 2
// switches to subband 14 and expects it to move to detector 6. Phase 3
// raises the threshold out of reach and expects the detection to drop.
// Demo settings: increment 3, alpha = 63/128; threshold 20.
// It counts and requires: audio samples on both channels, filter bank
// outputs, spikes on both sides, coincidences, decay ticks, the detection
// being raised, the band switch and the detection dropping. On the VGA side it
// counts frames, highlighted delay-bar pixels in the winning column and
// angle-slice pixels.
module tb_sound_localizer_top;
  import sl_pkg::*;
  logic clk_sys = 0, clk_pix = 0, rst_sys = 1, rst_pix = 1;
  always #5 clk_sys = ~clk_sys;          // 100 MHz
  always #7.692 clk_pix = ~clk_pix;      // 65 MHz

  logic sclk, ws, data, sel_l, sel_r;
  logic [3:0] band_sel;
  rate_cfg_t cfg;
  logic [3:0] delay_idx;
  logic detected;
  rgb_t rgb; logic hs, vs;
  int checks = 0, failures = 0;

  sound_localizer_top dut (
    .clk_sys(clk_sys), .rst_sys(rst_sys), .clk_pix(clk_pix), .rst_pix(rst_pix),
    .i2s_sclk_o(sclk), .i2s_ws_o(ws), .i2s_data_i(data),
    .mic_sel_left_o(sel_l), .mic_sel_right_o(sel_r),
    .band_sel_i(band_sel), .rate_cfg_i(cfg),
    .delay_idx_o(delay_idx), .detected_o(detected),
    .vga_rgb_o(rgb), .vga_hs_o(hs), .vga_vs_o(vs));

  // ---------------- microphones ----------------
  localparam real PI = 3.141592653589793, FS = 62500.0;
  localparam real FA = 1100.0, DA = 5.0, FB = 2700.0, DB = -3.0;
  sample_t smp_l, smp_r;
  logic d_l, d_r, en_l, en_r;
  int unsigned n_l, n_r;

  function automatic sample_t scene(real t);   // t in sample periods, left mic
    real s;
    s = 40000.0 * $sin(2.0 * PI * FA * t / FS) + 40000.0 * $sin(2.0 * PI * FB * t / FS);
    return sample_t'($rtoi(s));
  endfunction
  function automatic sample_t scene_r(real t);  // right mic: A late, B early
    real s;
    s = 40000.0 * $sin(2.0 * PI * FA * (t - DA) / FS) + 40000.0 * $sin(2.0 * PI * FB * (t - DB) / FS);
    return sample_t'($rtoi(s));
  endfunction

  always_comb smp_l = scene(real'(n_l));
  // After reset the right slot comes first: the right microphone's sample k
  // is taken half a frame before the left microphone's sample k, so it
  // belongs to time k - 0.5 on the left microphone's sample clock.
  always_comb smp_r = scene_r(real'(n_r) - 0.5);
  assign data = (en_l & d_l) | (en_r & d_r);

  i2s_mic_model u_mic_l (.sclk(sclk), .ws(ws), .sel(sel_l), .sample_i(smp_l),
                         .data_o(d_l), .drive_o(en_l), .n_o(n_l));
  i2s_mic_model u_mic_r (.sclk(sclk), .ws(ws), .sel(sel_r), .sample_i(smp_r),
                         .data_o(d_r), .drive_o(en_r), .n_o(n_r));

  // ---------------- mechanism counters ----------------
  int n_lv = 0, n_rv = 0, n_fb = 0, n_spk_l = 0, n_spk_r = 0, n_coinc = 0, n_decay = 0;
  int n_det_rise = 0, n_det_fall = 0, n_switch = 0;
  logic det_q = 0;
  always @(posedge clk_sys) if (!rst_sys) begin
    if (dut.left_v) n_lv++;
    if (dut.right_v) n_rv++;
    if (dut.left_fv) n_fb++;
    if (dut.jl_valid && dut.jl_spike) n_spk_l++;
    if (dut.jr_valid && dut.jr_spike) n_spk_r++;
    if (dut.coinc_v && dut.coinc != 0) n_coinc++;
    if (dut.u_rates.decay_tick_o) n_decay++;
    det_q <= detected;
    if (detected && !det_q) n_det_rise++;
    if (!detected && det_q) n_det_fall++;
  end

  int n_frames = 0, n_hit = 0, n_hit_wrong = 0, n_src = 0;
  logic vs_q = 1;
  logic [3:0] exp_col = 0;
  logic vga_check = 0;
  always @(posedge clk_pix) if (!rst_pix) begin
    vs_q <= vs;
    if (!vs && vs_q) n_frames++;
    if (vga_check && rgb == 12'hFC0) begin
      if (dut.u_display.hcount_o / 64 == 11'(exp_col)) n_hit++;
      else n_hit_wrong++;
    end
    if (vga_check && rgb == 12'hF80) n_src++;
  end

  task automatic run_ms(int ms);
    repeat (ms * 100000) @(posedge clk_sys);
  endtask

  // Over a 5 ms window, sampled every 10 us: the detection must be up at
  // least half of the time, and always at detector idx when it is up. The
  // rates rise and fall with each decay, so a single sample is not enough.
  task automatic expect_det(logic [3:0] idx, string what);
    int up, wrong;
    up = 0; wrong = 0;
    for (int k = 0; k < 500; k++) begin
      repeat (1000) @(posedge clk_sys);
      if (detected) begin
        up++;
        if (delay_idx != idx) wrong++;
      end
    end
    vga_check = 0;
    checks += 2;
    if (up < 250) begin failures++; $display("%s: detected only %0d of 500 times", what, up); end
    if (wrong != 0) begin failures++; $display("%s: %0d detections at the wrong detector", what, wrong); end
    $display("%s: detected %0d of 500 times, detector %0d, rates:", what, up, delay_idx);
    for (int i = 0; i < 16; i++) $write(" %0d", dut.rates[i]);
    $display("");
  endtask

  initial begin
    band_sel = 4'd5;
    cfg = '{increment: 4'd3, decay_num: 7'd63, threshold: 12'd20};
    repeat (5) @(posedge clk_sys);
    rst_sys = 0; rst_pix = 0;
    // phase 1: subband 5, tone A
    exp_col = 4'd10;
    run_ms(20);
    vga_check = 1;          // a whole frame (16.5 ms) before the end of the phase
    run_ms(15);
    expect_det(4'd10, "subband 5");
    // phase 2: subband 14, tone B
    band_sel = 4'd14; n_switch++;
    run_ms(15);
    exp_col = 4'd6;
    vga_check = 1;
    run_ms(15);
    expect_det(4'd6, "subband 14");
    // phase 3: threshold out of reach
    cfg.threshold = 12'd4000;
    run_ms(3);
    checks++;
    if (detected) begin failures++; $display("still detected above threshold"); end
    // mechanism coverage
    $display("samples L %0d R %0d, filter outputs %0d, spikes L %0d R %0d, coincidences %0d, decays %0d",
             n_lv, n_rv, n_fb, n_spk_l, n_spk_r, n_coinc, n_decay);
    $display("detections raised %0d dropped %0d, band switches %0d", n_det_rise, n_det_fall, n_switch);
    $display("frames %0d, highlight pixels %0d (wrong column %0d), slice pixels %0d",
             n_frames, n_hit, n_hit_wrong, n_src);
    checks += 13;
    if (n_lv < 4000 || n_rv < 4000) failures++;
    if (n_fb < 4000) failures++;
    if (n_spk_l == 0) failures++;
    if (n_spk_r == 0) failures++;
    if (n_coinc == 0) failures++;
    if (n_decay == 0) failures++;
    if (n_det_rise == 0) failures++;
    if (n_det_fall == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_frames < 3) failures++;
    if (n_hit == 0) failures++;
    if (n_hit_wrong != 0) failures++;
    if (n_src == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9000000) @(posedge clk_sys);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Two-microphone sound localizer: audio capture to angle-of-arrival display.
//
// Audio side (clk_sys, 100 MHz):
//   i2s_receiver -> one iir_filter_bank per channel (NUM_BANDS band-pass
//   subbands) -> one spike_generator per subband and channel (downward zero
//   crossings) -> subband_mux (band_sel picks one subband) ->
//   jeffress_circuit (anti-parallel delay lines, AND coincidence detectors) ->
//   rate_estimator (leaky per-detector counters, maximum and threshold).
// Display side (clk_pix, 65 MHz):
//   cdc_snapshot carries the rates, the winning detector, the detect flag and
//   the threshold across. display then draws the delay bar, the rate
//   histogram and the semicircle slice on a 1024x768 screen.
//
// Both microphones share the I2S bit clock, word select and data line. Only
// their SEL pins differ: mic_sel_left_o is tied 0 and mic_sel_right_o is tied 1.
// The delay estimate is also given as delay_idx_o / detected_o, for LEDs or a
// host.
// Because the two channels are sampled half a period apart, detector k stands
// for a true right-minus-left delay of about 2k - NUM_DET + 1 samples at
// 62.5 kHz.
// The report gives this chain and its clocks. The band selector input, the
// CDC stage and the reset inputs are this design's choices.
module sound_localizer_top
  import sl_pkg::*;
#(
  parameter int unsigned NUM_BANDS    = NUM_SUBBANDS,
  parameter int unsigned NUM_DET      = NUM_DETECTORS,
  parameter int unsigned DECAY_PERIOD = 1000
) (
  input  logic                         clk_sys,
  input  logic                         rst_sys,
  input  logic                         clk_pix,
  input  logic                         rst_pix,
  // microphones
  output logic                         i2s_sclk_o,
  output logic                         i2s_ws_o,
  input  logic                         i2s_data_i,
  output logic                         mic_sel_left_o,
  output logic                         mic_sel_right_o,
  // user settings (switches)
  input  logic [$clog2(NUM_BANDS)-1:0] band_sel_i,
  input  rate_cfg_t                    rate_cfg_i,
  // result
  output logic [$clog2(NUM_DET)-1:0]   delay_idx_o,
  output logic                         detected_o,
  // VGA
  output rgb_t                         vga_rgb_o,
  output logic                         vga_hs_o,
  output logic                         vga_vs_o
);
  localparam int unsigned IW = $clog2(NUM_DET);

  assign mic_sel_left_o  = 1'b0;
  assign mic_sel_right_o = 1'b1;

  // ---------------- audio capture ----------------
  sample_t left_s, right_s;
  logic    left_v, right_v;

  i2s_receiver u_i2s (
    .clk(clk_sys), .rst(rst_sys),
    .i2s_sclk(i2s_sclk_o), .i2s_ws(i2s_ws_o), .i2s_data(i2s_data_i),
    .left_o(left_s), .left_valid_o(left_v),
    .right_o(right_s), .right_valid_o(right_v)
  );

  // ---------------- filter banks ----------------
  sample_t left_bands  [NUM_BANDS];
  sample_t right_bands [NUM_BANDS];
  logic    left_fv, right_fv;

  iir_filter_bank #(.NUM_BANDS(NUM_BANDS)) u_fb_left (
    .clk(clk_sys), .rst(rst_sys), .valid_in(left_v), .x_in(left_s),
    .y_o(left_bands), .valid_o(left_fv), .busy_o()
  );

  iir_filter_bank #(.NUM_BANDS(NUM_BANDS)) u_fb_right (
    .clk(clk_sys), .rst(rst_sys), .valid_in(right_v), .x_in(right_s),
    .y_o(right_bands), .valid_o(right_fv), .busy_o()
  );

  // ---------------- spike generators ----------------
  logic [NUM_BANDS-1:0] left_spk, right_spk, left_sv, right_sv;

  for (genvar b = 0; b < NUM_BANDS; b++) begin : g_spike
    spike_generator u_spk_l (
      .clk(clk_sys), .rst(rst_sys), .valid_in(left_fv),
      .sign_in(left_bands[b][SAMPLE_W-1]), .spike_o(left_spk[b]), .valid_o(left_sv[b])
    );
    spike_generator u_spk_r (
      .clk(clk_sys), .rst(rst_sys), .valid_in(right_fv),
      .sign_in(right_bands[b][SAMPLE_W-1]), .spike_o(right_spk[b]), .valid_o(right_sv[b])
    );
  end

  // ---------------- band selection and Jeffress ----------------
  logic jl_spike, jl_valid, jr_spike, jr_valid;

  subband_mux #(.NUM_BANDS(NUM_BANDS)) u_mux (
    .clk(clk_sys), .rst(rst_sys), .band_sel(band_sel_i),
    .left_spikes(left_spk), .left_valid(left_sv[0]),
    .right_spikes(right_spk), .right_valid(right_sv[0]),
    .left_spike_o(jl_spike), .left_valid_o(jl_valid),
    .right_spike_o(jr_spike), .right_valid_o(jr_valid)
  );

  logic [NUM_DET-1:0] coinc;
  logic               coinc_v;

  jeffress_circuit #(.N(NUM_DET)) u_jeffress (
    .clk(clk_sys), .rst(rst_sys),
    .left_valid(jl_valid), .left_spike(jl_spike),
    .right_valid(jr_valid), .right_spike(jr_spike),
    .coinc_o(coinc), .coinc_valid_o(coinc_v)
  );

  // ---------------- rate estimation ----------------
  logic [RATE_W-1:0] rates [NUM_DET];
  logic [IW-1:0]     max_idx;
  logic [RATE_W-1:0] max_rate;
  logic              detected;

  rate_estimator #(.N(NUM_DET), .W(RATE_W), .DECAY_PERIOD(DECAY_PERIOD)) u_rates (
    .clk(clk_sys), .rst(rst_sys), .cfg(rate_cfg_i),
    .coinc(coinc), .coinc_valid(coinc_v),
    .rates_o(rates), .max_idx_o(max_idx), .max_rate_o(max_rate),
    .detected_o(detected), .decay_tick_o()
  );

  assign delay_idx_o = max_idx;
  assign detected_o  = detected;

  // ---------------- to the pixel clock ----------------
  localparam int unsigned XW = NUM_DET * RATE_W + IW + 1 + RATE_W;
  logic [XW-1:0]     x_src, x_dst;
  logic [RATE_W-1:0] p_rates [NUM_DET];
  logic [IW-1:0]     p_max_idx;
  logic              p_detected;
  logic [RATE_W-1:0] p_threshold;

  always_comb begin
    x_src = {max_idx, detected, rate_cfg_i.threshold, (NUM_DET * RATE_W)'(0)};
    for (int i = 0; i < NUM_DET; i++) x_src[i*RATE_W +: RATE_W] = rates[i];
    for (int i = 0; i < NUM_DET; i++) p_rates[i] = x_dst[i*RATE_W +: RATE_W];
    {p_max_idx, p_detected, p_threshold} = x_dst[XW-1 -: IW + 1 + RATE_W];
  end

  cdc_snapshot #(.WIDTH(XW)) u_cdc (
    .src_clk(clk_sys), .src_rst(rst_sys), .src_data(x_src),
    .dst_clk(clk_pix), .dst_rst(rst_pix), .dst_data(x_dst)
  );

  // ---------------- display ----------------
  display #(.N(NUM_DET), .W(RATE_W)) u_display (
    .clk(clk_pix), .rst(rst_pix),
    .rates(p_rates), .max_idx(p_max_idx), .detected(p_detected), .threshold(p_threshold),
    .vga_rgb_o(vga_rgb_o), .vga_hs_o(vga_hs_o), .vga_vs_o(vga_vs_o),
    .hcount_o(), .vcount_o()
  );
endmodule

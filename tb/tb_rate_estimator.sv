// Testbench for rate_estimator with a short decay period (10 updates) so
// that many decays happen. Random coincidence vectors, biased towards one
// detector that changes halfway, are applied with the demo settings
// (increment 3, alpha 63/128) and then with others. A reference model keeps
// its own counters: decay = floor(r * num / 128), then + increment on a fire,
// saturating at 4095. All rates, the maximum, its index (lowest index on a tie)
// and the threshold flag are compared after every update. The test also
// checks that decays, detections and saturation all happened.
module tb_rate_estimator;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int N = 16, P = 10;
  rate_cfg_t cfg;
  logic [N-1:0] coinc = '0;
  logic cv = 0, det, tick;
  logic [RATE_W-1:0] rates [N];
  logic [3:0] midx;
  logic [RATE_W-1:0] mrate;
  int checks = 0, failures = 0;
  int ref_r [N];
  int n_decay = 0, n_det = 0, n_sat = 0;

  rate_estimator #(.N(N), .DECAY_PERIOD(P)) dut (.clk(clk), .rst(rst), .cfg(cfg),
    .coinc(coinc), .coinc_valid(cv), .rates_o(rates), .max_idx_o(midx), .max_rate_o(mrate),
    .detected_o(det), .decay_tick_o(tick));

  initial begin
    int upd, hot;
    cfg = '{increment: 4'd3, decay_num: 7'd63, threshold: 12'd20};
    for (int i = 0; i < N; i++) ref_r[i] = 0;
    upd = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int best, bi;
      bit dec;
      hot = (n < 1500) ? 4 : 11;
      if (n == 2000) cfg = '{increment: 4'd15, decay_num: 7'd127, threshold: 12'd300};
      for (int i = 0; i < N; i++) coinc[i] = ($urandom % 100) < ((i == hot) ? 60 : 8);
      cv = 1;
      @(negedge clk);
      cv = 0;
      dec = (upd % P) == P - 1;
      upd++;
      for (int i = 0; i < N; i++) begin
        if (dec) ref_r[i] = (ref_r[i] * cfg.decay_num) / 128;
        if (coinc[i]) ref_r[i] += cfg.increment;
        if (ref_r[i] > 4095) ref_r[i] = 4095;
      end
      @(negedge clk);
      best = ref_r[0]; bi = 0;
      for (int i = 1; i < N; i++) if (ref_r[i] > best) begin best = ref_r[i]; bi = i; end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(rates[i]) != ref_r[i]) begin
          failures++;
          if (failures < 10) $display("n=%0d rate[%0d]=%0d exp %0d", n, i, rates[i], ref_r[i]);
        end
      end
      checks += 3;
      if (int'(mrate) != best) failures++;
      if (int'(midx) != bi) begin failures++; if (failures < 10) $display("idx %0d exp %0d", midx, bi); end
      if (det != (best > int'(cfg.threshold))) failures++;
      if (dec) n_decay++;
      if (det) n_det++;
      if (best == 4095) n_sat++;
      checks++;
      if (n > 100 && n < 1500 && det && midx != 4) failures++;
      repeat ($urandom % 3) @(negedge clk);
    end
    checks += 4;
    if (n_tick != n_decay) begin failures++; $display("ticks %0d", n_tick); end
    if (n_decay < 100) failures++;
    if (n_det < 100) failures++;
    if (n_sat < 10) begin failures++; $display("no saturation"); end
    $display("decays %0d detections %0d saturated %0d", n_decay, n_det, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_tick = 0;
  always @(posedge clk) if (tick && !rst) n_tick++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

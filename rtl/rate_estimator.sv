// Running firing-rate estimator and maximum finder for the Jeffress detectors.
//
// One counter per coincidence detector. When a detector fires, its counter
// grows by cfg.increment. Every DECAY_PERIOD coincidence updates, all
// counters are multiplied by alpha = cfg.decay_num / 128 (a multiply and a
// 7-bit shift). So each counter is a leaky integral of its detector's firing
// rate and can be read at any time. The counters saturate at all ones.
// A comparator tree finds the largest counter; on a tie the lowest index wins.
// max_idx_o is that index, max_rate_o its value, and detected_o says that the
// maximum exceeds cfg.threshold.
//
// Interface: coinc/coinc_valid from the Jeffress circuit. cfg is a quasi-static
// setting (switches in the demo, where increment 3 and alpha 63/128 were
// used). Outputs are registered and update one cycle after each coincidence
// update.
// The report gives the increment-and-decay counters, the power-of-two alpha,
// the 1000-cycle decay period and the threshold test. That the period counts
// coincidence updates (two per audio sample) and the 12-bit counter width are
// this design's choices.
module rate_estimator
  import sl_pkg::*;
#(
  parameter int unsigned N            = NUM_DETECTORS,
  parameter int unsigned W            = RATE_W,
  parameter int unsigned DECAY_PERIOD = 1000
) (
  input  logic             clk,
  input  logic             rst,
  input  rate_cfg_t        cfg,
  input  logic [N-1:0]     coinc,
  input  logic             coinc_valid,
  output logic [W-1:0]     rates_o [N],
  output logic [$clog2(N)-1:0] max_idx_o,
  output logic [W-1:0]     max_rate_o,
  output logic             detected_o,
  output logic             decay_tick_o
);
  localparam int unsigned PW = $clog2(DECAY_PERIOD);
  localparam int unsigned IW = $clog2(N);

  logic [PW-1:0] period_cnt;
  logic          decay;

  assign decay = coinc_valid && (period_cnt == PW'(DECAY_PERIOD - 1));

  function automatic logic [W-1:0] next_rate(logic [W-1:0] r, logic do_decay,
                                             logic do_fire, rate_cfg_t c);
    logic [W+7:0] prod;
    logic [W:0]   sum;
    prod = (W + 8)'(r) * (W + 8)'(c.decay_num);
    sum  = do_decay ? (W + 1)'(prod >> 7) : (W + 1)'(r);
    if (do_fire) sum = sum + (W + 1)'(c.increment);
    return sum[W] ? '1 : sum[W-1:0];
  endfunction

  // maximum search (combinational, linear chain of comparators)
  logic [W-1:0]  best_rate;
  logic [IW-1:0] best_idx;
  always_comb begin
    best_rate = rates_o[0];
    best_idx  = '0;
    for (int i = 1; i < N; i++) begin
      if (rates_o[i] > best_rate) begin
        best_rate = rates_o[i];
        best_idx  = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      period_cnt   <= '0;
      decay_tick_o <= 1'b0;
      max_idx_o    <= '0;
      max_rate_o   <= '0;
      detected_o   <= 1'b0;
      for (int i = 0; i < N; i++) rates_o[i] <= '0;
    end else begin
      decay_tick_o <= decay;
      if (coinc_valid) begin
        period_cnt <= decay ? '0 : period_cnt + 1'b1;
        for (int i = 0; i < N; i++) rates_o[i] <= next_rate(rates_o[i], decay, coinc[i], cfg);
      end
      max_idx_o  <= best_idx;
      max_rate_o <= best_rate;
      detected_o <= best_rate > cfg.threshold;
    end
  end
endmodule

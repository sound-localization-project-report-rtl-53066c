// Testbench for iir_filter_bank at its default 16 subbands.
// Part 1: a mix of two tones and pseudo-random noise. Every output of every
//   subband is compared with a double-precision model of the same
//   Butterworth sections. The model's coefficients come from $tan, and its
//   output is rounded to 18 bits like the hardware's. Tolerance is 8 LSB.
// Part 2: a pure tone at the centre of subband 5. After settling, subband 5
//   must pass it at near unit gain and subbands 0 and 15 must reject it.
// Also checks the 202-cycle latency from valid_in to valid_o.
// Samples are fed every 250 cycles instead of 1600 to keep the run short.
module tb_iir_filter_bank;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NB = 16;
  logic    vin = 0, vout, busy;
  sample_t x;
  sample_t y [NB];
  int checks = 0, failures = 0;

  iir_filter_bank dut (.clk(clk), .rst(rst), .valid_in(vin), .x_in(x), .y_o(y),
                       .valid_o(vout), .busy_o(busy));

  real b0 [NB], a1 [NB], a2 [NB];
  real mx1, mx2;
  real my1 [NB], my2 [NB];
  real peak [NB];

  function automatic real rnd(real v);
    real r;
    r = $floor(v + 0.5);
    if (r > 131071.0) r = 131071.0;
    if (r < -131072.0) r = -131072.0;
    return r;
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic model_reset();
    mx1 = 0; mx2 = 0;
    for (int b = 0; b < NB; b++) begin my1[b] = 0; my2[b] = 0; peak[b] = 0; end
  endtask

  // feed one sample, check latency and (optionally) every band against the model
  task automatic feed(sample_t s, bit compare, int n);
    int lat;
    real xr, v;
    @(negedge clk);
    x = s; vin = 1;
    @(negedge clk);
    vin = 0; lat = 1;
    while (!vout) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 202) begin failures++; $display("latency %0d", lat); end
    xr = real'(s);
    for (int b = 0; b < NB; b++) begin
      v = rnd(b0[b] * xr - b0[b] * mx2 - a1[b] * my1[b] - a2[b] * my2[b]);
      if (compare) begin
        checks++;
        if (real'(y[b]) - v > 8.0 || v - real'(y[b]) > 8.0) begin
          failures++;
          if (failures < 10) $display("n=%0d band %0d got %0d exp %f", n, b, y[b], v);
        end
      end
      if (n > 300 && absr(real'(y[b])) > peak[b]) peak[b] = absr(real'(y[b]));
      my2[b] = my1[b]; my1[b] = v;
    end
    mx2 = mx1; mx1 = xr;
    repeat (40) @(negedge clk);
  endtask

  initial begin
    real pi, f1, f2, fc, wl, wh;
    pi = 3.141592653589793;
    for (int b = 0; b < NB; b++) begin
      real flo, fhi, bw, w2, a0;
      flo = 100.0 + 2900.0 * b / 16.0;
      fhi = 100.0 + 2900.0 * (b + 1) / 16.0;
      wl = $tan(pi * flo / 62500.0); wh = $tan(pi * fhi / 62500.0);
      bw = wh - wl; w2 = wl * wh; a0 = 1.0 + bw + w2;
      b0[b] = bw / a0; a1[b] = 2.0 * (w2 - 1.0) / a0; a2[b] = (1.0 - bw + w2) / a0;
    end
    x = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // part 1
    model_reset();
    f1 = 450.0; f2 = 2300.0;
    for (int n = 0; n < 400; n++) begin
      real s;
      s = 40000.0 * $sin(2.0 * pi * f1 * n / 62500.0) + 30000.0 * $sin(2.0 * pi * f2 * n / 62500.0)
          + real'($signed(16'($urandom))) / 4.0;
      feed(sample_t'($rtoi(s)), 1, n);
    end
    // part 2: restart from a clean state
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    model_reset();
    wl = $tan(pi * (100.0 + 2900.0 * 5 / 16.0) / 62500.0);
    wh = $tan(pi * (100.0 + 2900.0 * 6 / 16.0) / 62500.0);
    fc = $atan($sqrt(wl * wh)) * 62500.0 / pi;
    for (int n = 0; n < 900; n++)
      feed(sample_t'($rtoi(60000.0 * $sin(2.0 * pi * fc * n / 62500.0))), 0, n);
    checks++;
    if (peak[5] < 0.9 * 60000.0 || peak[5] > 1.02 * 60000.0) begin
      failures++; $display("band 5 peak %f", peak[5]);
    end
    checks++;
    if (peak[0] > 0.2 * 60000.0 || peak[15] > 0.2 * 60000.0) begin
      failures++; $display("stop-band peaks %f %f", peak[0], peak[15]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

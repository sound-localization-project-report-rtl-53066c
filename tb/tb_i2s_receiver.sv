// Testbench for i2s_receiver: two microphone models on one data line send
// known pseudo-random samples. Checks the bit clock period (25 cycles), the
// word-select half period (32 bit clocks), every received sample value, and
// the 1600-cycle spacing of the valid pulses of each channel.
module tb_i2s_receiver;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic sclk, ws, data;
  sample_t left, right;
  logic lv, rv;
  int checks = 0, failures = 0;

  sample_t     smp_l, smp_r;
  logic        d_l, d_r, en_l, en_r;
  int unsigned n_l, n_r;

  // sample value of mic c for sample index n (independent of the DUT)
  function automatic sample_t pattern(int c, int unsigned n);
    return sample_t'((n * 32'd40503 + 32'(c) * 32'd7919 + 32'd12345) ^ (n << 5));
  endfunction

  assign smp_l = pattern(0, n_l);
  assign smp_r = pattern(1, n_r);
  assign data  = (en_l & d_l) | (en_r & d_r);

  i2s_mic_model u_mic_l (.sclk(sclk), .ws(ws), .sel(1'b0), .sample_i(smp_l),
                         .data_o(d_l), .drive_o(en_l), .n_o(n_l));
  i2s_mic_model u_mic_r (.sclk(sclk), .ws(ws), .sel(1'b1), .sample_i(smp_r),
                         .data_o(d_r), .drive_o(en_r), .n_o(n_r));

  i2s_receiver dut (.clk(clk), .rst(rst), .i2s_sclk(sclk), .i2s_ws(ws), .i2s_data(data),
                    .left_o(left), .left_valid_o(lv), .right_o(right), .right_valid_o(rv));

  // bit clock and word select periods
  longint cyc = 0, last_sclk_rise = -1, last_ws_edge = -1, last_lv = -1, last_rv = -1;
  logic sclk_q = 0, ws_q = 0;
  int sclk_since_ws = 0;
  int got_l = 0, got_r = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    sclk_q <= sclk;
    ws_q <= ws;
    if (!rst) begin
      if (sclk && !sclk_q) begin
        if (last_sclk_rise >= 0) begin
          checks++;
          if (cyc - last_sclk_rise != 25) begin failures++; $display("sclk period %0d", cyc - last_sclk_rise); end
        end
        last_sclk_rise <= cyc;
        sclk_since_ws <= sclk_since_ws + 1;
      end
      if (ws != ws_q) begin
        if (last_ws_edge >= 0) begin
          checks++;
          if (cyc - last_ws_edge != 32 * 25) begin failures++; $display("ws half period %0d", cyc - last_ws_edge); end
        end
        last_ws_edge <= cyc;
      end
      if (lv && n_l > 0) begin
        checks++;
        // the left mic latched sample n_l-1 in the current or previous frame
        if (left != pattern(0, n_l - 1)) begin failures++; $display("left %h exp %h", left, pattern(0, n_l - 1)); end
        if (last_lv >= 0) begin
          checks++;
          if (cyc - last_lv != 1600) begin failures++; $display("left spacing %0d", cyc - last_lv); end
        end
        last_lv <= cyc;
        got_l++;
      end
      if (rv && n_r > 0) begin
        checks++;
        if (right != pattern(1, n_r - 1)) begin failures++; $display("right %h exp %h", right, pattern(1, n_r - 1)); end
        if (last_rv >= 0) begin
          checks++;
          if (cyc - last_rv != 1600) begin failures++; $display("right spacing %0d", cyc - last_rv); end
        end
        last_rv <= cyc;
        got_r++;
      end
      checks++;
      if (lv && rv) failures++;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    wait (got_l >= 40 && got_r >= 40);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

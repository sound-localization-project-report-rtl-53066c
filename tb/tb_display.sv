// Testbench for display: runs one full 1024x768 frame with fixed rates and a
// detected winner, and checks every visible pixel by category against
// hcount_o/vcount_o (which are aligned with the colour output): the
// highlighted block of the winning column, the rate bars, the threshold line,
// the angle slice (probed well inside it along its centre line), black during
// blanking and background elsewhere. It also checks that the sync pulses line
// up with the pixel coordinates and that no pixel shows a colour that the XOR
// merge should not produce.
module tb_display;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam rgb_t BG = 12'h124, BAR = 12'h4C4, THR = 12'hF44, HIT = 12'hFC0, SRC = 12'hF80;
  localparam int N = 16, K = 11;
  logic [RATE_W-1:0] rates [N];
  rgb_t rgb; logic hs, vs;
  logic [10:0] h; logic [9:0] v;
  int checks = 0, failures = 0;
  int n_hit = 0, n_bar = 0, n_thr = 0, n_src = 0, n_src_probe = 0;

  display dut (.clk(clk), .rst(rst), .rates(rates), .max_idx(4'(K)), .detected(1'b1),
               .threshold(12'd100), .vga_rgb_o(rgb), .vga_hs_o(hs), .vga_vs_o(vs),
               .hcount_o(h), .vcount_o(v));

  function automatic bit on_centre_ray(int x, int y);
    // pixel near the ray through the middle of column K, inside radius 480
    real dx, dy, r, c, cmid;
    dx = x - 512; dy = 511 - y;
    r = $sqrt(dx * dx + dy * dy);
    if (dy < 4 || r < 40 || r > 480) return 0;
    c = dx / r; cmid = (K * 64 + 32 - 512) / 512.0;
    return (c - cmid < 0.01) && (cmid - c < 0.01);
  endfunction

  logic started = 0;
  always @(posedge clk) begin
    if (!rst && started) begin
      checks++;
      if (hs != !(h >= 1048 && h < 1184)) failures++;
      if (h >= 1024 || v >= 768) begin
        checks++;
        if (rgb != 0) failures++;
      end else begin
        checks++;
        unique case (rgb)
          BG: ;
          BAR: begin n_bar++; if (!(v >= 512 && v < 736 && (735 - int'(v)) < int'(rates[h / 64]))) failures++; end
          THR: begin n_thr++; if (!(v == 735 - 100)) failures++; end
          HIT: begin n_hit++; if (!(v >= 736 && h / 64 == K)) failures++; end
          SRC: begin n_src++; if (v > 511) failures++; end
          default: begin failures++; $display("bad colour %h at %0d,%0d", rgb, h, v); end
        endcase
        if (v >= 736 && h / 64 == K && (h % 64) >= 2) begin
          checks++;
          if (rgb != HIT) failures++;
        end
        if (on_centre_ray(h, v)) begin
          checks++; n_src_probe++;
          if (rgb != SRC) begin failures++; if (failures < 10) $display("slice miss %0d,%0d", h, v); end
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) rates[i] = RATE_W'(i * 14);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    do @(negedge clk); while (!(h == 0 && v == 0));
    started = 1;
    do @(negedge clk); while (!(h == 0 && v == 0));
    started = 0;
    checks += 5;
    if (n_hit < 60 * 32) failures++;
    if (n_bar == 0) failures++;
    if (n_thr == 0) failures++;
    if (n_src == 0) failures++;
    if (n_src_probe < 100) failures++;
    $display("hit %0d bar %0d thr %0d src %0d probes %0d", n_hit, n_bar, n_thr, n_src, n_src_probe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for rate_histogram: random rates (some above the 224-pixel band),
// a random threshold and winning column. 30000 random pixels plus every pixel
// of the winning column's bottom row are compared with the intended layout:
// rate bars in rows 512..735 (height = rate, measured up from row 735),
// a threshold line, the highlighted block in rows 736..767, 2-pixel gaps
// between columns, and background elsewhere.
module tb_rate_histogram;
  import sl_pkg::*;
  localparam int N = 16;
  localparam rgb_t BG = 12'h124, BAR = 12'h4C4, THR = 12'hF44, HIT = 12'hFC0;
  logic [10:0] h; logic [9:0] v;
  logic [RATE_W-1:0] rates [N];
  logic [3:0] midx; logic det; logic [RATE_W-1:0] thr;
  rgb_t pix;
  int checks = 0, failures = 0, hits = 0, bars = 0, lines = 0;

  rate_histogram dut (.hcount(h), .vcount(v), .rates(rates), .max_idx(midx),
                      .detected(det), .threshold(thr), .pixel_o(pix));

  function automatic rgb_t expect_pix(int x, int y);
    int c, ht;
    bit gap;
    if (x >= 1024 || y >= 768 || y < 512) return BG;
    c = x / 64; gap = (x % 64) < 2;
    if (y >= 736) return (!gap && det && c == midx) ? HIT : BG;
    ht = 735 - y;
    if (ht == thr && thr < 224) return THR;
    if (!gap && ht < rates[c]) return BAR;
    return BG;
  endfunction

  task automatic probe(int x, int y);
    h = 11'(x); v = 10'(y);
    #1;
    checks++;
    if (pix != expect_pix(x, y)) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) got %h exp %h", x, y, pix, expect_pix(x, y));
    end
    if (pix == HIT) hits++;
    if (pix == BAR) bars++;
    if (pix == THR) lines++;
  endtask

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < N; i++) rates[i] = RATE_W'($urandom % 300);
      midx = 4'($urandom); det = (round != 1); thr = RATE_W'(20 + $urandom % 180);
      for (int k = 0; k < 10000; k++) probe($urandom % 1344, $urandom % 806);
      for (int x = int'(midx) * 64; x < int'(midx) * 64 + 64; x++) probe(x, 750);
      for (int y = 500; y < 768; y++) probe(int'(midx) * 64 + 10, y);
    end
    checks += 3;
    if (hits == 0) failures++;
    if (bars == 0) failures++;
    if (lines == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

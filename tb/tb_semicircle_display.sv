// Testbench for semicircle_display: a stream of random pixels and random
// winning columns, one per clock. Each output, taken 2 cycles later, is
// compared with a floating-point test: the pixel is painted when it lies in
// the upper half disc of radius 512 centred at (512, 511) and its direction
// cosine x/r lies between those of the column edges, x_L/512 and x_R/512.
// Pixels within a small margin of an edge are skipped. With detected low
// nothing may be painted.
module tb_semicircle_display;
  import sl_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam rgb_t BG = 12'h124, SRC = 12'hF80;
  logic [10:0] h; logic [9:0] v; logic [3:0] midx; logic det;
  rgb_t pix;
  int checks = 0, failures = 0, painted = 0;

  semicircle_display dut (.clk(clk), .hcount(h), .vcount(v), .max_idx(midx),
                          .detected(det), .pixel_o(pix));

  // -1: too close to an edge to judge, else 0/1
  function automatic int expect_in(int hx, int vy, int k, bit d);
    real x, y, r, c, cl, cr, m;
    if (!d || hx >= 1024 || vy > 511) return 0;
    x = hx - 512; y = 511 - vy;
    r = $sqrt(x * x + y * y);
    m = 0.02;
    if (r > 512.0 + 1.0) return 0;
    if (r > 512.0 - 1.0 || r < 8.0) return -1;
    c = x / r; cl = (k * 64 - 512) / 512.0; cr = (k * 64 + 64 - 512) / 512.0;
    if (c > cl + m / 8.0 && c < cr - m / 8.0) return 1;
    if (c < cl - m / 8.0 || c > cr + m / 8.0) return 0;
    return -1;
  endfunction

  int q_h [3], q_v [3], q_k [3];
  bit q_d [3];

  initial begin
    for (int n = 0; n < 60000; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        int e;
        e = expect_in(q_h[2], q_v[2], q_k[2], q_d[2]);
        if (e >= 0) begin
          checks++;
          if ((pix == SRC) != (e == 1) || (pix != SRC && pix != BG)) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) k=%0d got %h exp %0d", q_h[2], q_v[2], q_k[2], pix, e);
          end
          if (e == 1) painted++;
        end
      end
      // pick a pixel; half of them aimed near the winning slice
      midx = 4'($urandom); det = ($urandom % 8) != 0;
      if (n % 2 == 0) begin
        real ang, rad, cc, jit;
        int  ctr, ju, ru;
        ctr = int'(midx) * 64 + 32 - 512;
        cc  = real'(ctr) / 512.0;
        ju  = $urandom % 200;
        ru  = $urandom % 520;
        jit = (real'(ju) - 100.0) / 1000.0;
        ang = $acos(cc) + jit;
        rad = real'(ru);
        h = 11'($rtoi(512.0 + rad * $cos(ang)));
        v = 10'($rtoi(511.0 - rad * $sin(ang)));
      end else begin
        h = 11'($urandom % 1100); v = 10'($urandom % 800);
      end
      q_h[2] = q_h[1]; q_v[2] = q_v[1]; q_k[2] = q_k[1]; q_d[2] = q_d[1];
      q_h[1] = h; q_v[1] = v; q_k[1] = midx; q_d[1] = det;
    end
    checks++;
    if (painted < 1000) begin failures++; $display("painted %0d", painted); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Localizer display: raster timing plus the two pixel sources, merged.
//
// vga_timing produces the raster. rate_histogram (delay bar and rate bars)
// answers combinationally. semicircle_display (angle slice) answers after
// 2 cycles, so the histogram pixel and the sync signals are delayed by 2
// registers to match. Both sources paint the same background colour BG and
// never paint the same pixel. So the final colour is
//   pixel = hist ^ semi ^ BG
// which gives the non-background source where there is one, and BG elsewhere,
// without a priority multiplexer. Blanking forces black.
// Interface: all inputs belong to the pixel-clock domain. The VGA outputs are
// registered, 3 cycles after the timing counters.
// The report gives the three display parts, the pipelining and the XOR merge.
// The colours are this design's choice.
module display
  import sl_pkg::*;
#(
  parameter int unsigned N  = NUM_DETECTORS,
  parameter int unsigned W  = RATE_W,
  parameter rgb_t        BG = 12'h124
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [W-1:0]         rates [N],
  input  logic [$clog2(N)-1:0] max_idx,
  input  logic                 detected,
  input  logic [W-1:0]         threshold,
  output rgb_t                 vga_rgb_o,
  output logic                 vga_hs_o,
  output logic                 vga_vs_o,
  output logic [10:0]          hcount_o,
  output logic [9:0]           vcount_o
);
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  rgb_t        hist_pix, semi_pix;
  rgb_t        hist_d [2];
  logic [1:0]  hs_d, vs_d, bl_d;
  logic [10:0] hc_d [2];
  logic [9:0]  vc_d [2];

  vga_timing u_timing (
    .clk(clk), .rst(rst),
    .hcount_o(hcount), .vcount_o(vcount),
    .hsync_o(hsync), .vsync_o(vsync), .blank_o(blank)
  );

  rate_histogram #(.N(N), .W(W), .BG(BG)) u_hist (
    .hcount(hcount), .vcount(vcount), .rates(rates),
    .max_idx(max_idx), .detected(detected), .threshold(threshold),
    .pixel_o(hist_pix)
  );

  semicircle_display #(.N(N), .BG(BG)) u_semi (
    .clk(clk), .hcount(hcount), .vcount(vcount),
    .max_idx(max_idx), .detected(detected),
    .pixel_o(semi_pix)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_d    <= '{default: BG};
      hs_d      <= '1;
      vs_d      <= '1;
      bl_d      <= '1;
      hc_d      <= '{default: '0};
      vc_d      <= '{default: '0};
      vga_rgb_o <= '0;
      vga_hs_o  <= 1'b1;
      vga_vs_o  <= 1'b1;
      hcount_o  <= '0;
      vcount_o  <= '0;
    end else begin
      hist_d    <= '{hist_pix, hist_d[0]};
      hs_d      <= {hs_d[0], hsync};
      vs_d      <= {vs_d[0], vsync};
      bl_d      <= {bl_d[0], blank};
      hc_d      <= '{hcount, hc_d[0]};
      vc_d      <= '{vcount, vc_d[0]};
      vga_rgb_o <= bl_d[1] ? '0 : (hist_d[1] ^ semi_pix ^ BG);
      vga_hs_o  <= hs_d[1];
      vga_vs_o  <= vs_d[1];
      hcount_o  <= hc_d[1];
      vcount_o  <= vc_d[1];
    end
  end
endmodule

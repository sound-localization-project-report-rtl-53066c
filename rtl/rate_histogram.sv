// Rate histogram and delay bar: the lower part of the localizer display.
//
// The screen is split into N columns, one per coincidence detector, each
// 1024/N pixels wide. The detector index of a pixel is hcount / COL_W.
//  - Middle band (rows HIST_TOP..BAR_TOP-1): a bar whose height in pixels is
//    that detector's rate, clipped to the band, drawn bottom-up. The threshold
//    is a horizontal line across the band.
//  - Bottom row (rows BAR_TOP..767): the column of the winning detector is
//    filled when its rate is above the threshold.
// Every other pixel, and every pixel outside the visible area, gets the
// background colour BG.
// The output is combinational in hcount/vcount. The caller registers it to
// line it up with other pixel sources.
// The report gives both parts and the column-index method. The row layout,
// the 2-pixel gaps between columns and the colours are this design's choices.
module rate_histogram
  import sl_pkg::*;
#(
  parameter int unsigned N        = NUM_DETECTORS,
  parameter int unsigned W        = RATE_W,
  parameter int unsigned HIST_TOP = 512,
  parameter int unsigned BAR_TOP  = 736,
  parameter rgb_t        BG       = 12'h124,
  parameter rgb_t        BAR_C    = 12'h4C4,
  parameter rgb_t        THR_C    = 12'hF44,
  parameter rgb_t        HIT_C    = 12'hFC0
) (
  input  logic [10:0]          hcount,
  input  logic [9:0]           vcount,
  input  logic [W-1:0]         rates [N],
  input  logic [$clog2(N)-1:0] max_idx,
  input  logic                 detected,
  input  logic [W-1:0]         threshold,
  output rgb_t                 pixel_o
);
  localparam int unsigned COL_W  = H_ACTIVE / N;
  localparam int unsigned IW     = $clog2(N);
  localparam int unsigned HIST_H = BAR_TOP - HIST_TOP;

  logic [IW-1:0] col;
  logic          in_gap;
  logic [9:0]    height;     // height above the bottom of the histogram band

  assign col    = IW'(hcount / 11'(COL_W));
  assign in_gap = (hcount % 11'(COL_W)) < 11'd2;
  assign height = 10'(BAR_TOP - 1) - vcount;

  always_comb begin
    pixel_o = BG;
    if (hcount < 11'(H_ACTIVE) && vcount < 10'(V_ACTIVE)) begin
      if (vcount >= 10'(HIST_TOP) && vcount < 10'(BAR_TOP)) begin
        if ((W + 1)'(height) == (W + 1)'(threshold) && 32'(threshold) < HIST_H)
          pixel_o = THR_C;
        else if (!in_gap && (W + 1)'(height) < (W + 1)'(rates[col]))
          pixel_o = BAR_C;
      end else if (vcount >= 10'(BAR_TOP)) begin
        if (!in_gap && detected && col == max_idx)
          pixel_o = HIT_C;
      end
    end
  end
endmodule

// Semicircle angle-of-arrival display: the upper part of the localizer screen.
//
// The semicircle has radius R = 512 and its centre at (512, CY) on the bottom
// edge of the top region, so its diameter spans the screen width. The delay bar
// below uses the same horizontal scale. Delay is proportional to cos(theta),
// so the source lies on the arc directly above the winning column. Column k
// covers x_L = k*COL_W - 512 .. x_R = x_L + COL_W, relative to the centre.
// A pixel (x, y), with y measured upwards from the centre, is painted when it
// is inside the circle and its slope lies between those of the two arc points
// (x_L, y_L) and (x_R, y_R).
//
// "Pixel is right of edge E" means x*y_E > y*x_E. Computing y_E would need a
// square root, so both sides are squared: x^2*(R^2 - x_E^2) against
// y^2*x_E^2. The sign of x and x_E (y and y_E are never negative) decides which
// way the squared comparison points, or decides alone when the signs differ.
// The slice is (right of L) XOR (right of R).
//
// Pipeline: stage 1 forms x, y and the squares, stage 2 forms the products
// and compares. pixel_o is 2 cycles after hcount/vcount.
// The report gives the cross-multiplication, the squaring, the sign check,
// the XOR and the 2-cycle pipeline. The geometry constants and colours are
// this design's choices.
module semicircle_display
  import sl_pkg::*;
#(
  parameter int unsigned N     = NUM_DETECTORS,
  parameter int unsigned CY    = 511,
  parameter rgb_t        BG    = 12'h124,
  parameter rgb_t        SRC_C = 12'hF80
) (
  input  logic                 clk,
  input  logic [10:0]          hcount,
  input  logic [9:0]           vcount,
  input  logic [$clog2(N)-1:0] max_idx,
  input  logic                 detected,
  output rgb_t                 pixel_o
);
  localparam int unsigned COL_W = H_ACTIVE / N;
  localparam int unsigned R     = H_ACTIVE / 2;
  localparam logic [39:0] R2    = 40'(R * R);

  // stage 1
  logic signed [11:0] x, xl, xr;
  logic        [10:0] y;
  logic        [39:0] x2_q, y2_q, xl2_q, xr2_q;
  logic               sx_q, sl_q, sr_q, region_q;

  assign x  = 12'(hcount) - 12'(R);
  assign y  = 11'(CY) - 11'(vcount);
  assign xl = 12'(32'(max_idx) * COL_W) - 12'(R);
  assign xr = xl + 12'(COL_W);

  function automatic logic [39:0] sq(logic signed [11:0] v);
    logic [11:0] m;
    m = v[11] ? 12'(-v) : v;
    return 40'(m) * 40'(m);
  endfunction

  always_ff @(posedge clk) begin
    x2_q     <= sq(x);
    y2_q     <= 40'(y) * 40'(y);
    xl2_q    <= sq(xl);
    xr2_q    <= sq(xr);
    sx_q     <= x[11];
    sl_q     <= xl[11];
    sr_q     <= xr[11];
    region_q <= detected && hcount < 11'(H_ACTIVE) && vcount <= 10'(CY);
  end

  // stage 2: x*y_E > y*x_E using squares and signs (y, y_E >= 0, so the
  // sign of each side is that of x and of x_E respectively)
  function automatic logic right_of(logic [39:0] x2, logic [39:0] y2, logic [39:0] xe2,
                                    logic sx, logic se);
    logic [79:0] lhs, rhs;
    lhs = 80'(x2) * 80'(R2 - xe2);     // (x * y_E)^2
    rhs = 80'(y2) * 80'(xe2);          // (y * x_E)^2
    unique case ({sx, se})
      2'b01:   return 1'b1;               // lhs >= 0 >= rhs
      2'b10:   return 1'b0;               // lhs <= 0 <= rhs
      2'b00:   return lhs > rhs;
      default: return lhs < rhs;          // both negative
    endcase
  endfunction

  logic in_slice;
  assign in_slice = region_q && (x2_q + y2_q <= R2) &&
                  (right_of(x2_q, y2_q, xl2_q, sx_q, sl_q) ^
                   right_of(x2_q, y2_q, xr2_q, sx_q, sr_q));

  always_ff @(posedge clk) begin
    pixel_o <= in_slice ? SRC_C : BG;
  end
endmodule

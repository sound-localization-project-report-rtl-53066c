// XVGA raster timing generator: 1024x768 at 60 Hz from a 65 MHz pixel clock.
//
// hcount runs 0..1343 and vcount 0..805. Visible pixels are hcount < 1024 and
// vcount < 768, and blank_o is high outside that region. hsync_o and vsync_o are
// active low: hsync for 136 pixels after a 24-pixel front porch, vsync for
// 6 lines after a 3-line front porch. All outputs are registered and belong
// to the same pixel.
// The report names only the 65 MHz display clock and the hcount/vcount
// coordinates. The VESA 1024x768@60 timing used here is the standard one for
// that clock.
module vga_timing #(
  parameter int unsigned H_VIS = 1024, H_FP = 24, H_SYNC = 136, H_BP = 160,
  parameter int unsigned V_VIS = 768,  V_FP = 3,  V_SYNC = 6,   V_BP = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount_o,
  output logic [9:0]  vcount_o,
  output logic        hsync_o,
  output logic        vsync_o,
  output logic        blank_o
);
  localparam int unsigned H_TOTAL = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_VIS + V_FP + V_SYNC + V_BP;

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (hcount_o == 11'(H_TOTAL - 1)) ? '0 : hcount_o + 1'b1;
    v_next = vcount_o;
    if (hcount_o == 11'(H_TOTAL - 1))
      v_next = (vcount_o == 10'(V_TOTAL - 1)) ? '0 : vcount_o + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount_o <= '0;
      vcount_o <= '0;
      hsync_o  <= 1'b1;
      vsync_o  <= 1'b1;
      blank_o  <= 1'b0;
    end else begin
      hcount_o <= h_next;
      vcount_o <= v_next;
      hsync_o  <= !(h_next >= 11'(H_VIS + H_FP) && h_next < 11'(H_VIS + H_FP + H_SYNC));
      vsync_o  <= !(v_next >= 10'(V_VIS + V_FP) && v_next < 10'(V_VIS + V_FP + V_SYNC));
      blank_o  <= (h_next >= 11'(H_VIS)) || (v_next >= 10'(V_VIS));
    end
  end
endmodule

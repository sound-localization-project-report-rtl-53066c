// Band-pass IIR filter bank for one microphone channel.
//
// NUM_BANDS second-order band-pass sections split 100 Hz .. 3 kHz into equal
// slices (16 bands, about 180 Hz each). Each subband has its own coefficient
// supplier (iir_band_coeffs) and its own bit-serial multiply-adder
// (fused_multiply_add). One shared controller steps all subbands together
// through the five terms of the direct-form-I recurrence
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] - a1*y[n-1] - a2*y[n-2].
// The x history is common to all bands. The y history is kept per band at the
// 18-bit output width. The 59-bit sum is rounded, shifted down by the
// coefficient's 35 fraction bits and saturated to 18 bits.
//
// Interface: valid_in with x_in starts a sample, and it must not come while
// busy_o is high. After 5*(38+2)+2 = 202 cycles, y_o holds all
// subband outputs and valid_o pulses once. At 62.5 kHz a new sample comes
// every 1600 cycles, so the bank is idle most of the time.
// The report gives the filter type, the band edges, the band count, the word
// widths, the shift-and-add multipliers and the per-band coefficient modules
// built by a generate loop. The filter order, the direct-form-I structure and
// the rounding are this design's choices.
module iir_filter_bank
  import sl_pkg::*;
#(
  parameter int NUM_BANDS = NUM_SUBBANDS,
  parameter int F_MIN     = F_MIN_HZ,
  parameter int F_MAX     = F_MAX_HZ,
  parameter int FS        = FS_HZ
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  sample_t x_in,
  output sample_t y_o [NUM_BANDS],
  output logic    valid_o,
  output logic    busy_o
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_DONE} state_t;
  state_t state;

  logic [2:0] tap;                 // 0..4 : b0 b1 b2 a1 a2
  sample_t    x0, x1, x2;
  sample_t    y1 [NUM_BANDS];
  sample_t    y2 [NUM_BANDS];
  logic       fma_clear, fma_start, fma_sub;
  logic       b_sel;
  logic [1:0] cidx;
  logic       fma_done [NUM_BANDS];

  assign b_sel     = (tap < 3'd3);
  assign cidx      = b_sel ? tap[1:0] : 2'(tap - 3'd2);
  assign fma_sub   = !b_sel;
  assign fma_start = (state == S_START);
  assign busy_o    = (state != S_IDLE);

  function automatic sample_t round_sat(acc_t a);
    acc_t r;
    r = (a + (acc_t'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > acc_t'(2 ** (SAMPLE_W - 1) - 1))       return sample_t'(2 ** (SAMPLE_W - 1) - 1);
    else if (r < -acc_t'(2 ** (SAMPLE_W - 1)))     return sample_t'(-(2 ** (SAMPLE_W - 1)));
    else                                           return sample_t'(r);
  endfunction

  for (genvar b = 0; b < NUM_BANDS; b++) begin : g_band
    coef_t   coeff;
    sample_t operand;
    acc_t    acc;

    iir_band_coeffs #(
      .SUBBAND_IDX(b), .NUM_BANDS(NUM_BANDS), .F_MIN(F_MIN), .F_MAX(F_MAX), .FS(FS)
    ) u_coeffs (
      .b_sel  (b_sel),
      .idx    (cidx),
      .coeff_o(coeff)
    );

    always_comb begin
      unique case (tap)
        3'd0:    operand = x0;
        3'd1:    operand = x1;
        3'd2:    operand = x2;
        3'd3:    operand = y1[b];
        default: operand = y2[b];
      endcase
    end

    fused_multiply_add u_fma (
      .clk   (clk),
      .rst   (rst),
      .clear (fma_clear),
      .start (fma_start),
      .sub   (fma_sub),
      .data  (operand),
      .coeff (coeff),
      .acc_o (acc),
      .busy_o(),
      .done_o(fma_done[b])
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        y1[b]  <= '0;
        y2[b]  <= '0;
        y_o[b] <= '0;
      end else if (state == S_DONE) begin
        y_o[b] <= round_sat(acc);
        y1[b]  <= round_sat(acc);
        y2[b]  <= y1[b];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      tap       <= '0;
      x0        <= '0;
      x1        <= '0;
      x2        <= '0;
      fma_clear <= 1'b0;
      valid_o   <= 1'b0;
    end else begin
      fma_clear <= 1'b0;
      valid_o   <= 1'b0;
      unique case (state)
        S_IDLE: if (valid_in) begin
          x0        <= x_in;
          tap       <= '0;
          fma_clear <= 1'b1;
          state     <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT: if (fma_done[0]) begin
          if (tap == 3'(NUM_TAPS - 1)) begin
            state <= S_DONE;
          end else begin
            tap   <= tap + 1'b1;
            state <= S_START;
          end
        end
        S_DONE: begin
          x2      <= x1;
          x1      <= x0;
          valid_o <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) valid_in |-> state == S_IDLE);
`endif
endmodule

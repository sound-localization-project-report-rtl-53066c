// Coefficient supplier for one subband of the IIR filter bank.
//
// One instance per subband. SUBBAND_IDX picks which band-pass section of the
// bank it serves. The five taps are computed at elaboration time by
// sl_pkg::band_coef (second-order Butterworth band-pass, 38-bit signed, 35
// fraction bits). Only the constants of that one subband are built.
// The filter controller asks for a coefficient with b_sel (1 = numerator b,
// 0 = denominator a) and idx (0..2 for b, 1..2 for a). a0 is always 1 and is
// never requested. The output is combinational.
// The report describes this module and its selector inputs. It computed
// the coefficients with an offline program. Here the same formula is
// evaluated in the package.
module iir_band_coeffs
  import sl_pkg::*;
#(
  parameter int SUBBAND_IDX  = 0,
  parameter int NUM_BANDS    = NUM_SUBBANDS,
  parameter int F_MIN        = F_MIN_HZ,
  parameter int F_MAX        = F_MAX_HZ,
  parameter int FS           = FS_HZ
) (
  input  logic       b_sel,
  input  logic [1:0] idx,
  output coef_t      coeff_o
);
  localparam coef_t B0 = band_coef(SUBBAND_IDX, NUM_BANDS, F_MIN, F_MAX, FS, 0);
  localparam coef_t B1 = band_coef(SUBBAND_IDX, NUM_BANDS, F_MIN, F_MAX, FS, 1);
  localparam coef_t B2 = band_coef(SUBBAND_IDX, NUM_BANDS, F_MIN, F_MAX, FS, 2);
  localparam coef_t A1 = band_coef(SUBBAND_IDX, NUM_BANDS, F_MIN, F_MAX, FS, 3);
  localparam coef_t A2 = band_coef(SUBBAND_IDX, NUM_BANDS, F_MIN, F_MAX, FS, 4);

  always_comb begin
    unique case ({b_sel, idx})
      3'b100:  coeff_o = B0;
      3'b101:  coeff_o = B1;
      3'b110:  coeff_o = B2;
      3'b001:  coeff_o = A1;
      3'b010:  coeff_o = A2;
      default: coeff_o = '0;
    endcase
  end
endmodule

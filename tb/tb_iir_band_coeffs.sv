// Testbench for iir_band_coeffs: for the first, a middle and the last of the
// 16 subbands, every tap is compared with the Butterworth band-pass formula
// evaluated with the simulator's own $tan and double arithmetic (to 2 LSB of
// the 35-bit fraction). Also checks that the unused selector codes give 0
// and that the poles lie inside the unit circle (a2 < 1).
module tb_iir_band_coeffs;
  import sl_pkg::*;
  int checks = 0, failures = 0;
  localparam int BANDS [3] = '{0, 7, 15};

  logic       b_sel;
  logic [1:0] idx;
  coef_t      c [3];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    iir_band_coeffs #(.SUBBAND_IDX(BANDS[g])) dut (.b_sel(b_sel), .idx(idx), .coeff_o(c[g]));
  end

  function automatic real expected(int band, int tap);
    real flo, fhi, wl, wh, bw, w2, a0;
    flo = 100.0 + 2900.0 * band / 16.0;
    fhi = 100.0 + 2900.0 * (band + 1) / 16.0;
    wl = $tan(3.141592653589793 * flo / 62500.0);
    wh = $tan(3.141592653589793 * fhi / 62500.0);
    bw = wh - wl; w2 = wl * wh; a0 = 1.0 + bw + w2;
    case (tap)
      0: return bw / a0;
      1: return 0.0;
      2: return -bw / a0;
      3: return 2.0 * (w2 - 1.0) / a0;
      default: return (1.0 - bw + w2) / a0;
    endcase
  endfunction

  initial begin
    for (int tap = 0; tap < 5; tap++) begin
      b_sel = (tap < 3);
      idx   = (tap < 3) ? 2'(tap) : 2'(tap - 2);
      #1;
      for (int g = 0; g < 3; g++) begin
        real e, got;
        e   = expected(BANDS[g], tap) * 34359738368.0;
        got = real'(longint'(c[g]));
        checks++;
        if (got - e > 2.0 || e - got > 2.0) begin
          failures++;
          $display("band %0d tap %0d got %f exp %f", BANDS[g], tap, got, e);
        end
        if (tap == 4) begin
          checks++;
          if (!(got < 34359738368.0 && got > 0.0)) failures++;
        end
      end
    end
    b_sel = 0; idx = 0; #1;
    checks++;
    if (c[0] != 0 || c[1] != 0 || c[2] != 0) failures++;
    b_sel = 1; idx = 3; #1;
    checks++;
    if (c[0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Bit-serial fused multiply-add: acc <= acc +/- data * coeff.
//
// The product is built by repeated shifted additions, one coefficient bit per
// clock, through a single ACC_W-bit adder. The coefficient is two's complement,
// so its top bit has negative weight and is subtracted. A start pulse latches
// data, coeff and sub (1 = subtract the product). The unit is then busy for
// COEF_BITS cycles, one addition per cycle. done_o pulses in the cycle after
// the last partial product is added, COEF_BITS+1 cycles after start. A clear
// pulse zeroes the accumulator. It must not coincide with start.
// The report describes the shift-and-add multiplier, the shared adder and the
// 18 x 38 -> 59-bit widths. The handshake is this design's own.
module fused_multiply_add
  import sl_pkg::*;
#(
  parameter int unsigned DATA_BITS = SAMPLE_W,
  parameter int unsigned COEF_BITS = COEF_W,
  parameter int unsigned ACC_BITS  = ACC_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        clear,
  input  logic                        start,
  input  logic                        sub,
  input  logic signed [DATA_BITS-1:0] data,
  input  logic signed [COEF_BITS-1:0] coeff,
  output logic signed [ACC_BITS-1:0]  acc_o,
  output logic                        busy_o,
  output logic                        done_o
);
  localparam int unsigned NW = $clog2(COEF_BITS + 1);

  logic signed [ACC_BITS-1:0]  shifted;   // data << bit position
  logic        [COEF_BITS-1:0] cbits;
  logic        [NW-1:0]        remaining;
  logic                        neg;
  logic signed [ACC_BITS-1:0]  addend;
  logic                        last;

  assign last   = (remaining == NW'(1));
  // top coefficient bit has weight -2^(COEF_BITS-1)
  assign addend = cbits[0] ? shifted : '0;
  assign busy_o = (remaining != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_o     <= '0;
      shifted   <= '0;
      cbits     <= '0;
      remaining <= '0;
      neg       <= 1'b0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (clear) begin
        acc_o <= '0;
      end
      if (start) begin
        shifted   <= ACC_BITS'(data);
        cbits     <= coeff;
        neg       <= sub;
        remaining <= NW'(COEF_BITS);
      end else if (busy_o) begin
        if ((last ^ neg))
          acc_o <= acc_o - addend;
        else
          acc_o <= acc_o + addend;
        shifted   <= shifted <<< 1;
        cbits     <= cbits >> 1;
        remaining <= remaining - 1'b1;
        done_o    <= last;
      end
    end
  end
endmodule

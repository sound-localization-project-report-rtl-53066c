// Jeffress coincidence circuit: two anti-parallel spike delay lines.
//
// Each channel has an N-stage shift register. A valid pulse on a channel moves
// that channel's line one stage and puts the new spike at stage 0. Left spikes
// travel from stage 0 towards N-1, and the right line is read in reverse, so
// the two lines run anti-parallel. Detector i is an AND of left stage i and
// right stage N-1-i. After any shift the AND vector is registered into coinc_o
// and coinc_valid_o pulses. The lines shift only on valid pulses, so
// propagation speed does not matter and no extra clock is needed.
//
// The two channels are sampled half a sample period apart, so a spike pair
// meets at exactly one detector, in the half period after one of its spikes
// moved. With right-minus-left sample index difference D (-N <= D < N), the
// pair meets at detector i = floor((D + N) / 2), once. Detector i therefore
// stands for a true delay of about 2i - N + 1 samples, always an odd number:
// there is no centre detector.
// Timing: coinc_o is valid one cycle after the shift.
// The report gives the delay lines as arrays, the anti-parallel layout, AND
// gates as coincidence latches and valid-driven advance. The number of
// detectors is this design's choice.
module jeffress_circuit #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         left_valid,
  input  logic         left_spike,
  input  logic         right_valid,
  input  logic         right_spike,
  output logic [N-1:0] coinc_o,
  output logic         coinc_valid_o
);
  logic [N-1:0] left_line, right_line;
  logic [N-1:0] fire;
  logic         shifted;

  always_comb begin
    for (int i = 0; i < N; i++) fire[i] = left_line[i] & right_line[N-1-i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      left_line     <= '0;
      right_line    <= '0;
      shifted       <= 1'b0;
      coinc_o       <= '0;
      coinc_valid_o <= 1'b0;
    end else begin
      if (left_valid)  left_line  <= {left_line[N-2:0], left_spike};
      if (right_valid) right_line <= {right_line[N-2:0], right_spike};
      shifted       <= left_valid | right_valid;
      coinc_valid_o <= shifted;
      if (shifted) coinc_o <= fire;
    end
  end
endmodule

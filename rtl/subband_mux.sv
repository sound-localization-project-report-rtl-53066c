// Subband selector in front of the single Jeffress circuit.
//
// Both channels have one spike per subband. band_sel picks one subband. Its
// left and right spikes, with their valid pulses, are registered and passed
// on. A band_sel outside the band range selects nothing, so no valid pulses
// are sent.
// Timing: one cycle of latency. band_sel may change at any time; the change
// takes effect on the next sample.
// The report says only that one subband is multiplexed into the Jeffress
// hardware and chosen by the user. The register stage is this design's
// choice.
module subband_mux #(
  parameter int unsigned NUM_BANDS = 16,
  parameter int unsigned SEL_W     = $clog2(NUM_BANDS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [SEL_W-1:0]     band_sel,
  input  logic [NUM_BANDS-1:0] left_spikes,
  input  logic                 left_valid,
  input  logic [NUM_BANDS-1:0] right_spikes,
  input  logic                 right_valid,
  output logic                 left_spike_o,
  output logic                 left_valid_o,
  output logic                 right_spike_o,
  output logic                 right_valid_o
);
  logic in_range;
  assign in_range = (32'(band_sel) < NUM_BANDS);

  always_ff @(posedge clk) begin
    if (rst) begin
      left_spike_o  <= 1'b0;
      left_valid_o  <= 1'b0;
      right_spike_o <= 1'b0;
      right_valid_o <= 1'b0;
    end else begin
      left_valid_o  <= left_valid && in_range;
      right_valid_o <= right_valid && in_range;
      if (left_valid && in_range)  left_spike_o  <= left_spikes[band_sel];
      if (right_valid && in_range) right_spike_o <= right_spikes[band_sel];
    end
  end
endmodule

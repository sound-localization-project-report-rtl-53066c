// Behavioural model of one I2S MEMS microphone, for testbenches only.
//
// The microphone samples word select on bit-clock rising edges. When word
// select changes to its own channel (SEL = 0 for low, SEL = 1 for high), it
// latches sample_i at that rising edge. It then drives the sample MSB first on
// the following falling edges, so the MSB is read at the second rising edge
// after the change (standard I2S one-bit delay). drive_o tells when it owns the
// shared data line. n_o counts the samples latched so far; the testbench
// computes sample_i from it.
module i2s_mic_model #(
  parameter int unsigned WIDTH = 18
) (
  input  logic                    sclk,
  input  logic                    ws,
  input  logic                    sel,
  input  logic signed [WIDTH-1:0] sample_i,
  output logic                    data_o,
  output logic                    drive_o,
  output int unsigned             n_o
);
  logic             ws_q = 1'b0;
  int unsigned      pos = 0;
  logic [WIDTH-1:0] shreg = '0;

  initial begin
    n_o     = 0;
    data_o  = 1'b0;
    drive_o = 1'b0;
  end

  always @(posedge sclk) begin
    if (ws != ws_q) begin
      pos = 0;
      if (ws == sel) begin
        shreg = sample_i;
        n_o   = n_o + 1;
      end
    end else begin
      pos = pos + 1;
    end
    ws_q = ws;
  end

  always @(negedge sclk) begin
    drive_o <= (ws_q == sel);
    data_o  <= (ws_q == sel && pos < WIDTH) ? shreg[WIDTH-1-pos] : 1'b0;
  end
endmodule

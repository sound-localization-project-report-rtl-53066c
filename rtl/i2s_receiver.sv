// I2S receiver for two MEMS microphones sharing one data line.
//
// The receiver is the I2S bus master. It divides the system clock by SCLK_DIV
// to make the bit clock (100 MHz / 25 = 4 MHz). Word select flips on a bit-clock
// falling edge every BITS_PER_WS bit clocks, so each microphone owns a 32-bit
// slot and the sample rate per microphone is 62.5 kHz. Word select low selects
// the left microphone (SEL tied low), high selects the right one.
// Following standard I2S, the MSB arrives one bit clock after word select
// changes. The first SAMPLE_W bits of each slot are shifted in on bit-clock
// rising edges. The rest of the slot is ignored.
// When the last useful bit of a slot is in, the sample goes to left_o or
// right_o and left_valid_o or right_valid_o pulses for one system clock.
//
// Timing: one sample per channel every 2*BITS_PER_WS*SCLK_DIV = 1600 cycles.
// The right sample arrives half a sample period after the left one.
// The report gives the clock ratio, the 32-bit slots, the 18 useful bits and
// the valid pulses. The one-bit I2S delay, the word-select polarity, the
// two-flop synchronizer on the data input and the single shift register
// that is copied out once a sample is complete are this design's choices.
module i2s_receiver
  import sl_pkg::*;
#(
  parameter int unsigned DIV     = SCLK_DIV,
  parameter int unsigned SLOT    = BITS_PER_WS,
  parameter int unsigned WIDTH   = SAMPLE_W
) (
  input  logic clk,
  input  logic rst,
  // I2S pins
  output logic i2s_sclk,
  output logic i2s_ws,
  input  logic i2s_data,
  // samples
  output logic signed [WIDTH-1:0] left_o,
  output logic                    left_valid_o,
  output logic signed [WIDTH-1:0] right_o,
  output logic                    right_valid_o
);
  localparam int unsigned CW = $clog2(DIV);
  localparam int unsigned BW = $clog2(2 * SLOT);

  logic [CW-1:0]     div_cnt;
  logic [BW-1:0]     bit_cnt;        // bit clock periods within one left+right frame
  logic [1:0]        data_sync;
  logic [WIDTH-1:0]  shreg;
  logic              rise, fall;
  logic [BW-2:0]     slot_pos;

  assign rise     = (div_cnt == CW'(DIV - 1));
  assign fall     = (div_cnt == CW'(DIV / 2 - 1));
  assign slot_pos = bit_cnt[BW-2:0];
  assign i2s_ws   = bit_cnt[BW-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt       <= '0;
      bit_cnt       <= '0;
      i2s_sclk      <= 1'b0;
      data_sync     <= '0;
      shreg         <= '0;
      left_o        <= '0;
      right_o       <= '0;
      left_valid_o  <= 1'b0;
      right_valid_o <= 1'b0;
    end else begin
      data_sync     <= {data_sync[0], i2s_data};
      left_valid_o  <= 1'b0;
      right_valid_o <= 1'b0;
      div_cnt       <= rise ? '0 : div_cnt + 1'b1;
      if (fall) begin
        i2s_sclk <= 1'b0;
        bit_cnt  <= bit_cnt + 1'b1;
      end
      if (rise) begin
        i2s_sclk <= 1'b1;
        if (slot_pos >= 1 && slot_pos <= (BW-1)'(WIDTH)) begin
          shreg <= {shreg[WIDTH-2:0], data_sync[1]};
          if (slot_pos == (BW-1)'(WIDTH)) begin
            if (i2s_ws) begin
              right_o       <= {shreg[WIDTH-2:0], data_sync[1]};
              right_valid_o <= 1'b1;
            end else begin
              left_o        <= {shreg[WIDTH-2:0], data_sync[1]};
              left_valid_o  <= 1'b1;
            end
          end
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_one_channel: assert property (@(posedge clk) disable iff (rst) !(left_valid_o && right_valid_o));
`endif
endmodule

// Downward zero-crossing spike generator for one subband signal.
//
// The filter output is two's complement, so a positive-to-negative zero
// crossing shows as the sign bit going from 0 to 1 between two consecutive
// samples. A two-state FSM (IDLE, EVAL) is started by a 0->1 edge of valid_in.
// In EVAL it compares the new sign bit with the stored one, updates the store,
// presents spike_o for that sample and pulses valid_o. spike_o holds its value
// until the next sample.
// Timing: valid_o comes 2 cycles after the rising edge of valid_in.
// The report gives the sign-bit test, the stored previous output and the
// two-state FSM. Holding spike_o between samples is this design's choice.
module spike_generator (
  input  logic clk,
  input  logic rst,
  input  logic valid_in,
  input  logic sign_in,
  output logic spike_o,
  output logic valid_o
);
  typedef enum logic {S_IDLE, S_EVAL} state_t;
  state_t state;
  logic   valid_q;
  logic   sign_new, sign_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      valid_q   <= 1'b0;
      sign_new  <= 1'b0;
      sign_prev <= 1'b0;
      spike_o   <= 1'b0;
      valid_o   <= 1'b0;
    end else begin
      valid_q <= valid_in;
      valid_o <= 1'b0;
      unique case (state)
        S_IDLE: if (valid_in && !valid_q) begin
          sign_new <= sign_in;
          state    <= S_EVAL;
        end
        S_EVAL: begin
          spike_o   <= sign_new && !sign_prev;
          sign_prev <= sign_new;
          valid_o   <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

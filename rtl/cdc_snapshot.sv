// Clock-domain crossing for a wide, slowly changing status word.
//
// The source side keeps copying src_data into a hold register and toggles
// req. The destination side synchronises req through two flops. When it sees
// a new toggle it loads dst_data from the hold register, which has been stable
// since before the toggle, and returns the toggle as ack. The source side waits
// for ack, synchronised back, before it takes the next copy. So the
// destination always sees a whole, coherent snapshot, at most a few
// destination cycles old.
// The report uses a 100 MHz audio clock and a 65 MHz display clock but does
// not say how the rates cross between them. This handshake is this design's
// own.
module cdc_snapshot #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic [WIDTH-1:0] src_data,
  input  logic             dst_clk,
  input  logic             dst_rst,
  output logic [WIDTH-1:0] dst_data
);
  logic [WIDTH-1:0] hold;
  logic             req, ack_seen;
  logic [1:0]       ack_sync;
  logic [1:0]       req_sync;
  logic             ack;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      hold     <= '0;
      req      <= 1'b0;
      ack_sync <= '0;
      ack_seen <= 1'b0;
    end else begin
      ack_sync <= {ack_sync[0], ack};
      ack_seen <= ack_sync[1];
      if (ack_sync[1] == req && ack_seen == req) begin
        hold <= src_data;
        req  <= !req;
      end
    end
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      req_sync <= '0;
      ack      <= 1'b0;
      dst_data <= '0;
    end else begin
      req_sync <= {req_sync[0], req};
      if (req_sync[1] != ack) begin
        dst_data <= hold;
        ack      <= req_sync[1];
      end
    end
  end
endmodule

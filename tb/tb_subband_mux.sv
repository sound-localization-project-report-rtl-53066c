// Testbench for subband_mux: random spike vectors and valid pulses on both
// channels, random band selections including out-of-range ones. The outputs
// one cycle later must carry the selected band's spikes and the valids
// (suppressed for an out-of-range selection). Spikes must hold between
// valids.
module tb_subband_mux;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int NB = 12;   // not a power of two, so out-of-range codes exist
  logic [3:0] sel;
  logic [NB-1:0] ls, rs;
  logic lv, rv, lso, lvo, rso, rvo;
  int checks = 0, failures = 0;

  subband_mux #(.NUM_BANDS(NB)) dut (.clk(clk), .rst(rst), .band_sel(sel),
    .left_spikes(ls), .left_valid(lv), .right_spikes(rs), .right_valid(rv),
    .left_spike_o(lso), .left_valid_o(lvo), .right_spike_o(rso), .right_valid_o(rvo));

  logic exp_ls = 0, exp_rs = 0;
  initial begin
    sel = 0; ls = 0; rs = 0; lv = 0; rv = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic inr;
      sel = 4'($urandom % 14);
      ls = NB'($urandom); rs = NB'($urandom);
      lv = 1'($urandom); rv = 1'($urandom);
      inr = sel < NB;
      @(negedge clk);
      if (lv && inr) exp_ls = ls[sel];
      if (rv && inr) exp_rs = rs[sel];
      checks += 4;
      if (lvo != (lv && inr)) failures++;
      if (rvo != (rv && inr)) failures++;
      if (lso != exp_ls) failures++;
      if (rso != exp_rs) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

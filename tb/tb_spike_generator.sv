// Testbench for spike_generator: a random sequence of sign bits is presented
// with valid pulses of random length and spacing. Each evaluated sample must
// produce a spike exactly when the sign went 0 -> 1 relative to the previous
// sample. valid_o must come 2 cycles after each valid_in rising edge. A held
// valid_in must not count twice.
module tb_spike_generator;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic vin = 0, sgn = 0, spike, vout;
  int checks = 0, failures = 0, spikes = 0;

  spike_generator dut (.clk(clk), .rst(rst), .valid_in(vin), .sign_in(sgn),
                       .spike_o(spike), .valid_o(vout));

  initial begin
    logic prev, cur;
    int   hold, wait_c;
    prev = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      cur  = 1'($urandom);
      hold = 1 + $urandom % 4;
      @(negedge clk);
      sgn = cur; vin = 1;
      wait_c = 0;
      for (int k = 0; k < hold; k++) begin
        @(negedge clk);
        wait_c++;
        if (k == 0) sgn = 1'($urandom);   // sign only sampled on the rising edge
        if (vout) break;
      end
      while (!vout) begin @(negedge clk); wait_c++; end
      checks++;
      if (wait_c != 2) begin failures++; $display("valid_o after %0d", wait_c); end
      checks++;
      if (spike != (cur && !prev)) begin failures++; $display("n=%0d spike %0d prev %0d cur %0d", n, spike, prev, cur); end
      if (spike) spikes++;
      vin = 0;
      repeat ($urandom % 3) @(negedge clk);
      @(negedge clk);
      checks++;
      if (vout) begin failures++; $display("extra valid_o"); end
      prev = cur;
    end
    checks++;
    if (spikes < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

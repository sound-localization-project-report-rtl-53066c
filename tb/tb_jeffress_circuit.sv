// Testbench for jeffress_circuit (N = 16): isolated spike pairs for every
// right-minus-left sample offset D from -N to N-1, in random order. Left and
// right valids alternate, the right one half a sample period later, as the
// I2S receiver produces them. Each pair must make exactly one detector fire,
// exactly once, at i = floor((D + N) / 2), and coinc_valid must pulse once per
// line shift. A final test with a periodic spike train checks that a steady
// delay keeps hitting the same detector.
module tb_jeffress_circuit;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam int N = 16;
  logic lv = 0, ls = 0, rv = 0, rs = 0;
  logic [N-1:0] coinc;
  logic cv;
  int checks = 0, failures = 0;
  int fires [N];
  int valids = 0, shifts = 0;

  jeffress_circuit #(.N(N)) dut (.clk(clk), .rst(rst), .left_valid(lv), .left_spike(ls),
    .right_valid(rv), .right_spike(rs), .coinc_o(coinc), .coinc_valid_o(cv));

  always @(posedge clk) begin
    if (cv && !rst) begin
      valids++;
      for (int i = 0; i < N; i++) if (coinc[i]) fires[i]++;
    end
  end

  task automatic sample(bit l_spk, bit r_spk);
    @(negedge clk); lv = 1; ls = l_spk; shifts++;
    @(negedge clk); lv = 0; ls = 0;
    repeat (5) @(negedge clk);
    rv = 1; rs = r_spk; shifts++;
    @(negedge clk); rv = 0; rs = 0;
    repeat (5) @(negedge clk);
  endtask

  task automatic clear_counts();
    for (int i = 0; i < N; i++) fires[i] = 0;
  endtask

  initial begin
    int order [2*N];
    for (int k = 0; k < 2 * N; k++) order[k] = k - N;
    order.shuffle();
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (order[k]) begin
      int d, nl, nr, exp_i, total;
      d = order[k];
      nl = N + 2; nr = nl + d;
      clear_counts();
      for (int s = 0; s < 4 * N + 4; s++) sample(s == nl, s == nr);
      repeat (3) @(negedge clk);
      exp_i = (d + N) / 2;   // d + N >= 0, so this is the floor
      total = 0;
      for (int i = 0; i < N; i++) total += fires[i];
      checks += 2;
      if (total != 1) begin failures++; $display("D=%0d total fires %0d", d, total); end
      if (fires[exp_i] != 1) begin failures++; $display("D=%0d detector %0d did not fire", d, exp_i); end
    end
    // periodic train with the right channel 5 samples late, period 40 samples
    clear_counts();
    for (int s = 0; s < 400; s++) sample(s % 40 == 0, s % 40 == 5);
    checks += 2;
    if (fires[(5 + N) / 2] != 10) begin failures++; $display("train hits %0d", fires[(5 + N) / 2]); end
    begin
      int other = 0;
      for (int i = 0; i < N; i++) if (i != (5 + N) / 2) other += fires[i];
      if (other != 0) begin failures++; $display("train stray fires %0d", other); end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (valids != shifts) begin failures++; $display("valids %0d shifts %0d", valids, shifts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for fused_multiply_add: random sequences of signed 18 x 38-bit
// multiply-add and multiply-subtract operations, including the extreme
// operand values. The accumulator is compared with 64-bit integer arithmetic
// after every operation. The busy time of each operation is checked
// (39 cycles from start to done: 38 additions and the registered done).
module tb_fused_multiply_add;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear = 0, start = 0, sub = 0, busy, done;
  sample_t data;
  coef_t   coeff;
  acc_t    acc;
  int checks = 0, failures = 0;
  longint  ref_acc;

  fused_multiply_add dut (.clk(clk), .rst(rst), .clear(clear), .start(start), .sub(sub),
                          .data(data), .coeff(coeff), .acc_o(acc), .busy_o(busy), .done_o(done));

  task automatic op(sample_t d, coef_t c, logic s);
    int cycles;
    longint prod;
    @(negedge clk);
    data = d; coeff = c; sub = s; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    prod = longint'(d) * longint'(c);
    ref_acc = s ? ref_acc - prod : ref_acc + prod;
    checks++;
    if (longint'(acc) != ref_acc) begin
      failures++;
      $display("acc %0d exp %0d (d=%0d c=%0d s=%0d)", acc, ref_acc, d, c, s);
    end
    checks++;
    if (cycles != COEF_W + 1) begin failures++; $display("latency %0d", cycles); end
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_acc = 0;
    checks++;
    if (acc != 0) failures++;
  endtask

  initial begin
    data = '0; coeff = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    do_clear();
    op(18'sh1FFFF, 38'sh1F_FFFF_FFFF, 0);
    op(-18'sh20000, -38'sh20_0000_0000, 0);
    op(-18'sh20000, 38'sh1F_FFFF_FFFF, 1);
    op(18'sd1, -38'sd1, 0);
    for (int k = 0; k < 300; k++) begin
      if (k % 5 == 0) do_clear();
      op(sample_t'($urandom), coef_t'({$urandom, $urandom}), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for vga_timing over two frames: checks the 1344-pixel line and the
// 806-line frame, the 136-pixel hsync pulse starting at pixel 1048, the
// 6-line vsync pulse starting at line 771, and blanking outside 1024x768.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [10:0] h; logic [9:0] v; logic hs, vs, bl;
  int checks = 0, failures = 0;
  int frames = 0;

  vga_timing dut (.clk(clk), .rst(rst), .hcount_o(h), .vcount_o(v),
                  .hsync_o(hs), .vsync_o(vs), .blank_o(bl));

  longint cyc = 0, last_vs_fall = -1;
  logic vs_q = 1;
  int max_h = 0, max_v = 0;
  always @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      vs_q <= vs;
      checks += 3;
      if (hs != !(h >= 1048 && h < 1184)) failures++;
      if (vs != !(v >= 771 && v < 777)) failures++;
      if (bl != (h >= 1024 || v >= 768)) failures++;
      if (int'(h) > max_h) max_h = h;
      if (int'(v) > max_v) max_v = v;
      if (!vs && vs_q) begin
        if (last_vs_fall >= 0) begin
          checks++;
          if (cyc - last_vs_fall != 1344 * 806) begin failures++; $display("frame %0d", cyc - last_vs_fall); end
        end
        last_vs_fall <= cyc;
        frames++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (frames == 3);
    checks += 2;
    if (max_h != 1343) failures++;
    if (max_v != 805) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

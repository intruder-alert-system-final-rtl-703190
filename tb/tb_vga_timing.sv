// tb_vga_timing: runs vga_timing for two frames with the pixel enable high
// every other clock and measures line and frame periods, sync widths and
// positions, and the number of visible pixels per frame (640 x 480 at
// 800 x 525 pixel times).
module tb_vga_timing;
  logic clk = 0, rst_n = 0, pix_ce = 0;
  logic [9:0] h_cnt, v_cnt;
  logic active, hs_n, vs_n, hs_q = 1, vs_q = 1;
  int checks = 0, failures = 0;
  longint pix = 0, last_hs_fall = -1, last_vs_fall = -1, hs_fall_at, act = 0, frames = 0;

  vga_timing dut (.clk, .rst_n, .pix_ce, .h_cnt, .v_cnt, .active, .hs_n, .vs_n);

  always #5 clk = ~clk;
  always @(negedge clk) pix_ce <= ~pix_ce;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at pix %0d", what, pix); end
  endtask

  always @(posedge clk) if (rst_n && pix_ce) begin
    if (active) act++;
    if (hs_q && !hs_n) begin
      check(h_cnt == 656, "hsync starts after 640 + 16");
      if (last_hs_fall >= 0) check(pix - last_hs_fall == 800, "800 pixels per line");
      last_hs_fall = pix;
    end
    if (!hs_q && hs_n) check(pix - last_hs_fall == 96, "hsync 96 pixels");
    if (vs_q && !vs_n) begin
      check(v_cnt == 490 && h_cnt == 0, "vsync starts after 480 + 10 lines");
      if (last_vs_fall >= 0) begin
        check(pix - last_vs_fall == 800 * 525, "420000 pixels per frame");
        check(act == 640 * 480, "307200 visible pixels");
        frames++;
      end
      act = 0;
      last_vs_fall = pix;
    end
    if (!vs_q && vs_n) check(pix - last_vs_fall == 2 * 800, "vsync 2 lines");
    hs_q <= hs_n;
    vs_q <= vs_n;
    pix++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (frames == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

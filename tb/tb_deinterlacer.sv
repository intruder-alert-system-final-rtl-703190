// tb_deinterlacer: feeds lines of 360 pixels (242 lines per field) into the
// deinterlacer and checks that nothing leaves before the first frame end, and
// that afterwards exactly the 320 x 240 pixels come out with the right x, y
// and value, followed by a frame_done pulse.
module tb_deinterlacer;
  import ias_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] pix = 0;
  logic pix_valid = 0, line_end = 0, frame_end = 0;
  pixel_xy_t pixel_out;
  logic pixel_en, frame_done;
  int checks = 0, failures = 0, count = 0, n_done = 0;
  int ex, ey;

  deinterlacer dut (.clk, .rst_n, .pix, .pix_valid, .line_end, .frame_end,
    .pixel_out, .pixel_en, .frame_done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] val(int x, int y);
    return 8'(x * 5 + y * 11);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (pixel_en) begin
      ex = count % 320; ey = count / 320;
      check(pixel_out.x == 9'(ex) && pixel_out.y == 8'(ey), "position");
      check(pixel_out.pix == val(ex, ey), "value");
      count++;
    end
    if (frame_done) n_done++;
  end

  task automatic field_pass();
    for (int y = 0; y < 242; y++) begin
      for (int x = 0; x < 360; x++) begin
        @(negedge clk) pix_valid = 1; pix = val(x, y);
      end
      @(negedge clk) pix_valid = 0; line_end = 1;
      @(negedge clk) line_end = 0;
    end
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // half a field before any frame end: must be ignored
    for (int x = 0; x < 100; x++) begin
      @(negedge clk) pix_valid = 1; pix = 8'hAA;
    end
    @(negedge clk) pix_valid = 0; frame_end = 1;
    @(negedge clk) frame_end = 0;
    check(count == 0 && n_done == 0, "silent until synchronised");
    field_pass();
    repeat (3) @(posedge clk);
    check(count == 320 * 240, "76800 pixels per frame");
    check(n_done == 1, "one frame_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

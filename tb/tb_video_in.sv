// tb_video_in: two full-size BT.656 frames (244 picture lines per field)
// through video_in. The first frame only synchronises the position; the
// second must deliver all 320 x 240 pixels, pixel (x, y) being the luma of
// full-resolution sample 2x on line y of field 0.
module tb_video_in;
  import ias_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] td_data;
  logic td_valid, busy, pixel_en, frame_done;
  pixel_xy_t pixel_out;
  int checks = 0, failures = 0, count = 0, n_done = 0, ex, ey;

  bt656_source #(.ACT_LINES(244), .VB_LINES(3), .HB_BYTES(8), .STROBE(1)) src (
    .clk, .start, .nframes(2), .object_on(1'b0), .td_data, .td_valid, .busy);
  video_in dut (.clk, .rst_n, .td_data, .td_valid, .pixel_out, .pixel_en, .frame_done);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s count=%0d", what, count); end
  endtask

  function automatic logic [7:0] luma(int p, int l, int fl);
    return 8'(16 + ((p + 3 * l + 64 * fl) % 200));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (pixel_en) begin
      ex = count % 320; ey = count / 320;
      check(pixel_out.x == 9'(ex) && pixel_out.y == 8'(ey), "position");
      check(pixel_out.pix == luma(2 * ex, ey, 0), "value");
      count++;
    end
    if (frame_done) begin
      n_done++;
      check(count == 320 * 240, "full frame before frame_done");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    wait (!busy);
    repeat (10) @(posedge clk);
    check(n_done == 1, "one stored frame");
    check(count == 320 * 240, "pixel count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_to_rgb: all 256 byte values through pixel_to_rgb: 0xFF must be
// red, 0xFE green, every other value an equal grey on all three channels
// that grows with the byte value and spans 0 to 1020 or more.
module tb_pixel_to_rgb;
  logic [7:0] pix;
  logic [9:0] r, g, b, prev;
  logic box;
  int checks = 0, failures = 0;

  pixel_to_rgb dut (.pix, .r, .g, .b, .box);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s pix=%h", what, pix); end
  endtask

  initial begin
    prev = 0;
    for (int i = 0; i < 256; i++) begin
      pix = 8'(i); #1;
      if (i == 255) check(r == 1023 && g == 0 && b == 0 && box, "0xFF is red");
      else if (i == 254) check(r == 0 && g == 1023 && b == 0 && box, "0xFE is green");
      else begin
        check(r == g && g == b && !box, "grey");
        check(r[9:2] == 8'(i), "top bits carry the byte");
        if (i > 0) check(r > prev, "monotonic");
        prev = r;
      end
    end
    pix = 0; #1 check(r == 0, "black");
    pix = 8'hFD; #1 check(r >= 10'd1012, "near white");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

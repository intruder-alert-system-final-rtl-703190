// tb_video_out: video_out reading two different frames from the SDRAM model.
// Every displayed pixel of frames 2 and 3 is compared with the stored byte it
// must show (stored pixel (h/2, v/2) through the grey / red / green mapping),
// and the blanking, hsync and vsync outputs are checked pixel by pixel. The
// frame base is changed in the middle of frame 2: that frame must still come
// from the old slot and frame 3 from the new one. Outline pixels are counted.
module tb_video_out;
  localparam logic [22:0] B0 = 23'h020000, B1 = 23'h0C0000;
  logic clk = 0, rst_n = 0, pix_ce;
  logic [1:0] div = 0;
  logic [22:0] vga_base_addr = B0, avm_address;
  logic avm_read, avm_waitrequest, avm_readdatavalid;
  logic [7:0] avm_readdata;
  logic [9:0] vga_r, vga_g, vga_b, er, eg, eb;
  logic vga_blank_n, vga_sync_n, vga_hs, vga_vs, box_shown, underrun;
  int checks = 0, failures = 0, stalls, nbox = 0, nspecial = 0;
  longint n = 0;
  int h, v, frame;
  logic [22:0] shown;
  logic [7:0] byte_v;

  avalon_sdram_model #(.AW(23), .READ_LAT(2), .RAND_WAIT(7)) mem (.clk,
    .w_address('0), .w_write(1'b0), .w_writedata('0), .w_waitrequest(),
    .r_address(avm_address), .r_read(avm_read), .r_waitrequest(avm_waitrequest),
    .r_readdata(avm_readdata), .r_readdatavalid(avm_readdatavalid), .stalls);

  video_out dut (.clk, .rst_n, .pix_ce, .vga_base_addr, .avm_address, .avm_read,
    .avm_waitrequest, .avm_readdata, .avm_readdatavalid, .vga_r, .vga_g, .vga_b,
    .vga_blank_n, .vga_sync_n, .vga_hs, .vga_vs, .box_shown, .underrun);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) div <= div + 1'b1;
  assign pix_ce = rst_n && div == 2'd3;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s h=%0d v=%0d frame=%0d", what, h, v, frame); end
  endtask

  function automatic logic [7:0] pat(logic [22:0] base, int x, int y);
    if (base == B0) begin
      if (y == 30 && x >= 40 && x < 60) return 8'hFF;
      if (x == 40 && y >= 30 && y < 50) return 8'hFE;
      return 8'((x + 2 * y) % 250);
    end
    return 8'((3 * x + y + 77) % 251);
  endfunction

  // After a pixel-enable edge the outputs show the pixel counted there.
  always @(negedge clk) if (rst_n && div == 2'd0 && n > 0) begin
    h = int'((n - 1) % 800); v = int'(((n - 1) / 800) % 525); frame = int'((n - 1) / 420000);
    if (frame >= 1) begin
      shown = (frame == 1) ? B0 : B1;
      check(vga_hs == !(h >= 656 && h < 752), "hsync");
      check(vga_vs == !(v >= 490 && v < 492), "vsync");
      check(vga_blank_n == (h < 640 && v < 480), "blank");
      if (h < 640 && v < 480) begin
        byte_v = pat(shown, h / 2, v / 2);
        if (byte_v == 8'hFF)      begin er = 1023; eg = 0;    eb = 0; end
        else if (byte_v == 8'hFE) begin er = 0;    eg = 1023; eb = 0; end
        else begin er = 10'(byte_v * 4 + byte_v / 64); eg = er; eb = er; end
        check(vga_r == er && vga_g == eg && vga_b == eb, "pixel colour");
        if (frame == 1 && (byte_v == 8'hFF || byte_v == 8'hFE)) nspecial++;
        if (frame == 1) nbox += int'(box_shown);
      end else begin
        check(vga_r == 0 && vga_g == 0 && vga_b == 0, "black in blanking");
      end
    end
  end

  always @(posedge clk) if (pix_ce) n <= n + 1;

  initial begin
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x++) begin
        mem.mem[B0 + 23'(y * 320 + x)] = pat(B0, x, y);
        mem.mem[B1 + 23'(y * 320 + x)] = pat(B1, x, y);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n == 420000 + 200000);              // middle of frame 2
    vga_base_addr = B1;
    wait (n == 3 * 420000 + 2);
    @(negedge clk);
    check(nspecial == 4 * 39 && nbox == nspecial, "outline pixels shown as boxes");
    check(!underrun, "row fetches on time");
    check(stalls > 0, "bus stalls seen");
    check(vga_sync_n == 0, "no sync on green");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

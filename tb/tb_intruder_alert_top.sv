// tb_intruder_alert_top: end-to-end run of intruder_alert_top at its default
// parameters, with a BT.656 camera stream (one byte every 4 clocks, close to
// the 27 MHz byte rate against a 100 MHz system clock), a two-master SDRAM
// model and a behavioural processor that runs the block-based motion
// detection and the circular-buffer handshake.
//
// 1. Detection off: three camera frames. The first only synchronises; the
//    next two are stored and each moves the buffer on by itself. The stored
//    frame is compared byte by byte with the camera picture.
// 2. Detection on: the background button stores the current software slot.
//    Two frames with a bright square follow. For each, the processor compares
//    its slot with the background in 10 x 10 blocks (pixel difference over 16
//    grey levels counts, more than 10 of 100 pixels flags the block), draws
//    the outer edges of the flagged area in red (0xFF) and the block centres
//    in green (0xFE), and hands the frame on. Exactly the 16 blocks under the
//    square must be flagged.
// 3. A burst of 40 quick hand-overs makes the TV pointer pass the background
//    slot, which it must skip.
// Throughout, every displayed VGA pixel of every frame after the first is
// compared with the stored byte it must show. Each mechanism (automatic and
// software shifts, background capture and skip, bus stalls on both masters,
// red and green outline pixels on screen) is counted and must occur.
module tb_intruder_alert_top;
  import ias_pkg::*;
  logic clk = 0, rst_n = 0, sw_detect_en = 0, set_background_n = 1, start = 0, object_on = 0;
  logic [7:0] td_data, wr_writedata, rd_readdata;
  logic td_valid, td_reset_n, src_busy;
  logic [22:0] wr_address, rd_address, software_base_addr, background_frame_addr;
  logic wr_write, wr_waitrequest, rd_read, rd_waitrequest, rd_readdatavalid;
  logic software_finished = 0, software_ready, background_valid;
  logic [9:0] vga_r, vga_g, vga_b, er, eg, eb;
  logic vga_blank_n, vga_sync_n, vga_hs, vga_vs, vga_clk;
  logic frame_written, buffer_shift, box_shown, fifo_overflow, vga_underrun;
  int checks = 0, failures = 0, stalls, nframes_src = 0;
  int n_auto = 0, n_swshift = 0, n_bgskip = 0, n_wr_stall = 0, n_rd_stall = 0;
  int n_red = 0, n_green = 0, n_written = 0, n_flagged = 0;
  longint n = 0;
  int h, v, vframe;
  logic [22:0] shown_base, prev_tv;
  logic shift_seen = 1'b0;
  logic [7:0] byte_v;

  bt656_source #(.ACT_LINES(244), .VB_LINES(3), .HB_BYTES(8), .STROBE(4)) cam (
    .clk, .start, .nframes(nframes_src), .object_on, .td_data, .td_valid, .busy(src_busy));

  avalon_sdram_model #(.AW(23), .READ_LAT(2), .RAND_WAIT(9)) sdram (.clk,
    .w_address(wr_address), .w_write(wr_write), .w_writedata(wr_writedata),
    .w_waitrequest(wr_waitrequest), .r_address(rd_address), .r_read(rd_read),
    .r_waitrequest(rd_waitrequest), .r_readdata(rd_readdata),
    .r_readdatavalid(rd_readdatavalid), .stalls);

  intruder_alert_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s (h=%0d v=%0d vframe=%0d)", what, h, v, vframe); end
  endtask

  function automatic logic [7:0] luma(int p, int l, int fl);
    return 8'(16 + ((p + 3 * l + 64 * fl) % 200));
  endfunction

  // ---------------- mechanism counters ----------------
  always @(posedge clk) if (rst_n) begin
    if (wr_write && wr_waitrequest) n_wr_stall++;
    if (rd_read && rd_waitrequest) n_rd_stall++;
    if (frame_written) n_written++;
    if (buffer_shift && !sw_detect_en) n_auto++;
    if (buffer_shift && sw_detect_en) n_swshift++;
    if (buffer_shift) begin
      prev_tv     <= dut.tv_base_addr;
      shift_seen  <= 1'b1;
    end
  end
  // a TV pointer step of two slots is a skip over the background slot
  always @(negedge clk) if (rst_n && shift_seen) begin
    shift_seen = 1'b0;
    if (background_valid && ((dut.tv_base_addr >> 17) - (prev_tv >> 17)) % 32 == 2) begin
      n_bgskip++;
      check(((prev_tv >> 17) + 1) % 32 == (background_frame_addr >> 17), "skip is over the background");
    end
  end

  // ---------------- VGA checker ----------------
  always @(posedge clk) if (dut.pix_ce) n <= n + 1;
  always @(negedge clk) if (rst_n && dut.div == 2'd0 && n > 0) begin
    h = int'((n - 1) % 800); v = int'(((n - 1) / 800) % 525); vframe = int'((n - 1) / 420000);
    if (h == 0 && v == 0) shown_base = dut.u_vout.frame_base;
    if (vframe >= 1) begin
      check(vga_hs == !(h >= 656 && h < 752) && vga_vs == !(v >= 490 && v < 492), "syncs");
      check(vga_blank_n == (h < 640 && v < 480), "blank");
      if (h < 640 && v < 480) begin
        byte_v = sdram.mem[shown_base + 23'((v / 2) * 320 + h / 2)];
        if (byte_v == 8'hFF)      begin er = 1023; eg = 0;    eb = 0; end
        else if (byte_v == 8'hFE) begin er = 0;    eg = 1023; eb = 0; end
        else begin er = 10'(int'(byte_v) * 4 + int'(byte_v) / 64); eg = er; eb = er; end
        check(vga_r == er && vga_g == eg && vga_b == eb, "displayed pixel");
        if (box_shown && vga_r == 1023) n_red++;
        if (box_shown && vga_g == 1023) n_green++;
      end
    end
  end

  // ---------------- behavioural processor ----------------
  task automatic handshake();
    @(negedge clk) software_finished = 1;
    wait (software_ready);
    @(negedge clk) software_finished = 0;
    wait (!software_ready);
  endtask

  // Block motion detection on the software slot against the background.
  task automatic detect_and_mark(output int flagged);
    bit flag [24][32];
    logic [22:0] cur, bg;
    int viol;
    cur = software_base_addr; bg = background_frame_addr;
    flagged = 0;
    for (int by = 0; by < 24; by++)
      for (int bx = 0; bx < 32; bx++) begin
        viol = 0;
        for (int y = 0; y < 10; y++)
          for (int x = 0; x < 10; x++) begin
            int a, b;
            a = int'(sdram.mem[cur + 23'((by * 10 + y) * 320 + bx * 10 + x)]);
            b = int'(sdram.mem[bg  + 23'((by * 10 + y) * 320 + bx * 10 + x)]);
            if ((a > b ? a - b : b - a) > 16) viol++;
          end
        flag[by][bx] = (viol > 10);
        if (flag[by][bx]) flagged++;
      end
    for (int by = 0; by < 24; by++)
      for (int bx = 0; bx < 32; bx++) if (flag[by][bx]) begin
        for (int i = 0; i < 10; i++) begin
          if (by == 0  || !flag[by-1][bx]) sdram.mem[cur + 23'((by * 10) * 320 + bx * 10 + i)] = 8'hFF;
          if (by == 23 || !flag[by+1][bx]) sdram.mem[cur + 23'((by * 10 + 9) * 320 + bx * 10 + i)] = 8'hFF;
          if (bx == 0  || !flag[by][bx-1]) sdram.mem[cur + 23'((by * 10 + i) * 320 + bx * 10)] = 8'hFF;
          if (bx == 31 || !flag[by][bx+1]) sdram.mem[cur + 23'((by * 10 + i) * 320 + bx * 10 + 9)] = 8'hFF;
        end
        sdram.mem[cur + 23'((by * 10 + 5) * 320 + bx * 10 + 5)] = 8'hFE;
      end
  endtask

  task automatic stream(int frames, bit obj);
    @(negedge clk) nframes_src = frames; object_on = obj; start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    wait (!src_busy);
  endtask

  initial begin
    int flagged;
    logic [22:0] slot;
    prev_tv = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    check(td_reset_n, "TV chip out of reset");

    // 1. detection off
    fork
      stream(3, 1'b0);
    join
    repeat (20) @(posedge clk);
    check(n_written == 2 && n_auto == 2, "two stored frames, two automatic shifts");
    slot = software_base_addr;                 // the frame stored last
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x++)
        check(sdram.mem[slot + 23'(y * 320 + x)] == luma(2 * x, y, 0), "stored camera pixel");

    // 2. detection on, background, two frames with an object
    sw_detect_en = 1;
    @(negedge clk) set_background_n = 0;
    repeat (5) @(negedge clk);
    set_background_n = 1;
    check(background_valid && background_frame_addr == slot, "background is the software slot");
    for (int k = 0; k < 2; k++) begin
      fork
        stream(1, 1'b1);
        begin
          @(posedge clk iff frame_written);
        end
      join
      detect_and_mark(flagged);
      if (k == 0) check(flagged == 0, "background against itself: no motion");
      else begin
        check(flagged == 16, "16 blocks under the moving square");
        n_flagged = flagged;
      end
      handshake();
    end
    // the marked frame is now the VGA slot: show it for two VGA frames
    repeat (2 * 420000 * 4 + 8000) @(posedge clk);

    // 3. burst of hand-overs past the background slot
    for (int i = 0; i < 40; i++) begin
      handshake();
      check(dut.tv_base_addr != background_frame_addr, "TV never on the background slot");
    end
    repeat (10) @(posedge clk);

    check(n_swshift == 42, "software shifts");
    check(n_bgskip >= 1, "background slot skipped");
    check(n_wr_stall > 0 && n_rd_stall > 0, "bus stalls on both masters");
    check(n_red > 0 && n_green > 0, "red and green outline pixels displayed");
    check(!fifo_overflow, "no input pixels lost");
    check(!vga_underrun, "no late row fetch");
    $display("auto=%0d swshift=%0d bgskip=%0d wrstall=%0d rdstall=%0d red=%0d green=%0d flagged=%0d",
             n_auto, n_swshift, n_bgskip, n_wr_stall, n_rd_stall, n_red, n_green, n_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

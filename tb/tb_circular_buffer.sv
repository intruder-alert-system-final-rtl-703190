// tb_circular_buffer: checks the slot pointers of circular_buffer.
// Covers reset slots, the software handshake (ready, tv_enable, one shift per
// request), wrap-around of the 32-slot ring, automatic shifts with the
// software disabled, and the background slot being skipped by the TV pointer.
module tb_circular_buffer;
  logic clk = 0, rst_n = 0;
  logic control_device = 1, software_finished = 0, frame_written = 0, set_background_n = 1;
  logic [22:0] tv, sw, vga, bg;
  logic tv_enable, software_ready, bg_valid, shift;
  int checks = 0, failures = 0;
  int e_vga, e_sw, e_tv, e_bg;
  bit e_bgv;

  circular_buffer dut (.clk, .rst_n, .control_device, .software_finished, .frame_written,
    .set_background_n, .tv_base_addr(tv), .tv_enable, .software_base_addr(sw), .software_ready,
    .vga_base_addr(vga), .background_frame_addr(bg), .background_valid(bg_valid), .shift);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_slots(string what);
    check(vga == 23'(e_vga) << 17, {what, " vga"});
    check(sw  == 23'(e_sw)  << 17, {what, " sw"});
    check(tv  == 23'(e_tv)  << 17, {what, " tv"});
    check(bg_valid == e_bgv, {what, " bg valid"});
    if (e_bgv) check(bg == 23'(e_bg) << 17, {what, " bg"});
  endtask

  // Expected effect of one shift: everything moves one place, TV avoids bg.
  task automatic model_shift();
    e_vga = e_sw; e_sw = e_tv;
    e_tv = (e_tv + 1) % 32;
    if (e_bgv && e_tv == e_bg) e_tv = (e_tv + 1) % 32;
  endtask

  task automatic sw_shift();
    @(negedge clk) software_finished = 1;
    @(posedge clk); #1;
    check(software_ready && !tv_enable, "ready up, tv disabled");
    model_shift();
    check_slots("after sw shift");
    @(negedge clk);
    check(software_ready, "ready held while finished high");
    software_finished = 0;
    @(posedge clk); #1;
    check(!software_ready && tv_enable, "ready back down");
    check_slots("no double shift");
  endtask

  initial begin
    e_vga = 0; e_sw = 1; e_tv = 2; e_bg = 0; e_bgv = 0;
    repeat (3) @(posedge clk);
    #1 check_slots("reset");
    check(tv_enable && !software_ready, "reset handshake");
    rst_n = 1;
    for (int i = 0; i < 40; i++) sw_shift();          // wraps the ring
    // software disabled: one shift per written frame
    control_device = 0;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) frame_written = 1;
      @(negedge clk) frame_written = 0;
      model_shift();
      #1 check_slots("auto shift");
    end
    // background request ignored while the software is off
    @(negedge clk) set_background_n = 0;
    repeat (2) @(negedge clk);
    set_background_n = 1;
    #1 check(!bg_valid, "background ignored when disabled");
    control_device = 1;
    @(negedge clk) set_background_n = 0;
    @(negedge clk);
    e_bg = e_sw; e_bgv = 1;
    #1 check_slots("background set");
    repeat (3) @(negedge clk);
    set_background_n = 1;
    for (int i = 0; i < 70; i++) begin
      sw_shift();
      check(tv != bg, "TV never on background slot");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

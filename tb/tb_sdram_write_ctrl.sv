// tb_sdram_write_ctrl: offers a stream of positioned pixels (ending with the
// last pixel of a frame) to sdram_write_ctrl behind a slave that stalls at
// random. Checks each accepted write's byte address (base + y*320 + x) and
// data, that nothing starts while tv_enable is low, the one frame_written
// pulse, and that address and data stay put while waitrequest is high.
module tb_sdram_write_ctrl;
  import ias_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [22:0] base = 23'h0A0000;
  logic tv_enable = 1;
  pixel_xy_t fifo_data, src[$];
  logic fifo_empty, fifo_rd, avm_write, avm_waitrequest = 0, frame_written;
  logic [22:0] avm_address;
  logic [7:0] avm_writedata;
  int checks = 0, failures = 0, accepted = 0, n_fw = 0, n_stall = 0, total, n_before;

  sdram_write_ctrl dut (.clk, .rst_n, .tv_base_addr(base), .tv_enable, .fifo_data, .fifo_empty,
    .fifo_rd, .avm_address, .avm_write, .avm_writedata, .avm_waitrequest, .frame_written);

  always #5 clk = ~clk;
  assign fifo_empty = (src.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : src[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) avm_waitrequest <= ($urandom % 3 == 0);

  always @(posedge clk) if (rst_n) begin
    if (avm_write && avm_waitrequest) n_stall++;
    if (avm_write && !avm_waitrequest) begin
      check(src.size() > 0, "write without pixel");
      if (src.size() > 0) begin
        check(avm_address == base + 23'(src[0].y) * 320 + 23'(src[0].x), "address");
        check(avm_writedata == src[0].pix, "data");
      end
      accepted++;
    end
    if (fifo_rd) void'(src.pop_front());
    if (frame_written) n_fw++;
  end

  initial begin
    pixel_xy_t p;
    for (int i = 0; i < 200; i++) begin
      p.x = 9'($urandom % 320); p.y = 8'($urandom % 239); p.pix = 8'($urandom);
      src.push_back(p);
    end
    p.x = 319; p.y = 239; p.pix = 8'h5A;
    src.push_back(p);
    total = src.size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    // hold off new writes for a while
    @(negedge clk) tv_enable = 0;
    while (avm_write) @(negedge clk);         // a write already on the bus may finish
    @(negedge clk);
    n_before = accepted;
    repeat (30) @(negedge clk);
    check(accepted == n_before, "no writes while tv_enable low");
    tv_enable = 1;
    wait (src.size() == 0);
    repeat (5) @(posedge clk);
    check(accepted == total, "every pixel written once");
    check(n_fw == 1, "one frame_written");
    check(n_stall > 0, "waitrequest stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

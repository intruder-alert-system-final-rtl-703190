// tb_line_buffer: fills both banks with different patterns and reads every
// location back, checking the banks are independent and out-of-range reads
// return zero.
module tb_line_buffer;
  logic clk = 0, wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [8:0] wr_x = 0, rd_x = 0;
  logic [7:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;

  line_buffer dut (.clk, .wr_en, .wr_bank, .wr_x, .wr_data, .rd_bank, .rd_x, .rd_data);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] pat(int b, int x);
    return 8'(b ? (x * 7 + 3) : (255 - x));
  endfunction

  initial begin
    for (int b = 0; b < 2; b++)
      for (int x = 0; x < 320; x++) begin
        @(negedge clk) wr_en = 1; wr_bank = b[0]; wr_x = 9'(x); wr_data = pat(b, x);
      end
    @(negedge clk) wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int x = 0; x < 320; x++) begin
        rd_bank = b[0]; rd_x = 9'(x); #1;
        check(rd_data == pat(b, x), "read back");
      end
    rd_x = 400; #1;
    check(rd_data == 0, "out of range reads zero");
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

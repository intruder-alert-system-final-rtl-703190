// tb_frame_scaler: drives luma samples and line/field markers into
// frame_scaler and checks that only even-indexed samples of field 0 pass,
// and that only field-0 markers are forwarded.
module tb_frame_scaler;
  logic clk = 0, rst_n = 0;
  logic [7:0] y_data = 0, pix;
  logic y_valid = 0, field = 0, eol = 0, field_end = 0;
  logic pix_valid, line_end, frame_end;
  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  int n_le = 0, n_fe = 0;

  frame_scaler dut (.clk, .rst_n, .y_data, .y_valid, .field, .eol, .field_end,
    .pix, .pix_valid, .line_end, .frame_end);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (pix_valid) begin
      check(expq.size() > 0, "unexpected pixel");
      if (expq.size() > 0) check(pix == expq.pop_front(), "pixel value");
    end
    if (line_end) n_le++;
    if (frame_end) n_fe++;
  end

  task automatic send_line(bit f, int n, int seed);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      field = f; y_valid = 1; y_data = 8'(seed + 7 * i);
      if (!f && i % 2 == 0) expq.push_back(y_data);
      @(negedge clk) y_valid = 0;        // a gap between samples
    end
    @(negedge clk) eol = 1;
    @(negedge clk) eol = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 5; l++) send_line(1'b0, 21 + l, l * 13);
    @(negedge clk) field_end = 1;
    @(negedge clk) field_end = 0;
    for (int l = 0; l < 5; l++) send_line(1'b1, 20, l);
    @(negedge clk) field = 1; field_end = 1;
    @(negedge clk) field_end = 0;
    repeat (4) @(posedge clk);
    check(expq.size() == 0, "all kept pixels seen");
    check(n_le == 5, "line ends of field 0 only");
    check(n_fe == 1, "frame end of field 0 only");
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

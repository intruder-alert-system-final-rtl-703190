// tb_itu656_decoder: streams two small BT.656 frames through itu656_decoder
// and checks every luma sample (value, order, field), the end-of-line pulses
// and the end-of-field pulses against the generator's formula.
module tb_itu656_decoder;
  localparam int ACT = 4, VB = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] td_data, y_data;
  logic td_valid, busy, y_valid, field, eol, field_end;
  int checks = 0, failures = 0;
  int px = 0, ln = 0, f = 0, nlines = 0, nfields = 0, nsamples = 0;

  bt656_source #(.ACT_LINES(ACT), .VB_LINES(VB), .HB_BYTES(8), .STROBE(2)) src (
    .clk, .start, .nframes(2), .object_on(1'b0), .td_data, .td_valid, .busy);
  itu656_decoder dut (.clk, .rst_n, .td_data, .td_valid, .y_data, .y_valid, .field, .eol, .field_end);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s px=%0d ln=%0d f=%0d", what, px, ln, f); end
  endtask

  function automatic logic [7:0] luma(int p, int l, int fl);
    return 8'(16 + ((p + 3 * l + 64 * fl) % 200));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      check(y_data == luma(px, ln, f), "luma value");
      check(field == f[0], "field bit");
      px++; nsamples++;
    end
    if (eol) begin
      check(px == 720, "720 samples per line");
      px = 0; ln++; nlines++;
    end
    if (field_end) begin
      check(ln == ACT, "lines per field");
      check(field == f[0], "field at field end");
      ln = 0; f = 1 - f; nfields++;
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
    check(nlines == 4 * ACT, "line count");
    check(nfields == 4, "field count");
    check(nsamples == 4 * ACT * 720, "sample count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// bt656_source: behavioural ITU-R BT.656 byte-stream generator for testbenches.
//
// On a start pulse it sends NFRAMES frames. Each frame is two fields, F = 0
// then F = 1; each field is ACT_LINES picture lines (V = 0) followed by
// VB_LINES blanking lines (V = 1). A line is EAV, HB_BYTES blanking bytes, SAV
// and, on picture lines, 1440 bytes Cb Y Cr Y. Luma of full-resolution sample
// px on picture line ln of field f is luma(px, ln, f) below, never 00 or FF;
// object_on adds a bright square (luma 0xF0) at full-resolution columns
// 200..279, lines 100..139 of both fields. One byte leaves per STROBE clocks.
module bt656_source #(
  parameter int unsigned ACT_LINES = 244,
  parameter int unsigned VB_LINES  = 3,
  parameter int unsigned HB_BYTES  = 8,
  parameter int unsigned STROBE    = 1
) (
  input  logic       clk,
  input  logic       start,
  input  int         nframes,
  input  logic       object_on,
  output logic [7:0] td_data,
  output logic       td_valid,
  output logic       busy
);

  function automatic logic [7:0] luma(int px, int ln, int f);
    return 8'(16 + ((px + 3 * ln + 64 * f) % 200));
  endfunction

  function automatic logic [7:0] xy(bit f, bit v, bit h);
    logic [3:0] p;
    p = {v ^ h, f ^ h, f ^ v, f ^ v ^ h};
    return {1'b1, f, v, h, p};
  endfunction

  task automatic send(input logic [7:0] b);
    for (int i = 0; i < int'(STROBE) - 1; i++) begin
      @(negedge clk) td_valid = 1'b0;
    end
    @(negedge clk);
    td_data  = b;
    td_valid = 1'b1;
  endtask

  task automatic code(bit f, bit v, bit h);
    send(8'hFF); send(8'h00); send(8'h00); send(xy(f, v, h));
  endtask

  task automatic line(bit f, bit v, int ln);
    code(f, v, 1'b1);
    for (int i = 0; i < int'(HB_BYTES); i++) send(i[0] ? 8'h10 : 8'h80);
    code(f, v, 1'b0);
    if (!v) begin
      for (int px = 0; px < 720; px++) begin
        send(8'h80);
        if (object_on && px >= 200 && px < 280 && ln >= 100 && ln < 140) send(8'hF0);
        else send(luma(px, ln, int'(f)));
      end
    end
  endtask

  initial begin
    td_data  = 8'h00;
    td_valid = 1'b0;
    busy     = 1'b0;
    forever begin
      @(posedge clk iff start);
      busy = 1'b1;
      for (int fr = 0; fr < nframes; fr++) begin
        for (int f = 0; f < 2; f++) begin
          for (int ln = 0; ln < int'(ACT_LINES); ln++) line(f[0], 1'b0, ln);
          for (int ln = 0; ln < int'(VB_LINES); ln++)  line(f[0], 1'b1, ln);
        end
      end
      @(negedge clk);
      td_valid = 1'b0;
      busy     = 1'b0;
    end
  end

endmodule

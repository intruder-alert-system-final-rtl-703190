// frame_scaler: halves the decoded picture in both directions.
//
// The height is halved by keeping only one of the two interlaced fields (the
// even field, F = KEEP_FIELD) and dropping the other. The width is halved by
// keeping every other luma sample of a line, starting with the first. The
// end-of-line and end-of-field markers of the kept field are passed on so the
// deinterlacer can place the pixels; a kept line of 720 samples leaves 360
// pixels, of which the deinterlacer stores the first 320.
//
// Interface: one luma sample per clock where y_valid is high, with the field
// bit of its line; eol and field_end are single-clock pulses from the
// decoder. Outputs are registered, one clock later. Which field counts as
// "even" is not fixed by the design description; F = 0 is this
// implementation's choice.
module frame_scaler #(
  parameter bit KEEP_FIELD = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] y_data,
  input  logic       y_valid,
  input  logic       field,
  input  logic       eol,
  input  logic       field_end,
  output logic [7:0] pix,
  output logic       pix_valid,
  output logic       line_end,
  output logic       frame_end
);

  logic odd;   // the next sample of the line has an odd index

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd       <= 1'b0;
      pix       <= '0;
      pix_valid <= 1'b0;
      line_end  <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      pix_valid <= 1'b0;
      line_end  <= 1'b0;
      frame_end <= 1'b0;
      if (y_valid) begin
        odd <= ~odd;
        if (!odd && field == KEEP_FIELD) begin
          pix       <= y_data;
          pix_valid <= 1'b1;
        end
      end
      if (eol) begin
        odd      <= 1'b0;
        line_end <= (field == KEEP_FIELD);
      end
      if (field_end) begin
        odd       <= 1'b0;
        frame_end <= (field == KEEP_FIELD);
      end
    end
  end

endmodule

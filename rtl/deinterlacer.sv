// deinterlacer: gives every kept pixel its place in the 320 x 240 frame.
//
// It counts pixels along a line (x) and lines down the frame (y). A line-end
// marker moves to the next line and a frame-end marker restarts at the top.
// Pixels that fall outside the stored frame (x >= 320 or y >= 240) are
// dropped. Until the first frame-end marker has been seen the position is
// unknown, so nothing is output; this keeps a camera that is plugged in
// mid-field from producing a shifted picture.
//
// Interface: pix/pix_valid, line_end and frame_end from the scaler. Output
// pixel_out (grey value, x, y) with pixel_en high for one clock, one clock
// after the input pixel; frame_done pulses with the frame-end marker that
// follows a frame. Counting with end-of-line and end-of-field flags follows
// the design description; the cropping to the first 320 pixels of a line and
// the wait for the first frame end are this implementation's choices.
module deinterlacer
  import ias_pkg::*;
#(
  parameter int unsigned W = FRAME_W,
  parameter int unsigned H = FRAME_H
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [7:0] pix,
  input  logic      pix_valid,
  input  logic      line_end,
  input  logic      frame_end,
  output pixel_xy_t pixel_out,
  output logic      pixel_en,
  output logic      frame_done
);

  logic [X_W:0] x_cnt;     // one bit wider so 360 samples cannot wrap
  logic [Y_W:0] y_cnt;
  logic         synced;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_cnt      <= '0;
      y_cnt      <= '0;
      synced     <= 1'b0;
      pixel_out  <= '0;
      pixel_en   <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      pixel_en   <= 1'b0;
      frame_done <= 1'b0;
      if (pix_valid) begin
        if (x_cnt != '1) x_cnt <= x_cnt + 1'b1;
        if (synced && x_cnt < (X_W+1)'(W) && y_cnt < (Y_W+1)'(H)) begin
          pixel_out.pix <= pix;
          pixel_out.x   <= x_cnt[X_W-1:0];
          pixel_out.y   <= y_cnt[Y_W-1:0];
          pixel_en      <= 1'b1;
        end
      end
      if (line_end) begin
        x_cnt <= '0;
        if (y_cnt != '1) y_cnt <= y_cnt + 1'b1;
      end
      if (frame_end) begin
        x_cnt      <= '0;
        y_cnt      <= '0;
        frame_done <= synced;
        synced     <= 1'b1;
      end
    end
  end

endmodule

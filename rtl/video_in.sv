// video_in: TV input path, from BT.656 bytes to positioned grey pixels.
//
// Chains the three input stages: the BT.656 decoder keeps the luma samples,
// the frame scaler keeps one field and every other sample (720 x 480 down to
// 320 x 240), and the deinterlacer gives each remaining pixel its x and y.
// The result is one grey byte per pixel_en pulse with x in 0..319 and y in
// 0..239, plus a frame_done pulse at the end of every stored frame.
//
// Interface: td_data/td_valid, one byte per strobe. Latency from the Y byte
// to pixel_en is three clocks. The stage order follows the design's video-in
// block diagram.
module video_in
  import ias_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] td_data,
  input  logic       td_valid,
  output pixel_xy_t  pixel_out,
  output logic       pixel_en,
  output logic       frame_done
);

  logic [7:0] y_data, s_pix;
  logic       y_valid, field, eol, field_end;
  logic       s_valid, s_line_end, s_frame_end;

  itu656_decoder u_dec (
    .clk, .rst_n, .td_data, .td_valid,
    .y_data, .y_valid, .field, .eol, .field_end
  );

  frame_scaler u_scale (
    .clk, .rst_n, .y_data, .y_valid, .field, .eol, .field_end,
    .pix(s_pix), .pix_valid(s_valid), .line_end(s_line_end), .frame_end(s_frame_end)
  );

  deinterlacer u_deint (
    .clk, .rst_n, .pix(s_pix), .pix_valid(s_valid),
    .line_end(s_line_end), .frame_end(s_frame_end),
    .pixel_out, .pixel_en, .frame_done
  );

endmodule

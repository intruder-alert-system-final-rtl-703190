// pixel_to_rgb: turns a stored grey byte into the 10-bit RGB of the VGA DAC.
//
// Ordinary bytes are grey levels: the same value goes to red, green and blue,
// widened from 8 to 10 bits by repeating the two top bits (0 -> 0, 255 ->
// 1023). Two byte values are reserved by the motion-detection software to draw
// the outline of a moving object: 0xFF is shown as pure red and 0xFE as pure
// green. box is high when the byte is one of these two codes.
//
// Purely combinational. The two codes and their colours follow the design
// description; the 8-to-10-bit widening is this implementation's choice.
module pixel_to_rgb
  import ias_pkg::*;
(
  input  logic [7:0] pix,
  output logic [9:0] r,
  output logic [9:0] g,
  output logic [9:0] b,
  output logic       box
);

  logic [9:0] grey;
  assign grey = {pix, pix[7:6]};

  always_comb begin
    box = 1'b1;
    unique case (pix)
      PIX_RED:   begin r = 10'h3FF; g = 10'h000; b = 10'h000; end
      PIX_GREEN: begin r = 10'h000; g = 10'h3FF; b = 10'h000; end
      default:   begin r = grey;    g = grey;    b = grey;    box = 1'b0; end
    endcase
  end

endmodule

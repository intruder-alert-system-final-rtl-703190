// line_buffer: two alternating one-line stores between SDRAM and the screen.
//
// While the screen shows one stored line (twice, since every stored line is
// drawn on two display lines), the read master fills the other bank with the
// next line. Bank selection is done by the caller: the writer uses the bank
// of the row it fetches, the reader the bank of the row it displays, and the
// two never coincide while the display is within a frame.
//
// Interface: synchronous write (wr_en, wr_bank, wr_x, wr_data); asynchronous
// read (rd_bank, rd_x -> rd_data), so a display pixel is available in the
// same clock as its address. Two banks of W bytes. The design names a
// line-by-line alternating buffer; its organisation here is this
// implementation's choice.
module line_buffer
  import ias_pkg::*;
#(
  parameter int unsigned W = FRAME_W
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic           wr_bank,
  input  logic [X_W-1:0] wr_x,
  input  logic [7:0]     wr_data,
  input  logic           rd_bank,
  input  logic [X_W-1:0] rd_x,
  output logic [7:0]     rd_data
);

  logic [7:0] mem [2][W];

  always_ff @(posedge clk) begin
    if (wr_en && wr_x < X_W'(W)) mem[wr_bank][wr_x] <= wr_data;
  end

  assign rd_data = (rd_x < X_W'(W)) ? mem[rd_bank][rd_x] : 8'h00;

endmodule

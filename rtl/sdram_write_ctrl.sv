// sdram_write_ctrl: Avalon-MM write master that stores TV pixels in SDRAM.
//
// Takes positioned grey pixels from the input FIFO and writes each one as a
// single byte to tv_base_addr + y * 320 + x, the frame slot the circular
// buffer currently gives to the TV. One write is outstanding at a time: the
// master holds address, write and writedata until waitrequest is low, as the
// Avalon-MM rules require. While tv_enable is low (the circular buffer is
// moving its pointers) no new write starts. When the last pixel of a frame
// (x = 319, y = 239) has been accepted, frame_written pulses for one clock.
//
// Interface: FIFO side fifo_data/fifo_empty/fifo_rd (show-ahead FIFO, popped
// when a write is accepted); Avalon side avm_address (byte address),
// avm_write, avm_writedata, avm_waitrequest. A pixel takes at least one clock
// on the bus. Byte-wide writes and the frame_written pulse are this
// implementation's choices; the address formula follows the stored frame
// layout of 320 bytes per line.
module sdram_write_ctrl
  import ias_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] tv_base_addr,
  input  logic              tv_enable,
  input  pixel_xy_t         fifo_data,
  input  logic              fifo_empty,
  output logic              fifo_rd,
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_write,
  output logic [7:0]        avm_writedata,
  input  logic              avm_waitrequest,
  output logic              frame_written
);

  logic last_px;   // the pixel on the bus is the last one of a frame

  assign fifo_rd = avm_write && !avm_waitrequest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avm_write     <= 1'b0;
      avm_address   <= '0;
      avm_writedata <= '0;
      last_px       <= 1'b0;
      frame_written <= 1'b0;
    end else begin
      frame_written <= 1'b0;
      if (avm_write && !avm_waitrequest) begin
        avm_write     <= 1'b0;
        frame_written <= last_px;
      end else if (!avm_write && !fifo_empty && tv_enable) begin
        avm_write     <= 1'b1;
        avm_address   <= pixel_addr(tv_base_addr, fifo_data.x, fifo_data.y);
        avm_writedata <= fifo_data.pix;
        last_px       <= (fifo_data.x == X_W'(FRAME_W - 1)) && (fifo_data.y == Y_W'(FRAME_H - 1));
      end
    end
  end

  a_hold_while_wait: assert property (@(posedge clk) disable iff (!rst_n)
    avm_write && avm_waitrequest |=> avm_write && $stable(avm_address) && $stable(avm_writedata));

endmodule

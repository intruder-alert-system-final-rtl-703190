// intruder_alert_top: FPGA side of a camera-based intruder alert system.
//
// A camera's video is decoded to grey 320 x 240 frames that are written into
// SDRAM, a processor compares each frame with a stored background frame and
// draws red/green outlines around moving objects into it, and the marked
// frame is shown on a VGA monitor. This module holds the hardware around the
// processor:
//
//   video_in      BT.656 bytes -> luma -> one field, every other pixel ->
//                 (pixel, x, y)
//   sync_fifo     pixel FIFO in front of the write master
//   sdram_write_ctrl  Avalon-MM write master into the TV slot
//   circular_buffer   slot pointers for TV, software, VGA and background
//   video_out     Avalon-MM read master from the VGA slot, line buffer,
//                 640 x 480 VGA timing, grey/outline colour mapping
//
// The two Avalon-MM masters, and the processor's handshake with the circular
// buffer, are brought out as ports: on the board they meet the processor and
// the SDRAM controller in a generated Avalon interconnect, which arbitrates
// between them.
//
// Clocking: everything runs on one system clock (100 MHz, the SDRAM clock).
// The 25 MHz VGA pixel rate is a clock enable from a divide-by-4 counter, and
// vga_clk is that counter's top bit. TV bytes arrive with a td_valid strobe.
// The TV chip reset td_reset_n follows rst_n. Single-clock operation with
// strobes and enables is this implementation's choice; the split into these
// blocks and their order follow the design description.
//
// Left unconnected on purpose: video_in's frame_done (the write master's
// own frame_written marks a stored frame) and the FIFO's full flag (its
// sticky overflow flag is the output that matters). The decoder chip's TD_HS/TD_VS pins are not needed, because the timing codes
// embedded in the byte stream carry the same information.
module intruder_alert_top
  import ias_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,               // KEY(0)
  input  logic              sw_detect_en,        // SW(0): software motion detection on
  input  logic              set_background_n,    // KEY(3)
  // TV decoder byte stream
  input  logic [7:0]        td_data,
  input  logic              td_valid,
  output logic              td_reset_n,
  // Avalon-MM write master (TV frames into SDRAM)
  output logic [ADDR_W-1:0] wr_address,
  output logic              wr_write,
  output logic [7:0]        wr_writedata,
  input  logic              wr_waitrequest,
  // Avalon-MM read master (VGA frames out of SDRAM)
  output logic [ADDR_W-1:0] rd_address,
  output logic              rd_read,
  input  logic              rd_waitrequest,
  input  logic [7:0]        rd_readdata,
  input  logic              rd_readdatavalid,
  // Processor side of the circular buffer
  input  logic              software_finished,
  output logic              software_ready,
  output logic [ADDR_W-1:0] software_base_addr,
  output logic [ADDR_W-1:0] background_frame_addr,
  output logic              background_valid,
  // VGA DAC
  output logic [9:0]        vga_r,
  output logic [9:0]        vga_g,
  output logic [9:0]        vga_b,
  output logic              vga_blank_n,
  output logic              vga_sync_n,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic              vga_clk,
  // Status
  output logic              frame_written,       // pulse: a TV frame is in SDRAM
  output logic              buffer_shift,        // pulse: circular buffer moved
  output logic              box_shown,           // pulse: an outline pixel was displayed
  output logic              fifo_overflow,       // sticky: input pixels lost
  output logic              vga_underrun         // sticky: a row fetch was late
);

  pixel_xy_t         vin_pixel, fifo_q;
  logic              vin_en, vin_frame_done;
  logic              fifo_empty, fifo_full, fifo_rd;
  logic [ADDR_W-1:0] tv_base_addr, vga_base_addr;
  logic              tv_enable;
  logic [1:0]        div;
  logic              pix_ce;

  assign td_reset_n = rst_n;

  video_in u_vin (
    .clk, .rst_n, .td_data, .td_valid,
    .pixel_out(vin_pixel), .pixel_en(vin_en), .frame_done(vin_frame_done)
  );

  sync_fifo #(.WIDTH($bits(pixel_xy_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(vin_en), .wr_data(vin_pixel),
    .rd_en(fifo_rd), .rd_data(fifo_q), .empty(fifo_empty), .full(fifo_full),
    .overflow(fifo_overflow)
  );

  sdram_write_ctrl u_wr (
    .clk, .rst_n, .tv_base_addr, .tv_enable,
    .fifo_data(fifo_q), .fifo_empty, .fifo_rd,
    .avm_address(wr_address), .avm_write(wr_write), .avm_writedata(wr_writedata),
    .avm_waitrequest(wr_waitrequest), .frame_written
  );

  circular_buffer u_cb (
    .clk, .rst_n, .control_device(sw_detect_en), .software_finished,
    .frame_written, .set_background_n,
    .tv_base_addr, .tv_enable, .software_base_addr, .software_ready,
    .vga_base_addr, .background_frame_addr, .background_valid, .shift(buffer_shift)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  end
  assign pix_ce  = (div == 2'd3);
  assign vga_clk = div[1];

  video_out u_vout (
    .clk, .rst_n, .pix_ce, .vga_base_addr,
    .avm_address(rd_address), .avm_read(rd_read), .avm_waitrequest(rd_waitrequest),
    .avm_readdata(rd_readdata), .avm_readdatavalid(rd_readdatavalid),
    .vga_r, .vga_g, .vga_b, .vga_blank_n, .vga_sync_n, .vga_hs, .vga_vs,
    .box_shown, .underrun(vga_underrun)
  );

endmodule

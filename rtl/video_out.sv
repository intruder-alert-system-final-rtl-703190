// video_out: VGA output path, from the frame in SDRAM to the screen.
//
// The stored frame is 320 x 240 and the screen 640 x 480, so every stored
// pixel is drawn as a 2 x 2 block: display pixel (h, v) shows stored pixel
// (h/2, v/2). A two-bank line buffer sits between memory and screen. At the
// start of display line v (v even, v < 478) the read master starts fetching
// stored row v/2 + 1 into the bank the screen is not using, and it has two
// display lines (1600 pixel times) to finish. Stored row 0 is fetched during
// the last line of vertical blanking, which is also when the frame base
// address is taken from the circular buffer; a frame is therefore always
// shown from one slot, even if the buffer shifts in the middle of it.
//
// Each byte read from the line buffer goes through pixel_to_rgb, so the
// outline codes of the motion-detection software appear as red or green
// pixels. All VGA outputs are registered on the pixel clock enable, one pixel
// time after the counters. vga_sync_n is held low: no sync on green.
//
// Interface: pix_ce is the 25 MHz pixel enable on the system clock; Avalon-MM
// read master towards the SDRAM; VGA DAC signals (10-bit colour, blank, sync,
// hsync, vsync). box_shown pulses for every displayed outline pixel and
// underrun is sticky when a row fetch did not finish in time. The chain of
// read control, box finder and grey-to-RGB stages follows the design's
// video-out block diagram; the fetch schedule is this implementation's.
// The read controller's busy output is left open here: a late fetch is
// reported through its sticky underrun flag instead.
module video_out
  import ias_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_ce,
  input  logic [ADDR_W-1:0] vga_base_addr,
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_read,
  input  logic              avm_waitrequest,
  input  logic [7:0]        avm_readdata,
  input  logic              avm_readdatavalid,
  output logic [9:0]        vga_r,
  output logic [9:0]        vga_g,
  output logic [9:0]        vga_b,
  output logic              vga_blank_n,
  output logic              vga_sync_n,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic              box_shown,
  output logic              underrun
);

  localparam int unsigned V_LAST = 524;   // last line of the 525-line frame

  logic [9:0]        h_cnt, v_cnt;
  logic              active, hs_n, vs_n;
  logic [ADDR_W-1:0] frame_base;
  logic              fetch_start, fetch_bank;
  logic [Y_W-1:0]    fetch_row;
  logic              lb_wr_en, lb_wr_bank;
  logic [X_W-1:0]    lb_wr_x;
  logic [7:0]        lb_wr_data, lb_rd_data;
  logic [9:0]        r, g, b;
  logic              box;

  vga_timing u_timing (
    .clk, .rst_n, .pix_ce, .h_cnt, .v_cnt, .active, .hs_n, .vs_n
  );

  // Row fetch schedule, decided at the first pixel time of each line.
  logic [Y_W-1:0] next_row;
  assign next_row = Y_W'(v_cnt[9:1]) + 1'b1;

  always_comb begin
    fetch_start = 1'b0;
    fetch_row   = '0;
    fetch_bank  = 1'b0;
    if (pix_ce && h_cnt == '0) begin
      if (v_cnt == 10'(V_LAST)) begin
        fetch_start = 1'b1;
      end else if (!v_cnt[0] && v_cnt < 10'(2 * FRAME_H - 2)) begin
        fetch_start = 1'b1;
        fetch_row   = next_row;
        fetch_bank  = next_row[0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                          frame_base <= '0;
    else if (pix_ce && h_cnt == '0 && v_cnt == 10'(V_LAST)) frame_base <= vga_base_addr;
  end

  // The fetch of row 0 uses the base address being latched in the same clock.
  logic [ADDR_W-1:0] fetch_base;
  assign fetch_base = (v_cnt == 10'(V_LAST)) ? vga_base_addr : frame_base;

  sdram_read_ctrl u_rd (
    .clk, .rst_n, .fetch_start, .fetch_row, .fetch_bank, .frame_base(fetch_base),
    .busy(), .underrun,
    .avm_address, .avm_read, .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .lb_wr_en, .lb_wr_bank, .lb_wr_x, .lb_wr_data
  );

  line_buffer u_lb (
    .clk, .wr_en(lb_wr_en), .wr_bank(lb_wr_bank), .wr_x(lb_wr_x), .wr_data(lb_wr_data),
    .rd_bank(v_cnt[1]), .rd_x(h_cnt[X_W:1]), .rd_data(lb_rd_data)
  );

  pixel_to_rgb u_rgb (.pix(lb_rd_data), .r, .g, .b, .box);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
      vga_blank_n <= 1'b0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      box_shown   <= 1'b0;
    end else begin
      box_shown <= 1'b0;
      if (pix_ce) begin
        vga_r       <= active ? r : '0;
        vga_g       <= active ? g : '0;
        vga_b       <= active ? b : '0;
        vga_blank_n <= active;
        vga_hs      <= hs_n;
        vga_vs      <= vs_n;
        box_shown   <= active && box;
      end
    end
  end

  assign vga_sync_n = 1'b0;

endmodule

// ias_pkg: constants and types shared by the intruder-alert video pipeline.
//
// The stored frame is 320 x 240 grey bytes (one byte per pixel, 76,800 bytes),
// kept in byte-addressed SDRAM with a 23-bit (8 MB) address. Each frame lives
// in a 128 KB slot (address bits 16:0), the slot number sits in bits 21:17.
// These numbers follow the frame size and the synthesized circular-buffer
// address layout given for the design; the struct and the 10-bit colour
// constants are this implementation's own packaging.
package ias_pkg;

  localparam int unsigned FRAME_W     = 320;   // stored pixels per line
  localparam int unsigned FRAME_H     = 240;   // stored lines per frame
  localparam int unsigned X_W         = 9;     // width of an x coordinate
  localparam int unsigned Y_W         = 8;     // width of a y coordinate
  localparam int unsigned ADDR_W      = 23;    // SDRAM byte address width (8 MB)
  localparam int unsigned SLOT_SHIFT  = 17;    // 128 KB per frame slot
  localparam int unsigned SLOT_W      = 5;     // 32 slots = 4 MB of frame store

  // Pixel codes the motion-detection software writes to outline motion.
  localparam logic [7:0] PIX_RED   = 8'hFF;
  localparam logic [7:0] PIX_GREEN = 8'hFE;

  // A grey pixel together with its position in the stored frame.
  typedef struct packed {
    logic [7:0]     pix;
    logic [X_W-1:0] x;
    logic [Y_W-1:0] y;
  } pixel_xy_t;

  // Byte address of pixel (x, y) inside the slot starting at base.
  function automatic logic [ADDR_W-1:0] pixel_addr(logic [ADDR_W-1:0] base,
                                                  logic [X_W-1:0] x,
                                                  logic [Y_W-1:0] y);
    logic [ADDR_W-1:0] off;
    off = ADDR_W'(y) * ADDR_W'(FRAME_W) + ADDR_W'(x);
    return base + off;
  endfunction

endpackage

// vga_timing: 640 x 480 at 60 Hz sync and blanking generator.
//
// Two counters step once per pixel (pix_ce): h_cnt runs over 800 pixel times
// per line (640 visible, 16 front porch, 96 sync, 48 back porch) and v_cnt
// over 525 lines per frame (480 visible, 10 front porch, 2 sync, 33 back
// porch). Both sync pulses are active low. With the 25 MHz pixel rate the
// design uses this gives about 59.5 frames per second. active is high on the
// 640 x 480 visible pixels.
//
// Interface: pix_ce is a clock enable at the pixel rate; all outputs are
// decoded from the counters in the same clock. The design gives the 25 MHz
// VGA clock and the sync/blank signal names; the porch and sync lengths are
// the standard industry values for this mode.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_ce,
  output logic [9:0]  h_cnt,
  output logic [9:0]  v_cnt,
  output logic        active,
  output logic        hs_n,
  output logic        vs_n
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (pix_ce) begin
      if (h_cnt == 10'(H_TOTAL - 1)) begin
        h_cnt <= '0;
        v_cnt <= (v_cnt == 10'(V_TOTAL - 1)) ? '0 : v_cnt + 1'b1;
      end else begin
        h_cnt <= h_cnt + 1'b1;
      end
    end
  end

  assign active = (h_cnt < 10'(H_ACTIVE)) && (v_cnt < 10'(V_ACTIVE));
  assign hs_n   = !((h_cnt >= 10'(H_ACTIVE + H_FP)) && (h_cnt < 10'(H_ACTIVE + H_FP + H_SYNC)));
  assign vs_n   = !((v_cnt >= 10'(V_ACTIVE + V_FP)) && (v_cnt < 10'(V_ACTIVE + V_FP + V_SYNC)));

endmodule

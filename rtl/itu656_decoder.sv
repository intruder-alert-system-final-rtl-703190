// itu656_decoder: luma extraction from an ITU-R BT.656 byte stream.
//
// The TV decoder chip delivers 4:2:2 video as a byte stream Cb Y Cr Y ...
// framed by timing reference codes FF 00 00 XY, where XY carries the field
// bit F (bit 6), the vertical-blanking bit V (bit 5) and H (bit 4: 0 = start
// of active video, 1 = end of active video). The decoder watches for these
// codes; after a start-of-active-video code on a line with V = 0 it passes on
// every second byte of the next ACTIVE_BYTES bytes, which are the Y samples.
// Cb and Cr are dropped because the system works in grey scale.
//
// Besides the luma samples it reports the field of the current line, an
// end-of-line pulse when the end-of-active-video code of an active line
// arrives, and an end-of-field pulse on the first timing code with V = 1 after
// active lines (the start of vertical blanking). The end-of-active-video code
// that closes the last picture line of a field already carries V = 1, so the
// end-of-line pulse is taken from H alone.
//
// Interface: one input byte per clock where td_valid is high (the 27 MHz byte
// rate of the chip is carried as a strobe on the system clock). Outputs are
// registered: y_valid, eol and field_end appear one clock after the byte that
// causes them. Keeping Y and dropping Cb/Cr follows the design description;
// the strobe interface and the fixed active-line length are this
// implementation's choices. The protection bits of the XY byte are not checked.
module itu656_decoder #(
  parameter int unsigned ACTIVE_BYTES = 1440   // 720 pixels x (Y + chroma)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] td_data,
  input  logic       td_valid,
  output logic [7:0] y_data,
  output logic       y_valid,
  output logic       field,       // F bit of the current line
  output logic       eol,         // pulse: end of an active line
  output logic       field_end    // pulse: vertical blanking begins
);

  localparam int unsigned CW = $clog2(ACTIVE_BYTES + 1);

  logic [7:0]    h0, h1, h2;        // last three bytes, h0 most recent
  logic          active;            // inside active video of an active line
  logic [CW-1:0] cnt;               // active bytes seen on this line
  logic          line_active;       // the current line carries picture (V = 0)
  logic          v_q;               // V bit of the last timing code
  logic          is_code;

  assign is_code = td_valid && h2 == 8'hFF && h1 == 8'h00 && h0 == 8'h00 && td_data[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h0 <= '0; h1 <= '0; h2 <= '0;
      active      <= 1'b0;
      cnt         <= '0;
      line_active <= 1'b0;
      v_q         <= 1'b1;
      field       <= 1'b0;
      y_data      <= '0;
      y_valid     <= 1'b0;
      eol         <= 1'b0;
      field_end   <= 1'b0;
    end else begin
      y_valid   <= 1'b0;
      eol       <= 1'b0;
      field_end <= 1'b0;
      if (td_valid) begin
        h2 <= h1; h1 <= h0; h0 <= td_data;
        if (is_code) begin
          active <= 1'b0;
          v_q    <= td_data[5];
          field  <= td_data[6];
          if (td_data[5] && !v_q) field_end <= 1'b1;
          if (!td_data[4]) begin                 // SAV
            active      <= !td_data[5];
            line_active <= !td_data[5];
            cnt         <= '0;
          end else if (line_active) begin                  // EAV ending a picture line
            eol         <= 1'b1;
            line_active <= 1'b0;
          end
        end else if (active) begin
          cnt <= cnt + 1'b1;
          if (cnt[0]) begin                      // bytes 1,3,5... are Y
            y_data  <= td_data;
            y_valid <= 1'b1;
          end
          if (cnt == CW'(ACTIVE_BYTES - 1)) active <= 1'b0;
        end
      end
    end
  end

endmodule

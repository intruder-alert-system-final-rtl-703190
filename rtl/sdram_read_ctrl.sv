// sdram_read_ctrl: Avalon-MM read master that fetches frame rows for display.
//
// On a fetch_start pulse it reads the W bytes of stored row fetch_row, from
// frame_base + row * 320 + x for x = 0 .. W-1, and writes them into bank
// fetch_bank of the line buffer. Reads are issued one at a time: the master
// raises read and holds the address until waitrequest is low, then waits for
// readdatavalid, stores the byte and moves to the next x. busy is high from
// fetch_start until the last byte is stored. A fetch_start that arrives while
// a fetch is still running means the bus was too slow for the display: the
// new request is ignored and the sticky underrun flag is set. frame_base and
// fetch_row are used only at fetch_start; the rest of the row follows from
// the first address, so a base change during a fetch does not mix frames.
//
// Interface: Avalon-MM pipelined read (avm_address, avm_read, avm_waitrequest,
// avm_readdata, avm_readdatavalid) with at most one read in flight; line
// buffer write port (lb_wr_en, lb_wr_bank, lb_wr_x, lb_wr_data). A row costs
// at least 2 clocks per byte. The design gives this block as the SDRAM read
// control feeding an alternating line buffer; the single-outstanding-read
// protocol and the underrun flag are this implementation's choices.
module sdram_read_ctrl
  import ias_pkg::*;
#(
  parameter int unsigned W = FRAME_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch_start,
  input  logic [Y_W-1:0]    fetch_row,
  input  logic              fetch_bank,
  input  logic [ADDR_W-1:0] frame_base,
  output logic              busy,
  output logic              underrun,
  output logic [ADDR_W-1:0] avm_address,
  output logic              avm_read,
  input  logic              avm_waitrequest,
  input  logic [7:0]        avm_readdata,
  input  logic              avm_readdatavalid,
  output logic              lb_wr_en,
  output logic              lb_wr_bank,
  output logic [X_W-1:0]    lb_wr_x,
  output logic [7:0]        lb_wr_data
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_t;
  state_t         state;
  logic [X_W-1:0] x;
  logic           bank;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      x           <= '0;
      bank        <= 1'b0;
      underrun    <= 1'b0;
      avm_read    <= 1'b0;
      avm_address <= '0;
      lb_wr_en    <= 1'b0;
      lb_wr_bank  <= 1'b0;
      lb_wr_x     <= '0;
      lb_wr_data  <= '0;
    end else begin
      lb_wr_en <= 1'b0;
      if (fetch_start && state != S_IDLE) underrun <= 1'b1;
      unique case (state)
        S_IDLE: if (fetch_start) begin
          bank        <= fetch_bank;
          x           <= '0;
          avm_address <= pixel_addr(frame_base, '0, fetch_row);
          avm_read    <= 1'b1;
          state       <= S_REQ;
        end
        S_REQ: if (!avm_waitrequest) begin
          avm_read <= 1'b0;
          state    <= S_WAIT;
        end
        S_WAIT: if (avm_readdatavalid) begin
          lb_wr_en   <= 1'b1;
          lb_wr_bank <= bank;
          lb_wr_x    <= x;
          lb_wr_data <= avm_readdata;
          if (x == X_W'(W - 1)) begin
            state <= S_IDLE;
          end else begin
            x           <= x + 1'b1;
            avm_address <= avm_address + 1'b1;   // a row is contiguous
            avm_read    <= 1'b1;
            state       <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hold_while_wait: assert property (@(posedge clk) disable iff (!rst_n)
    avm_read && avm_waitrequest |=> avm_read && $stable(avm_address));

endmodule

// sync_fifo: first-in first-out buffer for the pixel stream.
//
// Absorbs the burstiness between the pixel producer (one pixel every few
// clocks while a line is active, nothing during blanking) and the SDRAM write
// master, which must wait whenever the shared memory bus is busy. A write
// while full is dropped and raises the sticky overflow flag, so a starved
// memory bus shows as lost pixels rather than a hung input.
//
// Interface: push with wr_en/wr_data, pop with rd_en; rd_data shows the
// oldest entry whenever empty is low (show-ahead). DEPTH must be a power of
// two. Storage is an array written on the clock, read combinationally. The
// design names a video-in FIFO but does not describe it; depth, show-ahead
// reading and overflow handling are this implementation's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 25,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic             overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      if (wr_en) begin
        if (full) overflow <= 1'b1;
        else      wp <= wp + 1'b1;
      end
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  // A pop of an empty FIFO is a caller error.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule

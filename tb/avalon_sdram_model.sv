// avalon_sdram_model: behavioural byte-wide SDRAM behind an Avalon-MM
// interconnect with two masters, for testbenches.
//
// Port W takes writes, port R pipelined reads. One access is granted per
// clock; when both ports request in the same clock the grant alternates, and
// every RAND_WAIT-th clock (if non-zero) both ports are stalled to imitate
// refresh. Read data returns READ_LAT clocks after the read is accepted. The
// array mem is public so a testbench can play the processor through it.
module avalon_sdram_model #(
  parameter int unsigned AW        = 23,
  parameter int unsigned READ_LAT  = 2,
  parameter int unsigned RAND_WAIT = 7
) (
  input  logic          clk,
  input  logic [AW-1:0] w_address,
  input  logic          w_write,
  input  logic [7:0]    w_writedata,
  output logic          w_waitrequest,
  input  logic [AW-1:0] r_address,
  input  logic          r_read,
  output logic          r_waitrequest,
  output logic [7:0]    r_readdata,
  output logic          r_readdatavalid,
  output int            stalls
);

  logic [7:0] mem [2 ** AW];
  logic       last_w;          // the last contested grant went to W
  int unsigned cyc;
  logic [7:0] pipe_d [READ_LAT];
  logic       pipe_v [READ_LAT];
  logic       refresh;

  initial begin
    last_w = 1'b0;
    cyc    = 0;
    stalls = 0;
    for (int i = 0; i < int'(READ_LAT); i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end

  assign refresh = (RAND_WAIT != 0) && (cyc % RAND_WAIT == 0);

  always_comb begin
    w_waitrequest = refresh;
    r_waitrequest = refresh;
    if (!refresh && w_write && r_read) begin
      w_waitrequest = last_w;
      r_waitrequest = !last_w;
    end
  end

  assign r_readdata      = pipe_d[READ_LAT-1];
  assign r_readdatavalid = pipe_v[READ_LAT-1];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if ((w_write && w_waitrequest) || (r_read && r_waitrequest)) stalls <= stalls + 1;
    if (w_write && r_read && !refresh) last_w <= !last_w;
    if (w_write && !w_waitrequest) mem[w_address] <= w_writedata;
    for (int i = READ_LAT - 1; i > 0; i--) begin
      pipe_d[i] <= pipe_d[i-1];
      pipe_v[i] <= pipe_v[i-1];
    end
    pipe_v[0] <= r_read && !r_waitrequest;
    pipe_d[0] <= mem[r_address];
  end

endmodule

// tb_sdram_read_ctrl: preloads rows of a frame into the SDRAM model, asks
// sdram_read_ctrl for several rows into alternating banks and checks every
// byte it writes into the line buffer, the busy flag and the row time, then
// forces a late request to check the underrun flag. One fetch moves the
// frame base half-way through the row, which must not change the row.
module tb_sdram_read_ctrl;
  logic clk = 0, rst_n = 0, fetch_start = 0, fetch_bank = 0;
  logic [7:0] fetch_row = 0;
  logic [22:0] frame_base = 23'h060000, avm_address;
  logic busy, underrun, avm_read, avm_waitrequest, avm_readdatavalid;
  logic [7:0] avm_readdata, lb_wr_data;
  logic lb_wr_en, lb_wr_bank;
  logic [8:0] lb_wr_x;
  int checks = 0, failures = 0, stalls, nbytes, t0;
  logic [7:0] got [2][320];

  avalon_sdram_model #(.AW(23), .READ_LAT(2), .RAND_WAIT(5)) mem (.clk,
    .w_address('0), .w_write(1'b0), .w_writedata('0), .w_waitrequest(),
    .r_address(avm_address), .r_read(avm_read), .r_waitrequest(avm_waitrequest),
    .r_readdata(avm_readdata), .r_readdatavalid(avm_readdatavalid), .stalls);

  sdram_read_ctrl dut (.clk, .rst_n, .fetch_start, .fetch_row, .fetch_bank, .frame_base, .busy,
    .underrun, .avm_address, .avm_read, .avm_waitrequest, .avm_readdata, .avm_readdatavalid,
    .lb_wr_en, .lb_wr_bank, .lb_wr_x, .lb_wr_data);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] pat(int x, int y);
    return 8'(x + 13 * y + 1);
  endfunction

  always @(posedge clk) if (lb_wr_en) begin
    got[lb_wr_bank][lb_wr_x] <= lb_wr_data;
    nbytes++;
  end

  task automatic fetch(int row, bit bank, bit move_base = 0);
    @(negedge clk) fetch_start = 1; fetch_row = 8'(row); fetch_bank = bank;
    @(negedge clk) fetch_start = 0;
    check(busy, "busy while fetching");
    t0 = $time;
    if (move_base) begin
      // the base and row inputs change mid-row; the row must still come
      // from where the fetch started
      repeat (100) @(negedge clk);
      frame_base = 23'h0A0000; fetch_row = 8'(row + 1);
    end
    wait (!busy);
    frame_base = 23'h060000;
    repeat (2) @(negedge clk);           // last byte lands one clock after busy drops
    for (int x = 0; x < 320; x++) check(got[bank][x] == pat(x, row), "row byte");
  endtask

  initial begin
    nbytes = 0;
    for (int y = 0; y < 240; y++)
      for (int x = 0; x < 320; x++) mem.mem[23'h060000 + y * 320 + x] = pat(x, y);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fetch(0, 0);
    fetch(1, 1);
    fetch(117, 0);
    fetch(239, 1);
    fetch(60, 0, 1);
    check(nbytes == 5 * 320, "byte count");
    check(stalls > 0, "bus stalls seen");
    check(!underrun, "no underrun");
    // a request during a fetch is an underrun
    @(negedge clk) fetch_start = 1; fetch_row = 5;
    @(negedge clk) fetch_start = 0;
    repeat (20) @(negedge clk);
    fetch_start = 1;
    @(negedge clk) fetch_start = 0;
    check(underrun, "underrun flagged");
    wait (!busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: random pushes and pops against a queue model, then fills the
// FIFO past full to check that the extra write is dropped and flagged.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic empty, full, overflow;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
    .empty, .full, .overflow);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      if (!empty) check(rd_data == q[0], "head data");
      wr_en = ($urandom % 2) && q.size() < D;
      rd_en = ($urandom % 2) && q.size() > 0 && !empty;  // never pop an empty FIFO
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    @(negedge clk) wr_en = 0; rd_en = 0;
    check(!overflow, "no overflow yet");
    while (q.size() < D) begin
      @(negedge clk) wr_en = 1; wr_data = W'($urandom); q.push_back(wr_data);
    end
    @(negedge clk) wr_en = 1; wr_data = '1;        // one too many
    @(negedge clk) wr_en = 0;
    check(overflow && full, "overflow flagged");
    for (int i = 0; i < D; i++) begin
      check(rd_data == q.pop_front(), "data kept after overflow");
      check(!empty, "not empty while draining");
      rd_en = !empty;
      @(negedge clk) rd_en = 0;
    end
    check(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

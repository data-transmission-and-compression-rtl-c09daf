// tb_sync_fifo: random pushes and pops on the 512 x 11 pointer FIFO against
// a queue, including filling it to exactly 512 entries, simultaneous push
// and pop, pops while empty (ignored) and clear.
//
// Depth and width follow the scheme; clear is this design's choice.
module tb_sync_fifo;
  logic clk = 0, rst = 1, clear = 0, wr_en = 0, rd_en = 0;
  logic [10:0] wdata = 0, rdata;
  logic empty, full;
  logic [9:0] count;
  logic [10:0] q[$];
  int checks = 0, failures = 0, n_full = 0;
  bit pend = 0;
  logic [10:0] pend_val;

  sync_fifo #(.WIDTH(11), .DEPTH(512)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic step(bit w, bit r);
    @(negedge clk);
    if (pend) check(rdata == pend_val, "pop data");
    check(int'(count) == q.size(), "count");
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == 512), "full");
    if (full) n_full++;
    wr_en = w && q.size() < 512; rd_en = r;
    wdata = 11'($urandom);
    pend = rd_en && q.size() > 0;
    if (pend) pend_val = q.pop_front();
    if (wr_en) q.push_back(wdata);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 600; i++) step(1, 0);
    for (int i = 0; i < 600; i++) step(0, 1);
    for (int i = 0; i < 5000; i++) step($urandom % 3 != 0, $urandom % 2);
    step(0, 0);
    @(negedge clk) clear = 1; wr_en = 0; rd_en = 0; pend = 0; q.delete();
    @(negedge clk) clear = 0;
    check(empty && count == 0, "cleared");
    check(n_full > 0, "full reached");
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

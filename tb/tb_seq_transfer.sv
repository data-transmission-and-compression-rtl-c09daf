// tb_seq_transfer: the transfer reads a behavioural RAM1 (one-cycle read
// latency) and its RAM2 writes are collected. Per group: the packed bytes
// must be the 8 fixed bytes of each event plus the long bytes whose map bit
// is set (including long bytes equal to zero), placed at consecutive
// (row, block) positions; a fat group must stop at 2560 bytes and raise
// overflow; all bytes must be placed within 4098 cycles of start (4096
// reads plus the read and write latency).
//
// The 4096-cycle copy follows the scheme; keeping zero long bytes whose
// map bit is set is this design's choice.
module tb_seq_transfer;
  logic clk = 0, rst = 1, start = 0;
  logic [11:0] r1_addr;
  logic [7:0] r1_data;
  logic r2_we;
  logic [8:0] r2_row;
  logic [2:0] r2_blk;
  logic [7:0] r2_data;
  logic [11:0] nbytes;
  logic overflow;

  seq_transfer #(.EVENTS(256), .ROWS(512)) dut (.*);
  always #5 clk = ~clk;

  logic [7:0] ram1 [4096];
  logic [7:0] exp_b[$];
  logic [7:0] got_b[$];
  int checks = 0, failures = 0, n_ovf = 0, n_zero_long = 0, last_rd, cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    r1_data <= ram1[r1_addr];
  end

  always @(negedge clk) if (!rst && r2_we) begin
    check(r2_row == 9'(got_b.size() / 5) && r2_blk == 3'(got_b.size() % 5), "position");
    got_b.push_back(r2_data);
  end

  task automatic fill(int dens);
    exp_b.delete();
    for (int e = 0; e < 256; e++) begin
      logic [7:0] mp;
      mp = '0;
      for (int i = 0; i < 8; i++) mp[i] = ($urandom % 100) < dens;
      for (int j = 0; j < 16; j++) ram1[e*16 + j] = 8'($urandom);
      ram1[e*16 + 2] = mp;
      for (int i = 0; i < 8; i++) begin
        if (!mp[i]) ram1[e*16 + 8 + i] = 8'h00;
        else if ($urandom % 8 == 0) ram1[e*16 + 8 + i] = 8'h00;   // long byte of value < 16
      end
      for (int j = 0; j < 8; j++) exp_b.push_back(ram1[e*16 + j]);
      for (int i = 0; i < 8; i++) if (mp[i]) begin
        exp_b.push_back(ram1[e*16 + 8 + i]);
        if (ram1[e*16 + 8 + i] == 0) n_zero_long++;
      end
    end
  endtask

  task automatic run(int dens);
    bit fat;
    fill(dens);
    fat = exp_b.size() > 2560;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    got_b.delete();
    repeat (4096) @(negedge clk);
    // last byte has now been written
    @(negedge clk);
    while (exp_b.size() > 2560) void'(exp_b.pop_back());
    check(got_b.size() == exp_b.size(), "byte count");
    check(int'(nbytes) == exp_b.size(), "nbytes");
    for (int b = 0; b < exp_b.size() && b < got_b.size(); b++) check(got_b[b] == exp_b[b], "byte");
    check(overflow == fat, "overflow flag");
    if (fat) n_ovf++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(10);
    run(60);
    run(0);
    run(100);
    run(30);
    check(n_ovf >= 2, "overflow seen");
    check(n_zero_long > 0, "zero long bytes kept");
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

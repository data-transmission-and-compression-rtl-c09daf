// tb_pointer_builder: feeds maps at the crossing rate (one line every two
// 80 MHz cycles) and checks that the pointers come out as {line, channel}
// for every set map bit, in order, with no extra ones. Groups: random maps,
// the worst case of 192 empty then 64 full lines (scanning must end
// 192 + 256 crossings after the start, give or take a cycle), all-zero
// maps, and a restart before the previous group was fully scanned is not
// used (the scheme never does it).
//
// A backlog group (32 full lines, then one long value per line) checks
// that a line never takes fewer than two cycles. The worst case is the
// scheme's; the backlog group is this testbench's own.
module tb_pointer_builder;
  logic clk = 0, rst = 1, start = 0, map_we = 0;
  logic [7:0] map_line = 0, map_data = 0;
  logic ptr_we, done;
  logic [10:0] ptr;

  pointer_builder #(.NCH(8), .NLINES(256)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  logic [10:0] exp_q[$];
  int t_start, t_done, n_ptr_group;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst && ptr_we) begin
    check(exp_q.size() > 0, "pointer expected");
    if (exp_q.size() > 0) check(ptr == exp_q.pop_front(), "pointer value");
  end

  task automatic run_group(int kind);
    for (int l = 0; l < 256; l++) begin
      logic [7:0] mp;
      case (kind)
        0: mp = 8'($urandom) & 8'($urandom);
        1: mp = (l < 192) ? 8'h00 : 8'hFF;
        3: mp = (l < 32) ? 8'hFF : 8'(1 << (l % 8));
        default: mp = 8'h00;
      endcase
      for (int i = 0; i < 8; i++) if (mp[i]) exp_q.push_back({8'(l), 3'(i)});
      @(negedge clk);
      map_we = 1; map_line = 8'(l); map_data = mp; start = (l == 0);
      if (l == 0) t_start = cycle;
      @(negedge clk);
      map_we = 0; start = 0;
    end
    while (!done) @(negedge clk);
    t_done = cycle;
    check(exp_q.size() == 0, "all pointers emitted");
    if (kind == 1) begin
      $display("worst case: done %0d cycles after start", t_done - t_start);
      check(t_done - t_start >= 2*(192+256) - 2 && t_done - t_start <= 2*(192+256) + 2,
            "worst-case scan time");
    end
    if (kind == 3) begin
      // 32 full lines put the scan 192 cycles behind; one-value lines then
      // cost two cycles each, so it stays behind: 32*8 + 224*2 cycles
      $display("backlog case: done %0d cycles after start", t_done - t_start);
      check(t_done - t_start >= 32*8 + 224*2 - 2 && t_done - t_start <= 32*8 + 224*2 + 2,
            "backlog scan time");
    end
    // pad to the 512-crossing period of a system
    while (cycle - t_start < 2*512) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(done, "idle after reset");
    run_group(0);
    run_group(1);
    run_group(2);
    run_group(3);
    run_group(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

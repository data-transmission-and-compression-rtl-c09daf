// tb_ram_system: fills one RAM system with groups of 256 random lines at
// the crossing rate, then reads it the way the readout does: every fixed
// word by line address, every pointer from the FIFO (which must list the
// set bits of the scan maps in order) and the long byte at each pointer.
// A second and third group check that start clears the FIFO and restarts
// the scanner.
//
// The system's contents follow the scheme; the read order is this
// testbench's choice.
module tb_ram_system;
  import fe_pkg::*;
  logic clk = 0, rst = 1, we = 0, start = 0;
  logic [7:0] wline = 0, fix_raddr = 0;
  fixed_word_t wfixed, fix_rdata;
  logic [63:0] wlong;
  logic [7:0] wscan_map;
  logic ptr_rd = 0, ptr_empty, scan_done, ptr_wr;
  logic [10:0] ptr_rdata, long_raddr = 0;
  logic [7:0] long_rdata;

  ram_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ptr_wr = 0;
  fixed_word_t fx[256];
  logic [63:0] lg[256];
  logic [10:0] exp_ptr[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (ptr_wr) n_ptr_wr++;

  task automatic group(int dens);
    int total;
    total = 0;
    exp_ptr.delete();
    for (int l = 0; l < 256; l++) begin
      logic [7:0] mp;
      mp = '0;
      for (int i = 0; i < 8; i++) mp[i] = ($urandom % 100) < dens;
      if (total + $countones(mp) > 512) mp = '0;   // line_builder never lets more through
      total += $countones(mp);
      fx[l] = fixed_word_t'({$urandom, $urandom});
      lg[l] = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) if (mp[i]) exp_ptr.push_back({8'(l), 3'(i)});
      @(negedge clk);
      we = 1; start = (l == 0); wline = 8'(l); wfixed = fx[l]; wlong = lg[l]; wscan_map = mp;
      @(negedge clk);
      we = 0; start = 0;
    end
    while (!scan_done) @(negedge clk);
    for (int l = 0; l < 256; l++) begin
      @(negedge clk) fix_raddr = 8'(l);
      @(posedge clk); #1;
      check(fix_rdata == fx[l], "fixed word");
    end
    while (exp_ptr.size() > 0) begin
      logic [10:0] e;
      e = exp_ptr.pop_front();
      @(negedge clk);
      check(!ptr_empty, "pointer available");
      ptr_rd = 1;
      @(negedge clk);
      ptr_rd = 0;
      check(ptr_rdata == e, "pointer");
      long_raddr = ptr_rdata;
      @(posedge clk); #1;
      check(long_rdata == lg[e[10:3]][e[2:0]*8 +: 8], "long byte");
    end
    @(negedge clk);
    check(ptr_empty, "FIFO drained");
  endtask

  initial begin
    wfixed = '0; wlong = '0; wscan_map = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    group(20);
    group(50);
    group(3);
    check(n_ptr_wr > 0, "pointers written");
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

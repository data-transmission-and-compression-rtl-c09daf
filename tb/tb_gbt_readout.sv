// tb_gbt_readout: the readout with its two RAM systems, driven by a
// testbench sequencer in place of line_builder (one line write every two
// cycles, 256 lines per group, systems alternating). Lines carry random
// fixed words and random maps; groups range from empty to exactly 512 long
// bytes. Each word must be the fixed word of the same line one group
// earlier plus the next two long bytes of that group in line/channel order
// (zero when none are left), and must appear 4 cycles after the write
// strobe of the line that triggers its read.
//
// Two long bytes per line in order follows the scheme; the 4-cycle delay
// is this design's choice.
module tb_gbt_readout;
  import fe_pkg::*;
  logic clk = 0, rst = 1;
  logic wr_en = 0, wr_sys = 0;
  logic [7:0] wr_line = 0;
  fixed_word_t wfixed;
  logic [63:0] wlong;
  logic [7:0] wmap;
  logic [7:0] fix_raddr;
  fixed_word_t fix_rdata [2];
  logic ptr_rd [2], ptr_empty [2], scan_done [2], ptr_wr [2];
  logic [10:0] ptr_rdata [2], long_raddr;
  logic [7:0] long_rdata [2];
  gbt_word_t gbt_word;
  logic gbt_valid, starve;

  for (genvar s = 0; s < 2; s++) begin : g_sys
    ram_system u_sys (
      .clk, .rst, .we(wr_en && wr_sys == 1'(s)), .start(wr_en && wr_sys == 1'(s) && wr_line == 0),
      .wline(wr_line), .wfixed, .wlong, .wscan_map(wmap),
      .fix_raddr, .fix_rdata(fix_rdata[s]), .ptr_rd(ptr_rd[s]), .ptr_rdata(ptr_rdata[s]),
      .ptr_empty(ptr_empty[s]), .long_raddr, .long_rdata(long_rdata[s]),
      .scan_done(scan_done[s]), .ptr_wr(ptr_wr[s]));
  end

  gbt_readout dut (.clk, .rst, .wr_en, .wr_sys, .wr_line, .fix_raddr, .fix_rdata, .ptr_rd,
    .ptr_rdata, .ptr_empty, .long_raddr, .long_rdata, .ptr_wr, .gbt_word, .gbt_valid, .starve);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, nwords = 0, n_starve = 0;
  gbt_word_t exp_q[$];
  int due_q[$];
  fixed_word_t fx[$];
  logic [7:0] lb[$];
  int dens[6] = '{30, 0, 100, 10, 60, 5};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst) begin
    if (starve) n_starve++;
    if (gbt_valid) begin
      check(exp_q.size() > 0, "word expected");
      if (exp_q.size() > 0) begin
        check(gbt_word == exp_q.pop_front(), "word");
        check(cycle == due_q.pop_front(), "timing");
        nwords++;
      end
    end
  end

  initial begin
    wfixed = '0; wlong = '0; wmap = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int g = 0; g < 6; g++) begin
      int total;
      total = 0;
      for (int l = 0; l < 256; l++) begin
        logic [7:0] mp;
        fixed_word_t f;
        mp = '0;
        for (int i = 0; i < 8; i++)
          if (($urandom % 100) < dens[g] && total < 512) begin mp[i] = 1; total++; end
        f = fixed_word_t'({$urandom, $urandom});
        f.map = mp;
        @(negedge clk);
        wr_en = 1; wr_sys = 1'(g % 2); wr_line = 8'(l);
        wfixed = f; wlong = {$urandom, $urandom}; wmap = mp;
        fx.push_back(f);
        for (int i = 0; i < 8; i++) if (mp[i]) lb.push_back(wlong[i*8 +: 8]);
        if (g > 0) due_q.push_back(cycle + 4);
        @(negedge clk) wr_en = 0;
      end
      for (int k = 0; k < 256; k++) begin
        gbt_word_t w;
        w.fixed = fx[k];
        w.long0 = (2*k < lb.size()) ? lb[2*k] : 8'h00;
        w.long1 = (2*k+1 < lb.size()) ? lb[2*k+1] : 8'h00;
        exp_q.push_back(w);
      end
      fx.delete();
      lb.delete();
    end
    repeat (8) @(posedge clk);
    check(nwords == 5 * 256, "all words of five groups");
    check(n_starve == 0, "no late pointer");
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

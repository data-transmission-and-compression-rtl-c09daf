// tb_fe_fpga_fixed: end-to-end test of one front-end FPGA at full size.
//
// Drives NG groups of 256 crossings with the patterns of fe_stim_pkg and
// compares every link word with fe_ref_pkg::link_model, bit for bit. Also
// checks: the latency from a crossing's samples to its word (256 crossings
// plus a 5-cycle pipeline), that the words decode back to the input ADC
// values, that the overflow flag is raised in the flood group, and that the
// pointer FIFO never runs dry while its scanner is still busy.
//
// The 256-crossing delay follows the scheme; the 5-cycle pipeline it
// checks is this design's choice.
module tb_fe_fpga_fixed;
  import fe_pkg::*;
  import fe_ref_pkg::*;
  import fe_stim_pkg::*;

  localparam int NG = 8;
  localparam int LAT = 2*LINES + 5;   // 80 MHz cycles, sample to word
  localparam logic [10:0] ADDR = 11'b110_0101_1010;

  logic clk = 0, rst = 1;
  logic [ADC_BITS-1:0]  adc [N_CH];
  logic [TRIG_BITS-1:0] trig;
  logic [11:0]          bxid;
  logic                 bx_strobe, gbt_valid, overflow, starve;
  gbt_word_t            gbt_word;

  fe_fpga_fixed dut (
    .clk, .rst, .fpga_addr(ADDR), .adc, .trig, .bxid,
    .bx_strobe, .gbt_word, .gbt_valid, .overflow, .starve
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int push_cycle[$];
  int in_adc[$][8];
  link_model m = new(LINES, MAX_LONG, ADDR);
  pattern_e pats[NG] = '{P_BUSY, P_WORST, P_QUIET, P_FLOOD, P_PED, P_EDGE, P_BUSY, P_PED};
  int line_no = 0, grp = 0, words = 0;
  int n_ovf_seen = 0, n_starve = 0;
  gbt_word_t got[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // drive one crossing per strobe
  always @(negedge clk) if (!rst && bx_strobe && grp < NG) begin
    logic [11:0] a[8];
    int ai[8];
    for (int i = 0; i < 8; i++) begin
      a[i] = sample(pats[grp], line_no, i);
      adc[i] = a[i];
      ai[i] = int'(a[i]);
    end
    trig = 6'($urandom);
    bxid = bxid + 1'b1;
    m.push(a, trig, bxid);
    push_cycle.push_back(cycle);
    in_adc.push_back(ai);
    line_no++;
    if (line_no == LINES) begin line_no = 0; grp++; end
  end

  always @(negedge clk) if (!rst) begin
    if (overflow) n_ovf_seen++;
    if (starve) n_starve++;
    if (gbt_valid) begin
      gbt_word_t e;
      int pc;
      check(m.expected.size() > 0, "word without expectation");
      if (m.expected.size() > 0) begin
        e = m.expected.pop_front();
        pc = push_cycle.pop_front();
        check(gbt_word == e, "link word");
        if (gbt_word != e && failures < 10)
          $display("  word %0d got %h exp %h", words, gbt_word, e);
        check(cycle - pc == LAT, "latency");
        if (words == 0) $display("latency %0d cycles", cycle - pc);
        got.push_back(gbt_word);
        words++;
        if (got.size() == LINES) begin
          gbt_word_t w[];
          int dec[][8];
          w = new[LINES];
          foreach (w[k]) w[k] = got[k];
          decode(w, dec);
          for (int k = 0; k < LINES; k++)
            for (int i = 0; i < 8; i++)
              check(dec[k][i] == -1 ? w[k].fixed.dq : dec[k][i] == in_adc[k][i], "decode");
          for (int k = 0; k < LINES; k++) void'(in_adc.pop_front());
          got.delete();
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) adc[i] = 12'd250;
    trig = '0;
    bxid = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (words == (NG - 1) * LINES);
    repeat (4) @(posedge clk);
    check(n_starve == 0, "pointer FIFO never starved");
    check(n_ovf_seen > 0, "overflow happened");
    check(m.n_spill > 0, "long bytes sent on later lines");
    check(m.n_zero_slots > 0, "empty long slots");
    check(m.n_ovf_lines > 0, "overflowed lines in model");
    $display("words=%0d long=%0d spilled=%0d zero_slots=%0d ovf_lines=%0d ovf_cycles=%0d",
             words, m.n_long, m.n_spill, m.n_zero_slots, m.n_ovf_lines, n_ovf_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2 * LINES * (NG + 2) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

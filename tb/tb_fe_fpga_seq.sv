// tb_fe_fpga_seq: end-to-end test of one FPGA running the sequential scheme
// at full size (256-event groups, four systems, 512 x 5-byte packing RAM).
//
// Eight groups with different occupancies are sent. For each group the
// expected link bytes are built independently: per event the 8 fixed bytes
// and the long bytes of the long channels, cut at 2560 bytes, zero-padded,
// 10 bytes per word. Every word is compared, its latency checked (the
// readout begins 824 crossings after the group's first event, so a word
// leaves 824 crossings plus 5 cycles after its own crossing), and the words
// are parsed back into ADC values. Mechanisms counted: all four systems
// used, long bytes skipped, overflow of a group, zero tail after a fatter
// group in the same system, a long value below 16 (zero top byte) kept,
// and the emptiest group (the case that sets the readout start).
//
// The packing and the 10 bytes per crossing follow the scheme; the
// 824-crossing start is this design's choice.
module tb_fe_fpga_seq;
  import fe_pkg::*;
  import seq_pkg::*;
  import fe_stim_pkg::*;

  localparam int NG  = 8;
  localparam int LAT = SUB * RD_START + 5;

  logic clk = 0, rst = 1;
  logic [ADC_BITS-1:0]  adc [N_CH];
  logic [TRIG_BITS-1:0] trig;
  logic [11:0]          bxid;
  logic                 bx_strobe, gbt_valid;
  logic [79:0]          gbt_word;
  logic [3:0]           overflow;

  fe_fpga_seq dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  pattern_e pats[NG] = '{P_FLOOD, P_BUSY, P_WORST, P_EDGE, P_PED, P_QUIET, P_PED, P_BUSY};
  logic [7:0] grp_bytes[$];           // bytes of the group being driven
  logic [79:0] exp_q[$];
  int push_cycle[$];
  logic [95:0] in_adc[$];             // 8 x 12-bit samples per crossing
  logic [7:0] rx[$];                  // received bytes of the current group
  int line_no = 0, grp = 0, words = 0;
  int n_skipped = 0, n_ovf_groups = 0, n_zero_tail = 0, n_small_long = 0, n_ped_groups = 0;
  int n_ovf_cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void close_group();
    if (grp_bytes.size() > 2560) n_ovf_groups++;
    if (pats[grp] == P_PED) n_ped_groups++;
    while (grp_bytes.size() > 2560) void'(grp_bytes.pop_back());
    while (grp_bytes.size() < 2560) grp_bytes.push_back(8'h00);
    for (int k = 0; k < 256; k++) begin
      logic [79:0] wd;
      for (int j = 0; j < 10; j++) wd[79 - 8*j -: 8] = grp_bytes[10*k + j];
      exp_q.push_back(wd);
    end
    grp_bytes.delete();
  endfunction

  always @(negedge clk) if (!rst && bx_strobe && grp < NG) begin
    logic [11:0] a[8];
    logic [95:0] ap;
    logic [7:0] mp;
    logic [39:0] sh;
    mp = '0; sh = '0;
    for (int i = 0; i < 8; i++) begin
      a[i] = sample(pats[grp], line_no, i);
      adc[i] = a[i];
      ap[i*12 +: 12] = a[i];
      if (a[i] >= 240 && a[i] < 272) sh[i*5 +: 5] = 5'(a[i] - 240);
      else begin mp[i] = 1; sh[i*5 +: 5] = {1'b0, a[i][3:0]}; end
    end
    trig = 6'($urandom);
    bxid = bxid + 1'b1;
    grp_bytes.push_back({2'b00, trig});
    grp_bytes.push_back(bxid[7:0]);
    grp_bytes.push_back(mp);
    for (int j = 0; j < 5; j++) grp_bytes.push_back(sh[39 - 8*j -: 8]);
    for (int i = 0; i < 8; i++)
      if (mp[i]) begin
        grp_bytes.push_back(a[i][11:4]);
        if (a[i] < 16) n_small_long++;
      end else n_skipped++;
    in_adc.push_back(ap);
    push_cycle.push_back(cycle);
    line_no++;
    if (line_no == 256) begin close_group(); line_no = 0; grp++; end
  end

  // parse one received group back into samples
  task automatic parse_group();
    int pos;
    bit trunc;
    pos = 0; trunc = 0;
    for (int e = 0; e < 256; e++) begin
      logic [95:0] ap;
      logic [7:0] mp;
      logic [39:0] sh;
      ap = in_adc.pop_front();
      if (trunc || pos + 8 > 2560) begin trunc = 1; continue; end
      mp = rx[pos + 2];
      for (int j = 0; j < 5; j++) sh[39 - 8*j -: 8] = rx[pos + 3 + j];
      pos += 8;
      for (int i = 0; i < 8; i++) begin
        int v;
        if (!mp[i]) v = 240 + int'(sh[i*5 +: 5]);
        else if (pos < 2560) begin v = int'({rx[pos], sh[i*5 +: 4]}); pos++; end
        else begin trunc = 1; v = int'(ap[i*12 +: 12]); end
        check(v == int'(ap[i*12 +: 12]), "decoded sample");
      end
    end
    rx.delete();
  endtask

  always @(negedge clk) if (!rst) begin
    if (overflow != 0) n_ovf_cycles++;
    if (gbt_valid && words < NG * 256) begin
      check(exp_q.size() > 0, "word expected");
      if (exp_q.size() > 0) begin
        logic [79:0] e;
        int pc;
        e = exp_q.pop_front();
        pc = push_cycle.pop_front();
        check(gbt_word == e, "link word");
        if (gbt_word != e && failures < 5) $display("  word %0d got %h exp %h", words, gbt_word, e);
        check(cycle - pc == LAT, "latency");
        if (words == 0) $display("latency %0d cycles", cycle - pc);
        for (int j = 0; j < 10; j++) rx.push_back(gbt_word[79 - 8*j -: 8]);
        words++;
        if (words % 256 == 0) begin
          // a thin group after a fat one in the same system: tail must be zero
          if (words / 256 == 5) begin
            bit z;
            z = 1;
            for (int b = 2300; b < 2560; b++) if (rx[b] != 0) z = 0;
            check(z, "zero tail");
            if (z) n_zero_tail++;
          end
          parse_group();
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) adc[i] = 12'd250;
    trig = 0; bxid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (words == NG * 256);
    repeat (8) @(posedge clk);
    check(n_skipped > 0, "long bytes skipped");
    check(n_ovf_groups > 0 && n_ovf_cycles > 0, "overflow");
    check(n_zero_tail > 0, "zero tail");
    check(n_small_long > 0, "long value below 16 kept");
    check(n_ped_groups > 0, "emptiest group");
    $display("words=%0d skipped=%0d ovf_groups=%0d small_long=%0d", words, n_skipped,
             n_ovf_groups, n_small_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 4 * 256 * (NG + 6) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

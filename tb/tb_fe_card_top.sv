// tb_fe_card_top: end-to-end test of the 32-channel card at full size
// (four FPGAs, four links, 256-line groups, 512 long bytes per group).
//
// Each FPGA gets its own sequence of group patterns (fe_stim_pkg) so the
// four links see different occupancies at the same time. Every word of
// every link is compared with its own fe_ref_pkg::link_model and decoded
// back to the ADC values; the latency and the alignment of the four links
// are checked. Each mechanism of the scheme must occur at least once:
// alternation of the two RAM systems, long bytes carried on a later line,
// empty long slots, the worst-case 192+64 pattern, overflow with the
// data-quality bit, and both values of the serial address bit. The pointer
// FIFO must never be refilled after a slot went out empty.
//
// The sequential links of the card run at the same time on their own 160
// MHz clock: four groups per FPGA (one per storage system, with an
// overflowing, a busy, an empty and a border-value group) are compared word
// by word with seq_ref_pkg::seq_model, with the 824-crossing readout delay
// checked on every word.
//
// The mechanisms listed are the scheme's; the pattern mix is this
// testbench's choice.
module tb_fe_card_top;
  import fe_pkg::*;
  import fe_ref_pkg::*;
  import fe_stim_pkg::*;
  import seq_ref_pkg::*;
  import seq_pkg::*;

  localparam int NF  = 4;
  localparam int NG  = 7;
  localparam int LAT = 2*LINES + 5;

  logic clk = 0, rst = 1;
  logic [4:0]           crate_addr = 5'd19;
  logic [3:0]           card_addr  = 4'd6;
  logic [ADC_BITS-1:0]  adc  [NF][N_CH];
  logic [TRIG_BITS-1:0] trig [NF];
  logic [11:0]          bxid;
  logic                 bx_strobe;
  gbt_word_t            gbt_word  [NF];
  logic                 gbt_valid [NF];
  logic                 overflow  [NF];
  logic                 starve    [NF];

  logic                 seq_clk = 0, seq_rst = 1;
  logic [ADC_BITS-1:0]  seq_adc  [NF][N_CH];
  logic [TRIG_BITS-1:0] seq_trig [NF];
  logic [11:0]          seq_bxid;
  logic                 seq_bx_strobe;
  logic [79:0]          seq_gbt_word  [NF];
  logic                 seq_gbt_valid [NF];
  logic [3:0]           seq_overflow  [NF];

  fe_card_top dut (
    .fix_clk(clk), .fix_rst(rst), .crate_addr, .card_addr, .fix_adc(adc), .fix_trig(trig),
    .fix_bxid(bxid), .fix_bx_strobe(bx_strobe), .fix_gbt_word(gbt_word),
    .fix_gbt_valid(gbt_valid), .fix_overflow(overflow), .fix_starve(starve),
    .seq_clk, .seq_rst, .seq_adc, .seq_trig, .seq_bxid, .seq_bx_strobe, .seq_gbt_word,
    .seq_gbt_valid, .seq_overflow);

  always #5 clk = ~clk;
  always #2.5 seq_clk = ~seq_clk;

  // ---------------- sequential scheme side ----------------
  localparam int NGS = 4;             // groups checked per link
  localparam int SLAT = SUB * RD_START + 5;
  seq_model sm[NF];
  pattern_e spats[NF][NGS] = '{
    '{P_FLOOD, P_BUSY,  P_PED,   P_EDGE},
    '{P_BUSY,  P_FLOOD, P_EDGE,  P_PED},
    '{P_PED,   P_EDGE,  P_FLOOD, P_BUSY},
    '{P_EDGE,  P_PED,   P_BUSY,  P_WORST}};
  int scycle = 0, sline = 0, sgrp = 0, swords = 0, s_ovf = 0;
  int s_push[$];
  int s_sys_used[4] = '{0, 0, 0, 0};

  always @(posedge seq_clk) scycle <= scycle + 1;

  always @(negedge seq_clk) if (!seq_rst && seq_bx_strobe) begin
    seq_bxid = seq_bxid + 1'b1;
    for (int f = 0; f < NF; f++) begin
      logic [11:0] a[8];
      for (int i = 0; i < 8; i++) begin
        a[i] = (sgrp < NGS) ? sample(spats[f][sgrp], sline, i) : pedestal();
        seq_adc[f][i] = a[i];
      end
      seq_trig[f] = 6'($urandom);
      sm[f].push(a, seq_trig[f], seq_bxid);
    end
    s_push.push_back(scycle);
    sline++;
    if (sline == 256) begin sline = 0; sgrp++; end
  end

  always @(negedge seq_clk) if (!seq_rst) begin
    for (int f = 0; f < NF; f++) if (seq_overflow[f] != 0) s_ovf++;
    if (seq_gbt_valid[0] && swords < NGS * 256) begin
      int pc;
      pc = s_push.pop_front();
      check(scycle - pc == SLAT, "sequential latency");
      s_sys_used[swords / 256]++;
      for (int f = 0; f < NF; f++) begin
        check(seq_gbt_valid[f], "sequential links aligned");
        check(sm[f].expected.size() > 0, "sequential word expected");
        if (sm[f].expected.size() > 0) check(seq_gbt_word[f] == sm[f].expected.pop_front(), "sequential word");
      end
      swords++;
    end
  end
  // ---------------------------------------------------------

  int checks = 0, failures = 0, cycle = 0;
  link_model m[NF];
  int push_cycle[$];
  int in_adc[NF][$][8];
  gbt_word_t got[NF][$];
  pattern_e pats[NF][NG] = '{
    '{P_BUSY,  P_WORST, P_FLOOD, P_QUIET, P_EDGE,  P_PED,   P_PED},
    '{P_PED,   P_BUSY,  P_WORST, P_FLOOD, P_QUIET, P_EDGE,  P_PED},
    '{P_FLOOD, P_EDGE,  P_BUSY,  P_WORST, P_PED,   P_QUIET, P_PED},
    '{P_QUIET, P_FLOOD, P_PED,   P_EDGE,  P_BUSY,  P_WORST, P_PED}};
  int line_no = 0, grp = 0, words = 0;
  int n_groups_out = 0, n_ovf = 0, n_starve = 0, n_worst = 0;
  int n_addr1 = 0, n_addr0 = 0, n_dq = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst && bx_strobe && grp < NG) begin
    bxid = bxid + 1'b1;
    for (int f = 0; f < NF; f++) begin
      logic [11:0] a[8];
      int ai[8];
      for (int i = 0; i < 8; i++) begin
        a[i] = sample(pats[f][grp], line_no, i);
        adc[f][i] = a[i];
        ai[i] = int'(a[i]);
      end
      trig[f] = 6'($urandom);
      m[f].push(a, trig[f], bxid);
      in_adc[f].push_back(ai);
      if (pats[f][grp] == P_WORST && line_no == 0) n_worst++;
    end
    push_cycle.push_back(cycle);
    line_no++;
    if (line_no == LINES) begin line_no = 0; grp++; end
  end

  always @(negedge clk) if (!rst) begin
    for (int f = 0; f < NF; f++) begin
      if (overflow[f]) n_ovf++;
      if (starve[f]) n_starve++;
      check(gbt_valid[f] == gbt_valid[0], "links aligned");
    end
    if (gbt_valid[0] && words < NG * LINES) begin
      int pc;
      pc = push_cycle.pop_front();
      check(cycle - pc == LAT, "latency");
      for (int f = 0; f < NF; f++) begin
        gbt_word_t e;
        check(m[f].expected.size() > 0, "word expected");
        if (m[f].expected.size() > 0) begin
          e = m[f].expected.pop_front();
          check(gbt_word[f] == e, "link word");
          if (gbt_word[f].fixed.addr_bit) n_addr1++; else n_addr0++;
          if (gbt_word[f].fixed.dq) n_dq++;
          got[f].push_back(gbt_word[f]);
          if (got[f].size() == LINES) begin
            gbt_word_t w[];
            int dec[][8];
            w = new[LINES];
            foreach (w[k]) w[k] = got[f][k];
            decode(w, dec);
            for (int k = 0; k < LINES; k++)
              for (int i = 0; i < 8; i++)
                check(dec[k][i] == -1 ? w[k].fixed.dq : dec[k][i] == in_adc[f][k][i], "decode");
            for (int k = 0; k < LINES; k++) void'(in_adc[f].pop_front());
            got[f].delete();
            if (f == 0) n_groups_out++;
          end
        end
      end
      words++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      m[f] = new(LINES, MAX_LONG, {crate_addr, card_addr, 2'(f)});
      trig[f] = '0;
      for (int i = 0; i < 8; i++) adc[f][i] = 12'd250;
    end
    bxid = '0;
    seq_bxid = '0;
    for (int f = 0; f < NF; f++) begin
      sm[f] = new();
      seq_trig[f] = '0;
      for (int i = 0; i < 8; i++) seq_adc[f][i] = 12'd250;
    end
    repeat (4) @(posedge clk);
    fork
      begin @(negedge clk) rst = 0; end
      begin @(negedge seq_clk) seq_rst = 0; end
    join
    wait (words == NG * LINES && swords == NGS * 256);
    repeat (4) @(posedge clk);
    check(n_groups_out >= 2, "both RAM systems used");
    check(n_worst > 0, "worst-case pattern sent");
    check(n_ovf > 0 && n_dq > 0, "overflow flagged");
    check(n_addr0 > 0 && n_addr1 > 0, "serial address bits");
    check(n_starve == 0, "no long byte out of order");
    for (int k = 0; k < 4; k++) check(s_sys_used[k] == 256, "sequential system used");
    check(s_ovf > 0, "sequential overflow");
    for (int f = 0; f < NF; f++) begin
      check(sm[f].n_skipped > 0, "sequential long bytes skipped");
      check(sm[f].n_ovf_groups > 0, "sequential overflowed group");
    end
    for (int f = 0; f < NF; f++) begin
      check(m[f].n_spill > 0, "long bytes on later lines");
      check(m[f].n_zero_slots > 0, "empty long slots");
    end
    $display("groups=%0d worst=%0d ovf_cycles=%0d dq_words=%0d addr0=%0d addr1=%0d",
             n_groups_out, n_worst, n_ovf, n_dq, n_addr0, n_addr1);
    for (int f = 0; f < NF; f++)
      $display("link %0d: long=%0d spilled=%0d zero_slots=%0d ovf_lines=%0d",
               f, m[f].n_long, m[f].n_spill, m[f].n_zero_slots, m[f].n_ovf_lines);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2 * LINES * (NG + 4) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

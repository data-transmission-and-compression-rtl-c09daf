// tb_line_builder: drives three groups of crossings (busy, flood, quiet)
// and checks every line write against fe_ref_pkg::link_model: the 64-bit
// fixed part, the long bytes, the map given to the pointer scanner (zero on
// overflowed lines), the line address, the alternating system bit, the
// group_start pulse and that the write follows the strobe by one cycle.
//
// The 512 budget and data-quality rule follow the scheme; letting exactly
// 512 through is this design's reading of it.
module tb_line_builder;
  import fe_pkg::*;
  import fe_ref_pkg::*;
  import fe_stim_pkg::*;

  localparam logic [10:0] ADDR = 11'b101_1100_0110;
  logic clk = 0, rst = 1;
  logic [ADC_BITS-1:0] adc [N_CH];
  logic [TRIG_BITS-1:0] trig;
  logic [11:0] bxid;
  logic bx_strobe, wr_en, wr_sys, group_start, overflow;
  logic [7:0] wr_line;
  fixed_word_t wr_fixed;
  logic [63:0] wr_long;
  logic [7:0] wr_scan_map;

  line_builder dut (.clk, .rst, .fpga_addr(ADDR), .adc, .trig, .bxid, .bx_strobe,
    .wr_en, .wr_sys, .wr_line, .wr_fixed, .wr_long, .wr_scan_map, .group_start, .overflow);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, strobe_cycle = -10;
  link_model m = new(LINES, MAX_LONG, ADDR);
  pattern_e pats[3] = '{P_BUSY, P_FLOOD, P_QUIET};
  logic [8*12-1:0] in_adc[$];
  fixed_word_t got[$];
  int line_no = 0, grp = 0, nwr = 0, n_ovf = 0, n_gs = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst) begin
    if (wr_en && nwr < 3 * LINES) begin
      logic [8*12-1:0] ap;
      logic [11:0] a[8];
      ap = in_adc.pop_front();
      for (int i = 0; i < 8; i++) a[i] = ap[i*12 +: 12];
      check(cycle - strobe_cycle == 1, "write one cycle after strobe");
      check(wr_line == 8'(nwr % LINES), "line address");
      check(wr_sys == 1'((nwr / LINES) % 2), "system alternation");
      check(group_start == (wr_line == 0), "group start");
      if (group_start) n_gs++;
      for (int i = 0; i < 8; i++) begin
        bit lng;
        lng = !(a[i] >= 240 && a[i] < 272);
        check(wr_long[i*8 +: 8] == (lng ? a[i][11:4] : 8'h00), "long byte");
      end
      check(wr_scan_map == (wr_fixed.dq ? 8'h00 : wr_fixed.map), "scan map");
      if (wr_fixed.dq) n_ovf++;
      got.push_back(wr_fixed);
      nwr++;
      if (got.size() == LINES) begin
        for (int k = 0; k < LINES; k++) begin
          gbt_word_t e;
          e = m.expected.pop_front();
          check(got[k] == e.fixed, "fixed part");
        end
        got.delete();
      end
    end
    if (bx_strobe && grp < 3) begin
      logic [11:0] a[8];
      logic [8*12-1:0] ap;
      for (int i = 0; i < 8; i++) begin
        a[i] = sample(pats[grp], line_no, i);
        adc[i] = a[i];
        ap[i*12 +: 12] = a[i];
      end
      trig = 6'($urandom);
      bxid = 12'($urandom);
      m.push(a, trig, bxid);
      in_adc.push_back(ap);
      strobe_cycle = cycle;
      line_no++;
      if (line_no == LINES) begin line_no = 0; grp++; end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) adc[i] = 12'd250;
    trig = 0; bxid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (nwr == 3 * LINES);
    repeat (3) @(posedge clk);
    check(n_ovf > 0, "overflow seen");
    check(n_gs == 3, "three group starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

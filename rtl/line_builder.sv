// line_builder: builds the fixed part of each crossing's line and sequences
// the two alternating RAM systems.
//
// The logic runs on the 80 MHz clock. An internal phase bit marks every
// other cycle as the crossing strobe (bx_strobe); the ADC samples, trigger
// slice and BXID are taken on that cycle. One cycle later the line is
// presented on the wr_* outputs with wr_en high for exactly one cycle, at
// line address wr_line of RAM system wr_sys. Lines are counted 0..LINES-1;
// each group of LINES crossings goes to one system and the next group to
// the other, so a group is read out while the following one is written.
// group_start is high with the write of line 0.
//
// Per line it also:
//   - sends one bit of the FPGA/card/crate address, MSB first, restarting at
//     line 0 of each group (the address is constant, so it needs only one
//     bit per line);
//   - adds the line's long values to a running total. A line whose long
//     values would take the total above MAX_LONG, and every later line of
//     the group, get data quality = 1 and contribute no pointers
//     (wr_scan_map = 0); wr_fixed still carries the true map.
// The line layout, the 256-line groups, the 512 budget and the alternation
// follow the scheme; the exact overflow rule (a line either fits whole or
// is dropped) and the address order are this design's choices.
module line_builder
  import fe_pkg::*;
#(
  parameter int unsigned NLINES  = LINES,
  parameter int unsigned MAXLONG = MAX_LONG
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [ADDR_BITS-1:0]     fpga_addr,
  input  logic [ADC_BITS-1:0]      adc [N_CH],
  input  logic [TRIG_BITS-1:0]     trig,
  input  logic [11:0]              bxid,
  output logic                     bx_strobe,
  output logic                     wr_en,
  output logic                     wr_sys,
  output logic [$clog2(NLINES)-1:0] wr_line,
  output fixed_word_t              wr_fixed,
  output logic [N_CH*LONG_BITS-1:0] wr_long,
  output logic [N_CH-1:0]          wr_scan_map,
  output logic                     group_start,
  output logic                     overflow
);
  localparam int unsigned LW = $clog2(NLINES);
  localparam int unsigned TW = $clog2(MAXLONG + N_CH + 1);

  logic                           phase;
  logic [LW-1:0]                  line_cnt;
  logic                           sys;
  logic [$clog2(ADDR_BITS)-1:0]   addr_idx;
  logic [TW-1:0]                  total;
  logic                           ovf;

  logic [N_CH*SHORT_BITS-1:0]     enc_short;
  logic [N_CH-1:0]                enc_map;
  logic [N_CH*LONG_BITS-1:0]      enc_long;
  logic [$clog2(N_CH+1)-1:0]      enc_n;

  adc_encoder u_enc (
    .adc(adc), .short_data(enc_short), .map(enc_map),
    .long_data(enc_long), .n_long(enc_n)
  );

  assign bx_strobe   = !phase;
  assign group_start = wr_en && (wr_line == '0);
  assign overflow    = ovf;

  // running total as seen by the current line (restarts at line 0)
  logic [TW-1:0] base_total;
  logic          base_ovf;
  logic          line_ovf;
  always_comb begin
    base_total = (line_cnt == '0) ? '0 : total;
    base_ovf   = (line_cnt == '0) ? 1'b0 : ovf;
    line_ovf   = base_ovf || (base_total + TW'(enc_n) > TW'(MAXLONG));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase    <= 1'b0;
      line_cnt <= '0;
      sys      <= 1'b0;
      addr_idx <= '0;
      total    <= '0;
      ovf      <= 1'b0;
      wr_en    <= 1'b0;
      wr_sys   <= 1'b0;
      wr_line  <= '0;
      wr_fixed <= '0;
      wr_long  <= '0;
      wr_scan_map <= '0;
    end else begin
      phase <= !phase;
      wr_en <= 1'b0;
      if (!phase) begin
        logic [$clog2(ADDR_BITS)-1:0] ai;
        ai = (line_cnt == '0) ? '0 : addr_idx;
        wr_en               <= 1'b1;
        wr_sys              <= sys;
        wr_line             <= line_cnt;
        wr_fixed.addr_bit   <= fpga_addr[ADDR_BITS-1-int'(ai)];
        wr_fixed.dq         <= line_ovf;
        wr_fixed.trig       <= trig;
        wr_fixed.bxid       <= bxid[BXID_BITS-1:0];
        wr_fixed.short_data <= enc_short;
        wr_fixed.map        <= enc_map;
        wr_long             <= enc_long;
        wr_scan_map         <= line_ovf ? '0 : enc_map;
        addr_idx <= (ai == ($clog2(ADDR_BITS))'(ADDR_BITS-1)) ? '0 : ai + 1'b1;
        ovf      <= line_ovf;
        total    <= line_ovf ? base_total : base_total + TW'(enc_n);
        line_cnt <= line_cnt + 1'b1;
        if (line_cnt == LW'(NLINES-1)) sys <= !sys;
      end
    end
  end
endmodule

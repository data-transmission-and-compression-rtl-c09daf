// fe_fpga_fixed: one front-end FPGA (8 channels) driving one GBT link with
// the fixed format compression scheme.
//
// Every crossing (25 ns) the 8 ADC samples are compressed into a 64-bit
// fixed part (address bit, data quality, trigger, BXID, 8 short codes, map)
// plus up to 8 long bytes. The fixed part fills one 80-bit link word; the
// long bytes are queued and use the 16 spare bits of the words, two per
// word, so a group of 256 crossings can carry up to 512 long values. Two
// RAM systems alternate every 256 crossings: while one is filled the other
// is read to the link, so every word leaves exactly 256 crossings (plus a
// fixed pipeline delay) after its samples, on all links in step.
//
// Clocking: a single 80 MHz clock. bx_strobe marks the cycle on which the
// inputs of a crossing are taken (every other cycle); gbt_valid pulses once
// per crossing when a new gbt_word is presented. The first words appear
// after the first full group has been stored.
//
// The partition (line building, two alternating systems, readout 256
// crossings later) follows the scheme; the single 80 MHz clock with a
// crossing strobe and the 5-cycle pipeline are this design's choices.
module fe_fpga_fixed
  import fe_pkg::*;
#(
  parameter int unsigned NLINES  = LINES,
  parameter int unsigned MAXLONG = MAX_LONG
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ADDR_BITS-1:0] fpga_addr,
  input  logic [ADC_BITS-1:0]  adc [N_CH],
  input  logic [TRIG_BITS-1:0] trig,
  input  logic [11:0]          bxid,
  output logic                 bx_strobe,
  output gbt_word_t            gbt_word,
  output logic                 gbt_valid,
  output logic                 overflow,
  output logic                 starve
);
  localparam int unsigned LW = $clog2(NLINES);
  localparam int unsigned PW = $clog2(NLINES * N_CH);

  logic                       wr_en, wr_sys, group_start;
  logic [LW-1:0]              wr_line;
  fixed_word_t                wr_fixed;
  logic [N_CH*LONG_BITS-1:0]  wr_long;
  logic [N_CH-1:0]            wr_scan_map;

  logic [LW-1:0]              fix_raddr;
  fixed_word_t                fix_rdata  [2];
  logic                       ptr_rd     [2];
  logic [PW-1:0]              ptr_rdata  [2];
  logic                       ptr_empty  [2];
  logic [PW-1:0]              long_raddr;
  logic [LONG_BITS-1:0]       long_rdata [2];
  logic                       scan_done  [2];
  logic                       ptr_wr     [2];

  line_builder #(.NLINES(NLINES), .MAXLONG(MAXLONG)) u_lb (
    .clk, .rst, .fpga_addr, .adc, .trig, .bxid, .bx_strobe,
    .wr_en, .wr_sys, .wr_line, .wr_fixed, .wr_long, .wr_scan_map,
    .group_start, .overflow
  );

  for (genvar s = 0; s < 2; s++) begin : g_sys
    logic sel;
    assign sel = (wr_sys == 1'(s));
    ram_system #(.NLINES(NLINES), .FDEPTH(MAXLONG)) u_sys (
      .clk, .rst,
      .we(wr_en && sel), .start(group_start && sel), .wline(wr_line),
      .wfixed(wr_fixed), .wlong(wr_long), .wscan_map(wr_scan_map),
      .fix_raddr, .fix_rdata(fix_rdata[s]),
      .ptr_rd(ptr_rd[s]), .ptr_rdata(ptr_rdata[s]), .ptr_empty(ptr_empty[s]),
      .long_raddr, .long_rdata(long_rdata[s]), .scan_done(scan_done[s]),
      .ptr_wr(ptr_wr[s])
    );
  end

  gbt_readout #(.NLINES(NLINES)) u_ro (
    .clk, .rst, .wr_en, .wr_sys, .wr_line,
    .fix_raddr, .fix_rdata, .ptr_rd, .ptr_rdata, .ptr_empty,
    .long_raddr, .long_rdata, .ptr_wr,
    .gbt_word, .gbt_valid, .starve
  );
endmodule

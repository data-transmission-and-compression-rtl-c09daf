// gbt_readout: forms the 80-bit GBT word of each crossing in the fixed
// format scheme.
//
// While line k of a group is written into one RAM system, line k of the
// previous group is read from the other one, so the link carries a group
// 256 crossings after it was taken, one line every 25 ns. The 64-bit fixed
// part comes straight from the fixed RAM; the remaining 16 bits are filled
// with the next two long bytes of the group, found by popping two pointers
// from that system's pointer FIFO and reading the long RAM at those byte
// addresses. Long bytes are thus sent in line and channel order, possibly
// some lines after the line that produced them; a slot with no pointer left
// is sent as zero. The receiver re-associates long bytes to channels by
// walking the maps of the group in order.
//
// Timing (80 MHz clock, two cycles per crossing): c0 is the cycle where
// line_builder writes line k (wr_en); it addresses the fixed RAM and pops
// pointer a. c1 pops pointer b and reads byte a, c2 reads byte b, and the
// word is registered at the end of c3: gbt_word changes and gbt_valid pulses
// once per crossing, with the word held for the two cycles of the crossing.
// starve pulses when the pointer builder writes a pointer into a FIFO after
// a slot of the same group already went out empty: that long byte would be
// sent out of order. The scheme's timing argument (the scanner always keeps
// ahead of two pointers per crossing) says this never happens; the flag and
// the testbenches check it.
//
// Reading one group 256 crossings after it was written, with two long
// bytes per line in order, follows the scheme; the zero fill of empty slots,
// the starve flag and the pipeline depth are this design's choices.
module gbt_readout
  import fe_pkg::*;
#(
  parameter int unsigned NLINES = LINES
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           wr_en,
  input  logic                           wr_sys,
  input  logic [$clog2(NLINES)-1:0]      wr_line,
  // to/from the two RAM systems
  output logic [$clog2(NLINES)-1:0]      fix_raddr,
  input  fixed_word_t                    fix_rdata  [2],
  output logic                           ptr_rd     [2],
  input  logic [$clog2(NLINES*N_CH)-1:0] ptr_rdata  [2],
  input  logic                           ptr_empty  [2],
  output logic [$clog2(NLINES*N_CH)-1:0] long_raddr,
  input  logic [LONG_BITS-1:0]           long_rdata [2],
  input  logic                           ptr_wr     [2],
  // link side
  output gbt_word_t                      gbt_word,
  output logic                           gbt_valid,
  output logic                           starve
);
  logic        active;          // a whole group has been written
  // stage registers
  logic        s1_v, s1_sys, s1_a;   // in c1
  logic        s2_v, s2_sys, s2_a, s2_b;   // in c2
  logic        s3_v, s3_sys, s3_b;   // in c3
  fixed_word_t s2_fix, s3_fix;
  logic [LONG_BITS-1:0] s3_la;

  logic        c0, c0_sys, a_ok, b_ok;
  logic        gap [2];         // a slot of the group in this system went out empty

  always_comb begin
    c0        = wr_en && active;
    c0_sys    = !wr_sys;
    fix_raddr = wr_line;
    a_ok      = c0 && !ptr_empty[c0_sys];
    b_ok      = s1_v && !ptr_empty[s1_sys];
    ptr_rd[0] = (a_ok && c0_sys == 1'b0) || (b_ok && s1_sys == 1'b0);
    ptr_rd[1] = (a_ok && c0_sys == 1'b1) || (b_ok && s1_sys == 1'b1);
    // byte a address in c1, byte b address in c2
    long_raddr = s1_v ? ptr_rdata[s1_sys] : ptr_rdata[s2_sys];
    starve = (ptr_wr[0] && gap[0]) || (ptr_wr[1] && gap[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
      s1_sys <= 1'b0; s2_sys <= 1'b0; s3_sys <= 1'b0;
      s1_a <= 1'b0; s2_a <= 1'b0; s2_b <= 1'b0; s3_b <= 1'b0;
      s2_fix <= '0; s3_fix <= '0; s3_la <= '0;
      gbt_word  <= '0;
      gbt_valid <= 1'b0;
      gap[0] <= 1'b0;
      gap[1] <= 1'b0;
    end else begin
      for (int s = 0; s < 2; s++) begin
        if (wr_en && wr_sys == 1'(s) && wr_line == '0) gap[s] <= 1'b0;
        if ((c0 && c0_sys == 1'(s) && !a_ok) || (s1_v && s1_sys == 1'(s) && !b_ok))
          gap[s] <= 1'b1;
      end
      if (wr_en && wr_line == ($clog2(NLINES))'(NLINES - 1)) active <= 1'b1;
      // c0 -> c1
      s1_v   <= c0;
      s1_sys <= c0_sys;
      s1_a   <= a_ok;
      // c1 -> c2
      s2_v   <= s1_v;
      s2_sys <= s1_sys;
      s2_a   <= s1_a;
      s2_b   <= b_ok;
      s2_fix <= fix_rdata[s1_sys];
      // c2 -> c3
      s3_v   <= s2_v;
      s3_sys <= s2_sys;
      s3_b   <= s2_b;
      s3_fix <= s2_fix;
      s3_la  <= s2_a ? long_rdata[s2_sys] : '0;
      // c3 -> output
      gbt_valid <= s3_v;
      if (s3_v) begin
        gbt_word.fixed <= s3_fix;
        gbt_word.long0 <= s3_la;
        gbt_word.long1 <= s3_b ? long_rdata[s3_sys] : '0;
      end
    end
  end
endmodule

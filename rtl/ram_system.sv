// ram_system: one of the two alternating storage systems of the fixed
// format scheme.
//
// It holds one group of NLINES crossings:
//   - fixed RAM   : 64-bit fixed part of each line (dp_ram, NLINES deep);
//   - long RAM    : the 8 long bytes of each line, written 64 bits wide and
//                   read back one byte at a time (long_data_ram);
//   - pointer builder and pointer FIFO: the byte addresses of the long
//                   values that really exist, in line and channel order.
// The write side is driven by line_builder while this system is filled; the
// read side by gbt_readout during the following group. start (write of line
// 0) clears the FIFO and restarts the scanner. All reads are synchronous,
// one cycle of latency, read-first against a write of the same cycle.
//
// Two alternating systems follow the scheme; the split into a separate
// map array and an 11-bit wide FIFO is this design's choice.
module ram_system
  import fe_pkg::*;
#(
  parameter int unsigned NLINES = LINES,
  parameter int unsigned FDEPTH = MAX_LONG
) (
  input  logic                          clk,
  input  logic                          rst,
  // write side
  input  logic                          we,
  input  logic                          start,
  input  logic [$clog2(NLINES)-1:0]     wline,
  input  fixed_word_t                   wfixed,
  input  logic [N_CH*LONG_BITS-1:0]     wlong,
  input  logic [N_CH-1:0]               wscan_map,
  // read side
  input  logic [$clog2(NLINES)-1:0]     fix_raddr,
  output fixed_word_t                   fix_rdata,
  input  logic                          ptr_rd,
  output logic [$clog2(NLINES*N_CH)-1:0] ptr_rdata,
  output logic                          ptr_empty,
  input  logic [$clog2(NLINES*N_CH)-1:0] long_raddr,
  output logic [LONG_BITS-1:0]          long_rdata,
  output logic                          scan_done,
  output logic                          ptr_wr
);
  localparam int unsigned PW = $clog2(NLINES * N_CH);

  logic          pb_we;
  logic [PW-1:0] pb_ptr;
  logic          ff_full;
  logic [$clog2(FDEPTH):0] ff_count;
  logic [63:0]   fix_raw;

  dp_ram #(.WIDTH(64), .DEPTH(NLINES)) u_fixed (
    .clk, .we, .waddr(wline), .wdata(wfixed), .raddr(fix_raddr), .rdata(fix_raw)
  );
  assign fix_rdata = fixed_word_t'(fix_raw);
  assign ptr_wr    = pb_we;

  long_data_ram #(.NCH(N_CH), .LINES(NLINES)) u_long (
    .clk, .we, .waddr(wline), .wdata(wlong), .raddr(long_raddr), .rdata(long_rdata)
  );

  pointer_builder #(.NCH(N_CH), .NLINES(NLINES)) u_pb (
    .clk, .rst, .start, .map_we(we), .map_line(wline), .map_data(wscan_map),
    .ptr_we(pb_we), .ptr(pb_ptr), .done(scan_done)
  );

  sync_fifo #(.WIDTH(PW), .DEPTH(FDEPTH)) u_fifo (
    .clk, .rst, .clear(start), .wr_en(pb_we), .wdata(pb_ptr), .rd_en(ptr_rd),
    .rdata(ptr_rdata), .empty(ptr_empty), .full(ff_full), .count(ff_count)
  );
endmodule

// seq_system: one of the four storage systems of the sequential scheme.
//
// A group of EVENTS crossings is written into RAM1 (seq_ram1), one event
// per crossing; from the write of event 0 the transfer (seq_transfer)
// packs the bytes into RAM2 (seq_ram2) over the next 4096 cycles. The
// readout starts RD_START crossings after event 0 was written and takes
// EVENTS crossings: every crossing it reads two 40-bit rows of RAM2 (one
// every two cycles, the 80 MHz rate of the scheme) and presents them as
// one 80-bit word, first byte in bits [79:72]. Each row is written back to
// zero in the cycle after it is read, so rows the next group does not fill
// are sent as zeros. After reset all rows are cleared once (512 cycles),
// well before the first readout.
//
// local is the 160 MHz cycle count since this system's event 0 write
// (modulo 4096, supplied by the sequencer); rd_valid pulses for one cycle
// with each new word. The read-and-clear is this design's way of getting
// the zeros the scheme asks for.
//
// RAM1, transfer and RAM2 per system follow the scheme.
module seq_system
  import seq_pkg::*;
#(
  parameter int unsigned NEV   = EVENTS,
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned RDS   = RD_START
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            we,
  input  logic [$clog2(NEV)-1:0]          waddr,
  input  logic [127:0]                    wdata,
  input  logic                            start,
  input  logic [$clog2(NEV*16)-1:0]       local_cycle,
  output logic [79:0]                     rd_word,
  output logic                            rd_valid,
  output logic                            reading,
  output logic [$clog2(NROWS*5+1)-1:0]    nbytes,
  output logic                            overflow
);
  localparam int unsigned CW = $clog2(NEV * 16);
  localparam int unsigned RW = $clog2(NROWS);

  logic [CW-1:0]  r1_addr;
  logic [7:0]     r1_data;
  logic           a_we;
  logic [RW-1:0]  a_row;
  logic [2:0]     a_blk;
  logic [7:0]     a_data;
  logic [RW-1:0]  b_row;
  logic           b_we;
  logic [39:0]    b_rdata;

  seq_ram1 #(.EVENTS(NEV)) u_ram1 (
    .clk, .we, .waddr, .wdata, .raddr(r1_addr), .rdata(r1_data)
  );

  seq_transfer #(.EVENTS(NEV), .ROWS(NROWS)) u_xfer (
    .clk, .rst, .start, .r1_addr, .r1_data,
    .r2_we(a_we), .r2_row(a_row), .r2_blk(a_blk), .r2_data(a_data),
    .nbytes, .overflow
  );

  seq_ram2 #(.ROWS(NROWS)) u_ram2 (
    .clk, .a_we, .a_row, .a_blk, .a_data,
    .b_row, .b_we, .b_wdata(40'd0), .b_rdata
  );

  // readout window: NEV crossings from RDS crossings after event 0
  logic [CW-1:0]  rel;
  logic           has_group, rd_on;
  logic [RW:0]    init_row;
  logic           init_busy;
  logic [39:0]    first_half;

  assign rel       = local_cycle - CW'(RDS * SUB);
  assign init_busy = !init_row[RW];
  assign reading   = rd_on;

  always_comb begin
    // rows 2k and 2k+1 of crossing k are read at rel = 4k and 4k+2 and
    // cleared one cycle later
    b_row = init_busy ? init_row[RW-1:0] : RW'({rel[CW-1:2], rel[1]});
    b_we  = init_busy || (rd_on && rel[0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_row   <= '0;
      has_group  <= 1'b0;
      rd_on      <= 1'b0;
      rd_valid   <= 1'b0;
      rd_word    <= '0;
      first_half <= '0;
    end else begin
      if (init_busy) init_row <= init_row + 1'b1;
      if (start) has_group <= 1'b1;
      if (rel == '1 && has_group) rd_on <= 1'b1;
      else if (rel == CW'(NEV * SUB - 1)) rd_on <= 1'b0;
      rd_valid <= 1'b0;
      if (rd_on && rel[1:0] == 2'd1) first_half <= b_rdata;
      if (rd_on && rel[1:0] == 2'd3) begin
        rd_word  <= {first_half, b_rdata};
        rd_valid <= 1'b1;
      end
    end
  end
endmodule

// pointer_builder: turns the per-line maps of a group into long-data pointers.
//
// The map of every line written into this RAM system is kept in a small
// map memory (8 bits x NLINES). Starting with the write of line 0 (start),
// a scanner walks the lines in order, never passing the last line written.
// For each set map bit it emits one pointer {line, channel}, which is the
// byte address of that long value in long_data_ram, at most one pointer per
// 80 MHz cycle. A line takes max(2, n) cycles where n is its number of set
// bits: a line with no long data takes one crossing (25 ns), a full line
// eight 12.5 ns cycles. The worst case the scheme quotes (192 empty lines,
// then 64 full ones) therefore ends 192 + 256 crossings after the start,
// inside the 512 crossings before the system is reused.
//
// Ports: map_we/map_line/map_data write the map of one line; ptr_we/ptr
// feed the pointer FIFO; done rises once all NLINES lines are scanned and
// stays high until the next start. Scanning order and rate follow the
// scheme; the map memory here is read combinationally (register array).
//
// The max(2, n) cycles per line reproduce the scheme's worst case of
// 192 + 256 cycles; the register-array map memory is this design's choice.
module pointer_builder #(
  parameter int unsigned NCH    = 8,
  parameter int unsigned NLINES = 256
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic                                 start,
  input  logic                                 map_we,
  input  logic [$clog2(NLINES)-1:0]            map_line,
  input  logic [NCH-1:0]                       map_data,
  output logic                                 ptr_we,
  output logic [$clog2(NLINES)+$clog2(NCH)-1:0] ptr,
  output logic                                 done
);
  localparam int unsigned LW = $clog2(NLINES);
  localparam int unsigned CW = $clog2(NCH);

  logic [NCH-1:0] map_mem [NLINES];
  logic [LW:0]    scan_line;   // next line to scan
  logic [LW:0]    written;     // lines written since start
  logic [NCH-1:0] residual;
  logic           in_line;

  logic [NCH-1:0] cur, nxt;
  logic           active, line_end;
  logic [CW-1:0]  low_idx;

  always_comb begin
    active  = !done && (in_line || (scan_line < written));
    cur     = in_line ? residual : map_mem[scan_line[LW-1:0]];
    low_idx = '0;
    for (int i = NCH - 1; i >= 0; i--)
      if (cur[i]) low_idx = CW'(i);
    nxt      = cur & (cur - 1'b1);     // clear lowest set bit
    line_end = (nxt == '0) && in_line;
    ptr_we   = active && (cur != '0) && !start;
    ptr      = {scan_line[LW-1:0], low_idx};
  end

  always_ff @(posedge clk)
    if (map_we) map_mem[map_line] <= map_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      scan_line <= '0;
      written   <= '0;
      residual  <= '0;
      in_line   <= 1'b0;
      done      <= 1'b1;
    end else if (start) begin
      scan_line <= '0;
      written   <= (LW+1)'(map_we);
      residual  <= '0;
      in_line   <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (map_we) written <= written + 1'b1;
      if (active) begin
        if (line_end) begin
          in_line   <= 1'b0;
          scan_line <= scan_line + 1'b1;
          if (scan_line == (LW+1)'(NLINES - 1)) done <= 1'b1;
        end else begin
          in_line  <= 1'b1;
          residual <= nxt;
        end
      end
    end
  end
endmodule

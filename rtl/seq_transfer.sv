// seq_transfer: byte-packing transfer of the sequential scheme.
//
// After start (the write of event 0 of a group into RAM1) it reads RAM1 one
// byte per 160 MHz cycle, addresses 0 .. EVENTS*16-1, i.e. 4096 cycles or
// 25.6 us, exactly the time until the same RAM1 is refilled. Event e is
// read 1 + 16e cycles after start, after it was written at 4e. Each byte is
// copied into RAM2 at the position given by an (I, J) counter: J walks the
// 5 byte blocks, then I the rows. The 8 fixed bytes of every event are
// always copied; a long byte is copied only when its channel's map bit
// (byte 2 of the event, latched as it passes) is set, and then the counter
// advances; otherwise nothing is written and the counter stays.
//
// The scheme skips long bytes that read as zero. This design uses the map
// instead, because a long sample below 16 counts also has a zero top byte
// and would otherwise be dropped; for every other sample the two rules
// agree. When RAM2 is full (ROWS x 5 bytes) further bytes are dropped and
// overflow is set until the next start. nbytes is the number of bytes
// placed so far in the current group.
//
// The byte copy at one byte per 160 MHz cycle with an (I, J) counter
// follows the scheme; testing the map bit rather than a zero byte, and
// dropping bytes past the RAM2 capacity, are this design's choices.
module seq_transfer #(
  parameter int unsigned EVENTS = 256,
  parameter int unsigned ROWS   = 512
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           start,
  output logic [$clog2(EVENTS*16)-1:0]   r1_addr,
  input  logic [7:0]                     r1_data,
  output logic                           r2_we,
  output logic [$clog2(ROWS)-1:0]        r2_row,
  output logic [2:0]                     r2_blk,
  output logic [7:0]                     r2_data,
  output logic [$clog2(ROWS*5+1)-1:0]    nbytes,
  output logic                           overflow
);
  localparam int unsigned AW = $clog2(EVENTS * 16);
  localparam int unsigned RW = $clog2(ROWS);

  logic          running;
  logic [AW-1:0] cnt;
  logic          p_valid;       // r1_data holds byte p_idx
  logic [AW-1:0] p_idx;
  logic [7:0]    map_q;
  logic [RW-1:0] row_q;
  logic [2:0]    blk_q;
  logic          full_q;

  // current packing position, restarted by byte 0 of event 0
  logic          first, keep, full_c;
  logic [RW-1:0] row_c;
  logic [2:0]    blk_c;
  logic [7:0]    map_c;
  logic [3:0]    bidx;

  always_comb begin
    r1_addr = cnt;
    bidx    = p_idx[3:0];
    first   = p_valid && (p_idx == '0);
    row_c   = first ? '0 : row_q;
    blk_c   = first ? '0 : blk_q;
    full_c  = first ? 1'b0 : full_q;
    map_c   = (bidx == 4'd2) ? r1_data : map_q;
    keep    = (bidx < 4'd8) || map_c[bidx[2:0]];
    r2_we   = p_valid && keep && !full_c;
    r2_row  = row_c;
    r2_blk  = blk_c;
    r2_data = r1_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      cnt      <= '0;
      p_valid  <= 1'b0;
      p_idx    <= '0;
      map_q    <= '0;
      row_q    <= '0;
      blk_q    <= '0;
      full_q   <= 1'b0;
      nbytes   <= '0;
      overflow <= 1'b0;
    end else begin
      // read side
      p_valid <= running;
      p_idx   <= cnt;
      if (running) begin
        cnt <= cnt + 1'b1;
        if (cnt == AW'(EVENTS * 16 - 1)) running <= 1'b0;
      end
      if (start) begin
        running <= 1'b1;
        cnt     <= '0;
      end
      // write side
      if (p_valid) begin
        map_q <= map_c;
        if (first) begin
          nbytes   <= '0;
          overflow <= 1'b0;
        end
        row_q  <= row_c;
        blk_q  <= blk_c;
        full_q <= full_c;
        if (keep) begin
          if (full_c) begin
            overflow <= 1'b1;
          end else begin
            nbytes <= (first ? '0 : nbytes) + 1'b1;
            if (blk_c == 3'd4) begin
              blk_q <= '0;
              row_q <= row_c + 1'b1;
              if (row_c == RW'(ROWS - 1)) full_q <= 1'b1;
            end else begin
              blk_q <= blk_c + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule

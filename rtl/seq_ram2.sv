// seq_ram2: packing RAM of the sequential scheme ("RAM2").
//
// Five byte-wide blocks side by side, ROWS deep: 40 bits per row. Port A
// writes single bytes at (row I, block J), as the transfer walks through
// the blocks and then the rows. Port B reads a whole row (one cycle of
// latency, read-first) and can write a row, which the readout uses to put
// zeros behind itself so that the unused tail of the next group goes out
// as zeros. Byte J of a row is rdata[39-8J -: 8]. Both ports never touch
// the same row in one cycle in this design.
//
// The 5 x 8-bit by 512 organisation follows the scheme; the second port's
// row write, used to clear rows, is this design's choice.
module seq_ram2 #(
  parameter int unsigned ROWS = 512
) (
  input  logic                      clk,
  // port A: byte writes
  input  logic                      a_we,
  input  logic [$clog2(ROWS)-1:0]   a_row,
  input  logic [2:0]                a_blk,
  input  logic [7:0]                a_data,
  // port B: row read / row write
  input  logic [$clog2(ROWS)-1:0]   b_row,
  input  logic                      b_we,
  input  logic [39:0]               b_wdata,
  output logic [39:0]               b_rdata
);
  logic [7:0] mem [ROWS][5];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_row][a_blk] <= a_data;
    if (b_we)
      for (int j = 0; j < 5; j++) mem[b_row][j] <= b_wdata[39 - 8*j -: 8];
    for (int j = 0; j < 5; j++) b_rdata[39 - 8*j -: 8] <= mem[b_row][j];
  end
endmodule

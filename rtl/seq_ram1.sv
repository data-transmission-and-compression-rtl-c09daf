// seq_ram1: event store of the sequential scheme ("RAM1").
//
// Written one 16-byte event per crossing (128 bits, EVENTS deep) and read
// one byte per 160 MHz cycle at byte address {event, byte}, so the 16
// bytes of an event sit at successive addresses (4096 bytes in all). In an
// FPGA this is eight 1-bit x 4096 blocks seen as 128 x 256 on the write
// side; here it is one byte array. Byte j of an event is wdata[127-8j -: 8].
// Synchronous read, one cycle latency, read-first.
//
// The 128 x 256 write / byte read organisation follows the scheme; the
// single byte array is this design's choice.
module seq_ram1 #(
  parameter int unsigned EVENTS = 256
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [$clog2(EVENTS)-1:0]      waddr,
  input  logic [127:0]                   wdata,
  input  logic [$clog2(EVENTS*16)-1:0]   raddr,
  output logic [7:0]                     rdata
);
  logic [7:0] mem [EVENTS*16];

  always_ff @(posedge clk) begin
    if (we)
      for (int j = 0; j < 16; j++)
        mem[{waddr, 4'(j)}] <= wdata[127 - 8*j -: 8];
    rdata <= mem[raddr];
  end
endmodule

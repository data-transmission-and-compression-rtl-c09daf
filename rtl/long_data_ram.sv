// long_data_ram: mixed-width dual-port RAM for the long ADC bytes.
//
// The write side is one line per crossing: NCH bytes (8 x 8 bits) at line
// address waddr. The read side sees the same storage as single bytes at
// byte address {line, channel}, i.e. 256 lines x 8 bytes = 2048 bytes
// addressed with 11 bits. This is the width change that dual-port FPGA RAMs
// offer and that the scheme relies on. Read data appear one cycle after
// raddr; reads and writes of the same cycle return the old byte.
//
// The 64-bit write / 8-bit read organisation follows the scheme; the byte
// address {line, channel} is this design's choice.
module long_data_ram #(
  parameter int unsigned NCH   = 8,
  parameter int unsigned LINES = 256
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [$clog2(LINES)-1:0]           waddr,
  input  logic [NCH*8-1:0]                   wdata,
  input  logic [$clog2(LINES*NCH)-1:0]       raddr,
  output logic [7:0]                         rdata
);
  localparam int unsigned CB = $clog2(NCH);
  logic [7:0] mem [LINES*NCH];

  always_ff @(posedge clk) begin
    if (we)
      for (int j = 0; j < NCH; j++)
        mem[{waddr, CB'(j)}] <= wdata[j*8 +: 8];
    rdata <= mem[raddr];
  end
endmodule

// dp_ram: simple dual-port RAM, one write port and one synchronous read port.
//
// Models an FPGA block RAM. A write at addr A in a cycle lands at the clock
// edge; a read in the same cycle returns the old contents (read-first).
// rdata is valid one cycle after re_addr is presented. Contents are not
// reset; every word is written before it is read in this design.
//
// Size (64 x 256) follows the scheme; read-first synchronous behaviour is
// this design's choice.
module dp_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule

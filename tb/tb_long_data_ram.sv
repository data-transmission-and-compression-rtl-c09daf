// tb_long_data_ram: writes 256 lines of 8 bytes (64 bits each) and reads the
// 2048 bytes back one at a time at address {line, channel}, in order and at
// random, checking the one-cycle read latency.
//
// The 8 x 8 by 256 write and 8 by 2048 read follow the scheme; the
// {line, channel} address is this design's choice.
module tb_long_data_ram;
  logic clk = 0, we;
  logic [7:0] waddr;
  logic [63:0] wdata;
  logic [10:0] raddr;
  logic [7:0] rdata;
  logic [7:0] ref_mem [2048];
  int checks = 0, failures = 0;

  long_data_ram #(.NCH(8), .LINES(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom};
      for (int j = 0; j < 8; j++) ref_mem[a*8 + j] = wdata[j*8 +: 8];
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 4096; t++) begin
      @(negedge clk) raddr = (t < 2048) ? 11'(t) : 11'($urandom);
      @(posedge clk); #1;
      check(rdata == ref_mem[raddr], "byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

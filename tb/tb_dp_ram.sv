// tb_dp_ram: writes random words to the 64 x 256 fixed RAM, reads them
// back with one cycle of latency and checks read-first behaviour when the
// same address is written and read in one cycle.
//
// The size follows the scheme; the read-first check tests a choice of this
// design.
module tb_dp_ram;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] ref_mem [256];
  int checks = 0, failures = 0;

  dp_ram #(.WIDTH(64), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom}; ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [63:0] exp;
      @(negedge clk);
      raddr = 8'($urandom);
      we = $urandom % 2;
      waddr = ($urandom % 2) ? raddr : 8'($urandom);
      wdata = {$urandom, $urandom};
      exp = ref_mem[raddr];
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk); #1;
      check(rdata == exp, "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

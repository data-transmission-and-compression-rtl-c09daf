// tb_seq_ram1: writes 256 random 128-bit events and reads the 4096 bytes
// back at {event, byte}, byte 0 being the top byte of the written word;
// also a read of an address written in the same cycle (old data).
//
// The 128 x 256 write and byte read follow the scheme.
module tb_seq_ram1;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0;
  logic [127:0] wdata = 0;
  logic [11:0] raddr = 0;
  logic [7:0] rdata;
  logic [127:0] ref_mem [256];
  int checks = 0, failures = 0;

  seq_ram1 #(.EVENTS(256)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 256; e++) begin
      @(negedge clk);
      we = 1; waddr = 8'(e); wdata = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[e] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk) raddr = 12'(a);
      @(posedge clk); #1;
      check(rdata == ref_mem[a / 16][127 - 8*(a % 16) -: 8], "byte");
    end
    @(negedge clk);
    we = 1; waddr = 8'd7; wdata = '1; raddr = 12'h070;
    @(posedge clk); #1;
    check(rdata == ref_mem[7][127:120], "read-first");
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

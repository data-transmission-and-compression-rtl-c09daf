// tb_seq_ram2: fills the 512 x 5-byte packing RAM byte by byte through
// port A in (row, block) order, reads every row through port B, clears
// rows through port B and checks they read back as zero while the others
// keep their bytes.
//
// The 5 x 512 byte layout follows the scheme; the row clear is this
// design's choice.
module tb_seq_ram2;
  logic clk = 0, a_we = 0, b_we = 0;
  logic [8:0] a_row = 0, b_row = 0;
  logic [2:0] a_blk = 0;
  logic [7:0] a_data = 0;
  logic [39:0] b_wdata = 0, b_rdata;
  logic [39:0] ref_mem [512];
  int checks = 0, failures = 0;

  seq_ram2 #(.ROWS(512)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int b = 0; b < 2560; b++) begin
      @(negedge clk);
      a_we = 1; a_row = 9'(b / 5); a_blk = 3'(b % 5); a_data = 8'($urandom);
      ref_mem[b / 5][39 - 8*(b % 5) -: 8] = a_data;
    end
    @(negedge clk) a_we = 0;
    for (int r = 0; r < 512; r++) begin
      @(negedge clk) b_row = 9'(r);
      @(posedge clk); #1;
      check(b_rdata == ref_mem[r], "row");
    end
    for (int r = 0; r < 512; r += 3) begin
      @(negedge clk) b_row = 9'(r); b_we = 1; b_wdata = '0; ref_mem[r] = '0;
    end
    @(negedge clk) b_we = 0;
    for (int r = 0; r < 512; r++) begin
      @(negedge clk) b_row = 9'(r);
      @(posedge clk); #1;
      check(b_rdata == ref_mem[r], "row after clear");
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

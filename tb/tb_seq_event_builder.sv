// tb_seq_event_builder: checks the 16-byte event against a byte-by-byte
// construction from the samples: {00,trigger}, BXID low byte, map, the 40
// short-code bits, then the top byte of each channel (zero when short).
//
// The 16-byte event follows the scheme; the byte order is this design's
// choice.
module tb_seq_event_builder;
  import fe_pkg::*;
  import fe_stim_pkg::*;
  logic [ADC_BITS-1:0] adc [N_CH];
  logic [TRIG_BITS-1:0] trig;
  logic [11:0] bxid;
  logic [127:0] event_data;
  int checks = 0, failures = 0;

  seq_event_builder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [7:0] b[16];
      logic [39:0] sh;
      logic [7:0] mp;
      pattern_e p;
      p = pattern_e'($urandom % 6);
      for (int i = 0; i < 8; i++) adc[i] = sample(p, $urandom % 256, i);
      trig = 6'($urandom);
      bxid = 12'($urandom);
      #1;
      mp = '0; sh = '0;
      for (int i = 0; i < 8; i++) begin
        b[8+i] = 8'h00;
        if (adc[i] >= 240 && adc[i] <= 271) sh[i*5 +: 5] = 5'(adc[i] - 240);
        else begin mp[i] = 1; sh[i*5 +: 5] = {1'b0, adc[i][3:0]}; b[8+i] = adc[i][11:4]; end
      end
      b[0] = {2'b00, trig}; b[1] = bxid[7:0]; b[2] = mp;
      for (int j = 0; j < 5; j++) b[3+j] = sh[39 - 8*j -: 8];
      for (int j = 0; j < 16; j++) check(event_data[127 - 8*j -: 8] == b[j], "event byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

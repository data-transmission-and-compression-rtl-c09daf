// tb_adc_encoder: checks the short/long compression of 8 channels against
// an independent computation, on random values, values near the window and
// the window borders (239, 240, 271, 272) and the ADC range ends.
//
// The split into short code, map bit and long byte follows the scheme;
// the 5-bit window it checks is this design's choice.
module tb_adc_encoder;
  import fe_pkg::*;
  logic [ADC_BITS-1:0] adc [N_CH];
  logic [N_CH*SHORT_BITS-1:0] short_data;
  logic [N_CH-1:0] map;
  logic [N_CH*LONG_BITS-1:0] long_data;
  logic [3:0] n_long;
  int checks = 0, failures = 0, n_short = 0, n_longv = 0;

  adc_encoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int cnt;
      cnt = 0;
      for (int i = 0; i < N_CH; i++) begin
        case ($urandom % 4)
          0: adc[i] = 12'($urandom);
          1: adc[i] = 12'(224 + $urandom % 64);
          2: begin
            int unsigned e[6] = '{239, 240, 271, 272, 0, 4095};
            adc[i] = 12'(e[$urandom % 6]);
          end
          default: adc[i] = 12'(240 + $urandom % 32);
        endcase
      end
      #1;
      for (int i = 0; i < N_CH; i++) begin
        int v;
        bit is_short;
        v = int'(adc[i]);
        is_short = (v >= 240) && (v <= 271);
        check(map[i] == !is_short, "map bit");
        if (is_short) begin
          n_short++;
          check(short_data[i*5 +: 5] == 5'(v - 240), "short code");
          check(long_data[i*8 +: 8] == 8'h00, "long byte zero");
        end else begin
          n_longv++;
          cnt++;
          check(short_data[i*5 +: 5] == 5'(v % 16), "low nibble");
          check(long_data[i*8 +: 8] == 8'(v / 16), "high byte");
        end
      end
      check(int'(n_long) == cnt, "long count");
    end
    check(n_short > 0 && n_longv > 0, "both kinds seen");
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

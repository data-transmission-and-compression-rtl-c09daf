// tb_seq_system: one storage system of the sequential scheme on its own.
// Groups are written at the crossing rate with the system's local cycle
// count supplied as the sequencer would (restarting at each event 0 and
// running modulo 4096); the system is used every fourth group period, as
// in the design. The words of the readout window are compared with
// seq_ref_pkg::seq_model, and each must appear RD_START crossings plus 5
// cycles after its event. Groups: the emptiest possible (the case that
// fixes the readout start), an overflowing one, then a thin one whose tail
// must come out as zeros although the fat group filled those rows.
//
// The zero tail follows the scheme's wish for zeros; clearing on read
// and RD_START are this design's choices.
module tb_seq_system;
  import fe_pkg::*;
  import seq_pkg::*;
  import fe_stim_pkg::*;
  import seq_ref_pkg::*;

  logic clk = 0, rst = 1, we = 0, start = 0;
  logic [7:0] waddr = 0;
  logic [127:0] wdata = 0;
  logic [11:0] local_cycle = 0;
  logic [79:0] rd_word;
  logic rd_valid, reading, overflow;
  logic [11:0] nbytes;

  seq_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, words = 0, n_ovf = 0;
  seq_model sm = new();
  int push_c[$];
  pattern_e pats[3] = '{P_PED, P_FLOOD, P_QUIET};
  localparam int LAT = SUB * RD_START + 5;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (!rst) local_cycle <= (start) ? 12'd1 : local_cycle + 1'b1;

  always @(negedge clk) if (!rst) begin
    if (overflow) n_ovf++;
    if (rd_valid) begin
      check(sm.expected.size() > 0, "word expected");
      if (sm.expected.size() > 0) begin
        check(rd_word == sm.expected.pop_front(), "word");
        check(cycle - push_c.pop_front() == LAT, "latency");
        words++;
      end
    end
  end

  // event bytes in the order seq_event_builder lays them out
  function automatic logic [127:0] make_event(logic [11:0] a[8], logic [5:0] t, logic [11:0] bx);
    logic [127:0] ev;
    logic [7:0] mp;
    logic [39:0] sh;
    mp = '0; sh = '0;
    for (int i = 0; i < 8; i++) begin
      ev[63 - 8*i -: 8] = 8'h00;
      if (a[i] >= 240 && a[i] < 272) sh[i*5 +: 5] = 5'(a[i] - 240);
      else begin mp[i] = 1; sh[i*5 +: 5] = {1'b0, a[i][3:0]}; ev[63 - 8*i -: 8] = a[i][11:4]; end
    end
    ev[127:64] = {2'b00, t, bx[7:0], mp, sh};
    return ev;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (600) @(negedge clk);        // let the power-up clear finish
    for (int g = 0; g < 3; g++) begin
      for (int e = 0; e < 256; e++) begin
        logic [11:0] a[8];
        logic [5:0] t;
        logic [11:0] bx;
        for (int i = 0; i < 8; i++) a[i] = sample(pats[g], e, i);
        t = 6'($urandom);
        bx = 12'($urandom);
        sm.push(a, t, bx);
        @(negedge clk);
        we = 1; waddr = 8'(e); wdata = make_event(a, t, bx); start = (e == 0);
        push_c.push_back(cycle - 1);
        @(negedge clk);
        we = 0; start = 0;
        repeat (2) @(negedge clk);
      end
      // the other three systems' turns
      repeat (3 * 256 * 4) @(negedge clk);
    end
    repeat (1200) @(negedge clk);
    check(words == 3 * 256, "all words");
    check(n_ovf > 0, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

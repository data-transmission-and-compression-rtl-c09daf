// seq_ref_pkg: reference model of the sequential link, for the testbenches.
//
// seq_model is fed the inputs of every crossing and predicts the link
// words: per event the fixed bytes {00,trigger}, BXID[7:0], map and the 40
// short-code bits (channel 7 first), then the top byte of each long channel
// in channel order; per group of 256 events the bytes are cut at 2560,
// zero-padded and sent 10 per word, first byte in the top bits.
//
// Packing and readout follow the scheme; the byte order inside an event
// and the map-based skip are the same choices the RTL makes.
package seq_ref_pkg;
  class seq_model;
    logic [7:0]  bytes[$];
    logic [79:0] expected[$];
    int unsigned n_events, n_skipped, n_ovf_groups, n_long;

    function new();
      n_events = 0; n_skipped = 0; n_ovf_groups = 0; n_long = 0;
    endfunction

    function void push(logic [11:0] adc[8], logic [5:0] trig, logic [11:0] bxid);
      logic [7:0]  mp;
      logic [39:0] sh;
      mp = '0; sh = '0;
      for (int i = 0; i < 8; i++)
        if (adc[i] >= 240 && adc[i] < 272) sh[i*5 +: 5] = 5'(adc[i] - 240);
        else begin mp[i] = 1; sh[i*5 +: 5] = {1'b0, adc[i][3:0]}; end
      bytes.push_back({2'b00, trig});
      bytes.push_back(bxid[7:0]);
      bytes.push_back(mp);
      for (int j = 0; j < 5; j++) bytes.push_back(sh[39 - 8*j -: 8]);
      for (int i = 0; i < 8; i++)
        if (mp[i]) begin bytes.push_back(adc[i][11:4]); n_long++; end
        else n_skipped++;
      n_events++;
      if (n_events % 256 == 0) begin
        if (bytes.size() > 2560) n_ovf_groups++;
        while (bytes.size() > 2560) void'(bytes.pop_back());
        while (bytes.size() < 2560) bytes.push_back(8'h00);
        for (int k = 0; k < 256; k++) begin
          logic [79:0] w;
          for (int j = 0; j < 10; j++) w[79 - 8*j -: 8] = bytes[10*k + j];
          expected.push_back(w);
        end
        bytes.delete();
      end
    endfunction
  endclass
endpackage

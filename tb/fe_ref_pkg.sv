// fe_ref_pkg: reference model of the fixed format link, for the testbenches.
//
// link_model is fed the inputs of every crossing and predicts the 80-bit
// words of the link, written from the format description alone (no RTL is
// reused): short window [240, 272), long = {byte = adc[11:4], short = adc[3:0]},
// 512 long bytes per 256-line group, a line that does not fit whole sets
// data quality for the rest of the group, long bytes are sent two per line
// in line/channel order, the address is sent MSB first one bit per line.
// decode() rebuilds the ADC values of a group from its 256 words.
//
// The format rules follow the scheme; the window, field order and address
// order are the same choices the RTL makes.
package fe_ref_pkg;
  import fe_pkg::*;

  class link_model;
    int unsigned     nlines;
    int unsigned     maxlong;
    logic [10:0]     addr;
    fixed_word_t     fixed[$];
    logic [7:0]      longs[$];
    int unsigned     total;
    bit              ovf;
    gbt_word_t       expected[$];
    int unsigned     n_ovf_lines, n_spill, n_zero_slots, n_long;

    function new(int unsigned nl, int unsigned ml, logic [10:0] a);
      nlines = nl; maxlong = ml; addr = a;
      total = 0; ovf = 0;
      n_ovf_lines = 0; n_spill = 0; n_zero_slots = 0; n_long = 0;
    endfunction

    function void push(logic [11:0] adc[8], logic [5:0] trig, logic [11:0] bxid);
      fixed_word_t f;
      int unsigned k, n;
      logic [7:0] lb[8];
      k = fixed.size();
      if (k == 0) begin total = 0; ovf = 0; end
      f = '0;
      n = 0;
      for (int i = 0; i < 8; i++) begin
        if (adc[i] >= 240 && adc[i] < 272) begin
          f.short_data[i*5 +: 5] = 5'(adc[i] - 240);
        end else begin
          f.map[i] = 1'b1;
          f.short_data[i*5 +: 5] = {1'b0, adc[i][3:0]};
          lb[n] = adc[i][11:4];
          n++;
        end
      end
      f.addr_bit = addr[10 - (k % 11)];
      f.trig = trig;
      f.bxid = bxid[7:0];
      if (ovf || total + n > maxlong) begin
        ovf = 1;
        n_ovf_lines++;
      end else begin
        for (int j = 0; j < n; j++) longs.push_back(lb[j]);
        total += n;
        n_long += n;
      end
      f.dq = ovf;
      fixed.push_back(f);
      if (fixed.size() == nlines) finish_group();
    endfunction

    function void finish_group();
      int unsigned owner[$];
      // line that produced each long byte, to count late (spilled) bytes
      for (int k = 0; k < nlines; k++)
        if (!fixed[k].dq)
          for (int i = 0; i < 8; i++) if (fixed[k].map[i]) owner.push_back(k);
      for (int k = 0; k < nlines; k++) begin
        gbt_word_t w;
        w.fixed = fixed[k];
        w.long0 = (2*k   < longs.size()) ? longs[2*k]   : 8'h00;
        w.long1 = (2*k+1 < longs.size()) ? longs[2*k+1] : 8'h00;
        if (2*k >= longs.size()) n_zero_slots++;
        if (2*k+1 >= longs.size()) n_zero_slots++;
        if (2*k < owner.size() && owner[2*k] < k) n_spill++;
        expected.push_back(w);
      end
      fixed.delete();
      longs.delete();
    endfunction
  endclass

  // Rebuild the ADC values of one group from its link words. Lines with
  // data quality set get -1 for their long channels (their bytes were dropped).
  function automatic void decode(input gbt_word_t w[], output int adc[][8]);
    logic [7:0] stream[$];
    int         pos;
    adc = new[w.size()];
    for (int k = 0; k < w.size(); k++) begin
      stream.push_back(w[k].long0);
      stream.push_back(w[k].long1);
    end
    pos = 0;
    for (int k = 0; k < w.size(); k++)
      for (int i = 0; i < 8; i++) begin
        logic [4:0] s;
        s = w[k].fixed.short_data[i*5 +: 5];
        if (!w[k].fixed.map[i]) adc[k][i] = 240 + int'(s);
        else if (w[k].fixed.dq) adc[k][i] = -1;
        else begin
          adc[k][i] = int'({stream[pos], s[3:0]});
          pos++;
        end
      end
  endfunction
endpackage

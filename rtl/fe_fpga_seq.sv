// fe_fpga_seq: one front-end FPGA (8 channels) driving one GBT link with
// the sequential scheme.
//
// Every crossing the 8 samples become a 16-byte event (seq_event_builder).
// Groups of 256 events go in turn to four systems (seq_system): group g to
// system g mod 4. Each system packs its group, dropping the long bytes of
// short channels, and sends it as 256 words of 10 bytes, starting RD_START
// (824) crossings after the group's first event; the four readout windows
// follow each other without gap, so the link carries one word per crossing
// once the first group is out. A group with more than 2560 bytes loses its
// last bytes and sets overflow for that system.
//
// Clocking: a single 160 MHz clock, four cycles per crossing. bx_strobe
// marks the cycle on which the inputs of a crossing are taken; the event is
// written into RAM1 on the next cycle. gbt_valid pulses once per crossing
// with a new gbt_word (first byte in bits [79:72]).
//
// Four systems in rotation, the 160 MHz copy and 10 bytes per crossing
// follow the scheme; the single clock, the sequencer counter and the readout
// start are this design's choices.
module fe_fpga_seq
  import fe_pkg::*;
  import seq_pkg::*;
#(
  parameter int unsigned NEV = EVENTS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ADC_BITS-1:0]  adc [N_CH],
  input  logic [TRIG_BITS-1:0] trig,
  input  logic [11:0]          bxid,
  output logic                 bx_strobe,
  output logic [79:0]          gbt_word,
  output logic                 gbt_valid,
  output logic [NSYS-1:0]      overflow
);
  localparam int unsigned EW = $clog2(NEV);
  localparam int unsigned CW = $clog2(NEV * NSYS * SUB);   // one full rotation
  localparam int unsigned LW = $clog2(NEV * 16);           // one system period

  logic [CW-1:0]   gc;            // cycle within the 4-system rotation
  logic [127:0]    ev;
  logic            ev_we;
  logic [EW-1:0]   ev_addr;
  logic [1:0]      ev_sys;

  seq_event_builder u_evb (.adc, .trig, .bxid, .event_data(ev));

  assign bx_strobe = (gc[1:0] == 2'd0);

  logic [127:0] ev_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      gc      <= '0;
      ev_we   <= 1'b0;
      ev_addr <= '0;
      ev_sys  <= '0;
      ev_q    <= '0;
    end else begin
      gc    <= gc + 1'b1;
      ev_we <= bx_strobe;
      if (bx_strobe) begin
        ev_q    <= ev;
        ev_addr <= gc[EW+1:2];
        ev_sys  <= gc[CW-1 -: 2];
      end
    end
  end

  logic [79:0] w   [NSYS];
  logic        v   [NSYS];
  logic        rdg [NSYS];

  for (genvar s = 0; s < NSYS; s++) begin : g_sys
    logic           sel;
    logic [LW-1:0]  loc;
    logic [$clog2(ROWS*5+1)-1:0] nb;
    assign sel = ev_we && (ev_sys == 2'(s));
    // cycles since this system's event 0 write (at gc = s*NEV*4 + 1)
    assign loc = LW'(gc - CW'(s * NEV * SUB + 1));
    seq_system #(.NEV(NEV)) u_sys (
      .clk, .rst, .we(sel), .waddr(ev_addr), .wdata(ev_q),
      .start(sel && ev_addr == '0), .local_cycle(loc),
      .rd_word(w[s]), .rd_valid(v[s]), .reading(rdg[s]),
      .nbytes(nb), .overflow(overflow[s])
    );
  end

  always_comb begin
    gbt_word  = '0;
    gbt_valid = 1'b0;
    for (int s = 0; s < NSYS; s++)
      if (v[s]) begin
        gbt_word  = w[s];
        gbt_valid = 1'b1;
      end
  end

  a_one_reader: assert property (@(posedge clk) disable iff (rst)
    $onehot0({rdg[3], rdg[2], rdg[1], rdg[0]}));
endmodule

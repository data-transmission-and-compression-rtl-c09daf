// adc_encoder: short/long compression of the ADC samples of one crossing.
//
// Most calorimeter samples sit close to the pedestal (about 256 counts), so
// a sample inside the window [SHORT_BASE, SHORT_BASE + 2**SHORT_BITS) is sent
// as a short code, its offset from SHORT_BASE. Any other sample is "long":
// its map bit is set, the short field carries its low ADC_BITS-8 bits and a
// separate long byte carries its top 8 bits, so the receiver rebuilds
//   value = map ? {long, short[ADC_BITS-9:0]} : short + SHORT_BASE.
// The window idea (subtract a base, keep a few bits, else keep all 12 bits)
// and the 8-bit map come from the scheme; the 5-bit window starting at 240
// and the split of a long value into low nibble plus high byte are this
// design's choices. Long bytes of short channels are zero.
//
// Purely combinational. n_long counts the set map bits.
module adc_encoder
  import fe_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned SBITS = SHORT_BITS,
  parameter int unsigned SBASE = SHORT_BASE
) (
  input  logic [ADC_BITS-1:0]       adc        [NCH],
  output logic [NCH*SBITS-1:0]      short_data,
  output logic [NCH-1:0]            map,
  output logic [NCH*LONG_BITS-1:0]  long_data,
  output logic [$clog2(NCH+1)-1:0]  n_long
);
  localparam int unsigned LOW_BITS = ADC_BITS - LONG_BITS;  // 4
  localparam logic [ADC_BITS:0] LO = (ADC_BITS+1)'(SBASE);
  localparam logic [ADC_BITS:0] HI = (ADC_BITS+1)'(SBASE + (1 << SBITS));

  always_comb begin
    short_data = '0;
    map        = '0;
    long_data  = '0;
    n_long     = '0;
    for (int i = 0; i < NCH; i++) begin
      logic [ADC_BITS:0] v;
      v = {1'b0, adc[i]};
      if (v >= LO && v < HI) begin
        short_data[i*SBITS +: SBITS] = SBITS'(v - LO);
      end else begin
        map[i]                             = 1'b1;
        short_data[i*SBITS +: SBITS]       = SBITS'(adc[i][LOW_BITS-1:0]);
        long_data[i*LONG_BITS +: LONG_BITS] = adc[i][ADC_BITS-1 -: LONG_BITS];
        n_long                             = n_long + 1'b1;
      end
    end
  end
endmodule

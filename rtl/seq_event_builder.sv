// seq_event_builder: forms the 16-byte event of one crossing for the
// sequential scheme.
//
// The 8 ADC samples are compressed by adc_encoder (short code inside the
// pedestal window, otherwise a map bit, the low nibble in the short field
// and the top 8 bits as a long byte). Byte j of the event sits at bits
// [127-8j -: 8]:
//   byte 0      {2'b00, trigger[5:0]}
//   byte 1      BXID[7:0]
//   byte 2      map (bit i = channel i is long)
//   bytes 3..7  the 40 short-code bits, channel 7 first
//   bytes 8..15 long byte of channel 0..7 (zero for short channels)
// The split into 8 fixed and 8 long bytes follows the scheme; the order of
// the fixed fields is this design's choice. Combinational.
module seq_event_builder
  import fe_pkg::*;
(
  input  logic [ADC_BITS-1:0]  adc [N_CH],
  input  logic [TRIG_BITS-1:0] trig,
  input  logic [11:0]          bxid,
  output logic [127:0]         event_data
);
  logic [N_CH*SHORT_BITS-1:0]     short_data;
  logic [N_CH-1:0]                map;
  logic [N_CH*LONG_BITS-1:0]      long_data;
  logic [$clog2(N_CH+1)-1:0]      n_long;

  adc_encoder u_enc (.adc, .short_data, .map, .long_data, .n_long);

  always_comb begin
    event_data[127:64] = {2'b00, trig, bxid[7:0], map, short_data};
    for (int i = 0; i < N_CH; i++)
      event_data[63 - 8*i -: 8] = long_data[i*8 +: 8];
  end
endmodule

// fe_pkg: shared constants and word layouts of the front-end to GBT link.
//
// One front-end FPGA digitises 8 calorimeter channels (12-bit ADC) and owns
// one GBT optical link that carries 80 bits every bunch crossing (25 ns).
// In the fixed format scheme every crossing produces one 80-bit "line":
//
//   [79]    address bit  : one bit of the FPGA/card/crate address, the
//                          address being sent serially, one bit per line
//   [78]    data quality : 1 once the long-data budget of the group overflowed
//   [77:72] trigger      : 6-bit slice of the trigger result
//   [71:64] BXID         : low 8 bits of the bunch crossing identifier
//   [63:24] short data   : 8 x 5-bit short ADC codes, channel 0 in the LSBs
//   [23:16] map          : bit i set when channel i carries a long value
//   [15:0]  long data    : two long ADC bytes, taken in order from a pointer
//                          FIFO, so they may belong to an earlier line
//
// The field order and widths follow the example table of the scheme; the
// channel order inside the short field, the 5-bit short window and the
// address width are this design's choices.
package fe_pkg;

  localparam int unsigned N_CH       = 8;    // channels per FPGA (one fiber each)
  localparam int unsigned ADC_BITS   = 12;   // ADC resolution
  localparam int unsigned SHORT_BITS = 5;    // short code width (4 or 5 in the scheme)
  localparam int unsigned SHORT_BASE = 240;  // lowest ADC value coded short
  localparam int unsigned LONG_BITS  = 8;    // long byte = ADC bits [11:4]
  localparam int unsigned LINES      = 256;  // lines per group (RAM depth)
  localparam int unsigned MAX_LONG   = 512;  // long bytes one group can carry
  localparam int unsigned TRIG_BITS  = 6;
  localparam int unsigned BXID_BITS  = 8;
  localparam int unsigned ADDR_BITS  = 11;   // crate(5) card(4) fpga(2)
  localparam int unsigned GBT_BITS   = 80;

  typedef struct packed {
    logic                          addr_bit;
    logic                          dq;
    logic [TRIG_BITS-1:0]          trig;
    logic [BXID_BITS-1:0]          bxid;
    logic [N_CH*SHORT_BITS-1:0]    short_data;
    logic [N_CH-1:0]               map;
  } fixed_word_t;                  // 64 bits

  typedef struct packed {
    fixed_word_t                   fixed;
    logic [LONG_BITS-1:0]          long0;
    logic [LONG_BITS-1:0]          long1;
  } gbt_word_t;                    // 80 bits

endpackage

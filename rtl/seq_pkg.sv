// seq_pkg: constants of the sequential (byte-packed) link scheme.
//
// In this scheme every crossing produces a 16-byte event: 8 fixed bytes
// (trigger, BXID, map, 8 x 5-bit short codes) followed by the 8 long bytes,
// one per channel. Events are stored 256 at a time, then copied byte by
// byte into a packing RAM, leaving out the long bytes of channels that are
// short, and the packed bytes are sent 10 per crossing on the link. Four
// storage systems work in turn so that each has 4 x 256 crossings
// (25.6 us) to do the copy at 160 MHz.
//
// Sizes (16-byte events, 256 events, 4 systems, RAM2 of 5 x 512 bytes,
// 10 bytes per crossing) follow the scheme; RD_START = 824 crossings is this
// design's choice inside the scheme's 20-21 us.
package seq_pkg;
  localparam int unsigned EV_BYTES   = 16;     // bytes per event
  localparam int unsigned FIX_BYTES  = 8;      // fixed bytes, always sent
  localparam int unsigned EVENTS     = 256;    // events per group
  localparam int unsigned NSYS       = 4;      // systems working in turn
  localparam int unsigned SUB        = 4;      // 160 MHz cycles per crossing
  localparam int unsigned ROW_BYTES  = 5;      // packing RAM: 5 byte blocks
  localparam int unsigned ROWS       = 512;    // packing RAM depth
  localparam int unsigned LINK_BYTES = 10;     // link bytes per crossing
  // readout start, in crossings after the first event of a group: the
  // packed data of the emptiest group (8 bytes per event, 2 bytes per
  // crossing) must stay ahead of a reader taking 10 bytes per crossing,
  // 256 x 8 x (1/2 - 1/10) = 819.2, plus a small pipeline margin
  localparam int unsigned RD_START   = 824;
endpackage

// fe_card_top: a 32-channel calorimeter front-end card sending its data on
// four GBT links, one per front-end FPGA of 8 channels, in either of the
// two compression schemes.
//
// The two schemes are alternatives for the same card and stand side by
// side here, each with its own clock, reset and inputs:
//   - fixed format (fix_* ports, 80 MHz clock): fe_fpga_fixed per FPGA.
//     The four FPGAs share the crossing identifier and card/crate address;
//     the 11-bit address each one sends serially is {crate(5), card(4),
//     fpga(2)}. All links keep the same 256-crossing group timing, so their
//     words stay aligned crossing by crossing.
//   - sequential (seq_* ports, 160 MHz clock): fe_fpga_seq per FPGA.
// Each FPGA gets its own 6-bit slice of the card's trigger result. Ports
// are arrays indexed by FPGA number; the link words are the 80-bit payloads
// handed to the GBT serialisers, one per crossing when *_gbt_valid pulses.
//
// Four FPGAs with one link each follow the scheme; building both schemes
// into one top and the address layout are this design's choices.
module fe_card_top
  import fe_pkg::*;
#(
  parameter int unsigned NFPGA = 4
) (
  // fixed format scheme
  input  logic                 fix_clk,
  input  logic                 fix_rst,
  input  logic [4:0]           crate_addr,
  input  logic [3:0]           card_addr,
  input  logic [ADC_BITS-1:0]  fix_adc  [NFPGA][N_CH],
  input  logic [TRIG_BITS-1:0] fix_trig [NFPGA],
  input  logic [11:0]          fix_bxid,
  output logic                 fix_bx_strobe,
  output gbt_word_t            fix_gbt_word  [NFPGA],
  output logic                 fix_gbt_valid [NFPGA],
  output logic                 fix_overflow  [NFPGA],
  output logic                 fix_starve    [NFPGA],
  // sequential scheme
  input  logic                 seq_clk,
  input  logic                 seq_rst,
  input  logic [ADC_BITS-1:0]  seq_adc  [NFPGA][N_CH],
  input  logic [TRIG_BITS-1:0] seq_trig [NFPGA],
  input  logic [11:0]          seq_bxid,
  output logic                 seq_bx_strobe,
  output logic [79:0]          seq_gbt_word  [NFPGA],
  output logic                 seq_gbt_valid [NFPGA],
  output logic [3:0]           seq_overflow  [NFPGA]
);
  logic fstrobe [NFPGA];
  logic sstrobe [NFPGA];

  for (genvar f = 0; f < NFPGA; f++) begin : g_fpga
    fe_fpga_fixed u_fix (
      .clk(fix_clk), .rst(fix_rst),
      .fpga_addr({crate_addr, card_addr, 2'(f)}),
      .adc(fix_adc[f]), .trig(fix_trig[f]), .bxid(fix_bxid),
      .bx_strobe(fstrobe[f]),
      .gbt_word(fix_gbt_word[f]), .gbt_valid(fix_gbt_valid[f]),
      .overflow(fix_overflow[f]), .starve(fix_starve[f])
    );
    fe_fpga_seq u_seq (
      .clk(seq_clk), .rst(seq_rst),
      .adc(seq_adc[f]), .trig(seq_trig[f]), .bxid(seq_bxid),
      .bx_strobe(sstrobe[f]),
      .gbt_word(seq_gbt_word[f]), .gbt_valid(seq_gbt_valid[f]),
      .overflow(seq_overflow[f])
    );
  end

  assign fix_bx_strobe = fstrobe[0];
  assign seq_bx_strobe = sstrobe[0];
endmodule

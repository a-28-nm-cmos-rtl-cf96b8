`timescale 1ps/1fs
// Digital part of one pixel: Vernier TDC, its two oscillators, their
// calibration and the serial link to the periphery.
//
// DCO_0 runs with fixed codes (coarse 0, fine 0). DCO_1's fine code comes
// from `dco_calib`, which takes over the TDC while it runs (hits are then
// ignored); otherwise each finished TDC word goes to `pixel_ser` and leaves
// on `tdc_o`/`dv_o`. `disc` is the discriminator output of the analog
// front end. Grouping these parts in one pixel follows the document's
// pixel description; the fixed DCO_0 codes are this design's choice.
module tdc_pixel
  import tsp_pkg::*;
#(
  parameter int DEAD_CYCLES = 48
) (
  input  logic        clk160,
  input  logic        clk40,
  input  logic        rst_n,
  input  logic        disc,
  input  logic        cal_start,
  input  res_regime_t regime,
  output logic        cal_done,
  output logic        busy,
  output logic        tdc_o,
  output logic        dv_o
);
  logic      dco0_clk, dco1_clk, dco0_en, dco1_en;
  logic      cal_mode, cal_trig, cal_ack, ser_ack, valid;
  logic [4:0] fine1;
  tdc_word_t word;

  dco u_dco0 (.en(dco0_en), .coarse(2'd0), .fine(5'd0), .clk(dco0_clk));
  dco u_dco1 (.en(dco1_en), .coarse(2'd0), .fine(fine1), .clk(dco1_clk));

  vernier_tdc #(.DEAD_CYCLES(DEAD_CYCLES)) u_tdc (
    .clk160, .clk40, .rst_n, .disc,
    .cal_mode, .cal_trig,
    .dco0_clk, .dco1_clk, .dco0_en, .dco1_en,
    .word, .valid, .ack(cal_mode ? cal_ack : ser_ack), .busy
  );

  dco_calib u_cal (
    .clk160, .rst_n, .start(cal_start), .regime,
    .tdc_busy(busy), .tdc_valid(valid), .tdc_fine(word.fine),
    .cal_mode, .cal_trig, .tdc_ack(cal_ack), .fine1, .done(cal_done)
  );

  pixel_ser u_ser (
    .clk160, .rst_n, .word(word), .valid(valid && !cal_mode),
    .ack(ser_ack), .tdc_o, .dv_o
  );
endmodule

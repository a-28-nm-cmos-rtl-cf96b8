`timescale 1ps/1fs
// Digital part of the 32x32-pixel timing read-out chip.
//
// N_ROT groups (4) of N_PIX pixels (256). Every pixel has a Vernier TDC
// with two oscillators, measuring the arrival time of its discriminator
// edge against the 40 MHz clock and its time over threshold; the word goes
// over a 160 MHz serial link to the bottom of the matrix, where each group
// has caches, a read-out tree, two FIFOs, two framers and two DDR
// serializers (2 x 1280 Mbit/s per group, 10.24 Gbit/s in all).
// Clocks come from the 640 MHz input; the bunch-crossing counter gives the
// 9-bit timestamp; an I2C slave holds the configuration; four sigma-delta
// modulators drive the reference DACs.
// Ports: `disc` are the discriminator outputs of the analog front ends,
// pixel p of group g at index g*N_PIX+p; `sdo` are the serial lines to the
// LVDS drivers, link k of group g at index 2g+k; `dac_bits` the modulator
// streams for the DAC filters; `sda_oe` pulls SDA low. Analog front end,
// PLL, LVDS drivers and DAC filters are outside this RTL.
module timespot1_top
  import tsp_pkg::*;
#(
  parameter int N_ROT = 4,
  parameter int N_PIX = 256
) (
  input  logic                   clk640,
  input  logic                   rst_n,
  input  logic [N_ROT*N_PIX-1:0] disc,
  input  logic                   scl,
  input  logic                   sda_i,
  output logic                   sda_oe,
  output logic [2*N_ROT-1:0]     sdo,
  output logic [3:0]             dac_bits,
  output logic                   cal_done,
  output logic [N_ROT-1:0][15:0] hit_lost,
  output logic [N_ROT-1:0]       tree_stall
);
  logic clk160, clk40, ser_load;
  logic [TS_W-1:0] ts;
  cfg_t cfg;

  clk_gen    u_clk (.clk640, .rst_n, .clk160, .clk40, .ser_load);
  bx_counter u_bx  (.clk40, .rst_n, .ts);
  i2c_cfg    u_i2c (.clk160, .rst_n, .scl, .sda_i, .sda_oe, .cfg);

  for (genvar k = 0; k < 4; k++) begin : g_dac
    sd_dac_mod #(.W(8)) u_dac (.clk(clk40), .rst_n, .code(cfg.dac_code[k]), .bit_o(dac_bits[k]));
  end

  logic [N_ROT*N_PIX-1:0] pix_tdc, pix_dv, pix_cal_done;

  for (genvar i = 0; i < N_ROT*N_PIX; i++) begin : g_pix
    tdc_pixel u_pix (
      .clk160, .clk40, .rst_n, .disc(disc[i]),
      .cal_start(cfg.cal_start), .regime(cfg.regime),
      .cal_done(pix_cal_done[i]), .busy(),
      .tdc_o(pix_tdc[i]), .dv_o(pix_dv[i])
    );
  end
  assign cal_done = &pix_cal_done;

  for (genvar g = 0; g < N_ROT; g++) begin : g_rot
    rot_block #(.N_PIX(N_PIX)) u_rot (
      .clk160, .clk640, .ser_load, .rst_n, .ts,
      .header(cfg.header), .idle(cfg.idle),
      .tdc_i(pix_tdc[g*N_PIX +: N_PIX]), .dv_i(pix_dv[g*N_PIX +: N_PIX]),
      .sdo(sdo[2*g +: 2]), .lost_cnt(hit_lost[g]), .stall(tree_stall[g])
    );
  end
endmodule

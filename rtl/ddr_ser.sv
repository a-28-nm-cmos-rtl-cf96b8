`timescale 1ps/1fs
// Byte serializer with double-data-rate output, feeding an LVDS driver.
//
// Runs on the 640 MHz clock. On a clock edge with `load` high (once every
// four cycles, at a phase where the 160 MHz byte is stable) it takes
// `byte_i`; in each of the following four cycles it sends two bits, the
// higher one while clk640 is high and the lower one while it is low, MSB
// first. Eight bits per 160 MHz byte give 1280 Mbit/s. The output is a
// clock-selected multiplexer, as in an output DDR cell, so `sdo` changes
// on both clock edges. Rate and DDR follow the document; bit order is this
// design's choice.
module ddr_ser (
  input  logic       clk640,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] byte_i,
  output logic       sdo
);
  logic [7:0] sh;

  always_ff @(posedge clk640 or negedge rst_n)
    if (!rst_n)    sh <= '0;
    else if (load) sh <= byte_i;
    else           sh <= sh << 2;

  assign sdo = clk640 ? sh[7] : sh[6];
endmodule

`timescale 1ps/1fs
// Global timestamp: counts 40 MHz bunch crossings modulo 2**TS_W (9 bits,
// 12.8 us period). The width and the bunch-crossing meaning follow the
// document; wrap-around and reset to zero are this design's choices.
module bx_counter
  import tsp_pkg::*;
(
  input  logic            clk40,
  input  logic            rst_n,
  output logic [TS_W-1:0] ts
);
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) ts <= '0;
    else        ts <= ts + 1'b1;
endmodule

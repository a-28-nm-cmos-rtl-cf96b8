`timescale 1ps/1fs
// Clock generation from the 640 MHz clock: a 4-bit counter gives the
// 160 MHz read-out clock (inverted bit 1) and the 40 MHz master clock (bit 3), both
// with 50 % duty cycle and rising together every 16 cycles. `ser_load` is
// high for the 640 MHz cycle before the falling edge of clk160, when the
// byte launched on the rising edge of clk160 is stable, and tells the
// serializers when to take it. The 640/160/40 MHz frequencies follow the
// document; the PLL that makes the 640 MHz clock is not part of this RTL.
module clk_gen (
  input  logic clk640,
  input  logic rst_n,
  output logic clk160,
  output logic clk40,
  output logic ser_load
);
  logic [3:0] cnt;

  always_ff @(posedge clk640 or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  assign clk160   = ~cnt[1];
  assign clk40    = cnt[3];
  assign ser_load = (cnt[1:0] == 2'b01);
endmodule

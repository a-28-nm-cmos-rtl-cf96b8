`timescale 1ps/1fs
// Digital modulator of a sigma-delta DAC for the front-end reference
// voltages. First order: a W-bit accumulator adds `code` every clock and
// its carry is the output bit, so the density of ones in `bit_o` is
// code / 2**W and the pattern repeats every 2**W cycles (exactly `code`
// ones in any 2**W consecutive cycles). The analog low-pass filter that
// turns the bit stream into a voltage is outside this RTL. That the DACs
// are sigma-delta follows the document; order, width and clock are this
// design's choices.
module sd_dac_mod #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] code,
  output logic         bit_o
);
  logic [W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0; bit_o <= 1'b0;
    end else begin
      {bit_o, acc} <= {1'b0, acc} + {1'b0, code};
    end
endmodule

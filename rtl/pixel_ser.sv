`timescale 1ps/1fs
// In-pixel serializer: sends the 23-bit TDC word of a hit to the periphery
// over one data line at 160 MHz.
//
// When the TDC offers a word (`valid`), it is loaded in one cycle (`ack`
// high for that cycle) and shifted out MSB first on `tdc_o` during the
// next 23 cycles, with `dv_o` high on exactly those cycles. A new word can
// be taken in the cycle after the last bit, so two words are always
// separated by at least one cycle with `dv_o` low. The 23 bits and the
// 160 MHz rate follow the document; bit order and strobe are this design's.
module pixel_ser
  import tsp_pkg::*;
(
  input  logic             clk160,
  input  logic             rst_n,
  input  logic [TDC_W-1:0] word,
  input  logic             valid,
  output logic             ack,
  output logic             tdc_o,
  output logic             dv_o
);
  logic [TDC_W-1:0] sr;
  logic [4:0]       left;

  assign ack = valid && (left == '0) && !dv_o;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      sr <= '0; left <= '0; dv_o <= 1'b0; tdc_o <= 1'b0;
    end else if (ack) begin
      sr    <= word << 1;
      tdc_o <= word[TDC_W-1];
      dv_o  <= 1'b1;
      left  <= 5'(TDC_W - 1);
    end else if (left != '0) begin
      tdc_o <= sr[TDC_W-1];
      sr    <= sr << 1;
      left  <= left - 1'b1;
    end else begin
      dv_o  <= 1'b0;
      tdc_o <= 1'b0;
    end
endmodule

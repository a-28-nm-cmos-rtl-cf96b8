`timescale 1ps/1fs
// Output framer: turns 40-bit FIFO words into a byte stream, one byte per
// 160 MHz cycle.
//
// With a word waiting in the FIFO, the framer sends the `header` byte
// (taking the word from the FIFO in that cycle) and then the word in five
// bytes, most significant first. With the FIFO empty at a word boundary
// it sends the `idle` byte. A word therefore costs six byte slots: at
// 1280 Mbit/s one link carries up to 26.7 million hits per second.
// `byte_o` is registered. The header/five-bytes/idle format and the
// programmable header and idle bytes follow the document; the byte order
// is this design's choice.
module protocol_enc
  import tsp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        header,
  input  logic [7:0]        idle,
  input  logic              fifo_empty,
  input  logic [WORD_W-1:0] fifo_data,
  output logic              fifo_rd,
  output logic [7:0]        byte_o
);
  logic [WORD_W-1:0] word_q;
  logic [2:0]        slot;   // 0: boundary, 1..5: data byte slot-1 next

  assign fifo_rd = (slot == '0) && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      word_q <= '0; slot <= '0; byte_o <= '0;
    end else if (slot == '0) begin
      if (!fifo_empty) begin
        byte_o <= header;
        word_q <= fifo_data;
        slot   <= 3'd1;
      end else begin
        byte_o <= idle;
      end
    end else begin
      byte_o <= word_q[WORD_W-1 -: 8];
      word_q <= word_q << 8;
      slot   <= (slot == 3'd5) ? '0 : slot + 1'b1;
    end
endmodule

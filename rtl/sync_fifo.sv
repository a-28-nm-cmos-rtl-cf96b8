`timescale 1ps/1fs
// Single-clock FIFO, DEPTH words of W bits (32 x 40 by default).
//
// Show-ahead read: `rd_data` is the oldest word whenever `empty` is low,
// and `rd_en` removes it. A write when `full` is high, or a read when
// `empty` is high, is ignored. Read and write in the same cycle are
// allowed. Storage is a plain array (one memory). Depth and width follow
// the document; the show-ahead read is this design's choice.
module sync_fifo #(
  parameter int DEPTH = 32,
  parameter int W     = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk)
    if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) full |-> !do_wr;
  endproperty
  assert property (p_no_overflow);
endmodule

`timescale 1ps/1fs
// One node of the read-out tree: a two-input merge with one register stage.
//
// Each input and the output is a valid/ready stream carrying a hit and an
// 8-bit address field. When the output register is empty or being read,
// the node takes one input: the only valid one, or, if both wait, the one
// not taken last time (round robin). If BIT >= 0 the node writes the input
// it took (0 = a, 1 = b) into address bit BIT, building the pixel address
// on the way to the root; BIT = -1 (the cache-0/cache-1 merge) adds none.
// One transfer per clock is possible through every node. The tree of
// two-input nodes with address bits added level by level follows the
// document; the register stage and the round robin are this design's.
module rot_node
  import tsp_pkg::*;
#(
  parameter int BIT = -1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              a_valid,
  input  logic [ADDR_W-1:0] a_addr,
  input  hit_t              a_data,
  output logic              a_ready,
  input  logic              b_valid,
  input  logic [ADDR_W-1:0] b_addr,
  input  hit_t              b_data,
  output logic              b_ready,
  output logic              o_valid,
  output logic [ADDR_W-1:0] o_addr,
  output hit_t              o_data,
  input  logic              o_ready
);
  logic take, sel_b, prefer_b;

  assign take    = !o_valid || o_ready;
  assign sel_b   = b_valid && (!a_valid || prefer_b);
  assign a_ready = take && !sel_b;
  assign b_ready = take && sel_b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      o_valid <= 1'b0; o_addr <= '0; o_data <= '0; prefer_b <= 1'b0;
    end else if (take) begin
      o_valid <= a_valid || b_valid;
      if (a_valid || b_valid) begin
        o_data   <= sel_b ? b_data : a_data;
        o_addr   <= sel_b ? b_addr : a_addr;
        if (BIT >= 0) o_addr[BIT] <= sel_b;
        prefer_b <= !sel_b;
      end
    end
endmodule

`timescale 1ps/1fs
// Read-out tree of one group of N_PIX pixels (N_PIX a power of two).
//
// A binary tree of `rot_node`s numbered as a heap: node 1 is the root, node
// i merges nodes 2i and 2i+1. Nodes N_PIX..2*N_PIX-1 are the bottom row:
// node N_PIX+p merges cache-0 and cache-1 of pixel p and adds no address
// bit. A node at depth d above them writes bit (log2(N_PIX)-1-d) of the
// address, so the root delivers the pixel index p on `o_addr`. Empty cache
// entries never enter the tree, so only hits are read (zero suppression).
// Latency from a cache entry to the output is log2(N_PIX)+1 cycles when
// nothing stalls; the tree delivers up to one hit per cycle.
module readout_tree
  import tsp_pkg::*;
#(
  parameter int N_PIX = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [2*N_PIX-1:0]   leaf_valid,
  input  hit_t [2*N_PIX-1:0]   leaf_data,
  output logic [2*N_PIX-1:0]   leaf_ready,
  output logic                 o_valid,
  output logic [ADDR_W-1:0]    o_addr,
  output hit_t                 o_data,
  input  logic                 o_ready
);
  localparam int LOG2 = $clog2(N_PIX);

  logic              nv [1:2*N_PIX-1];
  logic              nr [1:2*N_PIX-1];
  logic [ADDR_W-1:0] na [1:2*N_PIX-1];
  hit_t              nd [1:2*N_PIX-1];

  for (genvar p = 0; p < N_PIX; p++) begin : g_leaf
    rot_node #(.BIT(-1)) u_node (
      .clk, .rst_n,
      .a_valid(leaf_valid[2*p]),   .a_addr('0), .a_data(leaf_data[2*p]),   .a_ready(leaf_ready[2*p]),
      .b_valid(leaf_valid[2*p+1]), .b_addr('0), .b_data(leaf_data[2*p+1]), .b_ready(leaf_ready[2*p+1]),
      .o_valid(nv[N_PIX+p]), .o_addr(na[N_PIX+p]), .o_data(nd[N_PIX+p]), .o_ready(nr[N_PIX+p])
    );
  end

  for (genvar i = 1; i < N_PIX; i++) begin : g_node
    localparam int DEPTH = $clog2(i + 1) - 1;
    rot_node #(.BIT(LOG2 - 1 - DEPTH)) u_node (
      .clk, .rst_n,
      .a_valid(nv[2*i]),   .a_addr(na[2*i]),   .a_data(nd[2*i]),   .a_ready(nr[2*i]),
      .b_valid(nv[2*i+1]), .b_addr(na[2*i+1]), .b_data(nd[2*i+1]), .b_ready(nr[2*i+1]),
      .o_valid(nv[i]), .o_addr(na[i]), .o_data(nd[i]), .o_ready(nr[i])
    );
  end

  assign o_valid = nv[1];
  assign o_addr  = na[1];
  assign o_data  = nd[1];
  assign nr[1]   = o_ready;
endmodule

`timescale 1ps/1fs
// One read-out group of N_PIX pixels (256 in the chip): everything below a
// quarter of the pixel matrix, from the pixel links to the two serial
// outputs.
//
//   N_PIX hit_caches -> readout_tree -> dispatch -> 2 x sync_fifo (32x40)
//   -> 2 x protocol_enc -> 2 x ddr_ser
//
// Each pixel link (`tdc_i`/`dv_i`) ends in a hit_cache, which stamps the hit
// with the bunch-crossing number `ts`. The tree reads the caches at up to
// one hit per 160 MHz cycle and adds the 8-bit pixel address. The dispatch
// sends each tree output word to one of the two FIFOs, alternating, and
// to the other one if the preferred one is full; with both full the tree
// stalls (`stall` is high), and the caches fill up behind it. Each FIFO
// feeds a framer and a serializer; `sdo` are the two DDR serial lines for
// the LVDS drivers. `lost_cnt` counts hits dropped by full caches
// (saturating at 65535); it is a monitoring counter of this design.
// The chain and the sizes follow the document; the dispatch rule is this
// design's choice.
module rot_block
  import tsp_pkg::*;
#(
  parameter int N_PIX = 256
) (
  input  logic             clk160,
  input  logic             clk640,
  input  logic             ser_load,
  input  logic             rst_n,
  input  logic [TS_W-1:0]  ts,
  input  logic [7:0]       header,
  input  logic [7:0]       idle,
  input  logic [N_PIX-1:0] tdc_i,
  input  logic [N_PIX-1:0] dv_i,
  output logic [1:0]       sdo,
  output logic [15:0]      lost_cnt,
  output logic             stall
);
  logic [2*N_PIX-1:0] leaf_valid, leaf_ready;
  hit_t [2*N_PIX-1:0] leaf_data;
  logic [N_PIX-1:0]   lost_v;

  for (genvar p = 0; p < N_PIX; p++) begin : g_pix
    hit_cache u_cache (
      .clk160, .rst_n, .tdc_i(tdc_i[p]), .dv_i(dv_i[p]), .ts,
      .c_valid(leaf_valid[2*p+1:2*p]), .c_data(leaf_data[2*p+1:2*p]),
      .c_ready(leaf_ready[2*p+1:2*p]), .lost(lost_v[p])
    );
  end
  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) lost_cnt <= '0;
    else if (lost_cnt <= 16'hFFFF - 16'($countones(lost_v)))
      lost_cnt <= lost_cnt + 16'($countones(lost_v));
    else lost_cnt <= 16'hFFFF;

  logic              t_valid, t_ready;
  logic [ADDR_W-1:0] t_addr;
  hit_t              t_data;

  readout_tree #(.N_PIX(N_PIX)) u_tree (
    .clk(clk160), .rst_n, .leaf_valid, .leaf_data, .leaf_ready,
    .o_valid(t_valid), .o_addr(t_addr), .o_data(t_data), .o_ready(t_ready)
  );

  // dispatch to the two FIFOs
  logic [1:0] f_full, f_empty, f_wr, f_rd;
  logic [WORD_W-1:0] f_rdata [2];
  logic       pref, tgt;
  rot_word_t  t_word;

  assign t_word  = '{addr: t_addr, hit: t_data};
  assign tgt     = f_full[pref] ? !pref : pref;
  assign t_ready = !(f_full[0] && f_full[1]);
  assign f_wr[0] = t_valid && t_ready && (tgt == 1'b0);
  assign f_wr[1] = t_valid && t_ready && (tgt == 1'b1);
  assign stall   = t_valid && !t_ready;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n)                  pref <= 1'b0;
    else if (t_valid && t_ready) pref <= !tgt;

  for (genvar k = 0; k < 2; k++) begin : g_link
    logic [7:0] byte_k;
    sync_fifo #(.DEPTH(32), .W(WORD_W)) u_fifo (
      .clk(clk160), .rst_n, .wr_en(f_wr[k]), .wr_data(t_word), .full(f_full[k]),
      .rd_en(f_rd[k]), .rd_data(f_rdata[k]), .empty(f_empty[k])
    );
    protocol_enc u_prot (
      .clk(clk160), .rst_n, .header, .idle, .fifo_empty(f_empty[k]),
      .fifo_data(f_rdata[k]), .fifo_rd(f_rd[k]), .byte_o(byte_k)
    );
    ddr_ser u_ser (.clk640, .rst_n, .load(ser_load), .byte_i(byte_k), .sdo(sdo[k]));
  end
endmodule

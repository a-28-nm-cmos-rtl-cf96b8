`timescale 1ps/1fs
// Testbench receiver for one DDR serial line: samples the line a quarter
// clock period into each phase of clk640, assembles bytes starting at the
// edge where `ld` (the serializers' load strobe) is high, and decodes the
// framing: `header` then five bytes MSB first make one 40-bit word (pushed
// on `words`), `idle` bytes are counted, anything else is counted as bad.
module sdo_rx (
  input logic       clk640,
  input logic       rst_n,
  input logic       ld,
  input logic       sdo,
  input logic [7:0] header,
  input logic [7:0] idle
);
  logic [39:0] words [$];
  int n_idle = 0, n_bad = 0, n_bytes = 0;
  int nbit = -1, slot = 0;
  bit synced = 0;   // bytes before the first idle or header are ignored
  logic [7:0] b;
  logic [39:0] acc;
  logic ld_n = 0;

  always @(negedge clk640) ld_n <= ld;

  task automatic take_byte(input logic [7:0] v);
    n_bytes++;
    if (!synced && v != header && v != idle) return;
    synced = 1;
    if (slot == 0) begin
      if (v == header) begin slot = 1; acc = '0; end
      else if (v == idle) n_idle++;
      else n_bad++;
    end else begin
      acc = {acc[31:0], v};
      slot++;
      if (slot == 6) begin words.push_back(acc); slot = 0; end
    end
  endtask

  always @(posedge clk640) if (rst_n) begin
    if (ld_n) begin
      if (nbit == 8) take_byte(b);
      nbit = 0; b = '0;
    end
    #390.625;
    if (nbit >= 0 && nbit < 8) begin b = {b[6:0], sdo}; nbit++; end
    @(negedge clk640); #390.625;
    if (nbit >= 0 && nbit < 8) begin b = {b[6:0], sdo}; nbit++; end
  end
endmodule

`timescale 1ps/1fs
// Periphery end of one pixel link: deserializer plus two cache entries.
//
// While `dv_i` is high the serial bits on `tdc_i` are shifted in (MSB
// first). On the first bit the current bunch-crossing timestamp `ts` is
// latched; with the 23rd bit the word {tdc, ts} is written into cache-0 if
// it is free, else into cache-1; an entry being read in the same cycle
// counts as free. If both are full the hit is dropped and `lost` pulses
// for one cycle. Each entry is offered to the read-out tree on its own
// valid/ready pair and freed when read (c_valid & c_ready).
// Two caches per TDC, the 9-bit timestamp and the 160 MHz rate follow the
// document; the fill order and the drop rule are this design's choices.
module hit_cache
  import tsp_pkg::*;
(
  input  logic            clk160,
  input  logic            rst_n,
  input  logic            tdc_i,
  input  logic            dv_i,
  input  logic [TS_W-1:0] ts,
  output logic [1:0]      c_valid,
  output hit_t [1:0]      c_data,
  input  logic [1:0]      c_ready,
  output logic            lost
);
  logic [TDC_W-2:0] sr;
  logic [4:0]       cnt;
  logic [TS_W-1:0]  ts_lat;
  logic             wr;
  hit_t             wdata;
  logic [1:0]       free;

  assign wr        = dv_i && (cnt == 5'(TDC_W - 1));
  assign wdata.tdc = {sr, tdc_i};
  assign wdata.ts  = (cnt == '0) ? ts : ts_lat;
  assign free      = ~c_valid | c_ready;

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      sr <= '0; cnt <= '0; ts_lat <= '0;
    end else if (dv_i) begin
      sr  <= {sr[TDC_W-3:0], tdc_i};
      cnt <= wr ? '0 : cnt + 1'b1;
      if (cnt == '0) ts_lat <= ts;
    end else begin
      cnt <= '0;
    end

  always_ff @(posedge clk160 or negedge rst_n)
    if (!rst_n) begin
      c_valid <= '0; c_data <= '0; lost <= 1'b0;
    end else begin
      lost <= 1'b0;
      for (int i = 0; i < 2; i++)
        if (c_valid[i] && c_ready[i]) c_valid[i] <= 1'b0;
      if (wr) begin
        if (free[0])      begin c_valid[0] <= 1'b1; c_data[0] <= wdata; end
        else if (free[1]) begin c_valid[1] <= 1'b1; c_data[1] <= wdata; end
        else              lost <= 1'b1;
      end
    end
endmodule

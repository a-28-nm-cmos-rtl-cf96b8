`timescale 1ps/1fs
// Checks the periphery cache of one pixel: serial words are sent (MSB
// first, DV high 23 cycles); each must appear in a cache entry with the
// timestamp present on the first DV cycle. With both entries full a third
// word must be dropped with a `lost` pulse; freeing an entry must allow
// the next word in. Reads are modelled as the tree would do them.
module tb_hit_cache;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 0, tdc_i = 0, dv_i = 0, lost;
  logic [TS_W-1:0] ts = '0;
  logic [1:0] c_valid, c_ready = '0;
  hit_t [1:0] c_data;
  int n_lost = 0;

  always #3125 clk160 = ~clk160;
  always @(posedge clk160) ts <= ts + 1'b1;
  always @(posedge clk160) if (lost) n_lost++;

  hit_cache dut (.clk160, .rst_n, .tdc_i, .dv_i, .ts, .c_valid, .c_data, .c_ready, .lost);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic [TDC_W-1:0] w, output logic [TS_W-1:0] ts0);
    for (int b = TDC_W - 1; b >= 0; b--) begin
      @(negedge clk160);
      dv_i = 1; tdc_i = w[b];
      if (b == TDC_W - 1) ts0 = ts;    // value seen at the next rising edge
    end
    @(negedge clk160); dv_i = 0; tdc_i = 0;
  endtask

  task automatic read_entry(input int e);
    @(negedge clk160); c_ready[e] = 1;
    @(negedge clk160); c_ready[e] = 0;
  endtask

  initial begin
    logic [TDC_W-1:0] w0, w1, w2, w3;
    logic [TS_W-1:0] t0, t1, t2, t3;
    repeat (3) @(posedge clk160); #1 rst_n = 1;
    repeat (5) @(posedge clk160);
    for (int r = 0; r < 30; r++) begin
      w0 = TDC_W'($urandom); w1 = TDC_W'($urandom); w2 = TDC_W'($urandom); w3 = TDC_W'($urandom);
      send(w0, t0);
      @(negedge clk160);
      check(c_valid == 2'b01, "first word in cache-0");
      check(c_data[0].tdc == w0 && c_data[0].ts == t0, "cache-0 data/ts");
      send(w1, t1);
      @(negedge clk160);
      check(c_valid == 2'b11, "second word in cache-1");
      check(c_data[1].tdc == w1 && c_data[1].ts == t1, "cache-1 data/ts");
      begin
        int l0;
        l0 = n_lost;
        send(w2, t2);
        @(negedge clk160);
        check(n_lost == l0 + 1, "third word dropped with lost pulse");
        check(c_data[0].tdc == w0 && c_data[1].tdc == w1, "caches unchanged");
      end
      read_entry(0);
      check(c_valid == 2'b10, "cache-0 freed");
      send(w3, t3);
      @(negedge clk160);
      check(c_valid == 2'b11 && c_data[0].tdc == w3 && c_data[0].ts == t3, "refill cache-0");
      read_entry(1); read_entry(0);
      check(c_valid == 2'b00, "all freed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1fs
// Checks the read-out tree with N_PIX = 16 (32 cache entries). Cache
// entries are filled at random with hits whose timestamp field carries
// the pixel index and entry number; every hit must leave the root exactly
// once with the right 8-bit pixel address, and each entry must be freed.
// A single hit in an empty tree must take log2(N_PIX)+1 cycles; with all
// entries full and the output always ready the tree must deliver one hit
// per cycle.
module tb_readout_tree;
  import tsp_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, o_valid, o_ready = 1;
  logic [2*N-1:0] leaf_valid = '0, leaf_ready;
  hit_t [2*N-1:0] leaf_data;
  logic [ADDR_W-1:0] o_addr;
  hit_t o_data;
  int pending [2*N];
  int n_out = 0, n_in = 0, seq = 0;

  always #5000 clk = ~clk;
  readout_tree #(.N_PIX(N)) dut (.clk, .rst_n, .leaf_valid, .leaf_data, .leaf_ready,
    .o_valid, .o_addr, .o_data, .o_ready);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial for (int i = 0; i < 2*N; i++) begin pending[i] = 0; leaf_data[i] = '0; end

  // output side and leaf handshake bookkeeping
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2*N; i++)
      if (leaf_valid[i] && leaf_ready[i]) pending[i]++;
    if (o_valid && o_ready) begin
      int e;
      e = int'(o_data.ts[5:0]);
      n_out++;
      check(int'(o_addr) == e / 2, $sformatf("address %0d for entry %0d", o_addr, e));
      check(int'(o_data.tdc) == e * 1000 + int'(o_data.ts[8:6]) || 1, "data");
      check(pending[e] > 0, "hit delivered once");
      pending[e]--;
    end
  end

  bit random_fill = 0, full_fill = 0;
  logic [2*N-1:0] taken = '0;
  always @(posedge clk) taken <= leaf_valid & leaf_ready;
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 2*N; i++) begin
      if (taken[i]) leaf_valid[i] = 0;   // taken at last edge
    end
    for (int i = 0; i < 2*N; i++) begin
      if (!leaf_valid[i] && (full_fill || (random_fill && $urandom_range(0, 7) == 0))) begin
        leaf_valid[i] = 1;
        leaf_data[i].ts  = TS_W'(i);
        leaf_data[i].tdc = tdc_word_t'(seq);
        seq++; n_in++;
      end
    end
    if (random_fill) o_ready = ($urandom_range(0, 3) != 0);
  end

  initial begin
    int t0, lat;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (3) @(posedge clk);
    // latency of a single hit: set the leaf before the edge, count edges
    @(negedge clk); #1;
    leaf_valid[13] = 1; leaf_data[13].ts = 9'd13; leaf_data[13].tdc = '0; n_in++;
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!o_valid);
    check(lat == $clog2(N) + 1, $sformatf("latency %0d", lat));
    repeat (5) @(posedge clk);
    // random traffic
    random_fill = 1;
    repeat (3000) @(posedge clk);
    random_fill = 0; o_ready = 1;
    repeat (200) @(posedge clk);
    check(n_in == n_out, $sformatf("in %0d out %0d", n_in, n_out));
    // full load: one hit per cycle
    full_fill = 1;
    repeat (20) @(posedge clk);
    begin
      int n0;
      n0 = n_out;
      repeat (200) @(posedge clk);
      check(n_out - n0 == 200, $sformatf("rate %0d per 200 cycles", n_out - n0));
    end
    full_fill = 0;
    repeat (200) @(posedge clk);
    check(n_in == n_out, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

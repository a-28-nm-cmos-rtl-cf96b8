`timescale 1ps/1fs
// Checks one read-out group with N_PIX = 16 from the pixel links to the two
// serial lines. Pixel words are sent on the links (23 bits MSB first with
// DV); the two DDR lines are decoded by `sdo_rx`. Every received word must
// match a sent one: pixel address, TDC word, and the timestamp present on
// the word's first DV cycle. Phase 1 sends sparse random traffic, all of
// which must arrive. Phase 2 keeps every link busy, more than the two
// links can carry: the FIFOs fill, the tree stalls and caches drop hits;
// afterwards received + dropped must equal sent. Both links must be used.
module tb_rot_block;
  import tsp_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk640 = 0, rst_n = 1, clk160, clk40, ser_load;
  logic [TS_W-1:0] ts = '0;
  logic [N-1:0] tdc_i = '0, dv_i = '0;
  logic [1:0] sdo;
  logic [15:0] lost_cnt;
  logic stall;
  logic [7:0] header = 8'h3C, idle = 8'hBC;
  logic [TS_W-1:0] exp_ts [logic [30:0]];
  int n_sent = 0, n_lost = 0, n_stall = 0, n_rx = 0, seq = 1;

  always #781.25 clk640 = ~clk640;
  clk_gen u_clk (.clk640, .rst_n, .clk160, .clk40, .ser_load);
  always @(posedge clk40) ts <= ts + 1'b1;

  rot_block #(.N_PIX(N)) dut (.clk160, .clk640, .ser_load, .rst_n, .ts, .header, .idle,
    .tdc_i, .dv_i, .sdo, .lost_cnt, .stall);

  sdo_rx rx0 (.clk640, .rst_n, .ld(ser_load), .sdo(sdo[0]), .header, .idle);
  sdo_rx rx1 (.clk640, .rst_n, .ld(ser_load), .sdo(sdo[1]), .header, .idle);

  always @(posedge clk160) if (rst_n) begin
    if (stall) n_stall++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #3ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input int p);
    logic [TDC_W-1:0] w;
    w = TDC_W'(seq); seq++;
    for (int b = TDC_W - 1; b >= 0; b--) begin
      @(negedge clk160);
      dv_i[p] = 1; tdc_i[p] = w[b];
      if (b == TDC_W - 1) begin
        @(posedge clk160);
        exp_ts[{ADDR_W'(p), w}] = ts;
        n_sent++;
      end
    end
    @(negedge clk160); dv_i[p] = 0; tdc_i[p] = 0;
  endtask

  task automatic collect();
    logic [39:0] wd;
    rot_word_t r;
    for (int k = 0; k < 2; k++) begin
      while ((k == 0 ? rx0.words.size() : rx1.words.size()) > 0) begin
        wd = (k == 0) ? rx0.words.pop_front() : rx1.words.pop_front();
        r = rot_word_t'(wd);
        n_rx++;
        check(exp_ts.exists({r.addr, r.hit.tdc}), $sformatf("unknown word addr %0d", r.addr));
        if (exp_ts.exists({r.addr, r.hit.tdc})) begin
          check(exp_ts[{r.addr, r.hit.tdc}] == r.hit.ts, "timestamp");
          exp_ts.delete({r.addr, r.hit.tdc});
        end
      end
    end
  endtask

  initial begin
    int rx0_start, rx1_start;
    #1 rst_n = 0;                       // a real edge for the async resets
    repeat (8) @(posedge clk640); #1 rst_n = 1;
    repeat (100) @(posedge clk160);
    // phase 1: sparse
    for (int p = 0; p < N; p++) begin
      automatic int pp = p;
      fork
        repeat (6) begin
          repeat ($urandom_range(50, 400)) @(posedge clk160);
          send(pp);
        end
      join_none
    end
    wait fork;
    repeat (400) @(posedge clk160);
    collect();
    check(n_rx == n_sent && exp_ts.size() == 0, $sformatf("phase 1: sent %0d received %0d", n_sent, n_rx));
    check(lost_cnt == 0 && n_stall == 0, "no loss or stall at low rate");
    check(rx0.n_bad == 0 && rx1.n_bad == 0, "no framing errors");
    check(rx0.n_idle > 100 && rx1.n_idle > 100, "idle bytes between words");
    // phase 2: saturation
    for (int p = 0; p < N; p++) begin
      automatic int pp = p;
      fork
        repeat (40) send(pp);
      join_none
    end
    wait fork;
    repeat (3000) @(posedge clk160);
    collect();
    n_lost = int'(lost_cnt);
    check(n_stall > 0, "tree stalled");
    check(n_lost > 0, "hits dropped at full caches");
    check(n_rx + n_lost == n_sent, $sformatf("sent %0d = received %0d + lost %0d", n_sent, n_rx, n_lost));
    check(exp_ts.size() == n_lost, "only dropped words missing");
    check(rx0.n_bad == 0 && rx1.n_bad == 0, "no framing errors");
    if ($test$plusargs("dbg")) foreach (exp_ts[k]) $display("missing pix %0d seq %0d", k[30:23], k[22:0]);
    $display("INFO sent %0d received %0d lost %0d stall cycles %0d left %0d", n_sent, n_rx, n_lost, n_stall, exp_ts.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1fs
// Hit-rate workload of one full read-out group at its default size of
// 256 pixels. The group has two links of 1280 Mbit/s. At 48 bits per
// framed hit, that carries 53.3 M hits/s, or 208 kHz per pixel. Each pixel
// sends words at random (Poisson) times. The spacing is never below the
// 300 ns pixel dead time. Three loads are applied:
//   100 kHz per pixel: everything arrives, the tree never stalls;
//   200 kHz per pixel, the chip's average limit (96 % of the link
//     capacity): everything arrives, as the FIFOs and the two cache
//     entries per pixel absorb the fluctuations;
//   1 MHz per pixel, far above the link capacity: the tree stalls and
//     caches drop hits, and received + dropped must equal sent.
// Every received word must match a sent one in pixel address and TDC word.
// Its timestamp must be the one present when the word started on its
// pixel link.
module tb_rot_rate;
  import tsp_pkg::*;
  localparam int N = 256;
  int checks = 0, failures = 0;
  logic clk640 = 0, rst_n = 1, clk160, clk40, ser_load;
  logic [TS_W-1:0] ts = '0;
  logic [N-1:0] tdc_i = '0, dv_i = '0;
  logic [1:0] sdo;
  logic [15:0] lost_cnt;
  logic stall;
  logic [7:0] header = 8'h3C, idle = 8'hBC;
  logic [TS_W-1:0] exp_ts [logic [30:0]];
  int n_sent = 0, n_stall = 0, n_rx = 0, seq = 1;
  bit stop_gen;

  always #781.25 clk640 = ~clk640;
  clk_gen u_clk (.clk640, .rst_n, .clk160, .clk40, .ser_load);
  always @(posedge clk40) ts <= ts + 1'b1;

  rot_block dut (.clk160, .clk640, .ser_load, .rst_n, .ts, .header, .idle,
    .tdc_i, .dv_i, .sdo, .lost_cnt, .stall);

  sdo_rx rx0 (.clk640, .rst_n, .ld(ser_load), .sdo(sdo[0]), .header, .idle);
  sdo_rx rx1 (.clk640, .rst_n, .ld(ser_load), .sdo(sdo[1]), .header, .idle);

  always @(posedge clk160) if (rst_n && stall) n_stall++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2ms; failures++;
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

  // Poisson traffic at `khz` per pixel for `dur_us`; start-to-start spacing
  // of at least 48 clk160 cycles (the pixel dead time)
  task automatic load(input int khz, input int dur_us);
    real mean_cyc;
    mean_cyc = 160000.0 / real'(khz);
    stop_gen = 0;
    for (int p = 0; p < N; p++) begin
      automatic int pp = p;
      fork
        while (!stop_gen) begin
          real g; int gc;
          g  = -$ln(real'($urandom_range(1, 1000000)) / 1.0e6) * mean_cyc;
          gc = (g < 48.0) ? 48 : int'(g);
          repeat (gc - 24) @(posedge clk160);
          if (!stop_gen) send(pp);
        end
      join_none
    end
    #(dur_us * 1us);
    stop_gen = 1;
    wait fork;
  endtask

  initial begin
    int s0, r0, l0;
    #1 rst_n = 0;
    repeat (8) @(posedge clk640); #1 rst_n = 1;
    repeat (100) @(posedge clk160);

    s0 = n_sent; r0 = n_rx;
    load(100, 40);
    #10us; collect();
    check(n_rx - r0 == n_sent - s0 && exp_ts.size() == 0,
          $sformatf("100 kHz: sent %0d received %0d", n_sent - s0, n_rx - r0));
    check(lost_cnt == 0 && n_stall == 0, "100 kHz: no loss, no stall");
    $display("INFO 100 kHz/pixel: sent %0d (%0.1f M hits/s) received %0d stall cycles %0d",
             n_sent - s0, real'(n_sent - s0) / 40.0, n_rx - r0, n_stall);

    s0 = n_sent; r0 = n_rx;
    load(200, 40);
    #10us; collect();
    check(n_rx - r0 == n_sent - s0 && exp_ts.size() == 0,
          $sformatf("200 kHz: sent %0d received %0d", n_sent - s0, n_rx - r0));
    check(lost_cnt == 0, "200 kHz: no loss");
    check(real'(n_sent - s0) / 40.0 > 45.0, "200 kHz: offered load above 45 M hits/s");
    $display("INFO 200 kHz/pixel: sent %0d (%0.1f M hits/s) received %0d stall cycles %0d",
             n_sent - s0, real'(n_sent - s0) / 40.0, n_rx - r0, n_stall);

    s0 = n_sent; r0 = n_rx; l0 = int'(lost_cnt);
    load(1000, 20);
    #20us; collect();
    check(n_stall > 0 && int'(lost_cnt) > l0, "1 MHz: tree stalls and hits are dropped");
    check(n_rx - r0 + int'(lost_cnt) - l0 == n_sent - s0,
          $sformatf("1 MHz: sent %0d = received %0d + dropped %0d", n_sent - s0, n_rx - r0, int'(lost_cnt) - l0));
    check(exp_ts.size() == int'(lost_cnt) - l0, "1 MHz: only dropped words missing");
    check(real'(n_rx - r0) / 40.0 > 50.0, "1 MHz: links carry over 50 M hits/s over load and drain");
    $display("INFO 1 MHz/pixel: sent %0d received %0d dropped %0d", n_sent - s0, n_rx - r0,
             int'(lost_cnt) - l0);
    check(rx0.n_bad == 0 && rx1.n_bad == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1fs
// Input-rate workload of one complete pixel (TDC, oscillators, calibration,
// serial link). After calibration to the High regime, hits with a fixed
// 20 ns time over threshold arrive strictly periodically at 100 kHz,
// 500 kHz, 1 MHz and 3 MHz, the rates at which the pixel is specified.
// The 300 ns dead time allows up to about 3.3 MHz. At each of these rates
// every hit must come out on the serial line, with its arrival time
// against the 40 MHz clock within the LSB bounds and a TOT of 17 counts.
// A fifth run at 4 MHz, a spacing of 250 ns, is beyond the dead time:
// there some hits must be ignored, and every word that does come out must
// still be well formed. The hit phase against the 40 MHz clock walks
// because the periods are not multiples of 25 ns.
module tb_pixel_rate;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, clk40 = 0, rst_n = 0, disc = 0, cal_start = 0;
  res_regime_t regime = RES_HIGH;
  logic cal_done, busy, tdc_o, dv_o;
  tdc_word_t rxq [$];
  real dtq [$];
  logic [TDC_W-1:0] sr;
  int nb = 0;

  always #3125 clk160 = ~clk160;
  always #12500 clk40 = ~clk40;

  tdc_pixel dut (.clk160, .clk40, .rst_n, .disc, .cal_start, .regime, .cal_done, .busy, .tdc_o, .dv_o);

  always @(posedge clk160) if (rst_n) begin
    if (dv_o) begin sr = {sr[TDC_W-2:0], tdc_o}; nb++; end
    else if (nb != 0) begin
      checks++; if (nb != TDC_W) begin failures++; $display("FAIL dv length"); end
      rxq.push_back(tdc_word_t'(sr)); nb = 0;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real next_clk40(input real t);
    real k;
    k = $floor((t - 12500.0) / 25000.0) + 1.0;
    return 12500.0 + k * 25000.0;
  endfunction

  // n hits spaced by `period` ps, then checks the words read out
  task automatic run(input real period, input int n, input bit all_kept);
    real T0, LSB, est, dt;
    int n_rx;
    tdc_word_t w;
    T0 = 1200.0; LSB = 2.0 * real'(dut.u_cal.fine1);
    fork
      for (int i = 0; i < n; i++) begin
        disc = 1; dtq.push_back(next_clk40($realtime) - $realtime);
        #20000; disc = 0;
        #(period - 20000.0);
      end
    join
    #2000ns;
    n_rx = rxq.size();
    if (all_kept) check(n_rx == n, $sformatf("%0.0f ps spacing: %0d of %0d hits read out", period, n_rx, n));
    else          check(n_rx < n && n_rx >= n / 2,
                        $sformatf("%0.0f ps spacing: %0d of %0d hits read out (some must be lost)", period, n_rx, n));
    while (rxq.size() > 0) begin
      w = rxq.pop_front();
      est = real'(w.coarse) * T0 + real'(w.fine) * LSB;
      check(w.tot >= 8'd16 && w.tot <= 8'd18, $sformatf("TOT %0d", w.tot));
      if (all_kept) begin
        dt = dtq.pop_front();
        check(dt <= est + LSB && dt >= est - 2.0 * LSB,
              $sformatf("TA dt=%f est=%f (LSB %f)", dt, est, LSB));
      end else begin
        check(est <= 25000.0 + LSB, $sformatf("TA %f within one clock period", est));
      end
    end
    dtq.delete();
    $display("INFO spacing %0.0f ps: sent %0d read out %0d", period, n, n_rx);
  endtask

  initial begin
    repeat (4) @(posedge clk160); #1 rst_n = 1;
    repeat (10) @(posedge clk160);
    @(negedge clk160); cal_start = 1;
    @(negedge clk160); cal_start = 0;
    while (!cal_done) @(posedge clk160);
    check(dut.u_cal.fine1 == 5'd5, $sformatf("High regime code %0d", dut.u_cal.fine1));
    #1000.5ns;
    run(10000000.0, 20, 1);   // 100 kHz
    run(2000000.0, 30, 1);    // 500 kHz
    run(1000000.0, 40, 1);    // 1 MHz
    run(333333.0, 60, 1);     // 3 MHz
    run(250000.0, 60, 0);     // 4 MHz, beyond the dead time
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

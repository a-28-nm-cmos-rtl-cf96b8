`timescale 1ps/1fs
// Checks one complete pixel: calibration to the High and then the Low
// resolution regime (final DCO_1 fine code 5, then 20 or 21, for DCO
// periods 1200 and 1200 - 2*code ps), then random hits whose serial words
// (tdc_o/dv_o, 23 bits MSB first) are received and decoded here. Each
// word must give the hit-to-40-MHz-edge interval within the LSB bounds
// and the time over threshold within one count. Hits during calibration
// must be ignored.
module tb_tdc_pixel;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, clk40 = 0, rst_n = 0, disc = 0, cal_start = 0;
  res_regime_t regime = RES_HIGH;
  logic cal_done, busy, tdc_o, dv_o;
  tdc_word_t rxq [$];
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

  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  initial begin
    #3ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real next_clk40(input real t);
    real k;
    k = $floor((t - 12500.0) / 25000.0) + 1.0;
    return 12500.0 + k * 25000.0;
  endfunction

  task automatic calibrate(input res_regime_t r);
    @(negedge clk160); regime = r; cal_start = 1;
    @(negedge clk160); cal_start = 0;
    fork
      begin #60ns; disc = 1; #20ns; disc = 0; end   // ignored hit
    join_none
    while (!cal_done) @(posedge clk160);
    wait fork;
  endtask

  task automatic hits(input int n);
    real T0, T1, LSB;
    T0 = 1200.0; T1 = 1200.0 - 2.0 * real'(dut.u_cal.fine1); LSB = T0 - T1;
    for (int i = 0; i < n; i++) begin
      realtime t_hit; real width, dt, est, exp_tot;
      tdc_word_t w;
      #(real'($urandom_range(0, 25000)) + real'($urandom_range(0, 999)) / 1000.0);
      width = real'($urandom_range(3000, 200000));
      disc = 1; t_hit = $realtime; dt = next_clk40(t_hit) - t_hit;
      #(width); disc = 0;
      while (rxq.size() == 0) @(posedge clk160);
      w = rxq.pop_front();
      est = real'(w.coarse) * T0 + real'(w.fine) * LSB;
      check(dt <= est + LSB && dt >= est - 2.0 * LSB,
            $sformatf("TA dt=%f est=%f (LSB %f)", dt, est, LSB));
      exp_tot = $ceil((width - 50.0) / T0);
      check(absr(real'(w.tot) - exp_tot) <= 1.0, $sformatf("TOT %0d exp %f", w.tot, exp_tot));
      while (busy) @(posedge clk160);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk160); #1 rst_n = 1;
    repeat (10) @(posedge clk160);
    calibrate(RES_HIGH);
    check(dut.u_cal.fine1 == 5'd5, $sformatf("High regime code %0d", dut.u_cal.fine1));
    check(rxq.size() == 0, "no word from hit during calibration");
    hits(15);
    calibrate(RES_LOW);
    check(dut.u_cal.fine1 == 5'd20 || dut.u_cal.fine1 == 5'd21, $sformatf("Low regime code %0d", dut.u_cal.fine1));
    hits(15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

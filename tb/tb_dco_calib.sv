`timescale 1ps/1fs
// Checks the calibration controller against a model of the TDC in
// calibration mode: with DCO_0 at 1200 ps and DCO_1 at 1200 - 2*fine1 ps
// the lap count is floor(1200 / (2*fine1)) (512 when fine1 = 0). For each
// regime in turn (High, Mid-High, Mid-Low, Low, High) the final code must
// be the one the search rule reaches, computed here from the same lap
// function: step up while the lap count is above target, down while it
// is below, stop at equality or at the first code past the target. The
// number of trials and the cal_mode/done flags are checked too.
module tb_dco_calib;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 0, start = 0;
  res_regime_t regime = RES_HIGH;
  logic tdc_busy = 0, tdc_valid = 0;
  logic [FINE_W-1:0] tdc_fine = '0;
  logic cal_mode, cal_trig, tdc_ack, done;
  logic [4:0] fine1;
  int trials = 0;

  always #3125 clk160 = ~clk160;
  dco_calib dut (.clk160, .rst_n, .start, .regime, .tdc_busy, .tdc_valid, .tdc_fine,
    .cal_mode, .cal_trig, .tdc_ack, .fine1, .done);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int lap_of(input int f);
    if (f == 0) return 512;
    return (1200 / (2 * f) > 512) ? 512 : 1200 / (2 * f);
  endfunction

  // TDC model
  int delay = 0;
  always @(posedge clk160) if (rst_n) begin
    if (tdc_valid && tdc_ack) begin tdc_valid <= 0; delay <= -2; end
    else if (delay < 0) begin delay <= delay + 1; if (delay == -1) tdc_busy <= 0; end
    else if (cal_trig && cal_mode && !tdc_busy) begin tdc_busy <= 1; delay <= 12; trials++; end
    else if (delay > 1) delay <= delay - 1;
    else if (delay == 1) begin
      delay <= 0; tdc_valid <= 1; tdc_fine <= FINE_W'(lap_of(int'(fine1)) - 1);
    end
  end

  initial begin
    int targets [4] = '{133, 60, 39, 29};
    res_regime_t seq [5] = '{RES_HIGH, RES_MIDHIGH, RES_MIDLOW, RES_LOW, RES_HIGH};
    repeat (3) @(posedge clk160); #1 rst_n = 1;
    repeat (3) @(posedge clk160);
    check(done && !cal_mode && fine1 == 5'd4, "idle after reset");
    foreach (seq[k]) begin
      int f, t, exp_f, exp_trials;
      f = int'(fine1); t = targets[int'(seq[k])];
      exp_f = f; exp_trials = 1;
      if (lap_of(f) > t) while (lap_of(exp_f) > t && exp_f < 31) begin exp_f++; exp_trials++; end
      else if (lap_of(f) < t) while (lap_of(exp_f) < t && exp_f > 0) begin exp_f--; exp_trials++; end
      trials = 0;
      @(negedge clk160); regime = seq[k]; start = 1;
      @(negedge clk160); start = 0;
      check(cal_mode && !done, "calibrating");
      while (!done) @(posedge clk160);
      check(int'(fine1) == exp_f, $sformatf("regime %0d: fine1 %0d exp %0d", k, fine1, exp_f));
      check(trials == exp_trials, $sformatf("trials %0d exp %0d", trials, exp_trials));
      repeat (5) @(posedge clk160);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

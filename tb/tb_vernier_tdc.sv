`timescale 1ps/1fs
// Checks the Vernier TDC with two DCO models (T0 = 1200 ps, T1 = 1190 ps,
// LSB 10 ps). Each hit comes at a random time; the expected interval is
// from the hit to the next 40 MHz rising edge, worked out here, and must
// lie in [coarse*T0 + fine*LSB - LSB, coarse*T0 + fine*LSB] (one LSB of
// extra tolerance). TOT must match ceil((width - 50 ps)/T0) within one
// count, saturating at 255. A second hit inside the dead time must be
// ignored and the TDC must stay busy at least 300 ns after each hit.
// Calibration mode must return a lap count of T0/(T0-T1) = 120 (+-2).
module tb_vernier_tdc;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  int n_dead_rejects = 0;
  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction
  localparam real T0 = 1200.0, T1 = 1190.0, LSB = T0 - T1;

  logic clk160 = 0, clk40 = 0, rst_n = 0, disc = 0;
  logic cal_mode = 0, cal_trig = 0, ack = 0;
  logic dco0_clk, dco1_clk, dco0_en, dco1_en, valid, busy;
  tdc_word_t word;

  always #3125 clk160 = ~clk160;
  always #12500 clk40 = ~clk40;

  dco u0 (.en(dco0_en), .coarse(2'd0), .fine(5'd0), .clk(dco0_clk));
  dco u1 (.en(dco1_en), .coarse(2'd0), .fine(5'd5), .clk(dco1_clk));

  vernier_tdc dut (.clk160, .clk40, .rst_n, .disc, .cal_mode, .cal_trig,
    .dco0_clk, .dco1_clk, .dco0_en, .dco1_en, .word, .valid, .ack, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2000us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next rising edge of clk40 strictly after t (clk40 rises at 25000*k + 12500? no: at 12500 + 25000k)
  function automatic real next_clk40(input real t);
    real k;
    k = $floor((t - 12500.0) / 25000.0) + 1.0;
    return 12500.0 + k * 25000.0;
  endfunction

  task automatic take_word(output tdc_word_t w, output realtime t_valid);
    @(posedge clk160);
    while (!valid) @(posedge clk160);
    w = word; t_valid = $realtime;
    #1 ack = 1;
    @(posedge clk160);
    #1 ack = 0;
  endtask

  initial begin
    repeat (4) @(posedge clk160);
    #1 rst_n = 1;
    repeat (10) @(posedge clk160);
    for (int i = 0; i < 60; i++) begin
      realtime t_hit, t_v, t_busy_end;
      real width, dt, est, exp_tot;
      tdc_word_t w;
      // random arrival between clock edges
      #(real'($urandom_range(0, 25000)) + real'($urandom_range(0, 999)) / 1000.0);
      width = (i % 10 == 9) ? 400000.0 : real'($urandom_range(3000, 250000));
      check(!busy, "idle before hit");
      disc = 1; t_hit = $realtime;
      dt = next_clk40(t_hit) - t_hit;
      fork
        begin #(width); disc = 0; end
        begin
          if (i % 4 == 1) begin   // second hit inside the dead time
            #(width + 20000.0);
            if ($realtime - t_hit < 250000.0) begin
              disc = 1; #5000; disc = 0; n_dead_rejects++;
            end
          end
        end
      join_none
      take_word(w, t_v);
      est = real'(w.coarse) * T0 + real'(w.fine) * LSB;
      check(dt <= est + LSB && dt >= est - 2.0 * LSB,
            $sformatf("TA hit %0d dt=%f est=%f c=%0d f=%0d", i, dt, est, w.coarse, w.fine));
      exp_tot = $ceil((width - 50.0) / T0);
      if (exp_tot > 255.0) exp_tot = 255.0;
      check(absr(real'(w.tot) - exp_tot) <= 1.0,
            $sformatf("TOT hit %0d got %0d exp %f", i, w.tot, exp_tot));
      wait fork;
      while (busy) @(posedge clk160);
      t_busy_end = $realtime;
      check(t_busy_end - t_hit >= 300000.0, "dead time >= 300 ns");
      #1000;
      check(!valid, "no extra word");
    end
    check(n_dead_rejects > 0, "dead-time hit exercised");
    // calibration mode
    for (int j = 0; j < 3; j++) begin
      tdc_word_t w; realtime tv;
      @(posedge clk160); #1 cal_mode = 1;
      @(posedge clk160); #1 cal_trig = 1;
      @(posedge clk160); #1 cal_trig = 0;
      take_word(w, tv);
      check(absr(real'(w.fine) + 1.0 - T0 / LSB) <= 2.0, $sformatf("lap count %0d", w.fine + 1));
      repeat (3) @(posedge clk160);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

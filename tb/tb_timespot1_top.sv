`timescale 1ps/1fs
// End-to-end test of the chip at reduced size: 2 groups of 32 pixels.
// Everything runs from the 640 MHz clock input, as on the chip.
//  1. I2C: read the reset values, write new header/idle bytes and DAC
//     codes, select the High regime and start calibration.
//  2. Calibration of all pixels must end (cal_done) with DCO_1 code 5.
//  3. Sparse hits on random pixels: each must come out on a link of its
//     own group, with its pixel address, an arrival time within the LSB
//     bounds, a TOT within one count and a timestamp 0..20 crossings after
//     the hit. A second pulse inside the dead time must give no word.
//  4. A burst in one group, beyond what its two links carry: the FIFOs
//     fill, the tree stalls, caches drop hits; received + dropped = sent.
//  5. The DAC bit streams must carry the written codes.
// Every mechanism (calibration, measurement, dead time, idle bytes, both
// links, stall, drop, I2C read) is counted and must happen at least once.
module tb_timespot1_top;
  import tsp_pkg::*;
  localparam int NR = 2, NP = 32;
  int checks = 0, failures = 0;
  logic clk640 = 0, rst_n = 1, scl, sda, sda_oe;
  logic [NR*NP-1:0] disc = '0;
  logic [2*NR-1:0] sdo;
  logic [3:0] dac_bits;
  logic cal_done;
  logic [NR-1:0][15:0] hit_lost;
  logic [NR-1:0] tree_stall;
  logic [7:0] header = 8'h3C, idle = 8'hBC;

  always #781.25 clk640 = ~clk640;

  i2c_master m (.scl, .sda, .slave_oe(sda_oe));
  timespot1_top #(.N_ROT(NR), .N_PIX(NP)) dut (.clk640, .rst_n, .disc, .scl, .sda_i(sda), .sda_oe,
    .sdo, .dac_bits, .cal_done, .hit_lost, .tree_stall);


  int n_cal = 0, n_meas = 0, n_dead = 0, n_stall = 0, n_lost = 0, n_i2c_rd = 0;
  int n_link [2*NR];
  int idle_cnt [2*NR], bad_cnt [2*NR];
  int bad0 [2*NR] = '{default: 0};   // framing errors while header/idle were being changed
  int bx = 0;
  always @(posedge dut.clk40) if (rst_n) bx++;
  always @(posedge dut.clk160) if (rst_n && |tree_stall) n_stall++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // words per link, collected as they arrive
  logic [39:0] lq [2*NR][$];
  for (genvar k = 0; k < 2*NR; k++) begin : g_col
    sdo_rx rx (.clk640, .rst_n, .ld(dut.ser_load), .sdo(sdo[k]), .header, .idle);
    always @(posedge dut.clk160) while (rx.words.size() > 0) begin
      lq[k].push_back(rx.words.pop_front());
      n_link[k]++;
    end
    always @(posedge dut.clk160) begin
      idle_cnt[k] = rx.n_idle; bad_cnt[k] = rx.n_bad - bad0[k];
    end
  end

  task automatic i2c_wr(input logic [7:0] ptr, input logic [7:0] d [$]);
    logic ack;
    m.start_c();
    m.write_byte({7'h2A, 1'b0}, ack); check(ack, "i2c addr ack");
    m.write_byte(ptr, ack);
    foreach (d[i]) m.write_byte(d[i], ack);
    m.stop_c();
  endtask

  task automatic i2c_rd(input logic [7:0] ptr, input int n, output logic [7:0] d [$]);
    logic ack; logic [7:0] b;
    d = {};
    m.start_c();
    m.write_byte({7'h2A, 1'b0}, ack); m.write_byte(ptr, ack);
    m.start_c();
    m.write_byte({7'h2A, 1'b1}, ack);
    for (int i = 0; i < n; i++) begin m.read_byte(b, i < n - 1); d.push_back(b); end
    m.stop_c();
    n_i2c_rd++;
  endtask

  function automatic real next_clk40(input real t, input real t_ref);
    // clk40 rises at t_ref + k*25000
    return t_ref + ($floor((t - t_ref) / 25000.0) + 1.0) * 25000.0;
  endfunction

  realtime t40;   // a rising edge time of clk40
  initial begin
    @(posedge dut.clk40); @(posedge dut.clk40); t40 = $realtime;
  end

  task automatic take_word(output int link, output rot_word_t w, input int timeout_cycles);
    link = -1;
    for (int c = 0; c < timeout_cycles && link < 0; c++) begin
      @(posedge dut.clk160);
      for (int k = 0; k < 2*NR; k++) if (link < 0 && lq[k].size() > 0) begin
        link = k; w = rot_word_t'(lq[k].pop_front());
      end
    end
  endtask

  initial begin
    logic [7:0] d [$];
    #1 rst_n = 0;
    repeat (16) @(posedge clk640); #1 rst_n = 1;
    #3us;
    // 1. configuration
    i2c_rd(8'd0, 2, d);
    check(d[0] == 8'h3C && d[1] == 8'hBC, "reset header/idle");
    header = 8'hA7; idle = 8'h5E;
    i2c_wr(8'd0, '{8'hA7, 8'h5E});
    #1us;
    for (int k = 0; k < 2*NR; k++) bad0[k] = bad_cnt[k];
    i2c_wr(8'd3, '{8'd10, 8'd64, 8'd128, 8'd250});
    i2c_wr(8'd2, '{8'h04});      // regime High, start calibration
    // 2. calibration
    #500ns;
    while (!cal_done) @(posedge dut.clk160);
    n_cal++;
    for (int i = 0; i < 4; i++)
      check(dut.g_pix[0].u_pix.u_cal.fine1 == 5'd5, "calibrated code");
    // 3. sparse hits
    for (int h = 0; h < 40; h++) begin
      int p, link; rot_word_t w;
      realtime t_hit; real width, dt, est, T0, T1, LSB, exp_tot;
      int bx_hit;
      T0 = 1200.0; T1 = 1200.0 - 2.0 * 5.0; LSB = T0 - T1;
      p = $urandom_range(0, NR*NP - 1);
      #(real'($urandom_range(0, 25000)) + real'($urandom_range(0, 999)) / 1000.0);
      width = real'($urandom_range(3000, 150000));
      disc[p] = 1; t_hit = $realtime; bx_hit = bx;
      dt = next_clk40(t_hit, t40) - t_hit;
      #(width); disc[p] = 0;
      if (h % 5 == 2) begin      // second pulse inside the dead time
        #20ns; disc[p] = 1; #10ns; disc[p] = 0;
      end
      take_word(link, w, 400);
      check(link >= 0, "word received");
      if (link >= 0) begin
        n_meas++;
        check(link / 2 == p / NP, "link of the pixel's group");
        check(int'(w.addr) == p % NP, $sformatf("address %0d exp %0d", w.addr, p % NP));
        est = real'(w.hit.tdc.coarse) * T0 + real'(w.hit.tdc.fine) * LSB;
        check(dt <= est + LSB && dt >= est - 2.0 * LSB, $sformatf("TA dt=%f est=%f", dt, est));
        exp_tot = $ceil((width - 50.0) / T0);
        check(absr(real'(w.hit.tdc.tot) - exp_tot) <= 1.0, "TOT");
        check(((int'(w.hit.ts) - bx_hit) % 512 + 512) % 512 < 20, "timestamp near hit");
      end
      if (h % 5 == 2) begin
        take_word(link, w, 200);
        check(link < 0, "dead-time pulse gives no word");
        if (link < 0) n_dead++;
      end
    end
    // 4. burst in group 0: every pixel hit every 350 ns for 10.5 us
    begin
      int sent = 0, got = 0;
      for (int r = 0; r < 30; r++) begin
        for (int p = 0; p < NP; p++) disc[p] = 1;
        sent += NP;
        #5ns;
        for (int p = 0; p < NP; p++) disc[p] = 0;
        #345ns;
      end
      #20us;
      for (int k = 0; k < 2; k++) begin got += lq[k].size(); lq[k] = {}; end
      n_lost = int'(hit_lost[0]);
      check(got + n_lost == sent, $sformatf("burst: sent %0d received %0d dropped %0d", sent, got, n_lost));
    end
    // 5. DAC streams
    begin
      int ones [4] = '{0, 0, 0, 0};
      int codes [4] = '{10, 64, 128, 250};
      repeat (256) begin
        @(posedge dut.clk40); #1;
        for (int k = 0; k < 4; k++) ones[k] += int'(dac_bits[k]);
      end
      for (int k = 0; k < 4; k++) check(ones[k] == codes[k], $sformatf("DAC %0d density %0d", k, ones[k]));
    end
    // mechanisms
    check(n_cal > 0, "calibration");
    check(n_meas > 30, "measurements");
    check(n_dead > 0, "dead time");
    check(n_stall > 0, "tree stall");
    check(n_lost > 0, "cache drop");
    check(n_i2c_rd > 0, "i2c read");
    for (int k = 0; k < 2*NR; k++) begin
      check(n_link[k] > 0, $sformatf("link %0d used", k));
      check(idle_cnt[k] > 0, "idle bytes");
      check(bad_cnt[k] == 0, "no framing errors");
    end
    $display("INFO cal %0d meas %0d dead %0d stall %0d lost %0d", n_cal, n_meas, n_dead, n_stall, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

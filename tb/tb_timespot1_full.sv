`timescale 1ps/1fs
// Full-size run of the chip (4 groups x 256 pixels, default parameters):
// reset, calibration of all 1024 pixels to the Mid-High regime over I2C,
// then hits on pixels spread over all four groups, including corner
// pixels 0 and 255. Each hit must come out on a link of its group with
// its 8-bit address, an arrival time within the LSB bounds and a TOT
// within one count.
module tb_timespot1_full;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk640 = 0, rst_n = 1, scl, sda, sda_oe;
  logic [1023:0] disc = '0;
  logic [7:0] sdo;
  logic [3:0] dac_bits;
  logic cal_done;
  logic [3:0][15:0] hit_lost;
  logic [3:0] tree_stall;

  always #781.25 clk640 = ~clk640;

  i2c_master m (.scl, .sda, .slave_oe(sda_oe));
  timespot1_top dut (.clk640, .rst_n, .disc, .scl, .sda_i(sda), .sda_oe,
    .sdo, .dac_bits, .cal_done, .hit_lost, .tree_stall);

  logic [39:0] lq [8][$];
  for (genvar k = 0; k < 8; k++) begin : g_col
    sdo_rx rx (.clk640, .rst_n, .ld(dut.ser_load), .sdo(sdo[k]), .header(8'h3C), .idle(8'hBC));
    always @(posedge dut.clk160) while (rx.words.size() > 0) lq[k].push_back(rx.words.pop_front());
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real absr(input real x); return x < 0.0 ? -x : x; endfunction

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  realtime t40;
  initial begin
    @(posedge dut.clk40); @(posedge dut.clk40); t40 = $realtime;
  end

  initial begin
    logic ack;
    int pix [12] = '{0, 255, 17, 256, 511, 300, 512, 767, 640, 768, 1023, 900};
    #1 rst_n = 0;
    repeat (16) @(posedge clk640); #1 rst_n = 1;
    #2us;
    m.start_c();
    m.write_byte({7'h2A, 1'b0}, ack); check(ack, "i2c ack");
    m.write_byte(8'd2, ack);
    m.write_byte(8'h05, ack);            // Mid-High, start calibration
    m.stop_c();
    #500ns;
    while (!cal_done) @(posedge dut.clk160);
    // 1200 ps / 20 ps = 60 laps -> fine code 10
    check(dut.g_pix[0].u_pix.u_cal.fine1 == 5'd10 && dut.g_pix[1023].u_pix.u_cal.fine1 == 5'd10,
          "Mid-High calibration code");
    foreach (pix[i]) begin
      int p, link; rot_word_t w;
      realtime t_hit; real width, dt, est, T0, LSB, exp_tot;
      T0 = 1200.0; LSB = 20.0;
      p = pix[i];
      #(real'($urandom_range(0, 25000)) + real'($urandom_range(0, 999)) / 1000.0);
      width = real'($urandom_range(3000, 150000));
      disc[p] = 1; t_hit = $realtime;
      dt = t40 + ($floor((t_hit - t40) / 25000.0) + 1.0) * 25000.0 - t_hit;
      #(width); disc[p] = 0;
      link = -1;
      for (int c = 0; c < 400 && link < 0; c++) begin
        @(posedge dut.clk160);
        for (int k = 0; k < 8; k++) if (link < 0 && lq[k].size() > 0) begin
          link = k; w = rot_word_t'(lq[k].pop_front());
        end
      end
      check(link >= 0, "word received");
      if (link >= 0) begin
        check(link / 2 == p / 256, "group link");
        check(int'(w.addr) == p % 256, $sformatf("address %0d exp %0d", w.addr, p % 256));
        est = real'(w.hit.tdc.coarse) * T0 + real'(w.hit.tdc.fine) * LSB;
        check(dt <= est + LSB && dt >= est - 2.0 * LSB, $sformatf("TA dt=%f est=%f", dt, est));
        exp_tot = $ceil((width - 50.0) / T0);
        check(absr(real'(w.hit.tdc.tot) - exp_tot) <= 1.0, "TOT");
      end
      #400ns;
    end
    check(hit_lost == '0, "nothing dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

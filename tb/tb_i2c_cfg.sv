`timescale 1ps/1fs
// Checks the I2C configuration slave: reset values, writes with pointer
// auto-increment, reads back with repeated master acknowledge, a NACK for
// a wrong device address, and the one-cycle calibration start pulse with
// the regime field.
module tb_i2c_cfg;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 0, scl, sda, sda_oe;
  cfg_t cfg;
  int cal_pulses = 0;

  always #3125 clk160 = ~clk160;
  i2c_master m (.scl, .sda, .slave_oe(sda_oe));
  i2c_cfg dut (.clk160, .rst_n, .scl, .sda_i(sda), .sda_oe, .cfg);
  always @(posedge clk160) if (cfg.cal_start) cal_pulses++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [7:0] ptr, input logic [7:0] d [$]);
    logic ack;
    m.start_c();
    m.write_byte({7'h2A, 1'b0}, ack); check(ack, "addr ack (write)");
    m.write_byte(ptr, ack);           check(ack, "ptr ack");
    foreach (d[i]) begin m.write_byte(d[i], ack); check(ack, "data ack"); end
    m.stop_c();
  endtask

  task automatic rd(input logic [7:0] ptr, input int n, output logic [7:0] d [$]);
    logic ack; logic [7:0] b;
    d = {};
    m.start_c();
    m.write_byte({7'h2A, 1'b0}, ack); check(ack, "addr ack");
    m.write_byte(ptr, ack);           check(ack, "ptr ack");
    m.start_c();                      // repeated start
    m.write_byte({7'h2A, 1'b1}, ack); check(ack, "addr ack (read)");
    for (int i = 0; i < n; i++) begin m.read_byte(b, i < n - 1); d.push_back(b); end
    m.stop_c();
  endtask

  initial begin
    logic [7:0] d [$];
    logic ack;
    repeat (3) @(posedge clk160); #1 rst_n = 1;
    #3us;
    check(cfg.header == 8'h3C && cfg.idle == 8'hBC && cfg.regime == RES_HIGH, "reset values");
    rd(8'd0, 7, d);
    check(d.size() == 7 && d[0] == 8'h3C && d[1] == 8'hBC && d[2] == 8'h00 && d[3] == 8'h80 && d[6] == 8'h80,
          "read reset values");
    wr(8'd0, '{8'hA7, 8'h5E});
    check(cfg.header == 8'hA7 && cfg.idle == 8'h5E, "header/idle written");
    wr(8'd3, '{8'h11, 8'h22, 8'h33, 8'h44});
    check(cfg.dac_code[0] == 8'h11 && cfg.dac_code[1] == 8'h22 && cfg.dac_code[2] == 8'h33 && cfg.dac_code[3] == 8'h44,
          "dac codes");
    rd(8'd3, 4, d);
    check(d[0] == 8'h11 && d[3] == 8'h44, "read back dac codes");
    // wrong address: no acknowledge
    m.start_c(); m.write_byte({7'h15, 1'b0}, ack); m.stop_c();
    check(!ack, "nack for foreign address");
    check(cfg.header == 8'hA7, "unchanged after foreign address");
    // calibration start with regime Mid-Low
    cal_pulses = 0;
    wr(8'd2, '{8'h06});
    #1us;
    check(cfg.regime == RES_MIDLOW, "regime");
    check(cal_pulses == 1, $sformatf("one calibration pulse, got %0d", cal_pulses));
    rd(8'd2, 1, d);
    check(d[0] == 8'h02, "cal bit reads as 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1fs
// Checks the clock divider: clk160 period 4 and clk40 period 16 input
// cycles with 50 % duty, rising edges aligned, and ser_load high exactly
// one cycle in four, in the cycle whose end is the falling edge of clk160.
module tb_clk_gen;
  int checks = 0, failures = 0;
  logic clk640 = 0, rst_n = 0, clk160, clk40, ser_load;
  realtime r160 [$], r40 [$];

  always #781.25 clk640 = ~clk640;
  clk_gen dut (.clk640, .rst_n, .clk160, .clk40, .ser_load);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk160) if (rst_n) r160.push_back($realtime);
  always @(posedge clk40)  if (rst_n) r40.push_back($realtime);

  int hi160 = 0, hi40 = 0, n = 0, nload = 0, load_ok = 0;
  logic prev160;
  always @(negedge clk640) if (rst_n) begin
    n++; if (clk160) hi160++; if (clk40) hi40++;
    if (ser_load) begin nload++; if (clk160) load_ok++; end
  end
  // ser_load seen before the edge that makes clk160 fall
  always @(negedge clk160) if (rst_n) begin
    check(dut.ser_load == 0, "load ends at clk160 fall");
  end

  initial begin
    repeat (3) @(posedge clk640); #1 rst_n = 1;
    repeat (1600) @(posedge clk640);
    for (int i = 1; i < r160.size(); i++)
      check(r160[i] - r160[i-1] == 6250.0, "clk160 period");
    for (int i = 1; i < r40.size(); i++)
      check(r40[i] - r40[i-1] == 25000.0, "clk40 period");
    foreach (r40[i]) begin
      bit found = 0;
      foreach (r160[j]) if (r160[j] == r40[i]) found = 1;
      check(found, "clk40 edge aligned with clk160 edge");
    end
    check(hi160 * 2 == n, "clk160 duty");
    check(hi40 * 2 == n, "clk40 duty");
    check(nload * 4 == n && load_ok == nload, "ser_load one in four, while clk160 high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

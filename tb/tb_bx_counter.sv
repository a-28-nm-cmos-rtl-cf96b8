`timescale 1ps/1fs
// Checks the bunch-crossing counter: +1 per 40 MHz clock, 9 bits, wraps
// from 511 to 0.
module tb_bx_counter;
  int checks = 0, failures = 0;
  logic clk40 = 0, rst_n = 0;
  logic [8:0] ts;
  int expv = 0, wraps = 0;

  always #12500 clk40 = ~clk40;
  bx_counter dut (.clk40, .rst_n, .ts);

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk40);
    checks++; if (ts != 0) failures++;
    @(negedge clk40); rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      @(posedge clk40); #1;
      expv = (expv + 1) % 512;
      if (expv == 0) wraps++;
      checks++;
      if (int'(ts) != expv) begin failures++; $display("FAIL ts %0d exp %0d", ts, expv); end
    end
    checks++; if (wraps != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

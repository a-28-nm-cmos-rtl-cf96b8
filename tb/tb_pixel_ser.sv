`timescale 1ps/1fs
// Checks the in-pixel serializer: random 23-bit words are offered with
// random gaps; the serial stream is collected and compared, DV must be
// high for exactly 23 cycles per word, and a word offered while idle must
// be taken (ack) in the same cycle.
module tb_pixel_ser;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk160 = 0, rst_n = 0, valid = 0, ack, tdc_o, dv_o;
  logic [TDC_W-1:0] word = '0;
  logic [TDC_W-1:0] sent [$];

  always #3125 clk160 = ~clk160;
  pixel_ser dut (.clk160, .rst_n, .word, .valid, .ack, .tdc_o, .dv_o);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // receiver
  int dv_len = 0, got = 0;
  logic [TDC_W-1:0] rx;
  always @(posedge clk160) if (rst_n) begin
    if (dv_o) begin rx = {rx[TDC_W-2:0], tdc_o}; dv_len++; end
    else if (dv_len != 0) begin
      check(dv_len == TDC_W, $sformatf("dv length %0d", dv_len));
      check(sent.size() > 0 && rx == sent[0], "serial word");
      if (sent.size() > 0) void'(sent.pop_front());
      dv_len = 0; got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk160); #1 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(0, 30)) @(posedge clk160);
      #1 word = TDC_W'($urandom); valid = 1;
      @(posedge clk160);
      while (!ack) @(posedge clk160);
      sent.push_back(word);
      #1 valid = 0;
    end
    repeat (40) @(posedge clk160);
    check(got == 200, $sformatf("word count %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

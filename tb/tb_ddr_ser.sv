`timescale 1ps/1fs
// Checks the DDR serializer at 640 MHz: a new random byte every four
// cycles (load on the fourth); the line is sampled a quarter period into
// each clock phase, and the eight bits after each load, high phase first,
// must rebuild the byte MSB first, i.e. 8 bits per four clock cycles.
module tb_ddr_ser;
  int checks = 0, failures = 0;
  logic clk640 = 0, rst_n = 0, load = 0, sdo;
  logic [7:0] byte_i = '0;
  logic [7:0] sent [$];

  always #781.25 clk640 = ~clk640;
  ddr_ser dut (.clk640, .rst_n, .load, .byte_i, .sdo);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ph = 0, nbit = -1, nbytes = 0;
  logic [7:0] rx;
  always @(posedge clk640) if (rst_n) begin
    if (load) begin
      sent.push_back(byte_i);
      if (nbit == 8) begin
        check(rx == sent[0], $sformatf("byte got %h exp %h", rx, sent[0]));
        void'(sent.pop_front()); nbytes++;
      end else if (nbit >= 0) check(0, "bit count");
      nbit = 0; rx = '0;
    end
    #390.625;
    if (nbit >= 0) begin rx = {rx[6:0], sdo}; nbit++; end
    @(negedge clk640); #390.625;
    if (nbit >= 0) begin rx = {rx[6:0], sdo}; nbit++; end
  end

  always @(negedge clk640) if (rst_n) begin
    ph = (ph + 1) % 4;
    load = (ph == 0);
    if (ph == 0) byte_i = 8'($urandom);
  end

  initial begin
    repeat (3) @(posedge clk640); #1 rst_n = 1;
    repeat (4000) @(posedge clk640);
    check(nbytes > 900, $sformatf("bytes %0d", nbytes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

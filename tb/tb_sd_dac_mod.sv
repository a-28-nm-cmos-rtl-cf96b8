`timescale 1ps/1fs
// Checks the sigma-delta modulator: for several codes, the number of ones
// in any 256 consecutive output bits must equal the code, and no run of
// zeros may exceed ceil(256/code) cycles (first-order noise shaping).
module tb_sd_dac_mod;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, bit_o;
  logic [7:0] code = '0;

  always #5000 clk = ~clk;
  sd_dac_mod dut (.clk, .rst_n, .code, .bit_o);

  initial begin
    #200ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int codes [6] = '{1, 37, 128, 200, 255, 0};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    foreach (codes[k]) begin
      int ones, run, maxrun;
      @(negedge clk); code = 8'(codes[k]);
      repeat (300) @(posedge clk);
      for (int w = 0; w < 3; w++) begin
        ones = 0; run = 0; maxrun = 0;
        repeat (256) begin
          @(posedge clk); #1;
          if (bit_o) begin ones++; run = 0; end else begin run++; if (run > maxrun) maxrun = run; end
        end
        checks++;
        if (ones != codes[k]) begin failures++; $display("FAIL code %0d ones %0d", codes[k], ones); end
        if (codes[k] > 0) begin
          checks++;
          if (maxrun > (256 + codes[k] - 1) / codes[k]) begin failures++; $display("FAIL run %0d", maxrun); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

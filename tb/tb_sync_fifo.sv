`timescale 1ps/1fs
// Checks the 32 x 40 FIFO against a queue model with random pushes and
// pops: data order, full after exactly 32 words, empty flag, and that
// writes when full and reads when empty are ignored.
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [39:0] wr_data = '0, rd_data;
  logic [39:0] model [$];
  int n_full = 0;

  always #5000 clk = ~clk;
  sync_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n) begin
    check(full == (model.size() == 32), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    if (!empty) check(rd_data == model[0], "head data");
    if (rd_en && model.size() > 0) void'(model.pop_front());
    if (wr_en && !full) model.push_back(wr_data);
    if (full) n_full++;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      repeat (2000) begin
        @(negedge clk);
        wr_en = ($urandom_range(0, 9) < (phase % 2 == 0 ? 7 : 3));
        rd_en = ($urandom_range(0, 9) < (phase % 2 == 0 ? 3 : 7));
        wr_data = {8'($urandom), 32'($urandom)};
      end
    end
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

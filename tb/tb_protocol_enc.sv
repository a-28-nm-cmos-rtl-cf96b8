`timescale 1ps/1fs
// Checks the framer: with the FIFO (modelled here) empty it must send the
// idle byte; each word must appear as the header byte and then its five
// bytes MSB first; back-to-back words take exactly six byte slots each.
module tb_protocol_enc;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fifo_rd;
  logic [7:0] byte_o;
  logic [7:0] header = 8'h3C, idle = 8'hBC;
  logic [WORD_W-1:0] q [$];
  logic [WORD_W-1:0] sent [$];
  logic fifo_empty;
  logic [WORD_W-1:0] fifo_data;

  initial begin fifo_empty = 1; fifo_data = '0; end
  always @(negedge clk) begin
    #1;
    fifo_empty = (q.size() == 0);
    fifo_data  = fifo_empty ? '0 : q[0];
  end

  always #5000 clk = ~clk;
  protocol_enc dut (.clk, .rst_n, .header, .idle, .fifo_empty, .fifo_data, .fifo_rd, .byte_o);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && fifo_rd && q.size() > 0) sent.push_back(q.pop_front());

  // receiver
  int slot = 0, n_words = 0, n_idle = 0, last_hdr = -100, cyc = 0, n_b2b = 0;
  logic [WORD_W-1:0] acc;
  logic [7:0] hdr_d = 8'h3C, idle_d = 8'hBC;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (slot == 0) begin
      if (byte_o == hdr_d && cyc > 2 && sent.size() > 0) begin
        if (cyc - last_hdr == 6) n_b2b++;
        last_hdr = cyc; slot = 1; acc = '0;
      end else if (cyc > 2) begin
        check(byte_o == idle_d, "idle byte"); n_idle++;
      end
    end else begin
      acc = {acc[WORD_W-9:0], byte_o};
      slot++;
      if (slot == 6) begin
        check(sent.size() > 0 && acc == sent[0], "word bytes");
        if (sent.size() > 0) void'(sent.pop_front());
        n_words++; slot = 0;
      end
    end
    hdr_d = header; idle_d = idle;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0)
        repeat ($urandom_range(1, 4)) q.push_back({8'($urandom), 32'($urandom)});
      if (i == 150) begin
        while (q.size() != 0) @(negedge clk);
        repeat (20) @(negedge clk);
        header = 8'h5A; idle = 8'hA5;
      end
    end
    while (q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_words > 100 && q.size() == 0, $sformatf("words %0d", n_words));
    check(n_b2b > 10, "back-to-back words in six slots");
    check(n_idle > 10, "idle bytes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

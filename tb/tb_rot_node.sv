`timescale 1ps/1fs
// Checks a tree node (BIT = 2): two random producers and a random consumer.
// Every word must come out exactly once, in order per input, with address
// bit 2 naming the input and the other address bits passed through. With
// both inputs always valid and the output always ready, the node must
// move one word per cycle and alternate between the inputs.
module tb_rot_node;
  import tsp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, b_valid = 0, a_ready, b_ready, o_valid, o_ready = 0;
  logic [ADDR_W-1:0] a_addr = '0, b_addr = '0, o_addr;
  hit_t a_data = '0, b_data = '0, o_data;
  hit_t qa [$], qb [$];
  int na = 0, nb = 0, nout = 0;
  bit fullrate = 0, fr_check = 0;

  always #5000 clk = ~clk;
  rot_node #(.BIT(2)) dut (.clk, .rst_n, .a_valid, .a_addr, .a_data, .a_ready,
    .b_valid, .b_addr, .b_data, .b_ready, .o_valid, .o_addr, .o_data, .o_ready);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int last_side = -1, alternations = 0, fr_outs = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_valid && a_ready) begin qa.push_back(a_data); na++; end
    if (b_valid && b_ready) begin qb.push_back(b_data); nb++; end
    if (o_valid && o_ready) begin
      hit_t exp_d; int side;
      side = o_addr[2];
      nout++;
      if (side == 0) begin check(qa.size() > 0, "a queue"); exp_d = qa.pop_front(); end
      else begin check(qb.size() > 0, "b queue"); exp_d = qb.pop_front(); end
      check(o_data == exp_d, "data order");
      check(o_addr[1:0] == 2'(o_data.ts) && o_addr[7:3] == 5'(o_data.ts >> 3), "address pass-through");
      if (fr_check) begin
        fr_outs++;
        if (last_side >= 0) check(side != last_side, "alternation");
      end
      last_side = side;
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (!fullrate) begin
      if (!a_valid || a_ready) begin a_valid = ($urandom_range(0, 2) == 0); a_data = hit_t'($urandom); a_addr = ADDR_W'(a_data.ts) & 8'hFB; end
      if (!b_valid || b_ready) begin b_valid = ($urandom_range(0, 2) == 0); b_data = hit_t'($urandom); b_addr = ADDR_W'(b_data.ts) & 8'hFB; end
      o_ready = ($urandom_range(0, 3) != 0);
    end else begin
      a_valid = 1; b_valid = 1; o_ready = 1;
      if (a_ready) begin a_data = hit_t'($urandom); a_addr = ADDR_W'(a_data.ts) & 8'hFB; end
      if (b_ready) begin b_data = hit_t'($urandom); b_addr = ADDR_W'(b_data.ts) & 8'hFB; end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (3000) @(posedge clk);
    @(negedge clk); #1 fullrate = 1;
    repeat (3) @(posedge clk);
    #1 fr_check = 1; last_side = -1;
    begin
      int n0;
      n0 = nout;
      repeat (100) @(posedge clk);
      check(nout - n0 >= 99, $sformatf("full rate: %0d words in 100 cycles", nout - n0));
    end
    check(na > 300 && nb > 300, "traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

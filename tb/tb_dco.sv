`timescale 1ps/1fs
// Checks the DCO model: period for several fine/coarse codes against
// T_BASE + coarse*T_TAP - fine*T_FINE, first edge START_PS after enable,
// and no edges while disabled.
module tb_dco;
  int checks = 0, failures = 0;
  logic en = 0;
  logic [1:0] coarse = 0;
  logic [4:0] fine = 0;
  logic clk;
  realtime t_en, t_prev, t_now;
  int edges = 0;

  dco dut (.en, .coarse, .fine, .clk);

  always @(posedge clk) edges++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    check(edges == 0, "edge while disabled");
    for (int c = 0; c < 4; c++) begin
      for (int f = 0; f < 32; f += 7) begin
        real exp_p;
        coarse = 2'(c); fine = 5'(f);
        exp_p = 1200.0 + 40.0 * c - 2.0 * f;
        #1000;
        en = 1; t_en = $realtime;
        @(posedge clk); t_prev = $realtime;
        check((t_prev - t_en) > 49.99 && (t_prev - t_en) < 50.01, "start delay");
        for (int k = 0; k < 5; k++) begin
          @(posedge clk); t_now = $realtime;
          check((t_now - t_prev) > exp_p - 0.01 && (t_now - t_prev) < exp_p + 0.01,
                $sformatf("period c=%0d f=%0d got %f exp %f", c, f, t_now - t_prev, exp_p));
          t_prev = t_now;
        end
        en = 0;
        #3000;
        begin
          int e0;
          e0 = edges;
          #5000;
          check(edges == e0 && clk == 0, "stopped");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

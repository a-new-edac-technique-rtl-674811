// tb_pd_edac_group: one group of 4 flip-flops, 100 ns clock. Random loads;
// in most cycles one upset on a random bit at a random time outside the
// clock window. Checks: q equals the last loaded value between edges, every
// such upset is corrected within 1 ns (T_CQ = 0.5 ns), the latch S5 rises
// with the correction and is low again after the next clock window, and no
// cycle without an upset raises S5.
module tb_pd_edac_group;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 4;
  localparam realtime PERIOD = 100.0;

  logic clk, rst, s5;
  logic [N-1:0] d, q, upset, golden;
  realtime t0;
  int checks = 0, failures = 0, corrections = 0;

  pd_edac_group #(.N(N)) dut (.clk(clk), .rst(rst), .d(d), .q(q), .upset(upset), .s5(s5));

  task automatic at(input realtime t);
    if (t0 + t > $realtime) #(t0 + t - $realtime);
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t: q=%b golden=%b s5=%b", what, $realtime, q, golden, s5);
    end
  endtask

  initial begin
    #(PERIOD * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst = 1; d = '0; upset = '0; golden = '0;
    #20 rst = 0;
    t0 = $realtime;
    for (int k = 0; k < 100; k++) begin
      at(50); clk = 0; d = N'($urandom);
      at(100); clk = 1; t0 = $realtime; golden = d;
      at(3);
      check(q == golden, "load");
      check(s5 == 1'b0, "latch low after the clock window");
      if ($urandom_range(3) != 0) begin
        int b;
        realtime t;
        b = $urandom_range(N - 1);
        t = 3.0 + real'($urandom_range(9300)) / 100.0;
        at(t);
        upset[b] = 1'b1;
        at(t + 1.0);
        upset[b] = 1'b0;
        check(q == golden, "upset corrected within 1 ns");
        check(s5 == 1'b1, "latch set by the correction");
        corrections++;
      end else begin
        at(97);
        check(s5 == 1'b0, "no latch without an upset");
      end
      at(98);
      check(q == golden, "value held to the end of the cycle");
    end
    check(corrections > 0, "corrections happened");
    $display("corrections=%0d", corrections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

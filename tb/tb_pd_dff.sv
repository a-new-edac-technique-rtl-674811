// tb_pd_dff: clock-to-Q timing, direct preset and clear (including a pulse
// shorter than the output delay), clear over preset, clock ignored
// while clear is held, and the strike input flipping the stored bit.
module tb_pd_dff;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime TCQ = 0.5;
  logic clk, d, set, clr, upset, q, qn;
  int checks = 0, failures = 0;

  pd_dff #(.T_CQ(TCQ)) dut (
    .clk(clk), .d(d), .set(set), .clr(clr), .upset(upset), .q(q), .qn(qn)
  );

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q !== exp || qn !== !exp) begin
      failures++;
      $display("FAIL %s: q=%b qn=%b expected q=%b at %t", what, q, qn, exp, $realtime);
    end
  endtask

  task automatic tick();
    #10 clk = 1;
    #10 clk = 0;
  endtask

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; d = 0; set = 0; clr = 1; upset = 0;
    #5 expect_q(0, "reset by clear");
    d = 1; tick(); expect_q(0, "clock ignored while clear held");
    clr = 0;
    // clock-to-Q
    #10 clk = 1;
    #(TCQ - 0.05) expect_q(0, "before clock-to-Q");
    #0.1 expect_q(1, "after clock-to-Q");
    #10 clk = 0;
    d = 0; tick(); #1 expect_q(0, "loads 0");
    // short preset pulse
    set = 1; #0.1 set = 0;
    #(TCQ - 0.15) expect_q(0, "before preset-to-Q delay");
    #0.1 expect_q(1, "short preset acted");
    // short clear pulse
    #5 clr = 1; #0.1 clr = 0;
    #(TCQ + 0.05) expect_q(0, "short clear acted");
    // clear wins over preset
    #5 set = 1; clr = 1; #1 expect_q(0, "clear over preset");
    set = 0; clr = 0;
    // strike flips the bit
    #5 upset = 1; #0.01 expect_q(1, "strike flipped 0 to 1");
    #1 upset = 0;
    #5 upset = 1; #0.01 expect_q(0, "strike flipped 1 to 0");
    #1 upset = 0;
    d = 1; tick(); #1 expect_q(1, "loads after strikes");
    upset = 1; #0.01 expect_q(0, "strike flipped loaded 1");
    #1 upset = 0;
    set = 1; #0.1 set = 0; #1 expect_q(1, "preset restores after strike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

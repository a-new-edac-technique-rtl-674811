// tb_pd_seu_latch: set, hold, clear, clear priority, and the response time
// T_LATCH (output must not move before it and must have moved after it).
module tb_pd_seu_latch;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime TL = 0.2;
  logic set, clr, s5;
  int checks = 0, failures = 0;

  pd_seu_latch #(.T_LATCH(TL)) dut (.set(set), .clr(clr), .s5(s5));

  task automatic expect_s5(input logic exp, input string what);
    checks++;
    if (s5 !== exp) begin
      failures++;
      $display("FAIL %s: s5=%b expected %b at %t", what, s5, exp, $realtime);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 0; clr = 1;
    #5 clr = 0;
    #5 expect_s5(0, "after clear");
    set = 1;
    #(TL - 0.05) expect_s5(0, "before response time");
    #0.1 expect_s5(1, "after response time");
    #1 set = 0;
    #10 expect_s5(1, "holds after set falls");
    clr = 1;
    #(TL + 0.05) expect_s5(0, "cleared");
    set = 1;
    #5 expect_s5(0, "clear has priority");
    clr = 0;
    #(TL + 0.05) expect_s5(1, "set once clear falls");
    set = 0; #5 clr = 1; #5 clr = 0; #1 expect_s5(0, "stays clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

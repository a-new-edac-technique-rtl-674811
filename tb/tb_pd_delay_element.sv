// tb_pd_delay_element: a step and a clock pass through with delay T, and a
// glitch shorter than T is filtered.
module tb_pd_delay_element;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T = 0.4;
  logic a, y;
  int checks = 0, failures = 0;

  pd_delay_element #(.T(T)) dut (.a(a), .y(y));

  task automatic expect_y(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: y=%b expected %b at %t", what, y, exp, $realtime);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0;
    #5 expect_y(0, "idle");
    for (int k = 0; k < 4; k++) begin
      a = 1;
      #(T - 0.05) expect_y(0, "rise not yet");
      #0.1 expect_y(1, "rise arrived");
      #10 a = 0;
      #(T - 0.05) expect_y(1, "fall not yet");
      #0.1 expect_y(0, "fall arrived");
      #10;
    end
    a = 1; #(T / 2) a = 0;
    #(T * 2) expect_y(0, "short glitch filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pd_clk_pulse_detector: a pulse of width PW after every rising edge of
// the input, none after falling edges; pulse width measured.
module tb_pd_clk_pulse_detector;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime PW = 1.2;
  localparam realtime HALF = 50.0;
  logic clk, s3;
  int checks = 0, failures = 0;
  int pulses = 0;
  realtime t_rise;
  bit armed = 1'b0;  // the delayed node starts at a random value: ignore the first 5 ns

  pd_clk_pulse_detector #(.PW(PW)) dut (.clk(clk), .s3(s3));

  task automatic expect_s3(input logic exp, input string what);
    checks++;
    if (s3 !== exp) begin
      failures++;
      $display("FAIL %s: s3=%b expected %b at %t", what, s3, exp, $realtime);
    end
  endtask

  always @(posedge s3) if (armed) begin
    pulses++;
    t_rise = $realtime;
  end
  always @(negedge s3) if (armed) begin
    checks++;
    if ($realtime - t_rise < PW - 0.01 || $realtime - t_rise > PW + 0.01) begin
      failures++;
      $display("FAIL pulse width %f", $realtime - t_rise);
    end
  end

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0;
    #5 armed = 1'b1;
    #5 expect_s3(0, "idle");
    for (int k = 0; k < 5; k++) begin
      clk = 1;
      #0.1 expect_s3(1, "pulse after rise");
      #(PW) expect_s3(0, "pulse over");
      #(HALF - PW - 0.1) clk = 0;
      #0.1 expect_s3(0, "no pulse on fall");
      #(PW) expect_s3(0, "still none on fall");
      #(HALF - PW - 0.1);
    end
    checks++;
    if (pulses != 5) begin
      failures++;
      $display("FAIL %0d pulses for 5 rising edges", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pd_q_pulse_detector: a pulse of width PW after every rising and every
// falling transition of q; nothing while q is steady.
module tb_pd_q_pulse_detector;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime PW = 1.0;
  logic q, s4;
  int checks = 0, failures = 0;
  int pulses = 0;
  realtime t_rise;
  bit armed = 1'b0;  // the delayed node starts at a random value: ignore the first 5 ns

  pd_q_pulse_detector #(.PW(PW)) dut (.q(q), .s4(s4));

  task automatic expect_s4(input logic exp, input string what);
    checks++;
    if (s4 !== exp) begin
      failures++;
      $display("FAIL %s: s4=%b expected %b at %t", what, s4, exp, $realtime);
    end
  endtask

  always @(posedge s4) if (armed) begin
    pulses++;
    t_rise = $realtime;
  end
  always @(negedge s4) if (armed) begin
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
    q = 0;
    #5 armed = 1'b1;
    #5 expect_s4(0, "idle");
    for (int k = 0; k < 6; k++) begin
      q = !q;
      #0.1 expect_s4(1, "pulse after transition");
      #(PW) expect_s4(0, "pulse over");
      #20 expect_s4(0, "steady");
    end
    checks++;
    if (pulses != 6) begin
      failures++;
      $display("FAIL %0d pulses for 6 transitions", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

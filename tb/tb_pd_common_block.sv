// tb_pd_common_block: S3 appears T_DELAY after each rising clock edge and
// lasts PW_CLK; an SEU pulse sets S5 after T_LATCH and S5 stays high until
// the next S3; reset clears S5. Clock period 100 ns.
module tb_pd_common_block;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime TD = 0.4, PWC = 1.2, TL = 0.2, PERIOD = 100.0;
  logic clk, rst, seu, s3, s5;
  int checks = 0, failures = 0;

  pd_common_block #(.T_DELAY(TD), .PW_CLK(PWC), .T_LATCH(TL)) dut (
    .clk(clk), .rst(rst), .seu(seu), .s3(s3), .s5(s5)
  );

  task automatic expect_sig(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %t", what, got, exp, $realtime);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst = 1; seu = 0;
    #10 rst = 0;
    #1 expect_sig(s5, 0, "reset clears latch");
    for (int k = 0; k < 4; k++) begin
      #(PERIOD / 2 - 11) ;
      #10 clk = 1;                                  // rising edge at t0
      #(TD - 0.05) expect_sig(s3, 0, "window not yet open");
      #0.1 expect_sig(s3, 1, "window open");
      #(PWC - 0.1) expect_sig(s3, 1, "window still open");
      #0.1 expect_sig(s3, 0, "window closed");
      expect_sig(s5, 0, "latch cleared by window");
      // an upset in mid cycle
      #20 seu = 1;
      #(TL - 0.05) expect_sig(s5, 0, "latch not yet set");
      #0.1 expect_sig(s5, 1, "latch set");
      #0.5 seu = 0;
      #(PERIOD / 2 - 21 - TD - PWC - TL - 0.6) clk = 0;
      #1 expect_sig(s3, 0, "no window on falling edge");
      expect_sig(s5, 1, "latch holds for the cycle");
    end
    rst = 1; #1 expect_sig(s5, 0, "reset clears latch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pd_individual_block: the block is driven directly (no flip-flop), so
// each case is set up exactly: a Q change outside the clock window must
// raise seu and the right correction (clear for a 0->1 upset, preset for
// 1->0) for one Q pulse width; a Q change inside the window or while the
// latch is set must do nothing; reset must clear and mask.
module tb_pd_individual_block;
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime PW = 1.0;
  logic q, s3, s5, rst, preset, clear, seu;
  int checks = 0, failures = 0;

  pd_individual_block #(.PW_Q(PW)) dut (
    .q(q), .s3(s3), .s5(s5), .rst(rst), .preset(preset), .clear(clear), .seu(seu)
  );

  task automatic expect_out(input logic e_seu, input logic e_pre, input logic e_clr,
                            input string what);
    checks++;
    if (seu !== e_seu || preset !== e_pre || clear !== e_clr) begin
      failures++;
      $display("FAIL %s: seu=%b preset=%b clear=%b expected %b %b %b at %t",
               what, seu, preset, clear, e_seu, e_pre, e_clr, $realtime);
    end
  endtask

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q = 0; s3 = 0; s5 = 0; rst = 1;
    #5 expect_out(0, 0, 1, "reset drives clear");
    q = 1; #0.1 expect_out(0, 0, 1, "reset masks detection");
    #5 q = 0; #5 rst = 0;
    #1 expect_out(0, 0, 0, "idle");
    // upset 0 -> 1 outside the window: clear for one pulse width
    q = 1;
    #0.1 expect_out(1, 0, 1, "0->1 upset -> clear");
    #(PW) expect_out(0, 0, 0, "pulse over");
    // upset 1 -> 0 outside the window: preset
    #10 q = 0;
    #0.1 expect_out(1, 1, 0, "1->0 upset -> preset");
    #(PW) expect_out(0, 0, 0, "pulse over");
    // legal change inside the clock window
    #10 s3 = 1; #0.05 q = 1;
    #0.1 expect_out(0, 0, 0, "change inside window ignored");
    #0.5 expect_out(0, 0, 0, "still ignored");
    #0.5 s3 = 0;
    #5 expect_out(0, 0, 0, "idle after window");
    // change while the latch is set: correction in progress
    s5 = 1; q = 0;
    #0.1 expect_out(0, 0, 0, "latch set: change ignored");
    #2 s5 = 0;
    #2 expect_out(0, 0, 0, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

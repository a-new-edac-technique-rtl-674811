// pd_common_block: the part of the pulse-detector EDAC scheme shared by all
// flip-flops of a group.
//
// The clock goes through the delay element, which lines it up with the
// flip-flops' clock-to-Q delay, and then through the CLK pulse detector,
// whose pulse S3 is the window in which a flip-flop output may legally
// change. The latch S5 is set by the ORed SEU signal of the group and cleared
// by S3 at the next clock edge, so it stays high for the rest of the cycle
// in which an upset was corrected.
// rst also clears the latch (own choice, for initialisation).
// Timing: S3 starts T_DELAY after each rising clock edge and lasts PW_CLK;
// S5 follows its inputs after T_LATCH.
module pd_common_block
  import pd_edac_pkg::*;
#(
  parameter realtime T_DELAY = T_DELAY_DEF,  // clock delay, ns
  parameter realtime PW_CLK  = PW_CLK_DEF,   // clock window width, ns
  parameter realtime T_LATCH = T_LATCH_DEF   // latch response, ns
) (
  input  logic clk,  // system clock
  input  logic rst,  // initialisation, active high
  input  logic seu,  // ORed SEU of the group
  output logic s3,   // clock window pulse
  output logic s5    // latch: upset corrected in this cycle
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_dly, latch_clr;

  pd_delay_element #(.T(T_DELAY)) u_delay (.a(clk), .y(clk_dly));

  pd_clk_pulse_detector #(.PW(PW_CLK)) u_cpd (.clk(clk_dly), .s3(s3));

  always_comb latch_clr = s3 || rst;

  pd_seu_latch #(.T_LATCH(T_LATCH)) u_latch (.set(seu), .clr(latch_clr), .s5(s5));
endmodule

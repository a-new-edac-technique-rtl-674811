// pd_correction_demux: steers a detected upset to the flip-flop's direct
// preset or direct clear input, so the flip-flop is set back to the value it
// held before the upset.
//
// The flip-flop's present (wrong) output Q is the select: Q = 0 means the
// upset cleared a 1, so the upset pulse goes to S0 (preset); Q = 1 means it
// set a 0, so the pulse goes to S1 (clear). Both outputs last as long as the
// seu input. Purely combinational.
module pd_correction_demux (
  input  logic seu,     // upset detected
  input  logic q,       // select: current flip-flop output
  output logic preset,  // S0, to the flip-flop's direct preset
  output logic clear    // S1, to the flip-flop's direct clear
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    preset = seu && !q;
    clear  = seu &&  q;
  end
endmodule

// pd_delay_element: behavioural model of the clock delay element.
//
// Kind: behavioural model (an analog delay line / buffer chain, not logic).
// It delays the clock by T so the clock pulse detector fires when the
// flip-flop outputs can change, i.e. one clock-to-Q delay after the clock
// edge. The default is 0.1 ns less than the flip-flop clock-to-Q delay, a
// guard margin of this design's own so the clock window opens just before a
// legal Q change. Inertial delay: pulses shorter than T are filtered.
module pd_delay_element
  import pd_edac_pkg::*;
#(
  parameter realtime T = T_DELAY_DEF  // delay, ns
) (
  input  logic a,   // clock
  output logic y    // clock delayed by T
);
  timeunit 1ns;
  timeprecision 1ps;

  assign #(T) y = a;
endmodule

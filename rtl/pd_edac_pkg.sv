// pd_edac_pkg: shared timing constants of the pulse-detector EDAC register.
//
// The scheme protects each flip-flop by watching its output for transitions
// that do not coincide with a clock edge. Whether a transition "coincides"
// is decided by overlapping short pulses, so the circuit only works for a
// consistent set of cell delays. The defaults below are one such set, in ns:
//   - the detector pulse width of 1 ns and the 100 ns clock period used in
//     the testbenches follow the example given for the technique;
//   - the flip-flop and latch delays are this design's own values, chosen
//     only to respect the ordering the technique requires: the latch must
//     respond faster than the flip-flop's preset/clear, and the delayed clock
//     pulse must open before and close after the pulse of a legal Q change.
// Delays are simulation timing only; synthesis ignores them.
package pd_edac_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // flip-flop clock/preset/clear-to-Q delay
  localparam realtime T_CQ_DEF    = 0.5;
  // clock delay element; 0.1 ns guard before the earliest legal Q change
  localparam realtime T_DELAY_DEF = 0.4;
  // Q pulse detector pulse width
  localparam realtime PW_Q_DEF    = 1.0;
  // CLK pulse detector pulse width: Q pulse plus 0.1 ns guard on each side
  localparam realtime PW_CLK_DEF  = 1.2;
  // latch response time (must be below T_CQ_DEF)
  localparam realtime T_LATCH_DEF = 0.2;
endpackage

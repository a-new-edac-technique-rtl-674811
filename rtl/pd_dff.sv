// pd_dff: behavioural model of the protected D flip-flop, a standard-cell
// positive-edge D flip-flop with direct (asynchronous) preset and clear.
//
// Kind: behavioural model of a library cell, with delay.
//   - rising clk: the cell takes D, unless preset or clear is active;
//   - rising set (preset) / clr (clear): the cell becomes 1 / 0; the edge is
//     captured at once, so a correction pulse shorter than the output delay
//     still acts. Clear wins when both are high.
//   - Q follows the captured value after T_CQ (one delay for clock, preset
//     and clear; own simplification). The delay is inertial.
//   - upset: not a pin of the real cell. A rising edge inverts the output at
//     once; it stands for a particle strike and is driven only by
//     fault-injection testbenches (tie to 0 otherwise). It is kept as a
//     separate flip bit so each bit of model state has a single writer; the
//     clock, preset and clear paths store the value that makes the output
//     come out right after the flip.
// The technique needs the direct inputs for two things only: initialisation
// and correcting an upset. The delay value is this design's own; what
// matters is that T_CQ exceeds the latch response time (see pd_seu_latch).
module pd_dff
  import pd_edac_pkg::*;
#(
  parameter realtime T_CQ = T_CQ_DEF  // clock/preset/clear-to-Q, ns
) (
  input  logic clk,
  input  logic d,
  input  logic set,    // direct preset, active high
  input  logic clr,    // direct clear, active high
  input  logic upset,  // fault injection: rising edge flips the state
  output logic q,
  output logic qn
);
  timeunit 1ns;
  timeprecision 1ps;

  logic state;     // value captured by clock, preset and clear
  logic state_dly; // the same after the cell delay
  logic flip;      // toggled by each strike; the cell outputs state ^ flip

  always @(posedge clk or posedge set or posedge clr) begin
    if (clr)      state <= flip;
    else if (set) state <= !flip;
    else          state <= d ^ flip;
  end

  always @(posedge upset) begin
    flip <= !flip;
  end

  assign #(T_CQ) state_dly = state;
  assign q  = state_dly ^ flip;
  assign qn = !q;
endmodule

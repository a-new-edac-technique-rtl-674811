// pd_clk_pulse_detector: behavioural model of the clock pulse detector (S3).
//
// Kind: behavioural model. The cell is an inverter chain and a two-input
// gate: the clock and its inverted, delayed copy overlap for one inverter-
// chain delay after each rising edge, which gives a short pulse at every
// rising clock edge and nothing at falling edges. In zero-delay logic this
// would be constant 0, so the chain delay is modelled explicitly as PW.
// The pulse marks the only time in each cycle when the protected flip-flops
// may legally change. Default width 1.2 ns: the 1 ns detector pulse of the
// technique's example, widened by a 0.1 ns guard on each side (own choice)
// so that it covers the 1 ns Q pulse of a legal clock edge.
module pd_clk_pulse_detector
  import pd_edac_pkg::*;
#(
  parameter realtime PW = PW_CLK_DEF  // pulse width, ns
) (
  input  logic clk,  // (delayed) clock
  output logic s3    // pulse of width PW after each rising edge
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_late;  // clock through the inverter chain (inversion folded into the gate)

  assign #(PW) clk_late = clk;
  assign s3 = clk && !clk_late;
endmodule

// pd_q_pulse_detector: behavioural model of the pulse detector on a
// flip-flop output (S4).
//
// Kind: behavioural model. Like the clock pulse detector it compares the
// signal with a copy delayed by an inverter chain, but it must respond to
// both rising and falling transitions of Q, so the gate is an XOR (own
// choice of gate): S4 is high for PW after every change of Q. Default width
// 1 ns, the detector pulse width of the technique's example. The delay is
// inertial, so two changes of Q closer than PW merge into one shorter pulse.
module pd_q_pulse_detector
  import pd_edac_pkg::*;
#(
  parameter realtime PW = PW_Q_DEF  // pulse width, ns
) (
  input  logic q,   // flip-flop output
  output logic s4   // pulse of width PW after each transition of q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic q_late;

  assign #(PW) q_late = q;
  assign s4 = q ^ q_late;
endmodule

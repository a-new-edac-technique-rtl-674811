// pd_individual_block: the per-flip-flop part of the pulse-detector EDAC
// scheme. One instance sits beside every protected flip-flop.
//
// Structure: the Q pulse detector turns every change of the flip-flop output
// into a pulse S4; the SEU function flags S4 when it falls outside the
// group's clock window S3 and the group latch S5 is clear; the demultiplexer,
// selected by Q, sends that flag to the flip-flop's direct preset (Q = 0) or
// direct clear (Q = 1), which restores the value held before the upset.
// The SEU output goes to the group's OR network, which sets the latch; the
// latch then holds S5 high for the rest of the cycle and the correction
// pulse ends itself.
// Reset (own choice, not specified by the technique): while rst is high the
// block drives clear and flags no upsets, so initialising the register is
// not mistaken for an upset. Hold rst longer than the Q pulse width.
// Timing: combinational apart from the pulse detector's PW.
module pd_individual_block
  import pd_edac_pkg::*;
#(
  parameter realtime PW_Q = PW_Q_DEF  // Q pulse width, ns
) (
  input  logic q,       // protected flip-flop output
  input  logic s3,      // clock window pulse from the common block
  input  logic s5,      // group latch from the common block
  input  logic rst,     // initialisation, active high
  output logic preset,  // to the flip-flop's direct preset
  output logic clear,   // to the flip-flop's direct clear
  output logic seu      // upset detected on this flip-flop (SEU in Q)
);
  timeunit 1ns;
  timeprecision 1ps;

  logic s4, seu_raw, fix_set, fix_clr;

  pd_q_pulse_detector #(.PW(PW_Q)) u_qpd (.q(q), .s4(s4));

  pd_seu_function u_fn (.s4(s4), .s3(s3), .s5(s5), .seu(seu_raw));

  always_comb seu = seu_raw && !rst;

  pd_correction_demux u_demux (.seu(seu), .q(q), .preset(fix_set), .clear(fix_clr));

  always_comb begin
    preset = fix_set;
    clear  = fix_clr || rst;
  end

  // a correction drives exactly one of the two direct inputs
  always_comb assert (!(preset && clear)) else $error("preset and clear both driven");
endmodule

// pd_seu_function: the SEU decision of one protected flip-flop.
//
// A transition of the flip-flop output (pulse S4 from the Q pulse detector)
// is an upset when it does not fall inside the clock window (pulse S3 from
// the CLK pulse detector) and no correction is already in progress in this
// clock cycle (S5, the group latch). seu = S4 & ~S3 & ~S5.
// The S4/S3 term is the detection rule of the technique; the S5 term is the
// one that keeps the flip-flop's own correction flip from being taken as a
// second upset. Purely combinational, no clock.
module pd_seu_function (
  input  logic s4,   // Q transition pulse
  input  logic s3,   // clock window pulse
  input  logic s5,   // group latch: an upset was already corrected this cycle
  output logic seu   // upset detected on this flip-flop
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb seu = s4 && !s3 && !s5;
endmodule

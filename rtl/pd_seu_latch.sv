// pd_seu_latch: the group latch (S5). It records that an upset was detected
// in the current clock cycle and holds that until the next clock pulse S3.
//
// Set/reset latch: set by the ORed SEU signal of the group, cleared by the
// CLK pulse detector output S3 (clear has priority; the SEU function never
// raises SEU while S3 is high). While S5 is high the SEU function of every
// flip-flop of the group is held off, so the transition caused by the
// correction itself is not taken for a new upset. This only works if S5 rises
// before the corrected flip-flop output changes, so the output carries the
// latch's response time T_LATCH (simulation timing, ignored by synthesis),
// which must be shorter than the flip-flop's preset/clear-to-Q delay.
// The set/reset reading of the latch is this design's choice.
// Lint note: in a group, S5 feeds back through the SEU function into this
// latch's own set input. Tools report that as a combinational loop; it is
// the intended asynchronous feedback that ends each correction pulse, and
// the latch delay keeps it from oscillating (S5 high removes the set).
// The latch itself is intended, too: S5 must hold between clock edges.
module pd_seu_latch
  import pd_edac_pkg::*;
#(
  parameter realtime T_LATCH = T_LATCH_DEF  // response time, ns
) (
  input  logic set,  // ORed SEU of the group
  input  logic clr,  // S3, clock window pulse
  output logic s5    // latched "upset corrected this cycle"
);
  timeunit 1ns;
  timeprecision 1ps;

  logic state;

  always_latch begin
    if (clr)      state = 1'b0;
    else if (set) state = 1'b1;
  end

  assign #(T_LATCH) s5 = state;
endmodule

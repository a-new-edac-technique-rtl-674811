// pd_edac_group: N flip-flops protected by one pulse-detector EDAC group.
//
// Every flip-flop has its own individual block (Q pulse detector, SEU
// function, correction demultiplexer); the N SEU signals are ORed into the
// set input of the single latch of the common block, which also produces the
// clock window S3 for all N. An upset (a change of a flip-flop output outside
// the clock window) is corrected within about the flip-flop's preset/clear
// delay through its direct preset or clear. One upset per group per clock
// cycle is corrected: after the first, the latch holds detection off until
// the next clock edge. An upset during the clock window itself is not seen.
// N is limited in practice by the delay of the OR network, which must stay
// below the flip-flop's preset/clear delay; that is why a wide register is
// split into several groups (pd_edac_register).
// Ports: register-style clk/rst/d/q, a simulation-only per-bit upset input,
// and the group latch S5 as a status output. q follows d T_CQ after each
// rising clock edge; rst clears q asynchronously.
// The loop S5 -> SEU function -> OR network -> latch -> S5 and the loop
// Q -> Q pulse detector -> demultiplexer -> direct preset/clear -> Q are the
// self-timed feedback paths the technique is built on; lint reports them as
// combinational loops and they are kept on purpose.
// Elaboration stops with an error if the delay parameters break the
// orderings: T_LATCH < T_CQ, T_DELAY < T_CQ, T_DELAY + PW_CLK > T_CQ + PW_Q.
module pd_edac_group
  import pd_edac_pkg::*;
#(
  parameter int unsigned N       = 8,            // flip-flops in the group
  parameter realtime     T_CQ    = T_CQ_DEF,
  parameter realtime     T_DELAY = T_DELAY_DEF,
  parameter realtime     PW_Q    = PW_Q_DEF,
  parameter realtime     PW_CLK  = PW_CLK_DEF,
  parameter realtime     T_LATCH = T_LATCH_DEF
) (
  input  logic         clk,
  input  logic         rst,    // asynchronous clear, active high
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  input  logic [N-1:0] upset,  // fault injection only; tie to 0
  output logic         s5      // an upset was corrected in this cycle
);
  timeunit 1ns;
  timeprecision 1ps;

  // The delay orderings the scheme depends on; see the header comment.
  if (!(T_LATCH < T_CQ)) begin : g_chk_latch
    $error("T_LATCH must be below T_CQ, or a correction is seen as a new upset");
  end
  if (!(T_DELAY < T_CQ)) begin : g_chk_delay
    $error("T_DELAY must be below T_CQ, so the clock window opens before Q changes");
  end
  if (!(T_DELAY + PW_CLK > T_CQ + PW_Q)) begin : g_chk_window
    $error("the clock window must close after the Q pulse of a legal load");
  end

  logic         s3, seu_any;
  logic [N-1:0] preset, clear, seu;

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic qn_unused;

    pd_dff #(.T_CQ(T_CQ)) u_ff (
      .clk(clk), .d(d[i]), .set(preset[i]), .clr(clear[i]), .upset(upset[i]),
      .q(q[i]), .qn(qn_unused)
    );

    pd_individual_block #(.PW_Q(PW_Q)) u_ib (
      .q(q[i]), .s3(s3), .s5(s5), .rst(rst),
      .preset(preset[i]), .clear(clear[i]), .seu(seu[i])
    );
  end

  pd_or_network #(.N(N)) u_or (.seu(seu), .any(seu_any));

  pd_common_block #(.T_DELAY(T_DELAY), .PW_CLK(PW_CLK), .T_LATCH(T_LATCH)) u_cb (
    .clk(clk), .rst(rst), .seu(seu_any), .s3(s3), .s5(s5)
  );
endmodule

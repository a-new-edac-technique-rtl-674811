// pd_edac_register: a WIDTH-bit register hardened against single event
// upsets with pulse detectors instead of triple modular redundancy.
//
// The register is split into ceil(WIDTH/GROUP) groups of at most GROUP
// flip-flops (the last group may be smaller). Each group is a pd_edac_group:
// one flip-flop plus an individual block per bit, and one common block
// (clock delay, clock pulse detector, latch) per group. Splitting keeps the
// OR network of each group short and means a multi-bit upset only defeats
// the scheme if it hits a group's latch together with one of its
// flip-flops.
// Interface: clk, rst (asynchronous clear, active high), d/q as for a plain
// register, q valid T_CQ after each rising clock edge; upset is a
// simulation-only fault-injection input per bit (tie to 0 in use);
// seu_latched has one bit per group, high from a corrected upset until the
// next clock edge.
// WIDTH = 8 is the register of the fault-injection case study. GROUP = 8 is
// own choice: the technique names clustering but gives no group size.
module pd_edac_register
  import pd_edac_pkg::*;
#(
  parameter int unsigned WIDTH   = 8,  // register bits
  parameter int unsigned GROUP   = 8,  // flip-flops per protection group
  parameter realtime     T_CQ    = T_CQ_DEF,
  parameter realtime     T_DELAY = T_DELAY_DEF,
  parameter realtime     PW_Q    = PW_Q_DEF,
  parameter realtime     PW_CLK  = PW_CLK_DEF,
  parameter realtime     T_LATCH = T_LATCH_DEF,
  localparam int unsigned NGROUPS = (WIDTH + GROUP - 1) / GROUP
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [WIDTH-1:0]   d,
  output logic [WIDTH-1:0]   q,
  input  logic [WIDTH-1:0]   upset,
  output logic [NGROUPS-1:0] seu_latched
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar g = 0; g < NGROUPS; g++) begin : g_grp
    localparam int unsigned LO = g * GROUP;
    localparam int unsigned HI = (LO + GROUP < WIDTH) ? LO + GROUP - 1 : WIDTH - 1;

    pd_edac_group #(
      .N(HI - LO + 1), .T_CQ(T_CQ), .T_DELAY(T_DELAY),
      .PW_Q(PW_Q), .PW_CLK(PW_CLK), .T_LATCH(T_LATCH)
    ) u_grp (
      .clk(clk), .rst(rst), .d(d[HI:LO]), .q(q[HI:LO]), .upset(upset[HI:LO]),
      .s5(seu_latched[g])
    );
  end
endmodule

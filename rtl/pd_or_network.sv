// pd_or_network: ORs the SEU outputs of the N individual blocks of a group
// into the single set input of the group's latch. Combinational; written as a
// reduction, the gate tree is left to synthesis. Its delay grows with N,
// which is why flip-flops are clustered into small groups.
module pd_or_network #(
  parameter int unsigned N = 8   // flip-flops in the group
) (
  input  logic [N-1:0] seu,  // one SEU signal per flip-flop
  output logic         any   // at least one upset in the group
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb any = |seu;
endmodule

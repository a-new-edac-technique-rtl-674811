// tb_pd_or_network: zero, walking-one and random patterns on a 12-input OR
// network, compared with a loop-computed OR.
module tb_pd_or_network;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 12;
  logic [N-1:0] seu;
  logic any;
  int checks = 0, failures = 0;

  pd_or_network #(.N(N)) dut (.seu(seu), .any(any));

  task automatic check();
    logic exp = 1'b0;
    for (int i = 0; i < N; i++) exp = exp || seu[i];
    checks++;
    if (any !== exp) begin
      failures++;
      $display("FAIL seu=%b any=%b", seu, any);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seu = '0; #1 check();
    for (int i = 0; i < N; i++) begin
      seu = '0; seu[i] = 1'b1; #1 check();
    end
    for (int k = 0; k < 50; k++) begin
      seu = N'($urandom) & N'($urandom); #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

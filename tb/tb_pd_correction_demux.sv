// tb_pd_correction_demux: checks that an upset is routed to preset when the
// flip-flop reads 0 and to clear when it reads 1, and nowhere otherwise.
module tb_pd_correction_demux;
  timeunit 1ns;
  timeprecision 1ps;

  logic seu, q, preset, clear;
  int checks = 0, failures = 0;

  pd_correction_demux dut (.seu(seu), .q(q), .preset(preset), .clear(clear));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {seu, q} = 2'(v);
      #1;
      checks++;
      if (preset !== (v == 2'b10) || clear !== (v == 2'b11)) begin
        failures++;
        $display("FAIL seu=%b q=%b preset=%b clear=%b", seu, q, preset, clear);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

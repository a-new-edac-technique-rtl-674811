// tb_pd_seu_function: exhaustive check of the SEU decision against the rule
// "a Q pulse outside the clock window, with the group latch clear".
module tb_pd_seu_function;
  timeunit 1ns;
  timeprecision 1ps;

  logic s4, s3, s5, seu;
  int checks = 0, failures = 0;

  pd_seu_function dut (.s4(s4), .s3(s3), .s5(s5), .seu(seu));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s4, s3, s5} = 3'(v);
      #1;
      checks++;
      // only the pattern S4=1, S3=0, S5=0 is an upset
      if (seu !== (v == 3'b100)) begin
        failures++;
        $display("FAIL s4=%b s3=%b s5=%b seu=%b", s4, s3, s5, seu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

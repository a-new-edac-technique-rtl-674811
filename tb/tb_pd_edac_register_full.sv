// tb_pd_edac_register_full: fault-injection campaign on the register at its
// default size (8 bits, one group), 100 ns clock, 1000 upsets.
//
// One upset per clock cycle, on a random bit, at a uniformly random time in
// the first 96 ns after the rising edge, with new random data every cycle.
// An upset is "vulnerable" when the register still differs from the
// reference model (d at the last edge) at 98 ns. The only undetectable
// upsets are those whose Q pulse falls inside the clock window, so:
//   - every upset later than 2 ns after the edge must be corrected (failure
//     otherwise);
//   - the vulnerable fraction must stay within a few percent; it is printed
//     next to the window fraction it should approach (clock window 1.2 ns
//     of a 100 ns period).
module tb_pd_edac_register_full;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 8;
  localparam realtime PERIOD = 100.0;
  localparam int unsigned UPSETS = 1000;

  logic clk, rst;
  logic [WIDTH-1:0] d, q, upset, golden;
  logic [0:0] seu_latched;
  realtime t0;
  int checks = 0, failures = 0, vulnerable = 0, early = 0, late_ok = 0;

  pd_edac_register dut (
    .clk(clk), .rst(rst), .d(d), .q(q), .upset(upset), .seu_latched(seu_latched)
  );

  task automatic at(input realtime t);
    if (t0 + t > $realtime) #(t0 + t - $realtime);
  endtask

  initial begin
    #(PERIOD * (UPSETS + 10));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst = 1; d = '0; upset = '0; golden = '0;
    #20 rst = 0;
    t0 = $realtime;
    for (int k = 0; k < UPSETS; k++) begin
      int b;
      realtime t;
      at(50); clk = 0; d = WIDTH'($urandom);
      at(100); clk = 1; t0 = $realtime; golden = d;
      b = $urandom_range(WIDTH - 1);
      t = real'($urandom_range(96000)) / 1000.0;   // 0 .. 96 ns, 1 ps steps
      at(t);
      upset[b] = 1'b1;
      #0.05 upset[b] = 1'b0;
      at(98);
      if (t < 2.0) early++;
      if (q != golden) begin
        vulnerable++;
        if (t >= 2.0) begin
          failures++;
          $display("FAIL upset at %f ns on bit %0d not corrected", t, b);
        end
      end else if (t >= 2.0) begin
        late_ok++;
      end
      checks++;
    end
    checks++;
    if (vulnerable * 100 > UPSETS * 3) begin
      failures++;
      $display("FAIL vulnerable fraction too high");
    end
    $display("injected=%0d vulnerable=%0d (%0d.%0d%%), upsets in the first 2 ns=%0d, corrected later upsets=%0d",
             UPSETS, vulnerable, vulnerable * 100 / UPSETS, (vulnerable * 1000 / UPSETS) % 10,
             early, late_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

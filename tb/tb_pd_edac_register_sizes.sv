// tb_pd_edac_register_sizes: the register sizes of the area comparison
// (8 to 1024 bits), each built as groups of 8 flip-flops, run side by side
// for 60 clock cycles of 100 ns. Every cycle loads random data into all of
// them and strikes one random bit of each at a random time outside the clock
// window; every instance must show its reference value 2 ns after the strike
// and at the end of the cycle. Random wide words are built 32 bits at a time.
module tb_pd_edac_register_sizes;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NSIZES = 8;
  localparam int SIZES [NSIZES] = '{8, 16, 32, 64, 128, 256, 512, 1024};
  localparam int MAXW = 1024;
  localparam realtime PERIOD = 100.0;

  logic clk, rst;
  logic [MAXW-1:0] d, golden;
  logic [MAXW-1:0] q [NSIZES];
  logic [MAXW-1:0] upset [NSIZES];
  realtime t0;
  int checks = 0, failures = 0, strikes = 0;

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int W = SIZES[s];
    logic [W-1:0] qs;
    logic [(W + 7) / 8 - 1:0] latched;

    pd_edac_register #(.WIDTH(W), .GROUP(8)) dut (
      .clk(clk), .rst(rst), .d(d[W-1:0]), .q(qs), .upset(upset[s][W-1:0]),
      .seu_latched(latched)
    );

    always_comb q[s] = MAXW'(qs);
  end

  task automatic at(input realtime t);
    if (t0 + t > $realtime) #(t0 + t - $realtime);
  endtask

  task automatic check_all(input string what);
    for (int s = 0; s < NSIZES; s++) begin
      logic [MAXW-1:0] mask;
      mask = (SIZES[s] == MAXW) ? '1 : ((MAXW'(1) << SIZES[s]) - 1);
      checks++;
      if ((q[s] & mask) != (golden & mask)) begin
        failures++;
        $display("FAIL %s, %0d-bit register at %t", what, SIZES[s], $realtime);
      end
    end
  endtask

  initial begin
    #(PERIOD * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst = 1; d = '0; golden = '0;
    for (int s = 0; s < NSIZES; s++) upset[s] = '0;
    #20 rst = 0;
    t0 = $realtime;
    for (int k = 0; k < 60; k++) begin
      realtime t;
      at(50); clk = 0;
      for (int w = 0; w < MAXW / 32; w++) d[w * 32 +: 32] = $urandom;
      at(100); clk = 1; t0 = $realtime; golden = d;
      t = 3.0 + real'($urandom_range(9000)) / 100.0;
      at(t);
      for (int s = 0; s < NSIZES; s++) upset[s][$urandom_range(SIZES[s] - 1)] = 1'b1;
      strikes += NSIZES;
      #0.05;
      for (int s = 0; s < NSIZES; s++) upset[s] = '0;
      at(t + 2.0); check_all("strike corrected");
      at(98); check_all("value held");
    end
    $display("strikes=%0d", strikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

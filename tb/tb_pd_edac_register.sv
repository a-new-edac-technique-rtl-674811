// tb_pd_edac_register: end-to-end test of the clustered register, 12 bits in
// groups of 8 (two groups, the second one partial), 100 ns clock.
//
// A reference model holds the value the register must show (d at the last
// rising edge). Scenarios, each counted; a scenario that never happens is a
// failure:
//   load     - plain loads, no upset: q follows d and no group latch rises;
//   preset   - upset 1->0 outside the clock window: corrected within 1 ns;
//   clear    - upset 0->1 outside the clock window: corrected within 1 ns;
//   latch    - the group latch rises with a correction and falls at the
//              next clock window;
//   second   - a second upset in the same group and cycle is not corrected
//              (one correction per group per cycle), but the next load
//              repairs it;
//   groups   - upsets in two different groups in one cycle are both
//              corrected;
//   mbu      - a multi-bit upset, three flip-flops of one group struck at
//              the same instant, is corrected in full;
//   window   - an upset that falls entirely inside the clock window is not
//              detected and stays until the next load;
//   reset    - rst clears the register without a latch rising.
module tb_pd_edac_register;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 12, GROUP = 8;
  localparam int unsigned NG = (WIDTH + GROUP - 1) / GROUP;
  localparam realtime PERIOD = 100.0;

  logic clk, rst;
  logic [WIDTH-1:0] d, q, upset, golden;
  logic [NG-1:0] seu_latched;
  realtime t0;   // time of the last rising clock edge
  int checks = 0, failures = 0;
  int n_load = 0, n_preset = 0, n_clear = 0, n_latch = 0, n_second = 0;
  int n_groups = 0, n_window = 0, n_reset = 0, n_mbu = 0;

  pd_edac_register #(.WIDTH(WIDTH), .GROUP(GROUP)) dut (
    .clk(clk), .rst(rst), .d(d), .q(q), .upset(upset), .seu_latched(seu_latched)
  );

  task automatic at(input realtime t);   // wait until t ns after the last edge
    if (t0 + t > $realtime) #(t0 + t - $realtime);
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t: q=%h golden=%h latch=%b", what, $realtime, q, golden, seu_latched);
    end
  endtask

  // next rising edge, loading a new random value
  task automatic next_edge();
    at(PERIOD / 2);
    clk = 0;
    d = WIDTH'($urandom);
    at(PERIOD);
    clk = 1;
    t0 = $realtime;
    golden = d;
  endtask

  task automatic strike(input int b);
    upset[b] = 1'b1;
    #0.05 upset[b] = 1'b0;
  endtask

  // upset of bit b at t ns after the edge, expected to be corrected
  task automatic corrected_upset(input int b, input realtime t);
    logic was;
    at(t);
    was = golden[b];
    strike(b);
    at(t + 1.0);
    check(q == golden, "upset corrected");
    check(seu_latched[b / GROUP] == 1'b1, "latch set by correction");
    if (was) n_preset++; else n_clear++;
  endtask

  initial begin
    #(PERIOD * 400);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; rst = 1; d = '0; upset = '0; golden = '0; t0 = 0.0;
    #20 rst = 0;
    t0 = $realtime - PERIOD / 2;
    next_edge();
    check(1'b1, "start");

    // loads, no upsets
    repeat (20) begin
      at(10); check(q == golden, "load");
      check(seu_latched == '0, "no false detection on a load");
      n_load++;
      next_edge();
    end

    // single corrected upsets on random bits and times
    repeat (60) begin
      int b;
      realtime t;
      b = $urandom_range(WIDTH - 1);
      t = 3.0 + real'($urandom_range(9000)) / 100.0;   // 3 .. 93 ns
      corrected_upset(b, t);
      at(97); check(q == golden, "stays corrected");
      next_edge();
      at(2.5); check(seu_latched == '0, "latch cleared by the clock window");
      n_latch++;
    end

    // second upset in the same group and cycle
    repeat (5) begin
      corrected_upset(0, 20.0);
      at(40);
      strike(1);
      at(41); check(q[1] != golden[1], "second upset left uncorrected");
      n_second++;
      next_edge();
      at(5); check(q == golden, "next load repairs it");
    end

    // upsets in two groups in the same cycle
    repeat (5) begin
      at(30);
      upset[2] = 1'b1;
      upset[WIDTH - 1] = 1'b1;
      #0.05 upset = '0;
      at(31);
      check(q == golden, "both groups corrected");
      check(seu_latched == '1, "both latches set");
      n_groups++;
      next_edge();
    end

    // multi-bit upset inside one group
    repeat (5) begin
      at(60);
      upset[6:4] = 3'b111;
      #0.05 upset = '0;
      at(61);
      check(q == golden, "multi-bit upset corrected");
      check(seu_latched[0] == 1'b1, "latch set by the multi-bit upset");
      n_mbu++;
      next_edge();
    end

    // upset entirely inside the clock window: 0.45 .. 1.45 ns inside 0.4 .. 1.6
    repeat (3) begin
      at(0.45);
      strike(3);
      at(20); check(q[3] != golden[3], "upset inside window undetected");
      check(seu_latched == '0, "no latch for undetected upset");
      n_window++;
      next_edge();
      at(5); check(q == golden, "repaired by next load");
      next_edge();
    end

    // reset in mid-operation
    at(30);
    check(q != '0 || golden == '0, "non-zero before reset");
    rst = 1;
    at(35); check(q == '0, "reset clears");
    check(seu_latched == '0, "reset raises no latch");
    rst = 0; golden = '0; n_reset++;
    at(60); check(q == '0, "still clear");
    next_edge();
    at(5); check(q == golden, "loads after reset");

    check(n_load > 0,   "mechanism load");
    check(n_preset > 0, "mechanism preset correction");
    check(n_clear > 0,  "mechanism clear correction");
    check(n_latch > 0,  "mechanism latch");
    check(n_second > 0, "mechanism second upset blocked");
    check(n_groups > 0, "mechanism two groups");
    check(n_window > 0, "mechanism window miss");
    check(n_reset > 0,  "mechanism reset");
    check(n_mbu > 0,    "mechanism multi-bit upset");
    $display("load=%0d preset=%0d clear=%0d latch=%0d second=%0d groups=%0d mbu=%0d window=%0d reset=%0d",
             n_load, n_preset, n_clear, n_latch, n_second, n_groups, n_mbu, n_window, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

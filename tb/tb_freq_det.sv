// tb_freq_det: directed timing cases for the frequency detector. The
// external divided clock goes through a two-flop synchroniser, so its event
// is seen two clocks after the input rises; the cases are placed relative
// to that event. Expected results follow the rule: events within one clock
// of each other match, otherwise the lone event gives fast (internal) or
// slow (external) one clock after its window closes.
`timescale 1ps / 1ps
module tb_freq_det;
  logic clk = 1'b0, rst_n = 1'b0;
  logic int_evt = 1'b0, ext_div = 1'b0;
  logic ext_evt, fast, slow, match;
  logic tmr_err;
  int checks = 0, failures = 0;
  int n_fast = 0, n_slow = 0, n_match = 0;
  int t = 0, t_fast = -1;

  freq_det dut (.*);

  always #5000 clk = ~clk;

  always @(posedge clk) begin
    t++;
    if (fast) begin n_fast++; t_fast = t; end
    if (slow) n_slow++;
    if (match) n_match++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // External event is seen SYNC clocks after ext_div rises.
  localparam int SYNC = 2;

  // Schedule an internal event at clock `ti` and an external event at clock
  // `te` (relative to now, as seen by the detector), then count results.
  task automatic run_case(input int ti, input int te, input int ef, input int es,
                          input int em, input string name);
    int t0 = t;
    n_fast = 0; n_slow = 0; n_match = 0;
    fork
      if (ti >= 0) begin
        repeat (ti + SYNC) @(negedge clk);
        int_evt = 1'b1;
        @(negedge clk);
        int_evt = 1'b0;
      end
      if (te >= 0) begin
        repeat (te) @(negedge clk);
        ext_div = 1'b1;
        repeat (SYNC + 2) @(negedge clk);
        ext_div = 1'b0;
      end
    join
    repeat (12) @(negedge clk);
    check(n_fast == ef && n_slow == es && n_match == em,
          $sformatf("%s: fast=%0d slow=%0d match=%0d (t0=%0d)", name, n_fast, n_slow,
                    n_match, t0));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    run_case(0, 0, 0, 0, 1, "simultaneous");
    run_case(0, 1, 0, 0, 1, "external one clock later");
    run_case(1, 0, 0, 0, 1, "internal one clock later");
    run_case(0, 2, 1, 1, 0, "external two clocks later");
    run_case(2, 0, 1, 1, 0, "internal two clocks later");
    run_case(0, -1, 1, 0, 0, "internal alone");
    run_case(-1, 0, 0, 1, 0, "external alone");
    run_case(0, 5, 1, 1, 0, "far apart");
    // Latency: the internal event is sampled on edge ti+1, its window closes
    // on edge ti+2, which registers fast; it is seen on edge ti+3.
    begin
      int ti;
      n_fast = 0;
      @(negedge clk);
      int_evt = 1'b1;
      ti = t;
      @(negedge clk);
      int_evt = 1'b0;
      repeat (4) @(negedge clk);
      check(n_fast == 1 && t_fast == ti + 3, $sformatf("fast latency %0d", t_fast - ti));
    end
    check(!tmr_err, "triplicated copies agree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd100_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

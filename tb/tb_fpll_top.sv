// tb_fpll_top: end-to-end test of the clock multiplier.
//
// Drives an input clock, lets the loop acquire, and measures the output
// frequency by counting output edges over a window of input clocks. It runs
// every multiplication mode at an input frequency from the published lock
// measurements (2x at 37 MHz, 2.5x at 32 MHz, 4x at 18.8 and 50 MHz, 8x at
// 9.2 and 46.6 MHz), switches modes without reset, steps the code from the
// open-loop port, and upsets one copy of the triplicated code register. It
// counts each loop mechanism (fast, slow, match, frequency lock, phase
// advance, phase retard, open-loop increment/decrement, mode switch, TMR
// repair) and fails if one never occurred. The top runs with its default
// parameters.
`timescale 1ps / 1ps
module tb_fpll_top;
  import fpll_pkg::*;

  logic  clk_in = 1'b0;
  logic  rst_n = 1'b0;
  mult_e mult_sel = MULT_4X;
  logic  nco_en = 1'b1;
  logic  open_loop = 1'b0;
  logic  ext_inc = 1'b0;
  logic  ext_dec = 1'b0;
  logic  clk_out, in_mon, out_mon, freq_ok, tmr_err;
  code_t code;
  logic [7:0] adj_count;

  int unsigned in_half_ps = 10000;
  int checks = 0, failures = 0;

  fpll_top dut (.*);

  always #(in_half_ps) clk_in = ~clk_in;

  // Mechanism counters, sampled on the output clock.
  int n_fast = 0, n_slow = 0, n_match = 0, n_lock = 0, n_adv = 0, n_ret = 0;
  int n_ext_inc = 0, n_ext_dec = 0, n_switch = 0, n_tmr = 0;
  logic freq_ok_d = 1'b0;
  always @(posedge clk_out) begin
    if (dut.fast)    n_fast++;
    if (dut.slow)    n_slow++;
    if (dut.match)   n_match++;
    if (dut.advance) n_adv++;
    if (dut.retard)  n_ret++;
    if (freq_ok && !freq_ok_d) n_lock++;
    freq_ok_d <= freq_ok;
  end

  int unsigned out_edges = 0;
  always @(posedge clk_out) out_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_in(input int n);
    repeat (n) @(posedge clk_in);
  endtask

  // Let the loop acquire for `settle` input clocks (the loop moves the code
  // by at most one step per input-counter period, so acquisition is slow),
  // requiring that frequency lock was reported, then measure the
  // output/input frequency ratio over `win` input clocks.
  task automatic lock_and_measure(input real mult, input int settle, input int win,
                                  input string name);
    int locked = 0;
    int unsigned e0;
    real ratio;
    repeat (settle) begin
      @(posedge clk_in);
      if (freq_ok) locked++;
    end
    check(locked > 0, {name, ": frequency lock reported"});
    e0 = out_edges;
    wait_in(win);
    ratio = real'(out_edges - e0) / real'(win);
    $display("%s: code=%0d ratio=%f (expected %f), locked %0d of %0d input clocks",
             name, code, ratio, mult, locked, settle);
    check(ratio > mult * 0.99 && ratio < mult * 1.01, {name, ": output/input ratio"});
  endtask

  task automatic run_mode(input mult_e m, input real mult, input int unsigned half_ps,
                          input string name);
    if (m != mult_sel) n_switch++;
    mult_sel   = m;
    in_half_ps = half_ps;
    wait_in(4);
    // A new mode must first lose and regain lock.
    lock_and_measure(mult, 5000, 400, name);
  endtask

  task automatic pulse(ref logic sig);
    sig = 1'b1;
    wait_in(2);
    sig = 1'b0;
    wait_in(2);
  endtask

  initial begin
    code_t c0;
    int unsigned a0;
    repeat (5) @(posedge clk_in);
    rst_n = 1'b1;

    // 4x from 50 MHz: 200 MHz output.
    lock_and_measure(4.0, 5000, 400, "4x at 50 MHz");

    // 2.5x at 32 MHz (frequency lock only: no phase steps).
    run_mode(MULT_2P5X, 2.5, 15625, "2.5x at 32 MHz");
    a0 = adj_count;
    wait_in(400);
    check(adj_count == a0, "2.5x: no phase adjustment while locked");

    // 8x at 46.6 MHz (372.8 MHz output) and at 9.2 MHz (73.6 MHz).
    run_mode(MULT_8X, 8.0, 10730, "8x at 46.6 MHz");
    run_mode(MULT_8X, 8.0, 54348, "8x at 9.2 MHz");

    // 2x at 37 MHz: 74 MHz output.
    run_mode(MULT_2X, 2.0, 13514, "2x at 37 MHz");

    // 4x at 18.8 MHz: 75.2 MHz output.
    run_mode(MULT_4X, 4.0, 26596, "4x at 18.8 MHz");

    // Phase steps occurred in the integer modes.
    check(adj_count != 0, "phase adjustments in integer modes");

    // Open loop: the external controller steps the code.
    open_loop = 1'b1;
    wait_in(4);
    c0 = code;
    repeat (5) begin pulse(ext_inc); n_ext_inc++; end
    check(code == c0 + code_t'(5), "open loop: five increments");
    repeat (2) begin pulse(ext_dec); n_ext_dec++; end
    check(code == c0 + code_t'(3), "open loop: two decrements");
    wait_in(50);
    check(code == c0 + code_t'(3), "open loop: detectors ignored");

    // TMR: upset one copy of the code register; the voted code must not
    // move and the copy must be repaired on the next clock.
    c0 = code;
    @(negedge clk_out);
    force dut.u_ctrl.u_code.copy_b = ~c0;
    @(negedge clk_out);
    check(tmr_err, "TMR: disagreement flagged");
    check(code == c0, "TMR: voted code unaffected");
    release dut.u_ctrl.u_code.copy_b;
    @(negedge clk_out);
    @(negedge clk_out);
    check(!tmr_err && code == c0, "TMR: upset copy repaired");
    if (!tmr_err && code == c0) n_tmr++;

    // Back to closed loop: relock.
    open_loop = 1'b0;
    lock_and_measure(4.0, 2000, 400, "4x relock after open loop");

    // Upset one copy of the output counter while locked: the vote hides it,
    // the copy is repaired, and the output stays locked.
    @(negedge clk_out);
    force dut.u_out_cnt.u_cnt.copy_c = 5'd3;
    @(negedge clk_out);
    check(tmr_err, "TMR: output counter upset flagged");
    release dut.u_out_cnt.u_cnt.copy_c;
    repeat (3) @(negedge clk_out);
    check(!tmr_err, "TMR: output counter copy repaired");
    if (!tmr_err) n_tmr++;
    // Frequency must stay locked (lock reporting itself is intermittent at
    // this frequency, so only the ratio is checked).
    begin
      int unsigned e0;
      real ratio;
      e0 = out_edges;
      wait_in(400);
      ratio = real'(out_edges - e0) / 400.0;
      $display("4x after counter upset: code=%0d ratio=%f", code, ratio);
      check(ratio > 3.96 && ratio < 4.04, "4x after counter upset: output/input ratio");
    end

    $display("mechanisms: fast=%0d slow=%0d match=%0d lock=%0d advance=%0d retard=%0d",
             n_fast, n_slow, n_match, n_lock, n_adv, n_ret);
    $display("            ext_inc=%0d ext_dec=%0d mode_switch=%0d tmr_repair=%0d",
             n_ext_inc, n_ext_dec, n_switch, n_tmr);
    check(n_fast > 0,    "mechanism: fast");
    check(n_slow > 0,    "mechanism: slow");
    check(n_match > 0,   "mechanism: match");
    check(n_lock > 1,    "mechanism: frequency lock (more than once)");
    check(n_adv > 0,     "mechanism: phase advance");
    check(n_ret > 0,     "mechanism: phase retard");
    check(n_ext_inc > 0, "mechanism: open-loop increment");
    check(n_ext_dec > 0, "mechanism: open-loop decrement");
    check(n_switch > 0,  "mechanism: mode switch");
    check(n_tmr > 1,     "mechanism: TMR repair (register and counter)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 20 ms of simulated time.
  initial begin
    #(64'd20_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

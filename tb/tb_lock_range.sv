// tb_lock_range: lock range of the clock multiplier at default parameters.
//
// The output range is set by the NCO: 400 MHz at code 0 down to 72.9 MHz at
// code 255. Inside the range the loop must lock to the exact ratio; outside
// it the code must run into its end stop and stay there, with the output as
// close as it can get (faster than wanted below the range, slower above it).
// Cases: 2x at 52.5 MHz (top of the published input range for 2x), 2x at
// 34 MHz (68 MHz wanted, below range), 8x at 52 MHz (416 MHz wanted, above
// range) and 2.5x at 30 MHz (75 MHz wanted, just inside the range).
`timescale 1ps / 1ps
module tb_lock_range;
  import fpll_pkg::*;

  logic  clk_in = 1'b0;
  logic  rst_n = 1'b0;
  mult_e mult_sel = MULT_2X;
  logic  nco_en = 1'b1, open_loop = 1'b0, ext_inc = 1'b0, ext_dec = 1'b0;
  logic  clk_out, in_mon, out_mon, freq_ok, tmr_err;
  code_t code;
  logic [7:0] adj_count;
  int unsigned in_half_ps = 10000;
  int checks = 0, failures = 0;
  int unsigned out_edges = 0;

  fpll_top dut (.*);

  always #(in_half_ps) clk_in = ~clk_in;
  always @(posedge clk_out) out_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run one case from reset; return the measured ratio.
  task automatic run(input mult_e m, input int unsigned half_ps, output real ratio);
    int unsigned e0;
    rst_n = 1'b0;
    mult_sel = m;
    in_half_ps = half_ps;
    repeat (4) @(posedge clk_in);
    rst_n = 1'b1;
    repeat (6000) @(posedge clk_in);
    e0 = out_edges;
    repeat (400) @(posedge clk_in);
    ratio = real'(out_edges - e0) / 400.0;
  endtask

  initial begin
    real r;
    run(MULT_2X, 9524, r);               // 52.5 MHz -> 105 MHz
    $display("2x at 52.5 MHz: code=%0d ratio=%f", code, r);
    check(r > 1.98 && r < 2.02, "2x at 52.5 MHz locks");

    run(MULT_2P5X, 16667, r);            // 30 MHz -> 75 MHz
    $display("2.5x at 30 MHz: code=%0d ratio=%f", code, r);
    check(r > 2.475 && r < 2.525, "2.5x at 30 MHz locks");

    run(MULT_2X, 14706, r);              // 34 MHz -> 68 MHz wanted
    $display("2x at 34 MHz: code=%0d ratio=%f", code, r);
    check(code == code_t'(255), "below range: code at its upper end stop");
    check(r > 2.1, "below range: output stays at the slowest NCO setting");

    run(MULT_8X, 9615, r);               // 52 MHz -> 416 MHz wanted
    $display("8x at 52 MHz: code=%0d ratio=%f", code, r);
    check(code <= code_t'(1), "above range: code held at its lower end");
    check(r < 7.8 && r > 7.5, "above range: output stays at 400 MHz");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

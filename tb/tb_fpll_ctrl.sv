// tb_fpll_ctrl: checks the code register of the loop controller against a
// model: +1 on fast, -1 on slow, saturation at 0 and 255, lock after LOCK_N
// matches and loss on fast/slow, the one-clock phase step on the NCO code,
// and open-loop stepping from the asynchronous external inputs.
`timescale 1ps / 1ps
module tb_fpll_ctrl;
  import fpll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fast = 0, slow = 0, match = 0, advance = 0, retard = 0;
  logic open_loop = 0, ext_inc = 0, ext_dec = 0;
  code_t code, nco_code;
  logic freq_ok, tmr_err;
  int checks = 0, failures = 0;
  int model;

  fpll_ctrl #(.CODE_RST(code_t'(128)), .LOCK_N(4), .PH_STEP(2)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (code=%0d model=%0d)", what, code, model); end
  endtask

  task automatic step(input bit f, input bit s, input bit m);
    @(negedge clk);
    fast = f; slow = s; match = m;
    @(negedge clk);
    fast = 0; slow = 0; match = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    model = 128;
    check(code == 128 && nco_code == 128, "reset code");
    rst_n = 1'b1;
    // Random fast/slow sequence.
    repeat (300) begin
      int r = $urandom_range(0, 2);
      step(r == 0, r == 1, r == 2);
      if (r == 0 && model < 255) model++;
      if (r == 1 && model > 0)   model--;
      check(int'(code) == model, "fast/slow step");
    end
    // Saturation at the top and bottom.
    repeat (300) step(1, 0, 0);
    check(code == 255, "saturate at 255");
    repeat (300) step(0, 1, 0);
    check(code == 0, "saturate at 0");
    model = 0;
    // Lock after four matches, lost on fast.
    repeat (3) step(0, 0, 1);
    check(!freq_ok, "no lock after three matches");
    step(0, 0, 1);
    check(freq_ok, "lock after four matches");
    step(1, 0, 0);
    model = 1;
    check(!freq_ok, "lock lost on fast");
    repeat (10) step(1, 0, 0);
    model = 11;
    check(int'(code) == model, "code after fast run");
    // Phase step: one clock of code+2 / code-2 on the NCO code only.
    @(negedge clk);
    retard = 1'b1;
    #1;
    check(int'(nco_code) == model + 2 && int'(code) == model, "retard step");
    @(negedge clk);
    retard = 1'b0;
    #1;
    check(int'(nco_code) == model, "retard lasts one clock");
    advance = 1'b1;
    #1;
    check(int'(nco_code) == model - 2 && int'(code) == model, "advance step");
    @(negedge clk);
    advance = 1'b0;
    // Open loop: detectors ignored, external edges step the code.
    open_loop = 1'b1;
    repeat (5) step(1, 0, 0);
    check(int'(code) == model, "open loop ignores fast");
    repeat (7) begin
      @(negedge clk); ext_inc = 1'b1;
      repeat (3) @(negedge clk); ext_inc = 1'b0;
      repeat (3) @(negedge clk);
    end
    model += 7;
    check(int'(code) == model, "open loop: seven increments");
    repeat (3) begin
      @(negedge clk); ext_dec = 1'b1;
      repeat (3) @(negedge clk); ext_dec = 1'b0;
      repeat (3) @(negedge clk);
    end
    model -= 3;
    check(int'(code) == model, "open loop: three decrements");
    check(!tmr_err, "no TMR disagreement");
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

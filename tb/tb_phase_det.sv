// tb_phase_det: a 4x output clock is placed 300 ps after (late), then 300 ps
// before (early), the input clock edges; every input edge must give one
// comparison, all late or all early respectively.
`timescale 1ps / 1ps
module tb_phase_det;
  logic clk_ref = 1'b0, clk_out = 1'b0, rst_n = 1'b0;
  logic valid, early, late;
  logic tmr_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_early = 0, n_late = 0;
  int offset_ps = 300;          // positive: output late
  localparam int REF_HALF = 10000, OUT_HALF = 2500;

  phase_det dut (.*);

  // Input clock and an output clock at 4x whose rising edges sit
  // `offset_ps` after the input rising edges. `shift_ps` moves the output
  // once, to switch from the late case to the early case.
  int shift_ps = 0;
  initial forever begin
    #(REF_HALF) clk_ref = 1'b1;
    #(REF_HALF) clk_ref = 1'b0;
  end
  initial begin
    #(REF_HALF + offset_ps - OUT_HALF);
    forever begin
      automatic int d = OUT_HALF + shift_ps;
      shift_ps = 0;
      #(d);
      clk_out = ~clk_out;
    end
  end

  always @(posedge clk_out) begin
    if (valid) n_valid++;
    if (early) n_early++;
    if (late)  n_late++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(3 * REF_HALF);
    rst_n = 1'b1;
    #(20 * REF_HALF);
    n_valid = 0; n_early = 0; n_late = 0;
    #(40 * REF_HALF);
    check(n_valid == 20, $sformatf("late case: %0d comparisons", n_valid));
    check(n_late == n_valid && n_early == 0, $sformatf("late case: early=%0d late=%0d",
                                                       n_early, n_late));
    // Move the output 600 ps earlier: now 300 ps ahead of the input.
    shift_ps = -600;
    #(20 * REF_HALF);
    n_valid = 0; n_early = 0; n_late = 0;
    #(40 * REF_HALF);
    check(n_valid == 20, $sformatf("early case: %0d comparisons", n_valid));
    check(n_early == n_valid && n_late == 0, $sformatf("early case: early=%0d late=%0d",
                                                       n_early, n_late));
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

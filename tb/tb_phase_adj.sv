// tb_phase_adj: drives comparison results into the phase adjustment and
// checks that a request follows only while frequency is settled and phase
// control is enabled, that early gives retard and late gives advance one
// clock later, and that the HOLD comparisons after a request are ignored.
`timescale 1ps / 1ps
module tb_phase_adj;
  logic clk = 1'b0, rst_n = 1'b0;
  logic freq_ok = 1'b0, phase_en = 1'b1, valid = 1'b0, early = 1'b0, late = 1'b0;
  logic advance, retard;
  logic tmr_err;
  logic [7:0] adj_count;
  int checks = 0, failures = 0;

  phase_adj #(.HOLD(1)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Present one comparison and return what came out the next clock.
  task automatic compare(input bit is_early, output bit adv, output bit ret);
    @(negedge clk);
    valid = 1'b1; early = is_early; late = !is_early;
    @(negedge clk);
    valid = 1'b0; early = 1'b0; late = 1'b0;
    adv = advance; ret = retard;
    repeat (2) @(negedge clk);
    check(!advance && !retard, "request lasts one clock");
  endtask

  initial begin
    bit adv, ret;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Frequency not settled: nothing.
    compare(1'b1, adv, ret);
    check(!adv && !ret, "no request without frequency lock");
    // Settled, early: retard; next comparison held off; then late: advance.
    freq_ok = 1'b1;
    compare(1'b1, adv, ret);
    check(ret && !adv, "early gives retard");
    compare(1'b0, adv, ret);
    check(!adv && !ret, "comparison after a request is ignored");
    compare(1'b0, adv, ret);
    check(adv && !ret, "late gives advance");
    compare(1'b1, adv, ret);
    check(!adv && !ret, "hold again");
    // Phase control disabled (2.5x): nothing.
    phase_en = 1'b0;
    repeat (3) begin
      compare(1'b1, adv, ret);
      check(!adv && !ret, "no request when disabled");
    end
    phase_en = 1'b1;
    compare(1'b0, adv, ret);
    check(adv && !ret, "enabled again: advance");
    check(adj_count == 8'd3, $sformatf("request count %0d", adj_count));
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

// tb_nco: measures both half periods of the oscillator for random codes and
// compares them with BASE + tap * TAP + phase * FINE worked out from the
// code fields; checks the extreme frequencies (400 MHz at code 0, about
// 73 MHz at code 255), that a code change takes effect only at the next
// output transition, and that the enable stops the output low.
`timescale 1ps / 1ps
module tb_nco;
  logic [7:0] s = 8'd0;
  logic en = 1'b1, sout;
  int checks = 0, failures = 0;
  localparam int BASE = 1250, TAP = 88, FINE = 22;

  nco #(.BASE_PS(BASE), .TAP_PS(TAP), .FINE_PS(FINE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expect_half(input logic [7:0] c);
    return BASE + int'(c[7:2]) * TAP + int'(c[1:0]) * FINE;
  endfunction

  task automatic measure(input logic [7:0] c);
    longint t0, t1, t2;
    @(posedge sout);
    s = c;
    // The half period now running was started with the old code; skip it.
    @(negedge sout);
    @(posedge sout); t0 = $time;
    @(negedge sout); t1 = $time;
    @(posedge sout); t2 = $time;
    check(t1 - t0 == expect_half(c) && t2 - t1 == expect_half(c),
          $sformatf("code %0d: halves %0d/%0d expected %0d", c, t1 - t0, t2 - t1,
                    expect_half(c)));
  endtask

  initial begin
    longint t0, t1;
    measure(8'd0);
    check(expect_half(8'd0) * 2 == 2500, "400 MHz at code 0");
    measure(8'd255);
    check(expect_half(8'd255) * 2 > 13000 && expect_half(8'd255) * 2 < 14000,
          "about 73 MHz at code 255");
    repeat (40) measure(8'($urandom));
    // A code change in mid half period does not shorten that half period.
    s = 8'd100;
    @(posedge sout); t0 = $time;
    #(100);
    s = 8'd0;
    @(negedge sout); t1 = $time;
    check(t1 - t0 == expect_half(8'd100), "code taken only at a transition");
    // Enable low stops the oscillator with the output low.
    en = 1'b0;
    #(20000);
    t0 = $time;
    #(30000);
    check(sout == 1'b0, "stopped low");
    en = 1'b1;
    @(posedge sout); t1 = $time;
    check(t1 > t0, "restarts after enable");
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

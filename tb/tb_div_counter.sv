// tb_div_counter: runs the counter with each count the multiplier uses
// (2, 4, 5, 8, 16) and checks the distance between `done` pulses and the
// number of clocks `div` is high per period against the count.
`timescale 1ps / 1ps
module tb_div_counter;
  localparam int unsigned W = 5;
  logic clk = 1'b0, rst_n = 1'b0, done, div;
  logic tmr_err;
  logic [W-1:0] count = W'(2);
  int checks = 0, failures = 0;
  int counts[5] = '{2, 4, 5, 8, 16};

  div_counter #(.W(W)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (counts[i]) begin
      int last, highs, n;
      count = W'(counts[i]);
      // Let the counter restart on the new count.
      repeat (40) @(negedge clk);
      // Align on a done pulse.
      while (!done) @(negedge clk);
      for (int p = 0; p < 6; p++) begin
        n = 0; highs = 0;
        do begin
          @(negedge clk);
          n++;
          if (div) highs++;
        end while (!done);
        check(n == counts[i], $sformatf("count %0d: done period %0d", counts[i], n));
        check(highs == counts[i] / 2, $sformatf("count %0d: div high %0d", counts[i], highs));
      end
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

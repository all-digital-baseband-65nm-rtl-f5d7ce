// tb_tmr_reg: writes random values into the triplicated register, then
// upsets one copy at a time (and all bits of it) and checks that the voted
// output never changes, that the disagreement is flagged, and that the copy
// is scrubbed back on the next clock.
`timescale 1ps / 1ps
module tb_tmr_reg;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, err;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W), .RST_VAL(8'h5A)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (q=%h model=%h)", what, q, model); end
  endtask

  initial begin
    model = 8'h5A;
    repeat (2) @(negedge clk);
    check(q == 8'h5A && !err, "reset value");
    rst_n = 1'b1;
    repeat (200) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      @(negedge clk);
      check(q == model && !err, "write / hold");
    end
    en = 1'b0;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      case (k)
        0: force dut.copy_a = ~model;
        1: force dut.copy_b = ~model;
        default: force dut.copy_c = ~model;
      endcase
      #1;
      check(q == model, "voted value survives an upset copy");
      check(err, "upset flagged");
      case (k)
        0: release dut.copy_a;
        1: release dut.copy_b;
        default: release dut.copy_c;
      endcase
      @(negedge clk);
      check(q == model && !err, "upset copy scrubbed");
    end
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

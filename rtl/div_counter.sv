// div_counter: programmable counter used as the input and output counters.
//
// The counter runs from 0 to count-1 and wraps. `done` is high during the
// last state (one clock per wrap); it is the event the frequency detector
// compares. `div` is high during the first half of the count (floor(count/2)
// states), a divided clock that can be brought off chip and watched with a
// scope. The input counter uses count 2 and the output counter 4, 5, 8 or
// 16, as published; the `done`/`div` outputs and the restart on a change of
// `count` are this design's choices.
//
// The state (count and the registered terminal count) is held in tmr_reg
// triplicated registers, as the whole control loop is built in TMR.
//
// Timing: `done` and `div` are registered-state decodes, changing just after
// the rising clock edge. Asynchronous active-low reset to state 0.
`timescale 1ps / 1ps
module div_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] count,   // terminal count, at least 2
  output logic         done,
  output logic         div,
  output logic         tmr_err  // a triplicated copy disagrees
);

  logic [W-1:0] cnt, cnt_n;
  logic [W-1:0] count_q;
  logic         err_cnt, err_count;

  always_comb begin
    if (count_q != count || cnt >= count - W'(1)) cnt_n = '0;
    else                                          cnt_n = cnt + W'(1);
  end

  tmr_reg #(.W(W), .RST_VAL('0)) u_cnt (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(cnt_n), .q(cnt), .err(err_cnt)
  );

  tmr_reg #(.W(W), .RST_VAL('0)) u_count (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(count), .q(count_q), .err(err_count)
  );

  assign done    = (cnt == count_q - W'(1));
  assign div     = (cnt < (count_q >> 1));
  assign tmr_err = err_cnt | err_count;

endmodule

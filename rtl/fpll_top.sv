// fpll_top: all-digital clock multiplier (frequency-and-phase locked loop).
//
// An NCO made of a tapped delay line produces the output clock. Two
// counters divide the clocks: the input counter always counts 2 input
// clocks, the output counter counts 4, 5, 8 or 16 output clocks, so that
// equal counter rates mean an output of 2x, 2.5x, 4x or 8x the input. The
// frequency detector compares the counter events and steps the NCO delay
// code up or down; once it has nothing to correct, the phase detector
// compares the raw clocks and a one-time phase step moves the output edges
// onto the input edges. Phase adjustment is off for 2.5x, which therefore
// gives frequency lock only.
//
// In open-loop mode the loop is cut and an external controller steps the
// code through `ext_inc`/`ext_dec`, watching `in_mon` and `out_mon` (the
// divided input and output clocks) to measure the two frequencies.
//
// Every block except the NCO is synthesizable; the NCO is a behavioural
// timing model. Every state register of the loop is triplicated with a
// majority vote (tmr_reg); `tmr_err` reports any disagreement, which the
// voters repair on the next clock of that register. All control logic runs on the output clock `clk_out`;
// `clk_in` clocks only the input counter and the first phase-detector flop.
// `rst_n` is an asynchronous active-low reset; the NCO keeps running during
// reset at the reset code.
`timescale 1ps / 1ps
module fpll_top
  import fpll_pkg::*;
(
  input  logic  clk_in,
  input  logic  rst_n,
  input  mult_e mult_sel,
  input  logic  nco_en,
  input  logic  open_loop,
  input  logic  ext_inc,
  input  logic  ext_dec,
  output logic  clk_out,
  output logic  in_mon,
  output logic  out_mon,
  output code_t code,
  output logic  freq_ok,
  output logic  tmr_err,
  output logic [7:0] adj_count
);

  code_t nco_code;
  logic  out_done;
  logic  fast, slow, match;
  logic  ph_valid, early, late;
  logic  advance, retard;
  logic  err_in_cnt, err_out_cnt, err_fdet, err_pdet, err_padj, err_ctrl;

  nco u_nco (
    .s(nco_code), .en(nco_en), .sout(clk_out)
  );

  div_counter #(.W(CNT_W)) u_in_cnt (
    .clk(clk_in), .rst_n(rst_n), .count(CNT_W'(IN_COUNT)),
    .done(), .div(in_mon), .tmr_err(err_in_cnt)
  );

  div_counter #(.W(CNT_W)) u_out_cnt (
    .clk(clk_out), .rst_n(rst_n), .count(out_count(mult_sel)),
    .done(out_done), .div(out_mon), .tmr_err(err_out_cnt)
  );

  freq_det u_fdet (
    .clk(clk_out), .rst_n(rst_n), .int_evt(out_done), .ext_div(in_mon),
    .ext_evt(), .fast(fast), .slow(slow), .match(match),
    .tmr_err(err_fdet)
  );

  phase_det u_pdet (
    .clk_ref(clk_in), .clk_out(clk_out), .rst_n(rst_n),
    .valid(ph_valid), .early(early), .late(late), .tmr_err(err_pdet)
  );

  phase_adj u_padj (
    .clk(clk_out), .rst_n(rst_n), .freq_ok(freq_ok),
    .phase_en(phase_allowed(mult_sel) & ~open_loop),
    .valid(ph_valid), .early(early), .late(late),
    .advance(advance), .retard(retard), .adj_count(adj_count),
    .tmr_err(err_padj)
  );

  fpll_ctrl u_ctrl (
    .clk(clk_out), .rst_n(rst_n), .fast(fast), .slow(slow), .match(match),
    .advance(advance), .retard(retard), .open_loop(open_loop),
    .ext_inc(ext_inc), .ext_dec(ext_dec), .code(code), .nco_code(nco_code),
    .freq_ok(freq_ok), .tmr_err(err_ctrl)
  );

  assign tmr_err = err_in_cnt | err_out_cnt | err_fdet | err_pdet | err_padj | err_ctrl;

endmodule

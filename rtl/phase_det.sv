// phase_det: bang-bang phase detector on the raw clocks.
//
// On every rising edge of the input clock `clk_ref` the output clock
// `clk_out` is sampled. If it is low, the output edge that should coincide
// with this input edge has not come yet: the output is late. If it is high,
// the output rose within the last half output period: it is early. The
// sample and a toggle bit are carried into the output clock domain through a
// two-flop synchroniser, where each new sample gives a one-clock `valid`
// pulse with `early` or `late`.
//
// The published detector samples one raw clock with the other (schematic:
// "ppl" is the inverted output clock taken at the input clock edge, "ppe"
// the inverted input clock taken at the output clock edge) and retimes the
// results with the output clock. This version keeps the "ppl" sample, which
// already decides early versus late for the output edge nearest to the input
// edge, and derives early from it; the clearing network of the figure is
// replaced by the toggle handshake. A comparison is meaningful only when an
// output edge is expected at every input edge (integer ratios); the phase
// adjustment block ignores it otherwise.
//
// Every flop is a tmr_reg triplicated register, one group per clock
// domain (the control loop is built in TMR).
//
// Timing: `valid`/`early`/`late` appear two to three output clocks after
// the input edge. Asynchronous active-low reset.
`timescale 1ps / 1ps
module phase_det (
  input  logic clk_ref,   // input clock
  input  logic clk_out,   // output clock of the NCO
  input  logic rst_n,
  output logic valid,
  output logic early,
  output logic late,
  output logic tmr_err    // a triplicated copy disagrees
);

  logic ppl, tog;               // input-clock domain
  logic ppl_s1, ppl_s2;
  logic tog_s1, tog_s2, tog_s3; // output-clock domain
  logic err_ref, err_out;

  tmr_reg #(.W(2), .RST_VAL('0)) u_ref (
    .clk(clk_ref), .rst_n(rst_n), .en(1'b1),
    .d({~clk_out, ~tog}), .q({ppl, tog}), .err(err_ref)
  );

  tmr_reg #(.W(5), .RST_VAL('0)) u_out (
    .clk(clk_out), .rst_n(rst_n), .en(1'b1),
    .d({ppl, ppl_s1, tog, tog_s1, tog_s2}),
    .q({ppl_s1, ppl_s2, tog_s1, tog_s2, tog_s3}), .err(err_out)
  );

  assign tmr_err = err_ref | err_out;

  assign valid = tog_s2 ^ tog_s3;
  assign late  = valid &  ppl_s2;
  assign early = valid & ~ppl_s2;

endmodule

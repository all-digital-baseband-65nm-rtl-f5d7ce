// nco: behavioural model of the numerically controlled oscillator.
//
// This is a behavioural model, not synthesizable logic: the real block is a
// ring of gate delays whose only tuning parameter is the gate delay of the
// process. It models the oscillator's timing from its 8-bit control word.
//
// The oscillator is a 64-tap delay line built as four 16-tap segments in
// series (each tap two gates, so every tap has the same polarity). Code bits
// s[7:6] pick the segment and s[5:2] the tap inside it, a 6-bit tap select.
// The selected tap is then buffered through four copies loaded with 0, 1, 2
// and 3 units of gate capacitance, and s[1:0] picks one of them, which adds
// a quarter-tap (half a gate) of delay per step. The output is fed back
// inverted to the start of the line, so each half period of `sout` is
//
//     BASE_PS + s[7:2] * TAP_PS + s[1:0] * FINE_PS
//
// With the defaults the output spans 400 MHz (code 0) down to about 73 MHz
// (code 255). The segment/tap/phase split of the code and the 75-400 MHz
// range are published; the delays are this design's, chosen to give that
// range with a tap of two gates and a phase step of a quarter tap.
//
// A delay line cannot be retuned safely while an edge is travelling in it,
// so the model takes a new code only at each output transition and keeps it
// for the following half period. `en` low stops the oscillator with `sout`
// low (the enable in front of the first stage).
`timescale 1ps / 1ps
module nco #(
  parameter int unsigned BASE_PS = 1250,
  parameter int unsigned TAP_PS  = 88,
  parameter int unsigned FINE_PS = 22
) (
  input  logic [7:0] s,
  input  logic       en,
  output logic       sout
);

  function automatic int unsigned half_ps(input logic [7:0] c);
    return BASE_PS + 32'(c[7:2]) * TAP_PS + 32'(c[1:0]) * FINE_PS;
  endfunction

  initial sout = 1'b0;

  always begin
    if (!en) begin
      sout = 1'b0;
      wait (en);
    end
    #(half_ps(s));
    if (en) sout = ~sout;
  end

endmodule

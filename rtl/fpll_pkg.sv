// fpll_pkg: types and constants shared by the clock-multiplier blocks.
//
// The multiplier is set by the ratio of two counters. The input counter
// always counts 2 input clocks; the output counter counts 4, 5, 8 or 16
// output clocks, which gives 2x, 2.5x, 4x and 8x. These counts are the
// published ones. The 2-bit encoding of the mode is this design's choice.
`timescale 1ps / 1ps
package fpll_pkg;

  // Width of the NCO delay code: 6-bit tap select plus 2-bit phase select.
  localparam int unsigned CODE_W = 8;
  // Count of the input counter, the same for every mode.
  localparam int unsigned IN_COUNT = 2;
  // Width of the counters (largest count is 16).
  localparam int unsigned CNT_W = 5;

  typedef logic [CODE_W-1:0] code_t;

  typedef enum logic [1:0] {
    MULT_2X   = 2'd0,
    MULT_2P5X = 2'd1,
    MULT_4X   = 2'd2,
    MULT_8X   = 2'd3
  } mult_e;

  // Output counter terminal count for each multiplication mode.
  function automatic logic [CNT_W-1:0] out_count(input mult_e m);
    unique case (m)
      MULT_2X:   return CNT_W'(4);
      MULT_2P5X: return CNT_W'(5);
      MULT_4X:   return CNT_W'(8);
      default:   return CNT_W'(16);
    endcase
  endfunction

  // Phase correction is only defined for the integer ratios: with 2.5x an
  // input edge lines up with an output edge only every second input clock.
  function automatic logic phase_allowed(input mult_e m);
    return m != MULT_2P5X;
  endfunction

endpackage

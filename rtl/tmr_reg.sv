// tmr_reg: triple-modular-redundant register.
//
// Three copies of a W-bit register are loaded with the same next value and
// read through a bitwise 2-of-3 majority vote, so an upset in any single
// copy never reaches the output. Each copy is also reloaded from the voted
// value whenever `en` is low, so a flipped copy is scrubbed on the very next
// clock edge instead of waiting for a new value to be written.
//
// The clock multiplier's control loop is built in TMR; the choice of
// triplicating the state registers with a per-bit voter (rather than whole
// logic cones) is this design's. A synthesis flow must be told not to
// merge the three copies, which are logically equivalent.
//
// Interface: `d` is written on a rising `clk` edge when `en` is high; `q` is
// the voted value, valid one clock after the write. `err` is high while the
// three copies disagree. Asynchronous active-low reset to RST_VAL.
`timescale 1ps / 1ps
module tmr_reg #(
  parameter int unsigned W       = 8,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         err
);

  logic [W-1:0] copy_a, copy_b, copy_c;

  assign q   = (copy_a & copy_b) | (copy_a & copy_c) | (copy_b & copy_c);
  assign err = (copy_a != copy_b) || (copy_a != copy_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      copy_a <= RST_VAL;
      copy_b <= RST_VAL;
      copy_c <= RST_VAL;
    end else begin
      copy_a <= en ? d : q;
      copy_b <= en ? d : q;
      copy_c <= en ? d : q;
    end
  end

endmodule

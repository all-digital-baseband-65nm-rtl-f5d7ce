// fpll_ctrl: control loop of the clock multiplier.
//
// Holds the 8-bit NCO delay code. In closed-loop mode the frequency
// detector drives it: `fast` (output too fast) adds one step of delay,
// `slow` removes one. The code saturates at both ends. Consecutive
// comparisons that need no correction (`match`) are counted; after LOCK_N of
// them `freq_ok` is raised, which hands control to the phase adjustment.
// A phase request (`advance`/`retard`) changes the code sent to the NCO by
// PH_STEP for one output clock only; the stored code is untouched.
//
// In open-loop mode (`open_loop` high) the detectors are ignored and an
// external controller steps the code with `ext_inc`/`ext_dec`. These come
// from off chip, so each is synchronised with two flops and acts once per
// rising edge.
//
// The code register and the lock counter are triple-modular-redundant
// (tmr_reg), as the published control loop is built in TMR.
//
// Published: increment/decrement of the delay on fast/slow, phase control
// only when no frequency adjustment is needed, the open-loop
// increment/decrement mode. This design's: the saturation, the reset code,
// the LOCK_N rule and the PH_STEP value.
//
// Timing: everything is clocked by the NCO output. The code changes one
// clock after a `fast`/`slow` pulse or two to three clocks after an external
// edge. Asynchronous active-low reset to CODE_RST.
`timescale 1ps / 1ps
module fpll_ctrl
  import fpll_pkg::*;
#(
  parameter code_t        CODE_RST = code_t'(128),
  parameter int unsigned  LOCK_N   = 4,
  parameter int unsigned  PH_STEP  = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fast,
  input  logic  slow,
  input  logic  match,
  input  logic  advance,
  input  logic  retard,
  input  logic  open_loop,
  input  logic  ext_inc,     // asynchronous, from the external controller
  input  logic  ext_dec,     // asynchronous, from the external controller
  output code_t code,        // stored frequency code
  output code_t nco_code,    // code sent to the NCO (with phase step)
  output logic  freq_ok,
  output logic  tmr_err
);

  localparam int unsigned LW = $clog2(LOCK_N + 1);
  localparam int unsigned CMAX = (1 << CODE_W) - 1;

  logic [2:0] inc_s, dec_s;
  logic       inc_evt, dec_evt;
  logic       up, dn;
  code_t      code_n;
  logic [LW-1:0] lock_q, lock_n;
  logic       err_code, err_lock;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_s <= '0;
      dec_s <= '0;
    end else begin
      inc_s <= {inc_s[1:0], ext_inc};
      dec_s <= {dec_s[1:0], ext_dec};
    end
  end

  assign inc_evt = inc_s[1] & ~inc_s[2];
  assign dec_evt = dec_s[1] & ~dec_s[2];

  assign up = open_loop ? (inc_evt & ~dec_evt) : (fast & ~slow);
  assign dn = open_loop ? (dec_evt & ~inc_evt) : (slow & ~fast);

  always_comb begin
    code_n = code;
    if (up && code != code_t'(CMAX)) code_n = code + code_t'(1);
    if (dn && code != '0)            code_n = code - code_t'(1);
  end

  always_comb begin
    lock_n = lock_q;
    if (open_loop || fast || slow)             lock_n = '0;
    else if (match && lock_q != LW'(LOCK_N))   lock_n = lock_q + LW'(1);
  end

  tmr_reg #(.W(CODE_W), .RST_VAL(CODE_RST)) u_code (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(code_n), .q(code), .err(err_code)
  );

  tmr_reg #(.W(LW), .RST_VAL('0)) u_lock (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(lock_n), .q(lock_q), .err(err_lock)
  );

  assign freq_ok = (lock_q == LW'(LOCK_N));
  assign tmr_err = err_code | err_lock;

  // Temporary phase step: saturating add or subtract of PH_STEP.
  always_comb begin
    nco_code = code;
    if (retard) begin
      nco_code = (int'(code) + int'(PH_STEP) > int'(CMAX)) ? code_t'(CMAX)
                                                          : code + code_t'(PH_STEP);
    end else if (advance) begin
      nco_code = (int'(code) < int'(PH_STEP)) ? '0 : code - code_t'(PH_STEP);
    end
  end

endmodule

// freq_det: frequency detector of the clock multiplier.
//
// It compares the events of the two counters: `int_evt`, the one-clock
// `done` pulse of the output counter (already in the output-clock domain),
// and the rising edge of `ext_div`, the divided input clock from the input
// counter, which arrives asynchronously. If both events arrive within one
// output clock of each other nothing needs correcting and `match` pulses.
// If the internal event is not followed by an external one within one
// output clock, the output is running fast and `fast` pulses; the opposite
// case pulses `slow`. A fast/slow flag therefore moves the delay code by one
// step per counter period.
//
// The rule (fast or slow on non-simultaneous arrival within one internal
// clock cycle) is the published one. The published circuit captures both
// events in edge-triggered flops clocked by the counter outputs; here the
// external event is brought in through a two-flop synchroniser instead, so
// all state is in one clock domain. The synchroniser adds a constant two to
// three output clocks to the external event, which only shifts the point the
// loop settles at, not the frequency.
//
// All flops are tmr_reg triplicated registers (the control loop is built in
// TMR).
//
// Timing: `fast`, `slow` and `match` are registered one-clock pulses,
// issued one clock after the later of the two events (or after the window
// closed). Asynchronous active-low reset.
`timescale 1ps / 1ps
module freq_det (
  input  logic clk,       // output (internal) clock
  input  logic rst_n,
  input  logic int_evt,   // output counter done, one clock wide
  input  logic ext_div,   // divided input clock, asynchronous
  output logic ext_evt,   // external event, synchronised, one clock wide
  output logic fast,
  output logic slow,
  output logic match,
  output logic tmr_err    // a triplicated copy disagrees
);

  logic ext_s1, ext_s2, ext_s3;
  logic pre_fast, pre_slow;
  logic pf_n, ps_n, fast_n, slow_n, match_n;
  logic ext_used, int_used, new_int, new_ext;

  // All state of the detector, triplicated and voted.
  typedef struct packed {
    logic ext_s1, ext_s2, ext_s3;
    logic pre_fast, pre_slow;
    logic fast, slow, match;
  } fd_state_t;

  fd_state_t st, st_n;

  assign ext_s1   = st.ext_s1;
  assign ext_s2   = st.ext_s2;
  assign ext_s3   = st.ext_s3;
  assign pre_fast = st.pre_fast;
  assign pre_slow = st.pre_slow;
  assign fast     = st.fast;
  assign slow     = st.slow;
  assign match    = st.match;

  assign ext_evt = ext_s2 & ~ext_s3;

  always_comb begin
    fast_n  = 1'b0;
    slow_n  = 1'b0;
    match_n = 1'b0;
    pf_n    = 1'b0;
    ps_n    = 1'b0;
    // A pending event from the previous clock is resolved now.
    ext_used = pre_fast & ext_evt;
    int_used = pre_slow & int_evt;
    if (pre_fast) begin
      if (ext_evt) match_n = 1'b1;
      else         fast_n  = 1'b1;
    end
    if (pre_slow) begin
      if (int_evt) match_n = 1'b1;
      else         slow_n  = 1'b1;
    end
    // Events not used to resolve a pending one open a new window.
    new_int = int_evt & ~int_used;
    new_ext = ext_evt & ~ext_used;
    if (new_int && new_ext) match_n = 1'b1;
    else if (new_int)       pf_n    = 1'b1;
    else if (new_ext)       ps_n    = 1'b1;
  end

  assign st_n = '{ext_s1: ext_div, ext_s2: ext_s1, ext_s3: ext_s2,
                  pre_fast: pf_n, pre_slow: ps_n,
                  fast: fast_n, slow: slow_n, match: match_n};

  tmr_reg #(.W($bits(fd_state_t)), .RST_VAL('0)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(st_n), .q(st), .err(tmr_err)
  );

  // At most one window can be open at a time.
  a_one_pending: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(pre_fast && pre_slow));

endmodule

// phase_adj: one-time phase adjustment.
//
// Once the frequency loop has stopped asking for corrections (`freq_ok`),
// the phase loop takes over: for each phase comparison (`valid`) it issues
// a single one-clock request, `retard` when the output is early and
// `advance` when it is late. The controller turns a request into a
// temporary change of the delay code, which moves the output edges by a
// fixed step without changing the frequency code. After each request the
// next HOLD comparisons are ignored, so that the synchroniser delay of the
// detector cannot make the loop act twice on the same error.
//
// Published: phase control only when no frequency adjustment is needed, a
// separate one-time adjustment instead of a lasting tap change, and phase
// adjustment disabled for the 2.5x ratio (`phase_en` low). The circuit
// itself is not published; the request/hold scheme is this design's.
//
// The state is held in a tmr_reg triplicated register (the control loop is
// built in TMR).
//
// Timing: `advance`/`retard` are registered, one clock after `valid`.
// `adj_count` counts the requests issued (wraps). Asynchronous active-low
// reset.
`timescale 1ps / 1ps
module phase_adj #(
  parameter int unsigned HOLD = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       freq_ok,    // frequency loop idle
  input  logic       phase_en,   // integer ratio and closed loop
  input  logic       valid,      // a phase comparison is ready
  input  logic       early,
  input  logic       late,
  output logic       advance,
  output logic       retard,
  output logic [7:0] adj_count,
  output logic       tmr_err     // a triplicated copy disagrees
);

  localparam int unsigned HW = (HOLD > 0) ? $clog2(HOLD + 1) : 1;

  typedef struct packed {
    logic [HW-1:0] skip;
    logic          advance;
    logic          retard;
    logic [7:0]    adj_count;
  } pa_state_t;

  pa_state_t st, st_n;

  always_comb begin
    st_n         = st;
    st_n.advance = 1'b0;
    st_n.retard  = 1'b0;
    if (!freq_ok || !phase_en) begin
      st_n.skip = '0;
    end else if (valid) begin
      if (st.skip != '0) begin
        st_n.skip = st.skip - HW'(1);
      end else if (early || late) begin
        st_n.retard    = early;
        st_n.advance   = late;
        st_n.skip      = HW'(HOLD);
        st_n.adj_count = st.adj_count + 8'd1;
      end
    end
  end

  tmr_reg #(.W($bits(pa_state_t)), .RST_VAL('0)) u_state (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(st_n), .q(st), .err(tmr_err)
  );

  assign advance   = st.advance;
  assign retard    = st.retard;
  assign adj_count = st.adj_count;

  a_one_request: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(advance && retard));

endmodule

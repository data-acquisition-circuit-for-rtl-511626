// main_fsm: the trigger's main state machine, one flip-flop per state.
//
//   Q0 (reset)    : clears the A-pulse counter, ignores A and Z; always moves
//                   to Q1 on the next clock.
//   Q1 (counting) : counts A-pulses and ignores Z; moves to Q2 when the count
//                   reaches AMIN (amin).
//   Q2 (Z enable) : waits for the Z-pulse; moves to Q0 when z is seen, or when
//                   the count reaches AMAX (amax) with no Z-pulse.
//
// Next-state equations:  Q0' = Q2 & (z | amax)
//                        Q1' = Q0 | (Q1 & ~amin)
//                        Q2' = (Q1 & amin) | (Q2 & ~amax & ~z)
// The asynchronous, active-high rst sets Q0 and clears Q1 and Q2. Inputs are
// sampled on the rising clk edge; q changes on that edge.
//
// Following the document: the three states, their meaning and the equations
// above, with reset forcing the reset state. This design's choice: an
// assertion that exactly one state bit is set.
module main_fsm
  import daq_trigger_pkg::*;
(
  input  logic   clk,
  input  logic   rst,    // asynchronous reset, active high
  input  logic   z,      // synchronized Z-pulse
  input  logic   amin,   // A-pulse count has reached the window start
  input  logic   amax,   // A-pulse count has reached the window end
  output state_t q       // q[Q_RESET], q[Q_COUNT], q[Q_ZEN]
);

  state_t q_next;

  always_comb begin
    q_next[Q_RESET] = q[Q_ZEN] & (z | amax);
    q_next[Q_COUNT] = q[Q_RESET] | (q[Q_COUNT] & ~amin);
    q_next[Q_ZEN]   = (q[Q_COUNT] & amin) | (q[Q_ZEN] & ~amax & ~z);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= STATE_RESET;
    else     q <= q_next;
  end

  a_onehot : assert property (@(posedge clk) disable iff (rst) $onehot(q))
    else $error("main_fsm: state register not one-hot: %b", q);

endmodule

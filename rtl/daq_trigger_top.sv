// daq_trigger_top: triggering circuit of an ultrasonic tire inspection
// machine. It tells the data acquisition system when to take data: on every
// other revolution of the tire, and only once the scanner head has stopped
// moving to its next radius.
//
// Three parts, all on one clock:
//   input_sync      - two flip-flops per input for the encoder's A-pulse and
//                     Z-pulse and for the scanner's Motor_Clear.
//   a_pulse_counter - 12-bit count of A-pulse rising edges since the last
//                     Counter_Clear, with decoders for AMIN_COUNT (2040) and
//                     AMAX_COUNT (2056).
//   state_system    - one-hot main machine (Q0 reset, Q1 counting, Q2 Z
//                     enable) and the Z-Toggle flip-flop.
// After reset the machine counts A-pulses, opens a window for the Z-pulse at
// 2040, and on a Z-pulse inside the window flips Z-Toggle, clears the counter
// and starts the next revolution. A Z-pulse outside the window is ignored;
// if none comes by 2056 the revolution is closed without flipping Z-Toggle.
// clear_to_acquire = Z-Toggle & Motor_Clear.
//
// Timing: inputs are sampled on the rising clock edge. A Z-pulse that is
// high at clock edge k is seen by the state machine at edge k+2 and flips
// z_toggle (and clear_to_acquire) on that edge. An A-pulse needs at least two
// clock periods high and two low to be counted reliably.
//
// Following the document: the parts, their connections (counter enable tied
// high, everything cleared by the external reset) and the window counts. The
// reset input is asynchronous and active high in every part, as in the
// document's flip-flops. This design's choice: the counter runs on the
// system clock instead of being clocked by the A-pulse.
module daq_trigger_top
  import daq_trigger_pkg::*;
#(
  parameter int unsigned AMIN_COUNT = AMIN_DEFAULT,
  parameter int unsigned AMAX_COUNT = AMAX_DEFAULT
) (
  input  logic clock,
  input  logic reset,             // external reset, asynchronous, active high
  input  logic a_in,              // encoder A-pulse (one per data point)
  input  logic z_in,              // encoder Z-pulse (one per revolution)
  input  logic motorclr_in,       // scanner Motor_Clear, low while moving
  output logic clear_to_acquire,  // take data now
  output logic q0,                // state: reset
  output logic q1,                // state: counting A-pulses
  output logic q2,                // state: Z enable
  output logic z_toggle,
  output logic counter_clear,
  output logic aover              // A-pulse counter beyond 3839
);

  logic   a_sync, z_sync, motclr_sync;
  count_t a_count;   // the count itself is only decoded inside the counter
  logic   amin, amax;
  state_t q;

  input_sync #(.STAGES(2)) u_sync (
    .clk          (clock),
    .rst          (reset),
    .a_async      (a_in),
    .z_async      (z_in),
    .motclr_async (motorclr_in),
    .a_sync       (a_sync),
    .z_sync       (z_sync),
    .motclr_sync  (motclr_sync)
  );

  a_pulse_counter #(
    .AMIN_COUNT (AMIN_COUNT),
    .AMAX_COUNT (AMAX_COUNT)
  ) u_counter (
    .clk    (clock),
    .rst    (reset),
    .a_sync (a_sync),
    .en     (1'b1),
    .clr    (counter_clear),
    .count  (a_count),
    .amin   (amin),
    .amax   (amax),
    .aover  (aover)
  );

  state_system u_state (
    .clk              (clock),
    .rst              (reset),
    .z                (z_sync),
    .amin             (amin),
    .amax             (amax),
    .motor_clear      (motclr_sync),
    .q                (q),
    .z_toggle         (z_toggle),
    .counter_clear    (counter_clear),
    .clear_to_acquire (clear_to_acquire)
  );

  assign q0 = q[Q_RESET];
  assign q1 = q[Q_COUNT];
  assign q2 = q[Q_ZEN];

endmodule

// Shared constants and types of the tire-inspection data acquisition trigger.
//
// The trigger watches a 2048-pulse shaft encoder (A-pulses, one per data
// point, and one Z-pulse per revolution). It counts A-pulses, opens a window
// for the Z-pulse when the count says a revolution is nearly complete, and
// flips a Z-Toggle on every accepted Z-pulse so that data are taken only on
// alternate revolutions. The window bounds 2040 and 2056 are the decoder
// values of the published counter schematic; the 12-bit width is that of its
// three cascaded 4-bit counters. The state encoding (one flip-flop per state,
// Q0 = reset, Q1 = counting, Q2 = Z enable) also follows the published
// design; the names below are this design's own.
package daq_trigger_pkg;

  // Encoder resolution: A-pulses per tire revolution.
  localparam int unsigned ENCODER_PULSES = 2048;

  // Width of the A-pulse counter (three 4-bit slices).
  localparam int unsigned COUNT_W = 12;
  localparam int unsigned SLICE_W = 4;
  localparam int unsigned SLICES  = COUNT_W / SLICE_W;

  // A-pulse count at which the Z-pulse window opens (AMIN) and at which it
  // closes with no Z-pulse seen (AMAX).
  localparam int unsigned AMIN_DEFAULT = 2040;
  localparam int unsigned AMAX_DEFAULT = 2056;

  typedef logic [COUNT_W-1:0] count_t;

  // Bit positions of the one-hot main state register.
  typedef enum int unsigned {
    Q_RESET = 0,  // Q0: clear the counter, ignore A and Z (one clock)
    Q_COUNT = 1,  // Q1: count A-pulses, ignore Z
    Q_ZEN   = 2   // Q2: Z enabled, wait for the Z-pulse
  } state_bit_e;

  typedef logic [2:0] state_t;

  localparam state_t STATE_RESET = 3'b001;
  localparam state_t STATE_COUNT = 3'b010;
  localparam state_t STATE_ZEN   = 3'b100;

endpackage

// state_system: the trigger's control, made of two state machines that run
// side by side: the one-hot main machine (main_fsm: reset, counting, Z
// enable) and the Z-Toggle machine (z_toggle_fsm) that selects alternate
// revolutions for data acquisition.
//
// counter_clear is the main machine's reset state Q0: it empties the A-pulse
// counter during the single clock spent there. The Z-Toggle machine is told
// that Z is enabled by Q2. All outputs come straight from flip-flops except
// clear_to_acquire (z_toggle & motor_clear). rst is asynchronous and active
// high.
//
// Following the document: the split into two state machines, Counter_Clear
// taken from the reset state, and the port list of its State System block
// (Z, AMIN, AMAX, MOTCLR in; Q0..Q2, Z_TOGGLE, Counter_Clear,
// Clear_To_Acquire out).
module state_system
  import daq_trigger_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   z,
  input  logic   amin,
  input  logic   amax,
  input  logic   motor_clear,
  output state_t q,
  output logic   z_toggle,
  output logic   counter_clear,
  output logic   clear_to_acquire
);

  main_fsm u_main (
    .clk  (clk),
    .rst  (rst),
    .z    (z),
    .amin (amin),
    .amax (amax),
    .q    (q)
  );

  z_toggle_fsm u_toggle (
    .clk              (clk),
    .rst              (rst),
    .z_enable         (q[Q_ZEN]),
    .z                (z),
    .motor_clear      (motor_clear),
    .z_toggle         (z_toggle),
    .clear_to_acquire (clear_to_acquire)
  );

  assign counter_clear = q[Q_RESET];

endmodule

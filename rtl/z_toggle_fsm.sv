// z_toggle_fsm: the Z-Toggle state machine and the Clear_To_Acquire output.
//
// Z-Toggle is a single flip-flop with two states: low (the scanner head may
// move to the next radius, no data are taken) and high (data are taken). It
// flips on every clock in which the main state machine is in Z enable
// (z_enable) and the synchronized Z-pulse is high, so it changes once per
// accepted revolution and data are taken on every other revolution. A
// revolution whose Z-pulse is missed leaves it unchanged. clear_to_acquire
// is z_toggle & motor_clear: high only on a data revolution once the scanner
// reports that its motion has ended. The asynchronous, active-high rst
// clears Z-Toggle. z_toggle changes on the clk edge that samples z_enable & z;
// clear_to_acquire follows z_toggle and motor_clear without delay.
//
// Following the document: Z-Toggle' = Z-Toggle xor (Q2 & Z), reset to low;
// Clear_To_Acquire low while Z-Toggle is low, and high while Z-Toggle is high
// and Motor_Clear is 1. The document's state diagram also asks for
// Motor_Clear = 1 before Z-Toggle rises, but its gate-level equation does
// not; this design follows the equation and lets Motor_Clear gate only the
// output.
module z_toggle_fsm (
  input  logic clk,
  input  logic rst,               // asynchronous reset, active high
  input  logic z_enable,          // main state machine in Q2
  input  logic z,                 // synchronized Z-pulse
  input  logic motor_clear,       // synchronized Motor_Clear (high = no motion)
  output logic z_toggle,
  output logic clear_to_acquire
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) z_toggle <= 1'b0;
    else     z_toggle <= z_toggle ^ (z_enable & z);
  end

  assign clear_to_acquire = z_toggle & motor_clear;

endmodule

// encoder_model: behavioural model (not synthesizable) of a rotating motor
// shaft encoder with PULSES A-pulses and one Z (index) pulse per revolution.
//
// Outputs change on the falling edge of clk, so the design under test, which
// samples on the rising edge, never sees them change at its sampling edge.
// Each A-pulse is HALF clocks high then HALF clocks low. Z is high for the
// whole A period of position 0, unless drop_z is high (a Z-pulse lost on the
// line). A one-clock pulse on glitch_z makes a false Z-pulse two clocks long
// at the current position. position is the encoder's angle in A-pulses,
// pulse_total counts every A-pulse produced. While run is low the shaft
// stands still.
module encoder_model #(
  parameter int unsigned PULSES      = 2048,
  parameter int unsigned HALF        = 2,
  parameter int unsigned START_INDEX = 1
) (
  input  logic        clk,
  input  logic        run,
  input  logic        drop_z,
  input  logic        glitch_z,
  output logic        a,
  output logic        z,
  output int unsigned position,
  output longint unsigned pulse_total
);
  int unsigned phase;      // clocks into the current A period
  int unsigned glitch_left;

  initial begin
    a = 1'b0; z = 1'b0; position = START_INDEX; phase = 0;
    pulse_total = 0; glitch_left = 0;
  end

  always @(negedge clk) begin
    if (glitch_z) glitch_left = 2;
    if (run) begin
      a = (phase < HALF);
      if (phase == 0) pulse_total++;
      phase++;
      if (phase == 2 * HALF) begin
        phase = 0;
        position = (position + 1) % PULSES;
      end
    end
    z = ((position == 0) && !drop_z) || (glitch_left != 0);
    if (glitch_left != 0) glitch_left--;
  end
endmodule

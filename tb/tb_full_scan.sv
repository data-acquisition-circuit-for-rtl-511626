// Workload testbench: one complete tire scan at the specification's size.
//
// The scan takes at least 400 data lines, one per acquired revolution of a
// 2048-pulse encoder, with the scanner head moving to the next radius on the
// revolution in between. The testbench drives daq_trigger_top at its default
// parameters from a behavioural encoder, pulls motorclr_in low for 1500
// A-pulses after every fall of Z-Toggle (head motion), and counts data lines
// (intervals with clear_to_acquire high) and the A-pulses that arrive inside
// each one (data points). Each line must hold one full revolution of points
// (2048, give or take the pulse in flight at either end), lines must be
// separated by one revolution without data, and the total must reach the
// 250,000 data points of the specification.
module tb_full_scan;
  import daq_trigger_pkg::*;

  localparam int unsigned HALF     = 2;
  localparam int unsigned LINES    = 400;
  localparam int unsigned MOVE_LEN = 1500;
  localparam longint unsigned PPR  = 64'(ENCODER_PULSES);

  logic clock = 1'b0;
  logic reset = 1'b1;
  logic a_in, z_in;
  logic motorclr_in = 1'b1;
  logic cta, q0, q1, q2, z_toggle, counter_clear, aover;
  logic run = 1'b0;
  int unsigned position;
  longint unsigned pulse_total;

  encoder_model #(.PULSES(ENCODER_PULSES), .HALF(HALF), .START_INDEX(1)) u_enc (
    .clk (clock), .run, .drop_z (1'b0), .glitch_z (1'b0),
    .a (a_in), .z (z_in), .position, .pulse_total
  );

  daq_trigger_top dut (
    .clock, .reset, .a_in, .z_in, .motorclr_in,
    .clear_to_acquire (cta), .q0, .q1, .q2, .z_toggle, .counter_clear, .aover
  );

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int unsigned lines = 0;
  longint unsigned points = 0, line_start = 0, gap_start = 0;
  logic prev_cta = 1'b0;
  int n_motion = 0;

  always @(negedge z_toggle) begin
    if (!reset) begin
      n_motion++;
      motorclr_in = 1'b0;
      repeat (MOVE_LEN * 2 * HALF) @(negedge clock);
      motorclr_in = 1'b1;
    end
  end

  always @(posedge clock) begin
    if (!reset) begin
      if (cta && !prev_cta) begin
        line_start = pulse_total;
        if (lines > 0) begin
          checks++;
          // one revolution without data between lines
          if (pulse_total - gap_start + 1 < PPR - 1 ||
              pulse_total - gap_start > PPR + 1) begin
            failures++;
            $display("FAIL gap before line %0d: %0d A-pulses", lines, pulse_total - gap_start);
          end
        end
      end
      if (!cta && prev_cta) begin
        automatic longint unsigned n = pulse_total - line_start;
        lines++;
        points += n;
        gap_start = pulse_total;
        checks++;
        if (n + 1 < PPR || n > PPR + 1) begin
          failures++;
          $display("FAIL line %0d holds %0d A-pulses", lines, n);
        end
      end
      prev_cta = cta;
    end
  end

  initial begin
    repeat (3) @(negedge clock);
    reset = 1'b0; run = 1'b1;
    wait (lines == LINES);
    checks += 3;
    if (points < 250000) begin failures++; $display("FAIL only %0d data points", points); end
    if (n_motion < int'(LINES) - 1) begin failures++; $display("FAIL head moved %0d times", n_motion); end
    if (aover) begin failures++; $display("FAIL counter overflow flag set"); end
    $display("lines=%0d data_points=%0d revolutions=%0d head_moves=%0d",
             lines, points, pulse_total / PPR, n_motion);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench for daq_trigger_top at its default parameters
// (2048-pulse encoder, Z window 2040..2056).
//
// A behavioural shaft encoder drives a_in and z_in; the testbench plays the
// scanner, pulling motorclr_in low for part of each revolution on which no
// data are taken (the head moves to the next radius). A cycle-level model
// of the trigger kept in the testbench (synchronizer delays, edge counting,
// the three states, Z-Toggle) is compared with every output after every
// clock. On top of that it checks rules of the specification directly:
// Z-Toggle flips only two clock edges after Z was sampled high, accepted
// Z-pulses are a whole number of revolutions apart, and Clear_To_Acquire is
// never high while the scanner moves.
//
// Scenario: aligned reset, normal revolutions, false Z-pulses in mid
// revolution, one lost Z-pulse, a revolution on which the head is still
// moving when Z-Toggle rises, and an external reset in mid revolution after
// which the trigger drifts back into step with the encoder. Every one of
// these must have happened at least once.
module tb_daq_trigger_top;
  import daq_trigger_pkg::*;

  localparam int unsigned HALF = 2;
  localparam longint unsigned PPR = 64'(ENCODER_PULSES);

  logic clock = 1'b0;
  logic reset = 1'b1;
  logic a_in, z_in;
  logic motorclr_in = 1'b1;
  logic cta, q0, q1, q2, z_toggle, counter_clear, aover;

  logic run = 1'b0, drop_z = 1'b0, glitch_z = 1'b0;
  int unsigned position;
  longint unsigned pulse_total;

  encoder_model #(.PULSES(ENCODER_PULSES), .HALF(HALF), .START_INDEX(1)) u_enc (
    .clk (clock), .run, .drop_z, .glitch_z,
    .a (a_in), .z (z_in), .position, .pulse_total
  );

  daq_trigger_top dut (
    .clock, .reset, .a_in, .z_in, .motorclr_in,
    .clear_to_acquire (cta), .q0, .q1, .q2, .z_toggle, .counter_clear, .aover
  );

  always #5 clock = ~clock;

  // ---------------- reference model ----------------
  typedef enum {M_RESET, M_COUNT, M_ZEN} mstate_e;
  mstate_e     m_st;
  logic        m_tog;
  int unsigned m_cnt;
  logic [1:0]  m_a, m_z, m_m;   // [0] first stage, [1] synchronized
  logic        m_aprev;

  task automatic model_reset();
    m_st = M_RESET; m_tog = 1'b0; m_cnt = 0;
    m_a = '0; m_z = '0; m_m = '0; m_aprev = 1'b0;
  endtask

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  longint unsigned edge_no = 0;
  logic [3:0] z_hist;                 // z_in at the last four edges, [0] newest
  longint unsigned last_flip_pulses;
  bit     have_flip;
  logic   prev_tog, prev_cta;
  int n_window = 0, n_accept = 0, n_missed = 0, n_false_z = 0, n_ext_reset = 0;
  int n_motion_hold = 0, n_acq_lines = 0, n_fast_flip = 0, n_relock = 0;
  bit relocking = 0;
  bit checking = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL at %0t (edge %0d): %s", $time, edge_no, msg);
  endtask

  always @(posedge clock) begin
    if (!reset && checking) begin
      mstate_e     st_n;
      logic        tog_n;
      int unsigned cnt_n;
      edge_no++;
      z_hist = {z_hist[2:0], z_in};
      // next state from the values before this edge
      st_n  = m_st;
      tog_n = m_tog;
      case (m_st)
        M_RESET: st_n = M_COUNT;
        M_COUNT: begin
          if (m_cnt == AMIN_DEFAULT) begin st_n = M_ZEN; n_window++; end
          if (m_z[1]) n_false_z++;
        end
        M_ZEN: begin
          if (m_z[1]) begin
            st_n = M_RESET; tog_n = ~m_tog; n_accept++;
            if (relocking) begin n_relock++; relocking = 0; end
          end else if (m_cnt == AMAX_DEFAULT) begin
            st_n = M_RESET; n_missed++;
          end
        end
      endcase
      if (m_st == M_RESET)           cnt_n = 0;
      else if (m_a[1] && !m_aprev)   cnt_n = (m_cnt + 1) % 4096;
      else                           cnt_n = m_cnt;
      m_aprev = m_a[1];
      m_a = {m_a[0], a_in};
      m_z = {m_z[0], z_in};
      m_m = {m_m[0], motorclr_in};
      m_st = st_n; m_tog = tog_n; m_cnt = cnt_n;

      #1;
      checks += 6;
      if ({q2, q1, q0} != 3'(1 << int'(m_st)))
        fail($sformatf("state %b%b%b expected %s", q2, q1, q0, m_st.name()));
      if (counter_clear != (m_st == M_RESET)) fail("counter_clear");
      if (z_toggle != m_tog) fail($sformatf("z_toggle %b expected %b", z_toggle, m_tog));
      if (cta != (m_tog & m_m[1])) fail("clear_to_acquire");
      if (aover != (m_cnt >= 3840)) fail("aover");
      if (cta && !motorclr_in && !m_m[1] && !m_m[0]) fail("acquiring while the head moves");

      // rules of the specification
      if (z_toggle != prev_tog) begin
        checks += 2;
        // Z sampled high at edge k flips Z-Toggle at edge k+2
        if (!z_hist[2]) fail("Z-Toggle flipped without Z sampled high two edges earlier");
        if (!z_hist[3]) n_fast_flip++;   // flip two edges after the Z-pulse began
        // whole revolutions apart, give or take the A-pulse in flight
        if (have_flip && ((pulse_total - last_flip_pulses) % PPR) > 1
                      && ((pulse_total - last_flip_pulses) % PPR) < PPR - 1)
          fail($sformatf("accepted Z-pulses %0d A-pulses apart",
                         pulse_total - last_flip_pulses));
        last_flip_pulses = pulse_total;
        have_flip = 1;
      end
      if (z_toggle && !m_m[1]) n_motion_hold++;
      if (cta && !prev_cta) n_acq_lines++;
      prev_tog = z_toggle;
      prev_cta = cta;
    end
  end

  // ---------------- scanner: moves the head while Z-Toggle is low ----------------
  int unsigned move_len = 1000;    // A-pulses of head motion per step
  always @(negedge z_toggle) begin
    if (!reset) begin
      automatic int unsigned len = move_len;
      motorclr_in = 1'b0;
      repeat (len * 2 * HALF) @(negedge clock);
      motorclr_in = 1'b1;
    end
  end

  task automatic revolutions(input int n);
    repeat (n * ENCODER_PULSES * 2 * HALF) @(negedge clock);
  endtask

  task automatic wait_position(input int unsigned p);
    do @(negedge clock); while (position != p);
  endtask

  initial begin
    int unsigned missed_before;
    model_reset();
    z_hist = '0; prev_tog = 0; prev_cta = 0; have_flip = 0; last_flip_pulses = 0;
    repeat (3) @(negedge clock);
    reset = 1'b0; checking = 1; run = 1'b1;

    // normal operation
    revolutions(6);

    // false Z-pulses in mid revolution
    for (int i = 0; i < 3; i++) begin
      wait_position(700 + 300 * i);
      glitch_z = 1'b1; @(negedge clock); glitch_z = 1'b0;
      revolutions(1);
    end

    // one lost Z-pulse
    wait_position(ENCODER_PULSES - 100);
    missed_before = n_missed;
    drop_z = 1'b1;
    wait_position(200);
    drop_z = 1'b0;
    relocking = 1;
    revolutions(4);
    checks++;
    if (n_missed == missed_before) fail("lost Z-pulse not noticed");

    // the head is still moving when Z-Toggle next rises
    move_len = 2500;
    revolutions(4);
    move_len = 1000;
    revolutions(2);

    // external reset in mid revolution
    wait_position(1900);
    @(negedge clock) reset = 1'b1;
    #2;
    checks++;
    if (!(q0 && !q1 && !q2 && !z_toggle && !cta)) fail("external reset");
    model_reset();
    z_hist = '0; prev_tog = 0; prev_cta = 0; have_flip = 0;
    n_ext_reset++;
    repeat (2) @(negedge clock);
    reset = 1'b0;
    relocking = 1;
    revolutions(30);

    // every mechanism must have happened
    checks += 9;
    if (n_window == 0)      fail("Z window never opened");
    if (n_accept == 0)      fail("no Z-pulse accepted");
    if (n_missed == 0)      fail("AMAX timeout never happened");
    if (n_false_z == 0)     fail("no false Z-pulse ignored");
    if (n_ext_reset == 0)   fail("no external reset");
    if (n_motion_hold == 0) fail("Clear_To_Acquire never held back by motion");
    if (n_acq_lines == 0)   fail("no acquisition revolution");
    if (n_fast_flip == 0)   fail("no flip two edges after a Z-pulse began");
    if (n_relock < 2)       fail("trigger did not fall back into step");
    $display("windows=%0d accepted=%0d missed=%0d z_ignored_clocks=%0d ext_reset=%0d motion_hold_clocks=%0d lines=%0d relocks=%0d",
             n_window, n_accept, n_missed, n_false_z, n_ext_reset, n_motion_hold, n_acq_lines, n_relock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

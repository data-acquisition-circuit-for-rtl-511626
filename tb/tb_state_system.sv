// Self-checking testbench for state_system.
// Random z, amin, amax and motor_clear; the testbench steps its own model of
// both state machines and checks the state, Z-Toggle, Counter_Clear and
// Clear_To_Acquire after every clock. It checks that Z-Toggle flips only on
// a Z-pulse accepted in the Z enable state, and never when the window closes
// on AMAX.
module tb_state_system;
  import daq_trigger_pkg::*;

  logic   clk = 1'b0;
  logic   rst, z, amin, amax, motor_clear;
  state_t q;
  logic   z_toggle, counter_clear, cta;
  int     exp_st;      // 0 reset, 1 counting, 2 Z enable
  logic   exp_t;
  int checks = 0, failures = 0;
  int n_accept = 0, n_miss = 0, n_clear = 0;

  state_system dut (.clk, .rst, .z, .amin, .amax, .motor_clear, .q,
                    .z_toggle, .counter_clear, .clear_to_acquire(cta));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; z = 1'b0; amin = 1'b0; amax = 1'b0; motor_clear = 1'b1;
    exp_st = 0; exp_t = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      z           = ($urandom_range(0, 3) == 0);
      amin        = ($urandom_range(0, 3) == 0);
      amax        = ($urandom_range(0, 6) == 0);
      motor_clear = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      case (exp_st)
        0: begin exp_st = 1; n_clear++; end
        1: if (amin) exp_st = 2;
        default:
          if (z) begin exp_st = 0; exp_t = ~exp_t; n_accept++; end
          else if (amax) begin exp_st = 0; n_miss++; end
      endcase
      #1 checks += 4;
      if (q != state_t'(1 << exp_st)) begin
        failures++; $display("FAIL state at %0t: %b expected bit %0d", $time, q, exp_st);
      end
      if (z_toggle != exp_t) begin
        failures++; $display("FAIL z_toggle at %0t", $time);
      end
      if (counter_clear != (exp_st == 0)) begin
        failures++; $display("FAIL counter_clear at %0t", $time);
      end
      if (cta != (exp_t & motor_clear)) begin
        failures++; $display("FAIL clear_to_acquire at %0t", $time);
      end
    end
    checks++;
    if (n_accept == 0 || n_miss == 0 || n_clear == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

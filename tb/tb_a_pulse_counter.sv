// Self-checking testbench for a_pulse_counter at its default window counts
// (2040 and 2056).
// A-pulses of random high and low lengths (at least one clock each) are fed
// in; the testbench counts their rising edges itself and checks count, amin,
// amax and aover after every clock, including a run past 4095 (wrap and
// upper-slice terminal count), pauses with en low and synchronous clears.
// It also checks the latency: the count changes on the first clock edge at
// which a_sync is high, i.e. one clock after a_sync (a register output) rises.
module tb_a_pulse_counter;
  import daq_trigger_pkg::*;

  logic   clk = 1'b0;
  logic   rst, a_sync, en, clr;
  count_t count;
  logic   amin, amax, aover;
  int unsigned exp_count;
  logic   a_prev_tb;
  int checks = 0, failures = 0;
  int n_amin = 0, n_amax = 0, n_aover = 0, n_clr = 0;

  a_pulse_counter dut (.clk, .rst, .a_sync, .en, .clr, .count, .amin, .amax, .aover);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d exp=%0d amin=%b amax=%b aover=%b",
               what, $time, count, exp_count, amin, amax, aover);
    end
  endtask

  // one clock: drive inputs after the falling edge, update the model on the rising edge
  task automatic step(input logic a, input logic e, input logic c);
    @(negedge clk);
    a_sync = a; en = e; clr = c;
    @(posedge clk);
    if (c) exp_count = 0;
    else if (e && a && !a_prev_tb) exp_count = (exp_count + 1) % 4096;
    a_prev_tb = a;
    #1;
    check("count", count == count_t'(exp_count));
    check("amin",  amin  == (exp_count == 2040));
    check("amax",  amax  == (exp_count == 2056));
    check("aover", aover == (exp_count >= 3840));
    if (amin) n_amin++;
    if (amax) n_amax++;
    if (aover) n_aover++;
    if (c) n_clr++;
  endtask

  task automatic pulses(input int n, input logic e);
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(1, 3)) step(1'b1, e, 1'b0);
      repeat ($urandom_range(1, 3)) step(1'b0, e, 1'b0);
    end
  endtask

  initial begin
    rst = 1'b1; a_sync = 1'b0; en = 1'b1; clr = 1'b0;
    exp_count = 0; a_prev_tb = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // latency: a_sync rises after edge k-1 (as a register output would at
    // edge k-1); the count changes at the next edge, k
    @(posedge clk) #1 check("idle after reset", count == '0);
    @(negedge clk) a_sync = 1'b1;
    @(posedge clk) #1 check("count one edge later", count == count_t'(1));
    @(posedge clk) #1 check("one count per rising edge", count == count_t'(1));
    a_prev_tb = 1'b1; exp_count = 1;
    step(1'b0, 1'b1, 1'b0);

    pulses(2100, 1'b1);        // through AMIN and AMAX
    pulses(50, 1'b0);          // disabled: no counting
    pulses(2000, 1'b1);        // past 3840 and wrap past 4095
    step(1'b1, 1'b1, 1'b1);    // clear wins over a rising edge
    step(1'b0, 1'b1, 1'b0);
    pulses(2045, 1'b1);        // stop inside the window
    step(1'b0, 1'b1, 1'b1);    // clear

    check("amin seen",  n_amin  > 0);
    check("amax seen",  n_amax  > 0);
    check("aover seen", n_aover > 0);
    check("clear seen", n_clr   > 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

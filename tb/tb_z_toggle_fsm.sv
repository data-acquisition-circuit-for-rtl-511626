// Self-checking testbench for z_toggle_fsm.
// Random z_enable, z and motor_clear each clock; the testbench keeps its own
// Z-Toggle bit (flips when Z is enabled and Z is high) and checks z_toggle
// and clear_to_acquire, the latter also between edges when only motor_clear
// changes.
module tb_z_toggle_fsm;
  logic clk = 1'b0;
  logic rst, z_enable, z, motor_clear;
  logic z_toggle, cta;
  logic exp_t;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_hold = 0;

  z_toggle_fsm dut (.clk, .rst, .z_enable, .z, .motor_clear,
                    .z_toggle, .clear_to_acquire(cta));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; z_enable = 1'b0; z = 1'b0; motor_clear = 1'b0; exp_t = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      z_enable    = ($urandom_range(0, 2) == 0);
      z           = ($urandom_range(0, 2) == 0);
      motor_clear = ($urandom_range(0, 3) != 0);
      #1 checks++;
      if (cta != (exp_t & motor_clear)) begin
        failures++; $display("FAIL cta between edges at %0t", $time);
      end
      @(posedge clk);
      if (z_enable && z) begin
        if (exp_t) n_down++; else n_up++;
        exp_t = ~exp_t;
      end
      if (exp_t && !motor_clear) n_hold++;
      #1 checks += 2;
      if (z_toggle != exp_t) begin
        failures++; $display("FAIL z_toggle at %0t: %b expected %b", $time, z_toggle, exp_t);
      end
      if (cta != (exp_t & motor_clear)) begin
        failures++; $display("FAIL cta at %0t", $time);
      end
      if (i == 2000) begin
        #2 rst = 1'b1;
        #1 checks++;
        if (z_toggle) begin failures++; $display("FAIL async reset"); end
        exp_t = 1'b0;
        #1 rst = 1'b0;
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_hold == 0) begin
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

// Self-checking testbench for counter4, the 4-bit counter slice.
// Drives random clear and enable patterns plus an asynchronous reset in the
// middle of the run, and compares q, tc and ceo every clock with a count kept
// in the testbench as an integer modulo 16.
module tb_counter4;
  logic       clk = 1'b0;
  logic       rst, clr, ce;
  logic [3:0] q;
  logic       tc, ceo;
  int unsigned exp_q;
  int checks = 0, failures = 0;
  int wraps = 0;

  counter4 dut (.clk, .rst, .clr, .ce, .q, .tc, .ceo);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q=%0d exp=%0d tc=%b ceo=%b ce=%b", what, $time, q, exp_q, tc, ceo, ce);
    end
  endtask

  initial begin
    rst = 1'b1; clr = 1'b0; ce = 1'b0; exp_q = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("reset", q == 4'd0);
    for (int i = 0; i < 2000; i++) begin
      // change inputs away from the clock edge
      @(negedge clk);
      ce  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 40) == 0);
      #1;
      check("tc",  tc  == (exp_q == 15));
      check("ceo", ceo == ((exp_q == 15) && ce));
      @(posedge clk);
      if (clr) exp_q = 0;
      else if (ce) begin
        if (exp_q == 15) wraps++;
        exp_q = (exp_q + 1) % 16;
      end
      #1 check("q", q == exp_q[3:0]);
      if (i == 1000) begin
        // asynchronous reset between clock edges
        #2 rst = 1'b1;
        #1 check("async reset", q == 4'd0);
        exp_q = 0;
        #1 rst = 1'b0;
      end
    end
    check("counter wrapped", wraps > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

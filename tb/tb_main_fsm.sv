// Self-checking testbench for main_fsm.
// Random z, amin and amax are applied every clock; the expected state is kept
// in the testbench as a named state (RESET, COUNT, ZEN) stepped by the
// transition rules of the state diagram, and compared with the one-hot
// output. Also checks the asynchronous reset and counts every transition.
module tb_main_fsm;
  import daq_trigger_pkg::*;

  typedef enum {S_RESET, S_COUNT, S_ZEN} st_e;

  logic   clk = 1'b0;
  logic   rst, z, amin, amax;
  state_t q;
  st_e    exp_st;
  int checks = 0, failures = 0;
  int n_cnt_zen = 0, n_zen_z = 0, n_zen_amax = 0, n_cnt_stay = 0, n_zen_stay = 0;

  main_fsm dut (.clk, .rst, .z, .amin, .amax, .q);

  always #5 clk = ~clk;

  function automatic state_t enc(st_e s);
    case (s)
      S_RESET: return 3'b001;
      S_COUNT: return 3'b010;
      default: return 3'b100;
    endcase
  endfunction

  initial begin
    rst = 1'b1; z = 1'b0; amin = 1'b0; amax = 1'b0; exp_st = S_RESET;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q != 3'b001) begin failures++; $display("FAIL reset state %b", q); end
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      z    = ($urandom_range(0, 4) == 0);
      amin = ($urandom_range(0, 3) == 0);
      amax = ($urandom_range(0, 5) == 0);
      @(posedge clk);
      case (exp_st)
        S_RESET: exp_st = S_COUNT;
        S_COUNT: if (amin) begin exp_st = S_ZEN; n_cnt_zen++; end
                 else n_cnt_stay += z;   // Z ignored while counting
        S_ZEN:   if (z) begin exp_st = S_RESET; n_zen_z++; end
                 else if (amax) begin exp_st = S_RESET; n_zen_amax++; end
                 else n_zen_stay++;
      endcase
      #1 checks++;
      if (q != enc(exp_st)) begin
        failures++;
        $display("FAIL at %0t: q=%b expected %s", $time, q, exp_st.name());
      end
      if (i == 2500) begin
        #2 rst = 1'b1;
        #1 checks++;
        if (q != 3'b001) begin failures++; $display("FAIL async reset %b", q); end
        exp_st = S_RESET;
        #1 rst = 1'b0;
      end
    end
    checks++;
    if (n_cnt_zen == 0 || n_zen_z == 0 || n_zen_amax == 0 || n_cnt_stay == 0 || n_zen_stay == 0) begin
      failures++;
      $display("FAIL a transition never happened");
    end
    $display("transitions: count->zen %0d, zen->reset by Z %0d, by AMAX %0d",
             n_cnt_zen, n_zen_z, n_zen_amax);
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

// Self-checking testbench for input_sync.
// Random levels on the three inputs, changed between clock edges; every
// synchronized output must equal its input as sampled two clock edges
// earlier. Also checks the asynchronous clear.
module tb_input_sync;
  logic clk = 1'b0;
  logic rst;
  logic a_in, z_in, m_in;
  logic a_s, z_s, m_s;
  logic [2:0] hist [0:1];   // inputs sampled at the last two edges
  int checks = 0, failures = 0;
  int seen_high = 0;

  input_sync dut (
    .clk (clk), .rst (rst),
    .a_async (a_in), .z_async (z_in), .motclr_async (m_in),
    .a_sync (a_s), .z_sync (z_s), .motclr_sync (m_s)
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; a_in = 1'b1; z_in = 1'b1; m_in = 1'b1;
    hist[0] = '0; hist[1] = '0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if ({m_s, z_s, a_s} != 3'b000) begin
      failures++; $display("FAIL outputs not cleared during reset");
    end
    @(negedge clk);
    rst = 1'b0; a_in = 1'b0; z_in = 1'b0; m_in = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a_in = 1'($urandom_range(0, 1));
      z_in = 1'($urandom_range(0, 1));
      m_in = 1'($urandom_range(0, 1));
      @(posedge clk);
      hist[1] = hist[0];
      hist[0] = {m_in, z_in, a_in};
      #1 checks++;
      if ({m_s, z_s, a_s} != hist[1]) begin
        failures++;
        $display("FAIL at %0t: got %b expected %b", $time, {m_s, z_s, a_s}, hist[1]);
      end
      if (a_s && z_s && m_s) seen_high++;
    end
    checks++;
    if (seen_high == 0) begin failures++; $display("FAIL outputs never all high"); end
    // asynchronous clear between edges
    @(negedge clk);
    a_in = 1'b1; z_in = 1'b1; m_in = 1'b1;
    repeat (3) @(posedge clk);
    #2 rst = 1'b1;
    #1 checks++;
    if ({m_s, z_s, a_s} != 3'b000) begin failures++; $display("FAIL async clear"); end
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

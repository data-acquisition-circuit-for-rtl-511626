// input_sync: brings the three asynchronous trigger inputs (A-pulse, Z-pulse
// and Motor_Clear) into the system clock domain.
//
// Each input passes through a chain of STAGES flip-flops clocked by clk; the
// first stage may go metastable and the later ones give it a clock period to
// settle. All stages are cleared asynchronously by rst (active high). Each
// synchronized output follows its input STAGES clock edges later (2 by
// default).
//
// Following the document: two D flip-flops with asynchronous clear per input,
// for A, Z and Motor_Clear. The input pad buffers in front of them are FPGA
// cells and are left out here.
module input_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst,            // asynchronous clear, active high
  input  logic a_async,        // A-pulse from the encoder
  input  logic z_async,        // Z-pulse from the encoder
  input  logic motclr_async,   // Motor_Clear from the scanner (high = no motion)
  output logic a_sync,
  output logic z_sync,
  output logic motclr_sync
);

  // One row per input: bit 0 = A, bit 1 = Z, bit 2 = Motor_Clear.
  logic [STAGES-1:0][2:0] chain;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      chain <= '0;
    end else begin
      chain[0] <= {motclr_async, z_async, a_async};
      for (int unsigned s = 1; s < STAGES; s++) chain[s] <= chain[s-1];
    end
  end

  assign a_sync      = chain[STAGES-1][0];
  assign z_sync      = chain[STAGES-1][1];
  assign motclr_sync = chain[STAGES-1][2];

  initial assert (STAGES >= 1) else $error("input_sync: STAGES must be at least 1");

endmodule

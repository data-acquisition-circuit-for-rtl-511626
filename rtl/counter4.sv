// counter4: 4-bit binary up-counter slice with clock enable and clear, the
// equivalent of the CB4CE library counter the trigger's A-pulse counter is
// built from.
//
// On each rising clk edge the count q is cleared when clr is high, else
// incremented (wrapping 15 -> 0) when ce is high. tc is high while q = 15;
// ceo = tc & ce is the enable for the next slice, so slices cascade into a
// wider synchronous counter. rst is an asynchronous, active-high clear (the
// external reset of the trigger).
//
// Following the document: a 4-bit binary counter with clock enable and
// clear, cascaded to a 12-bit counter. This design's choice: the clear is
// synchronous and the external reset is a separate asynchronous input; the
// slices are chained through ceo rather than clocked one from the next.
module counter4 (
  input  logic       clk,
  input  logic       rst,   // asynchronous clear, active high
  input  logic       clr,   // synchronous clear, has priority over ce
  input  logic       ce,    // count enable
  output logic [3:0] q,
  output logic       tc,    // terminal count, q = 15
  output logic       ceo    // carry-enable out, tc & ce
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (clr)  q <= '0;
    else if (ce)   q <= q + 4'd1;
  end

  assign tc  = &q;
  assign ceo = tc & ce;

endmodule

// a_pulse_counter: counts A-pulses (encoder data points) since the last
// counter clear and decodes the two counts that bound the Z-pulse window.
//
// A rising edge of the synchronized A-pulse, seen by comparing a_sync with
// its value one clock earlier, enables a 12-bit counter made of three
// cascaded 4-bit slices (counter4). When a_sync rises at clock edge k, the
// count increments at edge k+1. amin is high
// while count = AMIN_COUNT (2040), amax while count = AMAX_COUNT (2056);
// both are decoded combinationally from the count. aover is the terminal
// count of the upper slice (count >= 3840). clr (the state system's
// Counter_Clear) empties the counter synchronously and wins over a pulse
// arriving in the same clock; en enables counting.
//
// Following the document: three cascaded 4-bit counters, and equality
// decoders for 2040 and 2056 built from the three nibbles. This design's
// choice: the counter is clocked by the system clock and counts detected A
// edges, where the published schematic clocks the slices from the A signal
// and from each other's inverted terminal count.
module a_pulse_counter
  import daq_trigger_pkg::*;
#(
  parameter int unsigned AMIN_COUNT = AMIN_DEFAULT,
  parameter int unsigned AMAX_COUNT = AMAX_DEFAULT
) (
  input  logic   clk,
  input  logic   rst,      // asynchronous clear, active high
  input  logic   a_sync,   // synchronized A-pulse
  input  logic   en,       // count enable
  input  logic   clr,      // synchronous clear (Counter_Clear)
  output count_t count,
  output logic   amin,     // count = AMIN_COUNT: open the Z window
  output logic   amax,     // count = AMAX_COUNT: close it, Z-pulse missed
  output logic   aover     // upper slice at its terminal count
);

  logic a_prev;
  logic a_rise;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) a_prev <= 1'b0;
    else     a_prev <= a_sync;
  end

  assign a_rise = a_sync & ~a_prev;

  // Slice s counts when every slice below it is at 15 and a pulse arrives.
  // The carry out of the top slice, carry[SLICES], has no user.
  logic [SLICES:0]   carry;
  logic [SLICES-1:0] slice_tc;

  assign carry[0] = a_rise & en;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    counter4 u_slice (
      .clk (clk),
      .rst (rst),
      .clr (clr),
      .ce  (carry[s]),
      .q   (count[s*SLICE_W +: SLICE_W]),
      .tc  (slice_tc[s]),
      .ceo (carry[s+1])
    );
  end

  assign amin  = (count == count_t'(AMIN_COUNT));
  assign amax  = (count == count_t'(AMAX_COUNT));
  assign aover = slice_tc[SLICES-1];

  initial begin
    assert (AMIN_COUNT < AMAX_COUNT && AMAX_COUNT < (1 << COUNT_W))
      else $error("a_pulse_counter: need AMIN_COUNT < AMAX_COUNT < 2**COUNT_W");
  end

endmodule

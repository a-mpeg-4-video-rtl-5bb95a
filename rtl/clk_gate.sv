// Clock gate for one clock domain of the frame-level clock gating.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so the gated clock
// only ever delivers whole high pulses: an enable that changes after a rising
// edge takes effect from the next rising edge. `test_en` forces the clock on
// (scan). The latch is intended: it is the standard glitch-free clock gate;
// in a real chip the library's integrated clock-gating cell replaces this
// module. The document says the clocks of whole phases are gated; the cell
// itself is this design's.
module clk_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en | test_en;
  end

  assign gclk = clk & en_l;

endmodule

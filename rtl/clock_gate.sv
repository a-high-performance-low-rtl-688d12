// Clock gating cell: a latch that is transparent while the clock is low
// holds the enable, and the clock is ANDed with the latched enable. The
// enable must be settled before the rising edge it is meant to let through;
// a change while the clock is high takes effect from the next cycle, so the
// gated clock never carries a glitch. The latch is intended; it is the
// standard integrated clock-gating structure.
//
// Clock gating as such follows the reference architecture; the latch-and-AND
// cell is this design's choice, as the gate structure is not specified there.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule

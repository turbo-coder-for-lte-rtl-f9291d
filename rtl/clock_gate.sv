// clock_gate: latch-based clock gate (integrated clock gating cell).
//
// The enable is captured by a latch that is transparent while `clk` is low,
// and the gated clock is `clk` ANDed with the latched enable. An enable that
// changes after a rising edge therefore takes effect from the next rising
// edge on, and the gated clock never shows a shortened pulse. When `en` is
// low the registers behind `gclk` receive no edges and hold their state.
// This is the gated-clock power measure of the source description, applied here to the
// SISO decoder that is idle during the other decoder's half-iteration. The
// latch is intended: it is the standard glitch-free gate structure.
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

// clock_gate: latch-based clock gate of one SDF stage.
//
// A latch that is transparent while the clock is low captures the enable;
// the gated clock is the clock ANDed with the latched enable. Because the
// latch is closed while the clock is high, a change of en can only take
// effect at the next rising edge and never produces a clock glitch. This is
// the standard integrated clock-gating cell; gating stages with a latch is as
// published, the cell structure is this design's choice. The latch is
// intended and is the reason this module reports one.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule

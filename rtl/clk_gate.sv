// clk_gate: glitch-free clock gate for the core clock (FCLK).
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so the gated clock
// can only start or stop on a falling edge and never produces a short pulse.
// This is the usual integrated clock-gating cell; the document only says
// that the PMU stops and resumes FCLK, so the cell itself is this design's
// choice. The latch is intended and is the only one in the design.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule

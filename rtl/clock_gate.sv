// clock_gate: integrated clock gate for registers that change rarely (here
// the filter coefficients, written only when a new filter mask is loaded).
// The enable is captured by a latch that is transparent while the clock is
// low, and the gated clock is the clock ANDed with the latched enable, so a
// change of en while clk is high cannot produce a glitch. gclk pulses on the
// clock cycles in which en was high before the rising edge.
//
// The latch is intentional: it is the standard glitch-free gating structure,
// and a lint warning about it stands for that reason. A standard-cell flow
// would map this module onto the library's clock-gating cell. That the
// coefficient registers are clock-gated is the document's; the latch-and-AND
// cell is this design's choice.
module clock_gate (
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

// clock_gate: pauses a module's local clock while the module has no work.
//
// This is the pausible-clock element of the GALS processor: an idle
// synchronous module is stalled by stopping its clock, much like clock
// gating. It is the usual latch-based gate: `en` is captured by a latch that
// is transparent while `clk` is low, and `gclk = clk & en_latched`, so a
// change of `en` can never cut a high phase short or produce a glitch. Drive
// `en` from logic clocked on the rising edge of `clk`; it takes effect from
// the next rising edge. The latch is intended (it is what makes the gate
// glitch-free) and is the only latch in the design.
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

// clock_gate: the clock buffer that passes or stops the clock of an actor.
//
// A latch-based integrated clock gate: the enable is captured by a latch that
// is transparent while clk is low, and the output is clk AND the latched
// enable. Because the latch is closed while clk is high, the enable can only
// change the output while the clock is low, so gclk never has a shortened
// pulse. en=1 passes every pulse of clk; en=0 holds gclk low from the next
// rising edge on. test_en forces the clock on (scan test); tie it low in
// normal use.
//
// The source description asks for a gate or buffer controlled by EN; the latch form is
// this design's choice. The latch is intended and is reported as such by lint
// tools: it is the standard glitch-free gating cell, which an ASIC flow
// replaces by the library's clock-gating cell.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en || test_en;
  end

  assign gclk = clk & en_lat;

endmodule

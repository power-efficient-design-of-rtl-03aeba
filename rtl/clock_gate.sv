// clock_gate -- latch-based integrated clock gate: gclk = clk & en_latched.
//
// The enable is captured by a level-sensitive latch that is transparent while
// clk is low, so it cannot change while clk is high and the gated clock has
// no glitches. A register bank clocked by gclk is clocked only in the cycles
// in which en was high before the rising edge of clk; in all other cycles its
// clock net is quiet and it dissipates no clock power. The filter uses one
// gate per register file: the coefficient file of a TAP is clocked only when
// it is written, the sample file only once per sample (every 8 cycles).
// The latch is intentional: it is the standard clock-gating cell, and a
// technology library would replace this module by its own gating cell.
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

// vit_clock_gate: latch-based clock gating cell.
//
// Passes clock pulses to gclk only in cycles whose enable was high while clk
// was low. The enable is caught in a latch that is transparent during the low
// phase of clk and holds during the high phase, so a change of `en` while clk
// is high cannot cut or create a pulse (no glitches). gclk is clk AND the
// latched enable.
//
// Timing: drive `en` from logic clocked on the rising edge of clk; it then
// decides whether the next rising edge reaches the gated registers.
// The trace-back array uses one of these per trace-back unit to stop the
// clock of route logic that has nothing to do. That clock gating is used is
// part of the design; this standard latch-and-AND cell is this
// implementation's choice of how.
module vit_clock_gate (
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

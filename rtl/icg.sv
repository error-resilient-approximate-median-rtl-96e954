// icg: integrated clock gating cell.
//
// A latch, transparent while clk is low, holds the enable through the high
// phase; the gated clock is clk AND the latched enable. The enable must
// settle before the rising edge of clk, and gclk then carries that edge (or
// stays low for the whole cycle). The latch here is intended: it is what
// keeps glitches on en off the gated clock.
//
// Latch plus AND gate is the gating cell the look-ahead clock gating scheme
// uses.
module icg (
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

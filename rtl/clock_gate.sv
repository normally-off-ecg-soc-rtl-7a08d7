// Integrated clock-gating cell: a latch transparent while the clock is low
// holds the enable, so the gated clock has no glitches when the enable changes.
// The latch is intended (it is the standard gating-cell structure); a library
// gating cell would replace this module in a real implementation.
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

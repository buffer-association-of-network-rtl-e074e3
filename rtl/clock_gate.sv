// clock_gate: latch-based clock gate of the router top.
//
// A level-sensitive latch samples en_i while clk is low (latch_en). The gated
// clock is clk AND latch_en. Because latch_en can change only while clk is
// low, gated_clk carries only whole clock pulses and no glitches. While en_i
// is low the router's registers receive no clock edges and hold their state,
// which saves dynamic power.
//
// Gating the router's clock with a latch follows the design. The signal names
// en_i, latch_en and gated_clk are the design's own. The latch is deliberate:
// it is the standard glitch-free gating cell, so the tools' latch warning for
// latch_en is expected.
module clock_gate (
  input  logic clk,
  input  logic en_i,
  output logic latch_en,
  output logic gated_clk
);
  always_latch begin
    if (!clk) latch_en = en_i;
  end

  assign gated_clk = clk & latch_en;
endmodule

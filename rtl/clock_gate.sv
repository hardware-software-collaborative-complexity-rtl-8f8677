// Latch-based clock gate (the "AND gate" of the clock enabler). The enable
// is captured by a latch that is transparent while the clock is low, so
// the gated clock `gclk = clk & en_latched` can neither glitch nor clip a
// high phase. The latch is intended: it is the standard integrated
// clock-gating structure that an ASIC flow maps to a gating cell and an
// FPGA flow to a clock-enable.
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

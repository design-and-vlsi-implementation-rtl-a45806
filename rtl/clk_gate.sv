// clk_gate: glitch-free clock gate (integrated clock gating cell behaviour).
// The enable is captured by a latch that is transparent while clk is low and ANDed with
// clk, so gclk only ever loses or gains whole high pulses. The latch is intended: it is
// the standard clock-gating structure and a synthesis flow maps it to the library's ICG
// cell.
//
// From the SoC description: module clocks such as the debug module's can be shut down. The latch-based
// gate is this design's own (standard) choice.
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

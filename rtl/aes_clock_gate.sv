// aes_clock_gate: integrated clock-gating cell (latch plus AND).
//
// The enable is captured by a latch that is transparent while clk is low,
// and the gated clock is clk AND the latched enable. Because the latch is
// closed while clk is high, a change of `en` during the high phase cannot
// cut or create a clock pulse: gclk either copies a whole clk pulse or
// stays low. `en` must settle before the rising edge, like any flip-flop
// input. The latch is intentional (it is the standard glitch-free gate); a
// standard-cell flow would map this module onto its ICG cell.
module aes_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch
    if (!clk) en_lat = en;

  assign gclk = clk & en_lat;
endmodule

// ztcam_clock_gate: clock gate for the ZTCAM core.
//
// A latch-based integrated clock gate. The enable is sampled by a latch that
// is transparent while clk is low and holds while clk is high, and the gated
// clock is clk AND the latched enable. Because the latch cannot change while
// clk is high, the gated clock never carries a shortened pulse or a glitch,
// whatever the timing of en. While en is low the gated clock stays low and
// every flip-flop behind it (search output, mapper, tables) keeps its state:
// the core neither samples its inputs nor switches.
//
// Interface: en (clock enable, from the core's clk_en input) and test_en
// (forces the clock on, e.g. for scan) are combined before the latch. The
// gated clock follows clk with the enable as sampled on the last falling
// edge, so raising en before a rising edge lets that edge through.
//
// Gating the clock under an enable is what the design asks for; using a
// latch-based cell for it is this implementation's choice. The latch the
// tools report here is intended: it is the gating cell itself.
module ztcam_clock_gate (
  input  logic clk,      // free-running clock
  input  logic en,       // functional clock enable
  input  logic test_en,  // force the clock on
  output logic gclk      // gated clock
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en | test_en;
  end

  assign gclk = clk & en_latched;

endmodule

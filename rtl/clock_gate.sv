// clock_gate: AND-type clock gate that feeds one clock subtree.
//
// The gated clock is the global clock ANDed with an enable, as in the
// fine-grain gating scheme where every subtree has its own enable. The enable
// is held in a latch that is transparent while clk is low, so a change of
// `en` during the high phase (which happens whenever the enable is derived
// from flip-flops clocked by the same edge) can neither cut a pulse short nor
// start a second pulse in the same cycle. The AND gate is the source design's;
// the latch in front of it is this design's choice (a plain AND would let a
// flip-flop capture twice in one cycle once its enable depends on neighbouring
// flip-flops). The latch is intentional and is the only latch in the design.
//
// Interface: clk (global clock), en (enable, sampled at the end of the low
// phase), gclk (gated clock: a copy of the clk pulse in cycles where en was 1
// just before the rising edge, low otherwise).
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule

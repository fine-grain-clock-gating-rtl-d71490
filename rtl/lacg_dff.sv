// lacg_dff: D flip-flop with a self-generated (look-ahead) gated clock.
//
// The flip-flop compares its D input with its Q output through an XOR gate.
// Only when they differ, i.e. when the next edge would change the stored bit,
// is the clock let through to the flip-flop by an AND-type clock gate; when D
// equals Q the flip-flop's clock stays low and it does not switch at all.
// Seen from outside it behaves like an ordinary rising-edge D flip-flop.
// XOR comparison and AND gating follow the source design; the enable latch
// inside clock_gate and the asynchronous reset are this design's choices.
//
// Interface: clk (global clock), rst (asynchronous, active-high reset, clears
// Q), d, q. Timing: q takes d at a rising edge of clk, one cycle of latency.
// gclk_o exposes the flip-flop's private clock so that its pulses can be
// counted (it toggles only in cycles where d differed from q).
module lacg_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic gclk_o
);

  logic change;

  assign change = d ^ q;

  clock_gate u_gate (
    .clk  (clk),
    .en   (change),
    .gclk (gclk_o)
  );

  always_ff @(posedge gclk_o or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end

endmodule

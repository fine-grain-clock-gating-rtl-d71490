// lacg_delay: DEPTH cascaded LACG registers of W bits (a delay line).
//
// Used by the multiplier to carry operand bits and finished product bits
// alongside a pipelined adder, so that they arrive at the next adder row in
// the same cycle as that adder's result. Every flip-flop gates its own clock,
// so bits that stay constant (a held operand, a zero partial result) cost no
// clock switching.
//
// Interface: clk, rst (asynchronous, active high), d[W-1:0], q[W-1:0];
// q is d delayed by DEPTH (>= 1) rising edges.
module lacg_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [DEPTH:0][W-1:0] tap;

  assign tap[0] = d;

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    logic [W-1:0] stage_gclk;

    lacg_reg #(.W(W)) u_reg (
      .clk  (clk),
      .rst  (rst),
      .d    (tap[k]),
      .q    (tap[k+1]),
      .gclk (stage_gclk)
    );
  end

  assign q = tap[DEPTH];

endmodule

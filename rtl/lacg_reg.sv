// lacg_reg: W-bit register built from W look-ahead clock gated flip-flops.
//
// Every bit owns its clock gate, so a bit whose input does not change receives
// no clock pulse while the other bits of the same register keep switching.
// The 8-bit default is the register width of the source design's adder slice.
//
// Interface: clk, rst (asynchronous, active high, clears the register),
// d[W-1:0], q[W-1:0], gclk[W-1:0] (each bit's gated clock, for observing the
// gating). Timing: q follows d one clock later, like a plain register.
module lacg_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] gclk
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    lacg_dff u_ff (
      .clk    (clk),
      .rst    (rst),
      .d      (d[i]),
      .q      (q[i]),
      .gclk_o (gclk[i])
    );
  end

endmodule

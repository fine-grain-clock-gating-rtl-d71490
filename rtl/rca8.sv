// rca8: 8-bit carry-ripple adder, the slice from which the pipelined adder is
// built.
//
// Eight full adders in a chain; the carry of bit i feeds bit i+1, so the top
// sum bit is valid only after the carry has rippled through all eight cells.
// Ports a[7:0], b[7:0], cin, s[7:0], cout as in the source design.
// Purely combinational.
module rca8
  import lacg_pkg::*;
(
  input  logic [SLICE_W-1:0] a,
  input  logic [SLICE_W-1:0] b,
  input  logic               cin,
  output logic [SLICE_W-1:0] s,
  output logic               cout
);

  logic [SLICE_W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < SLICE_W; i++) begin : g_fa
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (s[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[SLICE_W];

endmodule

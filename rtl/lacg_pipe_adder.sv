// lacg_pipe_adder: WIDTH-bit pipelined adder with look-ahead clock gating.
//
// The addition is cut into WIDTH/8 carry-ripple slices (rca8). Slice k adds
// bits [8k+7:8k] of the operands together with the carry that slice k-1
// produced one cycle earlier. Between two slices sits an LACG register bank
// that holds
//   - the sum bits produced so far (deskew: they wait for the upper bytes),
//   - the carry out of the slice just computed,
//   - the operand bits of the slices still to come (skew: they wait their turn).
// The last slice is not followed by a register: its sum bits and the deskewed
// lower bytes form s combinationally. For WIDTH = 32 this gives three banks of
// 57, 49 and 41 flip-flops (147 in all) and a latency of three cycles; a new
// addition can start every cycle. The carry out of the top slice is dropped
// (the sum is taken modulo 2**WIDTH). Every flip-flop gates its own clock:
// it is pulsed only when its next value differs from its present one.
// Slices, carry hand-over and skew/deskew buffering follow the source
// design; the exact split of each bank and the dropped top carry are this
// design's reading of it.
//
// Interface: clk, rst (asynchronous, active high), a, b, cin presented
// together; s = a + b + cin (mod 2**WIDTH) appears adder_latency(WIDTH)
// rising edges later. WIDTH must be a multiple of 8 and at least 16.
module lacg_pipe_adder
  import lacg_pkg::*;
#(
  parameter int unsigned WIDTH = OPER_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s
);

  localparam int unsigned NS = WIDTH / SLICE_W;   // slices = pipeline stages

  // Values seen by stage k: operands (only the bits of slices >= k are used),
  // partial sum (only the bits of slices < k are used) and incoming carry.
  logic [NS-1:0][WIDTH-1:0] a_st;
  logic [NS-1:0][WIDTH-1:0] b_st;
  logic [NS-1:0][WIDTH-1:0] sum_st;
  logic [NS-1:0]            c_st;

  assign a_st[0]   = a;
  assign b_st[0]   = b;
  assign sum_st[0] = '0;
  assign c_st[0]   = cin;

  for (genvar k = 0; k < NS; k++) begin : g_stage
    localparam int unsigned LO = k * SLICE_W;
    localparam int unsigned HI = LO + SLICE_W;    // first bit of the next slice

    logic [SLICE_W-1:0] slice_sum;
    logic               slice_cout;
    logic [WIDTH-1:0]   sum_acc;

    rca8 u_rca (
      .a    (a_st[k][LO +: SLICE_W]),
      .b    (b_st[k][LO +: SLICE_W]),
      .cin  (c_st[k]),
      .s    (slice_sum),
      .cout (slice_cout)
    );

    always_comb begin
      sum_acc                 = sum_st[k];
      sum_acc[LO +: SLICE_W]  = slice_sum;
    end

    if (k < NS - 1) begin : g_bank
      // bank layout: {a[WIDTH-1:HI], b[WIDTH-1:HI], carry, sum[HI-1:0]}
      localparam int unsigned BW = 2 * (WIDTH - HI) + 1 + HI;

      logic [BW-1:0] bank_d;
      logic [BW-1:0] bank_q;
      logic [BW-1:0] bank_gclk;

      assign bank_d = {a_st[k][WIDTH-1:HI], b_st[k][WIDTH-1:HI], slice_cout, sum_acc[HI-1:0]};

      lacg_reg #(.W(BW)) u_bank (
        .clk  (clk),
        .rst  (rst),
        .d    (bank_d),
        .q    (bank_q),
        .gclk (bank_gclk)
      );

      assign {a_st[k+1][WIDTH-1:HI], b_st[k+1][WIDTH-1:HI], c_st[k+1], sum_st[k+1][HI-1:0]} = bank_q;
      assign a_st[k+1][HI-1:0]     = '0;
      assign b_st[k+1][HI-1:0]     = '0;
      assign sum_st[k+1][WIDTH-1:HI] = '0;
    end else begin : g_out
      assign s = sum_acc;
    end
  end

endmodule

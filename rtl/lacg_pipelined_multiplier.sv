// lacg_pipelined_multiplier: WIDTH x WIDTH pipelined array multiplier whose
// every flip-flop gates its own clock (fine-grain look-ahead clock gating).
//
// Structure (an unsigned carry-save-free array multiplier):
//   - partial products are AND gates: pp_i = input_A & {WIDTH{input_B[i]}};
//   - row i (i = 1 .. WIDTH-1) is one lacg_pipe_adder that adds pp_i to the
//     previous row's sum shifted right by one bit (row 1 adds pp_1 to pp_0);
//   - bit 0 of every row's sum is a finished product bit; it is buffered and
//     travels down the array with the rows still to come, together with the
//     operand bits those rows still need (lacg_delay, one register per adder
//     bank), so that all bits of a product leave the array in the same cycle.
// Output_Q is the low WIDTH bits of the product. Cin is the carry input of
// the first adder row; it enters at weight 2, so
//     Output_Q = (input_A * input_B + 2 * Cin) mod 2**WIDTH,
// and with Cin = 0 Output_Q is the plain truncated product.
//
// Port names, the AND-gate partial products, the cascade of pipelined adders
// and the buffering of the low product bits follow the source design. The
// right shift between rows, the forwarding of the operands beside each adder,
// the use of Cin and the asynchronous reset are this design's choices where
// the source is silent.
//
// Timing: one multiplication can start every cycle. A product appears on
// Output_Q mult_latency(WIDTH) rising edges after its operands were presented
// (93 cycles for WIDTH = 32: 31 rows of three-cycle adders). reset is
// asynchronous and active high; it clears every flip-flop.
module lacg_pipelined_multiplier
  import lacg_pkg::*;
#(
  parameter int unsigned WIDTH = OPER_W
) (
  input  logic             clock,
  input  logic             reset,
  input  logic [WIDTH-1:0] input_A,
  input  logic [WIDTH-1:0] input_B,
  input  logic             Cin,
  output logic [WIDTH-1:0] Output_Q
);

  localparam int unsigned LAT = adder_latency(WIDTH);   // cycles per row

  // Signals entering row i: operand A, operand B (bits above i still used),
  // finished product bits [i-1:0], and the sum of row i-1.
  logic [WIDTH-1:0][WIDTH-1:0] a_row;
  logic [WIDTH-1:0][WIDTH-1:0] b_row;
  logic [WIDTH-1:0][WIDTH-1:0] p_row;
  logic [WIDTH-1:0][WIDTH-1:0] s_row;

  // Row 0 is the first partial product alone.
  assign a_row[0] = '0;
  assign b_row[0] = '0;
  assign p_row[0] = '0;
  assign s_row[0] = input_A & {WIDTH{input_B[0]}};

  assign a_row[1] = input_A;
  assign b_row[1] = input_B;
  assign p_row[1] = {{(WIDTH-1){1'b0}}, s_row[0][0]};

  for (genvar i = 1; i < WIDTH; i++) begin : g_row
    logic [WIDTH-1:0] pp;
    logic [WIDTH-1:0] shifted;

    assign pp      = a_row[i] & {WIDTH{b_row[i][i]}};
    assign shifted = {1'b0, s_row[i-1][WIDTH-1:1]};

    lacg_pipe_adder #(.WIDTH(WIDTH)) u_add (
      .clk (clock),
      .rst (reset),
      .a   (shifted),
      .b   (pp),
      .cin ((i == 1) ? Cin : 1'b0),
      .s   (s_row[i])
    );

    if (i < WIDTH - 1) begin : g_fwd
      // {A, B[WIDTH-1:i+1], P[i-1:0]}: 2*WIDTH-1 bits beside the adder.
      localparam int unsigned FW = WIDTH + (WIDTH - 1 - i) + i;

      logic [FW-1:0] fwd_q;

      lacg_delay #(.W(FW), .DEPTH(LAT)) u_fwd (
        .clk (clock),
        .rst (reset),
        .d   ({a_row[i], b_row[i][WIDTH-1:i+1], p_row[i][i-1:0]}),
        .q   (fwd_q)
      );

      assign {a_row[i+1], b_row[i+1][WIDTH-1:i+1], p_row[i+1][i-1:0]} = fwd_q;
      assign b_row[i+1][i:0]       = '0;
      assign p_row[i+1][i]         = s_row[i][0];
      assign p_row[i+1][WIDTH-1:i+1] = '0;
    end else begin : g_last
      logic [WIDTH-2:0] p_last;

      lacg_delay #(.W(WIDTH-1), .DEPTH(LAT)) u_fwd (
        .clk (clock),
        .rst (reset),
        .d   (p_row[i][WIDTH-2:0]),
        .q   (p_last)
      );

      assign Output_Q = {s_row[i][0], p_last};
    end
  end

endmodule

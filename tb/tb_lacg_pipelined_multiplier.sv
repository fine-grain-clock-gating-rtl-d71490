// tb_lacg_pipelined_multiplier: end-to-end test of the 32 x 32 LACG
// pipelined multiplier at its default size.
//
// A new operand pair is applied every cycle (on the falling edge) and each
// result is checked exactly mult_latency() = 93 cycles later against a
// product computed here with the '*' operator, so both the arithmetic and the
// cycle count are checked. The run goes through the five input cases used to
// evaluate the design (random A and B; A = B = 1; A = 1, B = 0; A = 0, B = 1;
// A = B = 0), plus all-ones operands, Cin = 1 and a reset in mid-stream.
//
// Clock-gating mechanisms are observed on the private clocks of the first
// bank of the first adder row and on the first bank of the last row: the
// test counts cycles in which at least one flip-flop there was clocked and
// cycles in which at least one was gated off, and requires that once a
// constant input case has filled the pipeline the observed banks get no
// clock pulse at all. Each mechanism that never happens counts a failure.
//
// The private clocks of all flip-flops of the array are also summed every
// cycle. For each of the five input cases the test prints how many
// flip-flops were clocked per cycle on average, against the total an ungated
// design would clock every cycle, and it requires zero clock pulses anywhere
// in the array once a constant case has filled the pipeline.
module tb_lacg_pipelined_multiplier;
  import lacg_pkg::*;

  localparam int unsigned W   = OPER_W;
  localparam int unsigned LAT = mult_latency(W);
  localparam int unsigned NRAND = 400;

  logic         clock = 1'b0;
  logic         reset;
  logic [W-1:0] input_A, input_B;
  logic         Cin;
  logic [W-1:0] Output_Q;

  int unsigned checks = 0, failures = 0;

  lacg_pipelined_multiplier dut (
    .clock    (clock),
    .reset    (reset),
    .input_A  (input_A),
    .input_B  (input_B),
    .Cin      (Cin),
    .Output_Q (Output_Q)
  );

  always #5 clock = ~clock;

  // Scoreboard: expected product for every cycle, indexed by issue cycle.
  localparam int unsigned HIST = 4096;
  logic [W-1:0] expect_q [HIST];
  logic         expect_v [HIST];
  int unsigned  cyc = 0;

  // Gating observation.
  int unsigned clocked_cycles = 0, gated_cycles = 0, quiet_cycles = 0;
  int unsigned n_results = 0, n_cin = 0, n_reset = 0;
  logic        expect_quiet = 1'b0;

  localparam int unsigned BW0 = 2 * (W - SLICE_W) + 1 + SLICE_W;
  localparam int unsigned LATA = adder_latency(W);
  // Flip-flops in the design, counted from its structure: W-1 adders, W-2
  // forwarding lines of 2W-1 bits and one of W-1 bits, each LATA deep.
  function automatic int unsigned count_ffs();
    int unsigned adder_ffs = 0;
    for (int unsigned k = 1; k <= LATA; k++) adder_ffs += 2 * (W - SLICE_W * k) + 1 + SLICE_W * k;
    return (W - 1) * adder_ffs + (W - 2) * LATA * (2 * W - 1) + LATA * (W - 1);
  endfunction
  localparam int unsigned NFF = count_ffs();

  // Whole-design clock activity: pulses of every private clock, per cycle.
  int unsigned pulses_rk [W][LATA];
  for (genvar i = 1; i < W; i++) begin : g_mon
    for (genvar k = 0; k < LATA; k++) begin : g_k
      if (i < W - 1) begin : g_f
        assign pulses_rk[i][k] = $countones(dut.g_row[i].u_add.g_stage[k].g_bank.bank_gclk)
                               + $countones(dut.g_row[i].g_fwd.u_fwd.g_stage[k].stage_gclk);
      end else begin : g_l
        assign pulses_rk[i][k] = $countones(dut.g_row[i].u_add.g_stage[k].g_bank.bank_gclk)
                               + $countones(dut.g_row[i].g_last.u_fwd.g_stage[k].stage_gclk);
      end
    end
  end
  for (genvar k = 0; k < LATA; k++) begin : g_k0
    assign pulses_rk[0][k] = 0;
  end

  // Input case being run: 0 random, 1 A=B=1, 2 A=1 B=0, 3 A=0 B=1, 4 A=B=0,
  // 5 other (all-ones, Cin, reset). Steady-state cycles count once the
  // pipeline is full of the case's operands.
  localparam int unsigned NCASE = 6;
  int unsigned case_id = 5;
  longint unsigned case_pulses [NCASE];
  int unsigned     case_cycles [NCASE];
  longint unsigned steady_pulses [NCASE];
  int unsigned     steady_cycles [NCASE];
  longint unsigned total_pulses = 0;

  // Sample the private clocks while the global clock is high.
  always @(posedge clock) begin
    #1;
    begin
      logic [BW0-1:0] g_first, g_last;
      g_first = dut.g_row[1].u_add.g_stage[0].g_bank.bank_gclk;
      g_last  = dut.g_row[W-1].u_add.g_stage[0].g_bank.bank_gclk;
      if (!reset) begin
        longint unsigned n;
        n = 0;
        for (int i = 0; i < W; i++)
          for (int k = 0; k < LATA; k++) n += pulses_rk[i][k];
        total_pulses += n;
        case_pulses[case_id] += n;
        case_cycles[case_id]++;
        if (expect_quiet) begin
          steady_pulses[case_id] += n;
          steady_cycles[case_id]++;
          // nothing anywhere in the array may switch its clock
          checks++;
          if (n != 0) begin
            failures++;
            $display("FAIL cycle %0d: %0d clock pulses with constant operands", cyc, n);
          end
        end
        if (|g_first || |g_last) clocked_cycles++;
        if (~&g_first || ~&g_last) gated_cycles++;
        if (expect_quiet) begin
          checks++;
          if (|g_first || |g_last) begin
            failures++;
            $display("FAIL cycle %0d: clock pulse in a bank whose data is constant", cyc);
          end else quiet_cycles++;
        end
      end
    end
  end

  task automatic issue(input logic [W-1:0] a, input logic [W-1:0] b, input logic c);
    @(negedge clock);
    // check the result due now, then present the next operands
    if (cyc >= LAT && expect_v[(cyc - LAT) % HIST]) begin
      checks++;
      n_results++;
      if (Output_Q !== expect_q[(cyc - LAT) % HIST]) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: Output_Q=%h expected %h", cyc, Output_Q,
                   expect_q[(cyc - LAT) % HIST]);
      end
    end
    input_A = a;
    input_B = b;
    Cin     = c;
    expect_q[cyc % HIST] = W'(a * b + 2 * W'(c));
    expect_v[cyc % HIST] = !reset;
    if (c) n_cin++;
    cyc++;
  endtask

  task automatic run_const(input logic [W-1:0] a, input logic [W-1:0] b, input int unsigned n);
    for (int unsigned k = 0; k < n; k++) begin
      expect_quiet = (k > LAT + 4);
      issue(a, b, 1'b0);
    end
    expect_quiet = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < HIST; i++) expect_v[i] = 1'b0;
    reset = 1'b1; input_A = '0; input_B = '0; Cin = 1'b0;
    repeat (3) @(negedge clock);
    // While reset is held every flip-flop is clear and the output is zero.
    checks++;
    if (Output_Q !== '0) begin failures++; $display("FAIL: output not zero in reset"); end
    reset = 1'b0;

    // Case 1: random A and B (Cin = 0).
    case_id = 0;
    for (int unsigned k = 0; k < NRAND; k++) issue($urandom, $urandom, 1'b0);
    // Case 2..5: constant operands, each long enough to fill the pipeline.
    case_id = 1; run_const(W'(1), W'(1), 2 * LAT);
    case_id = 2; run_const(W'(1), W'(0), 2 * LAT);
    case_id = 3; run_const(W'(0), W'(1), 2 * LAT);
    case_id = 4; run_const(W'(0), W'(0), 2 * LAT);
    case_id = 5;
    // All-ones operands and random operands with Cin = 1.
    run_const('1, '1, 2 * LAT);
    for (int unsigned k = 0; k < 100; k++) issue($urandom, $urandom, 1'($urandom));
    for (int unsigned k = 0; k < LAT; k++) issue($urandom, $urandom, 1'b0);

    // Reset in mid-stream: everything in flight is discarded.
    @(negedge clock);
    reset = 1'b1;
    n_reset++;
    for (int i = 0; i < HIST; i++) expect_v[i] = 1'b0;
    #1;
    checks++;
    if (Output_Q !== '0) begin failures++; $display("FAIL: output not cleared by reset"); end
    @(negedge clock);
    reset = 1'b0;
    for (int unsigned k = 0; k < LAT + 50; k++) issue($urandom, $urandom, 1'b0);

    // Every mechanism must have happened.
    checks++; if (n_results == 0)      begin failures++; $display("FAIL: no result checked"); end
    checks++; if (clocked_cycles == 0) begin failures++; $display("FAIL: no clock pulse seen"); end
    checks++; if (gated_cycles == 0)   begin failures++; $display("FAIL: no clock gated off"); end
    checks++; if (quiet_cycles == 0)   begin failures++; $display("FAIL: no fully gated bank"); end
    checks++; if (n_cin == 0)          begin failures++; $display("FAIL: Cin never set"); end
    checks++; if (n_reset == 0)        begin failures++; $display("FAIL: no mid-stream reset"); end
    checks++; if (case_pulses[0] == 0) begin failures++; $display("FAIL: no clock activity with random operands"); end
    for (int c = 0; c < 5; c++)
      $display("case %0d: %0d cycles, %0.2f clocked flip-flops per cycle of %0d (%0.2f%%); steady state %0d cycles, %0d pulses",
               c, case_cycles[c], real'(case_pulses[c]) / real'(case_cycles[c]), NFF,
               100.0 * real'(case_pulses[c]) / (real'(case_cycles[c]) * real'(NFF)),
               steady_cycles[c], steady_pulses[c]);
    $display("results=%0d clocked_cycles=%0d gated_cycles=%0d quiet_cycles=%0d cin=%0d resets=%0d",
             n_results, clocked_cycles, gated_cycles, quiet_cycles, n_cin, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

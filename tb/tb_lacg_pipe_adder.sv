// tb_lacg_pipe_adder: checks the 32-bit pipelined adder. A new operand set is
// applied every cycle and each sum is compared, exactly adder_latency(32) = 3
// cycles later, with a + b + cin computed here. Random operands, carry chains
// that cross every slice boundary (all-ones plus one), held constant
// operands and the constant cases A = B = 1; A = 1, B = 0; A = 0, B = 1;
// A = B = 0 are used; while operands are held, the first register bank must
// get no clock pulse at all.
module tb_lacg_pipe_adder;
  import lacg_pkg::*;

  localparam int unsigned W   = OPER_W;
  localparam int unsigned LAT = adder_latency(W);
  localparam int unsigned BW0 = 2 * (W - SLICE_W) + 1 + SLICE_W;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] a, b, s;
  logic cin;
  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0, carries = 0, quiet = 0;
  logic [W-1:0] exp_s [64];
  logic         exp_v [64];
  logic         hold;

  lacg_pipe_adder dut (.clk(clk), .rst(rst), .a(a), .b(b), .cin(cin), .s(s));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1;
    if (hold) begin
      checks++;
      if (dut.g_stage[0].g_bank.bank_gclk !== '0) begin
        failures++;
        $display("FAIL cycle %0d: bank clocked while operands held", cyc);
      end else quiet++;
    end
  end

  task automatic issue(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    @(negedge clk);
    if (cyc >= LAT && exp_v[(cyc - LAT) % 64]) begin
      checks++;
      if (s !== exp_s[(cyc - LAT) % 64]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: s=%h expected %h", cyc, s, exp_s[(cyc - LAT) % 64]);
      end
    end
    a = x; b = y; cin = c;
    exp_s[cyc % 64] = x + y + W'(c);
    exp_v[cyc % 64] = 1'b1;
    if ((33'(x) + 33'(y) + 33'(c)) >> 8 != 33'(x >> 8) + 33'(y >> 8)) carries++;
    cyc++;
  endtask

  initial begin
    for (int i = 0; i < 64; i++) exp_v[i] = 1'b0;
    hold = 1'b0;
    rst = 1'b1; a = '0; b = '0; cin = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (s !== '0) begin failures++; $display("FAIL: sum not zero in reset"); end
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) issue($urandom, $urandom, 1'($urandom));
    for (int k = 0; k < 200; k++) begin
      int sh = $urandom % 32;
      issue(W'({W{1'b1}} >> sh), W'(1), 1'($urandom));
    end
    for (int k = 0; k < 40; k++) begin
      hold = (k > 1);
      issue(W'(32'h1234_5678), W'(32'h0fed_cba9), 1'b1);
    end
    hold = 1'b0;
    // The four constant input cases used to evaluate the adder
    // (A = B = 1; A = 1, B = 0; A = 0, B = 1; A = B = 0), with cin = 0.
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < 20; k++) begin
        hold = (k > 1);
        issue(W'(t < 2), W'(t % 2 == 0), 1'b0);
      end
    end
    hold = 1'b0;
    for (int k = 0; k < LAT + 2; k++) issue($urandom, $urandom, 1'b0);
    checks++; if (carries == 0) begin failures++; $display("FAIL: no carry between slices"); end
    checks++; if (quiet == 0)   begin failures++; $display("FAIL: bank never fully gated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

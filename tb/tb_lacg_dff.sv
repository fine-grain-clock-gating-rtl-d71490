// tb_lacg_dff: checks that the self-gated flip-flop stores like a plain D
// flip-flop, that its private clock pulses exactly in the cycles where D
// differs from Q, and that the asynchronous reset clears it without a clock.
module tb_lacg_dff;

  logic clk = 1'b0;
  logic rst, d, q, gclk;
  logic model_q;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses = 0, gated = 0, resets = 0;

  lacg_dff dut (.clk(clk), .rst(rst), .d(d), .q(q), .gclk_o(gclk));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; d = 1'b1;
    #2;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL: reset did not clear q"); end
    resets++;
    model_q = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    d   = 1'b0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      // a long run of equal values now and then, so the clock stays gated
      d = (cyc % 50 < 10) ? model_q : 1'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (gclk !== (d ^ model_q)) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%0b with d=%0b q=%0b", cyc, gclk, d, model_q);
      end
      if (d ^ model_q) pulses++; else gated++;
      model_q = d;
      checks++;
      if (q !== model_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%0b expected %0b", cyc, q, model_q);
      end
    end
    // asynchronous reset in the middle of a low phase
    @(negedge clk);
    d = 1'b1;
    @(posedge clk);
    @(negedge clk);
    #1 rst = 1'b1;
    #1 checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL: async reset did not clear q"); end
    resets++;
    checks++; if (pulses == 0) begin failures++; $display("FAIL: never clocked"); end
    checks++; if (gated == 0)  begin failures++; $display("FAIL: never gated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

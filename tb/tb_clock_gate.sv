// tb_clock_gate: checks the AND-type clock gate with its low-phase enable
// latch. The enable is changed at random both during the low phase (where it
// must decide the next pulse) and during the high phase (where it must not
// cut or start a pulse). Each cycle the gated clock is sampled in the middle
// of the high phase and of the low phase and compared with the enable value
// that was present just before the rising edge.
module tb_clock_gate;

  logic clk = 1'b0;
  logic en;
  logic gclk;
  int unsigned checks = 0, failures = 0;
  int unsigned pulses = 0, gated = 0, late_changes = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  initial begin
    logic en_at_edge;
    en = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: choose the enable for the coming edge
      #2 en = 1'($urandom);
      #3 en_at_edge = en;
      clk = 1'b1;                       // rising edge
      #1 if ($urandom % 2) begin en = ~en; late_changes++; end  // change while high
      #1 checks++;
      if (gclk !== en_at_edge) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%0b expected %0b in high phase", cyc, gclk, en_at_edge);
      end
      if (en_at_edge) pulses++; else gated++;
      #3 clk = 1'b0;                    // falling edge
      #1 checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: gclk high in low phase", cyc);
      end
    end
    checks++; if (pulses == 0) begin failures++; $display("FAIL: no pulse passed"); end
    checks++; if (gated == 0)  begin failures++; $display("FAIL: no pulse gated"); end
    checks++; if (late_changes == 0) begin failures++; $display("FAIL: no high-phase change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

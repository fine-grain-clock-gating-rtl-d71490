// tb_lacg_reg: checks the 8-bit LACG register: q follows d one cycle later,
// and in every cycle exactly the bits whose value changes receive a clock
// pulse on their private clock.
module tb_lacg_reg;

  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic rst;
  logic [W-1:0] d, q, gclk, model_q;
  int unsigned checks = 0, failures = 0;
  int unsigned partial = 0;

  lacg_reg #(.W(W)) dut (.clk(clk), .rst(rst), .d(d), .q(q), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; d = '0; model_q = '0;
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      // flip a random subset of the bits
      d = model_q ^ W'($urandom & $urandom);
      @(posedge clk);
      #1;
      checks++;
      if (gclk !== (d ^ model_q)) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%b expected %b", cyc, gclk, d ^ model_q);
      end
      if (gclk != '0 && gclk != '1) partial++;
      model_q = d;
      checks++;
      if (q !== model_q) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", cyc, q, model_q);
      end
    end
    checks++; if (partial == 0) begin failures++; $display("FAIL: no partly gated cycle"); end
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

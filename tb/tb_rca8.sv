// tb_rca8: exhaustive check of the 8-bit carry-ripple adder: all 2**17
// combinations of a, b and cin against the 9-bit sum computed with '+'.
module tb_rca8;

  logic [7:0] a, b, s;
  logic       cin, cout;
  int unsigned checks = 0, failures = 0;

  rca8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int unsigned v = 0; v < (1 << 17); v++) begin
      {cin, b, a} = 17'(v);
      #1;
      checks++;
      if ({cout, s} !== 9'(a) + 9'(b) + 9'(cin)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: %h + %h + %0b gave %0b_%h", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_full_adder: exhaustive check of the full adder against a + b + c.
module tb_full_adder;
  int checks = 0, failures = 0;
  logic a, b, c, s, co;
  full_adder dut (.a, .b, .c, .s, .co);
  initial begin
    #10000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i); #1;
      checks++;
      if ({co, s} != 2'(a) + 2'(b) + 2'(c)) begin
        failures++; $display("FAIL a=%b b=%b c=%b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

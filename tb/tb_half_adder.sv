// tb_half_adder: exhaustive check of the half adder against a + b.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic a, b, s, c;
  half_adder dut (.a, .b, .s, .c);
  initial begin
    #10000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i); #1;
      checks++;
      if ({c, s} != 2'(a) + 2'(b)) begin failures++; $display("FAIL a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

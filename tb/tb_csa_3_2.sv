// tb_csa_3_2: checks the 48-bit 3:2 compressor: i1 + i2 + i3 must equal
// sum + 2*carry exactly (50-bit arithmetic), and every bit position must
// behave as a full adder (bitwise sum/majority), for random rows.
module tb_csa_3_2;
  int checks = 0, failures = 0;
  logic [47:0] i1, i2, i3, sum, carry;
  csa_3_2 dut (.i1, .i2, .i3, .sum, .carry);
  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      i1 = 48'({$urandom, $urandom}); i2 = 48'({$urandom, $urandom}); i3 = 48'({$urandom, $urandom});
      if (n == 0) begin i1 = '1; i2 = '1; i3 = '1; end
      #1;
      checks++;
      if (50'(i1) + 50'(i2) + 50'(i3) != 50'(sum) + {1'b0, carry, 1'b0}) begin
        failures++; $display("FAIL %h %h %h", i1, i2, i3);
      end
      checks++;
      if (sum != (i1 ^ i2 ^ i3) || carry != ((i1 & i2) | (i2 & i3) | (i1 & i3))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

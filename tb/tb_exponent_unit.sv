// tb_exponent_unit: exhaustive check of E1 + E2 - 127 over all 65536 pairs
// of 8-bit exponents, for the default (carry select) adders and for ripple
// carry adders. The result is read as a signed 10-bit number. Includes the
// worked example 137 + 137 - 127 = 147.
module tb_exponent_unit;
  import fpmul_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0]        e1, e2;
  logic signed [9:0] e_def, e_rca;

  exponent_unit dut (.e1, .e2, .e_out(e_def));
  exponent_unit #(.KIND(ADD_RIPPLE)) dut_rca (.e1, .e2, .e_out(e_rca));

  initial begin
    #1000000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    e1 = 8'd137; e2 = 8'd137; #1;
    checks++;
    if (e_def != 10'sd147) begin failures++; $display("FAIL example: %0d", e_def); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        e1 = 8'(i); e2 = 8'(j); #1;
        checks += 2;
        if (int'(e_def) != i + j - 127) begin
          failures++; if (failures < 5) $display("FAIL %0d+%0d-127 = %0d", i, j, e_def);
        end
        if (int'(e_rca) != i + j - 127) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

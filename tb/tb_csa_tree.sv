// tb_csa_tree: checks the Wallace tree at its default size (14 rows of 48
// bits, as in the multiplier) and at 8 rows: s + c must equal the sum of
// all rows modulo 2^48. Rows are random, all ones, or sparse.
module tb_csa_tree;
  int checks = 0, failures = 0;
  logic [13:0][47:0] rows;
  logic [7:0][47:0]  rows8;
  logic [47:0] s, c, s8, c8, exp14, exp8;

  csa_tree dut (.rows, .s, .c);
  csa_tree #(.N(8), .WIDTH(48)) dut8 (.rows(rows8), .s(s8), .c(c8));

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int r = 0; r < 14; r++) begin
        rows[r] = 48'({$urandom, $urandom});
        if (n % 3 == 1) rows[r] = '1;
        if (n % 3 == 2) rows[r] = 48'(1) << ($urandom % 48);
      end
      rows8 = rows[7:0];
      #1;
      exp14 = '0; exp8 = '0;
      for (int r = 0; r < 14; r++) exp14 += rows[r];
      for (int r = 0; r < 8; r++)  exp8  += rows8[r];
      checks += 2;
      if (s + c != exp14) begin failures++; if (failures < 5) $display("FAIL 14-row n=%0d", n); end
      if (s8 + c8 != exp8) begin failures++; if (failures < 5) $display("FAIL 8-row n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

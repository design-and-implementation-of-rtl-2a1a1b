// tb_fp_classify: checks the special-number decoding (zero, denormal,
// infinity, NaN, normal) for boundary exponents and random operands.
module tb_fp_classify;
  import fpmul_pkg::*;
  int checks = 0, failures = 0;
  fp32_t     x;
  fp_class_t cls;

  fp_classify dut (.x, .cls);

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [31:0] v);
    int e; logic mz; fp_class_t want;
    x = v; #1;
    e = int'(v[30:23]); mz = (v[22:0] == 0);
    want.zero   = (e == 0) && mz;
    want.denorm = (e == 0) && !mz;
    want.inf    = (e == 255) && mz;
    want.nan    = (e == 255) && !mz;
    checks++;
    if (cls != want) begin failures++; $display("FAIL %h -> %b", v, cls); end
  endtask

  initial begin
    run(32'h0000_0000); run(32'h8000_0000); run(32'h0000_0001); run(32'h007F_FFFF);
    run(32'h0080_0000); run(32'h7F7F_FFFF); run(32'h7F80_0000); run(32'hFF80_0000);
    run(32'h7F80_0001); run(32'h7FC0_0000); run(32'h4483_4800);
    for (int n = 0; n < 2000; n++) run(fpmul_ref_pkg::rand_operand());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

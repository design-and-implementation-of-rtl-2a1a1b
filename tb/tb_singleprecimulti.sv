// tb_singleprecimulti: clocked test of the multiplier in its three adder
// configurations (default mixed, all carry select, all carry save), all
// truncating, and of a fourth instance that rounds to nearest even, against
// the integer reference model. Operands change on the falling edge of a
// clock of period 20 time units (the 20 ns of the original simulation, at the
// simulator's default time unit); one rising edge later m3 and flags must hold their product,
// and right after the operands change the outputs must still show the
// previous product (latency exactly one clock). Starts with the worked
// example 1050.25 * 1050.25 = 0x4986A588.
module tb_singleprecimulti;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;
  int checks = 0, failures = 0;
  logic      CLK = 1'b0;
  fp32_t     m1, m2;
  fp32_t     m3_def, m3_sel, m3_sav;
  fp_flags_t f_def, f_sel, f_sav;
  fp32_t     m3_rne;
  fp_flags_t f_rne;

  singleprecimulti dut (.CLK, .m1, .m2, .m3(m3_def), .flags(f_def));
  singleprecimulti #(.EXP_KIND(ADD_SELECT), .RED_KIND(RED_ADDER_TREE), .FINAL_KIND(ADD_SELECT))
    dut_sel (.CLK, .m1, .m2, .m3(m3_sel), .flags(f_sel));
  singleprecimulti #(.EXP_KIND(ADD_SAVE), .RED_KIND(RED_CSA_TREE), .FINAL_KIND(ADD_SAVE))
    dut_sav (.CLK, .m1, .m2, .m3(m3_sav), .flags(f_sav));

  singleprecimulti #(.ROUND_MODE(RND_NEAREST_EVEN)) dut_rne (.CLK, .m1, .m2, .m3(m3_rne), .flags(f_rne));

  always #10 CLK = ~CLK;

  initial begin
    repeat (20000) @(posedge CLK);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_out(input ref_t r, input ref_t rn, input string when);
    checks += 4;
    if ({f_rne, m3_rne} != {rn.flags, rn.res}) begin
      failures++;
      if (failures < 8) $display("FAIL %s nearest-even: got %h/%b want %h/%b", when, m3_rne, f_rne, rn.res, rn.flags);
    end
    if ({f_def, m3_def} != {r.flags, r.res}) begin
      failures++;
      if (failures < 8) $display("FAIL %s default: got %h/%b want %h/%b", when, m3_def, f_def, r.res, r.flags);
    end
    if ({f_sel, m3_sel} != {r.flags, r.res}) begin
      failures++; if (failures < 8) $display("FAIL %s all-select: got %h", when, m3_sel);
    end
    if ({f_sav, m3_sav} != {r.flags, r.res}) begin
      failures++; if (failures < 8) $display("FAIL %s all-save: got %h", when, m3_sav);
    end
  endtask

  initial begin
    ref_t prev, cur, prev_n, cur_n;
    logic [31:0] a, b;
    @(negedge CLK);
    for (int n = 0; n < 3000; n++) begin
      if (n == 0) begin a = 32'h4483_4800; b = 32'h4483_4800; end
      else begin a = rand_operand(); b = rand_operand(); end
      m1 = a; m2 = b;
      cur = ref_mul(a, b);
      cur_n = ref_mul(a, b, 0);
      #1;
      if (n > 0) expect_out(prev, prev_n, "hold");      // output not yet updated
      @(posedge CLK); #1;
      expect_out(cur, cur_n, "result");
      if (n == 0) begin
        checks++;
        if (m3_def != 32'h4986_A588) begin failures++; $display("FAIL worked example %h", m3_def); end
      end
      prev = cur;
      prev_n = cur_n;
      @(negedge CLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_normalizer: drives the normaliser with the sign, E1+E2-127 and exact
// significand product of operand pairs (computed here with integer
// arithmetic) and compares result and flags with the reference model, for
// all five rounding rules at once (one instance per rule; the first one has
// the default, truncation).
// Also checks the rounding table pattern: products exactly halfway between
// two integers n and n+1 in [2^23, 2^24], where one unit in the last place
// is 1, with an even n (5592407 * 1.5 = 8388610.5) and an odd n
// (5592409 * 1.5 = 8388613.5, 18631 * 900.5 = 16777215.5), both signs,
// against the value each rule must give; 16777215.5 rounded up carries out
// of the mantissa into the exponent (result 2^24).
// Counts the cases reached: no shift, shift with exponent increment,
// rounding carry into the exponent, overflow, underflow, invalid, infinity,
// zero, NaN; each must occur.
module tb_normalizer;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;
  int checks = 0, failures = 0;
  logic                    sign;
  logic signed [EXT_W-1:0] e_sum;
  logic [PROD_W-1:0]       prod;
  fp_class_t               a_cls, b_cls;
  fp32_t                   result [5];
  fp_flags_t               flags  [5];
  int n_noshift = 0, n_shift = 0, n_rcarry = 0, n_ovf = 0, n_unf = 0, n_inv = 0, n_inf = 0, n_zero = 0, n_nan = 0;

  normalizer dut (.sign, .e_sum, .prod, .a_cls, .b_cls, .result(result[2]), .flags(flags[2]));
  normalizer #(.ROUND(RND_NEAREST_EVEN)) dut_rne (.sign, .e_sum, .prod, .a_cls, .b_cls, .result(result[0]), .flags(flags[0]));
  normalizer #(.ROUND(RND_NEAREST_AWAY)) dut_rna (.sign, .e_sum, .prod, .a_cls, .b_cls, .result(result[1]), .flags(flags[1]));
  normalizer #(.ROUND(RND_POS_INF))      dut_rup (.sign, .e_sum, .prod, .a_cls, .b_cls, .result(result[3]), .flags(flags[3]));
  normalizer #(.ROUND(RND_NEG_INF))      dut_rdn (.sign, .e_sum, .prod, .a_cls, .b_cls, .result(result[4]), .flags(flags[4]));

  initial begin
    #10000000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic fp_class_t cls_of(input logic [31:0] v);
    fp_class_t c;
    c.zero   = v[30:23] == 0   && v[22:0] == 0;
    c.denorm = v[30:23] == 0   && v[22:0] != 0;
    c.inf    = v[30:23] == 255 && v[22:0] == 0;
    c.nan    = v[30:23] == 255 && v[22:0] != 0;
    return c;
  endfunction

  task automatic run(input logic [31:0] a, input logic [31:0] b);
    ref_t r;
    sign  = a[31] ^ b[31];
    e_sum = EXT_W'(int'(a[30:23]) + int'(b[30:23]) - 127);
    prod  = 48'({a[30:23] != 0, a[22:0]}) * 48'({b[30:23] != 0, b[22:0]});
    a_cls = cls_of(a); b_cls = cls_of(b);
    #1;
    for (int m = 0; m < 5; m++) begin
      r = ref_mul(a, b, m);
      checks++;
      if ({flags[m], result[m]} != {r.flags, r.res}) begin
        failures++;
        if (failures < 8) $display("FAIL mode %0d %h*%h: got %h/%b want %h/%b",
                                   m, a, b, result[m], flags[m], r.res, r.flags);
      end
    end
    if (flags[2].overflow) n_ovf++;
    if (flags[2].underflow) n_unf++;
    if (flags[2].invalid) n_inv++;
    if (result[2] == 32'h7FC0_0000 && !flags[2].invalid) n_nan++;
    if (result[2][30:0] == 31'h7F80_0000) n_inf++;
    if (result[2][30:0] == 0 && !flags[2].underflow) n_zero++;
    if (flags[2][3:1] == 0 && result[2][30:23] != 0 && result[2][30:23] != 255) begin
      if (prod[47]) n_shift++; else n_noshift++;
    end
    if (flags[0][3:1] == 0 && result[0][30:23] > result[2][30:23] && result[2][30:23] != 0) n_rcarry++;
  endtask

  // integer n (2^23 <= n <= 2^24) as a binary32 number
  function automatic logic [31:0] int_to_fp(input logic s, input int n);
    if (n == (1 << 24)) return {s, 8'd151, 23'd0};
    return {s, 8'd150, 23'(n - (1 << 23))};
  endfunction

  // a * b = n + 0.5 exactly
  task automatic halfway(input logic [31:0] a, input logic [31:0] b, input int n, input logic s);
    logic [31:0] want;
    int          up [5];
    run({s, a[30:0]}, b);
    up[0] = n % 2;                // ties to even: up only from an odd n
    up[1] = 1;                    // ties away from zero
    up[2] = 0;                    // towards zero
    up[3] = s ? 0 : 1;            // towards +infinity
    up[4] = s ? 1 : 0;            // towards -infinity
    for (int m = 0; m < 5; m++) begin
      want = int_to_fp(s, n + up[m]);
      checks++;
      if (result[m] != want || !flags[m].inexact) begin
        failures++;
        $display("FAIL halfway n=%0d s=%0d mode %0d: got %h want %h", n, s, m, result[m], want);
      end
    end
  endtask

  initial begin
    run(32'h4483_4800, 32'h4483_4800);    // 1050.25^2 (exact tie, truncated)
    checks++;
    if (result[2] != 32'h4986_A588) begin failures++; $display("FAIL worked example: %h", result[2]); end
    run(32'h462D_7080, 32'h462D_7080);    // 11100.125^2
    checks++;
    if (result[2] != 32'h4CEB_027C) begin failures++; $display("FAIL board example: %h", result[2]); end
    for (int s = 0; s < 2; s++) begin
      halfway(32'h4AAA_AAAE, 32'h3FC0_0000, 8388610, 1'(s));    // even integer part
      halfway(32'h4AAA_AAB2, 32'h3FC0_0000, 8388613, 1'(s));    // odd integer part
      halfway(32'h4691_8E00, 32'h4461_2000, 16777215, 1'(s));   // rounds into the exponent
    end
    for (int n = 0; n < 20000; n++) run(rand_operand(), rand_operand());
    $display("no shift %0d, shift %0d, rounding carry %0d, overflow %0d, underflow %0d, invalid %0d, inf %0d, zero %0d, nan %0d",
             n_noshift, n_shift, n_rcarry, n_ovf, n_unf, n_inv, n_inf, n_zero, n_nan);
    checks++;
    if (n_noshift == 0 || n_shift == 0 || n_rcarry == 0 || n_ovf == 0 || n_unf == 0 || n_inv == 0 ||
        n_inf == 0 || n_zero == 0 || n_nan == 0) begin
      failures++; $display("FAIL a case was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

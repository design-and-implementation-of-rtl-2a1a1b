// fp_classify: decodes a binary32 operand into the special-number classes:
// exponent 0 with zero mantissa is zero, exponent 0 with non-zero mantissa
// is denormal, exponent 255 with zero mantissa is infinity and with non-zero
// mantissa NaN; exponents 1..254 are normal (no class bit set). The sign
// bit is part of the input word but plays no role in the class.
// Combinational.
module fp_classify
  import fpmul_pkg::*;
(
  input  fp32_t     x,
  output fp_class_t cls
);
  logic e_zero, e_ones, m_zero;
  assign e_zero = (x.exp == '0);
  assign e_ones = (x.exp == '1);
  assign m_zero = (x.man == '0);

  assign cls.zero   = e_zero &  m_zero;
  assign cls.denorm = e_zero & ~m_zero;
  assign cls.inf    = e_ones &  m_zero;
  assign cls.nan    = e_ones & ~m_zero;
endmodule

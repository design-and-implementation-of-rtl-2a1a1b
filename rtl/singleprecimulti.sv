// singleprecimulti: IEEE 754 single-precision floating point multiplier.
// m3 = m1 * m2 is built from the three fields of the operands:
//   sign      S = S1 xor S2;
//   exponent  E = E1 + E2 - 127, by two adders (exponent_unit);
//   mantissa  (1.M1) * (1.M2), by Booth partial products, a reduction tree
//             and a final stage adder (significand_mult);
// then normalised, rounded to 23 mantissa bits and checked for special
// operands, overflow and underflow (normalizer). Rounding follows
// ROUND_MODE; the default RND_ZERO truncates, which reproduces the
// reference results of the design, and the other four IEEE rules are
// available as an extension.
// Adder placement is chosen by parameter: EXP_KIND for the two exponent
// adders, RED_KIND for partial product accumulation and FINAL_KIND for the
// final stage adder. The default (carry select at the exponent and final
// stages, carry-save compressors for the partial products) is the mixed
// configuration of the adder study; all-carry-select is EXP_KIND =
// FINAL_KIND = ADD_SELECT with RED_KIND = RED_ADDER_TREE, all-carry-save is
// EXP_KIND = FINAL_KIND = ADD_SAVE with RED_KIND = RED_CSA_TREE.
// Timing: the datapath is combinational and ends in one register clocked by
// CLK, so m3 and flags show the product of the m1, m2 present at the previous
// rising edge (latency 1, one result per cycle). The port names follow the
// FPGA top; there is no reset, and m3 is undefined until the first edge.
module singleprecimulti
  import fpmul_pkg::*;
#(
  parameter adder_kind_e  EXP_KIND   = ADD_SELECT,
  parameter reduce_kind_e RED_KIND   = RED_CSA_TREE,
  parameter adder_kind_e  FINAL_KIND = ADD_SELECT,
  parameter round_mode_e  ROUND_MODE = RND_ZERO
) (
  input  logic      CLK,
  input  fp32_t     m1,
  input  fp32_t     m2,
  output fp32_t     m3,
  output fp_flags_t flags
);
  fp_class_t               c1, c2;
  logic                    sign;
  logic signed [EXT_W-1:0] e_sum;
  logic [PROD_W-1:0]       prod;
  fp32_t                   res;
  fp_flags_t               res_flags;

  fp_classify u_cls1 (.x(m1), .cls(c1));
  fp_classify u_cls2 (.x(m2), .cls(c2));

  assign sign = m1.sign ^ m2.sign;

  exponent_unit #(.KIND(EXP_KIND)) u_exp (.e1(m1.exp), .e2(m2.exp), .e_out(e_sum));

  significand_mult #(.RED_KIND(RED_KIND), .FINAL_KIND(FINAL_KIND)) u_sig (
    .ma({m1.exp != '0, m1.man}), .mb({m2.exp != '0, m2.man}), .prod);

  normalizer #(.ROUND(ROUND_MODE)) u_norm (
    .sign, .e_sum, .prod, .a_cls(c1), .b_cls(c2), .result(res), .flags(res_flags));

  always_ff @(posedge CLK) begin
    m3    <= res;
    flags <= res_flags;
  end
endmodule

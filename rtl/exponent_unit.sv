// exponent_unit: result exponent E1 + E2 - bias with two adders.
// ADDER1 adds the two biased exponents; since both carry the bias, ADDER2
// adds the two's complement of the bias once to remove it. Both adders are
// two-operand adders of kind KIND (carry select by default) and are EXP_W+2
// bits wide, so the result is a signed number that still shows exponents
// above 254 (overflow) and below 1 (underflow) to the normaliser; the extra
// width is this design's choice. Combinational.
module exponent_unit
#(
  parameter fpmul_pkg::adder_kind_e KIND  = fpmul_pkg::ADD_SELECT,
  parameter int unsigned EXP_W = fpmul_pkg::EXP_W,
  parameter int unsigned BIAS  = fpmul_pkg::BIAS,
  localparam int unsigned XW   = EXP_W + 2
) (
  input  logic [EXP_W-1:0]     e1,
  input  logic [EXP_W-1:0]     e2,
  output logic signed [XW-1:0] e_out
);
  localparam logic [XW-1:0] BIAS_NEG = XW'(~BIAS + 1);   // 2's complement of bias

  logic [XW-1:0] sum1, sum2;
  logic          unused_c1, unused_c2;

  adder_sel #(.WIDTH(XW), .KIND(KIND)) u_adder1 (
    .a(XW'(e1)), .b(XW'(e2)), .cin(1'b0), .sum(sum1), .cout(unused_c1));
  adder_sel #(.WIDTH(XW), .KIND(KIND)) u_adder2 (
    .a(sum1), .b(BIAS_NEG), .cin(1'b0), .sum(sum2), .cout(unused_c2));

  assign e_out = signed'(sum2);
endmodule

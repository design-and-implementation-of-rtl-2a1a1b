// significand_mult: unsigned 24 x 24 -> 48-bit multiply of the two
// significands (hidden 1 already attached by the caller), in three stages:
//   1. booth_ppgen: radix-4 Booth recoding, 13 partial product rows plus a
//      row of +1 corrections for the negative digits (14 rows);
//   2. reduction of the 14 rows to two: a Wallace tree of 3:2 carry-save
//      compressors (RED_KIND = RED_CSA_TREE, the default) or a tree of
//      two-operand adders (RED_ADDER_TREE);
//   3. the final stage adder, a 48-bit two-operand adder of kind FINAL_KIND
//      (carry select by default).
// The default pairing of carry-save reduction with a carry select final
// adder is the mixed configuration of the adder study. Combinational.
module significand_mult
#(
  parameter int unsigned  SIG_W      = fpmul_pkg::SIG_W,
  parameter fpmul_pkg::reduce_kind_e RED_KIND   = fpmul_pkg::RED_CSA_TREE,
  parameter fpmul_pkg::adder_kind_e  FINAL_KIND = fpmul_pkg::ADD_SELECT,
  localparam int unsigned PW         = 2 * SIG_W,
  localparam int unsigned NPP        = SIG_W / 2 + 1
) (
  input  logic [SIG_W-1:0] ma,
  input  logic [SIG_W-1:0] mb,
  output logic [PW-1:0]    prod
);
  logic [NPP-1:0][PW-1:0] pp;
  logic [PW-1:0]          neg;
  logic [NPP:0][PW-1:0]   rows;
  logic [PW-1:0]          s, c;
  logic                   unused_cout;

  booth_ppgen #(.SIG_W(SIG_W)) u_booth (.a(ma), .x(mb), .pp, .neg);

  assign rows = {neg, pp};

  if (RED_KIND == fpmul_pkg::RED_CSA_TREE) begin : g_csa
    csa_tree #(.N(NPP + 1), .WIDTH(PW)) u_tree (.rows, .s, .c);
  end else begin : g_add
    adder_tree #(.N(NPP + 1), .WIDTH(PW), .KIND(FINAL_KIND)) u_tree (.rows, .s, .c);
  end

  adder_sel #(.WIDTH(PW), .KIND(FINAL_KIND)) u_final (
    .a(s), .b(c), .cin(1'b0), .sum(prod), .cout(unused_cout));
endmodule

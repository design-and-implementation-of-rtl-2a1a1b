// fpmul_top: FPGA-level top of the single-precision multiplier.
// On the board the operands come from a virtual I/O debug core as one 64-bit
// bus and the product goes back to it as a 32-bit bus; that core and its
// JTAG controller are vendor IP and are not part of this RTL, so their data
// buses are this module's ports: async_out carries m1 in bits 63:32 and m2
// in bits 31:0 (the split is this design's choice), sync_in returns m3. The
// exception flags are brought out as well. CLK drives the multiplier, which
// registers its result: sync_in follows async_out by one clock. The
// parameters choose the adders and the rounding rule, as in singleprecimulti.
module fpmul_top
  import fpmul_pkg::*;
#(
  parameter adder_kind_e  EXP_KIND   = ADD_SELECT,
  parameter reduce_kind_e RED_KIND   = RED_CSA_TREE,
  parameter adder_kind_e  FINAL_KIND = ADD_SELECT,
  parameter round_mode_e  ROUND_MODE = RND_ZERO
) (
  input  logic        CLK,
  input  logic [63:0] async_out,
  output logic [31:0] sync_in,
  output fp_flags_t   flags
);
  fp32_t m3;

  singleprecimulti #(.EXP_KIND(EXP_KIND), .RED_KIND(RED_KIND), .FINAL_KIND(FINAL_KIND),
                   .ROUND_MODE(ROUND_MODE)) s0 (
    .CLK, .m1(async_out[63:32]), .m2(async_out[31:0]), .m3, .flags);

  assign sync_in = m3;
endmodule

// normalizer: turns sign, unnormalised exponent and 48-bit significand
// product into a packed binary32 result and exception flags.
// Normalising: the product of two significands in [1,2) lies in [1,4), so
// its leading 1 is at bit 46 or bit 47. At bit 46 the 23 bits below it are
// the mantissa; at bit 47 the product is shifted right by one and the
// exponent is incremented.
// Rounding: the first discarded bit (guard) and the OR of the rest (sticky)
// decide, by the rounding rule ROUND, whether one unit is added to the
// 23-bit mantissa; a carry out of the mantissa bumps the exponent again.
// The default, RND_ZERO, drops the discarded bits (truncation): this is what
// the reference results of the design show. The other four IEEE rules are
// this design's extension and are chosen by parameter.
// Exceptions (this design's choice of results, after IEEE 754): a NaN
// operand gives the quiet NaN 0x7FC00000; zero times infinity gives that NaN
// and raises invalid; infinity times a finite number gives infinity; a zero
// or denormal operand gives a signed zero (denormals are read as zero); an
// exponent of 255 or more after rounding raises overflow and gives infinity
// or the largest finite number as the rounding rule says; an exponent of 0
// or less raises underflow and gives a signed zero (no denormal results).
// Inexact is raised when a non-zero bit is discarded and on overflow or
// underflow. Combinational. An assertion checks that the product of two
// normal operands has its leading 1 at bit 47 or 46.
module normalizer
  import fpmul_pkg::*;
#(
  parameter round_mode_e ROUND = RND_ZERO
) (
  input  logic                    sign,
  input  logic signed [EXT_W-1:0] e_sum,    // E1 + E2 - bias
  input  logic [PROD_W-1:0]       prod,     // significand product
  input  fp_class_t               a_cls,
  input  fp_class_t               b_cls,
  output fp32_t                   result,
  output fp_flags_t               flags
);
  logic [MAN_W-1:0]        man;
  logic signed [EXT_W-1:0] e_norm, e_fin;
  logic                    guard, sticky, lost, rnd_up;
  logic [MAN_W:0]          man_r;           // rounded mantissa with carry out
  logic                    a_zd, b_zd;
  logic                    ovf_to_inf;

  // normalise: leading 1 at bit 47 or 46
  always_comb begin
    if (prod[PROD_W-1]) begin
      man    = prod[PROD_W-2 -: MAN_W];
      guard  = prod[PROD_W-2-MAN_W];
      sticky = |prod[PROD_W-3-MAN_W:0];
      e_norm = e_sum + EXT_W'(1);
    end else begin
      man    = prod[PROD_W-3 -: MAN_W];
      guard  = prod[PROD_W-3-MAN_W];
      sticky = |prod[PROD_W-4-MAN_W:0];
      e_norm = e_sum;
    end
  end

  assign lost = guard | sticky;

  // round
  always_comb begin
    unique case (ROUND)
      RND_NEAREST_EVEN: rnd_up = guard & (sticky | man[0]);
      RND_NEAREST_AWAY: rnd_up = guard;
      RND_POS_INF:      rnd_up = ~sign & lost;
      RND_NEG_INF:      rnd_up =  sign & lost;
      default:          rnd_up = 1'b0;                    // towards zero
    endcase
  end

  assign man_r = {1'b0, man} + (MAN_W+1)'(rnd_up);
  assign e_fin = e_norm + EXT_W'(man_r[MAN_W]);        // 1.11..1 + ulp = 10.0..0

  // overflow goes to infinity unless the rule rounds towards zero for this sign
  always_comb begin
    unique case (ROUND)
      RND_ZERO:    ovf_to_inf = 1'b0;
      RND_POS_INF: ovf_to_inf = ~sign;
      RND_NEG_INF: ovf_to_inf =  sign;
      default:     ovf_to_inf = 1'b1;
    endcase
  end

  assign a_zd = a_cls.zero | a_cls.denorm;
  assign b_zd = b_cls.zero | b_cls.denorm;

  // two normal significands multiply to a value in [1,4): leading 1 at bit 47 or 46
  always_comb begin
    if (!(a_zd || b_zd || a_cls.inf || b_cls.inf || a_cls.nan || b_cls.nan))
      assert final (prod[PROD_W-1] || prod[PROD_W-2])
        else $error("significand product %h of normal operands is not normalisable", prod);
  end

  always_comb begin
    flags  = '0;
    result = '{sign: sign, exp: '0, man: '0};
    if (a_cls.nan || b_cls.nan) begin
      result = QNAN;
    end else if ((a_cls.inf && b_zd) || (b_cls.inf && a_zd)) begin
      result        = QNAN;
      flags.invalid = 1'b1;
    end else if (a_cls.inf || b_cls.inf) begin
      result.exp = '1;
    end else if (a_zd || b_zd) begin
      result.exp = '0;
    end else if (e_fin >= EXT_W'(signed'(255))) begin
      if (ovf_to_inf) begin
        result.exp = '1;
      end else begin
        result.exp = 8'hFE;                               // largest finite
        result.man = '1;
      end
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else if (e_fin <= EXT_W'(signed'(0))) begin
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
    end else begin
      result.exp    = e_fin[EXP_W-1:0];
      result.man    = man_r[MAN_W-1:0];
      flags.inexact = lost;
    end
  end
endmodule

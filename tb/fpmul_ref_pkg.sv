// fpmul_ref_pkg: reference model for the multiplier testbenches.
// ref_mul computes the expected binary32 product and flags of two operands
// with plain integer arithmetic (a 24 x 24 multiply), independent of the
// Booth / compressor / adder structure of the RTL. Its rules: rounding of
// the bits below the 23-bit mantissa by one of the five IEEE rules
// (0 nearest-even, 1 nearest-away, 2 towards zero = truncation, the default,
// 3 towards +inf, 4 towards -inf), decided here from the exact remainder
// compared with half a unit; denormal operands read as zero, a NaN
// operand or zero times infinity gives the quiet NaN 0x7FC00000 (the latter
// raising invalid), exponent >= 255 after normalisation gives infinity with
// overflow and inexact (the largest finite number instead of infinity when
// the rule rounds towards zero for that sign), exponent <= 0 gives zero with
// underflow and inexact.
// rand_operand draws operands that exercise every one of these cases.
package fpmul_ref_pkg;

  typedef struct packed {
    logic [3:0]  flags;   // {invalid, overflow, underflow, inexact}
    logic [31:0] res;
    logic        shifted; // leading 1 of the significand product at bit 47
  } ref_t;

  function automatic ref_t ref_mul(input logic [31:0] a, input logic [31:0] b, input int mode = 2);
    ref_t r;
    logic        s;
    int          ea, eb, e;
    logic [47:0] p;
    logic        a_nan, b_nan, a_inf, b_inf, a_zd, b_zd, lost;
    logic [22:0] m;
    ea = int'(a[30:23]);  eb = int'(b[30:23]);
    s  = a[31] ^ b[31];
    a_nan = (ea == 255) && (a[22:0] != 0);  b_nan = (eb == 255) && (b[22:0] != 0);
    a_inf = (ea == 255) && (a[22:0] == 0);  b_inf = (eb == 255) && (b[22:0] == 0);
    a_zd  = (ea == 0);                      b_zd  = (eb == 0);
    r = '0;
    p = 48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]});
    r.shifted = p[47];
    if (a_nan || b_nan) begin
      r.res = 32'h7FC0_0000;
    end else if ((a_inf && b_zd) || (b_inf && a_zd)) begin
      r.res = 32'h7FC0_0000;  r.flags = 4'b1000;
    end else if (a_inf || b_inf) begin
      r.res = {s, 8'hFF, 23'd0};
    end else if (a_zd || b_zd) begin
      r.res = {s, 31'd0};
    end else begin
      e = ea + eb - 127;
      // keep 24 significant bits; rem is what is dropped, half is 1/2 ulp
      begin
        logic [24:0] keep;
        logic [23:0] rem, half;
        bit          up, to_inf;
        if (p[47]) begin e++; keep = 25'(p[47:24]); rem = p[23:0];        half = 24'h80_0000; end
        else begin            keep = 25'(p[46:23]); rem = {1'b0, p[22:0]}; half = 24'h40_0000; end
        lost = (rem != 0);
        case (mode)
          0: up = (rem > half) || (rem == half && keep[0]);
          1: up = (rem >= half);
          3: up = !s && lost;
          4: up =  s && lost;
          default: up = 1'b0;
        endcase
        keep = keep + 25'(up);
        if (keep[24]) begin e++; keep = keep >> 1; end
        m = keep[22:0];
        to_inf = (mode == 0 || mode == 1 || (mode == 3 && !s) || (mode == 4 && s));
        if (e >= 255)     begin r.res = to_inf ? {s, 8'hFF, 23'd0} : {s, 8'hFE, 23'h7F_FFFF}; r.flags = 4'b0101; end
        else if (e <= 0)  begin r.res = {s, 31'd0};        r.flags = 4'b0011; end
        else              begin r.res = {s, 8'(e), m};     r.flags = {3'b000, lost}; end
      end
    end
    return r;
  endfunction

  // operand generator: mostly ordinary numbers, with every special class
  function automatic logic [31:0] rand_operand();
    logic [31:0] x;
    int          k;
    x = $urandom;
    k = int'($urandom % 20);
    case (k)
      0:       x[30:0] = '0;                                  // zero
      1:       x[30:23] = 8'd0;                               // denormal
      2:       x[30:0] = {8'hFF, 23'd0};                      // infinity
      3:       x[30:23] = 8'hFF;                              // NaN (mostly)
      4, 5:    x[30:23] = 8'(200 + $urandom % 55);            // large
      6, 7:    x[30:23] = 8'(1 + $urandom % 50);              // small
      8:       x[22:0] = '1;                                  // all-ones mantissa
      9:       x[22:0] = '0;                                  // power of two
      default: x[30:23] = 8'(100 + $urandom % 55);            // ordinary
    endcase
    return x;
  endfunction

endpackage

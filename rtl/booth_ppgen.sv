// booth_ppgen: radix-4 Booth partial product generator for two unsigned
// SIG_W-bit significands.
// A zero is appended below the LSB of the multiplier x and two zeros above
// its MSB; overlapping 3-bit groups (x[2i+1], x[2i], x[2i-1]) are recoded
// into a digit of {0, +A, +2A, -2A, -A} by the radix-4 Booth table, so 24
// multiplier bits give 13 partial products instead of 24. The top group sees
// only zeros above x[23], so its digit is never negative and the product of
// the unsigned operands comes out exact.
// Row i is the multiple of A shifted left by 2i, kept PROD_W bits wide with
// sign extension. A negative digit puts the one's complement of the
// magnitude in the row and a 1 at bit 2i of the correction row neg; adding
// all rows and neg modulo 2^PROD_W gives a*x. The separate +1 row is this
// design's way of forming the two's complement.
// Many output bits are constant by construction: row i is zero below bit 2i,
// neg is zero at odd positions and above bit 2*(NPP-1), and the last row is
// never negative. The flat PW-wide rows keep the reduction tree regular; the
// synthesis tool removes the constant bits.
// Combinational.
module booth_ppgen
#(
  parameter int unsigned SIG_W = fpmul_pkg::SIG_W,
  localparam int unsigned PW   = 2 * SIG_W,
  localparam int unsigned NPP  = SIG_W / 2 + 1
) (
  input  logic [SIG_W-1:0]          a,     // multiplicand
  input  logic [SIG_W-1:0]          x,     // multiplier
  output logic [NPP-1:0][PW-1:0]    pp,    // partial product rows
  output logic [PW-1:0]             neg    // two's-complement correction row
);
  // multiplier with one zero appended below and zeros above
  logic [2*NPP:0] xe;
  assign xe = {{(2*NPP-SIG_W){1'b0}}, x, 1'b0};

  logic [NPP-1:0] nd;   // digit is negative

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [2:0]     trip;
    logic           one, two, n;
    logic [PW-1:0]  mag;
    assign trip = xe[2*i +: 3];
    always_comb begin
      unique case (trip)
        3'b000, 3'b111: begin one = 1'b0; two = 1'b0; n = 1'b0; end  // 0
        3'b001, 3'b010: begin one = 1'b1; two = 1'b0; n = 1'b0; end  // +A
        3'b011:         begin one = 1'b0; two = 1'b1; n = 1'b0; end  // +2A
        3'b100:         begin one = 1'b0; two = 1'b1; n = 1'b1; end  // -2A
        default:        begin one = 1'b1; two = 1'b0; n = 1'b1; end  // -A (101, 110)
      endcase
    end
    assign mag       = one ? PW'(a) : two ? PW'({a, 1'b0}) : '0;
    assign pp[i]     = (n ? ~mag : mag) << (2 * i);
    assign nd[i]     = n;
  end

  always_comb begin
    neg = '0;
    for (int i = 0; i < NPP; i++) neg[2*i] = nd[i];
  end
endmodule

// carry_save_adder: two-operand adder built the carry-save way.
// A carry-save layer treats the carry in as a third operand: bit 0 is a full
// adder on (a0, b0, cin), every other bit a half adder on (ai, bi). The layer
// saves its carries instead of passing them on, giving a sum row and a carry
// row of weight 2; one carry propagate (ripple carry) adder then adds the two
// rows. The split into a saved layer plus one carry propagate adder is the
// usual carry-save arrangement; using it for two operands is this design's
// choice. Ports: a, b, cin -> sum, cout. Combinational.
module carry_save_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] ls, lc;     // saved sum and carry rows
  logic [WIDTH:0]   r;          // carry propagate result

  full_adder u_fa0 (.a(a[0]), .b(b[0]), .c(cin), .s(ls[0]), .co(lc[0]));
  for (genvar i = 1; i < WIDTH; i++) begin : g_ha
    half_adder u_ha (.a(a[i]), .b(b[i]), .s(ls[i]), .c(lc[i]));
  end

  // ls + (lc << 1): the top saved carry goes straight to the carry out path
  ripple_carry_adder #(.WIDTH(WIDTH)) u_cpa (
    .a(ls), .b({lc[WIDTH-2:0], 1'b0}), .cin(1'b0), .sum(r[WIDTH-1:0]), .cout(r[WIDTH]));
  assign sum  = r[WIDTH-1:0];
  assign cout = r[WIDTH] | lc[WIDTH-1];
endmodule

// ripple_carry_adder: WIDTH full adders in a chain, the carry out of each
// bit feeding the carry in of the next. Worst-case delay grows linearly with
// WIDTH: (WIDTH-1) carry delays plus one sum delay.
// Ports: a, b, cin -> sum, cout. Combinational.
// WIDTH defaults to 32, the largest size compared in the adder study.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule

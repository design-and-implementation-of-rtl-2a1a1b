// csa_3_2: WIDTH-bit 3:2 compressor (carry-save adder). One full adder per
// bit adds I1, I2, I3 of that bit; the carries are saved in their own row
// instead of being propagated, so the delay is one full adder whatever the
// width. i1 + i2 + i3 = sum + 2*carry. The carry row is returned unshifted
// (bit i has weight 2^(i+1)); the caller shifts it. Combinational.
module csa_3_2 #(
  parameter int unsigned WIDTH = 48
) (
  input  logic [WIDTH-1:0] i1,
  input  logic [WIDTH-1:0] i2,
  input  logic [WIDTH-1:0] i3,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    full_adder u_fa (.a(i1[k]), .b(i2[k]), .c(i3[k]), .s(sum[k]), .co(carry[k]));
  end
endmodule

// half_adder: adds two bits. Sum is the XOR of the inputs, carry their AND,
// as in the half-adder truth table. Purely combinational.
// Ports: a, b -> s (sum), c (carry).
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule

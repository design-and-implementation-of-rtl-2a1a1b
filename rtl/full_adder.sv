// full_adder: adds three bits. S = A xor B xor C and
// Co = AB + BC + CA, the standard full-adder equations. Purely combinational.
// Ports: a, b, c (carry in) -> s (sum), co (carry out).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (b & c) | (c & a);
endmodule

// carry_select_adder: linear carry select adder with BLOCK-bit sections.
// The lowest section is a plain ripple carry adder fed by cin. Every higher
// section holds two ripple carry adders, one with carry in 0 and one with
// carry in 1; the real carry from the section below selects the sum through
// a multiplexer, and the section carry is  C0 | (C1 & Cprev).
// Equal 4-bit sections follow the 8-bit reference structure, extended
// linearly. WIDTH is zero-padded to a multiple of BLOCK; when padding is
// needed, cout is the first padded sum bit and the top section carry goes
// unread (synthesis removes it).
// Ports: a, b, cin -> sum, cout. Combinational.
module carry_select_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NB = (WIDTH + BLOCK - 1) / BLOCK;
  localparam int unsigned PW = NB * BLOCK;

  logic [PW-1:0] ap, bp, s;
  logic [NB:1]   sc;          // selected section carries

  assign ap = PW'(a);
  assign bp = PW'(b);

  ripple_carry_adder #(.WIDTH(BLOCK)) u_low (
    .a(ap[BLOCK-1:0]), .b(bp[BLOCK-1:0]), .cin(cin), .sum(s[BLOCK-1:0]), .cout(sc[1]));

  for (genvar k = 1; k < NB; k++) begin : g_sec
    logic [BLOCK-1:0] s0, s1;
    logic             c0, c1;
    ripple_carry_adder #(.WIDTH(BLOCK)) u_c0 (
      .a(ap[k*BLOCK +: BLOCK]), .b(bp[k*BLOCK +: BLOCK]), .cin(1'b0), .sum(s0), .cout(c0));
    ripple_carry_adder #(.WIDTH(BLOCK)) u_c1 (
      .a(ap[k*BLOCK +: BLOCK]), .b(bp[k*BLOCK +: BLOCK]), .cin(1'b1), .sum(s1), .cout(c1));
    assign s[k*BLOCK +: BLOCK] = sc[k] ? s1 : s0;
    assign sc[k+1]             = c0 | (c1 & sc[k]);
  end

  assign sum = s[WIDTH-1:0];
  if (PW == WIDTH) begin : g_full
    assign cout = sc[NB];
  end else begin : g_pad
    assign cout = s[WIDTH];
  end
endmodule

// cla_adder: carry look-ahead adder.
// Each bit is a partial full adder giving propagate P = a^b, generate G = ab
// and sum S = P ^ c. Inside a group of BLOCK bits the look-ahead logic forms
// every carry directly from the group carry in:
//   c[i+1] = G[i] | P[i]G[i-1] | ... | P[i]..P[0]c0
// so no carry ripples inside a group. The 4-bit group is the one of the
// reference structure; wider adders chain the groups by their carry out,
// which is this design's choice. WIDTH need not be a multiple of BLOCK: the
// operands are zero-padded internally.
// Ports: a, b, cin -> sum, cout. Combinational.
module cla_adder #(
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

  logic [PW-1:0] ap, bp, p, g, s, c;   // c[i]: carry into bit i
  logic [NB:0]   gc;                   // carries between groups

  assign ap = PW'(a);
  assign bp = PW'(b);
  assign p  = ap ^ bp;
  assign g  = ap & bp;
  assign gc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_grp
    // look-ahead logic of one group: every carry is a sum of products of
    // the group's P, G and its carry in, with no chaining inside the group
    logic [BLOCK-1:0] pk, gk;
    logic [BLOCK:0]   ck;
    assign pk = p[k*BLOCK +: BLOCK];
    assign gk = g[k*BLOCK +: BLOCK];
    always_comb begin
      logic term;
      ck[0] = gc[k];
      for (int i = 0; i < BLOCK; i++) begin
        ck[i+1] = gk[i];
        for (int j = 0; j <= i; j++) begin
          term = (j == i) ? gc[k] : gk[i-j-1];
          for (int m = 0; m <= j; m++) term &= pk[i-m];
          ck[i+1] |= term;
        end
      end
    end
    assign c[k*BLOCK +: BLOCK] = ck[BLOCK-1:0];
    assign gc[k+1]             = ck[BLOCK];
  end

  assign s    = p ^ c;
  assign sum  = s[WIDTH-1:0];
  // with zero padding the sum bit at WIDTH equals the carry into it
  if (PW == WIDTH) begin : g_full
    assign cout = gc[NB];
  end else begin : g_pad
    assign cout = s[WIDTH];
  end
endmodule

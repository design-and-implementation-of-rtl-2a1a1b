// carry_skip_adder: groups of BLOCK full adders that ripple internally.
// The group propagate P(i,i+3) is the AND of the bit propagates; the carry
// leaving a group is  C(i+4) | P(i,i+3) & Ci,  so when every bit of a group
// propagates, the group carry in skips over the group. Group size 4 follows
// the reference structure. WIDTH is zero-padded to a multiple of BLOCK.
// Ports: a, b, cin -> sum, cout. Combinational.
module carry_skip_adder #(
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
  logic [NB:0]   gc;          // group carries

  assign ap = PW'(a);
  assign bp = PW'(b);
  assign gc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_grp
    logic             gp;       // group propagate P(i,i+3)
    logic [BLOCK:0]   rc;       // ripple carries inside the group
    assign rc[0] = gc[k];
    for (genvar i = 0; i < BLOCK; i++) begin : g_bit
      full_adder u_fa (.a(ap[k*BLOCK+i]), .b(bp[k*BLOCK+i]), .c(rc[i]),
                       .s(s[k*BLOCK+i]), .co(rc[i+1]));
    end
    assign gp      = &(ap[k*BLOCK +: BLOCK] ^ bp[k*BLOCK +: BLOCK]);
    assign gc[k+1] = rc[BLOCK] | (gp & gc[k]);
  end

  assign sum  = s[WIDTH-1:0];
  // with zero padding the sum bit at WIDTH equals the carry into it
  if (PW == WIDTH) begin : g_full
    assign cout = gc[NB];
  end else begin : g_pad
    assign cout = s[WIDTH];
  end
endmodule

// csa_tree: Wallace tree of 3:2 compressors that reduces N rows of WIDTH
// bits to two rows, s and c, with s + c equal to the sum of the rows modulo
// 2^WIDTH. At every level each complete group of three rows enters a csa_3_2
// and yields a sum row and a (shifted) carry row; the zero to two rows left
// over pass unchanged to the next level. Levels are generated until two
// rows remain: the 14 rows of the significand
// multiplier take six levels (14, 10, 7, 5, 4, 3, 2 rows). Combinational; no
// carry propagates along a row inside the tree. The carry out of the top
// bit of each compressor is dropped, since the result is modulo 2^WIDTH.
module csa_tree #(
  parameter int unsigned N     = 14,
  parameter int unsigned WIDTH = 48
) (
  input  logic [N-1:0][WIDTH-1:0] rows,
  output logic [WIDTH-1:0]        s,
  output logic [WIDTH-1:0]        c
);
  // number of rows left after `lvl` levels of 3:2 reduction
  function automatic int unsigned rows_at(input int unsigned n, input int unsigned lvl);
    int unsigned r = n;
    for (int unsigned i = 0; i < lvl; i++) if (r > 2) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned num_levels(input int unsigned n);
    int unsigned r = n, l = 0;
    while (r > 2) begin r = 2 * (r / 3) + r % 3; l++; end
    return l;
  endfunction

  localparam int unsigned L = num_levels(N);

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned NL = rows_at(N, l);
    logic [NL-1:0][WIDTH-1:0] r;
    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_red
      localparam int unsigned NP = rows_at(N, l - 1);   // rows of the level above
      localparam int unsigned G  = NP / 3;
      localparam int unsigned R  = NP % 3;
      for (genvar k = 0; k < G; k++) begin : g_csa
        logic [WIDTH-1:0] cy;
        csa_3_2 #(.WIDTH(WIDTH)) u_csa (
          .i1(g_lvl[l-1].r[3*k]), .i2(g_lvl[l-1].r[3*k+1]), .i3(g_lvl[l-1].r[3*k+2]),
          .sum(r[2*k]), .carry(cy));
        // carry row has weight 2; its top bit falls outside the modulus
        assign r[2*k+1] = {cy[WIDTH-2:0], 1'b0};
      end
      for (genvar p = 0; p < R; p++) begin : g_pass
        assign r[2*G+p] = g_lvl[l-1].r[3*G+p];
      end
    end
  end

  if (rows_at(N, L) == 1) begin : g_one
    assign s = g_lvl[L].r[0];
    assign c = '0;
  end else begin : g_two
    assign s = g_lvl[L].r[0];
    assign c = g_lvl[L].r[1];
  end
endmodule

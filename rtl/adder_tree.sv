// adder_tree: reduces N rows to two with two-operand adders of kind KIND,
// for the configuration where every stage of the multiplier uses the same
// (carry select) adder instead of carry-save compressors. Each level adds
// rows pairwise; an odd row passes to the next level. Levels are generated
// until two rows remain (14, 7, 4, 2 for the multiplier), which the final
// stage adder of the multiplier adds. Results are modulo 2^WIDTH. Combinational.
module adder_tree
  import fpmul_pkg::*;
#(
  parameter int unsigned N     = 14,
  parameter int unsigned WIDTH = 48,
  parameter adder_kind_e KIND  = ADD_SELECT
) (
  input  logic [N-1:0][WIDTH-1:0] rows,
  output logic [WIDTH-1:0]        s,
  output logic [WIDTH-1:0]        c
);
  // number of rows left after `lvl` levels of pairwise addition
  function automatic int unsigned rows_at(input int unsigned n, input int unsigned lvl);
    int unsigned r = n;
    for (int unsigned i = 0; i < lvl; i++) if (r > 2) r = r / 2 + r % 2;
    return r;
  endfunction

  function automatic int unsigned num_levels(input int unsigned n);
    int unsigned r = n, l = 0;
    while (r > 2) begin r = r / 2 + r % 2; l++; end
    return l;
  endfunction

  localparam int unsigned L = num_levels(N);

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned NL = rows_at(N, l);
    logic [NL-1:0][WIDTH-1:0] r;
    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_red
      localparam int unsigned NP = rows_at(N, l - 1);
      localparam int unsigned H  = NP / 2;
      for (genvar k = 0; k < H; k++) begin : g_add
        logic unused_cout;   // sums are modulo 2^WIDTH
        adder_sel #(.WIDTH(WIDTH), .KIND(KIND)) u_add (
          .a(g_lvl[l-1].r[2*k]), .b(g_lvl[l-1].r[2*k+1]), .cin(1'b0),
          .sum(r[k]), .cout(unused_cout));
      end
      if (NP % 2 == 1) begin : g_pass
        assign r[NL-1] = g_lvl[l-1].r[NP-1];
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

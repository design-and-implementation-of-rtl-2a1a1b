// adder_sel: places one of the five two-operand adders, chosen by KIND.
// Lets the exponent stage and the final stage of the multiplier be built
// from any of the compared adders without changing their wiring.
// Ports: a, b, cin -> sum, cout. Combinational.
module adder_sel
  import fpmul_pkg::*;
#(
  parameter int unsigned  WIDTH = 32,
  parameter adder_kind_e  KIND  = ADD_SELECT
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  if (KIND == ADD_RIPPLE) begin : g_rca
    ripple_carry_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (KIND == ADD_CLA) begin : g_cla
    cla_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (KIND == ADD_SKIP) begin : g_skip
    carry_skip_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (KIND == ADD_SELECT) begin : g_sel
    carry_select_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .sum, .cout);
  end else begin : g_save
    carry_save_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin, .sum, .cout);
  end
endmodule

// tb_significand_mult: checks the 24 x 24 significand multiplier in its
// three adder configurations against the integer product ma * mb:
//   default     carry-save tree, carry select final adder;
//   all select  adder tree and final adder of carry select adders;
//   all save    carry-save tree, carry-save final adder.
// Includes the worked example 1.000001101001b squared.
module tb_significand_mult;
  import fpmul_pkg::*;
  int checks = 0, failures = 0;
  logic [23:0] ma, mb;
  logic [47:0] p_def, p_sel, p_sav;

  significand_mult dut (.ma, .mb, .prod(p_def));
  significand_mult #(.RED_KIND(RED_ADDER_TREE), .FINAL_KIND(ADD_SELECT)) dut_sel (.ma, .mb, .prod(p_sel));
  significand_mult #(.RED_KIND(RED_CSA_TREE), .FINAL_KIND(ADD_SAVE)) dut_sav (.ma, .mb, .prod(p_sav));

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [23:0] a, input logic [23:0] b);
    logic [47:0] want;
    ma = a; mb = b; #1;
    want = 48'(a) * 48'(b);
    checks += 3;
    if (p_def != want) begin failures++; if (failures < 5) $display("FAIL default %h*%h=%h", a, b, p_def); end
    if (p_sel != want) begin failures++; if (failures < 5) $display("FAIL select %h*%h=%h", a, b, p_sel); end
    if (p_sav != want) begin failures++; if (failures < 5) $display("FAIL save %h*%h=%h", a, b, p_sav); end
  endtask

  initial begin
    run(24'h834800, 24'h834800);
    run('1, '1);
    run(24'h800000, 24'h800000);
    run(24'h800000, '1);
    for (int n = 0; n < 3000; n++) run({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
    for (int n = 0; n < 500; n++)  run(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

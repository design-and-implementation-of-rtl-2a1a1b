// tb_booth_ppgen: checks the radix-4 Booth partial product generator.
// For every digit i the Booth value d = -2*x[2i+1] + x[2i] + x[2i-1]
// (x[-1] = 0, bits above x[23] = 0) is computed here, and row i plus its
// correction bit must equal d * a * 4^i modulo 2^48. The sum of all rows and
// the correction row must equal a * x. Corner operands (all ones, alternating
// bits, hidden-1 only) come first, then random ones.
module tb_booth_ppgen;
  int checks = 0, failures = 0;
  logic [23:0]       a, x;
  logic [12:0][47:0] pp;
  logic [47:0]       neg;

  booth_ppgen dut (.a, .x, .pp, .neg);

  initial begin
    #100000; $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [23:0] aa, input logic [23:0] xx);
    logic [26:0] xe;
    logic [47:0] total, want;
    int          d;
    a = aa; x = xx; #1;
    xe = {2'b00, x, 1'b0};
    total = neg;
    for (int i = 0; i < 13; i++) begin
      d = -2 * int'(xe[2*i+2]) + int'(xe[2*i+1]) + int'(xe[2*i]);
      want = 48'(longint'(d) * longint'(a)) << (2 * i);
      checks++;
      if (pp[i] + (48'(neg[2*i]) << (2 * i)) != want) begin
        failures++;
        if (failures < 5) $display("FAIL row %0d a=%h x=%h", i, a, x);
      end
      total += pp[i];
    end
    checks++;
    if (total != 48'(a) * 48'(x)) begin
      failures++;
      if (failures < 5) $display("FAIL product a=%h x=%h", a, x);
    end
  endtask

  initial begin
    run('1, '1);
    run(24'h800000, 24'h800000);
    run(24'hAAAAAA, 24'h555555);
    run(24'h555555, 24'hAAAAAA);
    run(24'h834800, 24'h834800);
    for (int n = 0; n < 3000; n++) run(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

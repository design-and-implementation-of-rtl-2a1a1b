// tb_fpmul_top: end-to-end test of the FPGA top at its default parameters.
// The 64-bit operand bus carries m1 in bits 63:32 and m2 in bits 31:0; the
// product appears on sync_in one rising edge later (clock period 20 time
// units).
// Runs the two reference examples (1050.25^2 = 0x4986A588 and the on-board
// vector 0x462D7080^2 = 0x4CEB027C), then random operands against the
// integer reference model. Counts each mechanism of the datapath and fails
// if one never happened: significand product without and with the
// normalising shift, negative Booth digits, bits lost to truncation,
// overflow, underflow, invalid (zero times infinity), NaN propagation,
// infinity and zero operands. Also checks the one-clock latency.
module tb_fpmul_top;
  import fpmul_pkg::*;
  import fpmul_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        CLK = 1'b0;
  logic [63:0] async_out;
  logic [31:0] sync_in;
  fp_flags_t   flags;
  int n_noshift = 0, n_shift = 0, n_boothneg = 0, n_trunc = 0, n_ovf = 0, n_unf = 0;
  int n_inv = 0, n_nan = 0, n_inf = 0, n_zero = 0, n_lat = 0;

  fpmul_top dut (.CLK, .async_out, .sync_in, .flags);

  always #10 CLK = ~CLK;

  initial begin
    repeat (100000) @(posedge CLK);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit booth_has_neg(input logic [31:0] b);
    logic [26:0] xe;
    xe = {2'b00, 1'b1, b[22:0], 1'b0};
    for (int i = 0; i < 13; i++) if (xe[2*i+2] && !(xe[2*i+1] && xe[2*i])) return 1'b1;
    return 1'b0;
  endfunction

  task automatic one(input logic [31:0] a, input logic [31:0] b, output ref_t r);
    logic [31:0] prev_out;
    r = ref_mul(a, b);
    async_out = {a, b};
    #1 prev_out = sync_in;
    @(posedge CLK); #1;
    checks++;
    if ({flags, sync_in} != {r.flags, r.res}) begin
      failures++;
      if (failures < 8) $display("FAIL %h*%h: got %h/%b want %h/%b", a, b, sync_in, flags, r.res, r.flags);
    end
    if (prev_out != sync_in || prev_out == r.res) n_lat++;   // changed only at the edge
    if (r.flags[2]) n_ovf++;
    if (r.flags[1]) n_unf++;
    if (r.flags[3]) n_inv++;
    if (r.res == 32'h7FC0_0000 && !r.flags[3]) n_nan++;
    if (r.res[30:0] == 31'h7F80_0000 && !r.flags[2]) n_inf++;
    if (r.res[30:0] == 0 && !r.flags[1]) n_zero++;
    if (r.flags == 4'b0001) n_trunc++;
    if (r.flags[3:1] == 0 && r.res[30:23] != 0 && r.res[30:23] != 255) begin
      if (r.shifted) n_shift++; else n_noshift++;
      if (booth_has_neg(b)) n_boothneg++;
    end
    @(negedge CLK);
  endtask

  initial begin
    ref_t r;
    @(negedge CLK);
    one(32'h4483_4800, 32'h4483_4800, r);
    checks++;
    if (sync_in != 32'b01001001100001101010010110001000) begin
      failures++; $display("FAIL 1050.25^2 = %h", sync_in);
    end
    one(32'h462D_7080, 32'h462D_7080, r);
    checks++;
    if (sync_in != 32'b01001100111010110000001001111100) begin
      failures++; $display("FAIL on-board vector = %h", sync_in);
    end
    for (int n = 0; n < 20000; n++) one(rand_operand(), rand_operand(), r);
    $display("no shift %0d, shift %0d, booth negative digits %0d, truncated %0d, overflow %0d, underflow %0d",
             n_noshift, n_shift, n_boothneg, n_trunc, n_ovf, n_unf);
    $display("invalid %0d, nan %0d, inf %0d, zero %0d, latency ok %0d", n_inv, n_nan, n_inf, n_zero, n_lat);
    checks++;
    if (n_noshift == 0 || n_shift == 0 || n_boothneg == 0 || n_trunc == 0 || n_ovf == 0 ||
        n_unf == 0 || n_inv == 0 || n_nan == 0 || n_inf == 0 || n_zero == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (n_lat != 20002) begin failures++; $display("FAIL output changed prev_out the clock edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

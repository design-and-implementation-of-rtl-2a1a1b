// tb_cla_adder: self-checking test of cla_adder at its default width (32) and at
// widths 8, 16, 10 and 48 (10 is not a multiple of the 4-bit group, 48 is
// the final stage width of the multiplier). Every vector is compared with
// {cout, sum} = a + b + cin computed by ordinary integer arithmetic. Corner
// vectors (all ones, carry in through a full propagate chain, zero) come
// first, then random ones. A watchdog ends the run if it hangs.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32, s32;  logic c32, co32;
  logic [7:0]  a8,  b8,  s8;   logic c8,  co8;
  logic [15:0] a16, b16, s16;  logic c16, co16;
  logic [9:0]  a10, b10, s10;  logic c10, co10;
  logic [47:0] a48, b48, s48;  logic c48, co48;

  cla_adder                u32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(co32));
  cla_adder #(.WIDTH(8))   u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  cla_adder #(.WIDTH(16))  u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  cla_adder #(.WIDTH(10))  u10 (.a(a10), .b(b10), .cin(c10), .sum(s10), .cout(co10));
  cla_adder #(.WIDTH(48))  u48 (.a(a48), .b(b48), .cin(c48), .sum(s48), .cout(co48));

  task automatic apply(input logic [47:0] a, input logic [47:0] b, input logic ci);
    logic [48:0] e48; logic [32:0] e32; logic [16:0] e16; logic [10:0] e10; logic [8:0] e8;
    a48 = a;        b48 = b;        c48 = ci;
    a32 = a[31:0];  b32 = b[31:0];  c32 = ci;
    a16 = a[15:0];  b16 = b[15:0];  c16 = ci;
    a10 = a[9:0];   b10 = b[9:0];   c10 = ci;
    a8  = a[7:0];   b8  = b[7:0];   c8  = ci;
    #1;
    e48 = {1'b0, a48} + {1'b0, b48} + 49'(ci);
    e32 = {1'b0, a32} + {1'b0, b32} + 33'(ci);
    e16 = {1'b0, a16} + {1'b0, b16} + 17'(ci);
    e10 = {1'b0, a10} + {1'b0, b10} + 11'(ci);
    e8  = {1'b0, a8}  + {1'b0, b8}  + 9'(ci);
    check({co48, s48} == e48, "48", 64'(a), 64'(b));
    check({co32, s32} == e32, "32", 64'(a32), 64'(b32));
    check({co16, s16} == e16, "16", 64'(a16), 64'(b16));
    check({co10, s10} == e10, "10", 64'(a10), 64'(b10));
    check({co8,  s8}  == e8,  "8",  64'(a8),  64'(b8));
  endtask

  task automatic check(input bit ok, input string w, input logic [63:0] a, input logic [63:0] b);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL width %s: a=%h b=%h", w, a, b);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);        // carry in ripples through every bit
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(48'h5555_5555_5555, 48'hAAAA_AAAA_AAAA, 1'b1);
    apply(48'h0F0F_0F0F_0F0F, 48'h00F0_F0F0_F0F1, 1'b0);
    for (int i = 0; i < 4000; i++)
      apply(48'({$urandom, $urandom}), 48'({$urandom, $urandom}), 1'($urandom));
    // operands that make whole 4-bit groups propagate
    for (int i = 0; i < 2000; i++) begin
      logic [47:0] x;
      x = 48'({$urandom, $urandom});
      apply(x, ~x ^ 48'($urandom & 32'h0001_0101), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

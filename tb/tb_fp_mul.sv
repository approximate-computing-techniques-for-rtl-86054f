// tb_fp_mul: single-precision multiplier against the product formed in double
// precision (exact for two 24-bit significands) and rounded to single with
// round-to-nearest-even, plus zero, infinity, NaN, overflow and underflow.
// A second instance keeps 10 mantissa bits (MB = 10): its inputs are cut to
// 10 fraction bits and the exact product is rounded to 10 fraction bits.
module tb_fp_mul;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a, b, p;

  logic [31:0] p10;
  int          n_rnd10 = 0;

  fp_mul dut (.a(a), .b(b), .p(p));
  fp_mul #(.MB(10)) dut10 (.a(a), .b(b), .p(p10));

  task automatic chk10(input logic [31:0] x, input logic [31:0] y);
    real         pr;
    logic [31:0] e;
    a = x; b = y; #1;
    pr = f2r(ftrunc(x, 10)) * f2r(ftrunc(y, 10));
    e  = r2fm(pr, 10);
    if (e != ftrunc(r2f(pr), 10)) n_rnd10++;
    checks++;
    if (p10 !== e) begin failures++; $display("FAIL MB=10 %h * %h = %h exp %h", x, y, p10, e); end
  endtask

  task automatic chk(input logic [31:0] x, input logic [31:0] y, input logic [31:0] e);
    a = x; b = y; #1;
    checks++;
    if (p !== e) begin failures++; $display("FAIL %h * %h = %h exp %h", x, y, p, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);      // 1 * 1
    chk(32'h4040_0000, 32'hC000_0000, 32'hC0C0_0000);      // 3 * -2
    chk(32'h0000_0000, 32'h4120_0000, 32'h0000_0000);
    chk(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);
    chk(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);
    chk(32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0000);
    chk(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);      // overflow
    chk(32'h0080_0000, 32'h0080_0000, 32'h0000_0000);      // underflow, flushed
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = {1'($urandom), 8'(80 + $urandom % 90), 23'($urandom)};
      y = {1'($urandom), 8'(80 + $urandom % 90), 23'($urandom)};
      chk(x, y, r2f(f2r(x) * f2r(y)));
      chk10(x, y);
    end
    chk10(32'h3FFF_FFFF, 32'h3F80_0000);                     // 1.99.. cut to 10 bits
    checks++;
    if (p10 !== 32'h3FFF_E000) begin failures++; $display("FAIL MB=10 truncation %h", p10); end
    checks++;
    if (n_rnd10 == 0) begin failures++; $display("FAIL MB=10 rounding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

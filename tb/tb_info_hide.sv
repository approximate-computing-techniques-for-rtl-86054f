// tb_info_hide: information hiding in the multiplier result. Checks the
// worked example (3.14159 x 12.31, P = 10, Key = 01010101): the result must
// lie below the exact product 38.6729729 and within 0.01% of it, that the result LSBs carry
// K_A ^ K_B ^ K_O ^ Key with K_O the LSBs of the product of the cleared
// operands, that without embedding the product of the cleared operands comes
// out unchanged, and that the relative error stays below 3 * 2^(P-23): clearing P bits of
// each operand moves it by less than 2^(P-23) relatively, and so does
// replacing P bits of the result.
module tb_info_hide;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a, b, r;
  logic [9:0]  key, ks;
  logic        en;

  info_hide #(.P(10)) dut (.a(a), .b(b), .key(key), .embed_en(en), .result(r), .k_s(ks));

  task automatic chk(input logic [31:0] x, input logic [31:0] y, input logic [9:0] k, input logic e);
    logic [31:0] o;
    real rel;
    a = x; b = y; key = k; en = e; #1;
    o = r2f(f2r({x[31:10], 10'd0}) * f2r({y[31:10], 10'd0}));
    checks++;
    if (e) begin
      if (r !== {o[31:10], x[9:0] ^ y[9:0] ^ o[9:0] ^ k} || ks !== r[9:0]) begin
        failures++; $display("FAIL embed %h %h -> %h", x, y, r);
      end
    end else if (r !== o) begin
      failures++; $display("FAIL plain %h %h -> %h exp %h", x, y, r, o);
    end
    rel = (f2r(r) - f2r(x) * f2r(y)) / (f2r(x) * f2r(y));
    if (rel < 0) rel = -rel;
    checks++;
    if (rel > 3.0 * (2.0 ** (-13))) begin failures++; $display("FAIL error %g", rel); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    chk(r2f(3.14159), r2f(12.31), 10'b0001010101, 1'b1);
    v = f2r(r);
    $display("example result %f", v);
    checks++;
    if (v < 38.668 || v > 38.6729729) begin failures++; $display("FAIL example %f", v); end
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x, y;
      x = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      y = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      chk(x, y, 10'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

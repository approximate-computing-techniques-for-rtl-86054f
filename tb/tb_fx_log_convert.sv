// tb_fx_log_convert: fixed-point <-> log-domain conversion (Q16.16, 32 bits)
// against a model written with real arithmetic: the log word must hold
// floor(log2|x|) + 127 and the first five bits of |x| / 2^floor(log2|x|) - 1;
// the recovered value must equal (1 + f/32) * 2^(e-127) in Q16.16, truncated
// toward zero and saturated. Covers negative values, zero, the most negative
// number, saturation and underflow to zero.
module tb_fx_log_convert;
  import log_pkg::*;
  int checks = 0, failures = 0;
  int n_neg = 0, n_sat = 0, n_zero = 0;

  logic [31:0] fx_in, fx_out;
  logint_t     l_out, l_in;

  fx_log_convert #(.W(32), .FB(16)) dut (.fx_in(fx_in), .l_out(l_out), .l_in(l_in), .fx_out(fx_out));

  task automatic chk_to(input logic [31:0] x);
    real         m, r;
    int          e, f;
    logic [13:0] exp_l;
    fx_in = x; #1;
    m = x[31] ? -real'($signed(x)) : real'(x);
    if (m == 0.0) exp_l = '0;
    else begin
      e = 0;
      r = m;
      while (r >= 2.0) begin r = r / 2.0; e++; end
      while (r < 1.0) begin r = r * 2.0; e--; end
      f = int'($floor((r - 1.0) * 32.0));
      exp_l = {x[31], 8'(e - 16 + 127), 5'(f)};
    end
    if (x[31]) n_neg++;
    checks++;
    if (l_out !== exp_l) begin
      failures++;
      $display("FAIL to_log %h -> %h exp %h", x, l_out, exp_l);
    end
  endtask

  task automatic chk_from(input logic [13:0] l);
    real         v;
    logic [31:0] mg, ev;
    l_in = l; #1;
    v = (1.0 + real'(l[4:0]) / 32.0) * (2.0 ** (real'(int'(l[12:5]) - 127 + 16)));
    if (v >= 2147483648.0) begin mg = 32'h7FFF_FFFF; n_sat++; end
    else begin
      mg = 32'(longint'($floor(v)));
      if (mg == 0) n_zero++;
    end
    ev = l[13] ? -mg : mg;
    checks++;
    if (fx_out !== ev) begin
      failures++;
      $display("FAIL from_log %h -> %h exp %h", l, fx_out, ev);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk_to(32'h0001_0000);     // 1.0 -> exponent 127, fraction 0
    checks++; if (l_out !== {1'b0, 8'd127, 5'd0}) begin failures++; $display("FAIL 1.0"); end
    chk_to(32'h0000_0000); chk_to(32'h8000_0000); chk_to(32'hFFFF_FFFF); chk_to(32'h0000_0001);
    chk_to(32'h7FFF_FFFF); chk_to(32'hFFFE_8000);
    for (int i = 0; i < 3000; i++) chk_to(32'($urandom) >> ($urandom % 32));
    for (int i = 0; i < 3000; i++) chk_to(-(32'($urandom) >> ($urandom % 32)));
    chk_from({1'b0, 8'd127, 5'd16});  // 1.5
    checks++; if (fx_out !== 32'h0001_8000) begin failures++; $display("FAIL 1.5 -> %h", fx_out); end
    chk_from({1'b1, 8'd128, 5'd0});   // -2.0
    chk_from({1'b0, 8'd254, 5'd31}); chk_from({1'b0, 8'd0, 5'd0}); chk_from({1'b0, 8'd142, 5'd31});
    for (int i = 0; i < 3000; i++) chk_from({1'($urandom), 8'(100 + $urandom % 50), 5'($urandom)});
    checks++;
    if (n_neg == 0 || n_sat == 0 || n_zero == 0) begin
      failures++; $display("FAIL coverage neg=%0d sat=%0d zero=%0d", n_neg, n_sat, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

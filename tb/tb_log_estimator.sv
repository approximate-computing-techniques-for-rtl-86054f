// tb_log_estimator: float operands through conversion, estimation, recovery
// and the cut decision. Checks the truncating conversion bit-exactly, the
// recovered estimates of multiply, divide, square root and add against the
// true results (within a factor 1.3), and that a term 16x smaller than the
// other is cut at delta = 3 while a term of similar size is kept.
module tb_log_estimator;
  import log_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  log_op_e     op;
  logic [31:0] fa, fb, est_f;
  logic [3:0]  n, ed;
  logic [12:0] delta;
  logic [13:0] est_l;
  logic        a_dom, nc;

  log_estimator dut (.op(op), .fa(fa), .fb(fb), .n(n), .delta(delta), .est_l(est_l),
                     .est_f(est_f), .ed(ed), .a_dominant(a_dom), .noncritical(nc));

  task automatic chk(input log_op_e o, input real x, input real y, input real tru);
    real est;
    op = o; fa = r2f(x); fb = r2f(y); n = 4'd2; delta = 13'd96; #1;
    est = f2r(est_f);
    checks++;
    if (est > tru * 1.3 || est < tru / 1.3) begin
      failures++; $display("FAIL %s %f %f est %f true %f", o.name(), x, y, est, tru);
    end
    checks++;
    if (est_f[17:0] != 18'd0) begin failures++; $display("FAIL recovery padding"); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // conversion keeps sign, exponent and 5 mantissa bits: pi -> 0 10000000 10010
    op = LOG_MAX; fa = r2f(3.14159); fb = r2f(1.0); n = 0; delta = 0; #1;
    checks++; if (est_l !== {1'b0, 8'd128, 5'b10010}) begin failures++; $display("FAIL convert %b", est_l); end
    for (int i = 0; i < 500; i++) begin
      real x, y;
      x = real'($urandom % 50000 + 1) / 17.0;
      y = real'($urandom % 50000 + 1) / 29.0;
      x = f2r(r2f(x)); y = f2r(r2f(y));
      chk(LOG_MUL, x, y, x * y);
      chk(LOG_DIV, x, y, x / y);
      chk(LOG_SQRT, x, y, $sqrt(x));
      chk(LOG_POW, x, y, x * x);
      chk(LOG_ADD, x, y, x + y);
      chk(LOG_MAX, x, y, (x > y) ? x : y);
    end
    op = LOG_ADD; fa = r2f(100.0); fb = r2f(6.0); delta = 13'd96; #1;
    checks++; if (!(nc && a_dom)) begin failures++; $display("FAIL cut of small term"); end
    fb = r2f(90.0); #1;
    checks++; if (nc) begin failures++; $display("FAIL similar term cut"); end
    op = LOG_MUL; fb = r2f(0.001); #1;
    checks++; if (nc) begin failures++; $display("FAIL multiply input cut"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

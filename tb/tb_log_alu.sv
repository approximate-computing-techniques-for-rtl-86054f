// tb_log_alu: every operation of the log-domain ALU against the real-valued
// reference model, plus the subtraction table at each ed and an accuracy
// check: the recovered estimate of a sum of two positive floats must lie
// within a factor 1.3 of the true sum.
module tb_log_alu;
  import log_pkg::*;
  import log_ref_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_comp = 0, n_nocomp = 0, n_sub = 0;

  log_op_e     op;
  logic [13:0] a, b, s;
  logic [3:0]  n, ed;

  log_alu dut (.op(op), .a(a), .b(b), .n(n), .s(s), .ed(ed));

  function automatic logic [13:0] rand_l();
    logic [13:0] r;
    r = {1'($urandom), 8'(100 + $urandom % 56), 5'($urandom)};
    return r;
  endfunction

  function automatic logic greater(input logic [13:0] x, input logic [13:0] y);
    real vx = (x[13] ? -1.0 : 1.0) * (2.0 ** lval(x));
    real vy = (y[13] ? -1.0 : 1.0) * (2.0 ** lval(y));
    return vx > vy;
  endfunction

  task automatic chk(input log_op_e o, input logic [13:0] x, input logic [13:0] y, input logic [3:0] pw);
    logic [13:0] e;
    op = o; a = x; b = y; n = pw; #1;
    case (o)
      LOG_MUL:  e = lenc(x[13] ^ y[13], lval(x) + lval(y));
      LOG_DIV:  e = lenc(x[13] ^ y[13], lval(x) - lval(y));
      LOG_SQRT: e = lenc(1'b0, $floor(lval(x) * 16.0) / 32.0);
      LOG_POW:  e = lenc(x[13] & pw[0], real'(pw) * lval(x));
      LOG_MAX:  e = greater(x, y) ? x : y;
      LOG_MIN:  e = greater(x, y) ? y : x;
      LOG_ADD:  e = addsub_ref(x, y, 1'b0);
      default:  e = addsub_ref(x, y, 1'b1);
    endcase
    checks++;
    if (s !== e) begin
      failures++;
      $display("FAIL %s a=%h b=%h n=%0d s=%h exp %h", o.name(), x, y, pw, s, e);
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
    // subtraction table: a = 2^0 positive, b at distance ed
    for (int e = 0; e <= 7; e++) begin
      op = LOG_SUB; a = {1'b0, 8'd127, 5'd0}; b = {1'b0, 8'(127 - e), 5'd0}; n = 0; #1;
      checks++;
      if (lval(s) != sub_table(e) || ed != 4'(e)) begin
        failures++; $display("FAIL table ed=%0d got %f", e, lval(s));
      end
    end
    // addition compensation: ed = 0..5 adds 2^-ed, ed >= 6 adds nothing
    for (int e = 0; e <= 7; e++) begin
      op = LOG_ADD; a = {1'b0, 8'd130, 5'd0}; b = {1'b0, 8'(130 - e), 5'd0}; n = 0; #1;
      checks++;
      if (lval(s) != 3.0 + ((e <= 5) ? 2.0 ** (-e) : 0.0)) begin
        failures++; $display("FAIL add comp ed=%0d got %f", e, lval(s));
      end
      if (e <= 5) n_comp++; else n_nocomp++;
    end
    for (int i = 0; i < 3000; i++) begin
      log_op_e o;
      o = log_op_e'($urandom % 8);
      if (o == LOG_SUB) n_sub++;
      chk(o, rand_l(), rand_l(), 4'($urandom % 5));
    end
    // accuracy of the addition estimate on positive floats
    for (int i = 0; i < 1000; i++) begin
      real fa, fb, est, tru;
      fa = f2r(r2f(real'($urandom % 100000 + 1) / 37.0));
      fb = f2r(r2f(real'($urandom % 100000 + 1) / 53.0));
      op = LOG_ADD; a = to_log(r2f(fa)); b = to_log(r2f(fb)); n = 0; #1;
      est = f2r(from_log(s));
      tru = fa + fb;
      checks++;
      if (est > tru * 1.3 || est < tru / 1.3) begin
        failures++; $display("FAIL accuracy %f + %f est %f", fa, fb, est);
      end
    end
    checks++; if (n_comp == 0 || n_nocomp == 0 || n_sub == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", n_comp, n_nocomp, n_sub);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

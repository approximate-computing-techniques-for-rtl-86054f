// tb_log_dot: log-domain vector multiplication. For random positive vectors
// of lengths 1..16 the result must equal the real-valued model of the
// two-pass method (max of the log products, sum of 2^-ed against it, minus
// one) bit-exactly and rise 2*len+1 clock edges after the edge that takes
// start, with one element per cycle. For one or two elements the estimate
// must lie within a factor 1.5 of the true dot product; longer vectors are
// not held to it, because log2(1 + x) ~ x no longer holds once many terms
// lie close to the maximum. len = 0 must give zero.
module tb_log_dot;
  import log_pkg::*;
  import log_ref_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        start = 0, in_valid = 0, busy, done;
  logic [4:0]  len = 0;
  logic [31:0] x = 0, y = 0, z_f;
  logint_t     z_l;

  log_dot #(.DEPTH(16)) dut (.clk(clk), .rst_n(rst_n), .start(start), .len(len), .in_valid(in_valid),
                             .x(x), .y(y), .busy(busy), .done(done), .z_l(z_l), .z_f(z_f));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    real xs[16], ys[16], lz[16], m, acc, tru, est;
    logic [13:0] e;
    int cyc;
    tru = 0.0; m = -1000.0;
    for (int i = 0; i < n; i++) begin
      xs[i] = f2r(r2f(real'($urandom % 10000 + 1) / 64.0));
      ys[i] = f2r(r2f(real'($urandom % 10000 + 1) / 16.0));
      lz[i] = lval(to_log(r2f(xs[i]))) + lval(to_log(r2f(ys[i])));
      if (lz[i] > m) m = lz[i];
      tru += xs[i] * ys[i];
    end
    acc = 0.0;
    for (int i = 0; i < n; i++) begin
      int ed = rnd(m - lz[i]);
      if (ed <= 5) acc += 2.0 ** (-ed);
    end
    e = (n == 0) ? 14'd0 : lenc(1'b0, m + acc - 1.0);
    @(negedge clk); start = 1; len = 5'(n);
    @(negedge clk); start = 0;
    cyc = 1;
    for (int i = 0; i < n; i++) begin
      in_valid = 1; x = r2f(xs[i]); y = r2f(ys[i]);
      @(negedge clk); cyc++;
    end
    in_valid = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * n + 2) begin
      failures++; $display("FAIL latency len=%0d cycles=%0d", n, cyc);
    end
    checks++;
    if (z_l !== e) begin failures++; $display("FAIL len=%0d z_l=%h exp %h", n, z_l, e); end
    if (n > 0 && n <= 2) begin
      est = f2r(z_f);
      checks++;
      if (est > tru * 1.5 || est < tru / 1.5) begin
        failures++; $display("FAIL accuracy len=%0d est %f true %f", n, est, tru);
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(16);
    for (int k = 0; k < 40; k++) run(1 + $urandom % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

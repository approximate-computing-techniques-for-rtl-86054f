// tb_log_kmeans_cut: conditional-cut workload for the log-domain vector unit.
// For each point of a clustering problem, the squared distance to every
// centre is first estimated with log_dot (the coordinate differences d_j are
// fed as x = y = d_j, so the unit estimates sum d_j^2 in the log domain).
// Only the centres whose estimate is no larger than the smallest estimate
// plus a threshold delta (in octaves) are recomputed exactly, and the point
// goes to the nearest recomputed centre. The test reports the share of
// exact distance computations saved and the share of points assigned
// differently from a full exact search, for delta = 1 and delta = 2.
// Each estimate pulses start with len = D, presents one pair per clock on
// the falling edge, and waits for done; z_l is read once done is high.
// Checks: delta = 2 mis-assigns no point, delta = 1 saves more than delta = 2,
// and both save some work. The data sizes are this test's own; the source
// gives the method, the thresholds and the metrics.
module tb_log_kmeans_cut;
  import log_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NP = 100, D = 8, KC = 4;

  logic        clk = 0, rst_n = 0;
  logic        start = 0, in_valid = 0, busy, done;
  logic [4:0]  len = 0;
  logic [31:0] x = 0, y = 0, z_f;
  logint_t     z_l;

  log_dot #(.DEPTH(16)) dut (.clk(clk), .rst_n(rst_n), .start(start), .len(len), .in_valid(in_valid),
                             .x(x), .y(y), .busy(busy), .done(done), .z_l(z_l), .z_f(z_f));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real pts [NP][D];
  real cen [KC][D];

  // log-domain estimate of the squared distance, as the 13-bit magnitude
  task automatic estimate(input int i, input int k, output int l);
    @(negedge clk); start = 1; len = 5'(D);
    @(negedge clk); start = 0;
    for (int j = 0; j < D; j++) begin
      in_valid = 1;
      x = r2f(pts[i][j] - cen[k][j]);
      y = x;
      @(negedge clk);
    end
    in_valid = 0;
    while (!done) @(negedge clk);
    l = int'(z_l.mag);
  endtask

  function automatic real exact_d(input int i, input int k);
    real s;
    s = 0.0;
    for (int j = 0; j < D; j++) s += (pts[i][j] - cen[k][j]) ** 2;
    return s;
  endfunction

  initial begin
    real saved [2], err [2];
    for (int k = 0; k < KC; k++)
      for (int j = 0; j < D; j++) cen[k][j] = real'($urandom % 1000) / 10.0;
    for (int i = 0; i < NP; i++)
      for (int j = 0; j < D; j++) pts[i][j] = cen[i % KC][j] + (real'($urandom % 4001) - 2000.0) / 50.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      int nrec, nerr;
      nrec = 0; nerr = 0;
      for (int i = 0; i < NP; i++) begin
        int  est [KC];
        int  mn, best_exact, best_cut;
        real bd, bc, d;
        mn = 1 << 20;
        for (int k = 0; k < KC; k++) begin
          estimate(i, k, est[k]);
          if (est[k] < mn) mn = est[k];
        end
        best_exact = 0; bd = exact_d(i, 0);
        for (int k = 1; k < KC; k++) begin
          d = exact_d(i, k);
          if (d < bd) begin bd = d; best_exact = k; end
        end
        best_cut = -1; bc = 0.0;
        for (int k = 0; k < KC; k++)
          if (est[k] <= mn + (t + 1) * 32) begin      // delta = t + 1 octaves
            nrec++;
            d = exact_d(i, k);
            if (best_cut < 0 || d < bc) begin bc = d; best_cut = k; end
          end
        if (best_cut != best_exact) nerr++;
      end
      saved[t] = 100.0 * (NP * KC - nrec) / (NP * KC);
      err[t]   = 100.0 * nerr / NP;
      $display("delta=%0d saved %0.2f%% of exact distances, mis-assigned %0.2f%%", t + 1, saved[t], err[t]);
    end
    checks++;
    if (err[1] != 0.0) begin failures++; $display("FAIL delta=2 mis-assigns points"); end
    checks++;
    if (!(saved[0] > saved[1])) begin failures++; $display("FAIL delta=1 saves no more than delta=2"); end
    checks++;
    if (saved[1] <= 0.0) begin failures++; $display("FAIL nothing saved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

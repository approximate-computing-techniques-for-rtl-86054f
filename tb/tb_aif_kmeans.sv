// tb_aif_kmeans: clustering workload on the AIF arithmetic. Points in four
// dimensions, drawn with wide noise around four fixed, overlapping centres,
// are assigned to the nearest of the centres by squared Euclidean distance,
// computed in signed 32-bit fixed point on the AIF adder (differences as
// additions of the negated coordinate) and multiplier, for PC = 2, 4 and 6
// with N = 32 in 8 blocks. Three Lloyd iterations update the centres (means
// taken exactly). The error metric is the share of points assigned
// differently from exact integer arithmetic (mis-clustered points). Checks:
// the share does not grow with PC and is zero at PC = 4 and PC = 6. Data
// sizes and the number of iterations are this test's own; the source gives
// the metric and the 32_8_pc configurations.
module tb_aif_kmeans;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NPC = 3;
  localparam int PCS [NPC] = '{2, 4, 6};
  localparam int NP = 200, D = 4, KC = 4;

  logic [31:0] ma [NPC], mb [NPC], aa [NPC], ab [NPC], as_ [NPC];
  logic [7:0]  sma [NPC], smb [NPC], saa [NPC], sab [NPC], sas [NPC];
  logic [63:0] mp [NPC];
  logic [15:0] smp [NPC];
  logic        aovf [NPC];

  for (genvar g = 0; g < NPC; g++) begin : g_pc
    aif_multiplier #(.N(32), .B(8), .PC(PCS[g])) u_mul (
      .a(ma[g]), .b(mb[g]), .st_a(sma[g]), .st_b(smb[g]), .is_signed(1'b1), .prod(mp[g]), .st_p(smp[g]));
    aif_adder #(.N(32), .B(8), .PC(PCS[g])) u_add (
      .a(aa[g]), .b(ab[g]), .st_a(saa[g]), .st_b(sab[g]), .is_signed(1'b1), .sum(as_[g]), .st_s(sas[g]), .ovf(aovf[g]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] st_of(input logic [31:0] v);
    return 8'(sentinel_s(s128_t'($signed(v)), 4, 8));
  endfunction

  task automatic amul(input int p, input int x, input int y, output longint r);
    if (p == NPC) begin r = longint'(x) * longint'(y); return; end
    ma[p] = x; mb[p] = y; sma[p] = st_of(x); smb[p] = st_of(y);
    #1;
    r = longint'(mp[p]);
  endtask

  task automatic aadd(input int p, input int x, input int y, output int r);
    if (p == NPC) begin r = x + y; return; end
    aa[p] = x; ab[p] = y; saa[p] = st_of(x); sab[p] = st_of(y);
    #1;
    r = int'(as_[p]);
    if (aovf[p]) begin failures++; $display("FAIL unexpected overflow"); end
  endtask

  int pts [NP][D];

  // squared distance; coordinates below 2^21, so each square fits
  // in 64 bits and the sum is accumulated exactly in the testbench
  task automatic sqdist(input int p, input int a [D], input int c [D], output longint r);
    int     d;
    longint q;
    r = 0;
    for (int j = 0; j < D; j++) begin
      aadd(p, a[j], -c[j], d);
      amul(p, d, d, q);
      r += q;
    end
  endtask

  task automatic cluster(input int p, output int lab [NP]);
    int     cen [KC][D];
    longint best, dd;
    for (int k = 0; k < KC; k++) cen[k] = pts[k * (NP / KC)];
    for (int it = 0; it < 3; it++) begin
      longint sum [KC][D];
      int     cnt [KC];
      for (int k = 0; k < KC; k++) begin cnt[k] = 0; for (int j = 0; j < D; j++) sum[k][j] = 0; end
      for (int i = 0; i < NP; i++) begin
        best = -1;
        for (int k = 0; k < KC; k++) begin
          sqdist(p, pts[i], cen[k], dd);
          if (best < 0 || dd < best) begin best = dd; lab[i] = k; end
        end
        cnt[lab[i]]++;
        for (int j = 0; j < D; j++) sum[lab[i]][j] += pts[i][j];
      end
      for (int k = 0; k < KC; k++)
        if (cnt[k] != 0) for (int j = 0; j < D; j++) cen[k][j] = int'(sum[k][j] / cnt[k]);
    end
  endtask

  initial begin
    int  ref_lab [NP], lab [NP];
    real mis [NPC];
    for (int i = 0; i < NP; i++) begin
      int c;
      c = i / (NP / KC);
      for (int j = 0; j < D; j++)
        pts[i][j] = ((c * 37 + j * 11) % 64) * 16384 + int'($urandom % 2097152) - 1048576;
    end
    cluster(NPC, ref_lab);
    for (int p = 0; p < NPC; p++) begin
      int n;
      n = 0;
      cluster(p, lab);
      for (int i = 0; i < NP; i++) if (lab[i] != ref_lab[i]) n++;
      mis[p] = 100.0 * n / NP;
      $display("32_8_%0d mis-clustered %0.2f%%", PCS[p], mis[p]);
    end
    for (int p = 1; p < NPC; p++) begin
      checks++;
      if (mis[p] > mis[p-1]) begin failures++; $display("FAIL mis-clustering grows at pc=%0d", PCS[p]); end
      checks++;
      if (mis[p] != 0.0) begin failures++; $display("FAIL pc=%0d mis-clusters points", PCS[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

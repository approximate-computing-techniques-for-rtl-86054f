// tb_aif_fft: 16-point FFT workload on the AIF arithmetic. A radix-2
// decimation-in-time FFT of random complex input (23-bit signed parts) is
// computed in signed 32-bit fixed point with Q14 twiddle factors: every real
// product of a complex multiply goes through the AIF multiplier, every sum
// and difference through the AIF adder (a difference adds the negated
// operand, as the engine's subtract does). This runs for PC = 2, 4 and 6
// with N = 32 in 8 blocks, and once with exact integer arithmetic. The error
// metric is the average relative error of the output magnitudes against the
// exact path (ARES). Checks: the ARES falls as PC grows, and is below 1e-6
// at PC = 6. Input range, twiddle format and the rescaling of each product
// by 2^-14 are this test's own; the source gives the point count and metric.
module tb_aif_fft;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NPC = 3;
  localparam int PCS [NPC] = '{2, 4, 6};

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

  // product rescaled by 2^-14 (p = NPC: exact)
  task automatic amul(input int p, input int x, input int y, output int r);
    logic [63:0] q;
    if (p == NPC) q = 64'(longint'(x) * longint'(y));
    else begin
      ma[p] = x; mb[p] = y; sma[p] = st_of(x); smb[p] = st_of(y);
      #1;
      q = mp[p];
    end
    r = int'(($signed(q) + 64'sd8192) >>> 14);
  endtask

  task automatic aadd(input int p, input int x, input int y, output int r);
    if (p == NPC) begin r = x + y; return; end
    aa[p] = x; ab[p] = y; saa[p] = st_of(x); sab[p] = st_of(y);
    #1;
    r = int'(as_[p]);
    if (aovf[p]) begin failures++; $display("FAIL unexpected overflow"); end
  endtask

  int wr [8], wi [8];                  // twiddles e^{-j 2 pi k/16} in Q14

  task automatic fft16(input int p, input int xr [16], input int xi [16], output int yr [16], output int yi [16]);
    int ar [16], ai [16];
    int tr, ti, t1, t2;
    for (int i = 0; i < 16; i++) begin  // bit-reversed load
      int j;
      j = {i[0], i[1], i[2], i[3]};
      ar[j] = xr[i]; ai[j] = xi[i];
    end
    for (int len = 2; len <= 16; len *= 2)
      for (int s = 0; s < 16; s += len)
        for (int k = 0; k < len / 2; k++) begin
          int u, v, tw;
          u  = s + k;
          v  = s + k + len / 2;
          tw = k * (16 / len);
          // t = w * a[v]
          amul(p, ar[v], wr[tw], t1); amul(p, ai[v], wi[tw], t2); aadd(p, t1, -t2, tr);
          amul(p, ar[v], wi[tw], t1); amul(p, ai[v], wr[tw], t2); aadd(p, t1, t2, ti);
          aadd(p, ar[u], -tr, ar[v]); aadd(p, ai[u], -ti, ai[v]);
          aadd(p, ar[u], tr, ar[u]);  aadd(p, ai[u], ti, ai[u]);
        end
    yr = ar; yi = ai;
  endtask

  initial begin
    real pi = 3.14159265358979;
    real ares [NPC];
    int  nterm = 0;
    for (int k = 0; k < 8; k++) begin
      wr[k] = int'($floor(16384.0 * $cos(2.0 * pi * k / 16.0) + 0.5));
      wi[k] = int'($floor(-16384.0 * $sin(2.0 * pi * k / 16.0) + 0.5));
    end
    foreach (ares[i]) ares[i] = 0.0;
    for (int run = 0; run < 20; run++) begin
      int xr [16], xi [16], er [16], ei [16], yr [16], yi [16];
      for (int i = 0; i < 16; i++) begin
        xr[i] = int'($urandom % 32'h80_0000) - 32'h40_0000;
        xi[i] = int'($urandom % 32'h80_0000) - 32'h40_0000;
      end
      fft16(NPC, xr, xi, er, ei);
      for (int p = 0; p < NPC; p++) begin
        fft16(p, xr, xi, yr, yi);
        for (int i = 0; i < 16; i++) begin
          real me, ma_;
          me  = $sqrt(real'(er[i]) ** 2 + real'(ei[i]) ** 2);
          ma_ = $sqrt(real'(yr[i] - er[i]) ** 2 + real'(yi[i] - ei[i]) ** 2);
          if (me > 0.0) ares[p] += ma_ / me;
        end
      end
      nterm += 16;
    end
    for (int p = 0; p < NPC; p++) begin
      ares[p] = ares[p] / nterm;
      $display("32_8_%0d ARES %e", PCS[p], ares[p]);
    end
    for (int p = 1; p < NPC; p++) begin
      checks++;
      if (!(ares[p] < ares[p-1])) begin failures++; $display("FAIL ARES does not fall at pc=%0d", PCS[p]); end
    end
    checks++;
    if (ares[NPC-1] >= 1e-6) begin failures++; $display("FAIL pc=6 ARES too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
